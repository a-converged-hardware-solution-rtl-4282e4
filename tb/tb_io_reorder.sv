// Test of the reordering ports. For every mode and index it checks the
// input address (FFT natural, DCT even/odd split, FWT {0,k2,0,k1,0,k0}), the
// output address (FFT/DCT radix-4 digit reversal, FWT natural), the input
// word scaling (x2 for FFT/DCT, x1 for FWT) and the output sample scaling
// (word/2 rounded for FFT/DCT, word/8 for FWT) with 12-bit saturation.
module tb_io_reorder;
  import cfft_pkg::*;

  mode_e mode;
  logic [5:0] in_idx, out_idx;
  logic signed [IO_W-1:0] in_re, in_im, out_re, out_im;
  addr_t in_addr, out_addr;
  cplx_t in_word, out_word;

  io_reorder dut (.*);

  int checks = 0, failures = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic int sat12(int v);
    return v > 2047 ? 2047 : (v < -2048 ? -2048 : v);
  endfunction

  initial begin
    mode_e modes [3] = '{MODE_FFT, MODE_DCT, MODE_FWT};
    int seen [64];
    foreach (modes[mi]) begin
      mode = modes[mi];
      for (int a = 0; a < 64; a++) seen[a] = 0;
      for (int n = 0; n < ((mode == MODE_FWT) ? 8 : 64); n++) begin
        int ea, eo;
        in_idx = 6'(n); out_idx = 6'(n);
        in_re = IO_W'($urandom); in_im = IO_W'($urandom);
        out_word.re = INT_W'($urandom); out_word.im = INT_W'($urandom);
        #1;
        case (mode)
          MODE_FFT: ea = n;
          MODE_DCT: ea = (n % 2 == 0) ? n / 2 : 63 - n / 2;
          default:  ea = ((n >> 2) & 1) * 16 + ((n >> 1) & 1) * 4 + (n & 1);
        endcase
        eo = (mode == MODE_FWT) ? n : (n % 4) * 16 + ((n / 4) % 4) * 4 + n / 16;
        seen[ea]++;
        chk(int'(in_addr) == ea, $sformatf("%s in_addr(%0d) = %0d exp %0d", mode.name(), n, in_addr, ea));
        chk(int'(out_addr) == eo, $sformatf("%s out_addr(%0d) = %0d exp %0d", mode.name(), n, out_addr, eo));
        if (mode == MODE_FWT) begin
          chk(int'(in_word.re) == int'(in_re) && int'(in_word.im) == int'(in_im), "fwt input word");
          chk(int'(out_re) == sat12(int'(out_word.re) >>> 3) && int'(out_im) == sat12(int'(out_word.im) >>> 3), "fwt output sample");
        end else begin
          chk(int'(in_word.re) == 2 * int'(in_re) && int'(in_word.im) == 2 * int'(in_im), "fft/dct input word");
          chk(int'(out_re) == sat12((int'(out_word.re) + 1) >>> 1) && int'(out_im) == sat12((int'(out_word.im) + 1) >>> 1),
              $sformatf("fft/dct output sample %0d -> %0d", out_word.re, out_re));
        end
      end
      for (int a = 0; a < 64; a++) if (mode != MODE_FWT) chk(seen[a] == 1, $sformatf("%s address %0d used %0d times", mode.name(), a, seen[a]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
