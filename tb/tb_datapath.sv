// Test of the converged datapath. FFT/DCT mode: a new set of four words enters
// every cycle and its coefficients one cycle later; two cycles after entry,
// wr[m] must equal (sum_k x_k (-j)^(k*m)) * w_m / 2**12, rounded to nearest
// and computed here in integers; wr[4..7] stay zero. FWT mode: the eight Walsh
// outputs appear in the same cycle as their inputs (no pipeline).
module tb_datapath;
  import cfft_pkg::*;

  logic  clk = 1'b0, fwt = 1'b0;
  cplx_t rd   [4];
  coef_t coef [4];
  cplx_t wr   [8];

  datapath dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  function automatic void rot(longint a, longint b, int e, output longint r, output longint i);
    case (e % 4)
      0: begin r = a;  i = b;  end
      1: begin r = b;  i = -a; end
      2: begin r = -a; i = -b; end
      default: begin r = -b; i = a; end
    endcase
  endfunction

  task automatic cmp(int idx, longint er, longint ei, string tag);
    checks++;
    if (longint'(wr[idx].re) != er || longint'(wr[idx].im) != ei) begin
      failures++;
      if (failures < 10) $display("FAIL: %s wr%0d = %0d,%0d expected %0d,%0d", tag, idx, wr[idx].re, wr[idx].im, er, ei);
    end
  endtask

  longint xr [3][4], xi [3][4];  // inputs of the last three cycles

  initial begin
    for (int k = 0; k < 4; k++) begin rd[k] = '0; coef[k] = '0; end
    // FFT/DCT pipeline
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      for (int h = 2; h > 0; h--) begin xr[h] = xr[h-1]; xi[h] = xi[h-1]; end
      for (int k = 0; k < 4; k++) begin
        xr[0][k] = $signed(13'($urandom)); xi[0][k] = $signed(13'($urandom));
        rd[k].re = INT_W'(xr[0][k]); rd[k].im = INT_W'(xi[0][k]);
        coef[k].re = COEF_W'($urandom); coef[k].im = COEF_W'($urandom);
      end
      #1;
      // results of the inputs entered two cycles ago; their coefficients
      // were applied one cycle ago and are kept in cref
      if (t >= 2)
        for (int m = 0; m < 4; m++) begin
          longint sr, si, r, i, pr, pi;
          sr = 0; si = 0;
          for (int k = 0; k < 4; k++) begin rot(xr[2][k], xi[2][k], k * m, r, i); sr += r; si += i; end
          pr = sr * cref[m].re - si * cref[m].im;
          pi = sr * cref[m].im + si * cref[m].re;
          cmp(m, (pr + 2048) >>> 12, (pi + 2048) >>> 12, "fft");
        end
      if (t >= 1)
        for (int i = 4; i < 8; i++) cmp(i, 0, 0, "fft unused");
      for (int m = 0; m < 4; m++) cref[m] = coef[m];
    end
    // FWT: combinational
    @(negedge clk);
    fwt = 1'b1;
    for (int t = 0; t < 200; t++) begin
      for (int k = 0; k < 4; k++) begin
        xr[0][k] = $signed(13'($urandom)); xi[0][k] = $signed(13'($urandom));
        rd[k].re = INT_W'(xr[0][k]); rd[k].im = INT_W'(xi[0][k]);
      end
      #1;
      for (int b = 0; b < 2; b++)
        for (int l = 0; l < 4; l++) begin
          longint r, i;
          rot(xr[0][2 * b + 1], xi[0][2 * b + 1], l, r, i);
          cmp((l >> 1) * 4 + b * 2 + (l & 1), xr[0][2 * b] + r, xi[0][2 * b] + i, "fwt");
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  coef_t cref [4];

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
