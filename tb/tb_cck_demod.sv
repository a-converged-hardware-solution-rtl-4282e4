// IEEE 802.11b 11 Mb/s CCK demodulation through the Walsh-transform mode.
//
// For random symbols, builds the 8-chip CCK codeword
//   c = { e^j(p1+p2+p3+p4), e^j(p1+p3+p4), e^j(p1+p2+p4), -e^j(p1+p4),
//         e^j(p1+p2+p3),    e^j(p1+p3),    -e^j(p1+p2),   e^j(p1) }
// (phases in quarter turns), scales it and adds noise. The receiver's simple
// pre-processing is done here: chips 3 and 6 are negated and the chip order
// reversed, so that input k carries p2 in bit 0, p3 in bit 1, p4 in bit 2.
// The processor's FWT then correlates with all 64 (p2,p3,p4) candidates at
// once; the largest output must sit at l = 16*p4 + 4*p3 + p2 and its phase
// must give p1. Also checks the 14-cycle busy time per symbol.
module tb_cck_demod;
  import cfft_pkg::*;

  localparam int AMP = 700;     // chip amplitude
  localparam int NOISE = 250;   // uniform noise, +-NOISE per part
  localparam int SYMBOLS = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  mode_e mode = MODE_FWT;
  logic start = 1'b0, busy, done;
  logic in_we = 1'b0;
  logic [5:0] in_idx = '0, out_idx = '0;
  logic signed [IO_W-1:0] in_re = '0, in_im = '0, out_re, out_im;
  cplx_t out_word;

  cfft_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // A * e^(j*q*pi/2)
  function automatic void phasor(int q, int a, output int re, output int im);
    case (q & 3)
      0: begin re = a;  im = 0;  end
      1: begin re = 0;  im = a;  end
      2: begin re = -a; im = 0;  end
      default: begin re = 0; im = -a; end
    endcase
  endfunction

  function automatic int noise();
    return int'($urandom_range(2 * NOISE)) - NOISE;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < SYMBOLS; s++) begin
      int p1, p2, p3, p4, cr [8], ci [8], q [8], bestl, cyc;
      longint mag, best;
      p1 = $urandom_range(3); p2 = $urandom_range(3); p3 = $urandom_range(3); p4 = $urandom_range(3);
      q[0] = p1 + p2 + p3 + p4; q[1] = p1 + p3 + p4; q[2] = p1 + p2 + p4; q[3] = p1 + p4 + 2;
      q[4] = p1 + p2 + p3;      q[5] = p1 + p3;      q[6] = p1 + p2 + 2;  q[7] = p1;
      for (int c = 0; c < 8; c++) begin
        phasor(q[c], AMP, cr[c], ci[c]);
        cr[c] += noise(); ci[c] += noise();
      end
      // pre-processing and loading: input k = chip 7-k, chips 3 and 6 negated
      for (int k = 0; k < 8; k++) begin
        int c, sg;
        c = 7 - k;
        sg = (c == 3 || c == 6) ? -1 : 1;
        @(negedge clk);
        in_we = 1'b1; in_idx = 6'(k); in_re = IO_W'(sg * cr[c]); in_im = IO_W'(sg * ci[c]);
      end
      @(negedge clk);
      in_we = 1'b0; start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 0;
      while (busy && cyc < 100) begin cyc++; @(negedge clk); end
      chk(cyc == 14, $sformatf("symbol %0d busy %0d cycles", s, cyc));
      best = -1; bestl = 0;
      for (int l = 0; l < 64; l++) begin
        out_idx = 6'(l);
        #1;
        mag = longint'(out_word.re) * out_word.re + longint'(out_word.im) * out_word.im;
        if (mag > best) begin best = mag; bestl = l; end
      end
      chk(bestl == 16 * p4 + 4 * p3 + p2,
          $sformatf("symbol %0d: peak at %0d, expected %0d", s, bestl, 16 * p4 + 4 * p3 + p2));
      out_idx = 6'(bestl);
      #1;
      begin
        int dq;
        // quadrant of the peak: +re -> 0, +im -> 1, -re -> 2, -im -> 3
        if (out_word.re > 0 && out_word.re >= out_word.im && out_word.re >= -out_word.im) dq = 0;
        else if (out_word.im > 0 && out_word.im >= out_word.re && out_word.im >= -out_word.re) dq = 1;
        else if (out_word.re < 0 && -out_word.re >= out_word.im && -out_word.re >= -out_word.im) dq = 2;
        else dq = 3;
        chk(dq == p1, $sformatf("symbol %0d: phase %0d, expected %0d", s, dq, p1));
      end
    end
    $display("decoded %0d CCK symbols", SYMBOLS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
