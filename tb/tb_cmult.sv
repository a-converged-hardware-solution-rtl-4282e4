// Random test of the pipelined complex multiplier: the result presented one
// clock edge after the operands must equal (a*w) / 2**12 rounded to nearest
// (halves up) and saturated to 16 bits, computed here in integer arithmetic.
// Includes large operands that saturate.
module tb_cmult;
  import cfft_pkg::*;

  logic  clk = 1'b0;
  cplx_t a, y;
  coef_t w;

  cmult dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, nsat = 0;

  function automatic longint rs(longint v);
    longint r;
    r = (v + 2048) >>> 12;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  initial begin
    longint er, ei;
    a = '0; w = '0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      a.re = INT_W'($urandom); a.im = INT_W'($urandom);
      w.re = COEF_W'($urandom); w.im = COEF_W'($urandom);
      if (t % 4 == 0) begin w.re = -12'sd2048; w.im = -12'sd2048; a.re = -16'sd32768; a.im = 16'sd32767; end
      er = rs(longint'(a.re) * w.re - longint'(a.im) * w.im);
      ei = rs(longint'(a.re) * w.im + longint'(a.im) * w.re);
      if (er == 32767 || er == -32768 || ei == 32767 || ei == -32768) nsat++;
      @(posedge clk);
      #1;
      checks++;
      if (longint'(y.re) != er || longint'(y.im) != ei) begin
        failures++;
        if (failures < 10) $display("FAIL: %0d,%0d * %0d,%0d -> %0d,%0d expected %0d,%0d", a.re, a.im, w.re, w.im, y.re, y.im, er, ei);
      end
    end
    checks++;
    if (nsat == 0) begin failures++; $display("FAIL: saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
