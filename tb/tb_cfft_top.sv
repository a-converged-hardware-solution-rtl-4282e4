// End-to-end test of the converged transform processor at its default size.
//
// Runs FFTs and DCTs of random 12-bit data and modified Walsh transforms of
// random 8-sample vectors, switching the mode between runs. Results are read
// back through the output port and compared with a floating-point DFT / DCT
// (within a rounding tolerance) and with an exact integer Walsh transform.
// Also checks the busy time of each run (50 cycles FFT/DCT, 14 cycles FWT),
// that input writes are ignored while busy, and that the 12-bit output port
// saturates. Each mechanism is counted and must occur at least once.
module tb_cfft_top;
  import cfft_pkg::*;

  localparam real PI = 3.14159265358979323846;
  localparam int  TOL_WORD = 24;  // LSBs of the 16-bit memory word

  logic clk = 1'b0, rst_n = 1'b0;
  mode_e mode = MODE_FFT;
  logic start = 1'b0, busy, done;
  logic in_we = 1'b0;
  logic [5:0] in_idx = '0, out_idx = '0;
  logic signed [IO_W-1:0] in_re = '0, in_im = '0, out_re, out_im;
  cplx_t out_word;

  cfft_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_fft = 0, n_dct = 0, n_fwt = 0, n_switch = 0, n_ignored = 0, n_sat = 0;
  int max_err = 0;
  mode_e last_mode = MODE_FFT;
  int xr [64], xi [64];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic load(mode_e m, int n);
    mode = m;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_we = 1'b1; in_idx = 6'(i); in_re = IO_W'(xr[i]); in_im = IO_W'(xi[i]);
    end
    @(negedge clk);
    in_we = 1'b0;
  endtask

  // start a run, optionally poke the input port while busy, count busy cycles
  task automatic run(mode_e m, int exp_cycles, bit poke);
    int cyc;
    if (m != last_mode) n_switch++;
    last_mode = m;
    @(negedge clk);
    mode = m; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (busy) begin
      if (poke) begin
        in_we = 1'b1; in_idx = 6'd0; in_re = 12'sd1234; in_im = -12'sd77;
      end
      cyc++;
      @(negedge clk);
      if (cyc > 200) break;
    end
    in_we = 1'b0;
    check(cyc == exp_cycles, $sformatf("mode %s busy %0d cycles, expected %0d", m.name(), cyc, exp_cycles));
  endtask

  task automatic do_fft(bit poke);
    real er, ei, a;
    for (int i = 0; i < 64; i++) begin
      xr[i] = $signed(12'($urandom));
      xi[i] = $signed(12'($urandom));
    end
    // first run: corner samples (+-2047 +-2047j) picked so that X(8) has the
    // largest possible real part, which drives the output port into saturation
    if (n_fft == 0) for (int i = 0; i < 64; i++) begin
      real best, v;
      best = -1.0e9;
      a = -2.0 * PI * real'(i * 8) / 64.0;
      for (int c = 0; c < 4; c++) begin
        v = ((c & 1) ? -2047.0 : 2047.0) * $cos(a) - ((c & 2) ? -2047.0 : 2047.0) * $sin(a);
        if (v > best) begin
          best = v;
          xr[i] = (c & 1) ? -2047 : 2047;
          xi[i] = (c & 2) ? -2047 : 2047;
        end
      end
    end
    load(MODE_FFT, 64);
    run(MODE_FFT, 50, poke);
    if (poke) n_ignored++;
    for (int k = 0; k < 64; k++) begin
      er = 0.0; ei = 0.0;
      for (int n = 0; n < 64; n++) begin
        a = -2.0 * PI * real'(n * k) / 64.0;
        er += real'(xr[n]) * $cos(a) - real'(xi[n]) * $sin(a);
        ei += real'(xr[n]) * $sin(a) + real'(xi[n]) * $cos(a);
      end
      out_idx = 6'(k);
      #1;
      check(errok(out_word.re, er / 32.0) && errok(out_word.im, ei / 32.0),
            $sformatf("FFT X(%0d) = %0d,%0d expected %f,%f", k, out_word.re, out_word.im, er / 32.0, ei / 32.0));
      check(portok(out_re, er / 64.0) && portok(out_im, ei / 64.0),
            $sformatf("FFT port X(%0d) = %0d,%0d expected %f,%f", k, out_re, out_im, er / 64.0, ei / 64.0));
      if (er / 64.0 > 2048.0 || ei / 64.0 > 2048.0) n_sat++;
    end
    n_fft++;
  endtask

  task automatic do_dct();
    real c;
    for (int i = 0; i < 64; i++) begin
      xr[i] = $signed(12'($urandom));
      xi[i] = 0;
    end
    load(MODE_DCT, 64);
    run(MODE_DCT, 50, 1'b0);
    for (int k = 0; k < 64; k++) begin
      c = 0.0;
      for (int n = 0; n < 64; n++) c += real'(xr[n]) * $cos(PI * real'((2 * n + 1) * k) / 128.0);
      out_idx = 6'(k);
      #1;
      check(errok(out_word.re, c / 32.0),
            $sformatf("DCT C(%0d) = %0d expected %f", k, out_word.re, c / 32.0));
      check(portok(out_re, c / 64.0), $sformatf("DCT port C(%0d) = %0d expected %f", k, out_re, c / 64.0));
    end
    n_dct++;
  endtask

  task automatic do_fwt();
    int er, ei, e;
    for (int i = 0; i < 8; i++) begin
      xr[i] = $signed(12'($urandom));
      xi[i] = $signed(12'($urandom));
    end
    load(MODE_FWT, 8);
    run(MODE_FWT, 14, 1'b0);
    for (int l = 0; l < 64; l++) begin
      er = 0; ei = 0;
      for (int k = 0; k < 8; k++) begin
        e = ((k >> 2) & 1) * ((l >> 4) & 3) + ((k >> 1) & 1) * ((l >> 2) & 3) + (k & 1) * (l & 3);
        case (e % 4)
          0: begin er += xr[k]; ei += xi[k]; end
          1: begin er += xi[k]; ei -= xr[k]; end
          2: begin er -= xr[k]; ei -= xi[k]; end
          default: begin er -= xi[k]; ei += xr[k]; end
        endcase
      end
      out_idx = 6'(l);
      #1;
      check(int'(out_word.re) == er && int'(out_word.im) == ei,
            $sformatf("FWT X(%0d) = %0d,%0d expected %0d,%0d", l, out_word.re, out_word.im, er, ei));
      check(int'(out_re) == (er >>> 3) && int'(out_im) == (ei >>> 3),
            $sformatf("FWT port X(%0d) = %0d,%0d expected %0d,%0d", l, out_re, out_im, er >>> 3, ei >>> 3));
    end
    n_fwt++;
  endtask

  function automatic bit errok(logic signed [INT_W-1:0] got, real exp);
    real d;
    d = real'(got) - exp;
    if (d < 0.0) d = -d;
    if (int'(d) > max_err) max_err = int'(d);
    return d <= real'(TOL_WORD);
  endfunction

  function automatic bit portok(logic signed [IO_W-1:0] got, real exp);
    real d;
    if (exp > 2047.0) exp = 2047.0;
    if (exp < -2048.0) exp = -2048.0;
    d = real'(got) - exp;
    if (d < 0.0) d = -d;
    return d <= real'(TOL_WORD) / 2.0 + 1.0;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    do_fft(1'b0);   // worst-case input: port saturation
    do_fft(1'b1);   // input port poked while busy
    do_fwt();
    do_dct();
    do_fwt();
    do_fft(1'b0);
    do_dct();
    do_fwt();
    $display("runs: fft=%0d dct=%0d fwt=%0d mode_switches=%0d ignored_writes=%0d port_saturations=%0d max_word_error=%0d",
             n_fft, n_dct, n_fwt, n_switch, n_ignored, n_sat, max_err);
    check(n_fft > 0, "no FFT run");
    check(n_dct > 0, "no DCT run");
    check(n_fwt > 0, "no FWT run");
    check(n_switch > 0, "no mode switch");
    check(n_ignored > 0, "no write while busy");
    check(n_sat > 0, "no output saturation");
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
