// Test of the address generator: for an FFT, a DCT and an FWT run it records
// the read addresses, write addresses and enables, and ROM rows cycle by cycle
// and compares them with the address tables of the transform (written out
// here digit by digit), checks that FFT writes trail reads by two cycles, that
// the DCT last step uses ROM rows 48..63, and the busy time (50 / 14 cycles).
module tb_addr_gen;
  import cfft_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  mode_e mode = MODE_FFT;
  logic  busy, done, fwt;
  addr_t rd_addr [4];
  addr_t wr_addr [8];
  logic  wr_en   [8];
  logic [5:0] coef_addr;

  addr_gen dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // expected FFT address m at counter c (x0 = MSB)
  function automatic int efft(int c, int m);
    int x23, x45;
    x23 = (c >> 2) & 3; x45 = c & 3;
    if (c < 16) return m * 16 + x23 * 4 + x45;
    if (c < 32) return x23 * 16 + m * 4 + x45;
    return x23 * 16 + x45 * 4 + m;
  endfunction

  function automatic int efwt(int c, int i);
    int x3, x4, x5;
    x3 = (c >> 2) & 1; x4 = (c >> 1) & 1; x5 = c & 1;
    // i: bit0 -> first listed variation, bit1 -> second butterfly, bit2 -> upper half
    if (c < 4) return ((i >> 2) & 1) * 32 + (i & 1) * 16 + x5 * 4 + ((i >> 1) & 1);
    if (c < 8) return x4 * 32 + x5 * 16 + ((i >> 2) & 1) * 8 + (i & 1) * 4 + ((i >> 1) & 1);
    return x3 * 32 + x4 * 16 + x5 * 8 + ((i >> 1) & 1) * 4 + ((i >> 2) & 1) * 2 + (i & 1);
  endfunction

  task automatic run(mode_e m);
    int cyc, nrd, nwr;
    @(negedge clk);
    mode = m; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0; nrd = 0; nwr = 0;
    while (busy) begin
      if (m == MODE_FWT) begin
        for (int i = 0; i < 4; i++)
          chk(int'(rd_addr[i]) == efwt(cyc + 2, i), $sformatf("fwt c%0d rd a%0d = %0d exp %0d", cyc + 2, i, rd_addr[i], efwt(cyc + 2, i)));
        for (int i = 0; i < 8; i++) begin
          chk(wr_en[i] && int'(wr_addr[i]) == efwt(cyc + 2, i), $sformatf("fwt c%0d wr a%0d = %0d exp %0d", cyc + 2, i, wr_addr[i], efwt(cyc + 2, i)));
        end
        chk(fwt, "fwt bit");
      end else begin
        if (cyc < 48)
          for (int i = 0; i < 4; i++)
            chk(int'(rd_addr[i]) == efft(cyc, i), $sformatf("fft c%0d rd a%0d = %0d exp %0d", cyc, i, rd_addr[i], efft(cyc, i)));
        if (cyc >= 1 && cyc <= 48) begin
          int r;
          r = cyc - 1;
          if (m == MODE_DCT && r >= 32) r += 16;
          chk(int'(coef_addr) == r, $sformatf("coef row %0d exp %0d", coef_addr, r));
        end
        for (int i = 0; i < 8; i++) begin
          if (cyc >= 2 && cyc < 50 && i < 4)
            chk(wr_en[i] && int'(wr_addr[i]) == efft(cyc - 2, i), $sformatf("fft c%0d wr a%0d = %0d exp %0d", cyc - 2, i, wr_addr[i], efft(cyc - 2, i)));
          else
            chk(!wr_en[i], $sformatf("fft cycle %0d spurious write %0d", cyc, i));
        end
        chk(!fwt, "fwt bit");
      end
      chk(!done, "done while busy");
      cyc++;
      @(negedge clk);
      if (cyc > 100) break;
    end
    chk(cyc == ((m == MODE_FWT) ? 14 : 50), $sformatf("%s busy %0d cycles", m.name(), cyc));
    chk(done, "done pulse after the run");
    @(negedge clk);
    chk(!done, "done lasts one cycle");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(MODE_FFT);
    run(MODE_FWT);
    run(MODE_DCT);
    run(MODE_FWT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
