// Exhaustive test of the bank selection: every FFT butterfly reads and writes
// four different banks, every FWT cycle reads four different banks and writes
// eight different subbanks, the row is the three address MSBs, and within
// each row the 8 low address values occupy the 8 (bank, subbank) slots.
// The access sets are built here from the address tables of the transform.
module tb_bank_select;
  import cfft_pkg::*;

  addr_t      addr;
  logic [1:0] bank;
  logic       sub;
  logic [2:0] row;

  bank_select dut (.*);

  int checks = 0, failures = 0;

  function automatic addr_t a6(int b5, int b4, int b3, int b2, int b1, int b0);
    return addr_t'((b5 << 5) | (b4 << 4) | (b3 << 3) | (b2 << 2) | (b1 << 1) | b0);
  endfunction

  task automatic lookup(addr_t a, output int bk, output int sb);
    addr = a;
    #1;
    bk = int'(bank);
    sb = int'(sub);
    checks++;
    if (row != a[5:3]) begin
      failures++;
      $display("FAIL: row of %0d is %0d", a, row);
    end
  endtask

  // the 4 reads (and with w=1 the 8 writes) of one FWT cycle
  task automatic fwt_set(addr_t s[8], string tag);
    int bk [8], sb [8];
    for (int i = 0; i < 8; i++) lookup(s[i], bk[i], sb[i]);
    for (int i = 0; i < 4; i++)
      for (int j = i + 1; j < 4; j++) begin
        checks++;
        if (bk[i] == bk[j]) begin failures++; $display("FAIL: %s read a%0d a%0d same bank", tag, i, j); end
      end
    for (int i = 0; i < 8; i++)
      for (int j = i + 1; j < 8; j++) begin
        checks++;
        if (bk[i] == bk[j] && sb[i] == sb[j]) begin failures++; $display("FAIL: %s write a%0d a%0d same subbank", tag, i, j); end
      end
  endtask

  initial begin
    int bk [4], sb [4], x5, x4, x3;
    addr_t s [8];
    int slot [8];
    // FFT: four words differing in one radix-4 digit
    for (int d = 0; d < 3; d++)
      for (int base = 0; base < 64; base++) begin
        if (((base >> (2 * d)) & 3) != 0) continue;
        for (int m = 0; m < 4; m++) lookup(addr_t'(base | (m << (2 * d))), bk[m], sb[m]);
        for (int i = 0; i < 4; i++)
          for (int j = i + 1; j < 4; j++) begin
            checks++;
            if (bk[i] == bk[j]) begin failures++; $display("FAIL: FFT digit %0d base %0d", d, base); end
          end
      end
    // FWT step 1
    for (x5 = 0; x5 < 2; x5++) begin
      s[0] = a6(0,0,0,x5,0,0); s[1] = a6(0,1,0,x5,0,0); s[2] = a6(0,0,0,x5,0,1); s[3] = a6(0,1,0,x5,0,1);
      s[4] = a6(1,0,0,x5,0,0); s[5] = a6(1,1,0,x5,0,0); s[6] = a6(1,0,0,x5,0,1); s[7] = a6(1,1,0,x5,0,1);
      fwt_set(s, "fwt step 1");
    end
    // FWT step 2
    for (x4 = 0; x4 < 2; x4++)
      for (x5 = 0; x5 < 2; x5++) begin
        s[0] = a6(x4,x5,0,0,0,0); s[1] = a6(x4,x5,0,1,0,0); s[2] = a6(x4,x5,0,0,0,1); s[3] = a6(x4,x5,0,1,0,1);
        s[4] = a6(x4,x5,1,0,0,0); s[5] = a6(x4,x5,1,1,0,0); s[6] = a6(x4,x5,1,0,0,1); s[7] = a6(x4,x5,1,1,0,1);
        fwt_set(s, "fwt step 2");
      end
    // FWT step 3
    for (x3 = 0; x3 < 2; x3++)
      for (x4 = 0; x4 < 2; x4++)
        for (x5 = 0; x5 < 2; x5++) begin
          s[0] = a6(x3,x4,x5,0,0,0); s[1] = a6(x3,x4,x5,0,0,1); s[2] = a6(x3,x4,x5,1,0,0); s[3] = a6(x3,x4,x5,1,0,1);
          s[4] = a6(x3,x4,x5,0,1,0); s[5] = a6(x3,x4,x5,0,1,1); s[6] = a6(x3,x4,x5,1,1,0); s[7] = a6(x3,x4,x5,1,1,1);
          fwt_set(s, "fwt step 3");
        end
    // every row fills all eight (bank, subbank) slots exactly once
    for (int r = 0; r < 8; r++) begin
      for (int k = 0; k < 8; k++) slot[k] = 0;
      for (int l = 0; l < 8; l++) begin
        int b, u;
        lookup(addr_t'(r * 8 + l), b, u);
        slot[b * 2 + u]++;
      end
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (slot[k] != 1) begin failures++; $display("FAIL: row %0d slot %0d used %0d times", r, k, slot[k]); end
      end
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
