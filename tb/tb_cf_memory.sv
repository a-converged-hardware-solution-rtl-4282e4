// Test of the conflict-free memory: fills all 64 words with eight parallel
// writes per cycle following the Walsh-transform write patterns, overwrites
// words through single writes, and reads every radix-4 butterfly group (four
// words differing in one base-4 digit) through the four read ports, comparing
// with a flat 64-word model.
module tb_cf_memory;
  import cfft_pkg::*;

  logic  clk = 1'b0;
  addr_t rd_addr [4];
  cplx_t rd_data [4];
  logic  wr_en   [8];
  addr_t wr_addr [8];
  cplx_t wr_data [8];

  cf_memory dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] model [64];

  task automatic commit();
    @(posedge clk);
    for (int i = 0; i < 8; i++) if (wr_en[i]) model[wr_addr[i]] = wr_data[i];
    @(negedge clk);
    for (int i = 0; i < 8; i++) wr_en[i] = 1'b0;
  endtask

  task automatic read_groups();
    for (int d = 0; d < 3; d++)
      for (int base = 0; base < 64; base++) begin
        if (((base >> (2 * d)) & 3) != 0) continue;
        for (int m = 0; m < 4; m++) rd_addr[m] = addr_t'(base | (m << (2 * d)));
        #1;
        for (int m = 0; m < 4; m++) begin
          checks++;
          if (rd_data[m] != model[rd_addr[m]]) begin
            failures++;
            if (failures < 10) $display("FAIL: read %0d got %h expected %h", rd_addr[m], rd_data[m], model[rd_addr[m]]);
          end
        end
      end
  endtask

  initial begin
    for (int i = 0; i < 8; i++) begin wr_en[i] = 1'b0; wr_addr[i] = '0; wr_data[i] = '0; end
    for (int i = 0; i < 4; i++) rd_addr[i] = '0;
    @(negedge clk);
    // eight parallel writes per cycle: Walsh last-step pattern {r, i[1], i[2], i[0]}
    for (int r = 0; r < 8; r++) begin
      for (int i = 0; i < 8; i++) begin
        wr_en[i]   = 1'b1;
        wr_addr[i] = addr_t'(r * 8 + ((i >> 1) & 1) * 4 + ((i >> 2) & 1) * 2 + (i & 1));
        wr_data[i] = $urandom;
      end
      commit();
    end
    read_groups();
    // Walsh first-step pattern, eight writes at once
    for (int x5 = 0; x5 < 2; x5++) begin
      for (int i = 0; i < 8; i++) begin
        wr_en[i]   = 1'b1;
        wr_addr[i] = addr_t'(((i >> 2) & 1) * 32 + (i & 1) * 16 + x5 * 4 + ((i >> 1) & 1));
        wr_data[i] = $urandom;
      end
      commit();
    end
    read_groups();
    // single writes through every port
    for (int t = 0; t < 64; t++) begin
      int p;
      p = t % 8;
      wr_en[p] = 1'b1; wr_addr[p] = addr_t'($urandom); wr_data[p] = $urandom;
      commit();
    end
    read_groups();
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
