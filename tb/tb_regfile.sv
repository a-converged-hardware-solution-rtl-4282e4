// Random test of the banked register file against a 64-word model: eight
// writes per cycle (one per subbank) and four reads (one per bank) with
// random rows, checking that read data is combinational and writes land at
// the clock edge.
module tb_regfile;
  import cfft_pkg::*;

  logic  clk = 1'b0;
  logic        rd_sub  [NBANK];
  logic [2:0]  rd_row  [NBANK];
  cplx_t       rd_data [NBANK];
  logic        wr_en   [NBANK][NSUB];
  logic [2:0]  wr_row  [NBANK][NSUB];
  cplx_t       wr_data [NBANK][NSUB];

  regfile dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] model [NBANK][NSUB][ROWS];

  initial begin
    for (int b = 0; b < NBANK; b++) begin
      rd_sub[b] = 1'b0; rd_row[b] = '0;
      for (int s = 0; s < NSUB; s++) begin wr_en[b][s] = 1'b0; wr_row[b][s] = '0; wr_data[b][s] = '0; end
    end
    // fill everything
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      for (int b = 0; b < NBANK; b++)
        for (int s = 0; s < NSUB; s++) begin
          wr_en[b][s] = 1'b1; wr_row[b][s] = 3'(r); wr_data[b][s] = $urandom;
          model[b][s][r] = wr_data[b][s];
        end
    end
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      for (int b = 0; b < NBANK; b++) begin
        rd_sub[b] = 1'($urandom); rd_row[b] = 3'($urandom);
      end
      #1;
      for (int b = 0; b < NBANK; b++) begin
        checks++;
        if (rd_data[b] != model[b][rd_sub[b]][rd_row[b]]) begin
          failures++;
          if (failures < 10) $display("FAIL: bank %0d sub %0d row %0d read %h expected %h", b, rd_sub[b], rd_row[b], rd_data[b], model[b][rd_sub[b]][rd_row[b]]);
        end
      end
      for (int b = 0; b < NBANK; b++)
        for (int s = 0; s < NSUB; s++) begin
          wr_en[b][s] = 1'($urandom); wr_row[b][s] = 3'($urandom); wr_data[b][s] = $urandom;
        end
      @(posedge clk);
      for (int b = 0; b < NBANK; b++)
        for (int s = 0; s < NSUB; s++)
          if (wr_en[b][s]) model[b][s][wr_row[b][s]] = wr_data[b][s];
    end
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
