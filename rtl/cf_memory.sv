// Conflict-free in-place memory with four read and eight write addresses.
//
// Each of the four read addresses and eight write addresses is mapped by a
// bank_select unit to (bank, subbank, row). The read crossbar gives each bank
// the row and subbank of the read address that falls into it and returns that
// bank's word to the address; the write crossbar gives each subbank the row
// and data of the enabled write address that falls into it. The address
// generator guarantees that the four reads fall into four banks and the eight
// writes into eight subbanks; assertions flag any access pattern that breaks
// this rule. Reads are combinational, writes happen at the rising edge.
module cf_memory
  import cfft_pkg::*;
(
  input  logic   clk,
  input  addr_t  rd_addr [4],
  output cplx_t  rd_data [4],
  input  logic   wr_en   [8],
  input  addr_t  wr_addr [8],
  input  cplx_t  wr_data [8]
);

  // the banks must hold exactly the N words of one transform
  if (NBANK * NSUB * ROWS != N) begin : g_size_check
    $error("cf_memory: %0d banks x %0d subbanks x %0d rows do not hold %0d words", NBANK, NSUB, ROWS, N);
  end

  logic [1:0] rbank [4];
  logic       rsub  [4];
  logic [2:0] rrow  [4];
  logic [1:0] wbank [8];
  logic       wsub  [8];
  logic [2:0] wrow  [8];

  for (genvar i = 0; i < 4; i++) begin : g_rsel
    bank_select u_bs (.addr(rd_addr[i]), .bank(rbank[i]), .sub(rsub[i]), .row(rrow[i]));
  end
  for (genvar i = 0; i < 8; i++) begin : g_wsel
    bank_select u_bs (.addr(wr_addr[i]), .bank(wbank[i]), .sub(wsub[i]), .row(wrow[i]));
  end

  logic        rf_rd_sub  [NBANK];
  logic [2:0]  rf_rd_row  [NBANK];
  cplx_t       rf_rd_data [NBANK];
  logic        rf_wr_en   [NBANK][NSUB];
  logic [2:0]  rf_wr_row  [NBANK][NSUB];
  cplx_t       rf_wr_data [NBANK][NSUB];

  // read crossbar: address -> bank port
  always_comb begin
    for (int b = 0; b < NBANK; b++) begin
      rf_rd_sub[b] = 1'b0;
      rf_rd_row[b] = '0;
      for (int i = 3; i >= 0; i--)
        if (rbank[i] == 2'(b)) begin
          rf_rd_sub[b] = rsub[i];
          rf_rd_row[b] = rrow[i];
        end
    end
    for (int i = 0; i < 4; i++) rd_data[i] = rf_rd_data[rbank[i]];
  end

  // write crossbar: enabled address -> subbank port
  always_comb begin
    for (int b = 0; b < NBANK; b++)
      for (int s = 0; s < NSUB; s++) begin
        rf_wr_en[b][s]   = 1'b0;
        rf_wr_row[b][s]  = '0;
        rf_wr_data[b][s] = '0;
        for (int i = 7; i >= 0; i--)
          if (wr_en[i] && wbank[i] == 2'(b) && wsub[i] == 1'(s)) begin
            rf_wr_en[b][s]   = 1'b1;
            rf_wr_row[b][s]  = wrow[i];
            rf_wr_data[b][s] = wr_data[i];
          end
      end
  end

  regfile u_rf (
    .clk,
    .rd_sub (rf_rd_sub),
    .rd_row (rf_rd_row),
    .rd_data(rf_rd_data),
    .wr_en  (rf_wr_en),
    .wr_row (rf_wr_row),
    .wr_data(rf_wr_data)
  );

  // Two enabled writes to one subbank would lose a word.
  always_ff @(posedge clk) begin
    for (int i = 0; i < 8; i++)
      for (int j = i + 1; j < 8; j++)
        assert (!(wr_en[i] && wr_en[j] && wbank[i] == wbank[j] && wsub[i] == wsub[j]))
          else $error("cf_memory: writes %0d and %0d hit the same subbank", i, j);
  end

endmodule
