// Banked register file of the processor memory.
//
// Four banks of two subbanks of eight 32-bit words each (64 words). Every bank
// has one asynchronous read port, which reads either of its two subbanks, and
// every subbank has one synchronous write port, so one clock cycle can read
// four words and write eight. The organisation is the document's; the
// asynchronous read (data valid in the same cycle as the address) is this
// design's choice and lets the Walsh transform read, compute and write back in
// one cycle. Writes take effect at the rising clock edge. No reset: contents
// are undefined until written.
module regfile
  import cfft_pkg::*;
(
  input  logic        clk,
  // read port per bank
  input  logic        rd_sub  [NBANK],
  input  logic [2:0]  rd_row  [NBANK],
  output cplx_t       rd_data [NBANK],
  // write port per subbank
  input  logic        wr_en   [NBANK][NSUB],
  input  logic [2:0]  wr_row  [NBANK][NSUB],
  input  cplx_t       wr_data [NBANK][NSUB]
);

  cplx_t mem [NBANK][NSUB][ROWS];

  always_comb begin
    for (int b = 0; b < NBANK; b++)
      rd_data[b] = mem[b][rd_sub[b]][rd_row[b]];
  end

  always_ff @(posedge clk) begin
    for (int b = 0; b < NBANK; b++)
      for (int s = 0; s < NSUB; s++)
        if (wr_en[b][s]) mem[b][s][wr_row[b][s]] <= wr_data[b][s];
  end

endmodule
