// Converged 64-point FFT / DCT / modified Walsh transform (FWT) processor.
//
// One in-place memory of 64 complex words (four banks, two subbanks each),
// an address generator, a 64 x 4 coefficient ROM and a datapath that does one
// radix-4 butterfly per cycle (FFT/DCT, 3-stage pipeline) or two Walsh
// butterflies per cycle (FWT, unpipelined). Samples enter and leave through
// ports that reorder them for each transform.
//
// Use: while busy is low, choose mode and write samples with in_we/in_idx/
// in_re/in_im (one per cycle, FFT/DCT 64 samples, FWT 8 samples). Pulse start
// for one cycle; mode is sampled then. busy stays high for 50 cycles
// (FFT/DCT) or 14 cycles (FWT); done pulses for one cycle when the last
// result is in memory. While busy is low, out_idx selects a result, which is
// shown combinationally on out_re/out_im (12 bits, scaled) and on out_word
// (the raw 16-bit memory word). Writes through the input port are ignored
// while busy. The FFT output is X/64, the DCT output (real part) is
// sum x(n) cos(pi*(2n+1)k/128) / 64, the FWT output is the modified Walsh
// transform / 8. The data path, memory organisation, addressing and sizes
// follow the document; the port protocol and the scaling are this design's.
module cfft_top
  import cfft_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  mode_e                  mode,
  input  logic                   start,
  output logic                   busy,
  output logic                   done,
  input  logic                   in_we,
  input  logic [5:0]             in_idx,
  input  logic signed [IO_W-1:0] in_re,
  input  logic signed [IO_W-1:0] in_im,
  input  logic [5:0]             out_idx,
  output logic signed [IO_W-1:0] out_re,
  output logic signed [IO_W-1:0] out_im,
  output cplx_t                  out_word
);

  logic        fwt;
  addr_t       ag_rd_addr [4];
  addr_t       ag_wr_addr [8];
  logic        ag_wr_en   [8];
  logic [5:0]  coef_addr;
  coef_t       coef [4];
  cplx_t       dp_wr [8];

  addr_t       mem_rd_addr [4];
  cplx_t       mem_rd_data [4];
  logic        mem_wr_en   [8];
  addr_t       mem_wr_addr [8];
  cplx_t       mem_wr_data [8];

  addr_t       in_addr, out_addr;
  cplx_t       in_word;

  addr_gen u_ag (
    .clk, .rst_n, .start, .mode, .busy, .done, .fwt,
    .rd_addr(ag_rd_addr), .wr_addr(ag_wr_addr), .wr_en(ag_wr_en), .coef_addr
  );

  coef_rom u_rom (.addr(coef_addr), .coef);

  datapath u_dp (.clk, .fwt, .rd(mem_rd_data), .coef, .wr(dp_wr));

  io_reorder u_io (
    .mode, .in_idx, .in_re, .in_im, .in_addr, .in_word,
    .out_idx, .out_addr, .out_word, .out_re, .out_im
  );

  // Memory ports: the transform while busy, the I/O ports otherwise.
  always_comb begin
    for (int i = 0; i < 4; i++) mem_rd_addr[i] = ag_rd_addr[i];
    if (!busy) mem_rd_addr[0] = out_addr;
    for (int i = 0; i < 8; i++) begin
      mem_wr_en[i]   = busy && ag_wr_en[i];
      mem_wr_addr[i] = ag_wr_addr[i];
      mem_wr_data[i] = dp_wr[i];
    end
    if (!busy) begin
      mem_wr_en[0]   = in_we;
      mem_wr_addr[0] = in_addr;
      mem_wr_data[0] = in_word;
    end
  end

  assign out_word = mem_rd_data[0];

  cf_memory u_mem (
    .clk,
    .rd_addr(mem_rd_addr), .rd_data(mem_rd_data),
    .wr_en(mem_wr_en), .wr_addr(mem_wr_addr), .wr_data(mem_wr_data)
  );

endmodule
