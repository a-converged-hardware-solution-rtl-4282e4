// Converged FFT / DCT / FWT datapath.
//
// Four words read from memory feed the butterfly adders. FFT/DCT (fwt=0): the
// four radix-4 outputs are registered (end of stage 1), each is multiplied by
// its coefficient in one of four complex multipliers (products registered at
// the end of stage 2), and the rounded results (stage 3) leave on wr[0..3]
// two clock cycles after the read; the coefficients must arrive one cycle
// after the read, together with the stage-1 register. FWT (fwt=1): the
// multipliers are not used and the eight Walsh outputs leave on wr[0..7] in
// the same cycle as the read. wr[i] is the word for write address ai.
// The three-stage split, the one-bit mode and the four multipliers (the first
// one is needed by the DCT only, whose last-step coefficients are not unity)
// are the document's; registers have no reset because every value they hold
// is overwritten before it is written to memory.
module datapath
  import cfft_pkg::*;
(
  input  logic  clk,
  input  logic  fwt,
  input  cplx_t rd   [4],
  input  coef_t coef [4],   // for the word in stage 2
  output cplx_t wr   [8]
);

  cplx_t bf  [8];
  cplx_t s1  [4];
  cplx_t mul [4];

  butterfly u_bf (.fwt, .x(rd), .y(bf));

  always_ff @(posedge clk) begin
    for (int m = 0; m < 4; m++) s1[m] <= bf[m];
  end

  for (genvar m = 0; m < 4; m++) begin : g_mul
    cmult u_cm (.clk, .a(s1[m]), .w(coef[m]), .y(mul[m]));
  end

  always_comb begin
    for (int i = 0; i < 8; i++) wr[i] = fwt ? bf[i] : (i < 4 ? mul[i % 4] : '0);
  end

endmodule
