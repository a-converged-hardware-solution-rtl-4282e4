// Pipelined complex multiplier with rounding, stages 2 and 3 of the datapath.
//
// Stage 2 registers the four real products ar*wr, ai*wi, ar*wi, ai*wr of a
// 16-bit complex operand and a 12-bit complex coefficient (four 16x12
// multipliers). Stage 3 is combinational: two 30-bit adders form
// re = ar*wr - ai*wi and im = ar*wi + ai*wr, then each sum is rounded to the
// nearest (half up) after an arithmetic right shift by SHIFT and saturated to
// 16 bits. The result is valid one clock cycle after a and w are presented.
// Multiplier and adder widths are the document's; SHIFT (coefficient fraction
// bits plus the per-step scaling) and the saturation are this design's.
module cmult
  import cfft_pkg::*;
#(
  parameter int SHIFT = COEF_FRAC + STEP_SHIFT
) (
  input  logic  clk,
  input  cplx_t a,
  input  coef_t w,
  output cplx_t y
);

  logic signed [PROD_W-1:0] p_rr, p_ii, p_ri, p_ir;

  always_ff @(posedge clk) begin
    p_rr <= a.re * w.re;
    p_ii <= a.im * w.im;
    p_ri <= a.re * w.im;
    p_ir <= a.im * w.re;
  end

  function automatic logic signed [INT_W-1:0] round_sat(logic signed [ACC_W-1:0] s);
    logic signed [ACC_W-1:0] r;
    localparam logic signed [ACC_W-1:0] MAXV = ACC_W'((1 << (INT_W - 1)) - 1);
    localparam logic signed [ACC_W-1:0] MINV = -ACC_W'(1 << (INT_W - 1));
    r = (s + ACC_W'(1 << (SHIFT - 1))) >>> SHIFT;
    if (r > MAXV)      return MAXV[INT_W-1:0];
    else if (r < MINV) return MINV[INT_W-1:0];
    else               return r[INT_W-1:0];
  endfunction

  logic signed [ACC_W-1:0] sum_re, sum_im;

  always_comb begin
    sum_re = ACC_W'(p_rr) - ACC_W'(p_ii);
    sum_im = ACC_W'(p_ri) + ACC_W'(p_ir);
    y.re   = round_sat(sum_re);
    y.im   = round_sat(sum_im);
  end

endmodule
