// Reordering input and output ports.
//
// Maps a sample index to its memory address and converts between 12-bit port
// samples and 16-bit memory words.
//   Input, FFT : sample n at address n; word = sample * 2.
//   Input, DCT : real samples; even n at n/2, odd n at 63-(n-1)/2
//                (v(i)=x(2i), v(63-i)=x(2i+1)); word = sample * 2.
//   Input, FWT : sample k={k2,k1,k0} (0..7) at address {0,k2,0,k1,0,k0};
//                word = sample.
//   Output, FFT/DCT : frequency s = l2 + 4*l1 + 16*l0 sits at address
//                {l2,l1,l0} (radix-4 digit reversal); sample = word/2 rounded,
//                so the port delivers X/64 for the FFT and C/64 for the DCT
//                (real part).
//   Output, FWT : Walsh output l at address l; sample = word/8.
// Output samples saturate at 12 bits. The FWT input placement is the
// document's; the DCT reordering, the FWT output order, the scaling and the
// saturation are this design's. Purely combinational.
module io_reorder
  import cfft_pkg::*;
(
  input  mode_e                    mode,
  // input port
  input  logic [5:0]               in_idx,
  input  logic signed [IO_W-1:0]   in_re,
  input  logic signed [IO_W-1:0]   in_im,
  output addr_t                    in_addr,
  output cplx_t                    in_word,
  // output port
  input  logic [5:0]               out_idx,
  output addr_t                    out_addr,
  input  cplx_t                    out_word,
  output logic signed [IO_W-1:0]   out_re,
  output logic signed [IO_W-1:0]   out_im
);

  function automatic logic signed [IO_W-1:0] to_port(logic signed [INT_W-1:0] v, logic fwt);
    logic signed [INT_W:0] r;
    localparam logic signed [INT_W:0] MAXV = (INT_W+1)'((1 << (IO_W - 1)) - 1);
    localparam logic signed [INT_W:0] MINV = -(INT_W+1)'(1 << (IO_W - 1));
    r = fwt ? (INT_W+1)'(v >>> 3) : ((INT_W+1)'(v) + 1) >>> 1;
    if (r > MAXV)      return MAXV[IO_W-1:0];
    else if (r < MINV) return MINV[IO_W-1:0];
    else               return r[IO_W-1:0];
  endfunction

  logic fwt;
  assign fwt = (mode == MODE_FWT);

  always_comb begin
    unique case (mode)
      MODE_DCT: in_addr = in_idx[0] ? 6'd63 - {1'b0, in_idx[5:1]} : {1'b0, in_idx[5:1]};
      MODE_FWT: in_addr = {1'b0, in_idx[2], 1'b0, in_idx[1], 1'b0, in_idx[0]};
      default:  in_addr = in_idx;
    endcase
    if (fwt) begin
      in_word.re = INT_W'(in_re);
      in_word.im = INT_W'(in_im);
    end else begin
      in_word.re = INT_W'(in_re) <<< IN_SHIFT;
      in_word.im = INT_W'(in_im) <<< IN_SHIFT;
    end

    out_addr = fwt ? out_idx : {out_idx[1:0], out_idx[3:2], out_idx[5:4]};
    out_re   = to_port(out_word.re, fwt);
    out_im   = to_port(out_word.im, fwt);
  end

endmodule
