// Coefficient ROM: 64 rows of four complex coefficients (256 coefficients).
//
// Row r, column m holds W^e = exp(-j*2*pi*e/256) in 12-bit two's complement
// with 10 fraction bits (1.0 = 1024), for the radix-4 output m of the
// butterfly whose counter value is r:
//   r =  0..15 (FFT/DCT step 0): e = 4*m*r               (W64^(m*r))
//   r = 16..31 (FFT/DCT step 1): e = 16*m*(r mod 4)      (W64^(4*m*x45))
//   r = 32..47 (FFT last step) : e = 0                   (unity)
//   r = 48..63 (DCT last step) : e = k, k = (r/4 mod 4) + 4*(r mod 4) + 16*m,
//                                the DCT output index; W256^k turns the FFT
//                                of the reordered input into the DCT.
// The size (64 x 4) and the split between FFT and DCT last-step coefficients
// follow the document; the table's contents derive from the twiddle factors of
// its radix-4 algorithm and from the usual FFT-based DCT, and the fixed-point
// format is this design's choice. The table is computed at elaboration; the
// read is combinational.
module coef_rom
  import cfft_pkg::*;
(
  input  logic [5:0] addr,
  output coef_t      coef [4]
);

  typedef logic [2*COEF_W-1:0] tab_t [256];   // entry 4*r + m

  function automatic int exponent(int r, int m);
    if (r < 16)      return 4 * m * r;
    else if (r < 32) return 16 * m * (r % 4);
    else if (r < 48) return 0;
    else             return ((r / 4) % 4) + 4 * (r % 4) + 16 * m;
  endfunction

  function automatic tab_t build();
    tab_t t;
    real  a;
    localparam real SCALE = real'(2 ** COEF_FRAC);
    for (int i = 0; i < 256; i++) begin
      a = 2.0 * 3.14159265358979323846 * exponent(i / 4, i % 4) / 256.0;
      t[i] = {COEF_W'($rtoi($floor( SCALE * $cos(a) + 0.5))),
              COEF_W'($rtoi($floor(-SCALE * $sin(a) + 0.5)))};
    end
    return t;
  endfunction

  localparam tab_t TAB = build();

  always_comb begin
    for (int m = 0; m < 4; m++) coef[m] = coef_t'(TAB[{addr, 2'(m)}]);
  end

endmodule
