// Shared definitions of the converged FFT / DCT / Walsh transform processor.
//
// The processor works on 64 complex words held in one in-place memory. A memory
// word is 32 bits: a 16-bit real and a 16-bit imaginary part (two's complement).
// Input and output samples are 12 bits per part, coefficients 12 bits per part,
// and each complex multiplier sums 28-bit products in 30-bit adders; those
// widths follow the document. The coefficient scaling (1.0 = 2**10), the
// per-step scaling of the FFT and the mode encoding are this design's choices.
package cfft_pkg;

  localparam int N        = 64;  // transform length (points)
  localparam int AW       = 6;   // address width of the 64-word memory
  localparam int IO_W     = 12;  // input / output sample width per part
  localparam int INT_W    = 16;  // memory / intermediate width per part
  localparam int COEF_W   = 12;  // coefficient width per part
  localparam int COEF_FRAC = 10; // coefficient fraction bits: 1.0 = 1024
  localparam int PROD_W   = INT_W + COEF_W;  // 28-bit real products
  localparam int ACC_W    = 30;  // adder width inside a complex multiplier
  localparam int NBANK    = 4;   // memory banks (one read port each)
  localparam int NSUB     = 2;   // subbanks per bank (one write port each)
  localparam int ROWS     = 8;   // words per subbank
  localparam int STEP_SHIFT = 2; // FFT/DCT: every radix-4 step divides by 4
  localparam int IN_SHIFT = 1;   // FFT/DCT: input placed one bit above the LSB

  typedef logic [AW-1:0] addr_t;

  // One memory word.
  typedef struct packed {
    logic signed [INT_W-1:0] re;
    logic signed [INT_W-1:0] im;
  } cplx_t;

  // One ROM coefficient.
  typedef struct packed {
    logic signed [COEF_W-1:0] re;
    logic signed [COEF_W-1:0] im;
  } coef_t;

  // Transform selected at start. Only MODE_FWT changes the datapath (the
  // single mode bit of the datapath); FFT and DCT differ in the coefficients
  // of the last step and in the input ordering.
  typedef enum logic [1:0] {
    MODE_FFT = 2'd0,
    MODE_DCT = 2'd1,
    MODE_FWT = 2'd2
  } mode_e;

endpackage
