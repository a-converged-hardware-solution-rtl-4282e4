// Bank selection of the conflict-free memory.
//
// A 6-bit address {b5..b0} is read as three radix-4 digits d2={b5,b4},
// d1={b3,b2}, d0={b1,b0}. The bank is the modulo-4 sum
//     bank = d0 + {b2,b3} + {b4,b5}
// (two 2-bit adders, with the bits of the two upper digits swapped), the
// subbank is b1 XOR b0, and the row inside the subbank is the three most
// significant address bits {b5,b4,b3}. With this mapping the four words of
// every radix-4 FFT butterfly lie in four different banks, the four words read
// by every pair of Walsh butterflies lie in four different banks, and the eight
// words written by every pair of Walsh butterflies lie in eight different
// subbanks. The document fixes the cost (two two-bit adders and one XOR gate)
// and the use of the three MSBs as row address; the exact bit assignment is
// this design's own, chosen to meet those conflict-free rules.
// Purely combinational.
module bank_select
  import cfft_pkg::*;
(
  input  addr_t       addr,
  output logic [1:0]  bank,
  output logic        sub,
  output logic [2:0]  row
);

  always_comb begin
    bank = addr[1:0] + {addr[2], addr[3]} + {addr[4], addr[5]};
    sub  = addr[1] ^ addr[0];
    row  = addr[5:3];
  end

endmodule
