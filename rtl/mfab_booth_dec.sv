// mfab_booth_dec: radix-4 overlapped multiple-bit scanning decoder.
//
// One decoder sits at each of the four digit rows of an MFAB. It looks at the
// three multiplier bits {b(2k+1), b(2k), b(2k-1)} and tells the row of units
// whether to add 0, +A, +2A, -A or -2A. Negative multiples are formed by the
// units inverting the selected multiplicand bit; the +1 that completes the
// two's complement is added at the row's least significant position by the
// block on the A-LSB edge.
//
// The recoding table is the standard one for radix-4 overlapped scanning;
// the one/two/neg encoding of the select lines is this design's choice. The
// pattern 111 gives zero with neg low, so a zero digit never injects a +1.
//
// Purely combinational.
module mfab_booth_dec
  import mfab_pkg::*;
(
  input  logic [2:0] bits,  // {b(2k+1), b(2k), b(2k-1)}
  output booth_t     dig
);

  always_comb begin
    dig.one = bits[1] ^ bits[0];
    dig.two = (bits == 3'b011) || (bits == 3'b100);
    dig.neg = bits[2] & ~(bits[1] & bits[0]);
  end

endmodule
