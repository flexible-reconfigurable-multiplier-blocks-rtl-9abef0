// mfab_csel_adder: carry-select adder used for the final outputs of an MFAB.
//
// The lower SPLIT bits are added directly. The upper W-SPLIT bits are added
// twice, once for each possible carry out of the lower part, and the lower
// carry picks one of the two results, so the upper half does not wait for
// the lower carry to ripple through.
//
// The published MFAB uses carry-select adders for the final adders; the split point
// (half the width) is this design's choice.
//
// Interface: sum = x + y + cin, cout is the carry out of bit W-1.
// Purely combinational.
module mfab_csel_adder #(
  parameter int unsigned W     = 8,
  parameter int unsigned SPLIT = W / 2
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned HW = W - SPLIT;

  logic [SPLIT:0] lo;
  logic [HW:0]    hi0, hi1;

  always_comb begin
    lo  = {1'b0, x[SPLIT-1:0]} + {1'b0, y[SPLIT-1:0]} + {{SPLIT{1'b0}}, cin};
    hi0 = {1'b0, x[W-1:SPLIT]} + {1'b0, y[W-1:SPLIT]};
    hi1 = {1'b0, x[W-1:SPLIT]} + {1'b0, y[W-1:SPLIT]} + {{HW{1'b0}}, 1'b1};
    if (lo[SPLIT]) {cout, sum[W-1:SPLIT]} = hi1;
    else           {cout, sum[W-1:SPLIT]} = hi0;
    sum[SPLIT-1:0] = lo[SPLIT-1:0];
  end

endmodule
