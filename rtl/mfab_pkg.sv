// mfab_pkg: types and constants shared by the flexible multiplier block (MFAB)
// and the arrays built from it.
//
// An MFAB multiplies an 8-bit slice of the multiplicand A by an 8-bit slice of
// the multiplier B. The multiplier slice is scanned as four overlapped radix-4
// digits, so a block holds four partial-product rows of eight units each.
// The block on the A-MSB edge of an array also runs "extra units" holding the
// sign-extension positions 8..12 of every row, which is why the carry-save
// state handed from block to block is STW = 13 positions wide.
//
// The six configuration bits are those of the published MFAB. The link types
// (xfer_t) and the state width are this design's own choices.
package mfab_pkg;

  localparam int unsigned SLICE  = 8;              // operand bits per block
  localparam int unsigned DIGITS = SLICE / 2;      // radix-4 digits per block
  localparam int unsigned EXTW   = 5;              // extra-unit positions 8..12
  localparam int unsigned STW    = SLICE + EXTW;   // carry-save state width
  localparam int unsigned LAYERS = DIGITS + 1;     // Sigma layer + one per digit
  localparam int unsigned SHIFTS = DIGITS + 1;     // frame shifts per block

  // Configuration bits of one block.
  typedef struct packed {
    logic ma;  // A7 is the MSB of a signed number
    logic mb;  // B7 is the MSB of a signed number
    logic cl;  // A0 is not the LSB of A (a block sits to the left)
    logic cr;  // A7 is not the MSB of A (a block sits to the right)
    logic cb;  // B7 is not the MSB of B (a block sits below)
    logic ct;  // B0 is not the LSB of B (a block sits above)
  } mfab_cfg_t;

  // One decoded radix-4 digit: value = (neg ? -1 : 1) * (two ? 2 : one ? 1 : 0).
  typedef struct packed {
    logic neg;
    logic two;
    logic one;
  } booth_t;

  // Carry-save bits at row positions 0 and 1, handed to the left-hand
  // neighbour each time the row frame moves up by two bit positions.
  typedef struct packed {
    logic [1:0] c;
    logic [1:0] s;
  } xfer_t;

endpackage
