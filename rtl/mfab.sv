// mfab: one 8x8 flexible multiplier block (MFAB). On its own it computes
// Q = A*B + Sigma; joined to its neighbours by dedicated links, a rectangle of
// m by n blocks forms an 8m x 8n multiplier for signed or unsigned operands.
//
// Parts (following the published MFAB's division of the block):
//   i)   four radix-4 digit decoders (mfab_booth_dec), one per digit row; the
//        lowest digit borrows B7 of the block above as its overlap bit;
//   ii)  the 8 by 4 reduction array and iii) its extra units (mfab_array);
//   iv)  two final adders (mfab_csel_adder):
//        - the low adder, used on the A-LSB edge (cl = 0): the two bits that
//          leave each digit row at its bottom end form 8 finished product
//          bits, Q[7:0]; its carry runs down the column to the next low adder;
//        - the high adder, used on the B-MSB edge (cb = 0): it adds the final
//          carry-save state, Q[15:8]; its carry runs to the right.
//        On the B-MSB edge of an unsigned multiplier (mb = 0) the last radix-4
//        digit (0 or +1, equal to B7) is not an array row: the extra units
//        there add B7*A as a third operand in a row of full adders in front of
//        the high adder. That row's carry also runs to the right, and on the
//        A-LSB edge its slot 0 takes the carry out of the low adder.
//
// Output bits of an array: the block in column 0, row j gives product bits
// 8j..8j+7 on Q[7:0]; the block in the bottom row, column i gives product bits
// 8(n+i)..8(n+i)+7 on Q[15:8]. Unused halves of Q are driven to zero. Each
// block adds its Sigma at weight 2^(8(i+j)), treated as unsigned; the result is
// the product plus the Sigmas modulo 2^(8(m+n)).
//
// Configuration bits are the six of the published MFAB. The link signals, the
// choice of which edge carries which adder, the unsigned Sigma and the zeroing
// of unused Q bits are this design's choices. The published description puts
// the second adder on the multiplicand-MSB side; here the high adder sits on
// the multiplier-MSB edge, where the carry-save state of this array leaves it.
//
// Purely combinational; see mfab_array for the note on link directions.
module mfab
  import mfab_pkg::*;
(
  input  mfab_cfg_t               cfg,
  input  logic      [SLICE-1:0]   a,        // multiplicand slice
  input  logic      [SLICE-1:0]   b,        // multiplier slice
  input  logic      [SLICE-1:0]   sigma,    // summing input
  output logic      [2*SLICE-1:0] q,        // output bits (see above)
  // dedicated links
  input  logic                    a_left_msb,  // A7 of the left neighbour
  output logic                    a_msb,
  input  logic                    b_top_msb,   // B7 of the block above
  output logic                    b_msb,
  input  logic      [STW-1:0]     s_top,
  input  logic      [STW-1:0]     c_top,
  output logic      [STW-1:0]     s_bot,
  output logic      [STW-1:0]     c_bot,
  input  xfer_t     [SHIFTS-1:0]  xr_in,
  output xfer_t     [SHIFTS-1:0]  xl_out,
  input  logic      [LAYERS-1:0]  cy_in,
  output logic      [LAYERS-1:0]  cy_out,
  input  logic                    lo_cin,   // low adder carry from above
  output logic                    lo_cout,
  input  logic                    hx_cin,   // extra-row carry from the left
  output logic                    hx_cout,
  input  logic                    hi_cin,   // high adder carry from the left
  output logic                    hi_cout
);

  booth_t [DIGITS-1:0] dig;
  logic   [SLICE:0]    bw;

  assign bw    = {b, cfg.ct & b_top_msb};   // bw[i+1] = B[i], bw[0] = B[-1]
  assign a_msb = a[SLICE-1];
  assign b_msb = b[SLICE-1];

  for (genvar r = 0; r < DIGITS; r++) begin : g_dec
    mfab_booth_dec u_dec (.bits(bw[2*r +: 3]), .dig(dig[r]));
  end

  mfab_array u_array (
    .cfg, .a, .a_left_msb, .dig, .sigma,
    .s_top, .c_top, .xr_in, .cy_in,
    .s_bot, .c_bot, .xl_out, .cy_out
  );

  // ---- low adder: bits leaving the bottom end of digit rows 0..3 ----
  logic [SLICE-1:0] lo_s, lo_c, lo_sum;
  logic             lo_co;

  always_comb begin
    for (int r = 0; r < DIGITS; r++) begin
      lo_s[2*r +: 2] = xl_out[r+1].s;
      lo_c[2*r +: 2] = xl_out[r+1].c;
    end
  end

  mfab_csel_adder #(.W(SLICE)) u_lo_add (
    .x(lo_s), .y(lo_c), .cin(cfg.ct & lo_cin), .sum(lo_sum), .cout(lo_co)
  );
  assign lo_cout = lo_co;

  // ---- extra row (unsigned B) and high adder ----
  logic [SLICE-1:0] hs, hc, hx, x3s;
  logic [SLICE:0]   x3c;
  logic [SLICE-1:0] hi_sum;

  always_comb begin
    hs = s_bot[SLICE+1:2];
    hc = c_bot[SLICE+1:2];
    if (cfg.cr) begin
      hs[SLICE-1 -: 2] = xr_in[SHIFTS-1].s;
      hc[SLICE-1 -: 2] = xr_in[SHIFTS-1].c;
    end
    hx = (~cfg.mb & b[SLICE-1]) ? a : '0;   // last digit of an unsigned B
    x3c = '0;
    for (int p = 0; p < SLICE; p++) begin
      x3s[p]   = hs[p] ^ hc[p] ^ hx[p];
      x3c[p+1] = (hs[p] & hc[p]) | (hs[p] & hx[p]) | (hc[p] & hx[p]);
    end
    x3c[0] = cfg.cl ? hx_cin : lo_co;
  end
  assign hx_cout = x3c[SLICE];

  mfab_csel_adder #(.W(SLICE)) u_hi_add (
    .x(x3s), .y(x3c[SLICE-1:0]), .cin(cfg.cl & hi_cin), .sum(hi_sum), .cout(hi_cout)
  );

  assign q = {cfg.cb ? '0 : hi_sum, cfg.cl ? '0 : lo_sum};

endmodule
