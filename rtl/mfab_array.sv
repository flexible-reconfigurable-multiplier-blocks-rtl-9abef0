// mfab_array: the bit-reduction array of one MFAB, i.e. its 8 by 4 main units
// plus the extra units used on the multiplicand-MSB edge of an array.
//
// How it works. The array keeps a carry-save state (a sum bit s[p] and a
// carry bit c[p] per position p) in the frame of the current digit row, where
// position p of block column i and row k has weight 2^(8i + 2k + p). It runs
// five layers of full adders:
//   layer 0      adds the Sigma input to the state coming from the block above;
//   layers 1..4  add the partial-product row of digits 0..3. Unit p of a row
//                selects A[p] (x1) or A[p-1] (x2) and inverts it for a
//                negative digit.
// Before layer 0 and between digit rows the frame moves up by two positions:
// the state's positions 0 and 1 leave to the left-hand neighbour (or to the
// low final adder on the A-LSB edge) and positions 6 and 7 arrive from the
// right-hand neighbour. The carry out of unit 7 goes to the right-hand
// neighbour, where it fills carry slot 0; on the A-LSB edge that slot carries
// the +1 that completes a negative digit.
//
// Extra units (cfg.cr = 0). Each row of an n-bit multiplicand is a (n+2)-bit
// two's-complement number whose sign s lies at position 9 of the MSB block.
// The sign is not extended; instead every row puts ~s at position 9 and a
// constant 1 at position 10, and the block that also holds the first digit row
// (cfg.ct = 0) adds one more 1 at position 9. Modulo 2^(product width) this
// sums to the sign extensions of all rows. Position 8 holds the extended
// multiplicand bit: A7 when ma = 1 (signed), 0 otherwise. These positions live
// in state bits 8..12, which are handed down to the next block of the column.
//
// The published MFAB names the main array and the extra units and says what they
// are for; the cell-level organisation, the sign-extension scheme and the
// link signals are this design's own. Links from absent neighbours are ignored
// according to cfg, so an array can hold its inputs at any value.
//
// Interface: a, a_left_msb (A7 of the left neighbour) and the four decoded
// digits give the partial products; s_top/c_top come from the block above and
// s_bot/c_bot go to the block below; xr_in/xl_out are the per-shift transfers
// from the right and to the left; cy_in/cy_out the per-layer carries from the
// left and to the right. Shift 4 exports the final positions 0 and 1.
// Purely combinational.
//
// Between neighbouring blocks the links run in both directions inside one
// combinational array. There is no true loop (each layer depends only on the
// layer before it), but a tool that treats a link vector as one signal may
// report one.
module mfab_array
  import mfab_pkg::*;
(
  input  mfab_cfg_t                 cfg,
  input  logic      [SLICE-1:0]     a,
  input  logic                      a_left_msb,
  input  booth_t    [DIGITS-1:0]    dig,
  input  logic      [SLICE-1:0]     sigma,
  input  logic      [STW-1:0]       s_top,
  input  logic      [STW-1:0]       c_top,
  input  xfer_t     [SHIFTS-1:0]    xr_in,
  input  logic      [LAYERS-1:0]    cy_in,
  output logic      [STW-1:0]       s_bot,
  output logic      [STW-1:0]       c_bot,
  output xfer_t     [SHIFTS-1:0]    xl_out,
  output logic      [LAYERS-1:0]    cy_out
);

  always_comb begin
    logic [STW-1:0] s, c, t, ns;
    logic [STW:0]   nc;
    logic [SLICE:0] aw;
    logic           aext, carry;
    booth_t         d;
    int unsigned    sh, width;

    aw    = {a, cfg.cl & a_left_msb};   // aw[q+1] = A[q], aw[0] = A[-1]
    aext  = cfg.ma & a[SLICE-1];        // multiplicand extended by one bit
    width = cfg.cr ? SLICE : STW;
    xl_out = '0;
    cy_out = '0;

    s = cfg.ct ? s_top : '0;
    c = cfg.ct ? c_top : '0;
    if (cfg.cr) begin
      s[STW-1:SLICE] = '0;
      c[STW-1:SLICE] = '0;
    end

    for (int l = 0; l < LAYERS; l++) begin
      // move the frame up by two positions (not between Sigma and digit 0)
      if (l != 1) begin
        sh = (l == 0) ? 0 : l - 1;
        xl_out[sh].s = s[1:0];
        xl_out[sh].c = c[1:0];
        s = s >> 2;
        c = c >> 2;
        if (cfg.cr) begin
          s[SLICE-1 -: 2] = xr_in[sh].s;
          c[SLICE-1 -: 2] = xr_in[sh].c;
        end
      end

      // third input of the layer
      t = '0;
      d = '0;
      if (l == 0) begin
        t[SLICE-1:0] = sigma;
        t[SLICE+1]   = ~cfg.ct & ~cfg.cr;   // the single extra 1 at the sign position
      end else begin
        d = dig[l-1];
        for (int q = 0; q < SLICE; q++)
          t[q] = ((d.one & aw[q+1]) | (d.two & aw[q])) ^ d.neg;
        if (!cfg.cr) begin
          t[SLICE]   = ((d.one & aext) | (d.two & a[SLICE-1])) ^ d.neg;
          t[SLICE+1] = ~((d.one | d.two) & (aext ^ d.neg));
          t[SLICE+2] = 1'b1;
        end
      end

      // one layer of full adders
      ns = '0;
      nc = '0;
      for (int p = 0; p < STW; p++) begin
        carry = 1'b0;
        if (p < width) begin
          ns[p] = s[p] ^ c[p] ^ t[p];
          carry = (s[p] & c[p]) | (s[p] & t[p]) | (c[p] & t[p]);
          if (cfg.cr && p == SLICE - 1) cy_out[l] = carry;
          else                          nc[p+1]   = carry;
        end
      end
      // carry slot 0: the left neighbour's carry, or the +1 of a negative digit
      nc[0] = cfg.cl ? cy_in[l] : ((l == 0) ? 1'b0 : d.neg);
      s = ns;
      // nc[STW] is never set: the carry-save value held by a column stays
      // below 2^12 (each row adds at most 2^11 and the state is divided
      // by four at every shift), so position 12 never holds two ones.
      c = nc[STW-1:0];
    end

    xl_out[SHIFTS-1].s = s[1:0];
    xl_out[SHIFTS-1].c = c[1:0];
    s_bot = s;
    c_bot = c;
  end

endmodule
