// mfab_fabric: a rectangle of MFABs as it would sit inside an FPGA, with the
// dedicated neighbour links hard-wired and each block's configuration bits,
// A, B, Sigma and Q left to the programmable fabric.
//
// M columns hold multiplicand slices (column 0 = least significant, links to
// the right go to higher A bits) and N rows hold multiplier slices (row 0 =
// least significant, links downward go to higher B bits). The default 2 x 2
// is the 16x16 multiplier built from four blocks. Setting cl/cr/ct/cb on each
// block decides which neighbours it joins, so the same fabric can run as one
// 16x16, two 16x8, two 8x16 or four independent 8x8 multipliers; ma/mb pick
// signed or unsigned operands per multiplier. A block ignores the links of a
// side whose configuration bit is low, so multipliers that happen to be
// adjacent do not disturb each other.
//
// For an 8m x 8n multiplier whose lower-left block is (row j0, column i0), the
// product bits come out as follows: the blocks of column i0 give 8 bits each on
// q[..][7:0] (row j0 + t gives bits 8t..8t+7), and the blocks of the bottom
// row give 8 bits each on q[..][15:8] (column i0 + t gives bits 8(n+t)..).
//
// Interface: cfg, a, b, sigma and q are indexed [row][column]. The fabric is
// purely combinational. The links between neighbours run both ways within
// one combinational array; they form no real loop, but tools that treat a
// link vector as a single net may report one.
module mfab_fabric
  import mfab_pkg::*;
#(
  parameter int unsigned M = 2,   // columns (multiplicand slices)
  parameter int unsigned N = 2    // rows (multiplier slices)
) (
  input  mfab_cfg_t [N-1:0][M-1:0]              cfg,
  input  logic      [N-1:0][M-1:0][SLICE-1:0]   a,
  input  logic      [N-1:0][M-1:0][SLICE-1:0]   b,
  input  logic      [N-1:0][M-1:0][SLICE-1:0]   sigma,
  output logic      [N-1:0][M-1:0][2*SLICE-1:0] q
);

  logic  [N-1:0][M-1:0]              a_msb, b_msb, lo_cout, hx_cout, hi_cout;
  logic  [N-1:0][M-1:0][STW-1:0]     s_bot, c_bot;
  xfer_t [N-1:0][M-1:0][SHIFTS-1:0]  xl_out;
  logic  [N-1:0][M-1:0][LAYERS-1:0]  cy_out;

  for (genvar j = 0; j < N; j++) begin : g_row
    for (genvar i = 0; i < M; i++) begin : g_col
      logic                     a_left_msb, b_top_msb, lo_cin, hx_cin, hi_cin;
      logic [STW-1:0]           s_top, c_top;
      xfer_t [SHIFTS-1:0]       xr_in;
      logic [LAYERS-1:0]        cy_in;

      if (i > 0) begin : g_left
        assign a_left_msb = a_msb[j][i-1];
        assign cy_in      = cy_out[j][i-1];
        assign hx_cin     = hx_cout[j][i-1];
        assign hi_cin     = hi_cout[j][i-1];
      end else begin : g_left_edge
        assign a_left_msb = 1'b0;
        assign cy_in      = '0;
        assign hx_cin     = 1'b0;
        assign hi_cin     = 1'b0;
      end

      if (i < M - 1) begin : g_right
        assign xr_in = xl_out[j][i+1];
      end else begin : g_right_edge
        assign xr_in = '0;
      end

      if (j > 0) begin : g_top
        assign b_top_msb = b_msb[j-1][i];
        assign s_top     = s_bot[j-1][i];
        assign c_top     = c_bot[j-1][i];
        assign lo_cin    = lo_cout[j-1][i];
      end else begin : g_top_edge
        assign b_top_msb = 1'b0;
        assign s_top     = '0;
        assign c_top     = '0;
        assign lo_cin    = 1'b0;
      end

      mfab u_mfab (
        .cfg       (cfg[j][i]),
        .a         (a[j][i]),
        .b         (b[j][i]),
        .sigma     (sigma[j][i]),
        .q         (q[j][i]),
        .a_left_msb,
        .a_msb     (a_msb[j][i]),
        .b_top_msb,
        .b_msb     (b_msb[j][i]),
        .s_top,
        .c_top,
        .s_bot     (s_bot[j][i]),
        .c_bot     (c_bot[j][i]),
        .xr_in,
        .xl_out    (xl_out[j][i]),
        .cy_in,
        .cy_out    (cy_out[j][i]),
        .lo_cin,
        .lo_cout   (lo_cout[j][i]),
        .hx_cin,
        .hx_cout   (hx_cout[j][i]),
        .hi_cin,
        .hi_cout   (hi_cout[j][i])
      );
    end
  end

endmodule
