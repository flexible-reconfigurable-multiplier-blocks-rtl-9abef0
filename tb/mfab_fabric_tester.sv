// mfab_fabric_tester: stimulus and checker for an M x N MFAB fabric.
//
// It tiles the fabric with multipliers of several shapes in turn (one
// multiplier over the whole fabric, one per block, one per row, one per
// column, and 2x2 tiles when the fabric allows), programs every block's
// configuration bits for its place in its tile, drives random operands
// (with extreme values mixed in) and random Sigma inputs, and compares the
// product bits collected from the Q outputs with A*B + sum of Sigmas worked
// out with wide integer arithmetic. Every tile shape is run with all four
// signed/unsigned operand combinations.
//
// It counts how often each mechanism was exercised: each tile shape (mode
// switch), each sign mode, a negative signed multiplicand (extra units on the
// A-MSB edge), an unsigned multiplier with its top bit set (extra row on the
// B-MSB edge) and a non-zero Sigma. A mechanism that never happened counts as
// a failure. The enclosing testbench prints the result.
module mfab_fabric_tester
  import mfab_pkg::*;
#(
  parameter int unsigned M      = 2,
  parameter int unsigned N      = 2,
  parameter int unsigned TRIALS = 100
) (
  output mfab_cfg_t [N-1:0][M-1:0]              cfg,
  output logic      [N-1:0][M-1:0][SLICE-1:0]   a,
  output logic      [N-1:0][M-1:0][SLICE-1:0]   b,
  output logic      [N-1:0][M-1:0][SLICE-1:0]   sigma,
  input  logic      [N-1:0][M-1:0][2*SLICE-1:0] q,
  output int                                    checks,
  output int                                    failures,
  output logic                                  done
);

  localparam int unsigned R = M * N;   // most tiles at a time

  typedef logic [127:0] wide_t;

  int n_shape [5];
  int n_sign  [4];
  int n_neg_a, n_uns_b_top, n_sigma;

  function automatic wide_t rand_operand(int unsigned bits);
    wide_t v;
    int unsigned kind;
    v = {$urandom, $urandom, $urandom, $urandom};
    kind = $urandom % 8;
    if (kind == 0) v = '0;
    else if (kind == 1) v = '1;
    else if (kind == 2) v = wide_t'(1) << (bits - 1);              // most negative
    else if (kind == 3) v = (wide_t'(1) << (bits - 1)) - 1;        // most positive
    return v & ((wide_t'(1) << bits) - 1);
  endfunction

  function automatic wide_t extend(wide_t v, int unsigned bits, logic sgn);
    if (sgn && v[bits-1]) return v | ~((wide_t'(1) << bits) - 1);
    return v;
  endfunction

  // run one tile shape: rm columns by rn rows per tile
  task automatic run_shape(int unsigned shape, int unsigned rm, int unsigned rn);
    wide_t ra [R], rb [R], rsig [R], want, got, mask;
    logic  rsa [R], rsb [R];
    int unsigned t, i0, j0;
    for (int trial = 0; trial < TRIALS; trial++) begin
      t = 0;
      for (j0 = 0; j0 + rn <= N; j0 += rn) begin
        for (i0 = 0; i0 + rm <= M; i0 += rm) begin
          ra[t]   = rand_operand(8 * rm);
          rb[t]   = rand_operand(8 * rn);
          rsa[t]  = trial[0];
          rsb[t]  = trial[1];
          rsig[t] = '0;
          for (int dj = 0; dj < int'(rn); dj++) begin
            for (int di = 0; di < int'(rm); di++) begin
              logic [7:0] sg;
              sg = ($urandom % 3 == 0) ? 8'($urandom) : 8'h00;
              cfg[j0+dj][i0+di].cl = (di > 0);
              cfg[j0+dj][i0+di].cr = (di < int'(rm) - 1);
              cfg[j0+dj][i0+di].ct = (dj > 0);
              cfg[j0+dj][i0+di].cb = (dj < int'(rn) - 1);
              cfg[j0+dj][i0+di].ma = rsa[t] && (di == int'(rm) - 1);
              cfg[j0+dj][i0+di].mb = rsb[t] && (dj == int'(rn) - 1);
              a[j0+dj][i0+di]      = ra[t][8*di +: 8];
              b[j0+dj][i0+di]      = rb[t][8*dj +: 8];
              sigma[j0+dj][i0+di]  = sg;
              rsig[t] += wide_t'(sg) << (8 * (di + dj));
            end
          end
          t++;
        end
      end
      #1;
      t = 0;
      for (j0 = 0; j0 + rn <= N; j0 += rn) begin
        for (i0 = 0; i0 + rm <= M; i0 += rm) begin
          mask   = (wide_t'(1) << (8 * (rm + rn))) - 1;
          if (8 * (rm + rn) >= 128) mask = '1;
          want = (extend(ra[t], 8 * rm, rsa[t]) * extend(rb[t], 8 * rn, rsb[t]) + rsig[t]) & mask;
          got    = '0;
          for (int u = 0; u < int'(rn); u++) got |= wide_t'(q[j0+u][i0][7:0]) << (8 * u);
          for (int u = 0; u < int'(rm); u++) got |= wide_t'(q[j0+rn-1][i0+u][15:8]) << (8 * (int'(rn) + u));
          checks++;
          if (got !== want) begin
            failures++;
            if (failures <= 10)
              $display("MISMATCH %0dx%0d tile@(%0d,%0d) sa=%0d sb=%0d A=%h B=%h S=%h got=%h exp=%h",
                       8*rm, 8*rn, j0, i0, rsa[t], rsb[t], ra[t], rb[t], rsig[t], got, want);
          end
          n_shape[shape]++;
          n_sign[{rsa[t], rsb[t]}]++;
          if (rsa[t] && ra[t][8*rm-1]) n_neg_a++;
          if (!rsb[t] && rb[t][8*rn-1]) n_uns_b_top++;
          if (rsig[t] != 0) n_sigma++;
          t++;
        end
      end
    end
  endtask

  initial begin
    checks = 0;
    failures = 0;
    done = 1'b0;
    cfg = '0;
    a = '0;
    b = '0;
    sigma = '0;
    foreach (n_shape[k]) n_shape[k] = 0;
    foreach (n_sign[k]) n_sign[k] = 0;
    n_neg_a = 0;
    n_uns_b_top = 0;
    n_sigma = 0;

    run_shape(0, M, N);   // one multiplier over the whole fabric
    run_shape(1, 1, 1);   // independent 8x8 multipliers
    run_shape(2, M, 1);   // one 8M x 8 multiplier per row
    run_shape(3, 1, N);   // one 8 x 8N multiplier per column
    if (M % 2 == 0 && N % 2 == 0 && (M > 2 || N > 2)) run_shape(4, 2, 2);
    else n_shape[4] = -1;

    $display("tiles run: whole=%0d 8x8=%0d rows=%0d columns=%0d 2x2=%0d",
             n_shape[0], n_shape[1], n_shape[2], n_shape[3], n_shape[4]);
    $display("sign modes uu=%0d us=%0d su=%0d ss=%0d; negative signed A=%0d, unsigned B with top bit=%0d, Sigma used=%0d",
             n_sign[0], n_sign[1], n_sign[2], n_sign[3], n_neg_a, n_uns_b_top, n_sigma);
    foreach (n_shape[k]) if (n_shape[k] == 0) failures++;
    foreach (n_sign[k])  if (n_sign[k] == 0)  failures++;
    if (n_neg_a == 0)     failures++;
    if (n_uns_b_top == 0) failures++;
    if (n_sigma == 0)     failures++;
    done = 1'b1;
  end

endmodule
