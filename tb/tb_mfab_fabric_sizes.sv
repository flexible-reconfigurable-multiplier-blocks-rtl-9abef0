// tb_mfab_fabric_sizes: the multiplier sizes used when MFAB
// arrays are compared with other schemes, built from MFAB fabrics of 4 x 4 blocks (32x32) and 8 x 8 blocks
// (64x64), plus an uneven 3 x 2 fabric (24x16 and its sub-shapes).
//
// Each fabric is driven by its own mfab_fabric_tester, which switches it
// between tile shapes and sign modes and checks every product against wide
// integer arithmetic. The 8x8 and 16x16 sizes are covered by tb_mfab_fabric.
// A watchdog ends the run if a tester never finishes.
module tb_mfab_fabric_sizes;
  import mfab_pkg::*;

  int   checks [3], failures [3];
  logic done [3];

  mfab_cfg_t [3:0][3:0]        cfg4;
  logic      [3:0][3:0][7:0]   a4, b4, s4;
  logic      [3:0][3:0][15:0]  q4;
  mfab_fabric #(.M(4), .N(4)) dut4 (.cfg(cfg4), .a(a4), .b(b4), .sigma(s4), .q(q4));
  mfab_fabric_tester #(.M(4), .N(4), .TRIALS(60)) tst4 (
    .cfg(cfg4), .a(a4), .b(b4), .sigma(s4), .q(q4),
    .checks(checks[0]), .failures(failures[0]), .done(done[0]));

  mfab_cfg_t [7:0][7:0]        cfg8;
  logic      [7:0][7:0][7:0]   a8, b8, s8;
  logic      [7:0][7:0][15:0]  q8;
  mfab_fabric #(.M(8), .N(8)) dut8 (.cfg(cfg8), .a(a8), .b(b8), .sigma(s8), .q(q8));
  mfab_fabric_tester #(.M(8), .N(8), .TRIALS(20)) tst8 (
    .cfg(cfg8), .a(a8), .b(b8), .sigma(s8), .q(q8),
    .checks(checks[1]), .failures(failures[1]), .done(done[1]));

  mfab_cfg_t [1:0][2:0]        cfg3;
  logic      [1:0][2:0][7:0]   a3, b3, s3;
  logic      [1:0][2:0][15:0]  q3;
  mfab_fabric #(.M(3), .N(2)) dut3 (.cfg(cfg3), .a(a3), .b(b3), .sigma(s3), .q(q3));
  mfab_fabric_tester #(.M(3), .N(2), .TRIALS(200)) tst3 (
    .cfg(cfg3), .a(a3), .b(b3), .sigma(s3), .q(q3),
    .checks(checks[2]), .failures(failures[2]), .done(done[2]));

  initial begin
    wait (done[0] === 1'b1 && done[1] === 1'b1 && done[2] === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d",
             checks[0] + checks[1] + checks[2], failures[0] + failures[1] + failures[2]);
    $finish;
  end

  initial begin
    #1000000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d",
             checks[0] + checks[1] + checks[2], failures[0] + failures[1] + failures[2] + 1);
    $finish;
  end

endmodule
