// tb_mfab_fabric: end-to-end test of the MFAB fabric at its default size
// (2 x 2 blocks, the 16x16 multiplier arrangement).
//
// mfab_fabric_tester switches the fabric between one 16x16 multiplier, four
// 8x8, two 16x8 and two 8x16 multipliers, in all four signed/unsigned modes,
// and checks every product against wide integer arithmetic. A multiplication
// is combinational, so each result is read one time step after its operands.
// A watchdog ends the run if the tester never finishes.
module tb_mfab_fabric;
  import mfab_pkg::*;

  localparam int unsigned M = 2;
  localparam int unsigned N = 2;

  mfab_cfg_t [N-1:0][M-1:0]              cfg;
  logic      [N-1:0][M-1:0][SLICE-1:0]   a, b, sigma;
  logic      [N-1:0][M-1:0][2*SLICE-1:0] q;
  int   checks, failures;
  logic done;

  mfab_fabric dut (.cfg, .a, .b, .sigma, .q);

  mfab_fabric_tester #(.M(M), .N(N), .TRIALS(400)) u_tester (
    .cfg, .a, .b, .sigma, .q, .checks, .failures, .done
  );

  initial begin
    wait (done === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
