// tb_mfab_booth_dec: exhaustive test of the radix-4 digit decoder.
//
// For all eight bit triples {b(2k+1), b(2k), b(2k-1)} the expected digit is
// -2*b(2k+1) + b(2k) + b(2k-1). The test rebuilds the digit value from the
// decoder's one/two/neg lines and also checks that a zero digit never asks
// for the +1 of a negation and that one and two are never both high.
module tb_mfab_booth_dec;
  import mfab_pkg::*;

  logic [2:0] bits;
  booth_t     dig;
  int         checks = 0, failures = 0;

  mfab_booth_dec dut (.bits, .dig);

  initial begin
    int want, got;
    for (int v = 0; v < 8; v++) begin
      bits = 3'(v);
      #1;
      want = -2 * int'(bits[2]) + int'(bits[1]) + int'(bits[0]);
      got  = dig.two ? 2 : (dig.one ? 1 : 0);
      if (dig.neg) got = -got;
      checks++;
      if (got != want) begin
        failures++;
        $display("MISMATCH bits=%b got=%0d want=%0d", bits, got, want);
      end
      checks++;
      if ((dig.one && dig.two) || (want == 0 && dig.neg)) begin
        failures++;
        $display("BAD SELECT bits=%b one=%b two=%b neg=%b", bits, dig.one, dig.two, dig.neg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
