// tb_mfab_csel_adder: exhaustive test of the 8-bit carry-select adder
// (every x, y and carry in), plus random tests of a 12-bit instance with an
// uneven split. The reference is the integer sum x + y + cin.
module tb_mfab_csel_adder;

  logic [7:0]  x8, y8, s8;
  logic        ci8, co8;
  logic [11:0] x12, y12, s12;
  logic        ci12, co12;
  int          checks = 0, failures = 0;

  mfab_csel_adder dut8 (.x(x8), .y(y8), .cin(ci8), .sum(s8), .cout(co8));
  mfab_csel_adder #(.W(12), .SPLIT(5)) dut12 (.x(x12), .y(y12), .cin(ci12), .sum(s12), .cout(co12));

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      {ci8, x8, y8} = 17'(v);
      #1;
      checks++;
      if ({co8, s8} != 9'(x8) + 9'(y8) + 9'(ci8)) begin
        failures++;
        if (failures < 10) $display("MISMATCH8 %h+%h+%b -> %b %h", x8, y8, ci8, co8, s8);
      end
    end
    for (int v = 0; v < 20000; v++) begin
      {ci12, x12, y12} = 25'($urandom);
      #1;
      checks++;
      if ({co12, s12} != 13'(x12) + 13'(y12) + 13'(ci12)) begin
        failures++;
        if (failures < 10) $display("MISMATCH12 %h+%h+%b -> %b %h", x12, y12, ci12, co12, s12);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
