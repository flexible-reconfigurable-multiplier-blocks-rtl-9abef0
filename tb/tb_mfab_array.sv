// tb_mfab_array: the reduction array of one block on its own (no neighbours).
//
// The testbench recodes B into four radix-4 digits itself and feeds them to
// the array with A and Sigma. The array's outputs are carry-save bits of
// several weights: positions 0 and 1 exported after each digit row (weights
// 2r and 2r+1) and the final state (position p has weight 6+p). Their weighted
// sum, modulo 2^16, must equal A * B + Sigma where B is read as a signed
// number (four radix-4 digits cover a signed 8-bit value) and A is signed when
// ma is high. All A, B pairs are tested for both values of ma. The export at
// shift 0 (positions leaving before Sigma is added) must stay zero, since
// there is no block above.
module tb_mfab_array;
  import mfab_pkg::*;

  mfab_cfg_t             cfg;
  logic [7:0]            a, b, sigma;
  logic                  a_left_msb;
  booth_t [DIGITS-1:0]   dig;
  logic [STW-1:0]        s_top, c_top, s_bot, c_bot;
  xfer_t [SHIFTS-1:0]    xr_in, xl_out;
  logic [LAYERS-1:0]     cy_in, cy_out;
  int                    checks = 0, failures = 0;

  mfab_array dut (.*);

  function automatic booth_t recode(logic [2:0] t);
    int v;
    booth_t d;
    v = -2 * int'(t[2]) + int'(t[1]) + int'(t[0]);
    d.neg = (v < 0);
    d.one = (v == 1) || (v == -1);
    d.two = (v == 2) || (v == -2);
    return d;
  endfunction

  initial begin
    int unsigned sum;
    logic [16:0] bw;
    logic [15:0] want;
    cfg = '0;
    a_left_msb = 1'b0;
    s_top = '0; c_top = '0; xr_in = '0; cy_in = '0;
    for (int mode = 0; mode < 2; mode++) begin
      cfg.ma = mode[0];
      for (int v = 0; v < (1 << 16); v++) begin
        {a, b} = 16'(v);
        sigma = 8'($urandom);
        bw = {8'h00, b, 1'b0};
        for (int r = 0; r < DIGITS; r++) dig[r] = recode(bw[2*r +: 3]);
        #1;
        sum = 0;
        for (int r = 0; r < DIGITS; r++)
          for (int k = 0; k < 2; k++)
            sum += (int'(xl_out[r+1].s[k]) + int'(xl_out[r+1].c[k])) << (2 * r + k);
        for (int p = 2; p < STW; p++)
          sum += (int'(s_bot[p]) + int'(c_bot[p])) << (6 + p);
        want = 16'((cfg.ma ? int'($signed(a)) : int'(a)) * int'($signed(b)) + int'(sigma));
        checks++;
        if (16'(sum) !== want) begin
          failures++;
          if (failures < 10) $display("MISMATCH ma=%b a=%h b=%h s=%h sum=%h want=%h", cfg.ma, a, b, sigma, 16'(sum), want);
        end
        checks++;
        if (xl_out[0] !== '0 || cy_out !== '0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
