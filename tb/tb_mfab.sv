// tb_mfab: a single MFAB used on its own as an 8x8 multiplier-accumulator,
// Q = A*B + Sigma (all four configuration edge bits low).
//
// Every A and B pair is tested for each of the four signed/unsigned modes,
// with a random Sigma, and Q is compared with the integer result modulo 2^16.
// A second pass checks the link outputs that carry A7 and B7 to the
// neighbours, and that a block ignores all neighbour inputs while its edge
// bits are low (random values are driven on them).
module tb_mfab;
  import mfab_pkg::*;

  mfab_cfg_t            cfg;
  logic [7:0]           a, b, sigma;
  logic [15:0]          q;
  logic                 a_msb, b_msb, lo_cout, hx_cout, hi_cout;
  logic                 a_left_msb, b_top_msb, lo_cin, hx_cin, hi_cin;
  logic [STW-1:0]       s_top, c_top, s_bot, c_bot;
  xfer_t [SHIFTS-1:0]   xr_in, xl_out;
  logic [LAYERS-1:0]    cy_in, cy_out;
  int                   checks = 0, failures = 0;

  mfab dut (.*);

  task automatic check_one();
    int ai, bi;
    logic [15:0] want;
    ai = cfg.ma ? int'($signed(a)) : int'(a);
    bi = cfg.mb ? int'($signed(b)) : int'(b);
    want = 16'(ai * bi + int'(sigma));
    checks++;
    if (q !== want) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH ma=%b mb=%b a=%h b=%h s=%h q=%h want=%h", cfg.ma, cfg.mb, a, b, sigma, q, want);
    end
  endtask

  initial begin
    cfg = '0;
    {a_left_msb, b_top_msb, lo_cin, hx_cin, hi_cin} = '0;
    s_top = '0; c_top = '0; xr_in = '0; cy_in = '0;
    for (int mode = 0; mode < 4; mode++) begin
      cfg.ma = mode[1];
      cfg.mb = mode[0];
      for (int v = 0; v < (1 << 16); v++) begin
        {a, b} = 16'(v);
        sigma = 8'($urandom);
        #1;
        check_one();
      end
    end
    // neighbour inputs must be ignored when the edge bits are low
    for (int v = 0; v < 5000; v++) begin
      cfg.ma = 1'($urandom);
      cfg.mb = 1'($urandom);
      {a, b, sigma} = 24'($urandom);
      {a_left_msb, b_top_msb, lo_cin, hx_cin, hi_cin} = 5'($urandom);
      s_top = STW'($urandom); c_top = STW'($urandom);
      xr_in = $urandom; cy_in = LAYERS'($urandom);
      #1;
      check_one();
      checks++;
      if (a_msb !== a[7] || b_msb !== b[7]) failures++;
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
