// tb_xorshift128p: checks four steps of the generator from state {1, 2}
// against values computed by hand from the xorshift128+ recurrence, then
// 1000 random states against a behavioural model written here.
//
// Expected values are computed in the testbench itself, independently of the
// design; the timing being checked is the design's documented one.
module tb_xorshift128p;
  logic [63:0] s0, s1, n0, n1, r;
  int checks = 0, failures = 0;
  logic [63:0] exp_s0 [4] = '{64'h2, 64'h800043, 64'h18000c1, 64'h400000801002};
  logic [63:0] exp_s1 [4] = '{64'h800043, 64'h18000c1, 64'h400000801002, 64'h800001902043};
  logic [63:0] exp_r  [4] = '{64'h800045, 64'h2000104, 64'h4000020010c3, 64'hc00002103045};

  xorshift128p dut (.s0_i(s0), .s1_i(s1), .s0_o(n0), .s1_o(n1), .rnd_o(r));

  initial begin
    s0 = 64'd1; s1 = 64'd2;
    for (int i = 0; i < 4; i++) begin
      #1;
      checks++;
      if (n0 !== exp_s0[i] || n1 !== exp_s1[i] || r !== exp_r[i]) begin
        failures++;
        $display("FAIL step %0d: %h %h %h", i, n0, n1, r);
      end
      s0 = n0; s1 = n1;
    end
    for (int i = 0; i < 1000; i++) begin
      logic [63:0] a, b, x, e1;
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      s0 = a; s1 = b;
      #1;
      x  = a ^ (a << 23);
      e1 = x ^ b ^ (x >> 17) ^ (b >> 26);
      checks++;
      if (n0 !== b || n1 !== e1 || r !== e1 + b) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
