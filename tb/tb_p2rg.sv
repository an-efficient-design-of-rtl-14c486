// tb_p2rg: exhaustive self-checking test of the 5x5 P2RG gate.
//
// All 32 input patterns are applied. Each output is compared with a hand-derived
// case split of the gate equations on input A (A=0 and A=1 simplify the shared term
// A'C' ^ B' to B^C and B'), written independently of the RTL expression. The full-adder
// use of the gate (C=0: Q = A^B^D, R = majority of A, B, D) is checked as well.
// The test also checks the two properties the gate is named for: the output parity
// equals the input parity for every pattern, and the 32 outputs are all different
// (the gate is reversible).
module tb_p2rg;

  logic a, b, c, d, e;
  logic p, q, r, s, t;
  int   checks = 0;
  int   failures = 0;
  bit   seen [32];

  p2rg dut (.*);

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s in=%b%b%b%b%b got %b exp %b", what, a, b, c, d, e, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ep, eq, er, es, et;
    for (int v = 0; v < 32; v++) begin
      {a, b, c, d, e} = 5'(v);
      #1;
      if (!a) begin
        ep = 1'b0;
        eq = b ^ c ^ d;
        er = ((b ^ c) & d) ^ c;
        es = c ^ (~(b ^ c) & d);
        et = d ^ e;
      end else begin
        ep = 1'b1;
        eq = ~b ^ d;
        er = (~b & d) ^ b ^ c;
        es = ~b ^ c ^ (b & d);
        et = d ^ e ^ c;
      end
      check("P", p, ep);
      check("Q", q, eq);
      check("R", r, er);
      check("S", s, es);
      check("T", t, et);
      if (!c) begin
        check("adder sum", q, 1'(int'(a) + int'(b) + int'(d)));
        check("adder carry", r, (int'(a) + int'(b) + int'(d)) >= 2);
      end
      check("parity", ^{p, q, r, s, t}, ^{a, b, c, d, e});
      checks++;
      if (seen[{p, q, r, s, t}]) begin
        failures++;
        $display("FAIL output %b%b%b%b%b produced twice", p, q, r, s, t);
      end
      seen[{p, q, r, s, t}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
