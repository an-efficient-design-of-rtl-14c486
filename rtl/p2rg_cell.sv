// p2rg_cell: one bit of the reversible adder/subtractor, made of two P2RG gates.
//
// Subtraction is done in two's complement: a - b = a + ~b + 1. Each bit therefore needs
// b ^ ctrl and a full adder, and, because a reversible network has no fan-out, every
// copy of ctrl it uses must come out of a gate.
//
//   gate 1 (A=0, B=b, C=ctrl_in, D=0, E=a):
//     P=0 (reused as gate 2's constant), Q=b^ctrl, R=ctrl, S=ctrl, T=a
//   gate 2 (A=b^ctrl, B=carry in, C=0 from gate 1, D=a, E=ctrl copy R of gate 1):
//     with C=0 the gate is a full adder on A, B, D: Q=sum, R=carry out;
//     P (=b^ctrl), S and T (=a^ctrl) are garbage
//
// Gate 1's S output is the ctrl line handed to the next bit. In the least significant
// cell (FIRST=1) the carry-in of a two's complement subtractor must equal ctrl, so gate
// 1's R output becomes the carry-in and gate 2's E input takes the cin port instead,
// which the user ties to 0: it is then one more constant input, and it only reaches the
// garbage output T. Cost per cell: 2 gates, 2 constant inputs (3 when FIRST=1),
// 3 garbage outputs (gate 2's P, S, T).
//
// The published work gives the P2RG equations and the per-bit totals (2 gates per bit)
// but not the wiring inside a bit; this wiring is this design's own and was chosen so
// that no signal fans out and the constant total equals the published 2N+1.
// ctrl_out is a copy of ctrl_in made by gate 1, so after synthesis it is a plain wire.
// Purely combinational.
module p2rg_cell #(
  parameter bit FIRST = 1'b0   // 1: least significant bit, carry-in is taken from ctrl
) (
  input  logic       a,         // minuend / addend bit
  input  logic       b,         // subtrahend / addend bit
  input  logic       ctrl_in,   // 0 = add, 1 = subtract
  input  logic       cin,       // carry from the bit below (FIRST=1: constant 0)
  output logic       sum,       // sum / difference bit
  output logic       cout,      // carry to the bit above (in subtraction: 1 = no borrow)
  output logic       ctrl_out,  // copy of ctrl for the bit above
  output logic [2:0] garbage    // {P, S, T} of gate 2
);

  logic g1_p, g1_q, g1_r, g1_s, g1_t;
  logic g2_b, g2_e;

  p2rg u_gate1 (
    .a(1'b0), .b(b), .c(ctrl_in), .d(1'b0), .e(a),
    .p(g1_p), .q(g1_q), .r(g1_r), .s(g1_s), .t(g1_t)
  );

  if (FIRST) begin : g_first
    assign g2_b = g1_r;
    assign g2_e = cin;
  end else begin : g_chain
    assign g2_b = cin;
    assign g2_e = g1_r;
  end

  p2rg u_gate2 (
    .a(g1_q), .b(g2_b), .c(g1_p), .d(g1_t), .e(g2_e),
    .p(garbage[2]), .q(sum), .r(cout), .s(garbage[1]), .t(garbage[0])
  );

  assign ctrl_out = g1_s;

endmodule
