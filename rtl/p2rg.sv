// p2rg: the 5x5 Parity Preserving Reversible Gate (P2RG).
//
// Inputs A..E map one-to-one onto outputs P..T (the gate is a bijection on 5 bits) and
// the XOR of the outputs always equals the XOR of the inputs, so a single-bit fault
// inside a network of these gates shows up as a parity mismatch. With G = A'C' ^ B':
//   P = A
//   Q = G ^ D
//   R = G&D ^ A&B ^ C
//   S = A&B' ^ C ^ G'&D
//   T = D ^ E ^ A&C
// These equations are the published definition of the gate. With C = 0 the gate is a
// full adder on A, B, D (Q = A^B^D, R = majority), which is how p2rg_cell uses it.
// Purely combinational, no clock; all ports are single bits. P is A passed through, as
// the gate's definition requires.
module p2rg (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  output logic p,
  output logic q,
  output logic r,
  output logic s,
  output logic t
);

  logic g;

  always_comb begin
    g = (~a & ~c) ^ ~b;
    p = a;
    q = g ^ d;
    r = (g & d) ^ (a & b) ^ c;
    s = (a & ~b) ^ c ^ (~g & d);
    t = d ^ e ^ (a & c);
  end

endmodule
