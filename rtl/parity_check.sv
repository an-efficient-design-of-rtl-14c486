// parity_check: online fault detector for a parity preserving reversible circuit.
//
// Every P2RG gate keeps the XOR of its outputs equal to the XOR of its inputs, so a
// whole network of them does too, provided every gate input (primary inputs and the
// constant inputs) and every gate output (primary outputs and garbage outputs) is
// counted. This block XORs both sides and raises fault when they differ, which exposes
// any fault that flips an odd number of wires. Comparing input and output parity is the
// published detection method; reducing both sides with one XOR tree each is this
// design's choice. Purely combinational.
module parity_check #(
  parameter int unsigned N_IN  = 66,   // wires entering the circuit, constants included
  parameter int unsigned N_OUT = 66    // wires leaving it, garbage included
) (
  input  logic [N_IN-1:0]  in_bits,
  input  logic [N_OUT-1:0] out_bits,
  output logic             fault       // 1 = input and output parity differ
);

  always_comb fault = (^in_bits) ^ (^out_bits);

endmodule
