// p2rg_addsub_n: WIDTH-bit ripple-carry adder/subtractor made of P2RG gates.
//
// ctrl = 0 gives y = a + b, ctrl = 1 gives y = a - b (two's complement), with the carry
// (or, in subtraction, the inverted borrow) rippling from bit 0 upwards through a chain
// of p2rg_cell instances. The ctrl line is not fanned out: it enters bit 0 and each cell
// passes a fresh copy to the next one; the copy leaving the top bit is ctrl_out.
//
// FIRST_STAGE = 1 makes this chain the least significant one: its carry-in is derived
// from ctrl inside bit 0, and cin must be tied to 0 (it becomes the extra constant
// input of bit 0, see p2rg_cell). FIRST_STAGE = 0 takes the carry
// from cin, which is how the upper half of the 16-bit design receives the carry/borrow
// of the lower half. The default WIDTH of 8 is the stage size the published 16-bit
// design cascades twice. Cost: 2*WIDTH gates, 2*WIDTH (+1 if FIRST_STAGE) constant
// inputs, 3*WIDTH garbage outputs on the garbage port (see p2rg_pkg).
// Purely combinational; the delay is WIDTH carry stages of one P2RG gate each.
module p2rg_addsub_n #(
  parameter int unsigned WIDTH       = 8,
  parameter bit          FIRST_STAGE = 1'b1
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  input  logic               ctrl,      // 0 = add, 1 = subtract
  input  logic               cin,       // carry/borrow from a lower stage; 0 if FIRST_STAGE
  output logic [WIDTH-1:0]   y,         // sum or difference
  output logic               cout,      // carry out (subtraction: 1 = no borrow)
  output logic               ctrl_out,  // ctrl copy for a following stage
  output logic [3*WIDTH-1:0] garbage    // three garbage outputs per bit, bit i at [3i+2:3i]
);

  logic [WIDTH:0] carry;
  logic [WIDTH:0] ctrl_chain;

  assign carry[0]      = cin;
  assign ctrl_chain[0] = ctrl;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    p2rg_cell #(.FIRST(FIRST_STAGE && (i == 0))) u_cell (
      .a       (a[i]),
      .b       (b[i]),
      .ctrl_in (ctrl_chain[i]),
      .cin     (carry[i]),
      .sum     (y[i]),
      .cout    (carry[i+1]),
      .ctrl_out(ctrl_chain[i+1]),
      .garbage (garbage[3*i +: 3])
    );
  end

  assign cout     = carry[WIDTH];
  assign ctrl_out = ctrl_chain[WIDTH];

endmodule
