// p2rg_addsub16: 16-bit parity preserving parallel adder/subtractor built from P2RG gates.
//
// Two 8-bit P2RG adder/subtractor stages are cascaded: the low stage takes its carry-in
// from ctrl (two's complement subtraction needs a carry-in of 1), the high stage takes
// the low stage's carry/borrow and its copy of ctrl. ctrl = 0 adds (y = a + b),
// ctrl = 1 subtracts (y = a - b); cout is the carry out of bit 15, which in subtraction
// is 1 when no borrow occurred (a >= b unsigned). The network has 32 gates, 33 constant
// inputs (all 0) and 49 garbage outputs: the 48 on the garbage port and ctrl_out.
//
// Because every gate preserves parity, the XOR of all 66 wires entering the network
// (a, b, ctrl and the constants) equals the XOR of all 66 wires leaving it (y, cout,
// ctrl_out and the garbage). parity_check compares the two and sets parity_fault on a
// mismatch. The cascade of two 8-bit stages, the ctrl convention and parity checking
// follow the published design; the per-bit wiring and the parity checker's form are
// this design's own. Purely combinational, no clock or reset.
//
// Two outputs are plain copies of inputs, as copies are the only way a reversible
// network can reuse a signal: ctrl_out equals ctrl, and garbage[0] (gate 2's T output
// in bit 0, whose E input is the constant 0) equals a[0]. They are kept as ports
// because the parity check needs every wire that leaves the network.
module p2rg_addsub16 #(
  parameter int unsigned HALF_WIDTH = 8,              // width of each cascaded stage
  localparam int unsigned WIDTH     = 2 * HALF_WIDTH
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  input  logic               ctrl,          // 0 = add, 1 = subtract
  output logic [WIDTH-1:0]   y,             // sum or difference
  output logic               cout,          // carry out; in subtraction 1 = no borrow
  output logic               ctrl_out,      // ctrl copy leaving the network (garbage)
  output logic [3*WIDTH-1:0] garbage,       // garbage outputs, three per bit
  output logic               parity_fault   // input and output parity differ
);

  import p2rg_pkg::*;

  localparam int unsigned N_CONST = constant_count(HALF_WIDTH, 1'b1)
                                  + constant_count(HALF_WIDTH, 1'b0);
  localparam int unsigned N_IN    = 2 * WIDTH + 1 + N_CONST;
  localparam int unsigned N_OUT   = WIDTH + 2 + 3 * WIDTH;

  logic mid_carry;  // carry/borrow passed from the low stage to the high stage
  logic mid_ctrl;   // ctrl copy passed from the low stage to the high stage

  p2rg_addsub_n #(.WIDTH(HALF_WIDTH), .FIRST_STAGE(1'b1)) u_low (
    .a       (a[HALF_WIDTH-1:0]),
    .b       (b[HALF_WIDTH-1:0]),
    .ctrl    (ctrl),
    .cin     (1'b0),
    .y       (y[HALF_WIDTH-1:0]),
    .cout    (mid_carry),
    .ctrl_out(mid_ctrl),
    .garbage (garbage[3*HALF_WIDTH-1:0])
  );

  p2rg_addsub_n #(.WIDTH(HALF_WIDTH), .FIRST_STAGE(1'b0)) u_high (
    .a       (a[WIDTH-1:HALF_WIDTH]),
    .b       (b[WIDTH-1:HALF_WIDTH]),
    .ctrl    (mid_ctrl),
    .cin     (mid_carry),
    .y       (y[WIDTH-1:HALF_WIDTH]),
    .cout    (cout),
    .ctrl_out(ctrl_out),
    .garbage (garbage[3*WIDTH-1:3*HALF_WIDTH])
  );

  // The constant inputs are all 0; they are listed so the count matches the network.
  parity_check #(.N_IN(N_IN), .N_OUT(N_OUT)) u_parity (
    .in_bits ({a, b, ctrl, {N_CONST{1'b0}}}),
    .out_bits({y, cout, ctrl_out, garbage}),
    .fault   (parity_fault)
  );

endmodule
