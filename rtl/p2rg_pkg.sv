// p2rg_pkg: shared constants and cost functions for the P2RG adder/subtractor.
//
// The adder/subtractor is built only from 5x5 P2RG reversible gates, so its cost is
// given in the three figures used for reversible circuits: gate count, constant inputs
// (gate inputs tied to 0 or 1) and garbage outputs (gate outputs that are neither a
// primary output nor the input of another gate). The functions below give those figures
// for the structure in p2rg_cell / p2rg_addsub_n, so that testbenches can check them
// against the netlist they simulate. The per-bit structure (two gates, two constants,
// three garbage outputs) is this design's own; the gate and constant totals match the
// published figures of 2N gates and 2N+1 constants for an N-bit adder/subtractor.
package p2rg_pkg;

  // Gates and constant inputs of one bit cell.
  localparam int unsigned CELL_GATES     = 2;
  localparam int unsigned CELL_CONSTANTS = 2;
  // Gate-2 outputs P, S, T of every cell are garbage.
  localparam int unsigned CELL_GARBAGE   = 3;

  // Operation selected by the ctrl line.
  typedef enum logic {
    OP_ADD = 1'b0,
    OP_SUB = 1'b1
  } op_e;

  // Gate count of an N-bit chain.
  function automatic int unsigned gate_count(int unsigned width);
    return CELL_GATES * width;
  endfunction

  // Constant inputs of an N-bit chain. The chain that holds the least significant bit
  // ties one more gate input (gate 2, input E of bit 0) to 0.
  function automatic int unsigned constant_count(int unsigned width, bit first_stage);
    return CELL_CONSTANTS * width + (first_stage ? 1 : 0);
  endfunction

  // Garbage outputs of an N-bit chain. The ctrl copy leaving the most significant bit
  // is garbage when no further stage uses it.
  function automatic int unsigned garbage_count(int unsigned width, bit last_stage);
    return CELL_GARBAGE * width + (last_stage ? 1 : 0);
  endfunction

endpackage
