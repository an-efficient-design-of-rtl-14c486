// tb_p2rg_addsub16: end-to-end test of the 16-bit P2RG adder/subtractor at its default size.
//
// Operands are corner values (0, 1, 0x00FF, 0x7FFF, 0x8000, 0xFFFF, ...) and random
// values, each applied in both modes. The reference is integer arithmetic: a + b, or
// a - b with cout = 1 when a >= b. The test also checks that ctrl leaves the network
// unchanged, that parity_fault stays low on a fault-free network, and that the gate
// and constant totals of the structure are the published 32 and 33.
//
// It counts how often each mechanism of the design occurs and fails if one never does:
// addition, subtraction, a carry or borrow crossing from the low 8-bit stage to the
// high one, a carry out of an addition, a borrow out of a subtraction, and detection of
// an injected fault. Faults are injected by forcing one internal wire between two gates
// to the wrong value; the parity checker must then raise parity_fault.
module tb_p2rg_addsub16;

  import p2rg_pkg::*;

  logic [15:0] a, b, y;
  logic        ctrl, cout, ctrl_out, parity_fault;
  logic [47:0] garbage;
  int          checks = 0;
  int          failures = 0;
  int          n_add = 0, n_sub = 0, n_mid_carry = 0, n_mid_borrow = 0;
  int          n_carry_out = 0, n_borrow_out = 0, n_fault_detected = 0;

  p2rg_addsub16 dut (.*);

  task automatic check(input string what, input logic [16:0] got, input logic [16:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s a=%h b=%h ctrl=%b got %h exp %h", what, a, b, ctrl, got, exp);
    end
  endtask

  task automatic apply(input logic [15:0] va, input logic [15:0] vb, input op_e op);
    logic [16:0] exp;
    logic        low;   // carry (1) or no borrow (1) from the low stage
    a = va;
    b = vb;
    ctrl = logic'(op);
    #1;
    if (op == OP_ADD) begin
      exp = 17'(int'(va) + int'(vb));
      low = (int'(va[7:0]) + int'(vb[7:0])) >= 256;
      n_add++;
      if (low) n_mid_carry++;
      if (exp[16]) n_carry_out++;
    end else begin
      exp = 17'(int'(va) + 65536 - int'(vb));
      low = va[7:0] >= vb[7:0];
      n_sub++;
      if (!low) n_mid_borrow++;
      if (!exp[16]) n_borrow_out++;
    end
    check("{cout,y}", {cout, y}, exp);
    check("ctrl_out", {16'(0), ctrl_out}, {16'(0), ctrl});
    check("parity_fault", {16'(0), parity_fault}, 17'(0));
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [15:0] corners [10] = '{16'h0000, 16'h0001, 16'h00FF, 16'h0100,
        16'h7FFF, 16'h8000, 16'hFF00, 16'hFFFE, 16'hFFFF, 16'h5A5A};

    checks++;
    if (gate_count(8) * 2 != 32 || constant_count(8, 1'b1) + constant_count(8, 1'b0) != 33) begin
      failures++;
      $display("FAIL cost: gates %0d constants %0d", gate_count(8) * 2,
               constant_count(8, 1'b1) + constant_count(8, 1'b0));
    end

    foreach (corners[i])
      foreach (corners[j]) begin
        apply(corners[i], corners[j], OP_ADD);
        apply(corners[i], corners[j], OP_SUB);
      end
    for (int n = 0; n < 50000; n++) begin
      logic [15:0] ra, rb;
      ra = 16'($urandom);
      rb = 16'($urandom);
      apply(ra, rb, OP_ADD);
      apply(ra, rb, OP_SUB);
    end

    // Fault injection: gate 1's T output (a copy of a[2]) of bit 2 is forced to 0 on its
    // way into gate 2, so a[2] = 1 flips one wire and the output parity.
    force dut.u_low.g_bit[2].u_cell.g1_t = 1'b0;
    for (int n = 0; n < 32; n++) begin
      a = 16'($urandom) | 16'h0004;
      b = 16'($urandom);
      ctrl = 1'($urandom);
      #1;
      checks++;
      if (parity_fault) n_fault_detected++;
      else begin
        failures++;
        $display("FAIL injected fault not detected a=%h b=%h ctrl=%b", a, b, ctrl);
      end
    end
    release dut.u_low.g_bit[2].u_cell.g1_t;
    #1;
    check("parity_fault after release", {16'(0), parity_fault}, 17'(0));

    $display("mechanisms: add=%0d sub=%0d low->high carry=%0d low->high borrow=%0d",
             n_add, n_sub, n_mid_carry, n_mid_borrow);
    $display("            carry out=%0d borrow out=%0d faults detected=%0d",
             n_carry_out, n_borrow_out, n_fault_detected);
    checks++;
    if (n_add == 0 || n_sub == 0 || n_mid_carry == 0 || n_mid_borrow == 0 ||
        n_carry_out == 0 || n_borrow_out == 0 || n_fault_detected == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
