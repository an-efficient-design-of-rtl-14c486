// tb_p2rg_widths: the three adder/subtractor widths of the published comparison, 4, 8
// and 16 bits, run side by side.
//
// The 4-bit and 8-bit versions are single p2rg_addsub_n chains holding the least
// significant bit; the 16-bit version is the cascaded p2rg_addsub16. The 4-bit version
// is tested exhaustively, the others with random operands, in both modes, against
// integer arithmetic. The structural cost of each width (2N gates and 2N+1 constant
// inputs, from p2rg_pkg, and the width of the garbage port) is compared with the
// published gate and constant counts 8/16/32 and 9/17/33. The published garbage counts
// (16/32/64) are printed next to this structure's 3N+1 for information only.
module tb_p2rg_widths;

  import p2rg_pkg::*;

  logic [3:0]  a4, b4, y4;
  logic [7:0]  a8, b8, y8;
  logic [15:0] a16, b16, y16;
  logic        ctrl;
  logic        c4, c8, c16, k4, k8, k16, pf16;
  logic [11:0] g4;
  logic [23:0] g8;
  logic [47:0] g16;
  int          checks = 0;
  int          failures = 0;

  p2rg_addsub_n #(.WIDTH(4), .FIRST_STAGE(1'b1)) dut4 (
    .a(a4), .b(b4), .ctrl(ctrl), .cin(1'b0), .y(y4), .cout(c4), .ctrl_out(k4), .garbage(g4));
  p2rg_addsub_n #(.WIDTH(8), .FIRST_STAGE(1'b1)) dut8 (
    .a(a8), .b(b8), .ctrl(ctrl), .cin(1'b0), .y(y8), .cout(c8), .ctrl_out(k8), .garbage(g8));
  p2rg_addsub16 dut16 (
    .a(a16), .b(b16), .ctrl(ctrl), .y(y16), .cout(c16), .ctrl_out(k16), .garbage(g16),
    .parity_fault(pf16));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s ctrl=%b got %0d exp %0d", what, ctrl, got, exp);
    end
  endtask

  // a + b, or a - b with bit `width` set when there is no borrow.
  function automatic int ref_result(int a, int b, int width, logic sub);
    return sub ? a + (1 << width) - b : a + b;
  endfunction

  task automatic cost(input int width, input int gates, input int consts, input int garb_port,
                      input int paper_gates, input int paper_consts, input int paper_garbage);
    check($sformatf("%0d-bit gates", width), gates, paper_gates);
    check($sformatf("%0d-bit constants", width), consts, paper_consts);
    check($sformatf("%0d-bit garbage port", width), garb_port, 3 * width);
    $display("%0d-bit: gates %0d, constants %0d, garbage %0d (published %0d)", width, gates,
             consts, garb_port + 1, paper_garbage);
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cost(4, gate_count(4), constant_count(4, 1'b1), $bits(g4), 8, 9, 16);
    cost(8, gate_count(8), constant_count(8, 1'b1), $bits(g8), 16, 17, 32);
    cost(16, 2 * gate_count(8), constant_count(8, 1'b1) + constant_count(8, 1'b0), $bits(g16),
         32, 33, 64);

    a8 = '0; b8 = '0; a16 = '0; b16 = '0;
    for (int v = 0; v < 512; v++) begin
      {ctrl, a4, b4} = 9'(v);
      #1;
      check("4-bit", int'({c4, y4}), ref_result(int'(a4), int'(b4), 4, ctrl));
      check("4-bit ctrl_out", int'(k4), int'(ctrl));
      check("4-bit parity", int'(^{y4, c4, k4, g4}), int'(^{a4, b4, ctrl}));
    end
    for (int n = 0; n < 20000; n++) begin
      ctrl = 1'($urandom);
      a4 = '0; b4 = '0;
      a8 = 8'($urandom); b8 = 8'($urandom);
      a16 = 16'($urandom); b16 = 16'($urandom);
      #1;
      check("8-bit", int'({c8, y8}), ref_result(int'(a8), int'(b8), 8, ctrl));
      check("8-bit ctrl_out", int'(k8), int'(ctrl));
      check("8-bit parity", int'(^{y8, c8, k8, g8}), int'(^{a8, b8, ctrl}));
      check("16-bit", int'({c16, y16}), ref_result(int'(a16), int'(b16), 16, ctrl));
      check("16-bit ctrl_out", int'(k16), int'(ctrl));
      check("16-bit parity_fault", int'(pf16), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
