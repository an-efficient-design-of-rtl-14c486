// tb_p2rg_cell: exhaustive self-checking test of one adder/subtractor bit cell.
//
// Two cells are tested side by side: an inner bit (FIRST=0, carry from cin) and the
// least significant bit (FIRST=1, carry-in taken from ctrl, cin tied to 0). For every
// combination of a, b, ctrl and cin the sum and carry are compared with a + (b ^ ctrl)
// + carry-in computed with integer arithmetic, the ctrl copy with ctrl, and the XOR of
// all cell outputs with the XOR of all cell inputs (constant inputs are 0).
module tb_p2rg_cell;

  logic       a, b, ctrl, cin;
  logic       sum_i, cout_i, ctrl_o_i;
  logic [2:0] garb_i;
  logic       sum_f, cout_f, ctrl_o_f;
  logic [2:0] garb_f;
  int         checks = 0;
  int         failures = 0;

  p2rg_cell #(.FIRST(1'b0)) dut_inner (
    .a(a), .b(b), .ctrl_in(ctrl), .cin(cin),
    .sum(sum_i), .cout(cout_i), .ctrl_out(ctrl_o_i), .garbage(garb_i)
  );

  p2rg_cell #(.FIRST(1'b1)) dut_first (
    .a(a), .b(b), .ctrl_in(ctrl), .cin(1'b0),
    .sum(sum_f), .cout(cout_f), .ctrl_out(ctrl_o_f), .garbage(garb_f)
  );

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%b b=%b ctrl=%b cin=%b got %b exp %b", what, a, b, ctrl, cin, got, exp);
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
    logic [1:0] total;
    for (int v = 0; v < 16; v++) begin
      {a, b, ctrl, cin} = 4'(v);
      #1;
      total = 2'(int'(a) + int'(1'(b ^ ctrl)) + int'(cin));
      check("inner sum", sum_i, total[0]);
      check("inner cout", cout_i, total[1]);
      check("inner ctrl_out", ctrl_o_i, ctrl);
      check("inner parity", ^{sum_i, cout_i, ctrl_o_i, garb_i}, ^{a, b, ctrl, cin});
      total = 2'(int'(a) + int'(1'(b ^ ctrl)) + int'(ctrl));
      check("first sum", sum_f, total[0]);
      check("first cout", cout_f, total[1]);
      check("first ctrl_out", ctrl_o_f, ctrl);
      check("first parity", ^{sum_f, cout_f, ctrl_o_f, garb_f}, ^{a, b, ctrl});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
