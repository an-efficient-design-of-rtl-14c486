// tb_p2rg_addsub_n: self-checking test of the 8-bit P2RG adder/subtractor stage.
//
// The least significant stage (FIRST_STAGE=1) is tested exhaustively: every a, b and
// ctrl, 2^17 vectors, against a + b or a - b computed with integer arithmetic, including
// the carry out (in subtraction 1 = no borrow). An upper stage (FIRST_STAGE=0) gets
// random operands and a random carry-in and is compared with a + (b ^ ctrl) + cin. Both
// must pass ctrl on unchanged and keep input parity equal to output parity.
module tb_p2rg_addsub_n;

  import p2rg_pkg::*;

  localparam int unsigned W = 8;

  logic [W-1:0]   a, b;
  logic           ctrl, cin;
  logic [W-1:0]   y_f, y_u;
  logic           cout_f, cout_u, ctrl_o_f, ctrl_o_u;
  logic [3*W-1:0] garb_f, garb_u;
  int             checks = 0;
  int             failures = 0;

  p2rg_addsub_n #(.WIDTH(W), .FIRST_STAGE(1'b1)) dut_first (
    .a(a), .b(b), .ctrl(ctrl), .cin(1'b0),
    .y(y_f), .cout(cout_f), .ctrl_out(ctrl_o_f), .garbage(garb_f)
  );

  p2rg_addsub_n #(.WIDTH(W), .FIRST_STAGE(1'b0)) dut_upper (
    .a(a), .b(b), .ctrl(ctrl), .cin(cin),
    .y(y_u), .cout(cout_u), .ctrl_out(ctrl_o_u), .garbage(garb_u)
  );

  task automatic check(input string what, input logic [W:0] got, input logic [W:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s a=%0d b=%0d ctrl=%b cin=%b got %0d exp %0d", what, a, b, ctrl, cin, got, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W:0] exp;
    op_e op;
    for (int v = 0; v < (1 << (2 * W + 1)); v++) begin
      {ctrl, a, b} = (2 * W + 1)'(v);
      cin = 1'b0;
      #1;
      op = op_e'(ctrl);
      if (op == OP_ADD) exp = (W + 1)'(int'(a) + int'(b));
      else              exp = (W + 1)'(int'(a) + (1 << W) - int'(b));   // bit W set = no borrow
      check("first {cout,y}", {cout_f, y_f}, exp);
      check("first ctrl_out", {W'(0), ctrl_o_f}, {W'(0), ctrl});
      check("first parity", {W'(0), ^{y_f, cout_f, ctrl_o_f, garb_f}}, {W'(0), ^{a, b, ctrl}});
    end
    for (int n = 0; n < 20000; n++) begin
      {ctrl, cin} = 2'($urandom);
      a = W'($urandom);
      b = W'($urandom);
      #1;
      exp = (W + 1)'(int'(a) + int'(W'(b ^ {W{ctrl}})) + int'(cin));
      check("upper {cout,y}", {cout_u, y_u}, exp);
      check("upper ctrl_out", {W'(0), ctrl_o_u}, {W'(0), ctrl});
      check("upper parity", {W'(0), ^{y_u, cout_u, ctrl_o_u, garb_u}}, {W'(0), ^{a, b, ctrl, cin}});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
