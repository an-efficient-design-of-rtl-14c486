// tb_parity_check: self-checking test of the input/output parity comparator.
//
// Random and hand-picked vectors are applied; the expected flag is the number of ones
// on both sides together, counted bit by bit, taken modulo 2. Each single-bit flip of a
// matching pair must raise the flag.
module tb_parity_check;

  localparam int unsigned NI = 66;
  localparam int unsigned NO = 66;

  logic [NI-1:0] in_bits;
  logic [NO-1:0] out_bits;
  logic          fault;
  int            checks = 0;
  int            failures = 0;

  parity_check #(.N_IN(NI), .N_OUT(NO)) dut (.*);

  function automatic int unsigned ones(input logic [NI-1:0] x, input logic [NO-1:0] y);
    int unsigned n = 0;
    for (int i = 0; i < NI; i++) n += x[i];
    for (int i = 0; i < NO; i++) n += y[i];
    return n;
  endfunction

  task automatic check(input logic exp);
    #1;
    checks++;
    if (fault !== exp) begin
      failures++;
      $display("FAIL in=%h out=%h fault=%b exp %b", in_bits, out_bits, fault, exp);
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
    in_bits = '0; out_bits = '0;
    check(1'b0);
    in_bits = '1; out_bits = '1;
    check(1'b0);
    for (int n = 0; n < 2000; n++) begin
      in_bits  = NI'({$urandom, $urandom, $urandom});
      out_bits = NO'({$urandom, $urandom, $urandom});
      check(1'(ones(in_bits, out_bits) % 2));
    end
    // Matching pair, then every single-bit flip on either side.
    in_bits  = NI'({$urandom, $urandom, $urandom});
    out_bits = '0;
    out_bits[0] = ^in_bits;
    check(1'b0);
    for (int i = 0; i < NI; i++) begin
      in_bits[i] = ~in_bits[i];
      check(1'b1);
      in_bits[i] = ~in_bits[i];
    end
    for (int i = 0; i < NO; i++) begin
      out_bits[i] = ~out_bits[i];
      check(1'b1);
      out_bits[i] = ~out_bits[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
