// tb_ripple_carry_adder: checks the 17-bit ripple-carry adder against integer
// addition. Corner cases (zero, all ones, a carry rippling through every stage)
// and random operands with both values of the carry-in; {cout, s} must equal
// a + b + option.
module tb_ripple_carry_adder;
  localparam int unsigned W = 17;
  logic [W-1:0] a, b, s;
  logic         option, cout;
  int checks = 0, failures = 0;

  ripple_carry_adder dut (.a, .b, .option, .s, .cout);

  task automatic check(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic top);
    logic [W:0] expect_v;
    a = ta; b = tb_; option = top;
    #1;
    expect_v = {1'b0, ta} + {1'b0, tb_} + (W+1)'(top);
    checks++;
    if ({cout, s} !== expect_v) begin
      failures++;
      $display("FAIL a=%h b=%h c0=%b -> %h expected %h", ta, tb_, top, {cout, s}, expect_v);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, '0, 0);
    check('0, '0, 1);
    check('1, '0, 1);          // carry through all 17 stages
    check('1, '1, 1);
    check(17'h0FFFF, 17'h1, 0);
    for (int i = 0; i < W; i++) check(W'(1) << i, W'(1) << i, 0);
    for (int i = 0; i < 2000; i++) check(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
