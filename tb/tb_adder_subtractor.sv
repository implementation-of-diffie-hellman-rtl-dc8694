// tb_adder_subtractor: checks the 17-bit two's complement adder-subtractor.
// First the negations of the classic 8-bit two's complement examples
// (17, -99, 119, -127, 0, -128), computed as 0 - x and sign-extended to 17 bits;
// then random additions and subtractions compared with integer arithmetic
// modulo 2^17, and subtractions of the kind the modular reduction performs
// (A - N with A >= N, values below 2^16).
module tb_adder_subtractor;
  localparam int unsigned W = 17;
  logic [W-1:0] m, n, o;
  logic         opt;
  int checks = 0, failures = 0;

  adder_subtractor dut (.m, .n, .opt, .o);

  task automatic check(input int tm, input int tn, input logic top);
    logic [W-1:0] expect_v;
    m = W'(tm); n = W'(tn); opt = top;
    #1;
    expect_v = top ? W'(tm - tn) : W'(tm + tn);
    checks++;
    if (o !== expect_v) begin
      failures++;
      $display("FAIL m=%0d n=%0d opt=%b -> %h expected %h", tm, tn, top, o, expect_v);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ex [6] = '{17, -99, 119, -127, 0, -128};
    foreach (ex[i]) begin
      check(0, ex[i], 1);
      // the negated value read back as a signed 17-bit number
      checks++;
      if (int'($signed(o)) != -ex[i]) begin
        failures++;
        $display("FAIL negate %0d gave %0d", ex[i], $signed(o));
      end
    end
    check(64234, 497, 1);
    check(496, 496, 0);
    check(65535, 1, 0);
    check(0, 1, 1);
    for (int i = 0; i < 2000; i++)
      check(int'($urandom_range(0, 131071)) - 65536, int'($urandom_range(0, 131071)) - 65536,
            1'($urandom));
    for (int i = 0; i < 500; i++) begin
      int nn = int'($urandom_range(1, 65535));
      check(int'($urandom_range(nn, 65535)), nn, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
