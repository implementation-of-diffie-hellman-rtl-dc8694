// tb_and_gate: all four input combinations of the two-input AND gate.
module tb_and_gate;
  logic a, b, o;
  int checks = 0, failures = 0;

  and_gate dut (.a, .b, .o);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (o !== (v == 3)) begin
        failures++;
        $display("FAIL a=%b b=%b o=%b", a, b, o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
