// tb_addersub_user_logic: drives the adder-subtractor peripheral through
// single-cycle bus accesses the way the key-exchange driver does: A to register
// 0, N to register 1, the option to register 2, result from register 3. The
// result is compared with integer arithmetic, including negative results (which
// must read back sign-extended to 32 bits), register read-back, the one-cycle
// acknowledge, byte enables and reset.
module tb_addersub_user_logic;
  logic clk = 1'b0, rst;
  int checks = 0, failures = 0;
  logic [0:31] rd;

  always #5 clk = ~clk;

  ipif_if #(.NREG(4)) bus (.clk);

  addersub_user_logic dut (
    .Bus2IP_Clk  (clk),
    .Bus2IP_Reset(rst),
    .Bus2IP_Data (bus.data),
    .Bus2IP_BE   (bus.be),
    .Bus2IP_RdCE (bus.rdce),
    .Bus2IP_WrCE (bus.wrce),
    .IP2Bus_Data (bus.rdata),
    .IP2Bus_RdAck(bus.rdack),
    .IP2Bus_WrAck(bus.wrack),
    .IP2Bus_Error(bus.err)
  );

  task automatic expect_eq(input logic [0:31] got, input logic [0:31] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, want);
    end
  endtask

  // One operation as the driver performs it; expected value: the 17-bit two's
  // complement result, sign-extended.
  task automatic op(input int a, input int n, input bit sub);
    int full, want;
    bus.write(0, 32'(a));
    bus.write(1, 32'(n));
    bus.write(2, {31'd0, sub});
    bus.read(3, rd);
    full = sub ? a - n : a + n;
    want = int'($signed(17'(full)));
    expect_eq(rd, 32'(want), $sformatf("%0d %s %0d", a, sub ? "-" : "+", n));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bus.idle();
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;

    bus.read(3, rd); expect_eq(rd, '0, "result after reset (0 + 0)");

    op(64234, 497, 1);
    op(497, 64234, 1);      // negative result
    op(100, 200, 0);
    op(65535, 65535, 0);    // 131070 wraps to -2 in 17 bits
    op(0, 1, 1);
    for (int i = 0; i < 500; i++)
      op(int'($urandom_range(0, 65535)), int'($urandom_range(0, 65535)), 1'($urandom));

    // register read-back
    bus.write(0, 32'hCAFE1234);
    bus.write(1, 32'h0BADF00D);
    bus.write(2, 32'h00000001);
    bus.read(0, rd); expect_eq(rd, 32'hCAFE1234, "reg0 read-back");
    bus.read(1, rd); expect_eq(rd, 32'h0BADF00D, "reg1 read-back");
    bus.read(2, rd); expect_eq(rd, 32'h00000001, "reg2 read-back");

    // byte enables: update only the low byte of A
    bus.write(0, 32'd300);
    bus.write(1, 32'd5);
    bus.write(2, 32'd0);
    bus.write(0, 32'hFFFFFF07, 4'b0001);   // A becomes 0x107 = 263
    bus.read(3, rd); expect_eq(rd, 32'd268, "byte-lane write of A");

    // writing register 3 is ignored
    bus.write(3, 32'hFFFFFFFF);
    bus.read(3, rd); expect_eq(rd, 32'd268, "register 3 is read only");

    @(negedge clk);
    checks++;
    if (bus.rdata !== '0 || bus.rdack || bus.wrack) begin
      failures++;
      $display("FAIL idle bus drives data %h", bus.rdata);
    end

    rst = 1'b1; @(posedge clk); #1 rst = 1'b0;
    bus.read(0, rd); expect_eq(rd, '0, "reg0 after reset");

    checks++;
    if (bus.missed_acks != 0) begin
      failures++;
      $display("FAIL %0d accesses without a same-cycle acknowledge", bus.missed_acks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
