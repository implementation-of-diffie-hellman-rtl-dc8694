// tb_andgate_user_logic: drives the AND-gate peripheral through single-cycle
// bus accesses, as the processor's driver does: write the two inputs to
// registers 0 and 1, read the gate output from register 2. Checks all four input
// combinations, read-back of registers 0 and 1, a one-cycle acknowledge on every
// access, zero read data while no read is selected, per-byte write enables and
// the reset value of the registers.
module tb_andgate_user_logic;
  logic clk = 1'b0, rst;
  int checks = 0, failures = 0;
  logic [0:31] rd;

  always #5 clk = ~clk;

  ipif_if #(.NREG(3)) bus (.clk);

  andgate_user_logic dut (
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

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bus.idle();
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;

    // after reset both inputs are 0
    bus.read(0, rd); expect_eq(rd, '0, "reg0 after reset");
    bus.read(2, rd); expect_eq(rd, '0, "gate after reset");

    for (int v = 0; v < 4; v++) begin
      logic ia, ib;
      {ia, ib} = 2'(v);
      bus.write(0, {31'd0, ia});
      bus.write(1, {31'd0, ib});
      bus.read(2, rd); expect_eq(rd, {31'd0, ia & ib}, $sformatf("a=%b b=%b", ia, ib));
      bus.read(0, rd); expect_eq(rd, {31'd0, ia}, "reg0 read-back");
      bus.read(1, rd); expect_eq(rd, {31'd0, ib}, "reg1 read-back");
    end

    // full-word read-back and byte enables
    bus.write(0, 32'hDEADBEEF);
    bus.read(0, rd); expect_eq(rd, 32'hDEADBEEF, "reg0 word");
    bus.write(0, 32'h11223344, 4'b0101);
    bus.read(0, rd); expect_eq(rd, 32'hDE22BE44, "reg0 byte lanes 1,3");
    // writing register 2 does not change what it reads (the gate output)
    bus.write(0, 32'h1);
    bus.write(1, 32'h1);
    bus.write(2, 32'h0);
    bus.read(2, rd); expect_eq(rd, 32'h1, "reg2 reads gate after a write to reg2");

    // read data is zero when no read is selected
    @(negedge clk);
    checks++;
    if (bus.rdata !== '0 || bus.rdack || bus.wrack) begin
      failures++;
      $display("FAIL idle bus drives data %h rdack %b wrack %b", bus.rdata, bus.rdack, bus.wrack);
    end

    // reset clears
    rst = 1'b1; @(posedge clk); #1 rst = 1'b0;
    bus.read(0, rd); expect_eq(rd, '0, "reg0 after second reset");

    checks++;
    if (bus.missed_acks != 0) begin
      failures++;
      $display("FAIL %0d accesses without a same-cycle acknowledge", bus.missed_acks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
