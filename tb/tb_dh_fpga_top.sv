// tb_dh_fpga_top: end-to-end run of the key exchange on the top level, at its
// default sizes.
//
// The testbench plays the soft processor. Its tasks are the driver software of
// the design, each arithmetic step being a bus transaction on the
// adder-subtractor peripheral:
//   mod(A, N)       while A >= N: A = A - N            (peripheral subtracts)
//   modadd(A, B, N) mod(A + B, N)                      (peripheral adds)
//   mult(A, B, N)   double-and-add over the 16 bits of B, MSB first
//   expo(A, B, N)   square-and-multiply over the 16 bits of B, MSB first
// With base 64234, private values 63788 and 62356 and modulus 497 it computes
// both public values and both shared keys, and checks them against modular
// exponentiation done directly in integer arithmetic (the shared key is 25).
// The exchange is repeated with modulus 32749, the largest prime whose
// residue sums stay below 2^16. It also runs the AND-gate peripheral through all four input pairs.
//
// The reduction routine is also run alone on the unreduced base, where it needs
// many subtractions (within the key exchange every sum is below 2N).
// Counted and required to happen: additions, subtractions, reductions that need
// more than one subtraction, AND-gate reads of both output values. Every bus
// access must be acknowledged in its own cycle; the total number of clock cycles
// is checked against the number of accesses.
module tb_dh_fpga_top;
  logic clk = 1'b0, rst;
  int checks = 0, failures = 0;
  longint unsigned cycles = 0;

  int unsigned n_add = 0, n_sub = 0, n_multi_sub = 0, n_and0 = 0, n_and1 = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  ipif_if #(.NREG(4)) as_bus (.clk);
  ipif_if #(.NREG(3)) ag_bus (.clk);

  dh_fpga_top dut (
    .Bus2IP_Clk     (clk),
    .Bus2IP_Reset   (rst),
    .as_Bus2IP_Data (as_bus.data),
    .as_Bus2IP_BE   (as_bus.be),
    .as_Bus2IP_RdCE (as_bus.rdce),
    .as_Bus2IP_WrCE (as_bus.wrce),
    .as_IP2Bus_Data (as_bus.rdata),
    .as_IP2Bus_RdAck(as_bus.rdack),
    .as_IP2Bus_WrAck(as_bus.wrack),
    .as_IP2Bus_Error(as_bus.err),
    .ag_Bus2IP_Data (ag_bus.data),
    .ag_Bus2IP_BE   (ag_bus.be),
    .ag_Bus2IP_RdCE (ag_bus.rdce),
    .ag_Bus2IP_WrCE (ag_bus.wrce),
    .ag_IP2Bus_Data (ag_bus.rdata),
    .ag_IP2Bus_RdAck(ag_bus.rdack),
    .ag_IP2Bus_WrAck(ag_bus.wrack),
    .ag_IP2Bus_Error(ag_bus.err)
  );

  // ------------------------------------------------------------ driver model
  task automatic hw_op(input int a, input int b, input bit sub, output int r);
    logic [0:31] rd;
    as_bus.write(dh_pkg::AS_REG_A, 32'(a));
    as_bus.write(dh_pkg::AS_REG_N, 32'(b));
    as_bus.write(dh_pkg::AS_REG_OPT, {31'd0, sub});
    as_bus.read(dh_pkg::AS_REG_RESULT, rd);
    r = int'(rd);
    if (sub) n_sub++; else n_add++;
  endtask

  task automatic sw_mod(input int a, input int n, output int r);
    int steps = 0;
    while (a >= n) begin
      hw_op(a, n, 1'b1, a);
      steps++;
    end
    if (steps > 1) n_multi_sub++;
    r = a;
  endtask

  task automatic sw_modadd(input int a, input int b, input int n, output int r);
    int s;
    hw_op(a, b, 1'b0, s);
    sw_mod(s, n, r);
  endtask

  task automatic sw_mult(input int a, input int b, input int n, output int r);
    int c = 0;
    for (int i = 15; i >= 0; i--) begin
      sw_modadd(c, c, n, c);
      if (b[i]) sw_modadd(c, a, n, c);
    end
    r = c;
  endtask

  task automatic sw_expo(input int a, input int b, input int n, output int r);
    int c = 1;
    for (int i = 15; i >= 0; i--) begin
      sw_mult(c, c, n, c);
      if (b[i]) sw_mult(c, a, n, c);
    end
    r = c;
  endtask

  // ------------------------------------------------------------ reference
  function automatic longint unsigned ref_powmod(longint unsigned base, longint unsigned e,
                                                 longint unsigned n);
    longint unsigned acc = 1, x = base % n;
    while (e != 0) begin
      if (e[0]) acc = (acc * x) % n;
      x = (x * x) % n;
      e >>= 1;
    end
    return acc;
  endfunction

  task automatic expect_int(input int got, input longint unsigned want, input string what);
    checks++;
    if (longint'(got) != longint'(want)) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, want);
    end else begin
      $display("%s = %0d", what, got);
    end
  endtask

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int base = 64234, priv_a = 63788, priv_b = 62356, modulus = 497;
    int pub_a, pub_b, key_a, key_b;
    logic [0:31] rd;
    longint unsigned c0, accesses;
    int unsigned a0;

    as_bus.idle();
    ag_bus.idle();
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // -------- AND-gate peripheral: the bring-up test
    for (int v = 0; v < 4; v++) begin
      ag_bus.write(dh_pkg::AG_REG_A, 32'(v >> 1));
      ag_bus.write(dh_pkg::AG_REG_B, 32'(v & 1));
      ag_bus.read(dh_pkg::AG_REG_OUT, rd);
      checks++;
      if (rd !== 32'(v == 3)) begin
        failures++;
        $display("FAIL AND gate a=%0d b=%0d read %h", v >> 1, v & 1, rd);
      end
      if (rd[31]) n_and1++; else n_and0++;
    end

    // -------- the reduction routine alone, on the unreduced base
    sw_mod(base, modulus, key_a);
    expect_int(key_a, 64'(base % modulus), "base mod N by repeated subtraction");

    // -------- Diffie-Hellman key exchange
    c0 = cycles;
    a0 = as_bus.accesses;
    sw_expo(base, priv_a, modulus, pub_a);
    expect_int(pub_a, ref_powmod(64'(base), 64'(priv_a), 64'(modulus)), "public value X");
    sw_expo(base, priv_b, modulus, pub_b);
    expect_int(pub_b, ref_powmod(64'(base), 64'(priv_b), 64'(modulus)), "public value Y");
    sw_expo(pub_b, priv_a, modulus, key_a);
    sw_expo(pub_a, priv_b, modulus, key_b);
    expect_int(key_a, ref_powmod(64'(pub_b), 64'(priv_a), 64'(modulus)), "shared key of X");
    expect_int(key_b, ref_powmod(64'(pub_a), 64'(priv_b), 64'(modulus)), "shared key of Y");
    expect_int(key_a, 25, "shared key (published value)");
    checks++;
    if (key_a != key_b) begin
      failures++;
      $display("FAIL the two sides disagree");
    end

    // -------- the same exchange with the largest prime modulus below 2^15, the
    //          largest class of moduli for which a sum of two residues still
    //          fits the positive range of the 17-bit datapath
    sw_expo(base, priv_a, 32749, pub_a);
    sw_expo(base, priv_b, 32749, pub_b);
    sw_expo(pub_b, priv_a, 32749, key_a);
    sw_expo(pub_a, priv_b, 32749, key_b);
    expect_int(key_a, ref_powmod(ref_powmod(64'(base), 64'(priv_b), 64'd32749), 64'(priv_a), 64'd32749),
               "shared key of X, N = 32749");
    expect_int(key_b, ref_powmod(ref_powmod(64'(base), 64'(priv_a), 64'd32749), 64'(priv_b), 64'd32749),
               "shared key of Y, N = 32749");

    // -------- timing: one cycle per access, none left unacknowledged
    accesses = longint'(as_bus.accesses - a0);
    checks++;
    if (as_bus.missed_acks != 0 || ag_bus.missed_acks != 0) begin
      failures++;
      $display("FAIL accesses without a same-cycle acknowledge: %0d / %0d",
               as_bus.missed_acks, ag_bus.missed_acks);
    end
    checks++;
    if (cycles - c0 != accesses) begin
      failures++;
      $display("FAIL %0d cycles for %0d single-cycle accesses", cycles - c0, accesses);
    end
    $display("key exchange: %0d bus accesses in %0d cycles (%0d additions, %0d subtractions)",
             accesses, cycles - c0, n_add, n_sub);

    // -------- every mechanism happened
    checks++;
    if (n_add == 0 || n_sub == 0 || n_multi_sub == 0 || n_and0 == 0 || n_and1 == 0) begin
      failures++;
      $display("FAIL mechanism not exercised: add=%0d sub=%0d multi-step mod=%0d and0=%0d and1=%0d",
               n_add, n_sub, n_multi_sub, n_and0, n_and1);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
