# Diffie-Hellman key exchange with a 17-bit adder-subtractor peripheral

Two parties agree on a secret key over a public channel. They share a modulus
N and a base α. Each party picks a private exponent (a or b) and publishes
α^a mod N or α^b mod N. Each then raises the other's public value to its own
exponent. Both arrive at α^(ab) mod N, and no eavesdropper sees that value. Keys
here are 16 bits wide.

The design splits the work between a soft processor and a very small piece of
custom hardware. The hardware is a 17-bit two's complement adder-subtractor, built
as a chain of full adders and placed behind four software registers on the
processor bus. The processor software builds every other operation from
single additions and subtractions:

- modular reduction;
- modular addition;
- modular multiplication;
- modular exponentiation.

A second, simpler peripheral, a two-input AND gate behind three registers,
brings up the processor-to-peripheral path before the arithmetic unit is
attached.

This repository holds the RTL of the custom hardware and testbenches. The
end-to-end testbench plays the processor: it runs the driver software over the
bus ports, performs a complete key exchange and checks the shared key.

## The arithmetic unit

The unit is built in three layers, each a module of its own:

| module | what it is |
|---|---|
| `full_adder` | `sum = x ^ y ^ cin`, `cout = x&y \| cin&(x^y)` |
| `ripple_carry_adder` | `WIDTH` full adders (default 17); stage *i* takes its carry from stage *i-1*. The carry into stage 0 is the `option` input. |
| `adder_subtractor` | Every bit of `n` is XORed with `opt`, and `opt` is also the carry into stage 0. |

With `opt = 0` the result is `m + n`. With `opt = 1`, `n` is inverted and 1 is
added through the carry-in, so the result is `m + ~n + 1 = m - n`. This is the
two's complement negation done inside the addition. Operands and result are
17-bit two's complement numbers: one sign bit and 16 magnitude bits. The
positive range is 0 to 65535, so any 16-bit key value fits.

Overflow is not detected. The result wraps modulo 2^17. The carry out of the top
stage is available on `ripple_carry_adder.cout`, but the adder-subtractor does
not use it.

All three modules are combinational. The critical path is the ripple through
17 carry stages. The register stage in front of the unit gives it a whole bus
clock.

## The adder-subtractor peripheral (`addersub_user_logic`)

The peripheral is the user side of a standard processor-bus slave. The bus
interface unit, which comes from the FPGA tool's library, decodes the address
into one chip enable per register. It hands the peripheral `Bus2IP_WrCE` /
`Bus2IP_RdCE`, the data, the byte enables, the clock and the reset. Words use the
bus's big-endian bit numbering: bit 0 is the MSB and bit 31 the LSB. Chip-enable
bit 0 selects register 0.

| reg | access | meaning |
|---|---|---|
| 0 | R/W | operand A, the minuend or first addend (17 LSBs used) |
| 1 | R/W | operand N, the subtrahend or second addend (17 LSBs used) |
| 2 | R/W | option: LSB 0 adds (A + N), LSB 1 subtracts (A − N) |
| 3 | R | result, 17 bits sign-extended to 32; writes are acknowledged and ignored |

Timing works as follows:

- **Acknowledge:** each access is acknowledged in the cycle its chip enable is
  high. `IP2Bus_WrAck` is the OR of the write enables, and `IP2Bus_RdAck` is the
  OR of the read enables.
- **Writes:** a write stores its enabled byte lanes on that cycle's rising edge.
- **Result:** the result is combinational from the registers. A read of register
  3 in any cycle after the last operand write returns the new value. One
  operation therefore costs four single-cycle accesses: three writes and a read.
- **Idle bus:** `IP2Bus_Data` is zero whenever no read is selected.
- **Error:** `IP2Bus_Error` is always 0.
- **Reset:** `Bus2IP_Reset` is synchronous and active high, and clears the
  registers.

Assertions check the bus rules:

- at most one write chip enable at a time;
- at most one read chip enable at a time;
- never a read and a write together.

## How the software builds modular exponentiation

This is the part of the design that is easiest to misread. The hardware
performs only one add or one subtract per request. Everything else is a loop in
software:

```
mod(A, N):        while A >= N:  A = hw(A - N)             # repeated subtraction
modadd(A, B, N):  mod(hw(A + B), N)
mult(A, B, N):    C = 0
                  for i = 15 downto 0:                     # double-and-add
                      C = modadd(C, C, N)
                      if bit i of B: C = modadd(C, A, N)
expo(A, B, N):    C = 1
                  for i = 15 downto 0:                     # square-and-multiply
                      C = mult(C, C, N)
                      if bit i of B: C = mult(C, A, N)
```

The key exchange is four calls of `expo`:

1. public X = expo(α, a, N);
2. public Y = expo(α, b, N);
3. key of X = expo(Y, a, N);
4. key of Y = expo(X, b, N).

`B` and the base are only walked bit by bit, so they can be any 16-bit value.
All values passed to `modadd` are residues below N. A sum is therefore at most
2N − 2, and `mod` needs at most one subtraction inside the exchange.

The reference run uses α = 64234, a = 63788, b = 62356 and N = 497. It produces
the public values 60 and 128 and the shared key **25**. The four
exponentiations take 2086 additions and 591 subtractions: 10708 bus accesses,
and 10708 bus clocks at one cycle per access. The processor's own instructions
between accesses are not counted.

**Range limit.** The result register is a signed 17-bit number. A sum of two
residues, up to 2N − 2, must stay at or below 65535, or it reads back negative
and `mod` stops early with a wrong value. The scheme is therefore correct for
moduli up to 32768, not for every 16-bit modulus. The testbench also runs the
exchange with N = 32749, the largest prime under 2^15.

## The AND-gate peripheral (`andgate_user_logic`, `and_gate`)

This is the bring-up design. It uses the same bus signals and the same
single-cycle handshake as the arithmetic peripheral.

| reg | access | meaning |
|---|---|---|
| 0 | R/W | LSB is gate input `a` |
| 1 | R/W | LSB is gate input `b` |
| 2 | R | 31 zeros, then the gate output `o` in the LSB; writes are acknowledged and dropped |

The gate inputs change on the clock edge that completes the register write.

## Top level (`dh_fpga_top`)

The top holds only the custom logic:

- the adder-subtractor peripheral, on ports prefixed `as_`;
- the AND-gate peripheral, on ports prefixed `ag_`.

They share only the bus clock and reset. In the original system they were two
separate builds at different bus addresses. The adder-subtractor peripheral's
64 KiB window was at 0xCE200000, next to 16 KiB instruction and data memories, a
UART at 0x84000000 and a debug module.

The following parts are standard library cores and are not part of this RTL.
Where they would connect, the top brings the user-side bus signals out as ports.

- the soft processor;
- the processor local bus;
- the bus interface units that generate the chip enables;
- the local-memory controllers and block RAM;
- the UART, which runs at 9600 baud, 8 data bits, no parity, 1 stop bit;
- the debug module.

## Design choices not fixed by the original description

These points were left open in the original description and are this design's
own choices:

- **Handshake:** acknowledge in the same cycle as the chip enable. Capture of the
  original bus shows the write enable and the write acknowledge high together.
- **Byte enables:** honoured per byte lane.
- **Reset:** synchronous, active high, clears all registers.
- **Result width:** the 17-bit result is sign-extended to 32 bits on read, so
  software comparing `A >= N` on a negative result sees a negative number.
- **Registers 0 to 2** of the arithmetic peripheral read back their contents.
- **Write-only-ignored registers:** writes to register 3 of the arithmetic
  peripheral and to register 2 of the AND-gate peripheral are acknowledged and
  have no effect.
- **Carry out:** `ripple_carry_adder` brings its final carry out as a port.

## Files

`rtl/`:

| file | contents |
|---|---|
| `dh_pkg.sv` | operand and word widths, register indices, the add/subtract option encoding |
| `full_adder.sv`, `ripple_carry_adder.sv`, `adder_subtractor.sv` | the arithmetic unit |
| `and_gate.sv` | the gate of the bring-up peripheral |
| `addersub_user_logic.sv`, `andgate_user_logic.sv` | the two peripherals |
| `dh_fpga_top.sv` | both peripherals side by side |

`tb/`:

- `ipif_if.sv` is an interface that models the bus interface unit, with
  `write()` and `read()` tasks and acknowledge counting.
- There is one self-checking testbench per module: `tb_<module>.sv`.
- `tb_dh_fpga_top.sv` is the end-to-end run at the default sizes. It does the
  AND-gate test, a multi-step reduction (64234 mod 497 = 121), the reference key
  exchange and the N = 32749 exchange. It checks one cycle per access and
  requires that additions, subtractions, multi-step reductions and both AND
  outputs all occur.

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself with a
watchdog if it hangs.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dh_pkg.sv tb/tb_dh_fpga_top.sv --top-module tb_dh_fpga_top
./obj_dir/Vtb_dh_fpga_top
```

To run another block's test, substitute its testbench name.

Every testbench passes. Each one also fails when its module is replaced by an
empty module or by a copy with a deliberate bug. The bugs tried were:

- a wrong carry equation;
- a broken carry chain;
- a missing +1 in subtraction;
- OR instead of AND;
- a wrong register bit;
- zero-extension instead of sign extension;
- masked byte enables.

Verilator's lint reports only style warnings: ascending `[0:31]` ranges, which
are the bus's bit numbering, and unused package constants.
