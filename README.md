# RSA co-processor system on an Avalon bus

This is a small system-on-chip for 1024-bit RSA on a modest FPGA. The
expensive part of RSA is modular exponentiation. The private-key side,
used for decryption and signing, raises a number to a 1024-bit exponent.
Doing that in software on a 33 MHz soft processor takes seconds. The
design therefore splits the work:

- A 32-bit processor keeps everything that is control-heavy or cheap. That
  covers public-key encryption and verification with the short exponent
  e = 17, SHA-1 hashing, the host-link driver, and the Chinese Remainder
  Theorem (CRT) bookkeeping.
- A **512-bit RSA co-processor** on the processor's Avalon bus does the
  heavy arithmetic. CRT turns one 1024-bit private-key operation
  `y = x^d mod n` into two 512-bit exponentiations, `x^dp mod p` and
  `x^dq mod q`. So a co-processor half the key length is enough, and the
  private-key operation runs about four times faster than without CRT.

This repository holds the hardware around the processor, in SystemVerilog:

- the bus;
- the RSA co-processor, made of an Avalon register window, an exponentiation
  sequencer and a Montgomery multiplier;
- an on-chip RAM.

The processor and the vendor peripherals are not included. Their bus ports
are brought out of the top module, `crypto_embedded_system`.

The system targets 1024-bit decryption with CRT in 111 ms at 33.33 MHz. In
simulation, this RTL at its default sizes finishes one decryption in 797,392
cycles, which is 23.9 ms at that clock. This figure counts the two
co-processor runs and their bus traffic. The processor's own software time
for the CRT recombination is not included.

## System map

```
              processor data master (m_req / m_rsp)
                              |
                       +-------------+
                       | avalon_bus  |---- decode_error
                       +-------------+
   +-----------+-------+----+--------+----------+------------------+
   |           |            |        |          |                  |
onchip_mem   UART        timer    ext SRAM   ext flash     rsa_coprocessor
 (inside)  (port out)  (port out) (port out) (port out)   rsa_avalon_if
                                                         + rsa_core
                                                            + mont_mult
```

| slave           | base         | size      | where                                 |
|-----------------|--------------|-----------|---------------------------------------|
| on-chip RAM     | `0x00000000` | 1 KiB     | `onchip_mem`, 256 x 32 bit            |
| UART            | `0x00000400` | 32 B      | port `uart_req/uart_rsp`              |
| timer           | `0x00000440` | 32 B      | port `timer_req/timer_rsp`            |
| external SRAM   | `0x00040000` | 256 KiB   | port `extram_req/extram_rsp`          |
| external flash  | `0x00100000` | 1 MiB     | port `flash_req/flash_rsp`            |
| RSA co-processor| `0x00900900` | 64 B      | `rsa_coprocessor`                     |

The bases of the UART, timer, SRAM, flash and co-processor follow the
reference system's address map, as do the sizes of the SRAM and flash and
the co-processor window `0x00900900..0x0090093F`. Three things here are this
design's own choices:

- the UART and timer window sizes;
- the place and size of the on-chip RAM, which fills the gap below the UART;
- the register layout inside the co-processor window.

Every port is an `av_req_t` / `av_rsp_t` pair from `crypto_pkg`:

- `av_req_t` holds address, read, write, 32-bit writedata and a 4-bit
  byteenable.
- `av_rsp_t` holds 32-bit readdata and waitrequest.

A transfer completes in the first cycle in which `read` or `write` is high
and `waitrequest` is low. Read data is valid in that same cycle.

The bus is purely combinational:

- The addressed slave sees `read`/`write`, which act as its chip select. Its
  address is rebased to the byte offset inside its window.
- The master sees that slave's `readdata` and `waitrequest`. A slow slave
  therefore stalls the master.
- An unmapped address completes immediately, reads 0 and pulses
  `decode_error`.

The bus also carries assertions. They check that the windows never overlap,
that the master never reads and writes at once, and that the master holds a
stalled request stable.

## Programming the co-processor

A 512-bit operand is as large as the whole 16-word window, so the window
does not map operands flat. Instead it provides two streaming ports:

| word | offset | name   | access | meaning |
|------|--------|--------|--------|---------|
| 0    | `0x00` | CTRL   | W      | bit0 = 1 starts; bit1 = command: 0 modular exponentiation, 1 Montgomery product. Ignored while busy. |
|      |        |        | R      | bit1 = last command |
| 1    | `0x04` | STATUS | R      | bit0 busy, bit1 done (stays set until the next start) |
| 2    | `0x08` | SEL    | W      | bits1:0 select operand M=0, E=1, R=2, X=3; rewinds both word indices to 0 |
|      |        |        | R      | bits1:0 selection, bits11:8 write index, bits19:16 read index |
| 3    | `0x0C` | DATA   | W      | next word of the selected operand, least significant word first. Ignored while busy. |
| 4    | `0x10` | RESULT | R      | next result word, least significant first; each read advances |
| 5-15 |        |        |        | read 0, writes ignored |

There are no wait states on this window. Use 32-bit transfers: byteenable
is ignored here.

The two commands are:

- **Montgomery product** (`CTRL = 3`): `result = X * R * 2^-512 mod M`.
- **Modular exponentiation** (`CTRL = 1`): `result = X^E mod M`. For this
  command, software must load `R = 2^1024 mod M`, the constant that moves a
  number into Montgomery form. The hardware never divides, so it cannot
  compute this constant itself. Software computes it once per modulus, for
  example by doubling 1 modulo M 1024 times.

Conditions on the operands:

- M must be odd.
- X and R must be below M.
- E may be any 512-bit value. `E = 0` gives `1 mod M`.

A 1024-bit private-key operation with CRT, as the processor runs it:

```
cp = c mod p,  cq = c mod q
for (m_i, x_i, d_i) in (p, cp, dp), (q, cq, dq):
    SEL=M, 16 x DATA <- m_i
    SEL=R, 16 x DATA <- 2^1024 mod m_i
    SEL=X, 16 x DATA <- x_i
    SEL=E, 16 x DATA <- d_i
    CTRL <- 1 ; poll STATUS until done=1, busy=0
    SEL <- 0 ; 16 x read RESULT
h = qinv * (m1 - m2) mod p
plain = m2 + h * q
```

## Inside the RSA core

`rsa_core` holds four operand registers (M, E, R and X) and a result
register. It has one multiplier, `mont_mult`, which it reuses for every
step. An exponentiation is left-to-right square-and-multiply, carried out
in Montgomery form:

```
XM  = MonMult(X, R)                 X * 2^512 mod M
skip leading zero bits of E, one per cycle
A   = XM                            for the top set bit
for each later bit of E:
    A = MonMult(A, A)
    if bit: A = MonMult(A, XM)
result = MonMult(A, 1)              back to ordinary form
```

Montgomery form keeps every step free of division. Each product divides by
2^512 instead of reducing modulo M, and the final product with 1 removes the
last factor.

### The Montgomery multiplier

`mont_mult` is a radix-2, bit-serial multiplier. It uses one bit of A per
cycle, least significant first:

```
P = P + a_i * B
if P is odd: P = P + M     (P becomes even; M is odd)
P = P / 2
```

After 512 such cycles, `P = A * B * 2^-512 mod M` and `P < 2M`. One more
cycle subtracts M if needed. P needs 513 bits. The sum before halving needs
514 bits, so every cycle has two 514-bit additions in sequence. On an FPGA
that carry chain sets the clock. A faster design would use a higher radix
or carry-save adders.

### Timing

The timing counts below are exact, and the testbenches check them.

- **One product:** `done` rises N+1 clock edges after the edge that sampled
  `start`.
- **Product step inside the core:** each step takes P = N+3 cycles. That is
  one cycle to start the multiplier, N+1 cycles in it, and one cycle to take
  the result.
- **Exponentiation:** `1 + P + (N - t) + (t + 1) + (t + k) * P + P` cycles,
  from the start write to `done`. Here t is the index of the top set bit of
  E, and k is the number of set bits below it.
- **Montgomery-product command:** `1 + P` cycles.

At N = 512 the exponentiation counts come to:

| exponent                        | cycles  | at 33.33 MHz |
|---------------------------------|---------|--------------|
| random 512-bit                  | ~394k   | ~11.8 ms     |
| E = 17                          | ~4.1k   | ~0.12 ms     |
| 1024-bit CRT operation (2 runs) | ~797k   | ~23.9 ms     |

## On-chip RAM

`onchip_mem` is a 256 x 32-bit synchronous RAM. It honours byteenable, so
byte, half-word and word transfers all work. Writes take no wait state.
Reads take one: the word is fetched in the first cycle and returned in the
second. Its contents are not initialised.

## Reset and clocking

There is a single clock. All state resets asynchronously when `rst_n` is
low. The operand registers clear to 0, the result register clears to 0, and
the co-processor comes out of reset idle, with neither done nor busy set.

## How far to trust it, and where it departs from the reference system

- **Taken from the reference system:** the overall partitioning, meaning
  the processor, the co-processor with its Avalon interface and RSA core,
  and the on-chip memory and peripherals on one Avalon bus. Also the 512-bit
  co-processor width, the use of CRT for 1024-bit keys, e = 17, the address
  map, the 33.33 MHz clock and the 111 ms target.
- **Inferred:** that the co-processor works in Montgomery arithmetic, with
  operands named M, E, R and X, and a software-computed R. This comes from
  the names of the driver calls for the original co-processor: one call per
  operand, one for the output, a Montgomery-product call and an R-computation
  routine. The original co-processor's internal design is not published.
- **This design's own choices:**
  - the radix-2 multiplier and the exponentiation sequencer;
  - the register layout and its streaming data ports;
  - zero wait states on the co-processor and one read wait state on the RAM;
  - the RAM size and place in the map;
  - the UART and timer window sizes;
  - reset behaviour;
  - ignoring operand writes and starts while busy;
  - responding to unmapped addresses.
- **Not included:**
  - the Nios processor, UART, timer, external SRAM and flash. These are
    vendor or off-chip parts; their ports are on the top.
  - all the software: encryption, CRT decryption, SHA-1, the host driver
    and the host-side crypto API.
  - interrupts. The co-processor raises none, and software polls STATUS.
  - bus masters other than the processor's data master.

## Simulation

Every module starts with a comment describing its function, interface and
timing. Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<m>` and has a cycle watchdog. The expected
values come from `tb_bignum_pkg`, which uses plain shift-and-add modular
arithmetic. It never uses Montgomery reduction, so it checks the design
independently.

| testbench                    | what it covers |
|------------------------------|----------------|
| `tb_mont_mult`               | random 512-bit products and corner cases; P·2^512 ≡ A·B mod M; latency |
| `tb_rsa_core`                | N = 128: products, exponentiations with E = 0, 1, 17, all ones and random; exact cycle counts; writes while busy |
| `tb_rsa_avalon_if`           | register map, index auto-increment and rewind, busy gating, reserved offsets |
| `tb_rsa_coprocessor`         | 512-bit product, X^17, random 512-bit exponent through the bus |
| `tb_avalon_bus`              | window edges, address rebasing, wait-state pass-through, decode errors |
| `tb_onchip_mem`              | byte/half-word/word writes, one-wait-state reads |
| `tb_crypto_embedded_system`  | full system at default sizes: 1024-bit CRT decryption and signing with a fixed key, RAM and UART traffic, all peripheral ports, commands and stalls |

The testbenches share some helpers:

- `tb_av_master`, an Avalon master model;
- `tb_rsa_sw`, a model of the processor's co-processor driver;
- `tb_av_slave_model`, a stand-in for the vendor peripherals.

The system test runs in about 2 seconds. To build and run it:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/crypto_pkg.sv tb/tb_bignum_pkg.sv tb/tb_crypto_embedded_system.sv \
    --top-module tb_crypto_embedded_system
obj_dir/Vtb_crypto_embedded_system
```

To run another testbench, substitute its name. `tb_bignum_pkg.sv` is needed
only by the testbenches that import it, and listing it always is harmless.
The simulator has two logic states, so every register the design reads is
reset.

To change the key length, set `RSA_WIDTH` on the top, or `N` on the
co-processor and its parts. It must be a multiple of 32. The streaming
ports work for any such width. Beyond 512 bits, the SEL readback shows only
the low 4 bits of each word index.
