# A multi-scheme post-quantum accelerator in SystemVerilog

This design computes the arithmetic of several post-quantum schemes on one
piece of hardware: Kyber (key exchange), Dilithium and Falcon (signatures) and
the hashing that SPHINCS+ is made of. It does not give each scheme its own
datapath. It shares three resources:

* **JPAU cluster.** JPAU stands for Joint Polynomial Arithmetic Unit. There
  are eight of them. Each is a pipelined 24-bit modular ALU that can work with
  all three lattice moduli. In Kyber mode it treats each operand as two 12-bit
  coefficients.
* **KAM.** KAM stands for Keccak Acceleration Module. It is a SHAKE128/SHAKE256
  engine whose output comes out as a stream of 64-bit words.
* **Two-level controller.** The main control unit runs the high-level sequence
  of an operation. The UPCU (Unified Polynomial Control Unit) turns a short
  function code ("NTT of slot 1 into slot 4, Dilithium") into the cycle-by-cycle
  JPAU opcodes and memory addresses.

The architecture follows the published design "Designing a Scalable and
Area-Efficient Hardware Accelerator Supporting Multiple PQC Schemes". That
publication describes the JPAU and the controller split in words and one
control diagram. It does not give the KAM, the memory system or the full
scheme sequences. Everything those parts needed was designed here. The section
[Relation to the published architecture](#relation-to-the-published-architecture)
says which is which.

```
                 cmd / seed / message                     host memory port
                        |                                        |
                +---------------+  KAM op / Keccak_done  +-----------------+
                |  main_ctrl    |<--------------------->|      kam        |
                +---------------+                        | Keccak-f[1600]  |
          function code |  ^ UPCU_done                   +-----------------+
                        v  |                     buffer ready /  | 64-bit words
                +---------------+                                 |
                |     upcu      |<--------------------------------+
                +---------------+
      opcodes, addresses, mux selects  |   ^ compare result
                        v              |   |
   +------------------------------------------------------------------+
   | poly_datapath: polynomial SRAM (8 x 1024 x 24 bit, 32 ports)       |
   |   8 x jpau (2 lanes each) <- twiddle_rom, temporary product store  |
   +------------------------------------------------------------------+
```

## Number formats and moduli

| scheme     | q        | N              | packing                  |
|------------|----------|----------------|--------------------------|
| Kyber      | 3329     | 256            | two 12-bit coefficients per 24-bit operand |
| Dilithium  | 8380417  | 256            | one coefficient per operand |
| Falcon     | 12289    | 512 (`sec`=0), 1024 (otherwise) | one coefficient per operand |

The design targets the Peregrine variant of Falcon. Peregrine needs only
integer arithmetic modulo 12289.

All multiplications use Montgomery arithmetic:

* **Radix.** R = 2^24 for unpacked operands and R = 2^12 for each packed Kyber
  half.
* **One constant.** A single constant qinv = -q^-1 mod 2^24 works for both
  radices, because its low 12 bits are -q^-1 mod 2^12.
* **Products.** A coefficient-wise product (`PF_PMUL`) therefore returns
  a·b·R^-1 mod q. Callers keep one operand in Montgomery form (times R) when
  they want a plain product.
* **Twiddles.** The stored twiddle factors are already in Montgomery form, so
  the NTT produces plain results.

All package-level definitions live in `rtl/pqc_pkg.sv`: moduli, encodings,
the modular helper functions and the twiddle-table generator.

## The JPAU

`rtl/jpau.sv` has two lanes. Each lane takes operands x, y and w (24 bits) and
a 48-bit fed-back value fb. It returns r0 (48 bits), r1 (24 bits) and a
2-bit compare flag.

| op      | result |
|---------|--------|
| ADD/SUB | r0 = x ± y mod q |
| MUL     | r0 = x·y, the raw 48-bit product. In packed mode it is two 24-bit products side by side. |
| RED     | r0 = fb·R^-1 mod q. This is the Montgomery reduction of a product held outside the unit. |
| MMUL    | r0 = x·w·R^-1 mod q |
| BF_CT   | Cooley-Tukey butterfly: t = y·w·R^-1, then r0 = x + t and r1 = x − t |
| BF_GS   | Gentleman-Sande butterfly: r0 = x + y, r1 = (x − y)·w·R^-1 |
| AND     | r0 = x & y (masking random words before sampling) |
| CMP     | cmp = (x < y), taken from the borrow of x − y. Bit 0 is the low half and bit 1 the packed high half. r0 passes x through. |

The unit has three register stages:

1. multiply, or add/subtract/compare;
2. Montgomery reduction;
3. the butterfly's final add/subtract.

A new operation can enter every cycle, and results appear three cycles later.
Inputs must already be reduced below q. In packed mode every modular operation
runs on the two 12-bit halves independently, with q = 3329. That doubles the
Kyber throughput: four coefficients per JPAU per cycle instead of two.

MUL and RED are separate operations on purpose. The product leaves the JPAU,
is stored in a temporary 48-bit store next to the cluster, and comes back on
fb for reduction. This is how the published design describes its
multiplication path.

## Polynomial memory and the issue pipeline

`rtl/poly_datapath.sv` wraps the cluster, which has NJ JPAUs, NU = 2·NJ lanes
and NP = 4·NJ coefficient ports.

* **Polynomial SRAM.** This is `poly_mem`, 8 slots × 1024 coefficients of 24
  bits. Coefficient i of slot s is at address `s*1024 + i`. The SRAM has:
  * NP read ports for operand A and NP for operand B;
  * NP write ports;
  * one host read port and one host write port.
* **Lane-to-port mapping.**
  * An unpacked lane u reads A and B through ports 2u. It writes r0 through
    port 2u and r1 through port 2u+1.
  * A packed lane u reads and writes ports 2u and 2u+1, one 12-bit coefficient
    each.
* **Temporary product store.** This is a second `poly_mem`, 1024 × 48 bits
  with one port per lane. MUL writes it and RED reads it.
* **Twiddle ROM** (`twiddle_rom`). It has one registered read port per lane.
* **Operand multiplexers.**
  * x comes from the SRAM, from the KAM word (sampling) or from the JPAU's own
    output (the compare that follows an AND).
  * y comes from the SRAM or from a constant (a mask or q).
  * w comes from the ROM or from a constant. Optionally the datapath uses
    q − w, which gives inverse twiddles without a second table.

**Timing.** The UPCU issues one operation for all lanes in cycle t.

| cycle | what happens |
|-------|--------------|
| end of t | SRAM, temporary store and ROM reads are registered |
| t+1 | the JPAUs take the operands |
| t+4 | results leave the JPAUs; the write-back stores them |

The write-back uses write enables and addresses that were issued together with
the operation in cycle t, delayed four cycles inside the datapath. This lets
the UPCU describe an operation completely when it issues it.

Sampling has its own write path, `sw_*`. It writes JPAU 0's current results
without that delay.

## The UPCU: function codes instead of per-scheme state machines

`rtl/upcu.sv` accepts `start` with:

* a function code;
* the scheme and security level;
* three slot numbers.

From scheme and level it derives q, N, the packing mode, the Montgomery
constant and the base of the twiddle table. That lets a single sequence per
function serve every scheme. `done` pulses once the last write-back has
landed.

| function   | sequence | cycles (8 JPAUs) |
|------------|----------|------------------|
| `PF_ADD`, `PF_SUB` | Stream N/NU operations (N/NP when packed), then drain. | N/NU + 5 (Dilithium: 21) |
| `PF_PMUL`  | A MUL pass into the temporary store, then a RED pass back through the JPAUs. Each pass counts to N. | about twice ADD |
| `PF_NTT`   | log2(N) Cooley-Tukey layers (7 for Kyber). Each layer streams N/2/NU butterfly operations and then drains. The output is in bit-reversed order. | layers·(N/2/NU + 4) + 2 (Dilithium: 98) |
| `PF_INTT`  | Gentleman-Sande layers in reverse order with negated twiddles. It ends with one MMUL pass by R·m^-1 (m = N, or N/2 for Kyber's 7 layers). | about NTT + N/NU + 4 |
| `PF_SAMPLE`| Rejection sampling from the KAM stream (see below). | one AND and one compare round trip through the JPAU pipeline per 64-bit word |

**Drain.** Between NTT layers, and at the end of every function, the UPCU waits
for the pipeline to empty (state `U_DRAIN`). This wait is what makes the
in-place transform safe: a layer never reads a coefficient that the previous
layer has not yet written.

**Sampling** has three steps for each 64-bit word in the KAM output buffer:

1. **AND.** The word's bits 47:0 are split into two 24-bit candidates, or four
   12-bit candidates for Kyber. The candidates are masked to 23 bits
   (Dilithium), 14 bits (Falcon) or 12 bits (Kyber).
2. **COMP.** The masked values come back from the JPAU output and are compared
   with q. The compare result arrives on its own port.
3. **Write.** Accepted candidates are written in order until count = N.

Bits 63:48 of every word are thrown away.

This is a uniform sampler in the style of Dilithium's matrix expansion. It is
not bit-exact with the standard per-scheme samplers, which pack 3 bytes per
Dilithium candidate and 12 bits per Kyber candidate.

Kyber's NTT runs unpacked: two coefficients per lane, q = 3329, R = 2^24.
Packed mode is used for Kyber's coefficient-wise functions only.

## Twiddle ROM layout

The ROM holds 1920 entries, computed during elaboration from the package, so
no data file is needed. Entry k of a scheme is zeta^brv(k)·R mod q.

| region | entries | scheme | root zeta |
|--------|---------|--------|-----------|
| 0–127 | 128 | Kyber | 17 (order 256) |
| 128–383 | 256 | Dilithium | 1753 (order 512) |
| 384–895 | 512 | Falcon-512 | 49 (order 1024) |
| 896–1919 | 1024 | Falcon-1024 | 7 (order 2048) |

In each region, brv reverses the bits of k at the width of that region's table.

## The KAM

`rtl/kam.sv` is a Keccak-f[1600] core.

* **Speed.** It runs `ROUNDS_PER_CYCLE` rounds per clock (default 1: 24 cycles
  per permutation). The round constants come from the standard LFSR during
  elaboration.
* **Starting a hash.** An operation (`op_valid`, SHAKE128 or SHAKE256, a
  message of up to 64 bytes) with `op_cont = op_more = 0` pads and absorbs
  the message, then permutes.
* **Long messages.** A longer message goes in as a series of chunks of up to
  64 bytes. The first chunk has `op_cont = 0`, the following ones
  `op_cont = 1`. Every chunk except the last has `op_more = 1`. Each chunk is
  XOR-ed into the state at the current byte position. When a chunk fills the
  rate (168 bytes for SHAKE128, 136 for SHAKE256) the core permutes, and
  `op_ready` is low meanwhile. A chunk must not run past the end of a rate
  block; split it there instead. A message that ends exactly at a block end
  is closed with an empty last chunk (`msg_len = 0`, `op_more = 0`).
* **Output.** `done` (Keccak_done) pulses when the first output block is
  ready. From then on `buf_valid` (buffer ready) and `buf_data` present one
  64-bit lane at a time, and `buf_pop` consumes it.
* **Re-permutation.** After the last lane of the rate (21 lanes for SHAKE128,
  17 for SHAKE256) the core permutes again by itself. The output stream
  therefore never ends.
* **Busy.** `op_ready` is low only while a permutation runs.

The published design has three KAM sizes (Small, Large, FP) and uses the
fastest. It does not describe their structure. `ROUNDS_PER_CYCLE` is this
design's stand-in for that choice.

## Main control and the two signing openings

`rtl/main_ctrl.sv` accepts four commands:

| `cmd` | meaning |
|-------|---------|
| 0 | Run one UPCU function on the given slots. |
| 1 | Run one KAM operation on the host's message. The host then pops the output through `kam_host_pop`. For a long message, send one cmd 1 per chunk with `msg_cont`/`msg_more` set as for the KAM's `op_cont`/`op_more`; a chunk with more to follow finishes as soon as the KAM accepts it. |
| 2 | Opening of Dilithium signing. |
| 3 | Opening of Falcon signing. |

The Dilithium opening (command 2) has these steps:

1. SHAKE256 of the 32-byte seed.
2. Keep the first 32 output bytes as rho.
3. Matrix expansion: SHAKE128(rho ‖ 0x0000) sampled by the UPCU into slot 0.
   The step ends only when both UPCU_done and Keccak_done have been seen.
4. NTT of s1 (slot 1 → 4) and of s2 (slot 2 → 5).
5. NTT of t0 (slot 3 → 6).

The Falcon opening (command 3) has these steps:

1. SHAKE256 of the seed.
2. Keep 32 output bytes on `rnd_out`.
3. Product of slot 1 and slot 2 into slot 4.
4. Product of slot 4 and slot 3 into slot 5.
5. NTT of slot 5 into slot 6.

These are the state sequences the published control diagram shows. The diagram
shows only their beginnings, so the rest of each scheme's operation is not
implemented. A host, or a future extension of `main_ctrl`, builds the
remaining steps from commands 0 and 1.

## Using the top level

`rtl/pqc_top.sv` has three parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `NJ` | 8 | number of JPAUs |
| `ROUNDS_PER_CYCLE` | 1 | Keccak rounds per clock |
| `MSG_MAX` | 64 | longest message in bytes |

A typical sequence:

1. **Load.** Write polynomials through `host_mem_we/waddr/wdata`. The address
   is slot·1024 + index. Write values already reduced mod q, one coefficient
   per address, with Kyber values below 3329.
2. **Start a command.** Wait for `cmd_ready`. Drive `cmd`, `scheme`, `sec`,
   `pfunc`, the slots and, where needed, `kop`/`msg`/`msg_len`/`msg_cont`/`msg_more`
   or `seed`. Pulse
   `cmd_valid` for one cycle.
3. **Wait** for the one-cycle `cmd_done` pulse.
4. **Read results** with `host_mem_raddr`. The data appears on
   `host_mem_rdata` one clock later.

Use the host memory port only while no command runs.

The `mon_*` outputs pulse for one cycle on each packed issue, each reduction
of a fed-back product, each butterfly issue, each constant multiply (the
INTT scaling), each cycle the UPCU spends draining the pipeline, and when the
Dilithium matrix expansion completes on UPC_done & Keccak_done. They are meant
for performance counters and tests, and can be left open.

Encodings (`pqc_pkg`):

* **scheme:** 0 Kyber, 1 Dilithium, 2 Falcon, 3 SPHINCS+
* **function:** 1 SAMPLE, 2 PMUL, 3 NTT, 4 INTT, 5 ADD, 6 SUB
* **KAM operation:** 0 SHAKE128, 1 SHAKE256

## Simulation

Each testbench checks itself and prints
`TB_RESULT checks=<n> failures=<n>`. Each has a watchdog. With Verilator 5,
for example:

```
verilator --binary --timing -Wno-fatal rtl/pqc_pkg.sv rtl/jpau.sv rtl/poly_mem.sv \
  rtl/twiddle_rom.sv rtl/poly_datapath.sv rtl/kam.sv rtl/upcu.sv rtl/main_ctrl.sv \
  rtl/pqc_top.sv tb/tb_pqc_top.sv --top-module tb_pqc_top -o sim
./obj_dir/sim
```

| testbench | what it checks |
|-----------|----------------|
| `tb_jpau` | 3000 random operations of every opcode for all three moduli, packed and unpacked, against integer models; the 3-cycle latency |
| `tb_twiddle_rom` | every entry, and that each root has the right order |
| `tb_poly_mem` | random multi-port reads and writes against an array model |
| `tb_poly_datapath` | ADD, CT butterfly with ROM twiddles, MUL→store→RED, MMUL with negated constant, packed Kyber ADD, AND and CMP, all driven directly; result timing |
| `tb_kam` | known SHAKE128/256 digests of the empty string; random messages against a separate Keccak model across three output blocks; chunked messages up to 400 bytes; latency at 1 and 4 rounds per cycle |
| `tb_upcu` | every function for Dilithium, Kyber and Falcon-512/1024 on the real datapath, against textbook NTT and sampling models; cycle counts |
| `tb_main_ctrl` | request order and contents of all four commands, with modelled KAM and UPCU |
| `tb_pqc_top` | end to end at the default size (see below) |
| `tb_workloads` | the polynomial and hash kernels of each parameter set at full size, with cycle counts (see below) |

`tb_pqc_top` uses only the top-level ports, at the default size. It runs:

* the Dilithium opening, checking the sampled matrix polynomial and the three
  NTTs against a software SHAKE and NTT;
* the Falcon-512 opening, checking the random value, both products and the NTT;
* Kyber packed ADD and PMUL and an NTT/INTT round trip;
* a direct SHAKE128 with host pops, followed by Falcon sampling from the same
  stream;
* a 150-byte SHAKE256 message sent as four chunks, checked on its first 20
  output lanes.

It also counts the internal mechanisms: packed issues, sampling rejections, KAM
re-permutations, pipeline drains, the UPCU_done & Keccak_done join, product
feedback, butterflies and INTT scaling. It reports a failure for any mechanism
that never occurred.

`tb_workloads` runs the kernels of each parameter set through the top level:

* the Dilithium matrix-vector row: NTT, pointwise product and accumulation,
  then inverse NTT;
* Falcon's verification product s2·h;
* the Kyber vector transforms;
* a SPHINCS+-256s WOTS+ hash chain: 15 calls of SHAKE256 over a 96-byte
  input (public seed, address, 32-byte value), each sent as two KAM chunks,
  with the 32-byte output fed into the next call.

It checks each polynomial result against a schoolbook negacyclic product, and
each hash against a Keccak model, and prints the cycle counts. The counts are at 8 JPAUs and include host-side command
handshakes, not the time to load data.

| kernel | cycles |
|--------|--------|
| Dilithium2/3/5, one row of A·y (l = 4/5/7) | 1188 / 1455 / 1989 |
| Falcon-512/1024, s2·h | 664 / 1300 |
| Kyber512/768/1024, NTT + INTT + ADD of k polynomials | 422 / 633 / 844 |
| SPHINCS+-256s, WOTS+ chain of 15 hash calls | 540 |

## Size

Yosys coarse synthesis of `pqc_top` at the default size gives:

* about 10,000 cells, of which about 5,500 are the KAM (most of them the
  byte-position XOR of the chunked absorb);
* 8,453 flip-flop bits;
* about 1.03 Mbit of memory arrays, all counted as memory cells.

The memory is the polynomial SRAM (196,608 bits), the temporary store (49,152
bits) and the twiddle ROM. Synthesis counts the ROM once per read port, which
accounts for the rest. A real implementation would use SRAM macros and a
shared or banked ROM. The multi-port SRAM model is an idealisation: 65 read
ports and 33 write ports.

## Relation to the published architecture

**Taken from the publication:**

* the three-part split (KAM, JPAU cluster, control unit with a separate UPCU);
* a 24-bit JPAU datapath that does two coefficients, or four Kyber
  coefficients, per unit and cycle;
* the external temporary register for products, fed back for reduction;
* compare by subtraction, with its own output port;
* the per-scheme twiddle ROM;
* full pipelining;
* eight JPAUs in the largest configuration;
* the function-code interface between main control and UPCU, and the UPCU
  adapting N to scheme and level;
* the signal names and the opening states of the Dilithium and Falcon signing
  sequences in the control diagram.

**Designed here:**

* the JPAU opcode set and its three-stage split;
* Montgomery constants;
* the memory organisation: slots, ports and the host port;
* the issue/write-back timing;
* the twiddle table layout;
* everything inside the KAM;
* the sampler's bit layout and masks;
* the command interface.

**Not implemented:**

* the complete key generation, encapsulation, signing and verification
  sequences of all four schemes;
* Kyber's NTT-domain base multiplication and a packed Kyber NTT;
* SPHINCS+ itself (its hash trees would use the chunked KAM input);
* the different KAM sizes;
* masking or other side-channel protection.

The SRAM holds eight polynomials, which is fewer than full-size Dilithium or
Kyber parameter sets keep live at once. Running whole schemes would need a
larger or banked memory, or generating the matrix on the fly.
