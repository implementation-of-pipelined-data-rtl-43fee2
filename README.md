# Pipelined DES on a 16-bit ISA card

DES encrypts a 64-bit block in sixteen identical rounds. The cheapest circuit
builds one round and uses it sixteen times. That takes 16 round times per
block and holds only one block at a time. A fully unrolled pipeline of sixteen
rounds takes a new block every round time, but needs sixteen copies of the
round logic.

This design sits between the two. It builds **four** round circuits and joins
them in a **ring**. Four blocks are loaded one after another. Each block then
goes round the ring four times, and all four are worked on at once. The first
block is finished after 16 round times and the other three follow one round
time apart. Four encryptions therefore take 16 + 3 = 19 round times, not 64.

The card sits on a PC's 16-bit ISA bus. Blocks, the key and results cross the
bus as four 16-bit words each. A small control unit fills the ring, lets it run
and hands out the results.

```
 ISA bus ──► isa_bus_if ──► data regs (4×16) ──► IP ──►┐
                       └──► key regs  (4×16) ──► key schedule (K0..K15, wired)
                                                       ▼
                          ┌──────────────────────► feedback mux ──┬──► swap, IP⁻¹ ──► output logic ──► ISA bus
                          │                                       ▼
                          │                         segment 1: register ─► round
                          │                         segment 2: register ─► round
                          │                         segment 3: register ─► round
                          └──────────────────────── segment 4: register ─► round
                                  control unit: load / advance / capture
```

## How a batch moves through the ring

Each *segment* is a 64-bit register followed by one combinational DES round
(`des_segment`). One `advance` moves every block one segment on. In the same
clock, the word that leaves segment 4 returns through the mux to segment 1.
One advance is one clock and one round time.

The control unit (`des_control`) works in four phases:

| phase | what happens | advances |
|---|---|---|
| fill | each time the host has written a full block, that block enters segment 1 and the ring advances once. Between blocks the ring **stalls** while it waits for the host. | 1–4 |
| run | the ring advances every clock and each block is fed back to segment 1 after segment 4 | 5–16 |
| output | after advance 16 the first block has finished round 16 and is at the mux output. It goes into the output logic and the ring **holds** until the host has read it. Then one more advance brings the next finished block. | 17, 18, 19 |
| end | after the fourth result the counters clear and a new batch can start | – |

Here is where the blocks are, by the round each will do next (A is loaded
first). "A4" means block A is in this segment's register and is about to do
round 4, counting from 0.

| after advance | seg 1 | seg 2 | seg 3 | seg 4 | result at mux output |
|---|---|---|---|---|---|
| 1 | A0 | – | – | – | |
| 4 | D0 | C1 | B2 | A3 | |
| 5 | A4 | D1 | C2 | B3 | |
| 16 | D12 | C13 | B14 | A15 | A (16 rounds done) |
| 17 | A16 | D13 | C14 | B15 | B |
| 18 | B16 | A17 | D14 | C15 | C |
| 19 | C16 | B17 | A18 | D15 | D |

A batch always holds `SEGMENTS` blocks. The timing above assumes the host keeps
up. If the host is slow, only the fill and output phases get longer. The run
phase always takes exactly 16 − `SEGMENTS` clocks.

## Round keys in a ring (the subtle part)

In an unrolled pipeline every stage has a fixed round key. In the ring, segment
*s* sees rounds *s*, *s*+4, *s*+8 and *s*+12. Because of the stalls, the four
blocks in the ring are not all on the same pass. So each block carries a
**5-bit round number and a valid bit** with its L and R halves, which makes a
70-bit `pipe_word_t`. Each segment increments the round number on the way out.

The segment forms the key index from the upper bits of that number, with its own
segment number in the lower bits. As a result each segment really only chooses
among 16/`SEGMENTS` keys, and synthesis can shrink the key mux to that size.
For decryption the index becomes 15 − index, so K15 is used in round 1, and the
data path is the same. An assertion in `des_segment` checks that a valid block
in a segment is always on one of that segment's own rounds. An assertion in
`des_control` checks that the control unit's step counter agrees with the round
number of the block it captures.

The key schedule (`des_key_schedule`) wires all sixteen round keys from the key
register at the same time (PC-1, cumulative rotations, PC-2). It has no state,
so the key must not be written while a batch is in progress.

IP is applied once, as a block enters. The swap of the final halves and IP⁻¹
are applied once, at the result tap on the mux output. Neither sits inside the
loop.

## Throughput, and where the time really goes

Round times are counted as ring advances. The testbench `tb_des_configs`
measures them for each configuration:

| configuration | `SEGMENTS` | 4 blocks | 16 blocks |
|---|---|---|---|
| iterative (one round circuit) | 1 | 64 | 256 (16 per block) |
| **this design** | **4** | **19** | 76 (four batches) |
| fully unrolled | 16 | – | 31 |

These numbers count only the DES core. Each block also needs four bus writes,
four bus reads and some status polls. At ISA speeds those transfers take much
longer than the 19 clocks of DES work, so in a real system the bus limits
throughput. A wider host interface would be the next step.

## Host interface

`isa_bus_if` decodes a 32-byte I/O window at `BASE_ADDR` (default 0x300). The
window holds sixteen 16-bit registers at even addresses, and SA[4:1] selects
the register. The card pulls IOCS16# low for the whole window, so the host
makes 16-bit transfers. Write cycles to the window are ignored while AEN is high.

| index | address | write | read |
|---|---|---|---|
| 0–3 | base+0..6 | input block, word 0 = bits 63:48; writing word 3 completes the block | result, word 0 = bits 63:48; reading word 3 releases the result |
| 4–7 | base+8..14 | key, word 0 = bits 63:48 (the parity bits are ignored) | 0 |
| 8 | base+16 | bit 0: 1 = decrypt, 0 = encrypt | status word |

Status word: bit 0 `in_ready` (input registers may be written), bit 1
`out_valid` (a result is waiting), bit 2 mode of the current batch, bit 3
`busy`, bit 4 `key_valid` (the last key word has been written since reset), bits
12:8 the number of ring advances in the current batch. When a result is waiting,
bits 12:8 read 16, 17, 18 or 19.

To run a batch, the host:

1. writes the key (indexes 4–7) and the mode (index 8);
2. for each of the four blocks, waits for `in_ready` and writes words 0–3;
3. for each of the four results, in input order, waits for `out_valid` and reads
   words 0–3.

The mode is sampled when the first block of a batch enters, and it holds until
the batch ends.

Bus timing: IOW#, IOR#, SA and SD pass through two synchroniser flip-flops. A
write takes effect on the rising edge of IOW# after synchronisation, using the
address and data sampled one clock earlier. So write data must be stable for
three clocks before IOW# rises. Reads are not clocked. The SD drivers are
enabled from the pins (window selected and IOR# low) and show the addressed
register. The data bus is brought out as `isa_sd_in`, `isa_sd_out` and
`isa_sd_oe`. Join them with a tri-state buffer at the pads. `rst_n` is meant to
come from the inverted ISA RESET DRV line. Every register resets asynchronously.

## Files

| file | contents |
|---|---|
| `rtl/des_pkg.sv` | types (`des_state_t`, `pipe_word_t`), register map, status bits, DES tables and permutation helpers |
| `rtl/des_isa_top.sv` | the card: bus interface, registers, key schedule, ring, output logic, control, read-back mux |
| `rtl/des_pipeline.sv` | IP, feedback mux, `SEGMENTS` segments, swap and IP⁻¹ |
| `rtl/des_segment.sv` | segment register and round, key selection |
| `rtl/des_round.sv`, `rtl/des_f.sv` | one Feistel round; the function F (E, key XOR, S-boxes, P) |
| `rtl/des_key_schedule.sv` | all sixteen round keys |
| `rtl/des_ip_perm.sv` | IP, or IP⁻¹ with `INVERSE = 1` |
| `rtl/des_feedback_mux.sv` | new block or fed-back word into segment 1 |
| `rtl/des_word_regs.sv` | 4 × 16-bit registers; used for both the data and the key |
| `rtl/des_output_logic.sv` | result holding register and 16-bit word select |
| `rtl/isa_bus_if.sv` | ISA I/O slave |
| `rtl/des_control.sv` | control unit |

The DES tables are printed in the same order as in FIPS 46: entry *j* names the
input bit, counted from 1 at the MSB, that becomes output bit *j*+1. The
S-boxes are indexed by row (b1 b6) × 16 + column (b2..b5).

### Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `SEGMENTS` | 4 | top, pipeline, control | round circuits in the ring; 1, 2, 4, 8 or 16 |
| `BASE_ADDR` | 10'h300 | top, bus interface | I/O base, aligned to 32 bytes |
| `WORDS`, `WORD_W` | 4, 16 | word and output registers | bus words per 64-bit block |

With the default settings, generic synthesis gives about 563 flip-flops. It
also gives thirty-two 64 × 4 S-box tables: eight per round circuit. Those are
8,192 table bits if they are mapped to ROM.

## Simulating

The testbenches are self-checking. Each one prints one
`TB_RESULT checks=N failures=M` line and stops itself. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/des_pkg.sv tb/des_ref_pkg.sv tb/tb_des_isa_top.sv --top-module tb_des_isa_top
./obj_dir/Vtb_des_isa_top
```

Substitute any other `tb/tb_*.sv`. The ones that do not use the reference model
do not need `tb/des_ref_pkg.sv`.

| testbench | what it shows |
|---|---|
| `tb_des_isa_top` | the whole card at its default size, through ISA cycles only. It runs eight batches with two keys, alternating encryption and decryption; decryption restores the plaintexts. It includes the FIPS worked example (key 133457799BBCDFF1, plaintext 0123456789ABCDEF, ciphertext 85E813540F0AB405). It checks that results leave at steps 16–19, that there are 19 advances per batch, that the ring runs without pause once it is full, and that the last load is followed by the first result 13 clocks later. It requires at least one fill stall, feedback reload, output stall, mode switch and key change. |
| `tb_des_configs` | 1, 4 and 16 segments on 4 and 16 blocks; checks the round times in the throughput table and every result |
| `tb_des_pipeline` | the ring driven directly, with random stalls; results after exactly 16..19 advances |
| `tb_des_control` | the control unit against a model of its surroundings |
| `tb_isa_bus_if` | write strobes, read driver enable, address decode, AEN, IOCS16# |
| `tb_des_segment`, `tb_des_round`, `tb_des_f`, `tb_des_key_schedule`, `tb_des_ip_perm`, `tb_des_feedback_mux`, `tb_des_word_regs`, `tb_des_output_logic` | each unit against the standard's worked example and against the reference model, on random data |

`tb/des_ref_pkg.sv` is a bit-serial DES reference written independently of the
RTL's structure. It shares the tables with the RTL, and the known-answer
vectors check those tables. `tb/isa_host.sv` models the PC side of the bus.
`tb/des_card_run.sv` runs batches on a card of any size.

## What is specified and what is chosen here

The following parts come from the architecture this design implements:

- the four-segment ring with feedback from segment 4 to segment 1;
- four blocks loaded during the first four steps and results at steps 16 to 19;
- the 4 × 16-bit input registers, the 16-bit output logic and the mux;
- the control flow (load, process, count, full?, finished?, reload, output);
- decryption by reversing the key order.

The DES internals (IP, E, S-boxes, P, key schedule) follow FIPS 46.

The following are choices made for this RTL:

- the register map, status word and polling handshake;
- word order (word 0 = most significant);
- the key registers and the key schedule wired in parallel from them;
- the round number and valid bit that travel with each block;
- holding the ring while the host reads each result;
- the mode being latched per batch;
- batches always being full;
- the ISA synchronisers, strobe edges and IOCS16#;
- asynchronous reset.

The original block diagram also draws a line from the last segment up to the
fourth input register, and nothing explains what it is for. It is not built
here. Results reach the bus only through the output logic.

Not covered: no interrupt to the host, no DMA, no partial batches, and no check
of the key parity bits. The design has been simulated, and it has been checked
with Verilator lint and a synthesis front end, but it has not been mapped to a
particular FPGA.
