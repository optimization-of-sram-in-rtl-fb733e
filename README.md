# LPSR SRAM 64Kx32: a self-repairing, low-power embedded SRAM

Large embedded memories lower the yield of a chip: one bad bit makes the whole
memory, and the chip, useless. This design adds a handful of spare words to a
64K x 32 SRAM. A built-in self test (BIST) finds the bad words. Their addresses
go into *redundant address registers* (RAR), and from then on every access to
such an address is served by a matching *redundant data register* (RDR)
instead of the SRAM. The repair can be burnt into on-chip electrical fuses
(e-fuses), so each power-on restores it without a new test. To save power, the
memory is split into power domains that are switched per operation mode. AND
isolation gates hold low every line that comes out of a switched-off domain.

The structure follows a published low-power self-repair SRAM for a 28 nm SoC.
That source gives the structure: the blocks, the signal names of the
redundancy logic and the e-fuse box, and the table of power states per mode.
It does not give timing, encodings, the test algorithm or the number of spare
words. Those are this design's own choices, collected in
[Choices and departures](#choices-and-departures).

## Block map

```
                    address / csb / rwb / data_in / wib  (mission pins)
                                    |
  mode pins --> test_ctrl --mode--> power_ctrl --pwr--> isolation enables
                 |  fuse_read, rar_load, mbist_start
                 v
            mbist_ctrl --(req)--+--> request select --+--> sram_64kx32 (8 x sram_bank) --iso--+
              ^   | fail,       |     (BIST in mbist  |                                        |
              |   | expected    |      modes, pins    +--> redundancy_logic                    |
              |   +--iso--------+------otherwise)           hold regs, rar, rar_compare,       |
              |                                             rdr_write, rdr, rdr_read           |
              |                                                  | rar_match, rdr_val_out       |
              |                                                  v                              |
              +------------------------------------------- sr_out_mux <-------------------------+
                                                                 |
                                                               iso --> data_out
            efuse_box  <-- rar_val_out (fuse_val_i)   fuse_val_o --> rar_val_in
              efuse_csm, efuse_pointer, blow_accel, efc_subiso, efuse_array
```

| Module | Role |
|---|---|
| `lpsr_sram64kx32` | Top: wires everything below. |
| `lpsr_pkg` | Sizes, `mem_req_t` request struct, `op_mode_t`, `pwr_t`. |
| `sram_64kx32`, `sram_bank` | The 64K x 32 array as 8 banks of 8K x 32. |
| `redundancy_logic` | Hold registers plus the five sub-blocks `rar`, `rar_compare`, `rdr`, `rdr_write`, `rdr_read`; it also drives `nogo`. |
| `sr_out_mux` | Picks the RDR word or the SRAM word for `data_out`. |
| `efuse_box` | Fuse storage: `efuse_csm` (control state machine), `efuse_pointer` (one-hot pointer register), `blow_accel` (skips fuses that stay intact), `efc_subiso` (strobe isolation), `efuse_array` (cell model). |
| `mbist_ctrl` | March C- BIST with debug and repair modes. |
| `test_ctrl` | Decodes the mode pins and runs the power-on fuse sequence. |
| `power_ctrl` | Mode-to-power-domain table. |
| `iso_and` | AND isolation gates. |

`efuse_array` is a behavioural model, because a fuse cell is a process
element and not logic. Everything else is synthesizable.

## How a faulty word is bypassed

This is the part that needs the most care. The redundancy logic sits beside
the SRAM and sees the same request. Both register it on the same rising edge:

```
 clock edge        n                          n+1
 request in        A (read)                   next request
 SRAM              latches A, q = mem[A] ---> valid in cycle n..n+1
 hold registers    hold_addr = A ----------->  compared with all RARs in cycle n..n+1
 data_out          sr_out_mux: rar_match ? RDR[entry] : q     (valid after edge n)
```

During the cycle after the edge, `hold_addr` is the address whose data is on
`data_out`. `rar_compare` matches it against every valid RAR entry in
parallel. `rar_match` then steers the output multiplexer, and `rdr_read`
supplies the word of the matching entry.

Writes go to both places. The SRAM writes the (possibly bad) cell. In the next
cycle, a held write whose address matches a RAR also writes the RDR word,
under the same active-low bit mask `wib`. So a later read finds the correct
data in the RDR.

**Repair on the fly.** In repair mode the BIST compares each read word in the
cycle it appears on `data_out`. On a mismatch it raises `fail` and puts the
correct word on `expected_val`. At the next edge the redundancy logic does
three things:

- It stores `hold_addr`, the failing address, in the RAR entry that
  `rar_pointer` names (entries fill from 0 upwards).
- It writes `expected_val` into that entry's RDR.
- It advances the pointer.

The very next operation of the march is usually a write to the same address.
That write already lands in the RDR. Every later read of the word passes, so a
stuck cell raises `mbist_fail` exactly once in repair mode. In debug mode
nothing is stored, and a stuck-at-0 cell is reported twice by March C-, a
stuck-at-1 cell three times.

If `fail` arrives while all `NUM_RAR` entries are used, the flop `nogo` is set
and stays set until `res_n`. The memory is then not repairable, and the
condition shows on `mbist_nogo`.

## Operation modes and power domains

`test_ctrl` decodes the pins in this order:

1. `power_down` gives power down mode.
2. `scan_test_en` alone gives scan mode.
3. `mbist_test_en` alone, with `mem_sel == MEM_ID`, gives an mbist mode:
   `mbist_debug` = 1 selects debug mode, 0 selects repair mode.
4. Anything else gives mission mode. This includes the SoC's other test
   enables, which arrive through `other_test_en`.

`power_ctrl` then applies this table (1 = powered):

| mode | BIST | SRAM + RDR | RAR | e-fuse | surrounding logic |
|---|---|---|---|---|---|
| scan | 1 | 1 | 1 | 1 | 1 |
| mbist debug | 1 | 1 | 1 | 1 | 1 |
| mbist repair | 1 | 1 | 1 | 0 | 1 |
| mission | 0 | 1 | 1 | 0 | 1 |
| power down | 0 | 0 | 1 | 0 | 0 |

The e-fuse domain is also powered while a sense or program sequence runs
(`fuse_busy`). The RARs are never switched off, so a repair survives power
down. RTL cannot switch power, so the domains act in the RTL as follows:

- **Power-domain outputs.** `pwr` is a top-level output, ready to drive real
  power switches.
- **Isolation.** `iso_and` gates sit on every output of a switched-off domain:
  the SRAM data, the BIST request, `fail` and `expected_val`, `data_out`, and
  the fuse strobes and outputs.
- **Resets.** The BIST is held in reset while its domain is off.
- **SRAM access.** The SRAM takes no access while its domain is off. Loss of
  the SRAM's contents is not modelled.

## The e-fuse box

There is one fuse per RAR bit: `N_FUSE = NUM_RAR * (ADDR_W + 1) = 68`. Entry
`k` of the RARs is held in fuses `k*17 .. k*17+16`, with the valid bit on top.
A one-hot pointer walks the cells, and the control state machine runs two
sequences:

- **Sense** (`fuse_read`) strobes one cell per clock. With the start clock it
  takes `N_FUSE + 1` clocks. After reset, `test_ctrl` runs a sense, waits for
  `ready_out`, and then loads the RARs in one clock. `init_done` rises
  `N_FUSE + 3` clocks after reset. Only then may the memory be used; until
  then the mode is held at mission.
- **Program** (`fuse_prgm`, with `fuse_val_i = rar_val_out`) holds the program
  strobe for `PRGM_CYCLES` clocks on every fuse to be blown. The blow
  acceleration logic steps over every other fuse in one clock. Total time:
  `N_FUSE + (PRGM_CYCLES - 1) * (number of 1 bits)` clocks.

`ready_out` stays high from the end of a sequence until the next command. A
sequence starts only while `ready_in` is high, so several boxes can be
chained; the top ties it high. When `efc_isolate` is high, all strobes and
`fuse_val_o` are forced low.

The cell model treats a cell as blown once it has received any pulse with
`fss` high. A margin read (`efc_test_margin`) sees a cell as blown only after
the full `PRGM_CYCLES` pulse.

## The BIST

`mbist_ctrl` runs March C- over all 65536 words with solid all-0 and all-1
data, one operation per clock:
`up(w0) up(r0,w1) up(r1,w0) down(r0,w1) down(r1,w0) up(r0)`.

A run takes 10 x 65536 operations. `done` rises at the 655 361st clock edge
after the start pulse. `mbist_fail` is high for one clock per miscompare, and
`mbist_fail_count` counts miscompares until the next start, and
`mbist_fail_addr` names the word that failed. The BIST starts by itself
whenever an mbist mode is entered.

## Top-level interface

All signals are synchronous to `clk`. It is also the e-fuse clock and the BIST
clock.

| Signal | Dir | Meaning |
|---|---|---|
| `res_n` | in | Active-low reset of the logic and the e-fuse box; it starts the power-on fuse sense. |
| `rar_nset` | in | Active-low asynchronous clear of the RARs. It is separate from `res_n` because the RARs stay powered. |
| `mbist_nrst` | in | Active-low BIST reset. |
| `power_down`, `scan_test_en`, `mbist_test_en`, `other_test_en`, `mbist_debug`, `mem_sel[4:0]` | in | Mode pins. |
| `csb`, `rwb`, `address[15:0]`, `data_in[31:0]`, `wib[31:0]` | in | Mission access. `csb` is active low. `rwb` = 1 reads. `wib` bit = 0 writes that bit. |
| `data_out[31:0]` | out | Read data, one clock after the read. |
| `rar_match` | out | The word now on `data_out` comes from a redundant register. |
| `init_done`, `mode`, `pwr` | out | Status. |
| `mbist_fail`, `mbist_nogo`, `mbist_done`, `mbist_fail_count` | out | BIST results. |
| `mbist_fail_addr[15:0]` | out | Address of the failing word while `mbist_fail` is high. Debug mode reports faults this way. |
| `fuse_prgm`, `fss`, `efc_test_margin`, `tm` | in | Fuse programming, programming supply, margin read, test mode. |
| `fuse_ready` | out | Fuse sequence finished. |
| `rar_val_out[67:0]` | out | RAR contents, for analysis and for programming. |

## Parameters

| Name | Value | Origin |
|---|---|---|
| `ADDR_W`, `DATA_W` | 16, 32 | From the memory size, 64K x 32. |
| `NUM_BANKS` | 8 | The memory is described as made of 8 blocks; read here as 8 banks of 8K x 32. |
| `NUM_RAR` | 4 | Own choice. In the original, the number of spares comes from a yield calculation that is not published. |
| `N_FUSE` | 68 | Derived: one fuse per RAR bit. |
| `PRGM_CYCLES` | 4 | Own choice. |
| `MEM_ID` (`test_ctrl`) | 0 | Own choice: the `mem_sel` code of this memory. |

The shared values live in `lpsr_pkg`. The leaf modules also take them as
parameters and can be tested at other sizes.

## Choices and departures

- **Spare words.** `NUM_RAR` = 4. The source shows a repair of two words and
  gives no count.
- **BIST algorithm.** The source only speaks of "the mbist algorithms". This
  design uses March C- with solid data backgrounds.
- **Pin polarity.** The polarity of `csb`, `rwb` and `wib` is this design's
  choice, as is reading `wib` as a per-bit write mask.
- **Fail timing.** `fail` is compared in the same cycle as the read data.
  `nogo` is sticky until `res_n`.
- **`rar_nset`.** The name appears in the source's test waveforms without
  explanation. Here it is the RAR clear.
- **`f_addr`.** It is an output of the redundancy logic with no stated
  meaning. Here it is the number of the matching entry.
- **`TM`.** The test-mode pin of the RDR and of the e-fuse box has no stated
  function. It is brought out as `tm` and not used.
- **`ready_in`.** Treated as a chain input.
- **Power sequencing.** Sensing fuses at power-on and programming them are not
  modes of the power table. Here the e-fuse domain is on while either runs.
- **Scan.** Scan mode is decoded and powers every domain. The scan chains
  themselves are inserted by DFT tools and are not part of this RTL.
- **Out of scope.** Circuit-level details are not modelled: the transistor
  structure of the isolation AND cell, fuse physics, and loss of SRAM
  contents in power down. The same holds for the SoC the memory sits in.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog.
`tb_lpsr_sram64kx32` runs the top at its default size and takes the memory
through its whole life:

1. Power-on sense.
2. Mission accesses.
3. Scan-mode power check.
4. Debug run with two stuck-at-0 cells: 4 fail pulses, nothing repaired.
5. Repair run: `mbist_fail` pulses twice and `mbist_nogo` stays low.
6. Mission reads of the repaired words through the RDRs.
7. Fuse programming, with the exact clock count checked.
8. Power down: `data_out` isolated, RARs kept.
9. New power-on: the repair is reloaded from the fuses.
10. Five faults with four spares: `mbist_nogo`.

The test counts each of these mechanisms and fails if one never happened.
Faults are injected by writing into the bank arrays from the testbench after
every clock. It runs in about ten seconds.

`tb_workload_wafer_sort` runs the production sorting flow on eight memories,
each with 0 to 5 faulty words. A debug run sorts each memory as good or bad. A
repair run then sorts it as repaired or not repairable. The testbench predicts
every class and every fail count, then checks the repaired words in mission
mode. It takes about half a minute.

Concurrent assertions guard the internal rules. The pointer is one-hot, and
the fuse state machine never senses and programs at once. `nogo` stays set
once it is set, and a repaired address is never stored twice. Run with
`--assert` to check them.

Run a testbench with plain Verilator from the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
    rtl/lpsr_pkg.sv tb/tb_lpsr_sram64kx32.sv --top-module tb_lpsr_sram64kx32 -o sim
./obj_dir/sim
```

Replace the file and top name to run another testbench. Testbenches that use
package types need `rtl/lpsr_pkg.sv` first on the command line, as shown.
