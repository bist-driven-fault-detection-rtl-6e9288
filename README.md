# Microcode memory BIST with self-repair and a successive-read guard

An embedded SRAM that tests itself, repairs itself and protects itself from one
type of latent defect:

* **Test.** A small microcode engine runs the March SS algorithm over the
  memory. March SS applies 22 operations to every address, so the test length
  is 22n. It detects all realistic simple static faults and some dynamic ones.
  The algorithm is a table of 7-bit microcode words, so another March test
  needs only a different table.
* **Repair.** Every address that fails a read gets a redundant word in a small
  redundant logic array. That word holds a fault flag, the faulty address and
  the data the word should contain. After the test the memory goes into normal
  operation. Accesses to repaired addresses are then served by the redundant
  words, and all other accesses by the RAM.
* **Reliability.** A reliability enhancement circuit (REC) sits in front of the
  RAM. It suppresses a read of the same address as the read in the cycle
  before. The RAM's output register still holds that word, so the data is
  unchanged. A cell with a small resistive-open defect is then never read
  back to back, which is the access pattern that would corrupt it.

The design follows the architecture of the paper "BIST-Driven Fault Detection and
Reliability Assessment in Memory Systems" (Harika M., B. Rajasekhar). It keeps
that paper's block structure and its names, microcode format and March SS
program, redundant word and REC. The cycle-level timing, several encodings and
the defect-injection hooks are this design's own choices. See
[Departures and choices](#departures-and-choices).

Default size: a 16-word x 1-bit memory, 32 redundant words and a 32-word
instruction store.

## Block diagram

```
            InstOp[5:3], Over
        +-----------------------------+
        v                             |
 inst_ptr --InstAddr--> inst_storage --Inst--> inst_reg --+-- I/D --> addr_gen --Address--+
                                                          +-- data -> data_gen --Data-----+
                                                          +-- R/W --> rw_control -Rd/Wr---+
                                                                                          v
 AddrIn/DataIn/REna/WEna ---------------------------------------------------------> ip_mux
                                                                                          |
                                                                 rec (srd + CEN gate) <---+
                                                                        |
                                                                        v
                                        fault_diag <-- MemOut ------ sram
                                             | fault pulse,            |
                                             | address, correct data   |
                                             v                         v
 normal address/data --------------------> rl_array --RL data/hit--> op_mux --> mux_out

 smc: IEna, IREna, InstEna, AddrEna, DataEna, RWEna, MemEna, FDEna, RLAEna to all of the above
```

## The microcode and how a March element is looped

This is the least obvious part of the design. One microcode word describes
**one operation**, not one element. A five-operation element such as
`up(r0, r0, w0, r0, w1)` is therefore five words. Each word is 7 bits, most
significant bit first:

| bit | 6 | 5 | 4 | 3 | 2 | 1 | 0 |
|---|---|---|---|---|---|---|---|
| field | Valid | Fo | Io | Lo | I/D | R/W | Data |

* `Valid = 0` ends the test.
* `Fo`, `Io` and `Lo` mark the first, an in-between and the last operation of a
  multi-operation element. `Fo = Io = Lo = 0` is an element with a single
  operation.
* `I/D = 1` walks the addresses downwards.
* `R/W = 1` writes.
* `Data = 1` means all-ones data, written or expected.

The March SS program (`bisr_pkg::MARCH_SS`):

| element | words (hex) | operations |
|---|---|---|
| M0 | 42 | w0 (any order; up is used) |
| M1 | 60 50 52 50 4B | up: r0 r0 w0 r0 w1 |
| M2 | 61 51 53 51 4A | up: r1 r1 w1 r1 w0 |
| M3 | 64 54 56 54 4F | down: r0 r0 w0 r0 w1 |
| M4 | 65 55 57 55 4E | down: r1 r1 w1 r1 w0 |
| M5 | 44 | r0 (any order; down is used) |
| end | 00 | |

The hardware applies all operations of an element to one address, then moves on
to the next address:

* **Instruction pointer** (`inst_ptr`). It remembers the address of the
  element's first word. After a `Fo` or `Io` word it steps to the next word.
  After a `Lo` word or a single-operation word there are two cases:
  * If the address generator is not at its last address (`Over = 0`), the
    pointer jumps back to the element's first word.
  * Otherwise it steps on to the next element and records that element's
    start.
* **Address generator** (`addr_gen`). It keeps an up-counter that advances
  after the last operation of each element. It outputs the count for an
  increasing element and the count's one's complement for a decreasing one
  (`I/D = 1`). A decreasing element therefore starts at the top address with no
  extra load, and `Over` is simply "counter all ones". After the last address
  the counter wraps to zero, ready for the next element. This needs a
  power-of-two depth.

So M1 executes words 1..5 at address 0, then words 1..5 at address 1, and so on.
It leaves the element after address 15.

## Controller timing

`smc` has three modes:

| mode_type | mode |
|---|---|
| 0 | idle |
| 1 | test |
| 2 | normal |

While the controller is in test mode, each March operation takes five cycles:

| phase | enable | action |
|---|---|---|
| FETCH | IEna | storage registers the word at InstAddr |
| LOAD | IREna | instruction register takes the word |
| DECODE | DataEna, RWEna | data and read/write registers set from the word; a word with `Valid = 0` ends the test here |
| ACCESS | MemEna | RAM reads or writes |
| COMPARE | FDEna (reads only), InstEna, AddrEna (after an element's last operation) | read data checked; pointer and address updated |

A test of k operations per address on N words takes `5*k*N + 3` cycles from
entering test mode to `test_done`. That is 1763 cycles for March SS on 16 words.
At the end the controller switches itself to normal mode and raises
`test_done`. A new test starts only after going through idle. Setting
`mode_type = 2` during a test aborts it. Setting `smc_ena = 0` or
`mode_type = 0` returns the controller to idle, which also clears the pointer
and the address counter.

In normal mode the input multiplexer routes `addr_in`, `data_in`, `r_ena` and
`w_ena` to the RAM. `MemEna` and the redundant array stay enabled.

## Fault diagnosis and repair

* **Fault diagnosis** (`fault_diag`). During COMPARE of a read it compares the
  RAM output with the data generator's word. On a mismatch it emits a one-cycle
  fault pulse on the next cycle, together with the address and the **expected**
  (correct) data. It also counts mismatches (`fault_cnt`).
* **Redundant logic array** (`rl_array`). It is built from `RL_WORDS`
  instances of `rl_word`. Each word has three fields: FA (fault asserted),
  address and data.
  * On a fault pulse for an address not yet held, the next free word is
    programmed.
  * If a word already holds that address, only its data field is updated. An
    address therefore never takes more than one word.
  * When no word is free, the sticky `overflow` flag rises: the memory can no
    longer be repaired.
  * Inside a word, a comparator matches the incoming address. The data field
    is written through `IE = match AND R/W` and read through
    `OE = match AND NOT R/W`.
* **Normal-mode read path.** The RAM is synchronous, so read data appears on
  `mux_out` one cycle after the read. For the same reason the array registers
  `hit` and the redundant data on a read. In the next cycle `op_mux` picks the
  redundant data if `hit` is set, and the RAM output otherwise. Writes to a
  repaired address go to both the RAM and the redundant word.

## Reliability enhancement circuit

`rec` wraps `srd`, the successive read detector. Both use SRAM-style
active-low controls:

* A read is `CEN = 0` with `WEN = 1`.
* Every read loads its address into an address register.
* A flip-flop `Y` records that the previous cycle was a read.
* `SR = (A == stored address) AND Y AND WEN`.

With protection on (`rec_en_n = 0`), `CEN' = CEN OR SR`. With protection off,
`CEN' = CEN`. At the top, `CEN = NOT(MemEna AND (RdEna OR WrEna))` and
`WEN = NOT WrEna`.

A suppressed read leaves the RAM idle, so its held output, the word read one
cycle earlier, is returned. Any write or idle cycle in between resets `Y`, so
only reads in consecutive cycles are merged. The BIST never reads in
consecutive cycles, so the REC never changes a test. Its effect is on normal
traffic. `succ_read` pulses for every suppressed read. With `rec_en_n` tied to
1 the design is a plain self-test and self-repair memory without the REC.

## Defects for simulation

The RAM model (`sram`) has three injection inputs, one bit per word. Set them
all to zero for a fault-free RAM.

* `inj_sa_mask` / `inj_sa_val`: the word reads as all `inj_sa_val` (stuck-at).
* `inj_weak_mask`: the word has a latent read-destructive defect. When it is
  read in `DMRDF_K` consecutive cycles, the last of those reads returns the
  right value but leaves the word inverted. This is a deceptive multiple-read
  destructive fault. Reads with any other cycle between them do not add up.
  March SS misses this defect because its reads are never back to back. The REC
  prevents it from appearing in normal use.

## Top-level interface (`bisr_rec_top`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; synchronous active-low reset |
| smc_ena | in | 1 | controller enable |
| mode_type | in | 2 | 0 idle, 1 test, 2 normal |
| addr_in, data_in, r_ena, w_ena | in | ADDR_W, DATA_W, 1, 1 | normal-mode access |
| rec_en_n | in | 1 | 0 = successive-read protection on |
| inj_sa_mask, inj_sa_val, inj_weak_mask | in | 2**ADDR_W | defect injection (tie to 0 for a good RAM) |
| mux_out | out | DATA_W | read data, one cycle after the read |
| test_done | out | 1 | March test finished (design is now in normal mode) |
| overflow | out | 1 | more faulty addresses than redundant words |
| mode_state | out | 2 | current mode |
| fault_cnt | out | 16 | failing reads seen by the test |
| rl_used | out | clog2(RL_WORDS+1) | redundant words in use |
| succ_read | out | 1 | a read was suppressed by the REC this cycle |

Parameters:

| parameter | default | meaning |
|---|---|---|
| ADDR_W | 4 | memory depth is 2**ADDR_W |
| DATA_W | 1 | word width; the test data is all zeros or all ones |
| RL_WORDS | 32 | redundant words |
| IADDR_W | 5 | instruction store of 2**IADDR_W words |
| DMRDF_K | 2 | reads in consecutive cycles that destroy a weak word |

Usage:

1. Reset.
2. Set `smc_ena = 1` and `mode_type = 1`.
3. Wait for `test_done`.
4. Set `mode_type = 2` so that the design stays in normal mode.
5. Access the memory.

## Departures and choices

These details are this design's own. The paper's description does not fix them.

* The five-phase timing per operation and all cycle counts. The paper
  specifies neither.
* Reset is synchronous and active low.
* Mode encoding: test = 1 and normal = 2 match the paper's simulation traces.
  Idle = 0 is a choice.
* The automatic switch from test to normal at the end of the test follows the
  paper. The rule that a new test starts only from idle is a choice.
* How Fo/Io/Lo and Over drive the pointer, and the complemented counter for
  decreasing order.
* The word width. The microcode description speaks of a byte of ones or zeros,
  but the paper's simulation shows a 16 x 1 memory with 6-bit redundant words
  (FA, 4-bit address, 1 data bit). The one-bit word is the default, and
  `DATA_W = 8` gives the byte.
* The first word of M1 is 0x60, with Fo set, because that word opens a
  multi-operation element.
* Fault diagnosis passes on the expected (correct) data, which is what the
  redundant word is meant to hold.
* A repeated faulty address reuses its word. Words are filled in order.
* The registered redundant read path and the registered fault pulse.
* The defect-injection ports and the back-to-back model of the read-destructive
  defect.
* Transistor-level behaviour is not modelled: the defect resistance, the
  bit-line load and the resulting lifetime gain.

The BIST itself applies March SS exactly as listed above. Fault detection by the
test covers what the March test detects. Only the injected defect types above
have been simulated.

## Files

* `rtl/bisr_pkg.sv`: the instruction struct, the mode enum and the March SS program.
* `rtl/bisr_rec_top.sv`: the top level.
* The other modules in `rtl/`, one per block:
  * microcode: `inst_ptr`, `inst_storage`, `inst_reg`
  * pattern generation: `addr_gen`, `data_gen`, `rw_control`
  * memory path: `ip_mux`, `rec`, `srd`, `sram`
  * response checking and repair: `fault_diag`, `rl_array`, `rl_word`, `op_mux`
  * controller: `smc`
* `tb/tb_<module>.sv`: a self-checking testbench for each module. Each one
  prints `TB_RESULT checks=N failures=M`.
* `tb/tb_bisr_rec_top.sv`: the end-to-end test at the default parameters. It
  runs four scenarios:
  1. a good RAM, checking the exact cycle count and the 22n operation count;
  2. stuck-at words, checking failing-read counts, repair, and normal traffic
     through the redundant words;
  3. an idle / test / normal round trip;
  4. the REC with a weak word.

  It also drives a second instance with 4 redundant words into overflow.
* `tb/tb_all_words_faulty.sv`: every word faulty, at the default parameters
  with a single instance. All 16 addresses are repaired, and all normal traffic
  is served by the redundant words.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/bisr_pkg.sv \
          tb/tb_bisr_rec_top.sv --top-module tb_bisr_rec_top -o sim
./obj_dir/sim
```

`-y rtl` lets Verilator find each module in its own file. The package is named
explicitly so that it is read first. Use the same command with another
testbench file and `--top-module` to run a single block test. Each test runs in
well under a second.
