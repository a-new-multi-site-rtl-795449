# MSTAR: multi-site star test logic for SoCs

Wafer probing of a large SoC is limited by how many tester channels and probe
needles each die needs. MSTAR (multi-site star test architecture) cuts a die's
test interface down to the five IEEE 1149.1 pins plus an input-only test access
mechanism (TAM). All dies under a probe card then share *every* tester channel:
TCK, TMS, TDI, nTRST and the TAM lines are broadcast to all dies. A single TDO
line comes back, shared by all dies. The tester is the hub of a star and each
die is a node.

Two things make the broadcast work:

* **No die answers unless it is addressed.** Each die compares a code loaded by
  the tester with its own fused chip ID. Only the die whose ID matches lets its
  TAP controller enable the TDO driver. All other dies keep TDO in high
  impedance.
* **Responses are compacted on chip.** The TAM has no output lines. Scan
  responses go into a MISR (multiple-input signature register), and BIST engines
  keep their own results. Results are read over TDO later, one die at a time.

This repository holds synthesizable SystemVerilog for the on-die logic, a
multi-site top that wires up to 45 dies in a star, and self-checking
testbenches. The architecture follows the paper *"A New Multi-site Test for
System-on-Chip Using Multi-site Star Test Architecture"* (D. Han, Y. Lee,
S. Kang). The embedded cores, the exact register formats and several
protocol details are this implementation's own choices, listed below.

## The STAR register: how a die is told what to do

The MSTAR controller (MSTARC) of each die is a single serial-in, parallel-out
shift register. It has two parts in series:

```
TDI (or TMS) --> [ I-MSTARC  L-1 ... 1 0 ] --> [ E-MSTARC  K-1 ... 1 0 ]
                   core selection bits           DUT selection code
```

Each stage is a flip-flop with a two-input multiplexer in front of it.

* **Loading.** While **nTRST is low** the multiplexers pick the previous stage,
  and the register shifts one bit on every rising TCK edge. Every TAP controller
  of the die is held in Test-Logic-Reset meanwhile, so loading cannot disturb
  any other test logic.
* **Holding.** While **nTRST is high** each stage feeds back its own output. The
  stored bits then drive the selections for the rest of the test.

The nTRST pin is therefore used as the load strobe. No extra pin is needed.

A load takes exactly `L + K` TCK cycles. The tester sends the image
`{core_sel[L-1:0], dut_code[K-1:0]}` LSB first. The first bit sent ends up in
E-MSTARC stage 0 and the last bit sent in I-MSTARC stage `L-1`. Because all dies
get the same bits, every die in the star holds the same image. Only the chip-ID
comparison tells them apart.

Defaults: `L = 3` cores and `K = 8` ID bits, so a load is 11 TCK cycles.

Two consequences matter when you write a test program:

* Every new selection pulses nTRST. That resets all TAP controllers and the 1500
  wrapper instruction. The BIST engines, the MISRs and their results are **not**
  reset by nTRST, so results survive the reload. They are cleared by the on-die
  power-on reset `por_n` and by starting a new run.
* The register has no reset of its own. Its content is undefined until the
  first load.

### E-MSTARC: DUT selection (`e_mstarc`)

The K-bit code is XOR-ed bit by bit with `chip_id`, and the XOR outputs are
OR-ed. The result, `match_n`, is low exactly when the code equals the ID. The
TDO enable of the chip-level TAP controller (high in Shift-IR and Shift-DR) is
AND-ed with `~match_n` to give the pad enable. A code that matches no die, such
as `8'h00` with IDs starting at 3, makes every die silent. The tester uses
such a code while it runs tests in all dies at once.

### I-MSTARC: core selection (`i_mstarc`)

Bit `i` includes core `i` in the die's TDI-TDO chain. If the bit is 0, a
multiplexer behind the core bypasses it, and the core is isolated:

* its TAP clock enable is low, so its TAP controller and registers freeze;
* the TAM lines it sees are forced to zero.

For testing, one core is selected at a time. For debug or for reading results,
any combination can be selected.

## The serial chain of one die (`mstar_dut`)

```
TDI -> chip TAPC -> core 2: 1500 wrapper -> mux -> core 1: LBIST -> mux -> core 0: MBIST -> mux
    -> falling-edge stage -> TDO pad (enable = TAPC shift state AND chip-ID match)
```

The chip-level TAP controller always stays in the chain, so a die with no core
selected behaves as a plain 1149.1 device. Selected cores add their registers
behind it. Instruction and data scans are concatenations: the chip's part is
nearest TDI and core 0's part is nearest TDO. Shift vectors LSB first. The first
bits shifted land in core 0.

| Element | IR bits | Data registers (selected by its instruction) |
|---|---|---|
| chip TAPC | 4 | BYPASS (1), IDCODE (32, `32'h1000_0001`), USER = chip ID (K, read only) |
| core 2, 1500 wrapper | 2 (WIR) | WBY (1), WBR (8, captures `func_in`), signature (TAM_W) |
| core 1, LBIST core TAPC | 4 | BYPASS, IDCODE `32'h2000_0001`, USER (18) = `{signature[15:0], done, busy}`; writing bit 0 = 1 starts the BIST |
| core 0, MBIST core TAPC | 4 | BYPASS, IDCODE `32'h3000_0001`, USER (3) = `{fail, done, busy}`; writing bit 0 = 1 starts the BIST |

TAP instructions: `BYPASS = 4'b1111`, `IDCODE = 4'b0001`, `USER = 4'b1000`.
The IR captures `4'b0001`.

Wrapper instructions: `WS_BYPASS = 0`, `WS_INTEST_SCAN = 1`, `WS_EXTEST = 2`,
`WS_READ_SIG = 3`. The WIR captures `2'b01`.

For example, one scan of all three cores reads everything a die holds.

* IR: `{USER, WS_READ_SIG, USER, USER}`, 14 bits.
* DR (45 bits at the defaults), LSB first out:
  * bits 2:0: MBIST status;
  * bits 20:3: LBIST signature and status;
  * bits 36:21: wrapper MISR;
  * bits 44:37: chip ID.

### Timing

* Every register shifts on the rising edge of TCK.
* Capture happens on the rising edge that leaves Capture-xR.
* Update happens on the rising edge that leaves Update-xR. The 1149.1 standard
  uses the falling edge there. The one-half-cycle difference is invisible at
  the pins.
* Inside the chain, TDO is combinational, so the bypass multiplexers cost no
  cycles.
* At the chip boundary, the chain output and its enable are registered on the
  falling TCK edge, as 1149.1 requires.

### The 1500-wrapped scan core (`wrapper_1500`)

The wrapper's serial port is driven by the chip-level TAP state:

* SelectWIR means the TAP is in the IR column of the state diagram.
* ShiftWR, CaptureWR and UpdateWR follow the TAP's Shift, Capture and Update
  states.

The core holds `TAM_W` scan chains of `CHAIN_LEN` cells (16 × 8 by default).
Each chain is fed by one TAM line. Under `WS_INTEST_SCAN`, on each TCK that the
chip TAP spends in Run-Test/Idle, the wrapper runs a fixed protocol:

1. `CHAIN_LEN` shift cycles. The bits leaving the chains are compacted in a
   `TAM_W`-bit MISR.
2. One capture cycle.

Loading `WS_INTEST_SCAN` clears the MISR and the protocol counter.

The capture function is a stand-in for core logic the architecture does not
specify: every cell takes its own value XOR the next chain's next cell. The
MISR is an internal-XOR LFSR with the polynomial x^16+x^12+x^5+1. At other
widths the same low taps are used.

### BIST cores (`lbist_core`, `mbist_core`)

Both cores have an embedded TAP controller (`tap_ctrl`, the same module as the
chip TAPC). Both BIST engines run on TCK while the core is selected.

* **LBIST.** A 16-bit Fibonacci LFSR (x^16+x^14+x^13+x^11+1, seed `16'hACE1`)
  drives a stand-in logic block: an 8-bit adder and an XOR of the two pattern
  halves. A 16-bit MISR compacts the outputs. One pattern is applied per cycle,
  `NPAT = 256` patterns in all.
* **MBIST.** March C- on a 16 × 8 register-array memory, taking 10 × 16 cycles.
  `fail` is sticky.

## Test flow

The tester program runs the test in two phases. `tb_mstar_multisite` carries it
out.

1. **Embedded core test, all dies at once.** For each core: load STAR with only
   that core selected and a code that matches no die. Then scan in the
   instruction and run the test. For the scan core, that means TAM patterns
   during Run-Test/Idle. For the BIST cores, it means writing start and idling.
   TDO stays undriven throughout.
2. **Shared-DUT measurement, one die at a time.** For each die: load STAR with
   all cores selected and that die's chip ID. Then do one IR scan and one DR
   scan to read its results over the shared TDO.

Cost per touchdown at the defaults is about:

* 11 TCK per STAR load;
* plus about 75 TCK per die for the measurement scans;
* plus the test time of each core, which is paid only once for all dies.

This per-die measurement is the overhead term in the paper's throughput model
T_NP = ceil(N/P)·(T_index + T_apply) + T_M.

## The multi-site top (`mstar_multisite`)

`NUM_SITES` instances of `mstar_dut` receive the same TCK, TMS, TDI, nTRST,
`por_n` and TAM. Each has its own `chip_id` and `func_in` input.

The shared TDO line is modelled in two-state logic, with these outputs:

* `tdo` is the value of the enabled driver, or 0 when none drives;
* `tdo_driven` tells whether any die drives;
* `contention` flags two or more drivers, which a correct program never causes;
* `site_oe` shows which die drives.

Default configuration (Table 1 of the paper): 45 dies, 16-line TAM. Each die
needs 16 + 5 = 21 probe needles, which is 945 for 45 dies within the paper's
1,000. The paper also evaluates 26 dies with a 32-line TAM (Table 2). That
configuration is built by overriding `NUM_SITES = 26` and `TAM_W = 32`.

## Parameters

| Module | Parameter | Default | Origin |
|---|---|---|---|
| `mstar_multisite` | `NUM_SITES` | 45 | paper, Table 1 |
| all | `TAM_W` | 16 | paper, Table 1 (32 in Table 2) |
| all | `K` (chip ID bits) | 8 | own choice |
| `mstar_pkg` | `NUM_CORES` (L) | 3 | the three cores of the paper's internal-controller figure |
| `wrapper_1500` | `CHAIN_LEN`, `NWBR` | 8, 8 | own choice |
| `lbist_core` | `NPAT`, `SEED` | 256, `16'hACE1` | own choice |
| `mbist_core` | `DEPTH`, `DATA_W` | 16, 8 | own choice |
| `mstar_dut` | `STAR_FROM_TMS` | 0 (load STAR from TDI) | the paper allows TDI or TMS |

## What follows the paper and what does not

These parts follow the paper:

* the star topology with broadcast inputs and a single TDO;
* the input-only TAM;
* the STAR register, made of flip-flops and multiplexers, that shifts while
  nTRST is low and holds while it is high;
* the I-MSTARC then E-MSTARC order;
* the XOR comparison with the chip ID and the active-low match;
* the AND with the TAP controller's TDO enable;
* the per-core bypass multiplexers in the TDI-TDO chain, in the order 1500 core,
  LBIST core, MBIST core;
* the MISR in place of sink TAM lines;
* the two-phase test flow.

These parts are this implementation's own:

* all register widths except the TAM width and the site count;
* the instruction sets and register layouts;
* the chip-level TAP controller sitting first in the chain and never being
  bypassed;
* isolation of an unselected core by a clock enable and a zeroed TAM;
* the falling-edge TDO stage;
* `por_n`;
* the chip-ID read register;
* the scan protocol of the 1500 wrapper;
* everything inside the three cores.

The paper names those cores but does not describe them. The core logic under
scan and under LBIST is a placeholder that gives the test infrastructure
something to exercise.

The WBR only captures and shifts the core terminals. It has no update stage
driving them.

In the paper's test-flow section, one sentence says all cores are tested
simultaneously. Its flowchart, and its statement that only one core is selected
for testing, say one core at a time. The hardware allows both; the testbench
follows the flowchart.

Not modelled:

* the tri-state TDO pad cell (brought out as `tdo` and `tdo_oe`);
* the fuse or EEPROM chip-ID storage (the `chip_id` input);
* the tester itself;
* the chip-level boundary-scan register, which the architecture reuses unchanged;
* the ITC'02 benchmark SoCs whose test times the paper reports.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog. With Verilator 5, build and run a testbench from the repository root
like this:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mstar_pkg.sv tb/tb_mstar_multisite.sv \
          --top-module tb_mstar_multisite -Mdir obj && obj/Vtb_mstar_multisite
```

Verilator finds the other modules by file name through `-I`.

| Testbench | What it exercises |
|---|---|
| `tb_mstar_multisite` | Full flow on 45 dies at default parameters. Checks every signature and status, the driving die's chip ID, no contention, silence while unaddressed, and counts each mechanism. |
| `tb_mstar_multisite_tam32` | The same flow with 26 dies and a 32-line TAM. |
| `tb_mstar_dut` | One die: chain with no cores, chain lengths per core, silent TDO for a foreign code, falling-edge TDO, STAR loaded from TMS, MBIST through the chain. |
| `tb_mstarc`, `tb_i_mstarc`, `tb_e_mstarc`, `tb_star_reg` | The controller and its parts against reference models. |
| `tb_tap_fsm`, `tb_tap_ctrl` | The 1149.1 state diagram (random walks, all 16 states), IR/DR behaviour. |
| `tb_wrapper_1500`, `tb_misr`, `tb_lbist_core`, `tb_mbist_core` | The cores, with independent models of chains, MISRs, PRPG and March C-. |

`tb/jtag_bfm.sv` is the tester-side pin driver shared by the testbenches. Its
tasks include `star_load`, `shift_ir`, `shift_dr` and `idle`.

Lint note: Verilator reports `trst_n` as used both as an asynchronous reset (TAP
controllers) and as a synchronous shift enable (STAR register). This is
intended: nTRST is the STAR load strobe.
