# Three-cycle register swap with a transfer-gate controller

Moving a word from one register to another is among the most frequent
operations of any processor, RISC or CISC. This design is a small, low-power
controller for such a transfer: it exchanges the contents of two registers,
R1 and R2, through a third register, R3, over one shared bus. It takes three
clock cycles. The controller is a four-state Moore machine. At circuit level it
is two D flip-flops and six two-input gates. Each gate is a two-transistor
transfer-gate (pass-transistor) cell instead of a six-transistor static CMOS
gate. Fewer transistors means less switched capacitance and less leakage,
which is where the power saving comes from.

The RTL gives the controller twice, once as a state machine and once as the
gate netlist. It also gives the two transfer-gate cells, the flip-flop, and a
register bank for the controller to drive.

## The transfer

```
            w=0
           +---+
           v   |
   reset-> A (no transfer) --w=1--> B --> C --> D --> back to A
                                    |     |     |
                        R2out, R3in |     |     | R3out, R1in, DONE
                                  R1out, R2in
```

| state {y2,y1} | next (w=0) | next (w=1) | active outputs          | register move |
|---------------|------------|------------|-------------------------|---------------|
| A = 00        | A          | B          | none                    | none          |
| B = 01        | C          | C          | R2out, R3in             | R3 <- R2      |
| C = 10        | D          | D          | R1out, R2in             | R2 <- R1      |
| D = 11        | A          | A          | R3out, R1in, DONE       | R1 <- R3      |

- **Start.** w is looked at only in state A. Once the transfer has started,
  w does not matter.
- **Moore outputs.** The outputs depend only on the state, so each one is high
  for one whole clock cycle.
- **DONE** is high in state D. That is the cycle in which R1 takes the old
  value of R2 (now held in R3).
- **Timing.** Call the clock edge that samples w = 1 in state A edge 0. DONE is
  high between edges 2 and 3. After edge 3, R1 and R2 are exchanged, R3 holds
  the old R2, and the controller is back in A.
- **Back-to-back transfers.** If w is still high at edge 3, the next transfer
  starts at once, with no idle cycle.
- **Reset** is active high and asynchronous. It stops a transfer in any state
  and returns the controller to A. It does not touch the registers, so they
  keep whatever the transfer had done up to that point. For example, a reset
  in state C leaves R3 = old R2 and R1, R2 unchanged.

## The gate-level controller

Use the state encoding above and work the table into two-input products and
sums. This gives:

```
Y1 = w.~y1 + y2.~y1             (next value of y1)
Y2 = y1.~y2 + y2.~y1            (next value of y2, i.e. y1 xor y2)
R2out = R3in = y1.~y2           (state B)
R1out = R2in = y2.~y1           (state C)
R3out = R1in = DONE = y1.y2     (state D)
```

Several gates are shared:

- The product y2.~y1 feeds both sums and drives the state-C outputs.
- The product y1.~y2 feeds Y2 and drives the state-B outputs.

So the whole machine needs four AND gates, two OR gates and two flip-flops.
The flip-flops' Q-bar outputs supply the complemented state bits. A static
CMOS build would take 6 x 6 + 2 x 16 = 68 transistors. With two-transistor
gates, the six gates take 12 transistors instead of 36.

`dt_control_gates` is exactly this netlist, made of `pt_and2`, `pt_or2` and
`dt_dff` instances. `dt_control_fsm` is the same machine written as a state
machine. Both controllers have the same ten functional ports, plus the
observation output `state_bits`:

- inputs: w, clk, rst
- outputs: the six register enables and DONE

The end-to-end test runs both controllers in lockstep and checks that they
agree on every cycle.

## Transfer-gate cells

Each cell has one nMOS and one pMOS transistor. Both gates are driven by
`in1`, and the cell has no supply connection of its own.

- **`pt_and2`.** When in1 = 1 the nMOS passes in0. When in1 = 0 the pMOS
  passes in1 itself, which is a 0. So out = in0 AND in1.
- **`pt_or2`.** When in1 = 0 the pMOS passes in0. When in1 = 1 the nMOS passes
  in1 itself, which is a 1. So out = in0 OR in1.

An nMOS passes a logic 1 only as a degraded level. When the conducting path
then switches to the pMOS, the analogue output shows a short spike. A
restoring buffer after the cell removes it. The RTL models only the logic
function, written as the 2:1 selection the cell performs. Weak levels, the
spike and the buffer are outside what RTL can express.

The layouts the cells come from use L = 2 um, W = 3 um transistors in a
0.25 um process. The FPGA mapping of the controller ran at 800 to 830 MHz, and
the transistor-level version reached about 970 MHz. Nothing in the RTL depends
on these numbers.

## Registers and bus (`dt_regbank`)

- There are three registers of `WIDTH` bits (default 8). Each register Ri has
  a bus-output enable (`out_en[i-1]`, the controller's RiOut) and a load
  enable (`in_en[i-1]`, the controller's Riin).
- The bus is an AND-OR selection, not a tri-state net. It reads 0 when nothing
  drives it.
- An assertion fails if two registers drive the bus at once.
- Operands are written from outside through `ld_we` and `ld_data`. An external
  write to a register wins over a bus load of the same register in the same
  cycle.
- The data registers have no reset.

## Files

| file | contents |
|------|----------|
| `rtl/dt_pkg.sv` | state enum `state_t`, control word `ctrl_t`, `NREG = 3` |
| `rtl/pt_and2.sv`, `rtl/pt_or2.sv` | transfer-gate AND and OR cells |
| `rtl/dt_dff.sv` | D flip-flop with Q-bar and asynchronous clear |
| `rtl/dt_control_gates.sv` | controller as a netlist of the cells above |
| `rtl/dt_control_fsm.sv` | the same controller as a state machine |
| `rtl/dt_regbank.sv` | R1, R2, R3 and the bus |
| `rtl/data_transfer_top.sv` | controller plus register bank (top) |

Top parameters:

- `WIDTH` (default 8): the register width.
- `GATE_LEVEL` (default 1): selects the gate netlist. Set it to 0 for the
  state-machine controller.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- **`tb_pt_and2`, `tb_pt_or2`** apply all four input pairs and compare with
  the truth tables.
- **`tb_dt_dff`** drives random data and random asynchronous resets.
- **`tb_dt_control_fsm`, `tb_dt_control_gates`** compare every cycle with the
  state table, which the bench holds as constants. w is random and a reset is
  applied in every state. For each transfer, the bench also checks that DONE
  comes two edges after the start and that the controller is back in A after
  three.
- **`tb_dt_regbank`** compares the bank against a reference model under
  random enables and writes.
- **`tb_data_transfer_top`** loads random operands and checks the registers
  and the bus after each transfer cycle. It covers a plain swap, w held high
  (which gives back-to-back swaps), idle waiting and reset in the middle of a
  transfer. It counts each of these and fails if any never happened. It
  compares the two controller variants cycle by cycle.
- **`tb_data_transfer_full`** runs one swap through the top at its default
  parameters.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dt_pkg.sv tb/tb_data_transfer_top.sv --top-module tb_data_transfer_top
./obj_dir/Vtb_data_transfer_top
```

## Where this RTL makes its own choices

The source design specifies the state table, the state encoding, the gate
and flip-flop count, the cell structure and the three-cycle timing. The
following are choices made here:

- **Register width.** 8 bits.
- **Register bank and bus.** The source names only the enable signals, so the
  register bank and its bus as a selection were designed here.
- **External write port.** Added so that operands can be loaded.
- **Reset.** It is asynchronous. The source says only that it is active high
  and stops the transfer in any state.
- **Pin connections of the cells.** These follow the usual transfer-gate AND
  and OR.
- **Observation port.** Both controllers also output their state bits
  (`state_bits`, {y2,y1}) so that they can be checked. The synthesised
  controller they model has only its ten ports.
- **State encoding.** The design is described in one place as one-hot. Here it
  follows the two-bit encoding of the state table, which matches the two
  flip-flops of the synthesised controller.
