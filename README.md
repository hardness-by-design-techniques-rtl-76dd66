# Triple-modular-redundant counters for SRAM FPGAs

An SRAM-based FPGA keeps its circuit in configuration memory, and a
radiation-induced upset in that memory can change what the circuit does, not
just a stored value. Replicating a circuit three times and voting on the
result (triple modular redundancy, TMR) masks such a fault, but only if the
voting is arranged so that no single resource is shared by all three copies,
and only if a copy that was broken and then repaired (for example by
rewriting the configuration memory, "scrubbing") gets back in step with the
other two.

This RTL implements the hardened structures of the study "Hardness By Design
Techniques for Field Programmable Gate Arrays" on its example circuit, an
8-bit counter:

| Module                 | Structure                                                         |
|------------------------|-------------------------------------------------------------------|
| `feedback_tmr_counter` | three registered incrementers, a voter in front of each one: the voters are inside the counting loop |
| `tmr_counter_3v`       | three counters, three voters on the outputs                        |
| `tmr_counter_1v`       | three counters, one voter on the output                            |
| `counter`              | the unprotected 8-bit counter, the unit the last two replicate     |
| `tmr_incrementer`      | register that loads its input plus one                             |
| `tmr_voter`            | bitwise best-of-three majority                                     |
| `hbd_top`              | the three TMR structures side by side                              |
| `hbd_pkg`              | shared constants: count width 8, three copies                      |

## Why the voter belongs in the feedback loop

A conventional counter feeds its own register back into its adder. Triplicate
it and vote on the outputs, and a fault in one copy is masked. But the copy
that stopped does not know that it stopped. Take a copy whose clock enable is
stuck at 0 for three cycles:

```
cycle                1  2  3  4  5  6  7
copies 1 and 2       7  8  9  A  B  C  D
copy 3, conventional 7  8  8  8  8  9  A     enable stuck, then repaired
copy 3, feedback     7  8  8  8  8  C  D
```

In the conventional structure, copy 3 resumes from the value it was stuck at.
It keeps counting correctly but is four counts behind for good. The voters
now depend on copies 1 and 2 alone, so the next fault in either of them
corrupts the output, although only one copy is faulty at that moment.

`feedback_tmr_counter` cuts the loop between register and adder. Copy *k* is
a register that loads "input plus one", and its input is voter *k*'s majority
of all three registers. While copy 3 is stalled its stale register is
outvoted, yet its input still carries the correct count. On the first enabled
edge after the repair it loads the voted count plus one and is back in step.
One voter per copy means a fault in a voter also hits only one copy. The cost
is the voter in the loop: the critical path becomes register, voter, adder,
register, so this counter runs slower than the conventional one.

The module carries an assertion of this property: after any clock cycle in
which all three copies were enabled, the three registers are equal.

## Clocking

`tmr_counter_3v` and `feedback_tmr_counter` have one clock input per copy,
`clk_i[k]`. On an FPGA these are three global clock buffers, so that a fault
in one buffer stops only one copy. The three buffers are taken to be fed from
one clock source: same frequency and phase. The voters compare the three
copies every cycle, which only works with in-phase clocks, so there are no
synchronisers. Tie the three inputs together for the single-clock-buffer
variant. `tmr_counter_1v` has a single clock.

All registers have a synchronous, active-high reset `rst_i` that clears them
to zero. Each copy samples it on its own clock. The study does not describe
a reset; this one is a design choice.

## Fault model in the ports

Every copy has a clock enable `ce_i[k]`. In normal operation all enables are
high. Driving one low reproduces the fault the study uses to explain
resynchronisation: a configuration upset that forces a copy's clock enable to
0. Holding it low for some cycles and then releasing it plays "fault, then
repair by scrubbing". Other configuration upsets, such as broken routing or a
changed LUT function, cannot be expressed at this level. The RTL does not
reproduce the study's sensitivity figures, which were measured on the device.

## Cost and measured sensitivity

The figures from the study, for a Virtex FPGA with 4-input LUTs, tell you
what each structure is worth. "Failures" is the number of configuration bits
whose upset made the design fail.

| Structure                     | LUTs | Failures | Module, clock wiring                   |
|-------------------------------|-----:|---------:|----------------------------------------|
| no redundancy                 |    8 |      389 | `counter`                              |
| TMR, 1 voter                  |   32 |      418 | `tmr_counter_1v`                       |
| TMR, 3 voters                 |   48 |       29 | `tmr_counter_3v`, clocks tied          |
| TMR, 3 voters, 3 clocks       |   48 |       27 | `tmr_counter_3v`, separate clocks      |
| feedback TMR                  |   48 |   20-24  | `feedback_tmr_counter`, clocks tied    |
| feedback TMR, 3 clocks        |   48 |        5 | `feedback_tmr_counter`, separate clocks|

The one-voter version is worse than no redundancy. Its single voter is as
large as the counter it protects and is itself unprotected. The study gives
the single-clock feedback figure as 24 in its summary table and as 20 in its
text. Each voter bit is one 4-input LUT, `(a&b)|(a&c)|(b&c)`.

## Interfaces

`hbd_top` (parameter `WIDTH`, default 8):

| Port          | Dir | Width       | Meaning                                    |
|---------------|-----|-------------|--------------------------------------------|
| `clk_i`       | in  | 3           | clock of copy *k* (one source, three buffers) |
| `rst_i`       | in  | 1           | synchronous reset, active high             |
| `ce_fb_i`     | in  | 3           | enables of the feedback TMR copies         |
| `ce_3v_i`     | in  | 3           | enables of the three-voter TMR counters    |
| `ce_1v_i`     | in  | 3           | enables of the one-voter TMR counters      |
| `count_fb_o`  | out | 3 x WIDTH   | voted outputs of the feedback TMR counter  |
| `count_3v_o`  | out | 3 x WIDTH   | voted outputs of the three-voter counter   |
| `count_1v_o`  | out | WIDTH       | voted output of the one-voter counter      |

The one-voter counter runs on `clk_i[0]`. Every output increments by one per
clock cycle after reset and wraps from 255 to 0. Outputs are combinational
from the registers through the voters, so they change just after the rising
edge. The FPGA clock buffers (`bufg`) and output buffers (`obuf`) of the
original drawings are vendor primitives with no logic and are not included.
Their nets are the top's ports.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

- `tb_counter`, `tb_tmr_incrementer`, `tb_tmr_voter`: random and exhaustive
  checks against reference arithmetic. The voter is checked in every bit lane
  and with one bad word among two good ones.
- `tb_tmr_counter_3v`, `tb_tmr_counter_1v`: replay the conventional sequence
  above (copy 3 reads 7,8,8,8,8,9,A). Then copy 1 is stalled as well, and the
  output must go wrong. Then random single-copy stalls are checked against a
  model of three independent counters with majority voting.
- `tb_feedback_tmr_counter`: replays the feedback sequence (copy 3 reads
  7,8,8,8,8,C,D). Then a second fault on copy 1 must leave every output
  correct. Then random stalls are run.
- `tb_hbd_top`: end to end at the default size. It runs 60 rounds of
  "stall one copy, repair, stall another, repair, reset" on all three
  structures. The golden count is an integer in the testbench. The feedback
  outputs must always equal it, and the conventional outputs must match their
  model. The testbench counts how often each mechanism happened: a masked
  fault, a feedback copy resynchronised, a conventional copy left out of
  sequence, a second fault that corrupts the conventional outputs but not the
  feedback ones, and a count wrap. It fails if any of them never happened.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_hbd_top rtl/hbd_pkg.sv tb/tb_hbd_top.sv
./obj_dir/Vtb_hbd_top
```

The testbenches read internal registers by hierarchical name
(`dut.g_copy[k].u_incr.q_o` and similar). Keep those instance names if you
restructure the modules.

## Departures and open points

- Reset, the clock-enable ports and the voter equation are design choices.
  The study names the voter only as "best of three".
- The three clocks are assumed to be in phase. With truly independent clock
  domains, both the voted feedback and the output voters would need
  synchronisation, which is not provided.
- The study's upset simulator is not part of this RTL. It is a three-FPGA
  rig: a golden design, a design under test whose configuration bits are
  flipped one by one, and a comparator. `tb_hbd_top` plays the same
  golden-versus-test comparison in simulation, with stuck enables as the only
  fault type.
- Placement effects (the unprotected counter's sensitivity ranges from 389 to
  781 bits depending on where it sits relative to the I/O pins) belong to
  place-and-route and have no RTL counterpart.
