# A desynchronized 8-bit MIPS

Desynchronization turns an ordinary clocked design into an asynchronous one
without redesigning it. The flip-flops and the logic between them stay as
they are. Only the clock tree is removed. In its place goes a network of
small handshake controllers: each one produces the clock edge for one group
of registers, and it does so only when the group before it has finished and
the delay that stands in for its logic has passed.

This RTL applies that idea to a small 8-bit multicycle MIPS. One pin chooses
the clocking:

- **Synchronous mode (`desync = 0`).** Every register group is clocked by
  the global clock `clk`.
- **Desynchronized mode (`desync = 1`).** Each of the five register groups
  is clocked by its own output of a ring of five four-phase handshake
  controllers. The speed of the ring is set by selectable matched delays.

In both modes the processor executes the same instructions in the same
number of machine cycles and leaves the same memory contents. The end-to-end
testbench checks this.

Next to the processor, and independent of it, the top also holds a small
desynchronized pipeline with a fork and a join. It shows how the same
controllers handle a pipeline that splits into two branches and merges
again.

## The handshake ring that replaces the clock

### Controllers

A controller has a left channel (`lr` request in, `la` acknowledge out) and
a right channel (`rr` request out, `ra` acknowledge in). Both channels use
single-rail four-phase signalling: request up, acknowledge up, request down,
acknowledge down. The rising edge of a controller's `rr` is the clock edge
of the register group it drives.

Two controllers are provided. Both are written as their gate equations, one
complex gate per equation, with `'` meaning complement.

`hs_ctrl1` (the default) has three gates. `csc0'` is the complement of an
internal state signal `csc0`.

    la    = lr (ra' csc0' + la)
    rr    = ra' rr + la csc0'
    csc0' = rr' la'

A request on `lr` raises `la`. One gate later `rr` rises too, because
`csc0'` is still high. Then `csc0'` falls and holds off the next cycle until
both `la` and `rr` have returned to zero. `la` returns to zero after `lr`
does. `rr` returns to zero after `ra` rises. A new `la` waits until `ra` has
fallen again.

This circuit has a timing assumption. After `la` rises, `rr` must latch
(through its `ra' rr` term) before `csc0'` falls. Both events are one gate
delay after `la`. Equal gate delays satisfy the assumption, and the model
uses equal delays. A real implementation must keep the `rr` gate no slower
than the `csc0'` gate.

`hs_ctrl2` is an alternative, selected with `CTRL_TYPE = 2`. It is written
for the complemented outputs. `csc1` is an internal state signal.

    la'  = la' (lr' + csc1' + ra) + csc1' lr'
    rr'  = (rr' + ra) (la' + csc1')
    csc1 = rr' (la' + csc1)

Its acknowledge `la` falls only after `lr` has fallen *and* `rr` has risen.
So it keeps the left side waiting longer than block 1 does. `csc1`
remembers that the right-hand cycle has completed, and it is needed before
the next `la` can rise. (A fourth signal, `csc0`, is just `rr` under another
name.)

In both controllers each gate feeds back into itself. Those combinational
loops are the controller's memory, and lint and synthesis tools report them
as loops. Each gate has a delay of `GATE_DELAY` (1 ns by default). The delay
is modelled as a *transport* delay: a non-blocking assignment with an
intra-assignment delay. This way every input change reaches the output and
none is swallowed. Synthesis ignores the delays.

### The ring

`desync_ring` connects five controllers in a ring.

- Controller *k* takes its left request from the right request of
  controller *k−1*, through a `matched_delay`.
- Controller *k* takes its right acknowledge from the left acknowledge of
  controller *k+1*.

Reset leaves the last controller holding an issued request (`INIT_RR = 1`).
When reset is released, that single token travels round the ring. The
outputs pulse in the order 0, 1, 2, 3, 4, 0, …, and one trip round the ring
is one machine cycle.

Each stage takes its matched delay plus two gate delays. With the default
delay select of 1 (4 ns), a round takes 5 × (4 + 2) = 30 ns. Raising every
select by one adds 5 × 2 ns to a round.

A `matched_delay` is a chain of `TAPS` buffers of `UNIT_DELAY` each.
`sel` picks the output after `sel + 1` buffers. In silicon each delay must
be at least as long as the slowest logic path feeding the register group
that the next controller clocks. In this model the datapath logic has no
delay, so any setting works in simulation. The settings carry meaning only
after the delays are sized against a real netlist.

If any request or acknowledge is lost, the ring stops and the processor
stops with it. A stalled address bus is therefore a self-test of the
desynchronized circuit. Both the ring testbench and the end-to-end
testbench cut a request path and check that the ring stops.

Change `dsel` only while the ring is in reset. Changing a tap while a
request is in flight can glitch the request and put a second token into the
ring. The ring testbench shows this: with a second token, the round time
halves.

### Why the desynchronized processor computes the same thing

Within one round, the ring clocks the register groups one after another
instead of all at once. The grouping is chosen so that this cannot change
any result. The five stage clocks are assigned as follows:

| Ring output | Name | Registers it clocks |
|---|---|---|
| 0 | Fetch & Memdata | instruction byte 0 (bits 7:0) |
| 1 | Regfile | instruction byte 1 (bits 15:8) |
| 2 | ID/EX | instruction byte 2 (bits 23:16) |
| 3 | EX/MEM | instruction byte 3 (bits 31:24) |
| 4 | MEM/WB | controller state, PC, MDR, A, B, ALUOut, register-file write, memory write (`memclk`) |

Everything the instruction-byte registers read (PC, controller state,
ALUOut and memory) is clocked by output 4, the last pulse of the round. So
those values are stable during outputs 0–3 and hold what the previous
machine cycle produced, exactly as in synchronous operation.

The registers on output 4 all load on the same edge, just like
synchronous flip-flops, so they see each other's old values. Output 4 does
see instruction bytes already updated in the same round. But an
instruction byte is loaded only in its own fetch cycle, and nothing that
output 4 loads in a fetch cycle depends on the byte loaded in that cycle:

- Next state and PC do not depend on that byte.
- The ALU adds 1 to the PC.
- A and B are loaded again in decode before they are used.

The end-to-end testbench confirms the equivalence. It compares memory
contents and cycle counts with a reference interpreter in both modes.

## The processor

`mips` joins three parts:

- `controller`: a 15-state Moore machine.
- `alucontrol`: decodes the ALU operation.
- `datapath`: the PC, the four instruction-byte registers, MDR, A, B,
  ALUOut, the 8 × 8-bit register file (`regfile`, r0 reads zero) and the
  ALU (`alu`).

Data, addresses and PC are 8 bits wide. Memory is a single byte-wide port:

- `adr` is either the PC or ALUOut.
- `memdata` is read combinationally.
- A byte is written on the rising edge of `memclk` while `memwrite` is high.

Instructions are 32 bits and use the MIPS-I encodings. They are fetched one
byte per cycle, lowest byte first, from `pc`, `pc+1`, `pc+2` and `pc+3`. The
immediate is instruction bits 7:0.

| Instruction | Cycles | Operation |
|---|---|---|
| `lb rt, imm(rs)` | 8 | rt = mem[rs + imm] |
| `sb rt, imm(rs)` | 7 | mem[rs + imm] = rt |
| `add/sub/and/or/slt rd, rs, rt` | 7 | slt is a signed comparison |
| `addi rt, rs, imm` | 7 | imm not sign-extended beyond 8 bits |
| `beq rs, rt, imm` | 6 | target = pc + 4 + 4·imm |
| `j target` | 6 | pc = {instr[5:0], 00} |

Every instruction takes four fetch cycles with `memread` high, then a
decode cycle. After that `memread` stays low, except for the data read of
`lb`. Unknown opcodes return to fetch after decode.

`state` and `pcsource` are brought out as test pins, and so are the five
ring outputs (`async_out`).

## The fork-join pipeline

`fj_pipeline` has six stages, each an 8-bit register clocked by its own
`hs_ctrl1` with a matched delay in front:

1. One input stage.
2. `hs_fork`, which sends the request to two branches. Its acknowledge is a
   Muller C-element (`c_element`) of the two branch acknowledges.
3. Two branches of two stages each.
4. `hs_join`, whose request is a C-element of the two branch requests.
5. One output stage.

Branch 0 adds one at each stage and branch 1 passes the word unchanged. The
output stage adds the two branch results, so a token *x* leaves as
2*x* + 2. The output request passes through one more matched delay so that
`out_data` is stable before `out_req` rises.

The interface is four-phase bundled data:

- Input: drive `in_data`, raise `in_req`, and wait for `in_ack`.
- Output: read `out_data` once `out_req` is high, then acknowledge on
  `out_ack`.

## Top-level pins (`desync_mips`)

| Pin | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | global clock (synchronous mode) |
| `rst` | in | 1 | asynchronous reset, active high |
| `desync` | in | 1 | 0 synchronous, 1 desynchronized |
| `dsel` | in | 5 × 3 | matched-delay select per controller |
| `memdata` | in | 8 | memory read data |
| `memread`, `memwrite` | out | 1 | memory strobes |
| `adr`, `writedata` | out | 8 | memory address and write data |
| `memclk` | out | 1 | memory write clock (the MEM/WB stage clock) |
| `state`, `pcsource` | out | 4, 2 | test pins |
| `async_out` | out | 5 | ring outputs, test pins |
| `fj_*` | | | fork-join pipeline, see above |

Switch `desync` and change `dsel` only while `rst` is high. The ring is held
in reset while `rst` is high or `desync` is low.

Parameters: `WIDTH` (8), `REGBITS` (3), `CTRL_TYPE` (1 or 2),
`GATE_DELAY` (1 ns), `TAPS` (8) and `UNIT_DELAY` (2 ns).

## Simulating

The asynchronous parts contain delays, so simulate with timing enabled. For
example, the end-to-end test:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/mips_pkg.sv tb/mips_tb_pkg.sv tb/tb_desync_mips.sv --top-module tb_desync_mips
    obj_dir/Vtb_desync_mips

`-Wno-fatal` is needed because the testbenches wait for random times, which
Verilator flags as possibly zero delays (`ZERODLY`).

Every testbench ends by printing `TB_RESULT checks=N failures=M`, and each
has a watchdog. Each block has its own testbench:

| Testbench | What it checks |
|---|---|
| `tb_desync_mips` | Top, default parameters. Runs the program synchronously, desynchronized at two delay settings, then synchronously again. Checks memory and cycle count against the reference interpreter, ring order in every cycle, round-time growth with the delay select, and the stall. Streams 40 tokens through the fork-join pipeline. Requires every mechanism to occur at least once. |
| `tb_mips` | Program runs with all clocks tied together; checks the memread pattern. |
| `tb_datapath` | Hand-written control words, with the five clocks pulsed in ring order. |
| `tb_controller`, `tb_alucontrol`, `tb_alu`, `tb_regfile`, `tb_clock_select`, `tb_matched_delay` | Unit checks. |
| `tb_hs_ctrl1`, `tb_hs_ctrl2` | Random-speed environments; protocol rules, gate latencies, 200 handshakes, reset with an issued request. |
| `tb_desync_ring` | Both controller types; order, round time, pulse width, stall. |
| `tb_hs_fork`, `tb_hs_join`, `tb_fj_pipeline` | Fork and join ordering; data through the pipeline; back-pressure. |

`tb/mips_tb_pkg.sv` holds the instruction encoders, the test program and
the reference interpreter.

Simulation notes:

- The gates of the asynchronous parts are refreshed on every edge of their
  reset. A two-state simulation that starts from random values therefore
  needs one rising edge of `rst` before the ring is used.
- The datapath has no delays. Correct data timing in the model comes from
  the clock ordering, not from the matched delays.

## Where this departs from the original design, and what is its own

Taken from the original work:

- the desynchronization scheme;
- the two controllers' state graphs and gate equations;
- the five handshake controllers named Fetch & Memdata, Regfile, ID/EX,
  EX/MEM and MEM/WB;
- asynchronous inputs 1–4 clocking instruction bits 7:0, 15:8, 23:16 and
  31:24, and input 5 clocking the MEM/WB stage and the state;
- a clock/handshake multiplexer per stage with one mode pin;
- delay-select pins;
- state and asynchronous-input test pins;
- an 8-bit processor split into controller, alucontrol and datapath;
- a four-cycle fetch with `memread` high;
- forks and joins as separate structures.

The original calls the processor a MIPS "with 4 pipeline stages". Its five
controllers and four-cycle byte fetch describe a multicycle machine, and
that is what is built here.

This design's own choices:

- the instruction set, state machine and register-file size;
- which registers share the fifth clock;
- the ring closure with one reset token;
- the use of `rr` as the stage clock;
- reset of the controllers;
- the width of the delay selects, the tap count and the unit delay;
- the C-element fork and join;
- the data operations of the fork-join pipeline;
- the `memclk` output.

Not modelled:

- **Latch-based variant.** The original also allows splitting each
  flip-flop into separately clocked master and slave latches. Its processor
  uses flip-flops, and so does this design: one controller per register
  group, with the flip-flop edge on `rr` rising.

- **Memory handshake.** The memory has no handshake of its own, as in the
  original, where the external RAM gave no ready signal.
- **Physical design.** The pads, layout and the cell libraries of the
  fabricated chip.
- **Real delays.** The datapath has no delays, so the matched delays are
  not sized against real logic. The drive-strength and short-pulse
  problems observed on silicon are electrical and cannot appear in this
  model.
