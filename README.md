# mole: an embedded logic analyzer for an UltraSONIC PIPE

Debugging the FPGA half of a reconfigurable computer is hard: the signals
inside the FPGA cannot be reached with an external logic analyzer, and even
the pins of a modern package are out of reach. This design puts the logic
analyzer inside the FPGA. The *mole* sits next to the user's logic in the
processing element (PIPE) of the UltraSONIC video-processing board. It
watches 128 of the user's signals and waits for a trigger condition. It then
records a history of samples. It needs no block RAM of its own: it writes the
samples into the PIPE's external SRAM (the PIPE memory), through the memory
port that the user design leaves free. The host PC programs the mole and
reads the results over the buses the board already has (PCI, then the PIPE
bus), so no JTAG cable and no rebuild is needed to change what is watched.

The RTL here covers the mole itself and the part of the PIPE memory
controller that lets the mole and the user design share the memory. The user
design, the PIPE router, the bus interfaces and the SRAM chips are outside it.

```
            P1 P2 P3 P4  (4 x 32 probe channels from the user design)
             |  |  |  |
       +-----+--+--+--+------+      +---------------------------+
       | mux 4:1    mux 4:1  |      |                           |
       | (trigger)  (capture)|      |   pm_port_mux (Mx)        |
PIPE   |     |          |    |      |                           |   PIPE memory
bus ---+ registers -> controller ---+-- MemPortB  (PIPE clock)  |   (SRAM, 2 banks,
       |  (13 regs)   FSM + addr  | |                     slot B+---- clk2x)
       |              counter     | |  MemPortA  (PIPE clock) |
       +--------------------------+ |  user design      slot A|
              mole                  +---------------------------+
```

## Files

| file | module | what it is |
|---|---|---|
| `rtl/sonic_pkg.sv` | package | sizes, register map, command/flag bits, FSM state enum, config struct, memory request struct |
| `rtl/mole_registers.sv` | `mole_registers` | the 13 host registers |
| `rtl/mole_mux4.sv` | `mole_mux4` | 32-bit 4:1 probe port selector (used twice) |
| `rtl/mole_controller.sv` | `mole_controller` | capture state machine and address counter |
| `rtl/mole.sv` | `mole` | the mole: registers + two selectors + controller |
| `rtl/pm_port_mux.sv` | `pm_port_mux` | shares the PIPE memory between two ports at twice the PIPE clock |
| `rtl/sonic_pipe_mole.sv` | `sonic_pipe_mole` | **top**: mole on MemPortB, user port on MemPortA, both through `pm_port_mux` |
| `tb/pm_sram_model.sv` | `pm_sram_model` | behavioural two-bank synchronous SRAM (testbench only) |
| `tb/tb_*.sv` | | one self-checking testbench per module, plus `tb_exec_time` |

## How a capture runs

The host drives a capture entirely through the registers:

1. It picks the trigger port and the capture port (SelTrgCH, SelOutCH). Any
   of P1..P4 can be either, and both may be the same port.
2. It writes the trigger pattern and mask (TriggerValueA/B) and the trigger
   edge (EdgeTrig). It may also write a store qualifier (StoreValueA/B).
3. It writes the store area (StoreAddress, MemSize, in 32-bit words) and the
   number of passes over it (RoundNo).
4. It writes Start to Operation_REG.

The controller then steps through its states:

| state | what happens | leaves when |
|---|---|---|
| INI | idle | Start → Clear Mem |
| Clear Mem | writes 0 to each word of the store area, one per clock | area done → Trigger Search |
| Trigger Search | checks the trigger port every clock | trigger → Store Search; Stop → INI |
| Store Search | writes each qualified capture sample to the next word | Stop or memory full → Finish; Pause → Pause |
| Pause | writes nothing | Resume → Store Search; Stop → Finish |
| Finish | clears all registers, then sets Finish_REG (one clock) | → INI |

The host polls Finish_REG. When it is non-zero, the host reads the store
area from PIPE memory. Because the controller clears the registers at the
end, the host must remember where it put the area. A Stop during Trigger
Search is an abort: it goes straight back to INI. It does not clear the
registers and does not set Finish_REG.

### Trigger and store qualifier

Both use a pattern (`A`) and a care mask (`B`; 1 = compare this bit, 0 =
don't care):

    match = ((port ^ A) & B) == 0

With every mask bit at 0 the condition always holds. A mask of all ones is
an exact-value compare. EdgeTrig selects which event of the trigger match
counts:

| EdgeTrig[1:0] | triggers when |
|---|---|
| 00 | the pattern matches (level) |
| 01 (positive edge) | the match starts: no match last clock, match now |
| 10 (negative edge) | the match ends: match last clock, none now |
| 11 | either |

For an edge of one signal, mask just that bit. A positive edge of bit *k* is
`A = B = 1<<k` with EdgeTrig = 01. A negative edge is the same pattern with
EdgeTrig = 10.

In Store Search, a sample is written only if it passes the store qualifier.
One use of the qualifier: put a counter and a "task busy" flag on one port,
trigger on the rising busy flag, and store only busy samples. The number of
words stored is then the task's run time in cycles (`tb_exec_time` does
this).

### Store area, rounds, and where each sample lands

Word *i* of the area is at `StoreAddress + i`, modulo 2^21. The address
counter wraps at MemSize. Each wrap completes one round. After RoundNo
rounds the memory counts as full (RoundNo = 0 counts as 1). With more than
one round the area works as a circular buffer, so it keeps the last MemSize
stored samples. Word 0 then does not hold the oldest sample unless the count
stored is a multiple of MemSize. With MemSize = 0 the capture finishes as
soon as the trigger is seen, and nothing is stored.

### Timing of the controller

- Clear Mem takes MemSize + 1 clocks.
- The capture port is registered once. The first word stored is the capture
  port's value in the clock in which the trigger was detected. After that,
  each stored word is one clock's sample (if it passes the qualifier).
- With no Pause, no Stop and no qualifier, ResetReg pulses
  `MemSize × rounds + 2` clocks after the trigger clock.
- A command written on the bus at the edge that ends clock *e* is seen by
  the controller in clock *p* = *e*+1. If Pause is first seen in clock *p*,
  the last sample stored is that of clock *p*−2. If Resume is first seen in
  clock *q*, storing restarts with the sample of clock *q*. The testbenches
  check these exact boundaries.
- Memory writes are one per clock, with no handshake. `pm_port_mux`
  guarantees a slot every PIPE clock.

## Registers

The registers are on the PIPE bus at 8-byte steps; the data path is 64 bits.
A write happens on the rising clock edge when `iPBSel` and `iPBWrite` are
both 1. Reads are combinational while `iPBSel`=1 and `iPBWrite`=0.

| addr | register | bits | meaning here |
|---|---|---|---|
| 0x000 | Mode | 4 | bit 0: 0 = embedded, 1 = standalone (brought out as `oMoleMode`). A read also returns the controller state in bits [7:4] |
| 0x008 | EdgeTrig | 4 | bit 0 positive edge, bit 1 negative edge |
| 0x010 | Operation | 4 | bit 0 Start, bit 1 Stop, bit 2 Pause, bit 3 Resume |
| 0x018 | TriggerValueA | 32 | trigger pattern |
| 0x020 | TriggerValueB | 32 | trigger care mask |
| 0x028 | StoreAddress | 21 | first word of the store area |
| 0x030 | StoreValueA | 32 | store qualifier pattern |
| 0x038 | StoreValueB | 32 | store qualifier care mask |
| 0x040 | MemSize | 21 | words in the store area |
| 0x048 | RoundNo | 4 | passes over the area |
| 0x050 | SelOutCH | 4 | capture port, bits [1:0]: 0..3 = P1..P4 |
| 0x058 | SelTrgCH | 4 | trigger port, bits [1:0]: 0..3 = P1..P4 |
| 0x060 | Finish | 4 | bit 0 done, bit 1 memory full, bit 2 stopped; the host clears it by writing 0 |

Operation holds levels, not pulses. To give a command, write the whole
register with just that command's bit set. Writing Resume also clears
Pause; writing Stop clears Start. State codes: 0 INI, 1 Clear Mem,
2 Trigger Search, 3 Store Search, 4 Pause, 5 Finish.

## Sharing the PIPE memory (`pm_port_mux`)

The PIPE has one SRAM interface but two memory ports: MemPortA for the user
design and MemPortB for the mole. The SRAM runs at twice the PIPE clock (133
and 66 MHz on the original board). In each PIPE clock period, port A gets the
SRAM slot in the middle of the period, and port B gets the slot at its end.
Neither port ever waits. This module also makes the PIPE clock (`oClk`) by
dividing `clk2x` by two, so that the two clocks stay phase-locked. The
divider has no reset and keeps running while reset is asserted. This lets the
PIPE-clock logic see clock edges during reset.

Port timing, for a request held on a port during PIPE cycle *n*:

- Port A's request reaches the SRAM at the `clk2x` edge halfway through *n*.
  Port B's request reaches it at the edge that ends *n*.
- Read data, for either port, is on `oRdataA` / `oRdataB` for the whole of
  cycle *n*+2 (read latency 2).
- A port always presents a request. A read that nobody uses costs nothing.
- If both ports write the same word in one cycle, port B's data remains.
- A port A read sees every write issued before it, including port B's write
  from the previous cycle. A port B read also sees port A's write from the
  same cycle.

On the memory side, `oPm` is registered on `clk2x`. `iPmRdata` must return
the word of the request that was presented at the previous `clk2x` edge,
which is what a pipelined synchronous SRAM does. Each request carries a bank
bit. The top's `iMoleBank` selects which bank the mole writes. Tie it to the
bank the user design does not use.

## Top module `sonic_pipe_mole`

Only `clk2x` and `rst_n` (asynchronous, active low) come in; `oClk` goes
out. The PIPE bus, probe ports and MemPortA are synchronous to the rising
edge of `oClk`. The PIPE memory interface (`oPm`, `iPmRdata`) is synchronous
to `clk2x`. The top also brings out the mole's Mode register, state, trigger
pulse and address counter as status outputs.

In the original system the two operating modes differ only in what the probes
are connected to. In embedded mode the mole is built into the user's PIPE
and watches its internal signals. In standalone mode a whole PIPE holds only
the mole and watches the board buses. The RTL is the same in both modes. The
Mode register only records the mode for the host and for surrounding logic.

## Verification

Every testbench checks itself and ends with a `TB_RESULT checks=N failures=M`
line. Each also has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_mole_mux4` | all select values against random port data |
| `tb_mole_registers` | write/read of all 13 registers with width truncation, ignored address bits, unselected and unmapped accesses, state in the Mode read, flag OR-ing, clear on ResetReg |
| `tb_mole_controller` | the trigger decision every clock against a reference (level, positive and negative edge); clear cycles and contents; stored words by exact cycle; the store qualifier; pause/resume boundaries; 3-round wrap; Stop in Trigger Search, Store Search and Pause; finish flags; cycles from trigger to finish |
| `tb_pm_port_mux` | 2000 cycles of random reads and writes from both ports to a few shared words, against a reference; read latency 2; clock ratio |
| `tb_mole` | the whole mole through the bus only: port selection, register clearing at finish, pause/resume over the bus, a store area that wraps past the top address |
| `tb_sonic_pipe_mole` | end to end at full size. Run 1: trigger P1 = 0x80, capture P3, 0x1000 words at 0x40000, while the user writes its bank on MemPortA every cycle. Then a positive-edge run with qualifier, pause/resume and 3 rounds, a Stop in Trigger Search, and a negative-edge run stopped in Store Search. Results are read back through MemPortA. Each mechanism is counted and must occur at least once |
| `tb_exec_time` | measures a 137-cycle task with a counter and the store qualifier |

To simulate with Verilator, for example the top's testbench:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -yrtl -ytb \
    rtl/sonic_pkg.sv tb/tb_sonic_pipe_mole.sv --top-module tb_sonic_pipe_mole
./obj_dir/Vtb_sonic_pipe_mole
```

The other testbenches build the same way. The package must come first on the
command line. Every testbench runs in a few seconds at the default sizes.
`pm_sram_model` holds the full 2 × 2^21 words (16 MiB), and it resets every
word to zero at time 0.

## Where this design fills in or departs from the original

The original description gives the block structure, the register names,
addresses and widths, the controller's states and transitions, the probe
port sizes, and the clock rates. The following are this design's own
choices.

- **Register bit meanings:** command bits in Operation, EdgeTrig bits, Finish
  flag bits, port numbering in SelTrgCH/SelOutCH, and the controller state in
  the Mode read.
- **Pattern registers:** ValueA is the pattern and ValueB the care mask.
- **Store qualifier:** storing only samples that pass StoreValueA/B is a
  reading of those registers and of the state name "Store Search".
- **RoundNo:** read as the number of passes over a circular store area.
- **Clear Mem:** writes zeros to exactly the store area.
- **Where commands are honoured:** they are taken only where the original
  state diagram draws them. Pause is honoured in Store Search only, not in
  Trigger Search, and Stop is ignored during Clear Mem. The original text also
  speaks of pausing the trigger search.
- **PIPE bus protocol:** the register-access protocol is assumed, with a
  12-bit byte address and combinational reads.
- **Memory port sharing:** the port multiplexer serves both ports in every
  PIPE clock. The original states only that the embedded mode expects the
  two memory ports not to be used at the same time, without giving the
  controller's details. This design relaxes that to "not the same words".
- **Memory words:** 32 bits, one sample per word. The bank bit sits in the
  request.
- **Clocks:** the PIPE clock is derived by dividing the memory clock.
- **Not built:** the rest of the PIPE memory controller (the paths to the
  PIPE router), the router, the bus control, the PE registers, the user
  logic, and the board-level buses and PCI bridge. None of these is
  specified in enough detail.
- **Not evaluated:** area and timing. The original mole occupied about 510
  Virtex-E slices at 66 MHz. Generic synthesis of this mole gives roughly
  190 word-level cells and 263 flip-flops, which says little about slices.
