# Core communication interface for partially reconfigurable FPGAs

This design lets hardware IP cores be loaded into an FPGA, and removed, while the rest of the
chip keeps running. The cores do not connect to each other or to the device pins directly.
Instead, a fixed **controller** is loaded first, and it owns the pins. Each core loaded later
(a **slave core**) plugs into one **socket** of a tiny serial bus that the controller provides.
A socket has only a request line, a grant line, a serial output and the shared data line, so a
core can be placed or replaced by rewriting only its own region of the device. Its I/O reaches
the world through the controller: the pins are "virtualised".

The RTL here is the case-study system built on that interface:

```
                 +--------------------------- controller ---------------------------+
  start  ------->|  prog_mem (16 x 16 LUT RAM) --> master_core (A, B, T)             |
  pm_we/addr/dat |                                   |  tx word      ^ rx word       |---> result / result_valid / done
                 |                                 send_module   receive_module      |
                 |                                   | req0/grant0   ^               |
                 |            arbiter  <--- request[3:0]   grant[3:0] --->           |
                 |            comm_bus <--- dataout[3:0]  ----> line ------------+---|---> line
                 +-----------------------------------------------------------------+
                     socket 0                 socket 1                  socket 2
                  slave_core (+)           slave_core (-)        s3_request / s3_grant /
                  addr 0x01                addr 0x02             s3_dataout top-level ports
```

The master core runs a small program. It loads immediate values into registers A and B. For
each arithmetic operation it sends both operands over the bus to the slave core that does that
operation: slave 1 adds, slave 2 subtracts. It then waits for the answer, stores it in T and
presents it on `result`, where a board would show it on an 8-digit display.

## The bus protocol

Everything rests on one 1-bit line that all cores read and that only the granted core drives.

* **Idle level.** The line rests at 1. On a real device, unused sockets must hold a *dummy core*
  that drives request = 0 and dataout = 1. Otherwise the floating tristate nets make the
  system unstable.
* **Packet.** One start bit (0), then a 40-bit word, most significant bit first: an 8-bit
  destination address, then 32 data bits. A packet takes 41 clock cycles.
* **Arbitration.** The arbiter looks at the request lines one per clock cycle, in turn. When
  the line under its pointer is high, it raises that core's grant for 41 cycles. It then moves
  on to the next line, even if the same core still requests. A steady requester therefore
  cannot starve the others: with all four requesting, grants come out 0, 1, 2, 3, 0, …
  Between packets there is at least one scan cycle.
* **Sending** (`send_module`). The core raises `disp` with a word on `word_in`. The send
  module raises `request`. In the first granted cycle it drives the start bit and stores the
  word. In the next 40 cycles it shifts the word out. In the cycle after the last bit it
  pulses `grantC` for one cycle. The cycle that follows is idle, so a core that keeps `disp`
  high to send a second word can swap `word_in` on seeing `grantC`. The master core does this
  for its second operand. There is no FIFO and no time-out.
* **Receiving** (`receive_module`). A 0 on an idle line is a start bit. The next 8 bits are
  compared with the module's address. On a match, the 32 data bits are gathered and handed
  over with a one-cycle `disp` pulse. On a mismatch, 32 cycles are let pass before looking
  for a start bit again. Every core, the sender included, watches every packet.

Cycle by cycle, with the grant first seen in cycle g:

| cycle        | line                | sender               | receiver                 |
|--------------|---------------------|----------------------|--------------------------|
| g            | start bit 0         | stores the word      | sees the start bit       |
| g+1 … g+8    | address, MSB first  | shifting             | gathers the address      |
| g+9          | first data bit      | shifting             | `addr_match` (if ours)   |
| g+9 … g+40   | data, MSB first     | shifting             | gathers or skips         |
| g+41         | 1 (grant dropped)   | `grantC` pulse       | `disp` + `data` valid    |

## The master core and its program

The program memory is 16 words of 16 bits with asynchronous read, sized like one LUT RAM. Its
contents are set at configuration (parameter `INIT`). They can be rewritten through the
`pm_we`/`pm_waddr`/`pm_wdata` port, which stands in for the reconfiguration tools that
normally patch it. A reset does not clear it.

| opcode [15:12] | meaning                                   | fields                                   |
|----------------|-------------------------------------------|------------------------------------------|
| `1` LOAD       | register ← zero-extended immediate        | [11:10] register, [9:0] immediate        |
| `2` ADD        | T ← r1 + r2, computed by slave 0x01       | [11:10] r1, [9:8] r2                      |
| `3` SUB        | T ← r1 − r2, computed by slave 0x02       | [11:10] r1, [9:8] r2                      |
| `F` END        | stop, `done` = 1                          | —                                        |

Register codes: 0 = A, 1 = B, 2 = T, 3 = reads as zero. Unknown opcodes are skipped. The
helpers `mk_load`, `mk_op` and `mk_end` in `ccif_pkg` build instructions. The default program
is A=8, B=7, T=A+B, T=T+A, T=T−B, T=A−T, END. It shows 15, 23, 16 and 0xFFFFFFF8.

The master runs from address 0 after reset. A LOAD takes one cycle. An ADD or SUB takes three
bus packets (operand 1, operand 2, answer) plus arbitration and handshakes. That is about 135
cycles in the case-study system, and at least 3 × 41 = 123. After END, or after the last
memory word, it halts. A `start` pulse clears A, B and T and runs the program again. An
answer that arrives while none is due is ignored.

## Slave cores

A `slave_core` is a `receive_module`, an `hw_core` and a `send_module`. The hw-core waits for
two words addressed to it. It adds them (`OP_ADD`) or subtracts the second from the first
(`OP_SUB`), modulo 2^32. It then sends `{0x00, result}` to the master core and waits for two
new words. Words that arrive while a result is still waiting to go out are dropped.

## Departures and choices

These points are not fixed by the interface as originally described. They are choices made
here:

* **Grant length 41, not 40.** The interface is described as granting the line for 40 cycles,
  but a packet is a start bit plus a 40-bit word. Here the grant covers all 41 cycles, and
  `grantC` comes 41 cycles after the grant.
* **Tristate buffers replaced by a multiplexer.** In the original, each core drives the line
  through its own tristate buffers, placed so that the core's and the controller's buffer
  layers share the routing wires. `comm_bus` resolves the line as "dataout of the granted
  socket, else 1" in plain logic. That suits current FPGAs, which have no internal tristates.
  The placement, the shared routing and the dummy cores are physical matters and are not
  modelled. In the top level, the spare socket is left for the user to tie off.
* **Clock and reset** are global. The reset is synchronous and active high.
* **Own choices:** the bit order, the addresses (master 0x00, slaves 0x01, 0x02, spare 0x03),
  the instruction encoding, the program memory depth and write port, the `start` restart and
  the extra `addr_match` output.
* **Not here:** the 8-digit display, which is outside the chip, and the device configuration
  memory with its frame addressing. The latter belongs to the bitstream tools, not to this
  logic.

## Files

| file                    | contents                                                    |
|-------------------------|-------------------------------------------------------------|
| `rtl/ccif_pkg.sv`       | widths, addresses, word struct, opcodes, instruction helpers |
| `rtl/arbiter.sv`        | serial round-robin arbiter                                   |
| `rtl/comm_bus.sv`       | data-line resolution                                         |
| `rtl/send_module.sv`    | request/grant handshake and serialiser                       |
| `rtl/receive_module.sv` | start detection, address filter, deserialiser                |
| `rtl/hw_core.sv`        | adder / subtractor user function                             |
| `rtl/slave_core.sv`     | one slave core on one socket                                 |
| `rtl/prog_mem.sv`       | master program memory                                        |
| `rtl/master_core.sv`    | program sequencer, registers A, B, T                         |
| `rtl/controller.sv`     | arbiter + bus + master core + its send/receive modules       |
| `rtl/ccif_top.sv`       | controller with slave 1 and slave 2; socket 2 on ports       |

The defaults are those of the case-study system. Change the number of sockets with
`controller.N_SOCKETS`, the program with `prog_mem.INIT`, and a slave's function and address
with `slave_core.OP`/`MY_ADDR`.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=N
failures=M` and stops itself through a watchdog if the design hangs.

* `tb_arbiter` compares the grant vector every cycle with a cycle model. It also checks the
  0,1,2,3 order under full load and the 41-cycle grants.
* `tb_send_module` and `tb_receive_module` check the handshake, the exact cycle of every bit
  and the cycle of every strobe. They also cover address mismatches that differ by a single bit.
* `tb_hw_core`, `tb_slave_core` and `tb_master_core` check arithmetic, addressing and programs
  against reference models. `tb_master_core` uses 20 random programs.
* `tb_controller` puts behavioural slave models (`tb_socket_model`) and a dummy core in the
  sockets. It checks the 12-packet sequence of the default program and the cycles between
  results.
* `tb_ccif_top` runs the complete system at its default sizes. It runs the default program,
  then rewrites the program memory with a random program and restarts it. Meanwhile, a core
  model on the spare socket floods the bus with packets to an unused address. The test counts
  and requires:
  - grants to all four requesters;
  - contention for the line;
  - packets skipped on address mismatch;
  - the master holding its request across two operands;
  - two complete runs.

Run one with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ccif_pkg.sv tb/tb_ccif_top.sv --top-module tb_ccif_top
./obj_dir/Vtb_ccif_top
```

The arbiter asserts that at most one grant is high. `--assert` turns that check on.
