# tCUFFS / iCUFFS: checkpoint monitoring for MPSoC security and reliability

Software attacks on an embedded multiprocessor, such as buffer overflows and code injection, need the program to leave its normal control flow. Soft errors in instruction memory have the same effect. The idea here is to let a dedicated monitor check, while the program runs, that every application processor moves through its program the way the compiler saw it.

Each basic block of every program starts with a checkpoint instruction. That instruction sends an encrypted block identifier to the monitor, together with a hardware counter reading. The monitor keeps a table for each processor with the legal successors of each block and how long the block should take. A checkpoint is wrong if it names an unexpected block, or if it arrives too early or too late. Either case raises an error and aborts all processors.

There are two variants, and both are built here. They sit side by side in the top module and share only the clock and reset.

| | tCUFFS | iCUFFS |
|---|---|---|
| checkpoint | `tCUFFB` at the start of each block | `iCUFFB` at block start, plus `iCUFFE` before a system call |
| counter attached | cycle count (CC) | retired-instruction count (IC) |
| per-block limit | `Tmin..Tmax` cycles (a window) | exact instruction count |
| errors | TIE (timing), CFE (control flow) | ICE (count), CFE, TOE (time-out), CSE (checksum) |
| monitor loop | read, then verify: `N+2` cycles | read, verify, probe all ICs: `N+5` cycles |

The application processors and the monitor's processor core are not part of this RTL. Their signals are ports: a retire strobe, an in-interrupt flag and a checkpoint strobe with its kind and encrypted ID. The monitor's firmware loop is built as a small hardware sequencer.

## The checkpoint message

The shared types are in `rtl/cuffs_pkg.sv`.

- **SID** (16 bits) is `{pId[15:13], bId[12:0]}`: the processor number and the basic-block number. This gives up to 8 processors and 8192 blocks.
- The SID sits in the binary in encrypted form, so a forged or injected jump cannot simply name a legal block. `sid_cipher` is a 4-round Feistel network on the two bytes. Its round function is `F(r,k) = rotl3(r ^ k) + (r ^ 8'h5B)`, and round `i` uses byte `i` of the 32-bit `KEY` parameter. `DECRYPT=1` (the monitor side) runs the rounds backwards. In a real chip the key would come from a PUF. Here it is a parameter.
- **cp_msg_t** (58 bits), the word written into the FIFO:
  - `kind` (2 bits): `CP_TCUFFB`, `CP_ICUFFB` or `CP_ICUFFE`;
  - `esid` (16 bits): the encrypted SID;
  - `count` (32 bits): CC or IC, including the checkpoint instruction itself;
  - `ecs` (8 bits): the encrypted checksum (iCUFFS only, zero otherwise).

## App side: counters, ports, FIFOs

`cuff_counter` is the CC or IC register. It counts `inc`, which is every cycle for tCUFFS or every retired instruction for iCUFFS. Its `value` output is the count minus COUNT_ISH, the amount counted while `in_isr` was high. Interrupt handlers are therefore invisible to the checks. `deduct` is set once any interrupt time has been taken off. `value_next` is the value that includes the current cycle, and this is what a checkpoint reports.

`cuff_port` is the checkpoint hardware of one processor. When `cp_valid` is high and the FIFO has room, it writes `{kind, esid, count, ecs}` in the same cycle. When the FIFO is full it raises `stall`, and the processor holds the checkpoint until the cycle it is accepted. In iCUFFS mode the port also answers the monitor's probe. A one-cycle `probe_req` returns `probe_ack` in the next cycle, with `probe_count` equal to the IC at the request cycle.

`sync_fifo` is a plain synchronous FIFO: first-word fall-through, `full` and `empty`, and a default depth of 4 words. Assertions forbid a push when full and a pop when empty.

## tCUFFS: the timing check (`tverify_unit`)

There is one lane per processor. Lane `j` only ever sees FIFO `j`. On each message, the lane:

1. decrypts the SID;
2. flags **CFE** if the pId is not `j`, or if the bId is not in the table;
3. on the first message, requires the block to be marked as an entry block;
4. on later messages, requires the block to be a listed successor of the previous block (CFE otherwise);
5. takes `count - prev_count` as the run time of the block that just ended (the previous block) and flags **TIE** unless `Tmin <= t <= Tmax` for that block, both limits inclusive;
6. records the new block and count, even when the message failed, so that one fault gives one error;
7. sets `done` when the block is marked as an exit block.

Errors are sticky.

## iCUFFS: the count check and the probe

`iverify_unit` is the same kind of lane, but it checks counts exactly. The instruction count since the last checkpoint must equal the table's count for the previous block. A block that ends in a system call has an `iCUFFE` before the call:

- the `iCUFFE` must name the block just opened by `iCUFFB`;
- the block's count runs from its `iCUFFB` to the `iCUFFE`;
- the instructions in the system call, up to the next `iCUFFB`, are not checked, because system calls are trusted;
- two `iCUFFE` in a row are a CFE.

Counting instructions instead of cycles makes the check exact and independent of cache and bus timing. That comes at a cost: a processor that simply stops reporting checkpoints would never be caught. **iCHK** (`ichk_unit`) closes this gap. Once every monitor loop it pulses `probe_req` to all ports, and one cycle later it reads back all ICs. For each processor it flags **TOE** if `IC - prevIC` is larger than the table count of the previous block, or larger than `SYSCALL_MAX` (default 4096) after an `iCUFFE`.

A processor whose checkpoint is still waiting in its FIFO would look overdue even though it is behaving correctly. To avoid this, iCHK latches the FIFO empty flags in the probe cycle and checks only processors that meet all of these conditions:

- active;
- started;
- not done;
- FIFO empty.

### Checksum extension

With `CS_EN=1`, the port adds an 8-bit checksum to each iCUFFS message and the lane checks it before anything else.

- The checksum is a CRC-8 with polynomial `x^8+x^2+x+1`, initial value 0, taken MSB first over `{kind, esid, count}`.
- It is encrypted by XOR with `KEY[31:24] ^ KEY[7:0]`.
- A mismatch raises **CSE**, and the message is discarded without touching the lane state.

This catches soft errors and tampering on the link between processor and monitor. In `cuff_checksum` the CRC is built as the XOR of one constant per set input bit. The constants are worked out at elaboration by a constant function from the polynomial, so no table is stored.

`icuffs_system` has a `link_flip` input per processor. It is XORed onto the FIFO write data, so link faults can be injected. Tie it to zero in normal use.

## The monitor loop (`tcuffs_monitor`, `icuffs_monitor`)

`run` starts the loop after the tables are loaded. Each state takes one cycle:

- **tCUFFS:** `READ` visits FIFO 0..N-1, one per cycle, and pops the head of every non-empty FIFO into a holding register. `VERIFY` steps all lanes with a message at once, as N SIMD units. `TEST` updates the status. A full loop takes **N+2 cycles**.
- **iCUFFS:** `READ` (N cycles), then `VERIFY`, then `CHK`: 3 cycles for the probe request, the ack and the evaluation. `TEST` follows. A full loop takes **N+5 cycles**.

The status outputs:

- `error` is the OR of the lanes' sticky errors, masked by `active`;
- `abort` follows `error`, to stop all processors;
- `irq` names the processors at fault;
- `done` is high when every active lane has reached an exit block;
- `halted` means the loop stopped, on either error or done;
- `msgs_checked` counts the messages verified.

## Tables (`bb_table`)

Each lane has a table of `DEPTH` entries (default 1024). An entry `bb_entry_t` (122 bits) holds:

- the `is_entry` and `is_exit` flags;
- up to 4 successors, each with a valid bit;
- `lo` and `hi`.

For tCUFFS, `lo` and `hi` are `Tmin` and `Tmax`. iCUFFS uses `lo` as the exact instruction count. There are two asynchronous read ports: one for the current block and one for the previous block. A valid bit per entry is cleared by reset, and an ID outside the table reads as invalid. A loop whose trip count is known at compile time has its checkpoint placed before the loop body, and the back branch jumps past it. The checkpoint then runs once per loop, and the table entry holds the time or count of the whole loop. A loop with an unknown trip count reports every iteration and lists itself as a successor. Tables are loaded through `cfg_we/cfg_pid/cfg_bid/cfg_entry` before `run` is raised, which stands in for tables that are fixed when the chip is built. At the default sizes the top holds about 1.5 Mbit of table memory.

## Departures and own choices

These points follow the design's intent, but the details are choices made here:

- All widths and depths: SID 16, CC and IC 32 bits, 1024 blocks, 4 successors, FIFO depth 4.
- The cipher, the CRC and `SYSCALL_MAX`.
- The entry and exit flags that define the start check and `done`.
- The active mask for processors that have no program.
- The empty-FIFO rule that avoids false TOEs.
- The cycle timing of the loop and the probe.
- The limits belong to the block that just ended, because a checkpoint starts a block.
- The error state is sticky until reset.
- The loop is a hardware sequencer, not firmware on a processor core.
- The tables are loadable RAM, not fixed logic.
- The encryption of SIDs by a trusted loader and the PUF key are not built. The testbenches encrypt with their own reference model.
- The whole fabric runs on one clock. A monitor clocked faster than the application processors would need dual-clock FIFOs and a synchronised probe path, and neither is built.
- Default `N_APP = 6`, which is the largest configuration evaluated (a JPEG encoder on 6 application processors). The MP3 and JPEG-decoder systems (5 processors each) run with one lane masked off.

## Files

Each file begins with a comment that describes it.

- `rtl/`:
  - `cuffs_pkg`;
  - `sid_cipher`, `cuff_checksum`, `cuff_counter`, `sync_fifo`, `cuff_port`, `bb_table`;
  - `tverify_unit`, `iverify_unit`, `ichk_unit`;
  - `tcuffs_monitor`, `icuffs_monitor`;
  - `tcuffs_system`, `icuffs_system`;
  - the top, `cuffs_mpsoc_top`.
- `tb/`:
  - `tb_<module>` per module;
  - `tb_ref_pkg`: independent cipher and CRC models;
  - `tb_prog_pkg`: random programs with tables and traces;
  - `app_proc_model`: a behavioural processor that plays a trace, with gaps, interrupts, stalls and system calls.

`tb_cuffs_mpsoc_top` runs the top at its default parameters through five scenarios:

1. a legal run;
2. a timing fault (TIE) and a count fault (ICE);
3. forged SIDs (CFE);
4. a silent processor (TOE);
5. a link bit flip (CSE).

It counts how often each mechanism occurred (stalls, interrupts, system calls, probes, each error, done, abort) and fails if any count is zero.

`tb_workloads` runs the three evaluated system sizes on the default top: a JPEG encoder with 6 application processors, and MP3 and a JPEG decoder with 5 each. The real benchmark code is not available, so every processor runs a random instrumented program. Each run must end in `done` with every checkpoint checked and no error. On a 5-processor system the sixth slot is masked off.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/cuffs_pkg.sv tb/tb_ref_pkg.sv tb/tb_prog_pkg.sv tb/tb_cuffs_mpsoc_top.sv \
  --top-module tb_cuffs_mpsoc_top
./obj_dir/Vtb_cuffs_mpsoc_top
```

For a unit testbench, replace the last file and the top name, for example `tb/tb_tverify_unit.sv` with `--top-module tb_tverify_unit`. The packages are only needed by the testbenches that import them.
