# dft03: dynamic triple modular redundancy on an interleaved RV32I core

Triple modular redundancy (TMR) corrects a single upset on the spot, but it
costs three copies of everything, all the time. Dual modular redundancy (DMR)
costs two copies, but it only detects an error. Something else has to bring
the machine back to a correct state, usually a software checkpoint and
rollback.

This core gets TMR's recovery at DMR's running cost. It is an
interleaved-multi-threading (IMT) processor with three hardware threads
("harts") sharing one four-stage pipeline.

- **Normal operation.** Harts 2 and 1 run the same program one cycle apart,
  and every architectural effect is compared before it happens. This is
  buffered DMR.
- **Recovery.** When a comparison fails, the third hart (hart 0, the
  auxiliary hart) is woken for four cycles. It re-executes the last
  instruction that was voted correct. Its result is majority-voted against
  the copies that harts 2 and 1 left in buffers, and all three harts continue
  from the voted state.

There is no checkpoint, no software handler and no state copy. Only the
auxiliary hart's PC (the "dummy PC") is kept current while it sleeps.

Everything here is synthesizable SystemVerilog-2017 in `rtl/`, with
self-checking testbenches in `tb/`.

## Harts and the pipeline

The stages are IF, ID, IE and WB.

- **Normal mode.** The fetch slot alternates 2, 1, 2, 1, …. Instruction *k* of
  hart 2 is one stage ahead of the same instruction of hart 1:

  ```
  cycle      c     c+1    c+2    c+3    c+4
  IF        2:k    1:k   2:k+1  1:k+1  2:k+2
  ID              2:k    1:k   2:k+1  1:k+1
  IE                     2:k    1:k   2:k+1
  WB                            2:k    1:k
  ```

- **Throughput.** A program advances by one instruction every two cycles,
  with no stalls.
  - The next PC of an instruction is computed in IE. It is fed straight to
    the fetch of that hart's next instruction, which happens in the same
    cycle (`pc_unit`).
  - Operands are read in IE from the hart's own register file. The value
    being written back in the same cycle is forwarded (`dft03_core`). This is
    how a dependent instruction two cycles behind its producer gets the new
    value.
- **Register files.** Each of harts 2 and 1 has its own PC and its own 32×32
  register file. Both files are written together, with the voted value.
- **Hart 0.** It has a PC (the dummy PC) but no register file. When it runs,
  it reads its operands through a voter over the two other files. The same
  voter compares the two files on every read and reports a difference on
  `rf_mismatch_o`. That output is for detection only; nothing is repaired
  from it.

## The three votes

Nothing architectural changes until the two copies of an instruction agree.
There are three comparison points (`dtmr_voter`, `vote_buffer`):

| Vote | When | Compares | On a match |
|------|------|----------|------------|
| PC | hart 2 in IE, hart 1 in ID | pc_IE of hart 2 with pc_ID of hart 1 | the dummy PC takes the address |
| LSU | hart 1 in IE | hart 1's memory request (re, we, address, byte enables, data) with hart 2's buffered request | the request goes to the data memory, once |
| WB | hart 1 in WB | hart 1's write-back record (pc, rd, value, load info) with hart 2's buffered record | the value is written into both register files |

- **Buffers.** Hart 2 reaches IE one cycle before hart 1. Its request and its
  write-back record are captured into per-hart buffers (`vote_buffer`, one for
  LS requests and one for WB records). Hart 1's live copy is then compared
  with them.
- **Loads.** A load goes to memory only once. The word that comes back serves
  both harts, and the WB vote checks everything else in the record.
- **Detection signals.** A failed vote raises `restore_pc_o`, `restore_lsu_o`
  or `restore_wb_o`.

## Restore, cycle by cycle

This is the part that needs the most care. Take cycle *d*, where any vote
fails (`restore_unit`):

| cycle | mode | what happens |
|-------|------|--------------|
| d | NORMAL | detection: **every commit of this cycle is suppressed** (no register write, no memory access, no dummy-PC update); the pipeline is flushed |
| d+1 | R_FETCH | hart 0 fetches the instruction at the dummy PC |
| d+2 | R_DECODE | hart 0 decodes it |
| d+3 | R_EXEC | hart 0 executes; the LS voter takes the bitwise majority of hart 2's buffer, hart 1's buffer and hart 0's live request; hart 0's next PC is loaded into all three PCs |
| d+4 | R_WB | three-way WB vote and commit; hart 2 fetches again |
| d+5 | NORMAL | hart 1 fetches; normal DMR resumes |

**Why this is correct.** The instruction at the dummy PC is the youngest one
whose address was voted good. At cycle *d*, its commit has not yet happened,
or was just suppressed.

- **PC failure (on instruction *k*).** The dummy PC holds *k*−1. That
  instruction's WB vote falls in cycle *d* and is suppressed.
- **LSU failure (on *k*).** The dummy PC holds *k*. Its WB vote has not
  happened yet.
- **WB failure (on *k*).** The dummy PC holds *k*. The PC vote of *k*+1 in the
  same cycle is blocked from updating the dummy PC.

In every case, hart 2's copy of the re-executed instruction is still in its
buffers, and so is hart 1's copy. Hart 2's capture is blocked in a detection
cycle, so a wrong younger copy never overwrites it. The three-way vote
therefore works on three copies of the same instruction, and re-execution
never applies an instruction twice.

**Boot window.** The very first vote after reset has no voted instruction
behind it. A restore that happens before any PC vote has succeeded sends all
harts back to the boot address instead (`pc_unit`).

**Cost.** The core is out of normal mode for four cycles. Against a
fault-free run, the program loses:
- six cycles for a PC or WB detection;
- five cycles for an LSU detection, because that detection sits one stage
  later in the instruction's life.

`tb_dft03_top` checks these numbers exactly. Detections during a restore are
ignored, because the scheme assumes one upset per restore.

## Memories

`prog_mem` and `data_mem` store 39-bit code words. The code is an extended
Hamming SECDED (39,32) code (`ecc_enc`, `ecc_dec`):
- check bits sit at the power-of-two positions;
- the overall parity bit sits at bit 0;
- single errors are corrected and double errors are flagged (`*_ecc_single_o`,
  `*_ecc_double_o` on the top).

Reads are synchronous: data arrive the cycle after the request.
- **Data memory.** Sub-word stores are done as a read-modify-write of the
  whole code word. This happens in the store cycle, through a second decoder.
- **Program memory.** It has a separate word-wide load port.
- **Host access.** The data memory has a host port, used to place data and
  read results.

Both memories default to 8192 words (32 KiB).

## How far it can be trusted

Every block has a unit testbench. On top of those:

- **`tb_dft03_core`** runs a program on the bare core against a reference
  instruction-set simulator (ISS), with 29 injected upsets and 29 restores.
- **`tb_dft03_top`** runs CRC-32 plus a routine covering every RV32I
  instruction class, at full memory size.
  - It runs once clean (2 cycles per instruction) and once with upsets in the
    PC of an instruction in ID, a write-back record, a store immediate and
    both memories' read registers.
  - Each mechanism has to occur at least once: PC, WB and LSU restores,
    three-way retires, ECC corrections and write-back forwarding.
  - The final state must match the ISS.
- **`tb_pc_restore_example`** replays a PC restore cycle by cycle, on a
  program at 0x700.
  - Hart 1's pc_ID is flipped from 0x714 to 0x734.
  - The PC vote fails in that cycle, hart 0 fetches 0x710 one cycle later,
    and 0x710 is committed by the three-way vote four cycles after the fault.
    In the same cycle hart 2 fetches 0x714, and hart 1 fetches it one cycle
    later.
  - Every instruction takes effect exactly once.
- **`tb_dtmr_workloads`** runs a time-frame fault campaign:
  - three kernels: CRC-32 over 144 bytes (14,703 cycles), an 8-tap FIR with
    62 outputs (about 48,000 cycles), and a 32-point radix-2 Q15 FFT (about
    95,000 cycles), whose output is also checked against an exact DFT;
  - FIR and FFT multiply in software, by shift and add, so their cycle counts
    depend on the random data;
  - each run is cut into 10 time frames;
  - for each target register and frame, one random bit is flipped every 35
    cycles inside the frame (never during a restore);
  - a frame fails if the result is wrong or the program does not finish.

Results of the campaign (failing frames out of 10):

| target register | CRC-32 | FIR | FFT |
|-----------------|--------|-----|-----|
| pc_ID, pc_IE | 0 | 0 | 0 |
| IE decoded instruction | 0 | 0 | 0 |
| WB record | 0 | 0 | 0 |
| program / data memory read register | 0 | 0 | 0 |
| hart tag in ID, IE or WB | 10 | 10 | 10 |
| valid bit of ID, IE or WB | 10 | 10 | 10 |
| a register of hart 1's register file | 0 | 0 | 0 |
| a register of hart 2's register file | 10 | 6 | 10 |

**Known gap: hart tags and valid bits.** The hart tags and valid bits of the
pipeline stages are not protected, and neither is the restore unit's mode
register. A flipped tag can make a vote be skipped, for example by turning
hart 1's instruction into hart 0's. That instruction is then silently lost,
or an already-committed instruction is re-executed. Protecting the tags, for
instance by deriving them from one alternation bit, is left open.

**Known gap: register files.** The register files are checked but not
corrected.
- A flip in a stored register is seen on `rf_mismatch_o` only when it is
  read.
- If the value is used, the two harts compute different results, and the WB
  vote catches it.
- But the restore cannot repair the register itself. Hart 0 reads through
  the voter, and with only two copies the voter passes on hart 2's value.
- A corrupted register of hart 1 is therefore out-voted every time it is
  used, at the cost of one restore per use, until it is rewritten. A
  corrupted register of hart 2 wins the three-way vote, which is the failing
  row of the table.
- A third, always-updated register file for hart 0 would close this gap, but
  at the running cost the scheme is meant to avoid.

## Departures from the original description

- **Register read stage.** Operands are read in IE, with forwarding, not in
  ID.
- **ISA.** RV32I only. FENCE, ECALL, EBREAK and the CSR instructions execute
  as no-operations.
- **CSRs.** There are no per-hart CSRs. Which CSRs exist, and how they would
  be voted, is left open; for example, a cycle counter would differ between
  harts one cycle apart.
- **Harts 2 and 1 during a restore.** Their instructions in flight are
  flushed and fetched again from the voted next PC, rather than held stalled
  in the pipeline. Nothing younger than the re-executed instruction has
  committed, so the two are equivalent in effect.
- **Commit suppression** in the detection cycle and the **boot-window rule**
  are choices of this design. They make re-execution of the dummy-PC
  instruction safe.
- **Register-file voter.** It detects only. Hart 0 reads through it and has no
  register file of its own.
- **Not specified, chosen here.** Memory sizes (32 KiB each), boot address 0,
  the SECDED code, one-cycle memories, and the host load ports.

## Files

| file | contents |
|------|----------|
| `rtl/dtmr_pkg.sv` | hart ids, modes, decoded-instruction, LS-request and WB-record types |
| `rtl/dft03_top.sv` | core + ECC program and data memories, host ports |
| `rtl/dft03_core.sv` | the pipeline, buffers, votes and commit rules |
| `rtl/restore_unit.sv` | mode machine and fetch scheduling of the harts |
| `rtl/pc_unit.sv` | PCs of harts 2 and 1, PC voter, dummy PC, next-PC bypass |
| `rtl/vote_buffer.sv` | per-hart buffer + DMR/TMR voter (used for LS and WB) |
| `rtl/dtmr_voter.sv` | two-way compare / bitwise majority |
| `rtl/regfile.sv` | 32×32 register file, 2 read, 1 write |
| `rtl/decoder.sv`, `rtl/exec_unit.sv`, `rtl/ls_unit.sv`, `rtl/wb_logic.sv` | RV32I decode, ALU and branches, request formation, load extraction |
| `rtl/ecc_enc.sv`, `rtl/ecc_dec.sv` | SECDED (39,32) |
| `rtl/prog_mem.sv`, `rtl/data_mem.sv` | ECC memories |
| `tb/rv_tb_pkg.sv` | instruction encoders and a small RV32I reference simulator |
| `tb/tb_<module>.sv` | unit testbench of each module |
| `tb/tb_dft03_top.sv` | end-to-end test at full size |
| `tb/tb_pc_restore_example.sv` | cycle-by-cycle replay of a PC restore (0x714 → 0x734) |
| `tb/tb_dtmr_workloads.sv` | CRC-32, FIR and FFT with the time-frame fault campaign |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Any testbench builds the same way; for example, the end-to-end
test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/dtmr_pkg.sv tb/rv_tb_pkg.sv tb/tb_dft03_top.sv \
    --top-module tb_dft03_top -Mdir build
./build/Vtb_dft03_top
```

Unit testbenches that do not use the reference simulator do not need
`tb/rv_tb_pkg.sv`.

The fault-injection testbenches inject upsets with `force` on pipeline and
memory read registers. Verilator reports each forced register as
`MULTIDRIVEN`, and `-Wno-fatal` keeps those expected warnings from stopping
the build. The RTL on its own lints without them. The campaign (`tb_dtmr_workloads`) takes about 65 s.

**Parameters.** Memory depths are parameters of `dft03_top` (`IMEM_WORDS`,
`DMEM_WORDS`), as is `BOOT_ADDR`.

**Hooks.** To add a mechanism, use the status outputs `mode_o`,
`restore_*_o`, `restores_o`, `restore_cause_o`, `retire_*_o` and `pc0_o`.
The testbenches use them to count events.
