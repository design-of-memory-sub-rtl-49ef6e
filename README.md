# Memory sub-system with constant-rate picture output for an H.264/AVC HD decoder

An H.264/AVC High profile, Level 4 decoder (1920x1080 at 30 frames/s, clocked at
162 MHz) spends most of its DRAM bandwidth on motion compensation. Small blocks are
fetched at scattered positions from several reference pictures. Each fetch risks a row
miss, and a miss costs a precharge plus an activate, in both latency and energy. The
decoder also has to manage the decoded picture buffer (DPB). The standard H.264 "bumping"
rule decides when a picture leaves for display, and it releases pictures in bursts: no
picture for a while, then two or three at once. The display read-out traffic is just as
irregular.

This RTL is the memory sub-system that sits between the video pipe and one 32-bit mobile
DDR SDRAM (256 Mbit, 4 banks x 4096 rows x 512 columns). It attacks both problems:

* **Checkerboard data arrangement.** The luma plane is cut into 32x32 blocks, and
  neighbouring blocks go to different banks. Everything that belongs to one 32x32 block
  sits in a single DRAM row: its luma, its chroma and its motion data. An 8x8 fetch
  therefore opens at most one row per bank. The chroma access that follows a luma access
  hits the row that is already open.
* **Adaptive auto precharge.** Every burst waits in a command FIFO. The FIFO notices when
  the *next* burst goes to another row of the same bank and marks the current burst for
  READ/WRITE with auto precharge. The row closes for free when it will not be used
  again, and stays open when it will.
* **Synchronization buffer.** Two SRAM banks work as a ping-pong pair at 8x8-block
  granularity. The DRAM works on one bank while the video pipe works on the other.
* **Constant-rate bumping.** The DRAM holds twice as many frame stores as the DPB needs.
  The extra half is a *regulation buffer* (RB), and with it the controller outputs **at
  most one picture per decoded picture**, in correct display order.

## Block diagram

```
 video pipe                                                      mobile DDR SDRAM
 (data fetch,        +-----------------+   +--------------------------------+   (via DDR pads)
  prediction,  blk_* | addr_translator |-->| ext_mem_if                     |
  deblocking) ------>| 32x32 checker-  |   |  cmd_fifo (hit flags)          |--> dram_cke, cs/ras/cas/we,
                     | board mapping   |   |  bank_state_reg                |    ba, a, dqm, dq_out
                     +-----------------+   |  timing_checker, nop_counter   |<-- dq_in
                          | burst's        |  unified command FSM           |
                          | buffer word    |  write data FIFO / read FIFO   |
                          v                +--------------------------------+
                     tag FIFO --------------------> |  read words   ^ write words
                                                    v               |
            p_* <-----------------> +-----------------------------------+
         (pipe port)                | sync_buffer: 2 SRAM banks, swap   |
                                    +-----------------------------------+
 pic_*, flush ---------> +--------------------------+
 out_* <---------------- | bumping_ctrl (DPB + RB)  |  frame store numbers = frame field
                         +--------------------------+  of the block requests
```

`mem_subsystem` is the top level. The CPU, the AHB buses, the video pipe modules and the
DDR pad cells are outside this RTL. Their side of the sub-system is brought out as plain
ports.

## Data arrangement in DRAM (`addr_translator`)

The DRAM is addressed in 32-bit columns. The burst length is 2, so one command moves one
64-bit word: 8 luma samples, or 4 interleaved Cr/Cb pairs.

| item | mapping |
|---|---|
| 32x32 luma block (bx, by) = (x/32, y/32) | bank = {by[0], bx[0]}, a B0 B1 / B2 B3 checkerboard |
| DRAM row | frame * 510 + (by/2) * 30 + bx/2 (one row per 64x64 cluster; 30 x 17 clusters per 1920x1088 frame) |
| luma sample (x, y) | column (y mod 32) * 8 + (x mod 32) / 4, columns 0-255 |
| chroma pair (x, y) (chroma units) | column 256 + (y mod 16) * 8 + (x mod 16) / 2: a 32-byte x 16-line block with Cr and Cb interleaved, columns 256-383 |
| motion data of the block | columns 384-447 |

`frame` is a frame-store number from 0 to 7. Eight stores take 4080 of the 4096 rows of
each bank.

A block request (`blk_req_t` in `mem_pkg`) names the component, the frame store, the
position, the size, a quarter-pel motion vector and the first word of the
synchronization buffer. The request can be a store (`we = 1`) or a fetch.

For a fetch, the integer part of the vector moves the block. A fractional luma component
widens the window by 2 samples before and 3 after, for the 6-tap filter. A fractional
chroma component adds 1 sample, for the bilinear filter. The chroma vector is the luma
vector read in eighth-pel units. The window is clipped to the picture, because the
prediction unit repeats the edge samples. It is then widened to whole bursts and scanned
line by line, one burst address per clock. Burst *k* of a request lands in buffer word
`sbuf_base + k`.

An 8x8 block with one fractional vector needs a 13x13 luma window and two 5x5 chroma
windows. That is 13 x 3 + 5 x 2 = 49 bursts. The worst block is split into four 4x4
partitions with four fractional vectors, and each partition is its own request. It
needs 4 x 9 x 2 = 72 luma bursts and 4 x 3 x 2 = 24 chroma bursts: 96 bursts in all.

## External memory interface (`ext_mem_if`)

### Adaptive auto precharge (`cmd_fifo`)

Every entry in the command FIFO carries a hit flag. A newly written entry has hit = 1.
When the next request is written, the flag of the entry before it is updated to

    hit = not(same bank) or (same row)

A switch to another bank keeps the row open, because the checkerboard makes that the
common case. A switch to another row of the same bank clears the flag.

When an entry reaches the head, hit = 0 selects RDA/WRA (A10 = 1) and hit = 1 selects a
plain RD/WR. The newest entry keeps hit = 1 until something follows it, so a row stays
open across a pause. If the next access later turns out to conflict, the FSM closes the
row with an explicit PRE.

### The command FSM

One FSM serves all four banks. Its states are power-on, PREALL, LMR, IDLE, auto refresh,
power down, row active, READ, WRITE, READ AP, WRITE AP, PRE and PREALL. Every cycle it
makes the same decision:

1. **Refresh due** (every `T_REFI` = 1263 clocks, 7.8 us). Issue PREALL if any bank is
   open, then AUTO REFRESH.
2. **Otherwise, the head request:**
   * Open row hit: issue RD/RDA or WR/WRA, chosen by the hit flag. A read waits for room
     in the read FIFO; a write waits for its data in the write FIFO.
   * Another row is open in that bank: issue PRE.
   * Bank closed: issue ACT.
3. **Nothing to do.** The FSM idles. After `PD_IDLE` idle clocks with all banks closed,
   it drops CKE to enter precharge power-down. It leaves power-down when a request or a
   refresh is due.

The `bank_state_reg` holds the open flag and the open row of each bank. The
`timing_checker` keeps per-bank counters (tRCD, tRAS, tRC, tRP, write recovery) and
global counters (tRRD, read/write turnaround). It reports which commands are legal in
the current clock. For auto precharge it works out when the precharge really ends: after
tRAS, after the burst, and, for a write, after tWR. The `nop_counter` times the waits
that belong to no bank: the 200 us power-up wait, tRFC and tMRD.

Power-up issues these commands in order: wait 200 us, PREALL, load mode register
(CL 3, sequential, BL 2), load extended mode register.

### Pins and timing

All DRAM pins are registered. The pad cells that serialise the two beats onto DQ/DQS are
not part of this design. `dram_dq_out`/`dram_dqm` carry both beats of one clock as
{beat1, beat0}, and `dram_dq_in` returns both beats CL = 3 clocks after the READ. Write
data follows the WRITE by one clock.

Each write-FIFO word is two 36-bit beats of {4 byte enables, 32 data bits}. Each
read-FIFO word is two 32-bit beats. Requests are served strictly in order.

Default timing at 162 MHz, in clocks: tRCD 3, tRP 3, tRAS 7, tRC 10, tRRD 2, tWR 3,
tWTR 1, tRFC 12, tMRD 2. These are typical figures for a 166 MHz mobile DDR part. They
are all parameters, so check them against the data sheet of the device you use.

The FSM counts every ACT, PRE, READ/WRITE, auto precharge, refresh and power-down. The
counts come out of the top as `n_*`, so the DRAM energy can be estimated as

    E = N_act * E_act + N_pre * E_pre + N_rw * E_rw

A typical part spends about 7 times more energy on an ACT or PRE than on a READ/WRITE.

## Synchronization buffer and the block period (`sync_buffer`, `mem_subsystem`)

The video pipe works in periods of one 8x8 luma block plus its two 4x4 chroma blocks.
Each SRAM bank holds 128 words of 64 bits. In one period:

* **DRAM side, the bank it owns:**
  1. It reads the reconstructed block that the pipe left in this bank and writes it to
     DRAM (store requests).
  2. It fills the bank with the reference windows of the next block (fetch requests).

  A tag FIFO remembers the buffer word of each outstanding read burst, so returning data
  is written to the right place.
* **Pipe side, the other bank.** The pipe reads the windows fetched in the previous
  period and writes the block it has just reconstructed.
* **End of the period.**
  1. The pipe pulses `fetch_done` after its last request of the period.
  2. The DRAM side reports done once the translator, the command queue, the write path
     and the outstanding reads have all drained.
  3. The pipe pulses `p_done` when it has finished with its bank.
  4. When both sides are done, `sbuf_swap` pulses and the banks change roles.

The testbench uses this buffer layout:

* fetched luma at words 0-71;
* fetched chroma at 72-95;
* the luma to be stored at 96-103;
* the chroma to be stored at 104-107;
* motion data at 108-109.

Each fetch request carries the first buffer word it should use. A block split into
four 4x4 partitions therefore places its four windows one after another.

## Constant-rate bumping (`bumping_ctrl`)

**The standard rule.** In the standard H.264 process, each decoded picture goes through
four steps:

1. Remove pictures that are neither waiting for output nor used for reference.
2. If the DPB has room, store the picture.
3. If the DPB is full, output the waiting picture with the smallest POC (picture order
   count, i.e. display position). If the current picture is a non-reference picture
   with an even smaller POC, output it directly instead.
4. Repeat until there is room.

Step 4 is where the bursts come from. A hierarchical-B stream decoded in the order
I0 P12 B4 B8 b2 b6 b10 (DPB of 4) outputs nothing for four pictures, then {0, 2}, {4, 6}
and {8, 10}.

**The constant-rate rule.** Here the same decision stops after **one** output per
decoded picture:

* **The DPB is still full after that one output.** The current picture goes into the RB
  instead of forcing a second output.
* **The DPB has room.** The current picture joins it. If pictures wait in the RB and
  nothing has been output in this period, the smallest waiting POC is output. That
  picture can be an RB picture or the current one.

The smallest POC is always taken over the waiting pictures of both the DPB and the RB,
so the display order is the same as with the standard rule. Only the timing is smoothed.
The example stream now outputs 0, 2, 4 after b2, b6 and b10, and then 6, 8, 10, 12 at
the end of the stream. The RB needs as many frame stores as the DPB, because the
standard rule can release all DPB pictures plus the current one in a single step.

Each of the 2 x `DPB_SIZE` frame stores has:

* a state: free, being decoded, in DPB, in RB, or being displayed;
* a POC;
* a reference flag;
* an output-needed flag.

A displayed store is freed one picture period after its output, which gives the display
one period to read it. Reference marking comes from outside (`unref_mask`), because it
belongs to slice-header decoding. `flush` drains the waiting pictures at the end of the
stream, one per pulse. After each decision the controller assigns a free store to the
next picture (`cur_fs`). That number is the `frame` field of the pipe's store requests.

Handshake: `pic_done` and `flush` are taken while `pic_ready` is high. A decision takes
three clocks plus two per bump iteration. `out_valid` pulses with `out_fs` and `out_poc`.

## Top-level interface (`mem_subsystem`)

| group | signals | notes |
|---|---|---|
| block requests | `blk_valid`, `blk_req`, `blk_ready`, `fetch_done` | one request accepted per `blk_valid && blk_ready`; a burst address then leaves each clock |
| pipe buffer port | `p_en`, `p_we`, `p_addr`, `p_wdata`, `p_rdata`, `p_done`, `sbuf_swap`, `sbuf_dram_bank` | 64-bit, read data one clock after `p_en` |
| bumping | `cur_valid`, `cur_fs`, `pic_ready`, `pic_done`, `pic_poc`, `pic_is_ref`, `unref_mask`, `flush`, `flush_empty`, `out_valid`, `out_fs`, `out_poc`, `bump_error` | |
| statistics | `init_done`, `n_act`, `n_pre`, `n_rw`, `n_auto_pre`, `n_ref`, `n_pdown`, `n_swaps`, `n_direct`, `n_rb_insert`, `n_out_rb`, `n_out_dpb`, `n_stall` | free-running 32-bit counters |
| DRAM | `dram_cke`, `dram_cs_n`, `dram_ras_n`, `dram_cas_n`, `dram_we_n`, `dram_ba`, `dram_a`, `dram_dqm[7:0]`, `dram_dq_out[63:0]`, `dram_dq_oe`, `dram_dq_in[63:0]` | to and from the DDR pad cells |

Parameters: `PIC_W` = 1920, `PIC_H` = 1088, `DPB_SIZE` = 4, `SBUF_WORDS` = 128,
`CMD_DEPTH` = 8, `T_REFI` = 1263 and `T_INIT` = 32400. The lower-level timing values are
in `mem_pkg`.

## Sizing

* **Frame stores.** At Level 4 and 1920x1088 the DPB holds 4 frames (32768 / 8160
  macroblocks). The RB doubles that to 8 frame stores: 8 x 510 = 4080 rows of 4096, and
  448 of the 512 columns of each row are used.
* **Bandwidth.** Real time at 162 MHz leaves 660 clocks per macroblock.
  * The original worst-case 8x8 analysis assumes every 4x4 block needs its own full
    interpolation window, spread over all banks. It arrives at about 940 clocks per
    macroblock on one DRAM, so that case would need four DRAMs.
  * This RTL drives one DRAM. In the end-to-end test its DRAM side needs about 261
    clocks per macroblock for 8x8 blocks with one random vector.
  * For worst-case blocks (four 4x4 partitions, four fractional vectors) it needs about
    513 clocks per macroblock.
  * Both figures include refresh. Both stay under 660 because each command moves one
    64-bit word and bank interleaving hides most activates.
  * The video pipe's own cycles are not part of this figure. No real sequence has been
    run through the design.
* **Synchronization buffer.** Each bank holds 128 x 64 bits.
  * The worst period has four 4x4 partitions with fractional vectors. It needs
    4 x 18 luma words, 4 x 6 chroma words and 14 words for the stored block and its
    motion data: 110 words.
  * A single 8x8 window needs only 49 words plus the 14.
  * A sample-exact count is about 5.4 kbit. The windows are fetched in whole bursts,
    which costs the difference.

## Where this design makes its own choices

* **DRAM parameters.** The timing values, burst length 2, CAS latency 3 and the
  mode-register contents are this design's choices. So are the refresh policy (PREALL
  then REF) and the power-down policy (after 64 idle clocks with all banks closed).
* **Hit flag.** The flag follows `not(same bank) or same row`. A plain "different
  address" comparison would close rows on every bank switch.
* **Burst Stop.** There is no Burst Stop state: with bursts of two beats there is never
  anything to stop.
* **No reordering.** The command queue does not reorder requests.
* **Interfaces.** The block-request format, the tag FIFO, the done/swap handshake and
  the 128-word buffer banks are this design's.
* **Bumping details.** Four choices here are this design's interpretation:
  * the frame-store states;
  * freeing a displayed store one period later;
  * allowing only non-reference pictures to be output directly;
  * letting the smallest-POC search cover the RB as well as the DPB.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_data_fifo` | random push/pop against a queue model, full/empty/count |
| `tb_cmd_fifo` | a worked access sequence and random streams against an independent hit-flag model, including the flag forwarded to the head |
| `tb_bank_state_reg` | random commands against a reference model of open rows |
| `tb_nop_counter` | wait lengths |
| `tb_timing_checker` | the first legal clock of each constraint |
| `tb_ext_mem_if` | 400 random reads/writes against the DDR model. Covers data integrity, no timing violation, auto precharge, refresh, power-down and power-up, and row-hit streaming (16 reads in 16 clocks) |
| `tb_addr_translator` | random fetches/stores against an independent address model |
| `tb_sync_buffer` | ping-pong ownership and data over many periods |
| `tb_bumping_ctrl` | the I0 P12 B4 B8 b2 b6 b10 example, and 20 random hierarchical-B streams against a model of the standard bumping process: same output order, at most one output per picture |
| `tb_mem_subsystem` | see below |
| `tb_mem_subsystem_qcif` | the same end-to-end run at 176x144 (QCIF) |

`tb_mem_subsystem` runs the top at its default parameters, including the full 200 us
power-up, against `tb/mddr_model.sv`. That model is a behavioural mobile DDR that stores
data and flags every protocol or timing violation.

The testbench acts as the video pipe. It decodes 23 pictures in hierarchical-B order,
including a deeper 8-picture pyramid, over 164 block periods. In each period it:

* fetches random luma and chroma windows: integer or fractional vectors, near picture
  edges, from reference or arbitrary frame stores;
* for one block in four, fetches the worst case instead: four 4x4 partitions, each
  with its own fractional vector;
* stores the reconstructed block with its two motion words, and fetches the
  co-located motion data;
* checks every fetched word against an independent model of the data arrangement.

It also averages the DRAM-side clocks per macroblock:

* normal blocks must stay within the 660-clock budget;
* worst-case blocks must stay within the 940 clocks of the original analysis. It also counts the following and fails if
any never happens:

* ACT, READ and WRITE commands;
* auto precharge;
* explicit PRE and PREALL;
* refresh and power-down;
* row-hit accesses;
* pipe stalls and buffer swaps;
* direct output, RB insert, RB output and DPB output.

It also checks that the internal counters agree with the pins. The whole run is about
63k clocks.

The stimulus, the data-arrangement model and the checks live in
`tb/mem_subsystem_e2e.svh`. `tb_mem_subsystem_qcif` includes the same file with
`PIC_W` = 176 and `PIC_H` = 144. At that size a frame store is 3 x 3 clusters, 9 rows
per bank, so the run checks the address map with another cluster pitch. Its DRAM side
needs about 265 clocks per macroblock for normal blocks and 523 for worst-case blocks.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_mem_subsystem -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/mem_pkg.sv tb/tb_mem_subsystem.sv
./obj_dir/Vtb_mem_subsystem
```

## Files

* `rtl/mem_pkg.sv`: shared types (`mem_req_t`, `blk_req_t`, `dram_cmd_e`) and DRAM constants.
* `rtl/mem_subsystem.sv`: the top level.
* `rtl/addr_translator.sv`: the address translator.
* `rtl/ext_mem_if.sv`, `rtl/cmd_fifo.sv`, `rtl/bank_state_reg.sv`,
  `rtl/timing_checker.sv`, `rtl/nop_counter.sv`, `rtl/data_fifo.sv`: the external memory
  interface and its parts.
* `rtl/sync_buffer.sv`, `rtl/sp_sram.sv`: the synchronization buffer. `sp_sram` is a
  plain array; replace it with an SRAM macro for a real chip.
* `rtl/bumping_ctrl.sv`: the constant-rate bumping controller.
* `tb/`: the testbenches, the shared end-to-end body `mem_subsystem_e2e.svh` and the
  DRAM model `mddr_model.sv`.
