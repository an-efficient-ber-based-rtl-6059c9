# Checkpoint/rollback protection for an SRAM-based FPGA region

A single-event upset can flip any bit of the configuration SRAM of an FPGA,
and with it the function of the logic that bit configures. The usual defence,
triple modular redundancy, triples the area. This design takes a different
route, backward error recovery (BER): it leaves the user's modules unchanged,
watches the configuration of the region they sit in, and when that
configuration is found corrupted, rolls the whole region back to a saved,
known-good state.

The design relies on two things the FPGA already offers:

* **Every configuration frame carries ECC bits.** Reading a frame back and
  checking its syndrome tells whether the frame was hit.
* **Flip-flops can be copied into configuration cells and back.** A
  *capture* order copies the value of every (unmasked) flip-flop into its
  cell in the configuration frames. A *restore* order loads the flip-flops
  from those cells. Read the frames back after a capture and you hold the
  complete state of the region's modules: a checkpoint. Write those frames
  back and restore, and the modules resume from that state. This also
  rewrites the corrupted configuration bits.

The checkpoint is *transparent*: capture takes one order, and the modules
never stop.

The RTL here implements this method as a hardware controller. It follows the
method published by Sahraoui, Ghaffari, Benkhelifa and Granado ("An Efficient
BER-based Reliability Method For SRAM-based FPGA"). In the published version
the controller is software on a soft processor. Here it is a state machine.

## The protected region and its frames

The user modules sit in an *Enhanced Reliability Region* (ERR), a set of
`n_frames` configuration frames numbered 0 … `n_frames-1` on the
configuration access port. The layout follows the CLB-column frame of a
Virtex-5 device. One frame is 1312 bits, carried as 41 words of 32 bits, and
36 frames configure one CLB column:

| words | frame bits | content |
|-------|------------|---------|
| 0 … 19  | 0 … 639     | 10 CLBs above the clock row |
| 20      | 640 … 651   | 12 ECC bits (11 Hamming check bits, bit 651 = overall parity) |
| 20      | 652 … 671   | 20 clock-row (HCLK) bits |
| 21 … 40 | 672 … 1311  | 10 CLBs below the clock row |

`N_FRAME_MAX = 144` is the default. That is the size of the larger of the two
test regions: a bubble sorter in 144 frames and a binary counter in 36 frames
(one column). `n_frames` selects the size at run time.

## The BER master

`reliability_controller` runs this loop:

```
start ──► first checkpoint ──► BER master ◄──────────────────────────────┐
                                  │                                       │
               checkpoint due? ───┼── yes ──► checkpoint & validation ───┤
                                  no                 │ rejected           │
                                  ▼                  ▼                    │
                       read back frame f,        recovery ───────────────┤
                       check its ECC                 ▲                    │
                                  │ faulty ──────────┘                    │
                                  │ clean: f = f+1 (wraps to 0) ──────────┘
```

**Detection.** Frames are read back one after another and fed word by word
to `frame_ecc`. A non-zero syndrome or parity marks the *whole frame* faulty.
It does not matter whether the ECC could have corrected it. This sidesteps
the weakness of SECDED, where three or more flips can pass for a correctable
single flip and make a "correction" that adds errors. A complete scan takes
`Worst_MTD = T_f_scan × N_frame`. This is also the longest time an upset can
go unnoticed.

**Checkpoint.** A checkpoint is due at start, after `ckpt_period` cycles
(periodic mode, 0 = off), or after a `ckpt_req` pulse (random mode). It is
taken at the next frame boundary and runs these steps:

1. UNMASK the region's frames.
2. CAPTURE the flip-flops into their cells.
3. READ every frame. Write each word into the *spare* checkpoint slot, and
   compare it in `frame_validator` with the initial bitstream, flip-flop
   cells masked out.
4. MASK the frames again.

An upset that lands between the capture and the end of the readback would
otherwise be saved into the checkpoint. The comparison with the initial
bitstream catches it. If every frame matches, the spare slot becomes the
active one. If one does not, the new checkpoint is thrown away and the region
is rolled back to the old one. If there is no old one yet, the checkpoint is
retried. The latency is `L = T_f_read × N_frame` plus a few cycles for the
four orders. The modules themselves lose no time (overhead C = 0).

**Recovery.** Recovery runs these steps:

1. WRITE every frame of the active checkpoint back.
2. UNMASK.
3. RESTORE the flip-flops.
4. MASK.

Writing the frames back costs `T_rollback = T_f_write × N_frame`. The work
the modules did since the checkpoint is lost (`T_lost`), so the total cost
of an upset is `R = T_rollback + T_lost`. After a recovery, any checkpoint
that was planned is dropped and the period restarts. The scan restarts at
frame 0 after every checkpoint and every recovery.

**What gets measured.** The controller counts checkpoints, recoveries,
rejected checkpoints and complete scans. It also records, in clock cycles,
the last `L`, `T_rollback` and `T_lost`, and reports the faulty frame. With
the behavioural configuration port used in the testbenches (first word 3
cycles after the command), the cycle counts are:

| region | T_f_scan | Worst_MTD | L | T_rollback |
|--------|----------|-----------|---|------------|
| 36 frames  | 86 | 3 096  | 3 063  | 2 991  |
| 144 frames | 86 | 12 384 | 12 243 | 11 955 |

A word costs two cycles because the safe storage has one cycle of read
latency. The rest of each frame is the command and the port latency.

## The frame ECC code

The device's own frame ECC is a vendor secret, so `ber_pkg` defines an
extended Hamming code of its own that fits the same 12 bits. Each frame bit
`p` has an 11-bit code word `ecc_code(p)`. The code words are a permutation
of 0 … 1311:

* ECC bit `640+k` has code `2^k`, for k = 0 … 10.
* The data bit at position `2^k` takes code `640+k` in exchange.
* Bit 651, the overall parity bit, has code 0.
* Data bit 0 takes code 651 in exchange.
* Every other bit's code is its own position.

The syndrome is the XOR of the codes of all set bits. The parity is the XOR
of all bits. To encode a frame, set ECC bit `640+k` to bit k of the syndrome
of the other bits, then set bit 651 to make the parity even.

A single flip at `p` gives parity 1 and syndrome `ecc_code(p)`. Two flips give
parity 0 and a non-zero syndrome. `frame_ecc` accumulates both one word per
cycle and reports the result one cycle after word 40.

Flip-flop capture cells change at every checkpoint, so they cannot be covered
by ECC bits computed when the bitstream was generated. The controller passes
the region's flip-flop mask as `word_ignore`, and the ECC of the initial
bitstream is computed with those cells at 0. The published method does not
say how it handles this. This treatment is this design's own.

## Configuration access port

The FPGA's configuration logic is not part of this RTL. The controller talks
to it through a simple frame-command port (`ber_pkg::cfg_cmd_e`):

| command | effect |
|---------|--------|
| `CFG_READ f`    | the port returns 41 words of frame `f` on `cfg_rvalid/cfg_rready/cfg_rdata` |
| `CFG_WRITE f`   | the controller sends 41 words on `cfg_wvalid/cfg_wready/cfg_wdata` |
| `CFG_UNMASK`, `CFG_MASK` | enable / disable capture and restore for the region |
| `CFG_CAPTURE`, `CFG_RESTORE` | copy flip-flops to cells / cells to flip-flops |

Commands use `cfg_cmd_valid/cfg_cmd_ready` with `cfg_far` (frame address).
They are held stable until accepted, and an assertion checks this. On a real
device an ICAP controller turns these into configuration packets. Masking on
a device means writing a special frame per column; here it is one command.

## Safe storage

There are three `safe_storage` RAMs, assumed free of upsets:

* `golden`: the initial bitstream of the region.
* `mask`: a 1 for every flip-flop cell.
* `ckpt`: two checkpoint slots.

In each, the region is stored as `f*41 + w`. Slot 1 of `ckpt` starts at
`N_FRAME_MAX*41`. A host loads `golden` and `mask`, and can read out
checkpoints, through `host_we/host_sel/host_addr/host_wdata/host_rdata`
(`host_sel` 0 = golden, 1 = mask, 2 = checkpoints; read data one cycle after
the address). The published platform keeps checkpoints on an external card
behind a SystemACE controller. On-chip RAM is this design's choice.

## The test modules

`binary_counter` (36 bits, the top 8 bits drive LEDs) and `bubble_sorter`
(16 values of 8 bits, one compare-and-swap per cycle, early stop) are the two
modules the method was tried on. They have no checkpoint port of any kind:
their state reaches the controller only through the configuration layer.
`ber_top` therefore places them beside the controller with their own ports.
The 36-bit width comes from the published flip-flop count. The sorter's size
and interface are this design's choice.

## How far to trust it; departures

* The published controller is software on a processor, with vendor IP for
  configuration access, ECC, storage, bus, UART and timer. Here a single
  state machine replaces all of that. Its frame-level behaviour follows the
  published flowchart and action lists.
* Design choices not in the published method:
  * two checkpoint slots;
  * rollback after a rejected checkpoint;
  * checkpoint requests served at frame boundaries;
  * the scan restarting at frame 0;
  * the ECC code;
  * excluding flip-flop cells from ECC;
  * the command port.
* Checkpoints are stored whole. Storing only the difference from the
  initial bitstream, suggested as a way to shrink them, is not implemented.
* Block RAM contents are not checkpointed, as in the published method, which
  treats only flip-flops.
* The published times are in milliseconds for software on the processor
  (0.82 ms to read a frame). They cannot be compared with the cycle counts
  above. Only the linear scaling with the number of frames is reproduced,
  and the testbenches check it.
* All verification is against a behavioural model of the configuration
  layer (`tb/config_layer_model.sv`). In that model the region's flip-flops
  behave as a counter: flip-flop `i` has its cell at frame `i % N`, word 3,
  bit `i / N`. This model is not a Virtex-5 frame map.

## Files and simulation

`rtl/`:

* `ber_pkg.sv`: constants, command and phase types, `ecc_code`.
* `frame_ecc.sv`: the frame ECC checker.
* `frame_validator.sv`: the checkpoint comparison.
* `safe_storage.sv`: the safe-storage RAM.
* `reliability_controller.sv`: the BER master.
* `binary_counter.sv`, `bubble_sorter.sv`: the test modules.
* `ber_top.sv`: the top level.

`tb/` has one self-checking testbench per module and the configuration-layer
model. `tb/ber_top_tb.sv` runs the top at its default size. It protects a
144-frame region and then a 36-frame one, and drives each through every
mechanism:

* the first checkpoint;
* detection scans;
* single- and double-upset recovery;
* a requested checkpoint;
* periodic checkpoints;
* a recovery that cancels the next planned checkpoint;
* a checkpoint rejected by validation.

It also runs both test modules. Each testbench prints
`TB_RESULT checks=N failures=M`.

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb -Irtl \
    rtl/ber_pkg.sv tb/ber_top_tb.sv --top-module ber_top_tb -Mdir obj_top
./obj_top/Vber_top_tb
```

Replace `ber_top_tb` with any other testbench name to run it. All
testbenches finish in well under a second.
