# QCTCF: DVB-T2 transmitter interleaving in two memory passes

A DVB-T2 transmitter shuffles every constellation cell five times between the
constellation mapper and OFDM generation: the **cyclic Q delay** moves each
quadrature component one cell later, the **cell interleaver** permutes the cells
of a FEC block pseudo-randomly, the **time interleaver** writes the block into
columns and reads it out by rows, the **cell mapper** assembles signalling and
the cells of several PLPs (physical layer pipes, i.e. independent data
streams) into a frame, and the **frequency interleaver** permutes the cells of
each OFDM symbol over the carriers. Built naively, each of these stages owns a
buffer and adds a full block of delay.

This RTL folds the five stages into two blocks, each making a single pass
through one memory:

* **QCT** (Q delay + Cell interleaver + Time interleaver). The delay and the
  cell permutation are both applied by *where* a cell is written; the time
  interleaver is applied by the *order* in which the memory is read back.
* **CF** (Cell mapper + Frequency interleaver). The frame memory is the cell
  mapper; the frequency permutation is applied on the write side for even
  symbols and on the read side for odd symbols.

A matching receiver (ICF and IQCT) undoes both passes with the same two
tricks in reverse. The configuration is fixed to the one the design was made
for: 64-QAM on normal 64800-bit LDPC blocks (10800 cells per FEC block), a
time interleaver of 5 columns by 2160 rows, two PLPs and 642 L1 signalling
bits per frame.

The design follows the combined QCTCF module described in the thesis
"Efficient Design and Implementation of DVB-T2 Modules on FPGA" (Arab Academy
for Science, Technology and Maritime Transport). The sections
below say where this RTL follows that design and where it fills gaps with
its own choices.

## Block diagram

```
                       transmitter (QCTCF)
  PLP1 cells ──► qct ──┐
                       ├─(join)─► cf ──► frame: 642 L1 bits, 10800 even-symbol
  PLP2 cells ──► qct ──┘          ▲            cells, 10800 odd-symbol cells
  L1 bits  ───────────────────────┘

                       receiver
                         ┌──► iqct ──► PLP1 cells
  frame ──► icf ─(fork)──┤
               │         └──► iqct ──► PLP2 cells
               └──► L1 bits (642-bit word)
```

`qctcf_system` holds both halves side by side; they are not connected
inside it. Loop `tx_out_*` to `rx_in_*` outside for a back-to-back test.

| File | Contents |
|---|---|
| `rtl/qctcf_pkg.sv` | sizes (`NCELLS`, `TI_COLS`, `TI_ROWS`, `L1_BITS`, `CW`, `ND`), the `cell_t` type, permutation taps |
| `rtl/perm_gen.sv` | permutation address generator S(i), one valid address per clock plus the next one |
| `rtl/qct.sv` | transmitter Q delay + cell interleaver + time interleaver |
| `rtl/cf.sv` | transmitter cell mapper + frequency interleaver |
| `rtl/icf.sv` | receiver frequency de-interleaver + cell de-mapper |
| `rtl/iqct.sv` | receiver time de-interleaver + cell de-interleaver + Q-delay removal |
| `rtl/qctcf_system.sv` | top level |
| `tb/qctcf_ref_pkg.sv` | reference models used by all testbenches |
| `tb/*_tb.sv` | one self-checking testbench per module |

## The cell permutation S(i)

All four blocks use the same pseudo-random permutation of 0..10799. It is the
part that is hardest to get right, so here it is in full.

A candidate address has 14 bits `{t, R'}`:

* `t` toggles on every candidate: 0, 1, 0, 1, ...
* `R'` is a 13-bit register. It is 0 for the first two candidates and
  `1 0000 0000 0000` (only bit 12 set) for the third. After that it shifts one
  place towards bit 0 on every candidate, and the new bit 12 is
  `R'[0] ^ R'[1] ^ R'[4] ^ R'[5] ^ R'[9] ^ R'[11]` of the previous value.

A candidate of 10800 or more is thrown away. The valid ones, in order, are
S(0), S(1), ...: 0, 8192, 4096, 10240, 5120, 10752, 1280, 8832, 4416, 10400,
..., and the last ten are 962, 8673, 240, 8312, 60, 8222, 15, 8199, 3, 8193.
The testbench checks these twenty values and checks that all 10800 are
distinct.

**One address per clock.** A discarded candidate is always 8192 or more, so
its `t` is 1. The next candidate then has `t = 0` and is below 8192, so it is
always valid. `perm_gen` therefore computes two candidates per clock and
takes the second when the first is out of range (an assertion guards the
claim). It keeps two registered addresses, `addr` = S(i) and
`addr_next` = S(i+1), because the QCT writes to both in the same clock.
S(0) is always 0, which is used for the cyclic wrap.

The taps above are the DVB-T2 ones for a 14-bit address. With other values of
`NCELLS`, `ND` changes and the taps must be changed to match, through the
`TAPS` parameter of `perm_gen`. Only the 10800-cell case is verified.

## QCT: delay, permute and time-interleave with one write and one read

The memory is two banks of 10800 × 16 bits, one for I and one for Q, so that
the two halves of a cell can go to different addresses in the same clock.

**Write phase** (10800 clocks, one input cell per clock). Input cell *i* is
written as

```
I bank [S(i)]    <= I(i)
Q bank [S(i+1)]  <= Q(i)          (for the last cell: Q bank[S(0) = 0])
```

Output position S(i+1) now holds I(i+1) with Q(i). That is the cyclic Q delay
(output cell *k* = I(*k*) + j·Q(*k*−1), the first cell taking the last Q), and
it is already cell-interleaved, since cell *k* sits at S(*k*). For example, in
the second clock I goes to 8192 and Q to 4096. In the last clock I goes to 8193
and Q wraps to 0.

**Read phase** (10800 clocks). The memory is treated as 5 columns of 2160
rows (column *c* = addresses 2160·*c* .. 2160·*c*+2159), as if the cell
interleaver's output had been written column by column. It is read row by
row: 0, 2160, 4320, 6480, 8640, 1, 2161, ... That is the time interleaver,
with no memory of its own.

The first output therefore starts with the I of input cell 0 and the Q of the
last input cell (address 0).

## CF: a frame memory that is also the frequency interleaver

A frame is the 642 L1 bits, then PLP1's block as an **even** OFDM data symbol,
then PLP2's block as an **odd** one, 10800 cells each. The frequency
interleaver rule is *a*[H(p)] = *x*[p] for even symbols and
*a*[p] = *x*[H(p)] for odd symbols, with H = S. The frame memory has two
banks, so each rule is applied on the one side where it is cheap:

| half | written | read |
|---|---|---|
| even (PLP1) | cell *p* to address H(*p*) | in order 0, 1, 2, ... |
| odd (PLP2)  | cell *p* to address *p*    | at H(0), H(1), ... = 0, 8192, 4096, ... |

So one generator is enough: it runs during the write phase for the even half
and during the odd half of the read phase. The L1 bits go through a 642-bit
shift register and leave first, flagged by `out_is_l1`.

The CF takes one PLP1 and one PLP2 cell per transfer, so the two QCT outputs
are joined in `qctcf_system` (a transfer waits until both are valid).

## Receiver: the same passes in reverse

* **icf** collects a frame. Even-half cells are written in order and read at
  H(*p*); odd-half cells are written at H(*p*) and read in order. It hands out
  one PLP1 and one PLP2 cell per transfer and the L1 bits as a 642-bit word
  (`out_l1`, first received bit in the MSB, valid while `out_l1_valid`).
* **iqct** writes received cells at the time-interleaver addresses (0, 2160,
  ..., 8640, 1, ...), then rebuilds cell *i* as I from S(*i*) and Q from
  S(*i*+1) (S(0) for the last cell). That undoes the time interleaver, the
  cell interleaver and the Q delay.

## Interfaces and timing

Every stream is valid/ready: an item moves on a rising edge where both are
high. Reset (`rst_n`) is synchronous and active low and clears only control
state. Every memory address is written before it is read.

Each block has a single memory and alternates between a collect/write phase
and an emit/read phase. It does not accept input while emitting: `in_ready`
is low. Output data is a registered memory read and can stall for any number
of clocks.

| block | collects | emits | first output after last input (no stalls) |
|---|---|---|---|
| qct  | 10800 cells | 10800 cells | 2 clocks |
| cf   | 10800 cell pairs + 642 L1 bits | 642 bits + 21600 cells | 3 clocks |
| icf  | 642 bits + 21600 cells | 10800 cell pairs + L1 word | 2 clocks |
| iqct | 10800 cells | 10800 cells | 2 clocks |

End to end, with nothing stalling, the first frame item leaves the
transmitter 2·10800 + 3 = 21603 clocks after the first input cell. The source
design reports its first system output after roughly 2·10800 clocks: one
block time to fill the QCT, one for the frame builder.

Throughput: a QCT block is one write and one read of 10800 clocks. A CF frame
needs 10800 clocks to collect and 22242 clocks to emit, so with both PLPs
streaming at full rate the transmitter is limited by the CF, at one frame per
about 33000 clocks. The QCTs wait through the handshakes. This is a
consequence of single-buffered memories. Double buffering would remove the
idle phases, but the source design does not describe it.

## Cell format

Each I and Q component is 16 bits: 1 sign bit, 5 integer bits and 10
fraction bits (`comp_t`). A cell is `cell_t = {re, im}`, packed with I in bits
31:16. No arithmetic is done on the values, so the binary point matters only
to the user.

## Where this RTL departs from or adds to the source design

* **Q-delay formula.** The source writes the delay once as
  Im(C(i+1)), but its text, its figures and its example data all delay Q by
  one cell (I(*k*) with Q(*k*−1)). The RTL delays.
* **Permutation taps** are not printed in the source. The DVB-T2 taps used
  here reproduce its published first and last ten addresses exactly.
* **Frequency interleaver.** The source says the frequency interleaver uses
  the same permutation as the cell interleaver, so the DVB-T2 16K-mode "wire
  permutation" and separate even/odd generator are not built. The source
  treats PLP1 and PLP2 as the even and odd streams. The RTL reads the even
  half from the write-permuted bank instead of reading it at permuted
  addresses as well, which is what the even-symbol formula requires.
* **L1 signalling** stays as 642 bits at the head of the frame. It is not
  modulated into cells, because the source does not describe that.
* **Two QCT instances** (one per PLP) feed the CF. The source shows one QCT
  and a CF with two PLP inputs.
* **Memory size.** The source's synthesis reports 345,600 memory bits, which
  is one 10800 × 32-bit memory. This transmitter uses four times that:
  2 QCTs × 10800 × 32 bits and a 2 × 10800 × 32-bit frame memory. The
  receiver uses as much again. The source does not say how its CF and second
  PLP fit in the reported figure. At this size the transmitter alone does not
  fit the 774,144 memory bits of the Cyclone IV GX EP4CGX22 the source used.
* **Handshakes, reset polarity and the exact latencies** are this RTL's own
  choices; the source gives only clock, reset and data ports.
* **Receiver.** The source describes the receiver only functionally
  (simulated in software). Its one-pass organisation mirrors the transmitter
  and is this RTL's own design.
* **FEC-block shift P(j)** of the cell interleaver is not built. With a
  5-column time interleaver a TI block holds one FEC block, so the shift is
  always zero.

The rest of a DVB-T2 chain is not part of this design: input processing, BCH
and LDPC coding, bit interleaving, the mapper and rotation that produce the
input cells, and OFDM generation that consumes the frame.

## Simulation

Every testbench checks its results by itself and ends by printing
`TB_RESULT checks=N failures=M`. The reference models in
`tb/qctcf_ref_pkg.sv` compute the permutation with plain integer code and
apply each stage to a whole array: Q delay, then cell permutation, then
row/column time interleaving, then even/odd frequency interleaving. They
share no code with the RTL.

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/qctcf_pkg.sv tb/qctcf_ref_pkg.sv tb/qctcf_system_tb.sv \
    --top-module qctcf_system_tb
./obj_dir/Vqctcf_system_tb
```

Replace `qctcf_system_tb` with `perm_gen_tb`, `qct_tb`, `cf_tb`, `icf_tb` or
`iqct_tb` to run a single block.

* `perm_gen_tb`: all 10800 addresses against the model, the published first
  and last ten, distinctness, look-ahead, hold and restart.
* `qct_tb`, `iqct_tb`, `cf_tb`, `icf_tb`: two blocks or frames each. The first
  runs without stalls and checks the latency and the one-item-per-clock
  rate. The second runs with random input gaps and output stalls. Every
  output item is compared with the model.
* `qctcf_system_tb`: the full design at full size, three frames with
  the transmitter looped into the receiver. It checks every transmitter
  output item, the recovered PLPs and L1 bits, and the 21603-clock
  first-output latency. It also counts that each mechanism happened: the
  cyclic Q wrap, discarded permutation candidates, input held off during a
  read-out, the PLP join waiting, output stalls, and L1, even and odd
  frame items. It runs in well under a second.
