// qctcf_pkg: sizes and types shared by the QCTCF transmitter and its receiver.
//
// The design is built for one configuration: 64-QAM with normal (64800-bit)
// LDPC blocks, so one FEC block carries 10800 cells. The time interleaver then
// has 5 columns of 2160 rows, and the frame handed to OFDM generation holds
// 642 L1 signalling bits followed by two PLPs of 10800 cells each. Every I and
// Q component is a 16-bit fixed-point word: 1 sign bit, 5 integer bits and 10
// fraction bits. All of these numbers follow the source design; the packed
// cell struct (I in the upper half) is this implementation's own choice.
package qctcf_pkg;

  // Cells per FEC block (64-QAM, normal FECFRAME).
  localparam int unsigned NCELLS  = 10800;
  // Time interleaver: 5 columns, Ncells/5 rows.
  localparam int unsigned TI_COLS = 5;
  localparam int unsigned TI_ROWS = NCELLS / TI_COLS;
  // L1 signalling bits placed in front of the PLP cells of a frame.
  localparam int unsigned L1_BITS = 642;
  // Width of one I or Q component (1 sign, 5 integer, 10 fraction bits).
  localparam int unsigned CW      = 16;
  // Address width of the cell permutation: Nd = ceil(log2(Ncells)).
  localparam int unsigned ND      = $clog2(NCELLS);

  typedef logic signed [CW-1:0] comp_t;

  // One constellation cell: in-phase (re) and quadrature (im) component.
  typedef struct packed {
    comp_t re;
    comp_t im;
  } cell_t;

  // Feedback taps of the 13-bit permutation register for Nd = 14:
  // R'[12] = R'[0] ^ R'[1] ^ R'[4] ^ R'[5] ^ R'[9] ^ R'[11].
  localparam logic [12:0] PERM_TAPS_ND14 = 13'b0_1010_0011_0011;

endpackage
