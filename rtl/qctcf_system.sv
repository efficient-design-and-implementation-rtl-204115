// qctcf_system: the QCTCF transmitter module and the matching receiver
// module, side by side.
//
// Transmitter (QCTCF): each of the two PLPs has its own qct, which applies
// the cyclic Q delay, cell interleaving and time interleaving to a FEC block
// of NCELLS cells in one memory pass. The two qct outputs are joined and fed,
// one cell of each per transfer, to cf, which adds the L1 signalling bits,
// maps the frame (L1, PLP1, PLP2) and frequency interleaves it. The chain
// QCT -> CF, and two PLPs into the CF, follow the source design; one qct per
// PLP is this implementation's reading of it.
//
// Receiver: icf frequency de-interleaves a received frame and splits it into
// L1 bits and the two PLPs; each PLP goes to its own iqct, which undoes time
// interleaving, cell interleaving and the Q delay. The receiver path is not
// connected to the transmitter inside this module: loop tx_out_* to rx_in_*
// outside for a back-to-back test.
//
// All streams use valid/ready handshakes; a transfer happens on a clock edge
// where both are high. See the submodules for phases and latencies.
module qctcf_system
  import qctcf_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // transmitter inputs: constellation-rotated cells of the two PLPs
  input  logic               tx_plp1_valid,
  output logic               tx_plp1_ready,
  input  cell_t              tx_plp1_cell,
  input  logic               tx_plp2_valid,
  output logic               tx_plp2_ready,
  input  cell_t              tx_plp2_cell,
  // transmitter L1 signalling bits
  input  logic               tx_l1_valid,
  output logic               tx_l1_ready,
  input  logic               tx_l1_bit,
  // transmitter frame output towards OFDM generation
  output logic               tx_out_valid,
  input  logic               tx_out_ready,
  output logic               tx_out_is_l1,
  output logic               tx_out_l1_bit,
  output cell_t              tx_out_cell,
  // receiver frame input from OFDM demodulation
  input  logic               rx_in_valid,
  output logic               rx_in_ready,
  input  logic               rx_in_is_l1,
  input  logic               rx_in_l1_bit,
  input  cell_t              rx_in_cell,
  // receiver outputs
  output logic               rx_l1_valid,
  output logic [L1_BITS-1:0] rx_l1,
  output logic               rx_plp1_valid,
  input  logic               rx_plp1_ready,
  output cell_t              rx_plp1_cell,
  output logic               rx_plp2_valid,
  input  logic               rx_plp2_ready,
  output cell_t              rx_plp2_cell
);

  // ---------------- transmitter ----------------
  logic  q1_valid, q1_ready, q2_valid, q2_ready, cf_in_ready;
  cell_t q1_cell, q2_cell;

  qct u_qct1 (
    .clk, .rst_n,
    .in_valid (tx_plp1_valid), .in_ready(tx_plp1_ready), .in_cell(tx_plp1_cell),
    .out_valid(q1_valid), .out_ready(q1_ready), .out_cell(q1_cell)
  );

  qct u_qct2 (
    .clk, .rst_n,
    .in_valid (tx_plp2_valid), .in_ready(tx_plp2_ready), .in_cell(tx_plp2_cell),
    .out_valid(q2_valid), .out_ready(q2_ready), .out_cell(q2_cell)
  );

  // Join: a CF transfer takes one cell from each PLP.
  assign q1_ready = cf_in_ready && q2_valid;
  assign q2_ready = cf_in_ready && q1_valid;

  cf u_cf (
    .clk, .rst_n,
    .in_valid  (q1_valid && q2_valid),
    .in_ready  (cf_in_ready),
    .in_plp1   (q1_cell),
    .in_plp2   (q2_cell),
    .l1_valid  (tx_l1_valid),
    .l1_ready  (tx_l1_ready),
    .l1_bit    (tx_l1_bit),
    .out_valid (tx_out_valid),
    .out_ready (tx_out_ready),
    .out_is_l1 (tx_out_is_l1),
    .out_l1_bit(tx_out_l1_bit),
    .out_cell  (tx_out_cell)
  );

  // ---------------- receiver ----------------
  logic  icf_valid, icf_ready, iq1_ready, iq2_ready;
  cell_t icf_plp1, icf_plp2;

  icf u_icf (
    .clk, .rst_n,
    .in_valid    (rx_in_valid),
    .in_ready    (rx_in_ready),
    .in_is_l1    (rx_in_is_l1),
    .in_l1_bit   (rx_in_l1_bit),
    .in_cell     (rx_in_cell),
    .out_l1_valid(rx_l1_valid),
    .out_l1      (rx_l1),
    .out_valid   (icf_valid),
    .out_ready   (icf_ready),
    .out_plp1    (icf_plp1),
    .out_plp2    (icf_plp2)
  );

  // Fork: an ICF transfer goes to both iqct instances at once.
  assign icf_ready = iq1_ready && iq2_ready;

  iqct u_iqct1 (
    .clk, .rst_n,
    .in_valid (icf_valid && iq2_ready), .in_ready(iq1_ready), .in_cell(icf_plp1),
    .out_valid(rx_plp1_valid), .out_ready(rx_plp1_ready), .out_cell(rx_plp1_cell)
  );

  iqct u_iqct2 (
    .clk, .rst_n,
    .in_valid (icf_valid && iq1_ready), .in_ready(iq2_ready), .in_cell(icf_plp2),
    .out_valid(rx_plp2_valid), .out_ready(rx_plp2_ready), .out_cell(rx_plp2_cell)
  );

endmodule
