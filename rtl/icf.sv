// icf: receiver inverse frame builder (frequency de-interleaver and cell
// de-mapper).
//
// Undoes cf. The incoming frame is the L1 signalling bits followed by two
// OFDM data symbols of NCELLS cells, the even one first. De-interleaving
// follows from the transmitter rule (even: a[H(p)] = x[p]; odd:
// a[p] = x[H(p)]) so x[p] = a[H(p)] for the even symbol and x[H(p)] = a[p]
// for the odd one. As in the transmitter, each half is permuted on one side
// of its memory bank only:
//   * even symbol: received cell p is written to address p of bank 0, and
//     bank 0 is read at H(p);
//   * odd symbol: received cell p is written to address H(p) of bank 1, and
//     bank 1 is read in order.
// The cell de-mapper then hands out the even symbol as PLP1 and the odd one
// as PLP2, side by side, one cell of each per transfer, and the L1 bits as a
// parallel word. The receiver's function (frequency de-interleaving, then
// splitting into L1, PLP1 and PLP2) follows the source design; the memory
// organisation, the port shapes and the timing are this implementation's
// own, chosen to mirror the transmitter.
//
// Interface. COLLECT phase: the frame arrives on in_* one item per transfer;
// in_is_l1 must be high for exactly the first L1_BITS items. EMIT phase:
// out_l1 holds the L1 bits (first received bit in the MSB) while
// out_l1_valid is high; NCELLS transfers on out_valid/out_ready carry one
// PLP1 and one PLP2 cell each. With out_ready high the first PLP pair
// appears two clocks after the last frame item is taken.
module icf
  import qctcf_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic               in_is_l1,
  input  logic               in_l1_bit,
  input  cell_t              in_cell,
  output logic               out_l1_valid,
  output logic [L1_BITS-1:0] out_l1,
  output logic               out_valid,
  input  logic               out_ready,
  output cell_t              out_plp1,
  output cell_t              out_plp2
);

  localparam int AW = ND;

  typedef enum logic { COLLECT, EMIT } phase_t;
  typedef enum logic [1:0] { ST_L1, ST_EVEN, ST_ODD } stage_t;

  phase_t phase;
  stage_t stage;

  cell_t bank0 [NCELLS];   // even symbol, stored in received order
  cell_t bank1 [NCELLS];   // odd symbol, stored de-permuted
  logic [L1_BITS-1:0] l1_sr;

  logic [AW-1:0] h_cur, h_nxt;
  logic          h_restart, h_adv, h_skip;

  perm_gen u_perm (
    .clk, .rst_n,
    .restart  (h_restart),
    .advance  (h_adv),
    .addr     (h_cur),
    .addr_next(h_nxt),
    .skipped  (h_skip)
  );

  logic [AW-1:0] wcnt, ecnt;
  logic          wr, odd_wr, last_wr, issue, last_rd;

  assign in_ready     = (phase == COLLECT);
  assign wr           = in_valid && in_ready;
  assign odd_wr       = wr && (stage == ST_ODD);
  assign last_wr      = odd_wr && (32'(wcnt) == NCELLS - 1);
  assign issue        = (phase == EMIT) && (!out_valid || out_ready);
  assign last_rd      = issue && (32'(ecnt) == NCELLS - 1);
  assign h_adv        = (odd_wr && !last_wr) || (issue && !last_rd);
  assign h_restart    = last_wr || last_rd;
  assign out_l1_valid = (phase == EMIT);
  assign out_l1       = l1_sr;

  always_ff @(posedge clk) begin
    if (wr && stage == ST_EVEN) bank0[wcnt]  <= in_cell;
    if (odd_wr)                 bank1[h_cur] <= in_cell;
  end

  always_ff @(posedge clk) begin
    if (issue) begin
      out_plp1 <= bank0[h_cur];
      out_plp2 <= bank1[ecnt];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase     <= COLLECT;
      stage     <= ST_L1;
      wcnt      <= '0;
      ecnt      <= '0;
      out_valid <= 1'b0;
      l1_sr     <= '0;
    end else begin
      if (issue)          out_valid <= 1'b1;
      else if (out_ready) out_valid <= 1'b0;

      if (wr) begin
        unique case (stage)
          ST_L1: begin
            l1_sr <= {l1_sr[L1_BITS-2:0], in_l1_bit};
            if (32'(wcnt) == L1_BITS - 1) begin
              stage <= ST_EVEN;
              wcnt  <= '0;
            end else wcnt <= wcnt + 1'b1;
          end
          ST_EVEN: begin
            if (32'(wcnt) == NCELLS - 1) begin
              stage <= ST_ODD;
              wcnt  <= '0;
            end else wcnt <= wcnt + 1'b1;
          end
          default: begin
            wcnt <= last_wr ? '0 : wcnt + 1'b1;
            if (last_wr) begin
              phase <= EMIT;
              stage <= ST_L1;
              ecnt  <= '0;
            end
          end
        endcase
      end
      if (issue) ecnt <= last_rd ? '0 : ecnt + 1'b1;
      if (last_rd) phase <= COLLECT;
    end
  end

  // The L1 flag must match the frame position.
  always_ff @(posedge clk)
    if (rst_n && wr) assert (in_is_l1 == (stage == ST_L1)) else $error("icf: L1 flag out of place");

endmodule
