// cf: combined cell mapper and frequency interleaver.
//
// Builds one frame from two PLPs and the L1 signalling and hands it to OFDM
// generation already frequency interleaved. A frame is the 642 L1 signalling
// bits followed by the cells of PLP1 and then of PLP2, NCELLS each; the
// frequency interleaver treats the PLP1 cells as an even OFDM data symbol and
// the PLP2 cells as an odd one. Both rules follow the source design, as does
// the use of the cell interleaver's permutation H(p) = S(p) for the frequency
// interleaver and the idea of doing mapping and interleaving with a single
// frame memory. How the two halves are interleaved follows the DVB-T2 rule
// the source quotes: for the even symbol a[H(p)] = x[p], for the odd symbol
// a[p] = x[H(p)]. Both are done without extra memory:
//   * the even half is permuted on the way in: PLP1 cell p is written to
//     address H(p) of bank 0, and bank 0 is read in order;
//   * the odd half is permuted on the way out: PLP2 cell p is written to
//     address p of bank 1, and bank 1 is read at H(p).
// One permutation generator serves both, since writing and reading never
// overlap. The two-bank memory, the handshakes and the serial L1 port are
// this implementation's choices.
//
// Interface. COLLECT phase: one PLP1 cell and one PLP2 cell are taken
// together per clock (in_valid && in_ready, NCELLS clocks), and the L1 bits
// one per clock on their own handshake (l1_valid && l1_ready), first bit
// first. EMIT phase, once both are complete: the frame leaves on the out_*
// handshake, L1 bits first (out_is_l1 = 1, bit on out_l1_bit), then the
// 2*NCELLS cells. With out_ready held high the first L1 bit appears three clocks
// after the last input is taken, and one item follows per clock.
module cf
  import qctcf_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // PLP cells, one of each PLP per transfer
  input  logic  in_valid,
  output logic  in_ready,
  input  cell_t in_plp1,
  input  cell_t in_plp2,
  // L1 signalling bits
  input  logic  l1_valid,
  output logic  l1_ready,
  input  logic  l1_bit,
  // frame output
  output logic  out_valid,
  input  logic  out_ready,
  output logic  out_is_l1,
  output logic  out_l1_bit,
  output cell_t out_cell
);

  localparam int AW = ND;
  localparam int LW = $clog2(L1_BITS);

  typedef enum logic { COLLECT, EMIT } phase_t;
  typedef enum logic [1:0] { ST_L1, ST_EVEN, ST_ODD } stage_t;

  phase_t phase;
  stage_t stage;

  cell_t bank0 [NCELLS];   // PLP1 / even symbol, stored permuted
  cell_t bank1 [NCELLS];   // PLP2 / odd symbol, stored in order
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
  logic [LW-1:0] l1cnt;
  logic          cells_done, l1_done;
  logic          wr, last_wr, l1_wr, issue, last_item, odd_issue, last_odd;

  assign in_ready  = (phase == COLLECT) && !cells_done;
  assign l1_ready  = (phase == COLLECT) && !l1_done;
  assign wr        = in_valid && in_ready;
  assign last_wr   = wr && (32'(wcnt) == NCELLS - 1);
  assign l1_wr     = l1_valid && l1_ready;
  assign issue     = (phase == EMIT) && (!out_valid || out_ready);
  assign odd_issue = issue && (stage == ST_ODD);
  assign last_odd  = odd_issue && (32'(ecnt) == NCELLS - 1);
  assign last_item = last_odd;
  assign h_adv     = (wr && !last_wr) || (odd_issue && !last_odd);
  assign h_restart = last_wr || last_odd;

  always_ff @(posedge clk) begin
    if (wr) begin
      bank0[h_cur] <= in_plp1;
      bank1[wcnt]  <= in_plp2;
    end
  end

  always_ff @(posedge clk) begin
    if (issue) begin
      unique case (stage)
        ST_EVEN: out_cell <= bank0[ecnt];
        ST_ODD:  out_cell <= bank1[h_cur];
        default: out_cell <= '0;
      endcase
      out_is_l1  <= (stage == ST_L1);
      out_l1_bit <= (stage == ST_L1) && l1_sr[L1_BITS-1];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase      <= COLLECT;
      stage      <= ST_L1;
      wcnt       <= '0;
      ecnt       <= '0;
      l1cnt      <= '0;
      cells_done <= 1'b0;
      l1_done    <= 1'b0;
      out_valid  <= 1'b0;
      l1_sr      <= '0;
    end else begin
      if (issue)          out_valid <= 1'b1;
      else if (out_ready) out_valid <= 1'b0;

      if (wr) begin
        wcnt <= last_wr ? '0 : wcnt + 1'b1;
        if (last_wr) cells_done <= 1'b1;
      end
      if (l1_wr) begin
        l1_sr <= {l1_sr[L1_BITS-2:0], l1_bit};
        l1cnt <= (32'(l1cnt) == L1_BITS - 1) ? '0 : l1cnt + 1'b1;
        if (32'(l1cnt) == L1_BITS - 1) l1_done <= 1'b1;
      end
      if (phase == COLLECT && cells_done && l1_done) begin
        phase <= EMIT;
        stage <= ST_L1;
        ecnt  <= '0;
      end

      if (issue) begin
        unique case (stage)
          ST_L1: begin
            l1_sr <= {l1_sr[L1_BITS-2:0], 1'b0};
            if (32'(ecnt) == L1_BITS - 1) begin
              stage <= ST_EVEN;
              ecnt  <= '0;
            end else ecnt <= ecnt + 1'b1;
          end
          ST_EVEN: begin
            if (32'(ecnt) == NCELLS - 1) begin
              stage <= ST_ODD;
              ecnt  <= '0;
            end else ecnt <= ecnt + 1'b1;
          end
          default: ecnt <= last_odd ? '0 : ecnt + 1'b1;
        endcase
      end
      if (last_item) begin
        phase      <= COLLECT;
        stage      <= ST_L1;
        cells_done <= 1'b0;
        l1_done    <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk)
    if (rst_n && issue && stage == ST_ODD) assert (32'(h_cur) < NCELLS) else $error("cf: bad read address");

endmodule
