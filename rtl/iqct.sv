// iqct: receiver time de-interleaver, cell de-interleaver and cyclic Q-delay
// removal in one memory pass.
//
// Undoes qct for one FEC block of NCELLS cells. The received cells come in
// time-interleaved order, so cell k is written to the address it was read
// from in the transmitter: TI_COLS columns of TI_ROWS rows, filled row by row
// (addresses 0, 2160, 4320, 6480, 8640, 1, 2161, ...). That single write
// undoes the time interleaver. On the way out, original cell i is rebuilt by
// reading its I component at S(i) and its Q component at S(i+1) (S(0) = 0
// for the last cell), which undoes the cell interleaver and the cyclic Q
// delay in the same clock. The receiver's three stages and their order
// follow the source design; doing them in one memory pass, as the source's
// transmitter does, is this implementation's choice, as are the handshakes.
//
// Interface: in_valid/in_ready take NCELLS cells (COLLECT phase, in_ready
// high); out_valid/out_ready then deliver them in original order (EMIT
// phase). With out_ready high the first cell appears two clocks after the
// last input is taken, then one per clock.
module iqct
  import qctcf_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  cell_t in_cell,
  output logic  out_valid,
  input  logic  out_ready,
  output cell_t out_cell
);

  localparam int AW = ND;

  typedef enum logic { COLLECT, EMIT } phase_t;
  phase_t phase;

  comp_t mem_re [NCELLS];
  comp_t mem_im [NCELLS];

  logic [AW-1:0] s_cur, s_nxt;
  logic          s_restart, s_adv, s_skip;

  perm_gen u_perm (
    .clk, .rst_n,
    .restart  (s_restart),
    .advance  (s_adv),
    .addr     (s_cur),
    .addr_next(s_nxt),
    .skipped  (s_skip)
  );

  logic [AW-1:0] wcnt, rcnt, taddr, q_addr;
  logic [$clog2(TI_COLS)-1:0] tcol;
  logic          wr, last_wr, issue, last_rd;

  assign in_ready  = (phase == COLLECT);
  assign wr        = in_valid && in_ready;
  assign last_wr   = wr && (32'(wcnt) == NCELLS - 1);
  assign issue     = (phase == EMIT) && (!out_valid || out_ready);
  assign last_rd   = issue && (32'(rcnt) == NCELLS - 1);
  assign q_addr    = (32'(rcnt) == NCELLS - 1) ? '0 : s_nxt;
  assign s_adv     = issue && !last_rd;
  assign s_restart = last_rd;

  always_ff @(posedge clk) begin
    if (wr) begin
      mem_re[taddr] <= in_cell.re;
      mem_im[taddr] <= in_cell.im;
    end
  end

  always_ff @(posedge clk) begin
    if (issue) begin
      out_cell.re <= mem_re[s_cur];
      out_cell.im <= mem_im[q_addr];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase     <= COLLECT;
      wcnt      <= '0;
      rcnt      <= '0;
      taddr     <= '0;
      tcol      <= '0;
      out_valid <= 1'b0;
    end else begin
      if (issue)          out_valid <= 1'b1;
      else if (out_ready) out_valid <= 1'b0;

      if (wr) begin
        if (32'(tcol) == TI_COLS - 1) begin
          tcol  <= '0;
          taddr <= taddr - AW'((TI_COLS - 1) * TI_ROWS) + 1'b1;
        end else begin
          tcol  <= tcol + 1'b1;
          taddr <= taddr + AW'(TI_ROWS);
        end
        wcnt <= last_wr ? '0 : wcnt + 1'b1;
      end
      if (last_wr) begin
        phase <= EMIT;
        taddr <= '0;
        tcol  <= '0;
      end
      if (issue) rcnt <= last_rd ? '0 : rcnt + 1'b1;
      if (last_rd) phase <= COLLECT;
    end
  end

  always_ff @(posedge clk)
    if (rst_n && wr) assert (32'(taddr) < NCELLS) else $error("iqct: write address out of range");

endmodule
