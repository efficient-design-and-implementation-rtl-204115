// qct: combined cyclic Q-delay, cell interleaver and time interleaver.
//
// The three transmitter stages are folded into one pass through one block
// memory. While a FEC block of NCELLS cells arrives (WRITE phase), cell i is
// not stored at i: its I component goes to address S(i) of the I bank and its
// Q component to address S(i+1) of the Q bank, where S is the cell
// permutation. That single write performs both the Q delay (the Q of cell i
// lands beside the I of cell i+1) and the cell interleaving. The Q of the last
// cell wraps to S(0) = 0, which makes the delay cyclic. The time interleaver
// then needs no memory of its own (READ phase): the stored block is treated as
// TI_COLS columns of TI_ROWS rows and read row by row, at addresses 0, 2160,
// 4320, 6480, 8640, 1, 2161, ... All of this follows the source design. The
// split into two banks (I and Q, written at different addresses in the same
// clock), the valid/ready handshakes and the single-buffer phase scheme are
// this implementation's choices.
//
// Interface: input cells are taken with in_valid && in_ready; in_ready is
// high only in the WRITE phase. Output cells leave with out_valid &&
// out_ready. The memory read is registered, so with out_ready held high the
// first output appears two clocks after the clock that took the last input,
// and the block then streams out one cell per clock. The next block can be
// written from the clock after the last read has been issued.
module qct
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

  typedef enum logic { WRITE, READ } phase_t;
  phase_t phase;

  comp_t mem_re [NCELLS];
  comp_t mem_im [NCELLS];

  // Permutation addresses for the write phase.
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

  logic [AW-1:0] wcnt;      // cells written in this block
  logic [AW-1:0] rcnt;      // cells read in this block
  logic [AW-1:0] taddr;     // time-interleaver read address
  logic [$clog2(TI_COLS)-1:0] tcol;
  logic          wr, last_wr, issue, last_rd;
  logic [AW-1:0] q_addr;

  assign in_ready  = (phase == WRITE);
  assign wr        = in_valid && in_ready;
  assign last_wr   = wr && (32'(wcnt) == NCELLS - 1);
  // Q of the last cell wraps to S(0), which is always address 0.
  assign q_addr    = (32'(wcnt) == NCELLS - 1) ? '0 : s_nxt;
  assign issue     = (phase == READ) && (!out_valid || out_ready);
  assign last_rd   = issue && (32'(rcnt) == NCELLS - 1);
  assign s_adv     = wr && !last_wr;
  assign s_restart = last_wr;

  always_ff @(posedge clk) begin
    if (wr) begin
      mem_re[s_cur]  <= in_cell.re;
      mem_im[q_addr] <= in_cell.im;
    end
  end

  always_ff @(posedge clk) begin
    if (issue) begin
      out_cell.re <= mem_re[taddr];
      out_cell.im <= mem_im[taddr];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase     <= WRITE;
      wcnt      <= '0;
      rcnt      <= '0;
      taddr     <= '0;
      tcol      <= '0;
      out_valid <= 1'b0;
    end else begin
      if (issue)          out_valid <= 1'b1;
      else if (out_ready) out_valid <= 1'b0;

      if (wr) wcnt <= last_wr ? '0 : wcnt + 1'b1;
      if (last_wr) phase <= READ;

      if (issue) begin
        if (32'(tcol) == TI_COLS - 1) begin
          tcol  <= '0;
          taddr <= taddr - AW'((TI_COLS - 1) * TI_ROWS) + 1'b1;
        end else begin
          tcol  <= tcol + 1'b1;
          taddr <= taddr + AW'(TI_ROWS);
        end
        rcnt <= last_rd ? '0 : rcnt + 1'b1;
      end
      if (last_rd) begin
        phase <= WRITE;
        taddr <= '0;
        tcol  <= '0;
      end
    end
  end

  // Time-interleaver reads stay inside the block.
  always_ff @(posedge clk)
    if (rst_n && issue) assert (32'(taddr) < NCELLS) else $error("qct: read address out of range");

endmodule
