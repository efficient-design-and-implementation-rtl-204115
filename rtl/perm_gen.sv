// perm_gen: pseudo-random cell permutation address generator.
//
// Produces the permutation S(0), S(1), ..., S(NCELLS-1) used by the cell
// interleaver, and, in this design, also by the frequency interleaver. Each
// candidate address R is built from a toggling most significant bit (0 for
// even candidates, 1 for odd ones) and an ND-1 bit shift register R'. The
// first two candidates have R' = 0, the third has only the top bit of R' set,
// and from then on R' shifts one place down with the XOR of the TAPS bits fed
// into its top bit. Candidates not below NCELLS are discarded. That sequence,
// its initial values and the discard rule follow the source design; the taps
// default to the Nd = 14 polynomial, which reproduces the published first and
// last ten addresses for 10800 cells.
//
// Implementation: two candidate states are kept in registers, the current
// valid address (addr) and the following one (addr_next). Because NCELLS is
// above 2**(ND-1) and the toggle bit alternates, a discarded candidate is
// always followed by one with a zero MSB, which is valid. So one clock never
// has to skip more than one candidate, and one valid address is delivered
// every clock that 'advance' is high. 'skipped' is high for the clock after
// an advance whose new look-ahead address needed a discard.
//
// Interface: 'restart' (priority over 'advance') returns addr to S(0) = 0 and
// addr_next to S(1) in the next clock; 'advance' steps both by one address.
// Synchronous active-low reset behaves as 'restart'.
module perm_gen
  import qctcf_pkg::*;
#(
  parameter int unsigned    NCELLS_P = qctcf_pkg::NCELLS,
  parameter int unsigned    ND_P     = qctcf_pkg::ND,
  parameter logic [ND_P-2:0] TAPS    = qctcf_pkg::PERM_TAPS_ND14
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            restart,
  input  logic            advance,
  output logic [ND_P-1:0] addr,
  output logic [ND_P-1:0] addr_next,
  output logic            skipped
);

  // Generator state: 'phase' counts the three special first candidates.
  typedef struct packed {
    logic [1:0]      phase;
    logic            tog;
    logic [ND_P-2:0] rp;
  } gen_t;

  localparam gen_t CAND0 = '{phase: 2'd0, tog: 1'b0, rp: '0};

  function automatic gen_t step(input gen_t s);
    gen_t n;
    n = s;
    unique case (s.phase)
      2'd0: begin n.phase = 2'd1; n.tog = 1'b1; n.rp = '0; end
      2'd1: begin
        n.phase = 2'd2; n.tog = 1'b0;
        n.rp = '0; n.rp[ND_P-2] = 1'b1;
      end
      default: begin
        n.tog = ~s.tog;
        n.rp  = {^(s.rp & TAPS), s.rp[ND_P-2:1]};
      end
    endcase
    return n;
  endfunction

  function automatic logic [ND_P-1:0] value(input gen_t s);
    return {s.tog, s.rp};
  endfunction

  function automatic logic in_range(input gen_t s);
    return 32'(value(s)) < NCELLS_P;
  endfunction

  gen_t cur_q, nxt_q;
  gen_t cand1, cand2, nxt_d;
  logic skip_d;

  // Look-ahead: the valid candidate after nxt_q.
  always_comb begin
    cand1  = step(nxt_q);
    cand2  = step(cand1);
    skip_d = !in_range(cand1);
    nxt_d  = skip_d ? cand2 : cand1;
  end

  // The same look-ahead from CAND0 gives S(1), used on restart.
  gen_t s1;
  always_comb s1 = in_range(step(CAND0)) ? step(CAND0) : step(step(CAND0));

  always_ff @(posedge clk) begin
    if (!rst_n || restart) begin
      cur_q   <= CAND0;
      nxt_q   <= s1;
      skipped <= 1'b0;
    end else if (advance) begin
      cur_q   <= nxt_q;
      nxt_q   <= nxt_d;
      skipped <= skip_d;
    end else begin
      skipped <= 1'b0;
    end
  end

  assign addr      = value(cur_q);
  assign addr_next = value(nxt_q);

  // A skipped candidate must be followed by a valid one.
  always_ff @(posedge clk)
    if (rst_n && advance && skip_d)
      assert (in_range(cand2)) else $error("perm_gen: two discarded candidates in a row");

endmodule
