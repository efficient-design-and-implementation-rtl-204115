// qctcf_ref_pkg: reference models used by the testbenches.
//
// Written independently of the RTL: the permutation is computed with plain
// integer arithmetic, one candidate per loop pass, and the interleaver outputs
// are computed as whole-block array operations (the way a software model of the
// chain would do it), not as the RTL's address streams.
package qctcf_ref_pkg;
  import qctcf_pkg::*;

  // S(i) for i = 0 .. NCELLS-1 (Nd = 14, 13-bit register).
  function automatic void build_perm(output int s[NCELLS]);
    int rp, r, i, q, tog, fb;
    q = 0;
    rp = 0;
    for (i = 0; q < NCELLS; i++) begin
      if (i < 2)       rp = 0;
      else if (i == 2) rp = 1 << 12;
      else begin
        fb = ((rp >> 0) ^ (rp >> 1) ^ (rp >> 4) ^ (rp >> 5) ^ (rp >> 9) ^ (rp >> 11)) & 1;
        rp = (rp >> 1) | (fb << 12);
      end
      tog = i % 2;
      r = tog * 8192 + rp;
      if (r < NCELLS) begin
        s[q] = r;
        q++;
      end
    end
  endfunction

  // Cyclic Q-delay: output cell i keeps its own I and takes the Q of cell
  // i-1 (cell 0 takes the Q of the last cell).
  function automatic void qdelay(input cell_t c[NCELLS], output cell_t o[NCELLS]);
    for (int i = 0; i < NCELLS; i++) begin
      o[i].re = c[i].re;
      o[i].im = c[(i + NCELLS - 1) % NCELLS].im;
    end
  endfunction

  // Cell interleaver: output position S(i) takes input cell i.
  function automatic void cell_il(input cell_t c[NCELLS], input int s[NCELLS],
                                  output cell_t o[NCELLS]);
    for (int i = 0; i < NCELLS; i++) o[s[i]] = c[i];
  endfunction

  // Time interleaver: written column-wise into TI_COLS columns of TI_ROWS,
  // read row-wise.
  function automatic void time_il(input cell_t c[NCELLS], output cell_t o[NCELLS]);
    int k = 0;
    for (int r = 0; r < TI_ROWS; r++)
      for (int col = 0; col < TI_COLS; col++) begin
        o[k] = c[col * TI_ROWS + r];
        k++;
      end
  endfunction

  // Whole QCT chain.
  function automatic void qct_ref(input cell_t c[NCELLS], input int s[NCELLS],
                                  output cell_t o[NCELLS]);
    cell_t a[NCELLS];
    cell_t b[NCELLS];
    qdelay(c, a);
    cell_il(a, s, b);
    time_il(b, o);
  endfunction

  // Frequency interleaver of one symbol of NCELLS data cells.
  // Even symbols: a[H(p)] = x[p]; odd symbols: a[p] = x[H(p)].
  function automatic void freq_il(input cell_t x[NCELLS], input int s[NCELLS],
                                  input bit odd, output cell_t a[NCELLS]);
    for (int p = 0; p < NCELLS; p++)
      if (odd) a[p] = x[s[p]];
      else     a[s[p]] = x[p];
  endfunction

  function automatic cell_t rand_cell();
    cell_t c;
    c.re = comp_t'($urandom);
    c.im = comp_t'($urandom);
    return c;
  endfunction

endpackage
