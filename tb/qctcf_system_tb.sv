// qctcf_system_tb: end-to-end test of the QCTCF transmitter and receiver at
// full size (64-QAM, 10800 cells per PLP block, 642 L1 bits).
//
// Three frames are sent: each one FEC block of random cells per PLP plus
// random L1 bits. The transmitter output is looped back into the receiver
// with random stalls. Checks:
//   * every transmitter output item equals the reference model (Q delay,
//     cell interleaving, time interleaving per PLP, then L1 bits, even-symbol
//     and odd-symbol frequency interleaving);
//   * the receiver returns both PLPs and the L1 bits unchanged;
//   * the first transmitter output comes 2*NCELLS + 3 clocks after the first
//     input when nothing stalls (frame 0);
//   * each mechanism of the design happened: the cyclic wrap of the last Q
//     component, discarded permutation candidates, input held off while a
//     block is read out, the PLP join waiting, output stalls, L1 insertion,
//     even and odd symbol interleaving, and the receiver rebuilding cells.
module qctcf_system_tb;
  import qctcf_pkg::*;
  import qctcf_ref_pkg::*;

  localparam int NF    = 3;
  localparam int FRAME = L1_BITS + 2 * NCELLS;

  logic clk = 0, rst_n = 0;
  logic tx_plp1_valid, tx_plp1_ready, tx_plp2_valid, tx_plp2_ready;
  cell_t tx_plp1_cell, tx_plp2_cell;
  logic tx_l1_valid, tx_l1_ready, tx_l1_bit;
  logic tx_out_valid, tx_out_ready, tx_out_is_l1, tx_out_l1_bit;
  cell_t tx_out_cell;
  logic rx_in_valid, rx_in_ready, rx_in_is_l1, rx_in_l1_bit;
  cell_t rx_in_cell;
  logic rx_l1_valid;
  logic [L1_BITS-1:0] rx_l1;
  logic rx_plp1_valid, rx_plp1_ready = 1, rx_plp2_valid, rx_plp2_ready = 1;
  cell_t rx_plp1_cell, rx_plp2_cell;
  logic stall = 0;

  qctcf_system dut (.*);

  // Loop the transmitter output into the receiver, with optional stalls.
  assign rx_in_valid  = tx_out_valid && !stall;
  assign tx_out_ready = rx_in_ready && !stall;
  assign rx_in_is_l1  = tx_out_is_l1;
  assign rx_in_l1_bit = tx_out_l1_bit;
  assign rx_in_cell   = tx_out_cell;

  int checks = 0, failures = 0;
  int s[NCELLS];
  cell_t p1[NF][NCELLS], p2[NF][NCELLS];
  cell_t e1[NF][NCELLS], e2[NF][NCELLS];
  bit l1[NF][L1_BITS];
  longint cyc = 0, first_in_cyc = -1, first_out_cyc = -1;
  int ntx = 0, nrx1 = 0, nrx2 = 0, nl1 = 0;
  int ev_qwrap = 0, ev_skip = 0, ev_in_block = 0, ev_join_wait = 0, ev_out_stall = 0;
  int ev_l1 = 0, ev_even = 0, ev_odd = 0, ev_rx_rebuild = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired: tx %0d rx %0d/%0d", ntx, nrx1, nrx2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (tx_plp1_valid && tx_plp1_ready && first_in_cyc < 0) first_in_cyc = cyc;
    // mechanism counters
    if (dut.u_qct1.last_wr && dut.u_qct1.q_addr == 0) ev_qwrap++;
    if (dut.u_qct1.s_skip || dut.u_cf.h_skip || dut.u_iqct1.s_skip) ev_skip++;
    if ((tx_plp1_valid && !tx_plp1_ready) || (tx_plp2_valid && !tx_plp2_ready)) ev_in_block++;
    if (dut.u_cf.in_ready && (dut.q1_valid != dut.q2_valid)) ev_join_wait++;
    if (tx_out_valid && !tx_out_ready) ev_out_stall++;
    if (dut.u_iqct1.issue) ev_rx_rebuild++;
    // transmitter output against the reference
    if (tx_out_valid && tx_out_ready) begin
      automatic int f = ntx / FRAME;
      automatic int k = ntx % FRAME;
      if (ntx == 0) first_out_cyc = cyc;
      if (f >= NF) check(0, "too many transmitter outputs");
      else if (k < L1_BITS) begin
        ev_l1++;
        check(tx_out_is_l1 && tx_out_l1_bit == l1[f][k], $sformatf("tx frame %0d L1 bit %0d", f, k));
      end else if (k < L1_BITS + NCELLS) begin
        ev_even++;
        check(!tx_out_is_l1 && tx_out_cell == e1[f][k - L1_BITS],
              $sformatf("tx frame %0d even cell %0d", f, k - L1_BITS));
      end else begin
        ev_odd++;
        check(!tx_out_is_l1 && tx_out_cell == e2[f][k - L1_BITS - NCELLS],
              $sformatf("tx frame %0d odd cell %0d", f, k - L1_BITS - NCELLS));
      end
      ntx++;
    end
    // receiver outputs against the original cells
    if (rx_plp1_valid && rx_plp1_ready) begin
      check(nrx1 < NF * NCELLS && rx_plp1_cell == p1[nrx1 / NCELLS][nrx1 % NCELLS],
            $sformatf("rx PLP1 cell %0d", nrx1));
      nrx1++;
    end
    if (rx_plp2_valid && rx_plp2_ready) begin
      check(nrx2 < NF * NCELLS && rx_plp2_cell == p2[nrx2 / NCELLS][nrx2 % NCELLS],
            $sformatf("rx PLP2 cell %0d", nrx2));
      nrx2++;
    end
    if (dut.u_icf.issue && dut.u_icf.ecnt == 0) begin
      automatic bit ok = rx_l1_valid;
      for (int i = 0; i < L1_BITS; i++) ok &= (rx_l1[L1_BITS-1-i] == l1[nl1][i]);
      check(ok, $sformatf("rx L1 bits of frame %0d", nl1));
      nl1++;
    end
  end

  // Input drivers: each stream walks an index through its data and steps it
  // on a clock edge where valid and ready are both high. From frame 1 on,
  // each PLP stream pauses at random ('gate'); in frame 2 PLP2 pauses on two
  // clocks out of three.
  int i1 = 0, i2 = 0, il = 0;
  bit run = 0, gate1 = 1, gate2 = 1;

  always @(posedge clk) if (rst_n) begin
    if (tx_plp1_valid && tx_plp1_ready) i1 <= i1 + 1;
    if (tx_plp2_valid && tx_plp2_ready) i2 <= i2 + 1;
    if (tx_l1_valid && tx_l1_ready)     il <= il + 1;
  end

  always @(negedge clk) begin
    gate1 <= (i1 < NCELLS) || ($urandom_range(7) != 0);
    // in the last frame PLP2 is much slower, so the join has to wait for it
    gate2 <= (i2 < NCELLS) || ((i2 < 2 * NCELLS) ? ($urandom_range(7) != 0) : ($urandom_range(2) == 0));
  end

  assign tx_plp1_valid = run && gate1 && (i1 < NF * NCELLS);
  assign tx_plp2_valid = run && gate2 && (i2 < NF * NCELLS);
  assign tx_l1_valid   = run && (il < NF * L1_BITS);
  assign tx_plp1_cell  = (i1 < NF * NCELLS) ? p1[i1 / NCELLS][i1 % NCELLS] : '0;
  assign tx_plp2_cell  = (i2 < NF * NCELLS) ? p2[i2 / NCELLS][i2 % NCELLS] : '0;
  assign tx_l1_bit     = (il < NF * L1_BITS) ? l1[il / L1_BITS][il % L1_BITS] : 1'b0;

  initial begin
    build_perm(s);
    for (int f = 0; f < NF; f++) begin
      cell_t t1[NCELLS], t2[NCELLS];
      for (int i = 0; i < NCELLS; i++) begin
        p1[f][i] = rand_cell();
        p2[f][i] = rand_cell();
      end
      for (int i = 0; i < L1_BITS; i++) l1[f][i] = 1'($urandom);
      qct_ref(p1[f], s, t1);
      qct_ref(p2[f], s, t2);
      freq_il(t1, s, 1'b0, e1[f]);
      freq_il(t2, s, 1'b1, e2[f]);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run = 1;
    // stalls on the loop and on the receiver outputs after frame 0
    wait (ntx >= FRAME);
    while (nrx1 < NF * NCELLS || nrx2 < NF * NCELLS) begin
      @(negedge clk);
      stall = ($urandom_range(5) == 0);
      rx_plp1_ready = ($urandom_range(4) != 0);
      rx_plp2_ready = ($urandom_range(4) != 0);
    end
    repeat (5) @(posedge clk);
    check(first_out_cyc - first_in_cyc == longint'(2 * NCELLS + 3),
          $sformatf("first frame output %0d clocks after first input, expected %0d",
                    first_out_cyc - first_in_cyc, 2 * NCELLS + 3));
    check(ntx == NF * FRAME, "transmitter emitted every frame");
    check(nl1 == NF, "receiver delivered every L1 block");
    check(ev_qwrap > 0, "cyclic wrap of the last Q component happened");
    check(ev_skip > 0, "permutation candidates were discarded");
    check(ev_in_block > 0, "input was held off during a read-out");
    check(ev_join_wait > 0, "PLP join waited for the slower PLP");
    check(ev_out_stall > 0, "frame output stalled");
    check(ev_l1 > 0 && ev_even > 0 && ev_odd > 0, "L1, even and odd symbol items were sent");
    check(ev_rx_rebuild > 0, "receiver rebuilt cells");
    $display("first output after %0d clocks", first_out_cyc - first_in_cyc);
    $display("events: qwrap %0d skip %0d in_block %0d join_wait %0d out_stall %0d l1 %0d even %0d odd %0d rx %0d",
             ev_qwrap, ev_skip, ev_in_block, ev_join_wait, ev_out_stall, ev_l1, ev_even, ev_odd, ev_rx_rebuild);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
