// cf_tb: self-checking testbench for the cell mapper / frequency interleaver.
//
// Two frames of random PLP cells and random L1 bits. The expected frame is
// built from the reference model: the L1 bits in arrival order, then the
// PLP1 cells frequency interleaved as an even symbol (a[H(p)] = x[p]), then
// the PLP2 cells as an odd symbol (a[p] = x[H(p)]). Frame 0 runs without
// stalls: the first L1 bit must appear three clocks after the last input and
// the 642 + 2*NCELLS items must follow at one per clock. Frame 1 runs with
// random gaps on both inputs and random output stalls, and its L1 bits arrive
// last, after the cells.
module cf_tb;
  import qctcf_pkg::*;
  import qctcf_ref_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  in_valid = 0, in_ready, l1_valid = 0, l1_ready, l1_bit = 0;
  logic  out_valid, out_ready = 1, out_is_l1, out_l1_bit;
  cell_t in_plp1, in_plp2, out_cell;
  int checks = 0, failures = 0;
  int s[NCELLS];
  cell_t p1[2][NCELLS], p2[2][NCELLS], e1[2][NCELLS], e2[2][NCELLS];
  bit l1[2][L1_BITS];
  localparam int FRAME = L1_BITS + 2 * NCELLS;
  longint cyc = 0, last_in_cyc = 0, first_out_cyc = -1, last_out_cyc = 0;
  int nout = 0, ncell_in = 0, nl1_in = 0, blocked = 0;

  cf dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) begin
      ncell_in++;
      if (ncell_in == NCELLS) last_in_cyc = cyc;
    end
    if (rst_n && l1_valid && l1_ready) nl1_in++;
    if (rst_n && in_valid && !in_ready) blocked++;
    if (rst_n && out_valid && out_ready) begin
      automatic int f = nout / FRAME;
      automatic int k = nout % FRAME;
      if (nout == 0) first_out_cyc = cyc;
      if (nout == FRAME - 1) last_out_cyc = cyc;
      if (f > 1) check(0, "too many outputs");
      else if (k < L1_BITS)
        check(out_is_l1 && out_l1_bit == l1[f][k], $sformatf("frame %0d L1 bit %0d", f, k));
      else if (k < L1_BITS + NCELLS)
        check(!out_is_l1 && out_cell == e1[f][k - L1_BITS],
              $sformatf("frame %0d even cell %0d = %h exp %h", f, k - L1_BITS, out_cell, e1[f][k - L1_BITS]));
      else
        check(!out_is_l1 && out_cell == e2[f][k - L1_BITS - NCELLS],
              $sformatf("frame %0d odd cell %0d", f, k - L1_BITS - NCELLS));
      nout++;
    end
  end

  task automatic send_cells(input int f, input bit gaps);
    for (int i = 0; i < NCELLS; i++) begin
      in_valid <= 1; in_plp1 <= p1[f][i]; in_plp2 <= p2[f][i];
      do @(negedge clk); while (!in_ready);
      @(posedge clk);
      if (gaps && $urandom_range(3) == 0) begin
        in_valid <= 0;
        repeat (1 + $urandom_range(1)) @(posedge clk);
      end
    end
    in_valid <= 0;
  endtask

  task automatic send_l1(input int f, input bit gaps);
    for (int i = 0; i < L1_BITS; i++) begin
      l1_valid <= 1; l1_bit <= l1[f][i];
      do @(negedge clk); while (!l1_ready);
      @(posedge clk);
      if (gaps && $urandom_range(3) == 0) begin
        l1_valid <= 0;
        repeat (1 + $urandom_range(1)) @(posedge clk);
      end
    end
    l1_valid <= 0;
  endtask

  initial begin
    build_perm(s);
    for (int f = 0; f < 2; f++) begin
      for (int i = 0; i < NCELLS; i++) begin
        p1[f][i] = rand_cell();
        p2[f][i] = rand_cell();
      end
      for (int i = 0; i < L1_BITS; i++) l1[f][i] = 1'($urandom);
      freq_il(p1[f], s, 1'b0, e1[f]);
      freq_il(p2[f], s, 1'b1, e2[f]);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // Frame 0: L1 bits and cells in parallel, no gaps.
    fork
      send_l1(0, 0);
      send_cells(0, 0);
    join
    // Frame 1: cells first (they wait for the read-out), L1 bits after,
    // gaps and output stalls.
    fork
      begin
        send_cells(1, 1);
        send_l1(1, 1);
      end
      begin
        wait (nout >= FRAME);
        while (nout < 2 * FRAME) begin
          @(negedge clk);
          out_ready = ($urandom_range(3) != 0);
        end
      end
    join
    wait (nout == 2 * FRAME);
    repeat (5) @(posedge clk);
    check(first_out_cyc - last_in_cyc == 3,
          $sformatf("first output %0d clocks after last input, expected 3", first_out_cyc - last_in_cyc));
    check(last_out_cyc - first_out_cyc == longint'(FRAME - 1), "one item per clock when ready");
    check(blocked > 0, "cells were held off during a read-out");
    check(nl1_in == 2 * L1_BITS, "all L1 bits taken");
    $display("latency %0d, input stalls %0d", first_out_cyc - last_in_cyc, blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
