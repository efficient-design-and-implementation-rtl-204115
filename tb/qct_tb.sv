// qct_tb: self-checking testbench for the combined Q-delay / cell / time
// interleaver.
//
// Sends two FEC blocks of random cells. Block 0 is sent back to back with the
// output always ready: the testbench checks that the first output comes two
// clocks after the last input is taken and that the block then streams out at
// one cell per clock. Its first and last cells carry the published example
// values (first input I = 990, last input Q = 11538; the first output must be
// 990 + j11538). Block 1 is sent with random input gaps and random output
// stalls. Every output cell is compared with the reference chain (Q delay,
// then cell permutation, then row/column time interleaving), and in_ready must
// stay low while a block is being read out.
module qct_tb;
  import qctcf_pkg::*;
  import qctcf_ref_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  in_valid = 0, in_ready, out_valid, out_ready = 1;
  cell_t in_cell, out_cell;
  int checks = 0, failures = 0;
  int s[NCELLS];
  cell_t blk[2][NCELLS];
  cell_t exp_blk[2][NCELLS];
  longint cyc = 0, last_in_cyc = 0, first_out_cyc = -1, last_out_cyc = 0;
  int nout = 0, nin = 0, blocked = 0;

  qct dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (200000) @(posedge clk);
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

  // Offer one cell and return right after the clock edge that takes it.
  // in_ready only changes on clock edges, so its value at the falling edge
  // is the one the next rising edge sees.
  task automatic send(input cell_t c);
    in_valid <= 1;
    in_cell  <= c;
    do @(negedge clk); while (!in_ready);
    @(posedge clk);
  endtask

  // Output monitor.
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      automatic int b = nout / NCELLS;
      automatic int k = nout % NCELLS;
      if (nout == 0) first_out_cyc = cyc;
      if (nout == NCELLS - 1) last_out_cyc = cyc;
      check(b < 2 && out_cell == exp_blk[b][k],
            $sformatf("block %0d out[%0d] = %h exp %h", b, k, out_cell, exp_blk[b][k]));
      nout++;
    end
    if (rst_n && in_valid && !in_ready) blocked++;
    if (rst_n && in_valid && in_ready) begin
      nin++;
      if (nin == NCELLS) last_in_cyc = cyc;
    end
    if (rst_n && out_valid && nout < NCELLS - 1)
      check(!in_ready, "no input taken while a block is read");
  end

  initial begin
    build_perm(s);
    for (int b = 0; b < 2; b++) begin
      for (int i = 0; i < NCELLS; i++) blk[b][i] = rand_cell();
    end
    blk[0][0].re = comp_t'(990);
    blk[0][0].im = comp_t'(20862);
    blk[0][NCELLS-1].re = comp_t'(59650);
    blk[0][NCELLS-1].im = comp_t'(11538);
    for (int b = 0; b < 2; b++) qct_ref(blk[b], s, exp_blk[b]);
    check(exp_blk[0][0].re == comp_t'(990) && exp_blk[0][0].im == comp_t'(11538),
          "reference reproduces the published first output");

    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // Block 0: back to back.
    for (int i = 0; i < NCELLS; i++) begin
      send(blk[0][i]);
    end
    // Block 1: offered at once (must wait for the read-out), then with gaps;
    // output stalls at random from now on.
    fork
      begin
        for (int i = 0; i < NCELLS; i++) begin
          send(blk[1][i]);
          if ($urandom_range(3) == 0) begin
            in_valid <= 0;
            repeat (1 + $urandom_range(1)) @(posedge clk);
          end
        end
        in_valid <= 0;
      end
      begin
        wait (nout >= NCELLS);
        while (nout < 2 * NCELLS) begin
          @(negedge clk);
          out_ready = ($urandom_range(3) != 0);
        end
      end
    join
    wait (nout == 2 * NCELLS);
    repeat (5) @(posedge clk);
    check(first_out_cyc - last_in_cyc == 2,
          $sformatf("first output %0d clocks after last input, expected 2", first_out_cyc - last_in_cyc));
    check(last_out_cyc - first_out_cyc == longint'(NCELLS - 1), "one output per clock when ready");
    check(blocked > 0, "input was held off during a read-out");
    check(nout == 2 * NCELLS, "all cells came out");
    $display("latency %0d, input stalls %0d", first_out_cyc - last_in_cyc, blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
