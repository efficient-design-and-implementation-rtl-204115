// iqct_tb: self-checking testbench for the receiver time de-interleaver,
// cell de-interleaver and Q-delay removal.
//
// Two FEC blocks of random cells are passed through the reference
// transmitter chain (Q delay, cell permutation, time interleaving) and fed to
// the block, which must return the original cells in order. Block 0 runs
// without stalls: the first cell must appear two clocks after the last input
// and the block must stream at one cell per clock. Block 1 runs with random
// input gaps and output stalls.
module iqct_tb;
  import qctcf_pkg::*;
  import qctcf_ref_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  in_valid = 0, in_ready, out_valid, out_ready = 1;
  cell_t in_cell, out_cell;
  int checks = 0, failures = 0;
  int s[NCELLS];
  cell_t orig[2][NCELLS], txd[2][NCELLS];
  longint cyc = 0, last_in_cyc = 0, first_out_cyc = -1, last_out_cyc = 0;
  int nout = 0, nin = 0, blocked = 0;

  iqct dut (.*);

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

  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) begin
      nin++;
      if (nin == NCELLS) last_in_cyc = cyc;
    end
    if (rst_n && in_valid && !in_ready) blocked++;
    if (rst_n && out_valid && out_ready) begin
      automatic int b = nout / NCELLS;
      automatic int k = nout % NCELLS;
      if (nout == 0) first_out_cyc = cyc;
      if (nout == NCELLS - 1) last_out_cyc = cyc;
      check(b < 2 && out_cell == orig[b][k],
            $sformatf("block %0d cell %0d = %h exp %h", b, k, out_cell, orig[b][k]));
      nout++;
    end
  end

  task automatic send_block(input int b, input bit gaps);
    for (int i = 0; i < NCELLS; i++) begin
      in_valid <= 1; in_cell <= txd[b][i];
      do @(negedge clk); while (!in_ready);
      @(posedge clk);
      if (gaps && $urandom_range(3) == 0) begin
        in_valid <= 0;
        repeat (1 + $urandom_range(1)) @(posedge clk);
      end
    end
    in_valid <= 0;
  endtask

  initial begin
    build_perm(s);
    for (int b = 0; b < 2; b++) begin
      for (int i = 0; i < NCELLS; i++) orig[b][i] = rand_cell();
      qct_ref(orig[b], s, txd[b]);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    send_block(0, 0);
    fork
      send_block(1, 1);
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
    check(last_out_cyc - first_out_cyc == longint'(NCELLS - 1), "one cell per clock when ready");
    check(blocked > 0, "input was held off during a read-out");
    $display("latency %0d, input stalls %0d", first_out_cyc - last_in_cyc, blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
