// icf_tb: self-checking testbench for the receiver frequency de-interleaver
// and cell de-mapper.
//
// Two frames are built with the reference transmitter model (L1 bits, then
// PLP1 interleaved as an even symbol, then PLP2 as an odd symbol) and fed to
// the block. It must return the L1 bits on its parallel port and the two PLPs
// side by side in their original order. Frame 0 runs without stalls and the
// first PLP pair must come two clocks after the last frame item; frame 1 runs
// with random input gaps and output stalls.
module icf_tb;
  import qctcf_pkg::*;
  import qctcf_ref_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  in_valid = 0, in_ready, in_is_l1 = 0, in_l1_bit = 0;
  logic  out_l1_valid, out_valid, out_ready = 1;
  logic [L1_BITS-1:0] out_l1;
  cell_t in_cell, out_plp1, out_plp2;
  int checks = 0, failures = 0;
  int s[NCELLS];
  cell_t p1[2][NCELLS], p2[2][NCELLS], e1[2][NCELLS], e2[2][NCELLS];
  bit l1[2][L1_BITS];
  localparam int FRAME = L1_BITS + 2 * NCELLS;
  longint cyc = 0, last_in_cyc = 0, first_out_cyc = -1, last_out_cyc = 0;
  int nout = 0, nin = 0, blocked = 0;

  icf dut (.*);

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
      nin++;
      if (nin == FRAME) last_in_cyc = cyc;
    end
    if (rst_n && in_valid && !in_ready) blocked++;
    if (rst_n && out_valid && out_ready) begin
      automatic int f = nout / NCELLS;
      automatic int k = nout % NCELLS;
      if (nout == 0) first_out_cyc = cyc;
      if (nout == NCELLS - 1) last_out_cyc = cyc;
      check(f < 2 && out_plp1 == p1[f][k] && out_plp2 == p2[f][k],
            $sformatf("frame %0d pair %0d", f, k));
      if (k == 0) begin
        automatic bit ok = out_l1_valid;
        for (int i = 0; i < L1_BITS; i++) ok &= (out_l1[L1_BITS-1-i] == l1[f][i]);
        check(ok, $sformatf("frame %0d L1 bits", f));
      end
      nout++;
    end
  end

  task automatic send_item(input bit is_l1, input bit b, input cell_t c);
    in_valid <= 1; in_is_l1 <= is_l1; in_l1_bit <= b; in_cell <= c;
    do @(negedge clk); while (!in_ready);
    @(posedge clk);
  endtask

  task automatic send_frame(input int f, input bit gaps);
    for (int i = 0; i < FRAME; i++) begin
      if (i < L1_BITS)               send_item(1, l1[f][i], '0);
      else if (i < L1_BITS + NCELLS) send_item(0, 0, e1[f][i - L1_BITS]);
      else                           send_item(0, 0, e2[f][i - L1_BITS - NCELLS]);
      if (gaps && $urandom_range(3) == 0) begin
        in_valid <= 0;
        repeat (1 + $urandom_range(1)) @(posedge clk);
      end
    end
    in_valid <= 0;
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
    send_frame(0, 0);
    fork
      send_frame(1, 1);
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
    check(last_out_cyc - first_out_cyc == longint'(NCELLS - 1), "one pair per clock when ready");
    check(blocked > 0, "input was held off during a read-out");
    $display("latency %0d, input stalls %0d", first_out_cyc - last_in_cyc, blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
