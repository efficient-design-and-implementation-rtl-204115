// perm_gen_tb: checks the cell permutation generator.
//
// Runs the generator through one full block of NCELLS addresses and compares
// every address with the integer reference model, checks that the block is a
// permutation of 0..NCELLS-1, that addr_next always equals the address that
// follows, and that the first and last ten addresses equal the published
// values (given there counted from 1, here from 0). Also checks that
// 'restart' returns to S(0) in the middle of a block, that a held 'advance'
// freezes the outputs, and that discards ('skipped') happen.
module perm_gen_tb;
  import qctcf_pkg::*;
  import qctcf_ref_pkg::*;

  logic clk = 0, rst_n = 0, restart = 0, advance = 0;
  logic [ND-1:0] addr, addr_next;
  logic skipped;
  int checks = 0, failures = 0;
  int s[NCELLS];
  bit seen[NCELLS];
  int nskip = 0;

  // First and last ten addresses of the published sequence, minus one.
  localparam int FIRST10[10] = '{0, 8192, 4096, 10240, 5120, 10752, 1280, 8832, 4416, 10400};
  localparam int LAST10[10]  = '{962, 8673, 240, 8312, 60, 8222, 15, 8199, 3, 8193};

  perm_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  always @(posedge clk) if (skipped) nskip++;

  initial begin
    build_perm(s);
    for (int i = 0; i < 10; i++) begin
      check(s[i] == FIRST10[i], $sformatf("reference first[%0d]=%0d", i, s[i]));
      check(s[NCELLS-10+i] == LAST10[i], $sformatf("reference last[%0d]=%0d", i, s[NCELLS-10+i]));
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < NCELLS; i++) begin
      #1;
      check(addr == ND'(s[i]), $sformatf("addr[%0d]=%0d exp %0d", i, addr, s[i]));
      if (i < NCELLS - 1)
        check(addr_next == ND'(s[i+1]), $sformatf("addr_next[%0d]=%0d exp %0d", i, addr_next, s[i+1]));
      if (i < 10) check(int'(addr) == FIRST10[i], $sformatf("first ten [%0d]=%0d", i, addr));
      if (i >= NCELLS - 10) check(int'(addr) == LAST10[i-NCELLS+10], $sformatf("last ten [%0d]=%0d", i, addr));
      check(int'(addr) < NCELLS && !seen[addr], $sformatf("addr %0d repeated or out of range", addr));
      if (int'(addr) < NCELLS) seen[addr] = 1;
      advance <= 1;
      // hold advance low now and then: outputs must not move
      if (i % 997 == 5) begin
        advance <= 0;
        @(posedge clk); #1;
        check(addr == ND'(s[i]), "hold keeps addr");
        advance <= 1;
      end
      @(posedge clk);
    end
    advance <= 0;
    check(nskip > 0, "some candidates were discarded");
    // restart in the middle of a block
    advance <= 1;
    repeat (37) @(posedge clk);
    restart <= 1; advance <= 0;
    @(posedge clk);
    restart <= 0;
    #1;
    check(addr == 0 && addr_next == ND'(s[1]), "restart returns to S(0), S(1)");
    $display("discarded candidates: %0d", nskip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
