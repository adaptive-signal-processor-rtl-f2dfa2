// tb_tc_timing_gen: checks the phase sequence and 5-slot period in RUN mode,
// one full T1..T4 cycle per press in SINGLE CYCLE mode and one slot per press
// in SINGLE STEP mode.
`timescale 1ns/1ps
module tb_tc_timing_gen;
  import asp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;
  clk_mode_e mode = CLK_RUN;
  logic button = 0;
  logic [3:0] tph, tstb;
  int checks = 0, failures = 0;
  int n_stb [4];
  int t4_count = 0;

  tc_timing_gen dut (.*);

  always @(posedge clk) begin
    for (int k = 0; k < 4; k++) if (tstb[k]) n_stb[k]++;
    if (tstb[3]) t4_count++;
  end

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  task automatic press();
    button = 1; repeat (4) @(posedge clk); button = 0; repeat (12) @(posedge clk);
  endtask

  initial begin
    int last, t;
    repeat (3) @(posedge clk); rst_n = 1;
    // RUN: T4 every 5 clocks, phases in order T1, T2, T3, T4, idle
    last = -1;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      chk($onehot0(tph) && tstb == tph, "RUN: strobes follow the one-hot phase");
      if (tph[3]) begin
        if (last >= 0) chk(i - last == 5, "RUN: 5 clocks per cycle");
        last = i;
      end
    end
    // phase order check
    @(negedge clk iff tph[0]);
    @(negedge clk); chk(tph == 4'b0010, "T2 follows T1");
    @(negedge clk); chk(tph == 4'b0100, "T3 follows T2");
    @(negedge clk); chk(tph == 4'b1000, "T4 follows T3");
    @(negedge clk); chk(tph == 4'b0000, "idle slot follows T4");
    @(negedge clk); chk(tph == 4'b0001, "T1 follows the idle slot");
    // SINGLE CYCLE from T1 (the mode applies from the next edge)
    mode = CLK_SINGLE_CYCLE;
    repeat (20) @(posedge clk);
    chk(tph == 4'b0001, "SINGLE CYCLE idles at T1");
    t = t4_count;
    for (int k = 0; k < 4; k++) n_stb[k] = 0;
    press();
    chk(t4_count - t == 1, "SINGLE CYCLE: one T4 per press");
    chk(n_stb[0] == 1 && n_stb[1] == 1 && n_stb[2] == 1, "SINGLE CYCLE: T1..T3 once each");
    chk(tph == 4'b0001, "SINGLE CYCLE stops before the next T1");
    press();
    chk(t4_count - t == 2, "SINGLE CYCLE: second press, second cycle");
    // SINGLE STEP
    mode = CLK_SINGLE_STEP;
    t = t4_count;
    press(); chk(tph == 4'b0010, "SINGLE STEP to T2");
    press(); chk(tph == 4'b0100, "SINGLE STEP to T3");
    press(); chk(tph == 4'b1000, "SINGLE STEP to T4");
    chk(t4_count == t, "no T4 strobe before it is stepped through");
    press(); chk(tph == 4'b0000 && t4_count == t + 1, "SINGLE STEP through T4 commits once");
    repeat (30) @(posedge clk);
    chk(t4_count == t + 1, "SINGLE STEP holds without a press");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
