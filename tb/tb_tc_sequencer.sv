// tb_tc_sequencer: runs a test image (tb/tb_seq_test.hex) and checks field
// decoding, the ADC-busy and WP-busy waits and their inhibit bits, DATOUT,
// DATIN and ABUSY, the page switch, the retrigger waits 0 and 2^4..2^6 and
// one sequence per external trigger.
`timescale 1ns/1ps
module tb_tc_sequencer;
  import asp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;
  int slot = 0;
  always @(posedge clk) slot <= (slot == 4) ? 0 : slot + 1;
  logic commit;
  assign commit = (slot == 3);
  logic enable = 0, page_sel = 0, ext_trig_sel = 0, ext_trig = 0;
  logic [3:0] rate_sel = 0;
  logic wp_busy = 0, adc_busy = 0;
  logic active, data_oe, datin, abusy, waiting;
  dw_ctrl_t dw;
  logic [15:0] seq_word;
  logic [3:0] seq_addr;
  int checks = 0, failures = 0;

  tc_sequencer #(.INIT_FILE("tb/tb_seq_test.hex")) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  // sample at the middle of a cycle, return after its commit
  task automatic mid();
    @(negedge clk iff slot == 2);
  endtask
  task automatic endc();
    @(negedge clk iff slot == 4);
  endtask

  int n_commit = 0, n_start = 0;
  logic act_q = 0;
  always @(posedge clk) if (commit) begin
    n_commit++;
    act_q <= active;
  end
  always @(posedge clk) if (commit && !act_q && active) n_start++;

  initial begin
    int t_end, idle, st;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (40) @(posedge clk);
    chk(!active, "idle while disabled");
    enable = 1;
    @(negedge clk iff (active && slot == 0));
    // w0: SCA to address 3, CPEN, ABUSY, DATOUT
    mid(); chk(seq_addr == 0 && dw.addr == 3 && !dw.aden && dw.cpen && dw.op == 5, "word 0 fields");
    chk(abusy && data_oe && !datin, "word 0 ABUSY and DATOUT");
    endc();
    // w1: waits for the ADC
    adc_busy = 1; wp_busy = 1;
    repeat (3) begin mid(); chk(seq_addr == 1 && waiting, "holds on ADC busy"); endc(); end
    adc_busy = 0;
    mid(); chk(!waiting, "WP busy is inhibited on word 1"); endc();
    // w2: waits for the WPs
    repeat (2) begin mid(); chk(seq_addr == 2 && waiting, "holds on WP busy"); endc(); end
    wp_busy = 0; adc_busy = 1;
    mid(); chk(seq_addr == 2 && !waiting, "ADC busy inhibited on word 2"); endc();
    // w3: waits for both
    mid(); chk(seq_addr == 3 && waiting, "word 3 waits on ADC"); endc();
    adc_busy = 0; wp_busy = 1;
    mid(); chk(seq_addr == 3 && waiting, "word 3 waits on WP"); endc();
    wp_busy = 0;
    mid(); chk(seq_addr == 3 && !waiting, "word 3 released"); endc();
    for (int i = 4; i < 16; i++) begin
      mid();
      chk(seq_addr == 4'(i) && dw.addr == 5'(i) && dw.aden == i[0] && dw.cpen == i[1] && dw.op == 4'(i),
          $sformatf("word %0d fields", i));
      chk(datin == (i == 5) && abusy == (i != 15) && !data_oe, $sformatf("word %0d flags", i));
      endc();
    end
    // rate 0: next sequence follows directly
    mid(); chk(active && seq_addr == 0, "retrigger wait 0 restarts at once");
    // retrigger waits 2^4, 2^5, 2^6
    for (int r = 1; r <= 3; r++) begin
      rate_sel = 4'(r);
      @(negedge clk iff (slot == 2 && seq_addr == 4'hF && active)); endc();
      idle = 0;
      while (!active) begin idle++; endc(); end
      chk(idle == (1 << (r + 3)), $sformatf("retrigger wait %0d, expected %0d", idle, 1 << (r + 3)));
    end
    // page 1
    page_sel = 1;
    @(negedge clk iff (slot == 2 && active && seq_addr == 4'h3));
    chk(dw.addr == 31 && dw.aden && dw.op == 15 && !abusy, "page 1 word");
    page_sel = 0;
    // external trigger
    ext_trig_sel = 1;
    @(negedge clk iff (slot == 4 && !active));
    st = n_start;
    repeat (300) @(posedge clk);
    chk(n_start == st, "no start without an external trigger");
    ext_trig = 1; repeat (6) @(posedge clk); ext_trig = 0;
    repeat (600) @(posedge clk);
    chk(n_start == st + 1, $sformatf("one sequence per trigger (%0d)", n_start - st));
    enable = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
