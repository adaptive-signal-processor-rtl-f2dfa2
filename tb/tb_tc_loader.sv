// tb_tc_loader: loads a test image (tb/tb_loader_test.hex: 5 words on page 0,
// 3 words on page 2) and checks that a download only starts in loader mode,
// issues one word per cycle with every field in its place, and stops after
// the word with DLS set; then the same for page 2.
`timescale 1ns/1ps
module tb_tc_loader;
  import asp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;
  int slot = 0;
  always @(posedge clk) slot <= (slot == 4) ? 0 : slot + 1;
  logic commit;
  assign commit = (slot == 3);
  logic [1:0] page_sel = 0;
  logic mode_en = 0, start = 0, active;
  dw_ctrl_t dw;
  logic [15:0] data;
  int checks = 0, failures = 0;

  tc_loader #(.INIT_FILE("tb/tb_loader_test.hex")) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  task automatic press();
    start = 1; repeat (4) @(posedge clk); start = 0;
  endtask

  initial begin
    int n;
    repeat (3) @(posedge clk); rst_n = 1;
    press();
    repeat (30) @(posedge clk);
    chk(!active, "no download outside loader mode");
    mode_en = 1;
    press();
    @(negedge clk iff active);
    n = 0;
    while (active) begin
      @(negedge clk iff slot == 2);
      chk(data == 16'(16'h1111 * (n + 1)), $sformatf("word %0d data", n));
      chk(dw.addr == 5'(n + 3), "address field");
      chk(dw.aden == n[0] && dw.cpen == n[1], "ADEN and CPEN fields");
      chk(dw.op == 4'(n + 1), "OP field");
      n++;
      @(negedge clk iff slot == 4);
    end
    chk(n == 5, $sformatf("stops after the DLS word (%0d words)", n));
    repeat (40) @(posedge clk);
    chk(!active, "stays stopped");
    page_sel = 2'd2;
    press();
    @(negedge clk iff active);
    n = 0;
    while (active) begin
      @(negedge clk iff slot == 2);
      chk(data == 16'(16'hA000 + n) && dw.addr == 5'(20 + n) && dw.op == 4'(9 + n) && dw.aden && dw.cpen,
          $sformatf("page 2 word %0d", n));
      n++;
      @(negedge clk iff slot == 4);
    end
    chk(n == 3, "page 2 stops after 3 words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
