// tb_tc_led_display: track mode follows the lines every clock; strobe mode
// loads only on the selected phase strobes.
`timescale 1ns/1ps
module tb_tc_led_display;
  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;
  logic strobe_mode = 0;
  logic [3:0] phase_sel = 4'b0100, tstb = 0;
  logic [31:0] lines = 0, led;
  int checks = 0, failures = 0;
  tc_led_display dut (.*);
  initial begin
    logic [31:0] held;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 50; i++) begin
      @(negedge clk); lines = $urandom;
      @(posedge clk); #1;
      checks++; if (led != lines) begin failures++; $display("FAIL track"); end
    end
    strobe_mode = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      held = led;
      lines = $urandom;
      tstb = 4'b0001 << (i % 5);
      if (i % 5 == 4) tstb = 0;
      if (i == 100) phase_sel = 4'b1001;
      @(posedge clk); #1;
      checks++;
      if ((|(tstb & phase_sel)) ? (led != lines) : (led != held)) begin
        failures++; $display("FAIL strobe i=%0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
