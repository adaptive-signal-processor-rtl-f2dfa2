// tb_ed_sar_adc: converts random input levels with an ideal comparator and
// checks the 2's complement result, the busy time (NBITS*CLKS_PER_BIT clocks)
// and that a start while busy is ignored.
`timescale 1ns/1ps
module tb_ed_sar_adc;
  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;
  logic start = 0, comp, busy, hold;
  logic [11:0] trial, result;
  int target;   // input level in LSB, -2048..2047 (held value)
  int checks = 0, failures = 0;

  ed_sar_adc #(.NBITS(12), .CLKS_PER_BIT(2)) dut (.*);

  // ideal comparator: input >= trial DAC level (offset binary trial)
  assign comp = target >= (int'(trial) - 2048);

  initial begin
    int cyc;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      target = (i < 4) ? ((i == 0) ? -2048 : (i == 1) ? 2047 : (i == 2) ? 0 : -1) : $urandom_range(0, 4095) - 2048;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      checks++; if (!busy || !hold) begin failures++; $display("FAIL: busy not raised"); end
      // a second start while busy must not restart the conversion
      if (i == 5) begin start = 1; @(negedge clk); start = 0; cyc = 1; end else cyc = 0;
      while (busy) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 12*2) begin failures++; $display("FAIL: busy for %0d clocks, expected 24", cyc); end
      checks++;
      if (int'(signed'(result)) != target) begin
        failures++; $display("FAIL: target %0d result %0d", target, int'(signed'(result)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
