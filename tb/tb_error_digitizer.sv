// tb_error_digitizer: register loads with their bus bit positions, address
// decoding, start convert / busy / read of the ADC register (sign-extended
// 12-bit result) by addressed RAR and broadcast RAR-MDI, with an ideal
// comparator standing in for the analog section.
`timescale 1ns/1ps
module tb_error_digitizer;
  import asp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;
  int slot = 0;
  always @(posedge clk) slot <= (slot == 4) ? 0 : slot + 1;
  logic commit;
  assign commit = (slot == 3);

  dw_ctrl_t dw = DW_IDLE;
  logic [15:0] sysbus_in = 0, sysbus_out;
  logic sysbus_oe, adc_busy, adc_hold, adc_comp;
  logic [11:0] null_weight, ctrl_word, adc_trial;
  logic [9:0] mu_weight;
  int target = 0;
  int checks = 0, failures = 0;

  error_digitizer #(.MY_ADDR(5'd1), .CLKS_PER_BIT(2)) dut (.*);
  assign adc_comp = target >= int'(adc_trial) - 2048;

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  task automatic cyc(input logic [3:0] op, input logic aden, input logic [4:0] addr, input logic [15:0] data);
    @(negedge clk iff slot == 0);
    dw = '{addr: addr, aden: aden, cpen: 1'b0, op: op};
    sysbus_in = data;
    @(negedge clk iff slot == 4);
  endtask

  initial begin
    int busy_cycles;
    repeat (3) @(posedge clk); rst_n = 1;
    chk(null_weight == 12'h800 && mu_weight == 0 && ctrl_word == 0, "reset values");
    cyc(OP_ED_LNW, 0, 5'd1, 16'hABCD);  chk(null_weight == 12'hABC, "LNW takes D0..D11");
    cyc(OP_ED_LUW, 0, 5'd1, 16'hFFFF);  chk(mu_weight == 10'h3FF, "LuW takes D2..D11");
    cyc(OP_ED_LUW, 0, 5'd1, 16'h4010);  chk(mu_weight == 10'h001, "LuW LSB is D11");
    cyc(OP_ED_LUW, 0, 5'd1, 16'h2000);  chk(mu_weight == 10'h200, "LuW MSB is D2");
    cyc(OP_ED_LCW, 0, 5'd1, 16'h5A5F);  chk(ctrl_word == 12'h5A5, "LCW takes D0..D11");
    cyc(OP_ED_LNW, 0, 5'd2, 16'h1234);  chk(null_weight == 12'hABC, "other address ignored");
    cyc(OP_ED_LNW, 1, 5'd1, 16'h1234);  chk(null_weight == 12'hABC, "broadcast code 1 ignored");
    for (int i = 0; i < 40; i++) begin
      target = (i == 0) ? -2048 : (i == 1) ? 2047 : ($urandom_range(0, 4095) - 2048);
      cyc(OP_ED_SCA, 0, 5'd1, 0);
      chk(adc_busy && adc_hold, "SCA starts a conversion");
      busy_cycles = 0;
      while (adc_busy) begin cyc(OP_NOP, 0, 0, 0); busy_cycles++; end
      chk(busy_cycles == 5, $sformatf("busy for 5 instruction cycles (%0d)", busy_cycles));
      @(negedge clk iff slot == 0);
      dw = '{addr: 5'd1, aden: 1'b0, cpen: 1'b0, op: (i % 2) ? OP_ED_RAR : OP_NOP};
      if (i % 2 == 0) dw = '{addr: 5'd0, aden: 1'b1, cpen: 1'b0, op: OP_B_RAR_MDI};
      #1;
      chk(sysbus_oe && int'(signed'(sysbus_out)) == target,
          $sformatf("read ADC %0d expected %0d", int'(signed'(sysbus_out)), target));
      dw = DW_IDLE; #1;
      chk(!sysbus_oe, "no drive on NOP");
      @(negedge clk iff slot == 4);
    end
    cyc(OP_ED_SCA, 0, 5'd3, 0);  chk(!adc_busy, "SCA for another address ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
