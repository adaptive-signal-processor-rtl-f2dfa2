// tb_test_controller: the dataway master choice of the test controller
// (loader over sequencer over manual switch register, idle otherwise), the
// download length of the loader image, the sequencer's first words (LuW with
// the switch data, then start convert), DATIN capture, the LED line map in
// track mode and that the clock phases run. The undriven bus reads as a
// test value that changes after the capture.
`timescale 1ns/1ps
module tb_test_controller;
  import asp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;
  clk_mode_e clk_mode = CLK_RUN;
  logic clk_button = 0;
  logic [3:0] tph, tstb;
  logic [1:0] ld_page = 0;
  logic ld_mode = 0, ld_start = 0, ld_active;
  logic seq_enable = 0, seq_page = 0, seq_ext_sel = 0, seq_ext_trig = 0;
  logic [3:0] seq_rate = 0;
  logic abusy, seq_active, seq_waiting;
  logic sw_enable = 0, sw_data_en = 0;
  dw_ctrl_t sw_ctrl = '{addr: 5'd9, aden: 1'b1, cpen: 1'b1, op: 4'd7};
  logic [15:0] sw_data = 16'hC3A5;
  dw_ctrl_t dw;
  logic [15:0] sysbus_out, sysbus_in, data_in;
  logic sysbus_oe;
  logic wp_busy = 0, adc_busy = 0, of_pos = 0, of_neg = 0;
  logic led_strobe_mode = 0;
  logic [3:0] led_phase_sel = 4'b1000;
  logic [31:0] led;
  int checks = 0, failures = 0;

  test_controller dut (.*);
  logic [15:0] bg = 16'h0123;   // value on an undriven bus
  assign sysbus_in = sysbus_oe ? sysbus_out : bg;

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    int n;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (10) @(posedge clk);
    chk(dw == DW_IDLE && !sysbus_oe, "idle dataway");
    chk(tph != 0 || tstb == 0, "phases run");
    // manual switch register
    sw_enable = 1; #1;
    chk(dw == sw_ctrl && !sysbus_oe, "manual register drives the control lines");
    sw_data_en = 1; #1;
    chk(sysbus_oe && sysbus_out == sw_data, "manual register drives data when enabled");
    @(posedge clk); @(negedge clk);
    chk(led == {sysbus_in, dw.op, dw.addr, dw.aden, dw.cpen, abusy, wp_busy, adc_busy, of_pos, of_neg},
        "LED track mode line map");
    // loader takes over from the manual register
    ld_mode = 1; ld_start = 1; repeat (4) @(posedge clk); ld_start = 0;
    @(negedge clk iff ld_active);
    chk(dw.op == OP_B_MDI_LPC && dw.aden && sysbus_oe && sysbus_out == 16'h0000,
        "loader drives its first word (broadcast MDI-LPC 00)");
    n = 0;
    while (ld_active) begin @(posedge clk iff tstb[3]); @(negedge clk); n++; end
    chk(n == 58, $sformatf("download image of 58 words (%0d)", n));
    ld_mode = 0;
    #1; chk(dw == sw_ctrl, "manual register back after the download");
    // sequencer takes over from the manual register
    sw_data = 16'h3C00;
    seq_enable = 1;
    @(negedge clk iff seq_active);
    chk(dw.op == OP_ED_LUW && dw.addr == 5'd1 && !dw.aden && sysbus_oe && sysbus_out == 16'h3C00,
        "sequencer word 0: LuW with the switch data");
    @(posedge clk iff tstb[3]); @(negedge clk);
    chk(dw.op == OP_ED_SCA && dw.cpen && !sysbus_oe && abusy, "sequencer word 1: start convert");
    chk(data_in == 16'h0000, "no capture on a word without DATIN");
    seq_enable = 0;
    @(negedge clk iff !seq_active);
    // page 1: SCA, wait, RAR with DATIN
    seq_page = 1; seq_enable = 1;
    adc_busy = 1;
    @(negedge clk iff (seq_active && dut.u_seq.seq_addr == 4'd1));
    repeat (20) @(posedge clk);
    chk(seq_waiting && dut.u_seq.seq_addr == 4'd1, "waits for ADC busy");
    adc_busy = 0;
    @(negedge clk iff dut.u_seq.seq_addr == 4'd3);
    chk(data_in == 16'h0123, "DATIN captured the data bus");
    bg = 16'h4567;
    @(negedge clk iff dut.u_seq.seq_addr == 4'd6);
    chk(data_in == 16'h0123, "words without DATIN leave the read register alone");
    seq_enable = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
