// tc_led_display: 32-bit LED output register of the test controller.
//
// Shows the state of the dataway and of the adapt sequencer. In track mode
// (`strobe_mode` = 0) the register follows `lines` on every master clock, so
// the display is continuous. In strobe mode it loads `lines` only on the clock
// phases picked by the four `phase_sel` switches: it loads when tstb[k] and
// phase_sel[k] are both high, so any combination of T1..T4 may be chosen and
// the display changes at most once per phase per instruction cycle.
// Which lines feed the 32 bits is set by the test controller.
module tc_led_display (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        strobe_mode,
  input  logic [3:0]  phase_sel,
  input  logic [3:0]  tstb,
  input  logic [31:0] lines,
  output logic [31:0] led
);

  logic load;

  assign load = !strobe_mode || |(phase_sel & tstb);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    led <= '0;
    else if (load) led <= lines;
  end

endmodule
