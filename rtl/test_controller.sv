// test_controller: test controller (TC) module, the master of the dataway.
//
// Contains the clock phase generator (tc_timing_gen), the microprogram loader
// (tc_loader), the adapt sequencer (tc_sequencer), the manual switch register
// and the LED output register (tc_led_display). The TC drives the dataway
// control lines (OP code, address, ADEN, CPEN) and, when asked, the data bus.
//
// Bus master choice (this design's order): a running download first, then
// the adapt sequencer, then the manual switch register when its enable switch
// is on; otherwise the dataway idles (NOP, CPEN low, so the weight processors
// hold). The loader always drives its data word. The sequencer drives the
// switch register data only for words with DATOUT. The manual switch register
// (27 bits: 16 data, 5 address, 4 OP, ADEN, CPEN) drives its data word when
// its data enable switch is on, so that read instructions can be keyed in too.
// A sequencer word with DATIN captures the data bus in `data_in`.
//
// LED lines (this design's assignment): [31:16] data bus, [15:12] OP code,
// [11:7] address, [6] ADEN, [5] CPEN, [4] ABUSY, [3] WP busy, [2] ADC busy,
// [1] +OF, [0] -OF.
//
// Timing: everything commits on the T4 strobe from tc_timing_gen, which is
// also brought out (`tph`, `tstb`) as the dataway clock phase bus.
module test_controller
  import asp_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // clock generator
  input  clk_mode_e     clk_mode,
  input  logic          clk_button,
  output logic [3:0]    tph,
  output logic [3:0]    tstb,
  // loader
  input  logic [1:0]    ld_page,
  input  logic          ld_mode,
  input  logic          ld_start,
  output logic          ld_active,
  // sequencer
  input  logic          seq_enable,
  input  logic          seq_page,
  input  logic          seq_ext_sel,
  input  logic          seq_ext_trig,
  input  logic [3:0]    seq_rate,
  output logic          abusy,
  output logic          seq_active,
  output logic          seq_waiting,
  // manual switch register
  input  logic          sw_enable,
  input  logic          sw_data_en,
  input  dw_ctrl_t      sw_ctrl,
  input  logic [DW-1:0] sw_data,
  // dataway
  output dw_ctrl_t      dw,
  output logic [DW-1:0] sysbus_out,
  output logic          sysbus_oe,
  input  logic [DW-1:0] sysbus_in,
  input  logic          wp_busy,
  input  logic          adc_busy,
  input  logic          of_pos,
  input  logic          of_neg,
  output logic [DW-1:0] data_in,
  // display
  input  logic          led_strobe_mode,
  input  logic [3:0]    led_phase_sel,
  output logic [31:0]   led
);

  logic          commit;
  dw_ctrl_t      ld_dw, seq_dw;
  logic [DW-1:0] ld_data;
  logic          seq_data_oe, seq_datin;
  logic [15:0]   seq_word;
  logic [3:0]    seq_addr;

  assign commit = tstb[3];

  tc_timing_gen u_tgen (
    .clk, .rst_n, .mode(clk_mode), .button(clk_button), .tph, .tstb
  );

  tc_loader u_loader (
    .clk, .rst_n, .commit,
    .page_sel (ld_page),
    .mode_en  (ld_mode),
    .start    (ld_start),
    .active   (ld_active),
    .dw       (ld_dw),
    .data     (ld_data)
  );

  tc_sequencer u_seq (
    .clk, .rst_n, .commit,
    .enable       (seq_enable && !ld_active),
    .page_sel     (seq_page),
    .ext_trig_sel (seq_ext_sel),
    .ext_trig     (seq_ext_trig),
    .rate_sel     (seq_rate),
    .wp_busy, .adc_busy,
    .active       (seq_active),
    .dw           (seq_dw),
    .data_oe      (seq_data_oe),
    .datin        (seq_datin),
    .abusy,
    .waiting      (seq_waiting),
    .seq_word, .seq_addr
  );

  always_comb begin
    dw         = DW_IDLE;
    sysbus_out = '0;
    sysbus_oe  = 1'b0;
    if (ld_active) begin
      dw         = ld_dw;
      sysbus_out = ld_data;
      sysbus_oe  = 1'b1;
    end else if (seq_active) begin
      dw         = seq_dw;
      sysbus_out = sw_data;
      sysbus_oe  = seq_data_oe;
    end else if (sw_enable) begin
      dw         = sw_ctrl;
      sysbus_out = sw_data;
      sysbus_oe  = sw_data_en;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                data_in <= '0;
    else if (commit && seq_active && seq_datin) data_in <= sysbus_in;
  end

  tc_led_display u_led (
    .clk, .rst_n,
    .strobe_mode (led_strobe_mode),
    .phase_sel   (led_phase_sel),
    .tstb,
    .lines       ({sysbus_in, dw.op, dw.addr, dw.aden, dw.cpen, abusy,
                   wp_busy, adc_busy, of_pos, of_neg}),
    .led
  );

endmodule
