// asp_top: digital system of the adaptive signal processor (ASP).
//
// The ASP runs the clipped LMS algorithm on a hybrid signal path: analog
// weights multiply the analog channel inputs and an analog amplifier sums
// them, while digital weight processors adjust the weights from the sign of
// each input and the digitised, mu-scaled error. This top joins the digital
// modules over the system dataway:
//   N_WP weight processors (8 channels each; 8 of them give 64 channels),
//   addresses 2..N_WP+1
//   one error digitizer, address 1
//   the test controller, master of the dataway
// The analog parts (weight multipliers, discriminators, summing and error
// amplifiers, mu and null weight DACs, sample-and-hold, ADC comparator,
// filter array preprocessor) are outside; their digital signals are ports.
//
// Dataway: the data bus is resolved as the OR of every enabled driver, like a
// wired bus; an assertion checks that at most one module drives it while the
// manual switch register is not in use. BUSY and the +OF/-OF flags are the OR
// of all weight processors. All modules commit on the T4 phase strobe.
//
// Module addresses are this design's choice except the error digitizer's 1,
// which follows the document's sequencer listing.
//
// rst_n is both the asynchronous reset of every register and the disable
// condition of the bus assertion; lint reports this mixed use, which is
// intended.
module asp_top
  import asp_pkg::*;
#(
  parameter int unsigned N_WP         = 8,
  parameter int unsigned ADC_CLKS_BIT = 2
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  // test controller front panel
  input  clk_mode_e                            clk_mode,
  input  logic                                 clk_button,
  input  logic [1:0]                           ld_page,
  input  logic                                 ld_mode,
  input  logic                                 ld_start,
  input  logic                                 seq_enable,
  input  logic                                 seq_page,
  input  logic                                 seq_ext_sel,
  input  logic                                 seq_ext_trig,
  input  logic [3:0]                           seq_rate,
  input  logic                                 sw_enable,
  input  logic                                 sw_data_en,
  input  dw_ctrl_t                             sw_ctrl,
  input  logic [DW-1:0]                        sw_data,
  input  logic                                 led_strobe_mode,
  input  logic [3:0]                           led_phase_sel,
  output logic [31:0]                          led,
  output logic [DW-1:0]                        tc_data_in,
  // system status
  output logic [3:0]                           tph,
  output logic                                 ld_active,
  output logic                                 seq_active,
  output logic                                 abusy,
  output logic                                 wp_busy,
  output logic                                 adc_busy,
  output logic                                 of_pos,
  output logic                                 of_neg,
  // weight channels (analog side)
  input  logic [N_WP-1:0][NCH-1:0]             wp_disc_in,
  output logic [N_WP-1:0][NCH-1:0][WBITS-1:0]  wp_dac_code,
  // error digitizer (analog side)
  output logic [11:0]                          ed_null_weight,
  output logic [9:0]                           ed_mu_weight,
  output logic [11:0]                          ed_ctrl_word,
  output logic                                 ed_adc_hold,
  output logic [ADC_BITS-1:0]                  ed_adc_trial,
  input  logic                                 ed_adc_comp
);

  logic [3:0]              tstb;
  logic                    commit;
  dw_ctrl_t                dw;
  logic [DW-1:0]           sysbus;
  logic [DW-1:0]           tc_out, ed_out;
  logic                    tc_oe, ed_oe;
  logic [N_WP-1:0][DW-1:0] wp_out;
  logic [N_WP-1:0]         wp_oe, wp_busy_v, wp_ofp_v, wp_ofn_v;
  logic                    seq_waiting;

  assign commit = tstb[3];

  test_controller u_tc (
    .clk, .rst_n, .clk_mode, .clk_button, .tph, .tstb,
    .ld_page, .ld_mode, .ld_start, .ld_active,
    .seq_enable, .seq_page, .seq_ext_sel, .seq_ext_trig, .seq_rate,
    .abusy, .seq_active, .seq_waiting,
    .sw_enable, .sw_data_en, .sw_ctrl, .sw_data,
    .dw,
    .sysbus_out (tc_out),
    .sysbus_oe  (tc_oe),
    .sysbus_in  (sysbus),
    .wp_busy, .adc_busy, .of_pos, .of_neg,
    .data_in    (tc_data_in),
    .led_strobe_mode, .led_phase_sel, .led
  );

  for (genvar k = 0; k < N_WP; k++) begin : g_wp
    weight_processor #(.MY_ADDR(AW'(k + 2))) u_wp (
      .clk, .rst_n, .commit,
      .t2         (tstb[1]),
      .dw,
      .sysbus_in  (sysbus),
      .sysbus_out (wp_out[k]),
      .sysbus_oe  (wp_oe[k]),
      .busy       (wp_busy_v[k]),
      .of_pos     (wp_ofp_v[k]),
      .of_neg     (wp_ofn_v[k]),
      .disc_in    (wp_disc_in[k]),
      .dac_code   (wp_dac_code[k])
    );
  end

  error_digitizer #(.MY_ADDR(5'd1), .CLKS_PER_BIT(ADC_CLKS_BIT)) u_ed (
    .clk, .rst_n, .commit, .dw,
    .sysbus_in   (sysbus),
    .sysbus_out  (ed_out),
    .sysbus_oe   (ed_oe),
    .adc_busy,
    .null_weight (ed_null_weight),
    .mu_weight   (ed_mu_weight),
    .ctrl_word   (ed_ctrl_word),
    .adc_hold    (ed_adc_hold),
    .adc_trial   (ed_adc_trial),
    .adc_comp    (ed_adc_comp)
  );

  // wired-OR dataway
  always_comb begin
    sysbus = (tc_oe ? tc_out : '0) | (ed_oe ? ed_out : '0);
    for (int k = 0; k < N_WP; k++)
      if (wp_oe[k]) sysbus |= wp_out[k];
  end

  assign wp_busy = |wp_busy_v;
  assign of_pos  = |wp_ofp_v;
  assign of_neg  = |wp_ofn_v;

  // one data bus driver at a time, except when keyed in by hand
  a_one_driver: assert property (@(posedge clk) disable iff (!rst_n)
    (commit && !sw_enable) |-> $onehot0({tc_oe, ed_oe, wp_oe}));

endmodule
