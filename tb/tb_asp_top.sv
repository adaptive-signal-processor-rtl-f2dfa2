// tb_asp_top: end-to-end test of the ASP digital system at its default size
// (8 weight processors, 64 weight channels) with a behavioural analog path.
//
// Sequence: download the microprogram and initial data with the loader; run
// the adapt sequencer with a mixed-sign set of channel inputs and a constant
// desired input and check that the error converges and every DAC shadows its
// DRAM weight; check that one adapt pass takes 32 instruction cycles (8 us at
// 250 ns); drive the weights into positive and negative saturation; read the
// ADC through the second sequencer page (DATIN); check the internal retrigger
// wait and the external trigger; exercise SINGLE CYCLE and SINGLE STEP clock
// modes; read a DRAM word through the manual switch register (MDO).
// Every mechanism is counted and a failure is counted for one that never
// happened.
`timescale 1ns/1ps
module tb_asp_top;
  import asp_pkg::*;

  localparam int NWP = 8;
  localparam int NCH_T = NWP * 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #25 clk = ~clk;   // 20 MHz master clock, 50 ns phases

  clk_mode_e       clk_mode = CLK_RUN;
  logic            clk_button = 1'b0;
  logic [1:0]      ld_page = '0;
  logic            ld_mode = 1'b0, ld_start = 1'b0;
  logic            seq_enable = 1'b0, seq_page = 1'b0, seq_ext_sel = 1'b0, seq_ext_trig = 1'b0;
  logic [3:0]      seq_rate = '0;
  logic            sw_enable = 1'b0, sw_data_en = 1'b0;
  dw_ctrl_t        sw_ctrl = DW_IDLE;
  logic [15:0]     sw_data = '0;
  logic            led_strobe_mode = 1'b0;
  logic [3:0]      led_phase_sel = 4'b1000;
  logic [31:0]     led;
  logic [15:0]     tc_data_in;
  logic [3:0]      tph;
  logic            ld_active, seq_active, abusy, wp_busy, adc_busy, of_pos, of_neg;
  logic [NWP-1:0][7:0]      wp_disc_in;
  logic [NWP-1:0][7:0][7:0] wp_dac_code;
  logic [11:0]     ed_null_weight, ed_ctrl_word, ed_adc_trial;
  logic [9:0]      ed_mu_weight;
  logic            ed_adc_hold, ed_adc_comp;

  asp_top dut (.*);

  int x_mv [NCH_T];
  int d_mv;
  int y_mv, e_mv;
  logic [NCH_T-1:0] disc;

  asp_analog_model #(.N_CH(NCH_T)) u_an (
    .clk, .dac_code(wp_dac_code), .x_mv, .d_mv,
    .null_code(ed_null_weight), .mu_code(ed_mu_weight), .ctrl_word(ed_ctrl_word),
    .hold(ed_adc_hold), .trial(ed_adc_trial),
    .disc, .comp(ed_adc_comp), .y_mv, .e_mv
  );
  assign wp_disc_in = disc;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- mechanism counters ----
  int n_download = 0, n_adc_wait = 0, n_wp_wait = 0, n_ofp = 0, n_ofn = 0;
  int n_luw = 0, n_datin = 0, n_pass = 0, n_ext = 0, n_retrig = 0;
  int n_single_cycle = 0, n_single_step = 0, n_mdo = 0;
  int n_commit = 0;
  int last_sca = -1;
  int pass_len_bad = 0, pass_len_seen = 0;
  logic seq_active_q = 1'b0;

  wire commit = dut.commit;
  always @(posedge clk) if (commit) begin
    n_commit++;
    if (dut.u_tc.seq_waiting && adc_busy) n_adc_wait++;
    if (dut.u_tc.seq_waiting && wp_busy && !adc_busy) n_wp_wait++;
    if (of_pos) n_ofp++;
    if (of_neg) n_ofn++;
    if (seq_active && dut.dw.op == OP_ED_LUW && !dut.dw.aden && dut.dw.addr == 5'd1) n_luw++;
    if (seq_active && dut.dw.op == OP_ED_SCA && !dut.dw.aden && dut.dw.addr == 5'd1) begin
      if (last_sca >= 0 && seq_page == 1'b0 && dut.u_tc.u_seq.seq_addr != 4'd1) begin
        pass_len_seen++;
        if (n_commit - last_sca != 32) pass_len_bad++;
      end
      last_sca = n_commit;
      n_pass++;
    end
  end

  task automatic wait_commits(input int n);
    repeat (n) @(posedge clk iff commit);
  endtask

  // DAC code must equal the upper byte of the DRAM weight, sign inverted
  task automatic check_shadow(input string tag);
    int bad = 0;
    logic [15:0] w;
    for (int k = 0; k < NWP; k++)
      for (int c = 0; c < 8; c++) begin
        case (k)
          0: w = dut.g_wp[0].u_wp.u_dp.dram[2+c];
          1: w = dut.g_wp[1].u_wp.u_dp.dram[2+c];
          2: w = dut.g_wp[2].u_wp.u_dp.dram[2+c];
          3: w = dut.g_wp[3].u_wp.u_dp.dram[2+c];
          4: w = dut.g_wp[4].u_wp.u_dp.dram[2+c];
          5: w = dut.g_wp[5].u_wp.u_dp.dram[2+c];
          6: w = dut.g_wp[6].u_wp.u_dp.dram[2+c];
          default: w = dut.g_wp[7].u_wp.u_dp.dram[2+c];
        endcase
        if (wp_dac_code[k][c] != {~w[15], w[14:8]}) bad++;
      end
    check(bad == 0, $sformatf("%s: %0d DAC codes differ from DRAM weights", tag, bad));
  endtask

  task automatic all_codes(input logic [7:0] v, input string tag);
    int bad = 0;
    for (int k = 0; k < NWP; k++)
      for (int c = 0; c < 8; c++)
        if (wp_dac_code[k][c] != v) bad++;
    check(bad == 0, $sformatf("%s: %0d DAC codes not %02x", tag, bad, v));
  endtask

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int sum_e;
    int seq_starts, idle, t0;
    logic [15:0] expect_bus;
    foreach (x_mv[i]) x_mv[i] = (((i * 37) % 5) - 2) * 500;
    d_mv = 3000;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);

    // ---------------- download ----------------
    ld_mode = 1'b1; ld_start = 1'b1;
    repeat (4) @(posedge clk);
    ld_start = 1'b0;
    @(posedge clk iff ld_active);
    @(posedge clk iff !ld_active);
    n_download++;
    ld_mode = 1'b0;
    check(ed_null_weight == 12'h800, "null weight loaded");
    check(ed_mu_weight == 10'h200, "mu weight loaded by the downloader");
    check(ed_ctrl_word == 12'h000, "control word loaded");
    check(dut.g_wp[0].u_wp.pc == 8'h4C && dut.g_wp[7].u_wp.pc == 8'h4C, "WPs parked at the adapt loop");
    all_codes(8'h80, "after download");
    check_shadow("after download");

    // ---------------- adapt ----------------
    sw_data = 16'(10'h100) << 4;   // mu = 0.25 from the switch register (LuW + DATOUT)
    seq_enable = 1'b1;
    sum_e = 0;
    for (int i = 0; i < 40; i++) begin
      wait_commits(397);
      if (i >= 20) sum_e += (e_mv < 0) ? -e_mv : e_mv;
    end
    seq_enable = 1'b0;
    @(posedge clk iff (commit && !seq_active));
    wait_commits(2);
    check(ed_mu_weight == 10'h100, "mu weight taken from the switch register");
    // the residual is set by the 8-bit weight DACs: weights that move together
    // change their codes together, so |e| is compared with the 3 V start
    $display("adapt: mean |e| = %0d mV over the last 20 snapshots, %0d passes", sum_e / 20, n_pass);
    check(sum_e / 20 < 150, $sformatf("error converged (mean |e| = %0d mV, start 3000 mV)", sum_e / 20));
    check_shadow("after adapt");
    check(pass_len_seen > 10 && pass_len_bad == 0,
          $sformatf("adapt pass 32 cycles (seen %0d, wrong %0d)", pass_len_seen, pass_len_bad));
    check(dut.g_wp[3].u_wp.u_dp.dram[0][15:8] ==
          {disc[24], disc[25], disc[26], disc[27], disc[28], disc[29], disc[30], disc[31]},
          "sign word stored in DRAM[0]");

    // ---------------- saturation ----------------
    foreach (x_mv[i]) x_mv[i] = 0;
    d_mv = 9000;
    seq_enable = 1'b1;
    wait_commits(6000);
    seq_enable = 1'b0;
    @(posedge clk iff (commit && !seq_active));
    all_codes(8'hFF, "positive saturation");
    check(dut.g_wp[5].u_wp.u_dp.dram[4] == 16'h7FFF, "weight held at 7FFF");
    d_mv = -9000;
    seq_enable = 1'b1;
    wait_commits(8000);
    seq_enable = 1'b0;
    @(posedge clk iff (commit && !seq_active));
    all_codes(8'h00, "negative saturation");
    check(dut.g_wp[2].u_wp.u_dp.dram[9] == 16'h8000, "weight held at 8000");

    // ---------------- ADC read via DATIN (page 1) ----------------
    // all weights at -1 and inputs 0: y = 0, e = d
    d_mv = 2000;
    seq_page = 1'b1;
    seq_enable = 1'b1;
    @(posedge clk iff (commit && seq_active && dut.u_tc.u_seq.datin));
    @(posedge clk);
    seq_enable = 1'b0;
    n_datin++;
    // expected: floor(d * mu / 5 V * 2048), mu = 256/1024: 2.0 V -> 204
    check(tc_data_in == 16'd204 || tc_data_in == 16'd203,
          $sformatf("ADC read through DATIN = %0d, expected 204", tc_data_in));
    @(posedge clk iff (commit && !seq_active));
    d_mv = -2000;
    seq_enable = 1'b1;
    @(posedge clk iff (commit && seq_active && dut.u_tc.u_seq.datin));
    @(posedge clk);
    seq_enable = 1'b0;
    n_datin++;
    // -2.0 V -> floor(-204.8) = -205 = FF33 sign-extended
    check(tc_data_in == 16'hFF33 || tc_data_in == 16'hFF34,
          $sformatf("negative ADC read sign-extended = %04x, expected FF33", tc_data_in));
    @(posedge clk iff (commit && !seq_active));
    seq_page = 1'b0;

    // ---------------- retrigger wait 2^4 ----------------
    seq_rate = 4'd1;
    seq_enable = 1'b1;
    @(posedge clk iff (commit && seq_active && dut.u_tc.u_seq.seq_addr == 4'hF && !dut.u_tc.seq_waiting));
    idle = 0;
    do begin
      @(posedge clk iff commit);
      if (!seq_active) idle++;
    end while (!seq_active);
    seq_enable = 1'b0;
    n_retrig++;
    check(idle == 16, $sformatf("retrigger wait %0d cycles, expected 16", idle));
    @(posedge clk iff (commit && !seq_active));

    // ---------------- external trigger ----------------
    seq_ext_sel = 1'b1;
    seq_enable = 1'b1;
    wait_commits(300);
    check(!seq_active, "no sequence without an external trigger");
    seq_ext_trig = 1'b1;
    repeat (8) @(posedge clk);
    seq_ext_trig = 1'b0;
    seq_starts = 0;
    for (int i = 0; i < 600; i++) begin
      @(posedge clk iff commit);
      if (seq_active && dut.u_tc.u_seq.seq_addr == 4'h0 && !seq_active_q) seq_starts++;
      seq_active_q = seq_active;
    end
    n_ext = seq_starts;
    check(seq_starts == 1, $sformatf("one sequence per external trigger (%0d)", seq_starts));
    seq_enable = 1'b0;
    seq_ext_sel = 1'b0;

    // ---------------- clock modes ----------------
    @(negedge clk iff tph[0]);
    clk_mode = CLK_SINGLE_STEP;    // stops at T1
    repeat (20) @(posedge clk);
    check(tph == 4'b0001, $sformatf("SINGLE STEP holds its phase (%b)", tph));
    clk_button = 1'b1; repeat (4) @(posedge clk); clk_button = 1'b0; repeat (10) @(posedge clk);
    check(tph == 4'b0010, $sformatf("SINGLE STEP: one press, one phase (%b)", tph));
    n_single_step++;
    // step on through T3, T4 and the idle slot back to T1
    repeat (4) begin
      clk_button = 1'b1; repeat (4) @(posedge clk); clk_button = 1'b0; repeat (10) @(posedge clk);
    end
    check(tph == 4'b0001, $sformatf("SINGLE STEP back at T1 (%b)", tph));
    clk_mode = CLK_SINGLE_CYCLE;   // next press runs T1..T4 and the idle slot
    t0 = n_commit;
    clk_button = 1'b1; repeat (4) @(posedge clk); clk_button = 1'b0; repeat (30) @(posedge clk);
    check(n_commit - t0 == 1, $sformatf("SINGLE CYCLE: one press, one cycle (%0d)", n_commit - t0));
    n_single_cycle++;
    clk_mode = CLK_RUN;

    // ---------------- manual switch register: read DRAM with MDO ----------------
    // WP 3 (address 5) sits at the adapt loop with AC = 0: its DRAM[0] is the sign word
    expect_bus = dut.g_wp[3].u_wp.u_dp.dram[0];
    sw_ctrl = '{addr: 5'd5, aden: 1'b0, cpen: 1'b0, op: OP_WP_MDO};
    sw_enable = 1'b1;
    wait_commits(2);
    check(led[31:16] == expect_bus, $sformatf("MDO shows DRAM word %04x on the LEDs (%04x)", expect_bus, led[31:16]));
    n_mdo++;
    sw_enable = 1'b0;
    wait_commits(2);

    // ---------------- mechanisms ----------------
    $display("mechanisms: download=%0d adc_wait=%0d wp_wait=%0d +OF=%0d -OF=%0d LuW=%0d datin=%0d pass=%0d retrig=%0d ext=%0d step=%0d cycle=%0d mdo=%0d",
             n_download, n_adc_wait, n_wp_wait, n_ofp, n_ofn, n_luw, n_datin, n_pass, n_retrig, n_ext,
             n_single_step, n_single_cycle, n_mdo);
    check(n_download > 0, "download happened");
    check(n_adc_wait > 0, "sequencer waited for ADC busy");
    check(n_wp_wait > 0, "sequencer waited for WP busy");
    check(n_ofp > 0, "positive overflow happened");
    check(n_ofn > 0, "negative overflow happened");
    check(n_luw > 0, "mu loaded by the sequencer");
    check(n_datin > 0, "DATIN capture happened");
    check(n_pass > 0, "adapt passes ran");
    check(n_retrig > 0 && n_ext > 0, "retrigger and external trigger happened");
    check(n_single_step > 0 && n_single_cycle > 0, "clock modes used");
    check(n_mdo > 0, "manual MDO happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
