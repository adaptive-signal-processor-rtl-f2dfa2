// tb_asp_workloads: the bench experiments of the ASP run on the whole system
// (default size: 8 weight processors, 64 channels) with the behavioural
// analog path. Each experiment starts from a fresh download (all weights 0)
// and runs the adapt sequencer continuously (no retrigger wait).
//
//  1. Step response: 8 channels held at DC levels, the desired input steps
//     between +5 V and -5 V; the error must fall below 5 % of the step.
//  2. Waveform synthesis: 8 channels at DC, a 2 V sine at the desired input,
//     1 kHz with mu = 0.5 and 4 kHz with mu at full scale; the weights track
//     it continuously, and the RMS error must stay below 35 % (1 kHz) and
//     60 % (4 kHz) of the RMS of the sine (first-order tracking lag).
//  3. Dual bandpass / noise canceller: two sinusoids (400 Hz and 1.2 kHz) and
//     their 90-degree shifted copies feed 4 channels, a DC bias feeds a 5th;
//     the primary input carries both tones at other phases, an offset and
//     broadband noise. After adaptation the error must hold the noise only:
//     the RMS of (error - noise) must be below 20 % of the RMS of the tones.
//  4. Single bandpass: the same with one tone, its shifted copy and the bias
//     (3 weights).
//  5. Square wave filtering: a 400 Hz square wave drives 16 filter channels
//     (first-order low-pass filters, cutoffs spaced logarithmically from
//     50 Hz to 20 kHz, standing in for the filter array); the desired input
//     is a 400 Hz sine at another phase. The RMS error must fall below 30 %
//     of the RMS of the sine.
//  6. Wideband filtering: a 750 Hz triangle drives 24 such filter channels;
//     the primary input is a 5 Vpp triangle buried in 10 Vpp random noise
//     (new sample every 25 us), mu = 0.015. The weight sum must recover the triangle:
//     RMS of (triangle - weight sum) below 35 % of the triangle's RMS.
// The convergence time of the step response is printed in adapt passes.
`timescale 1ns/1ps
module tb_asp_workloads;
  import asp_pkg::*;

  localparam int NWP   = 8;
  localparam int NCH_T = NWP * 8;
  localparam real PI   = 3.14159265358979;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #25 clk = ~clk;

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

  wire commit = dut.commit;
  int  n_pass = 0;
  always @(posedge clk)
    if (commit && seq_active && dut.dw.op == OP_ED_SCA && !dut.dw.aden) n_pass++;

  // ---- signal sources, recomputed every master clock ----
  typedef enum int {SRC_DC, SRC_SINE, SRC_TONES, SRC_SQUARE, SRC_WIDEBAND} src_e;
  src_e src = SRC_DC;
  int   n_tones = 2;
  real  step_mv = 5000.0;
  real  syn_hz = 1000.0;
  int   noise_mv = 0;          // current broadband noise sample at the primary input
  real  tone_mv = 0.0;         // periodic part of the primary input
  int   n_flt = 16;            // filter channels in use
  real  flt [24];              // low-pass filter bank outputs, mV
  real  flt_a [24];            // per-clock filter coefficients

  // first-order low-pass coefficient for cutoff fc at a 50 ns step
  function automatic real lp_coef(input real fc);
    return 1.0 - $exp(-2.0 * PI * fc * 50.0e-9);
  endfunction

  function automatic real triangle(input real ph);   // triangle, +-1, period 1
    real f;
    f = ph - $floor(ph);
    return (f < 0.5) ? (4.0 * f - 1.0) : (3.0 - 4.0 * f);
  endfunction

  always @(posedge clk) begin
    real t;
    t = $realtime * 1.0e-9;
    unique case (src)
      SRC_DC: d_mv = int'(step_mv);
      SRC_SINE: d_mv = int'(2000.0 * $sin(2.0 * PI * syn_hz * t));
      SRC_SQUARE, SRC_WIDEBAND: begin
        real r;
        if (src == SRC_SQUARE) begin
          r = ($sin(2.0 * PI * 400.0 * t) >= 0.0) ? 3000.0 : -3000.0;
          tone_mv = 2000.0 * $sin(2.0 * PI * 400.0 * t - 1.0);
          noise_mv = 0;
        end else begin
          r = 3000.0 * triangle(750.0 * t);
          tone_mv = 2500.0 * triangle(750.0 * t + 0.1);
          if ((int'($realtime) % 25000) < 50) noise_mv = int'($urandom_range(10000)) - 5000;
        end
        for (int k = 0; k < 24; k++) begin
          flt[k] += (r - flt[k]) * flt_a[k];
          x_mv[k] = (k < n_flt) ? int'(flt[k]) : 0;
        end
        d_mv = int'(tone_mv) + noise_mv;
      end
      default: begin
        tone_mv = 1500.0 * $sin(2.0 * PI * 400.0 * t + 0.7) + 500.0;
        x_mv[0] = int'(3000.0 * $sin(2.0 * PI * 400.0 * t));
        x_mv[1] = int'(3000.0 * $cos(2.0 * PI * 400.0 * t));
        x_mv[2] = 2000;
        if (n_tones == 2) begin
          tone_mv += 1000.0 * $sin(2.0 * PI * 1200.0 * t - 1.9);
          x_mv[3] = int'(3000.0 * $sin(2.0 * PI * 1200.0 * t));
          x_mv[4] = int'(3000.0 * $cos(2.0 * PI * 1200.0 * t));
        end
        if ((int'($realtime) % 1000) < 50) noise_mv = int'($urandom_range(400)) - 200;
        d_mv = int'(tone_mv) + noise_mv;
      end
    endcase
  end

  task automatic wait_commits(input int n);
    repeat (n) @(posedge clk iff commit);
  endtask

  // Stop the sequencer, download page 0 (weights back to 0), set mu and
  // restart the sequencer.
  task automatic restart(input logic [9:0] mu);
    seq_enable = 1'b0;
    if (seq_active) @(posedge clk iff (commit && !seq_active));
    ld_mode = 1'b1; ld_start = 1'b1;
    repeat (4) @(posedge clk);
    ld_start = 1'b0;
    @(posedge clk iff ld_active);
    @(posedge clk iff !ld_active);
    ld_mode = 1'b0;
    sw_data = 16'(mu) << 4;
    seq_enable = 1'b1;
  endtask

  // RMS of e and of (e - noise) over n commits; tone RMS over the same time
  task automatic measure(input int n, output real e_rms, output real r_rms, output real t_rms);
    real se = 0.0, sr = 0.0, st = 0.0;
    for (int i = 0; i < n; i++) begin
      wait_commits(1);
      se += real'(e_mv) * real'(e_mv);
      sr += real'(e_mv - noise_mv) * real'(e_mv - noise_mv);
      st += tone_mv * tone_mv;
    end
    e_rms = $sqrt(se / n);
    r_rms = $sqrt(sr / n);
    t_rms = $sqrt(st / n);
  endtask

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int p0, conv;
    real e_rms, r_rms, t_rms, d_rms;
    int n_runs = 0;
    foreach (x_mv[i]) x_mv[i] = 0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);

    // ---------------- 1. step response ----------------
    x_mv[0] = 1000; x_mv[1] = 800;  x_mv[2] = -600; x_mv[3] = 1200;
    x_mv[4] = 700;  x_mv[5] = -900; x_mv[6] = 1000; x_mv[7] = 500;
    src = SRC_DC; step_mv = 5000.0;
    restart(10'h100);
    for (int s = 0; s < 2; s++) begin
      step_mv = (s == 0) ? 5000.0 : -5000.0;
      wait_commits(2);
      p0 = n_pass; conv = -1;
      check((e_mv > 0) == (s == 0) && (e_mv > 4000 || e_mv < -4000),
            $sformatf("step %0d: full error right after the step (%0d mV)", s, e_mv));
      for (int i = 0; i < 12000; i++) begin
        wait_commits(1);
        if (conv < 0 && e_mv < 250 && e_mv > -250) conv = n_pass - p0;
      end
      measure(2000, e_rms, r_rms, t_rms);
      $display("step %0d: error within 5 %% after %0d adapt passes; settled RMS %0.0f mV", s, conv, e_rms);
      check(conv > 0, $sformatf("step %0d: error fell below 250 mV", s));
      check(e_rms < 250.0, $sformatf("step %0d: settled error %0.0f mV below 5 %% of the step", s, e_rms));
    end
    n_runs++;

    // ---------------- 2. waveform synthesis ----------------
    foreach (x_mv[i]) x_mv[i] = (i < 8) ? ((i % 2 == 0) ? 5000 : -5000) : 0;
    src = SRC_SINE;
    for (int f = 0; f < 2; f++) begin
      syn_hz = (f == 0) ? 1000.0 : 4000.0;
      restart((f == 0) ? 10'h200 : 10'h3FF);
      wait_commits(4000);                 // 1 ms to lock on
      measure(8000, e_rms, r_rms, t_rms); // 2 ms
      d_rms = 2000.0 / $sqrt(2.0);
      $display("synthesis %0.0f Hz: RMS error %0.0f mV against RMS desired %0.0f mV", syn_hz, e_rms, d_rms);
      check(e_rms < ((f == 0) ? 0.35 : 0.6) * d_rms,
            $sformatf("synthesis tracks the %0.0f Hz sine (RMS error %0.0f mV)", syn_hz, e_rms));
    end
    n_runs++;

    // ---------------- 3./4. dual and single bandpass ----------------
    for (int cfg = 0; cfg < 2; cfg++) begin
      foreach (x_mv[i]) x_mv[i] = 0;
      n_tones = (cfg == 0) ? 2 : 1;
      src = SRC_TONES;
      restart(10'h100);
      measure(400, e_rms, r_rms, t_rms);
      check(r_rms > 0.5 * t_rms, $sformatf("bandpass %0d tones: tones present before adaptation", n_tones));
      wait_commits(24000);               // 6 ms
      measure(8000, e_rms, r_rms, t_rms);
      $display("bandpass %0d tone(s), %0d weights: residual %0.0f mV RMS of %0.0f mV RMS tones (error %0.0f mV RMS with noise)",
               n_tones, 2 * n_tones + 1, r_rms, t_rms, e_rms);
      check(r_rms < 0.2 * t_rms, $sformatf("bandpass %0d tones: tones removed from the error (%0.0f mV left)", n_tones, r_rms));
      n_runs++;
    end

    // ---------------- 5./6. filter array experiments ----------------
    for (int cfg = 0; cfg < 2; cfg++) begin
      foreach (x_mv[i]) x_mv[i] = 0;
      n_flt = (cfg == 0) ? 16 : 24;
      for (int k = 0; k < 24; k++) begin
        flt[k] = 0.0;
        flt_a[k] = lp_coef(50.0 * $pow(400.0, real'(k) / real'(n_flt - 1)));
      end
      src = (cfg == 0) ? SRC_SQUARE : SRC_WIDEBAND;
      restart((cfg == 0) ? 10'h080 : 10'h00F);
      wait_commits((cfg == 0) ? 40000 : 600000);
      measure(40000, e_rms, r_rms, t_rms);
      if (cfg == 0) begin
        $display("square wave filtering, 16 channels: RMS error %0.0f mV of %0.0f mV RMS sine", e_rms, t_rms);
        check(e_rms < 0.3 * t_rms, $sformatf("square wave filtered into the sine (RMS error %0.0f mV)", e_rms));
      end else begin
        $display("wideband filtering, 24 channels: triangle recovered to %0.0f mV RMS of %0.0f mV RMS (noise %0.0f mV RMS in the error)",
                 r_rms, t_rms, e_rms);
        check(r_rms < 0.35 * t_rms, $sformatf("triangle recovered from the noise (%0.0f mV RMS left)", r_rms));
      end
      n_runs++;
    end

    check(n_runs == 6, "all six experiments ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
