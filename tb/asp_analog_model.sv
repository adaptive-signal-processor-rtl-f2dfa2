// asp_analog_model: behavioural model of the analog signal path of the ASP,
// for simulation only (not synthesizable; uses real arithmetic).
//
// Models, per weight channel, a sign discriminator and a multiplying DAC
// (weight = (code - 128) / 128, offset binary), the summing amplifiers that
// add all channel outputs to y, the error difference amplifier
// e = d - y - v_null with v_null = 10 V * (null_code - 2048) / 2048, the
// mu weight (a 10-bit unipolar DAC scaling e by mu_code / 1024), the
// sample-and-hold (holds mu*e while `hold` is high) and the comparator of the
// ADC: comp = 1 when the held voltage is at or above the trial DAC level
// 5 V * (trial - 2048) / 2048 of the 12-bit bipolar +-5 V converter.
// Channel inputs and the desired input are given in millivolts. Control word
// bits D0/D1 (zero reference inputs) ground the desired input.
module asp_analog_model #(
  parameter int unsigned N_CH = 64
) (
  input  logic                    clk,
  input  logic [N_CH-1:0][7:0]    dac_code,
  input  int                      x_mv [N_CH],
  input  int                      d_mv,
  input  logic [11:0]             null_code,
  input  logic [9:0]              mu_code,
  input  logic [11:0]             ctrl_word,
  input  logic                    hold,
  input  logic [11:0]             trial,
  output logic [N_CH-1:0]         disc,
  output logic                    comp,
  output int                      y_mv,
  output int                      e_mv
);

  real y, e, held;
  logic hold_q;

  always_comb begin
    y = 0.0;
    for (int k = 0; k < N_CH; k++) begin
      y += (real'(int'(dac_code[k]) - 128) / 128.0) * real'(x_mv[k]) / 1000.0;
      disc[k] = (x_mv[k] >= 0);
    end
    e = ((ctrl_word[11] || ctrl_word[10]) ? 0.0 : real'(d_mv) / 1000.0) - y
        - 10.0 * real'(int'(null_code) - 2048) / 2048.0;
    y_mv = int'(y * 1000.0);
    e_mv = int'(e * 1000.0);
  end

  // sample-and-hold: tracks while hold is low, holds from its rising edge
  always_ff @(posedge clk) begin
    hold_q <= hold;
    if (hold && !hold_q)
      held <= e * real'(mu_code) / 1024.0;
  end

  assign comp = held >= 5.0 * real'(int'(trial) - 2048) / 2048.0;

endmodule
