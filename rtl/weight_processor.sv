// weight_processor: one weight processor (WP) module of the ASP.
//
// A small microprogrammed processor that runs the clipped LMS weight update
// for 8 hybrid weight channels: for each channel i it forms
//     w_i <= w_i + (mu * error)   if the channel input x_i >= 0
//     w_i <= w_i - (mu * error)   otherwise
// in 16-bit saturating arithmetic and writes the upper byte of w_i to the
// channel's weight DAC. The scaled error comes over the dataway from the
// error digitizer; the input signs come from the channel discriminators.
//
// Structure: wp_control (PRAM, PC, AC, SC, decode, dataway IOI decode),
// wp_datapath (A, B, C, F registers, DRAM, ALU), wp_weight_section (DAC
// holding registers, sign latch). They share one internal 16-bit data bus:
//   IOI MDI (any form)  -> system data bus
//   DTI MSR / MSR-SMD   -> sign word in D0..D7
//   DTI MAD / MAD-SMD   -> ALU output
//   DTI MPD             -> program data (reference address or data nibble)
//   otherwise           -> DRAM[AC] (so MDO reads the DRAM)
// The internal bus is driven onto the system data bus only for IOI MDO.
// The priority of MDI over a DTI source is this design's choice.
//
// Timing: one composite instruction per system clock cycle (T1..T4); state
// changes at the T4 strobe `commit`. busy, of_pos and of_neg are this module's
// contributions to the wired-OR dataway status lines.
module weight_processor
  import asp_pkg::*;
#(
  parameter logic [AW-1:0] MY_ADDR = 5'd2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       commit,
  input  logic                       t2,
  input  dw_ctrl_t                   dw,
  input  logic [DW-1:0]              sysbus_in,
  output logic [DW-1:0]              sysbus_out,
  output logic                       sysbus_oe,
  output logic                       busy,
  output logic                       of_pos,
  output logic                       of_neg,
  input  logic [NCH-1:0]             disc_in,
  output logic [NCH-1:0][WBITS-1:0]  dac_code
);

  logic          exec, jump_fmt, ioi_mdi, ioi_mdo, store;
  aci_e          aci;
  dti_e          dti;
  logic [3:0]    data_nib, ac;
  logic [7:0]    ref_addr, pc, sign_word, reg_c;
  logic [3:0]    reg_f;
  logic [DW-1:0] ibus, ibus_local, dram_rd, alu_y, reg_a, reg_b;
  logic          alu_of_pos, alu_of_neg;

  wp_control #(.MY_ADDR(MY_ADDR)) u_ctl (
    .clk, .rst_n, .commit, .dw,
    .sysbus   (sysbus_in),
    .ibus,
    .exec, .aci, .dti, .data_nib, .ref_addr, .jump_fmt, .ac, .pc,
    .ioi_mdi, .ioi_mdo, .busy
  );

  wp_datapath u_dp (
    .clk, .rst_n, .commit, .exec, .aci, .dti, .data_nib, .ac, .ibus,
    .dram_rd, .alu_y,
    .of_pos (alu_of_pos),
    .of_neg (alu_of_neg),
    .reg_a, .reg_b, .reg_c, .reg_f
  );

  assign store = exec && (dti == DTI_SMD || dti == DTI_MAD_SMD || dti == DTI_MSR_SMD);

  wp_weight_section u_wts (
    .clk, .rst_n, .commit, .t2, .store, .ac, .ibus, .disc_in,
    .dac_code, .sign_word
  );

  // module-local sources of the internal bus; the system bus (MDI) overrides
  always_comb begin
    if (exec && (dti == DTI_MSR || dti == DTI_MSR_SMD))
      ibus_local = {sign_word, 8'h00};
    else if (exec && (dti == DTI_MAD || dti == DTI_MAD_SMD))
      ibus_local = alu_y;
    else if (exec && dti == DTI_MPD)
      ibus_local = jump_fmt ? {8'h00, ref_addr} : {12'h000, data_nib};
    else
      ibus_local = dram_rd;
  end

  assign ibus = ioi_mdi ? sysbus_in : ibus_local;

  // MDO and MDI never coincide, so the local sources are what MDO puts out;
  // taking them directly keeps the dataway free of a combinational loop
  assign sysbus_out = ibus_local;
  assign sysbus_oe  = ioi_mdo;

  // overflow is reported only when the ALU result is actually used
  assign of_pos = exec && (dti == DTI_MAD || dti == DTI_MAD_SMD) && alu_of_pos;
  assign of_neg = exec && (dti == DTI_MAD || dti == DTI_MAD_SMD) && alu_of_neg;

endmodule
