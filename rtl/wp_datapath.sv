// wp_datapath: ALU section of one weight processor.
//
// Registers A and B hold the ALU operands: A is loaded from the 16 x 16 data
// memory (DRAM scratch pad) at the address counter, B from the internal data
// bus. The 4-bit F register and the 8-bit C shift register select the ALU
// function (see wp_alu); C holds the sign word of the 8 channel inputs during
// the clipped LMS update, and SCR shifts it left so that the sign of the next
// channel reaches its MSB. The DRAM is written from the internal data bus by
// every DTI that contains SMD.
//
// Arithmetic control instructions (ACI):
//   LAR  A <= DRAM[AC]          PAR  ALU output forced to A this cycle
//   LBR  B <= internal bus      CBR  B <= 0
//   LCR  C <= bus D0..D7        SCR  C <= C << 1
//   LFR  F <= data nibble       CFR  F <= 0
// Loading F from the data nibble and C from the upper bus byte are this
// design's choices; the document gives the registers, not their sources.
//
// Timing: registers and DRAM change on the clock edge where `commit` and
// `exec` are high. `dram_rd` (DRAM[AC]) and the ALU output are combinational.
module wp_datapath
  import asp_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          commit,
  input  logic          exec,
  input  aci_e          aci,
  input  dti_e          dti,
  input  logic [3:0]    data_nib,
  input  logic [3:0]    ac,
  input  logic [DW-1:0] ibus,
  output logic [DW-1:0] dram_rd,
  output logic [DW-1:0] alu_y,
  output logic          of_pos,
  output logic          of_neg,
  output logic [DW-1:0] reg_a,
  output logic [DW-1:0] reg_b,
  output logic [7:0]    reg_c,
  output logic [3:0]    reg_f
);

  logic [DW-1:0] dram [16];
  logic          store;

  assign dram_rd = dram[ac];
  assign store   = exec && (dti == DTI_SMD || dti == DTI_MAD_SMD || dti == DTI_MSR_SMD);

  wp_alu u_alu (
    .f         (reg_f),
    .c_msb     (reg_c[7]),
    .present_a (exec && aci == ACI_PAR),
    .a         (reg_a),
    .b         (reg_b),
    .y         (alu_y),
    .of_pos    (of_pos),
    .of_neg    (of_neg)
  );

  always_ff @(posedge clk) begin
    if (commit && store)
      dram[ac] <= ibus;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_a <= '0;
      reg_b <= '0;
      reg_c <= '0;
      reg_f <= '0;
    end else if (commit && exec) begin
      unique case (aci)
        ACI_LAR: reg_a <= dram[ac];
        ACI_LBR: reg_b <= ibus;
        ACI_CBR: reg_b <= '0;
        ACI_LCR: reg_c <= ibus[15:8];
        ACI_SCR: reg_c <= {reg_c[6:0], 1'b0};
        ACI_LFR: reg_f <= data_nib;
        ACI_CFR: reg_f <= '0;
        default: ;
      endcase
    end
  end

endmodule
