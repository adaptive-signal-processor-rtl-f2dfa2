// asp_program_pkg: the built-in programs of the ASP test controller.
//
// The loader ROM and the sequencer PROM are filled at elaboration from the
// functions below, so the programs read as source and synthesize as ROM
// contents. Each function returns the word at one address; unused words are 0.
//
// Weight processor microprogram (the clipped LMS update, this design's own
// program; same code in every weight processor, run in lockstep):
//   00       F <- 0 (signum function), AC <- 0
//   01..0A   store 10 data words from the dataway into DRAM 0..9
//   0B       entry point: AC <- 0, report not busy
//   0C       sign register -> C and DRAM 0                 (sequencer: SCA)
//   0D       error from the dataway -> B and DRAM 1        (sequencer: RAR-MDI)
//   0E, 0F   A <- W1; W1 <- signum(A, B), AC + 1
//   10..24   7 x { shift C; A <- Wk; Wk <- signum(A, B), AC + 1 }
//   25       AC <- 0, report not busy
//   26       jump to 0C (with the run bit: PC = 4C)
// signum(A, B) is A + B when the MSB of C (sign of the current channel) is 1
// and A - B otherwise, saturating.
//
// Loader page 0 (58 words): stop all weight processors, download the
// microprogram, run its initialisation with 10 data words (sign, error and 8
// zero weights), stop again, load the error digitizer's null weight (offset
// binary zero), mu weight (mid-scale) and control word, park every weight
// processor at its entry point 4B and stop the download.
//
// Sequencer page 0: load mu from the manual data switches, then 3 adapt
// passes of 5 words (start convert; wait for ADC; broadcast RAR-MDI; wait for
// the weight processors; one step for the jump). One pass is 32 instruction
// cycles = 8 us. Page 1: convert once and read the ADC with DATIN.
package asp_program_pkg;
  import asp_pkg::*;

  localparam logic [7:0]  WP_RUN      = 8'h40;   // PC bit 6: decode enable
  localparam logic [7:0]  WP_ENTRY    = 8'h0B;
  localparam logic [7:0]  WP_LOOP     = 8'h0C;
  localparam int unsigned WP_PROG_LEN = 39;
  localparam logic [15:0] MU_DEFAULT  = 16'h2000;  // 200h on D2..D11
  localparam logic [15:0] NULL_ZERO   = 16'h8000;  // 800h on D0..D11
  localparam logic [AW-1:0] ED_ADDR   = 5'd1;

  // Normal microinstruction: data, ACI, PCI, DTI.
  function automatic logic [15:0] mi(logic [3:0] data, aci_e aci, pci_e pci, dti_e dti);
    return {data, aci, pci, dti};
  endfunction

  // Jump microinstruction: reference address, PCI, DTI.
  function automatic logic [15:0] mj(logic [7:0] ref_addr, pci_e pci, dti_e dti);
    return {ref_addr, pci, dti};
  endfunction

  function automatic logic [15:0] wp_program(int unsigned a);
    if (a == 0)               return mi(4'd0, ACI_CFR, PCI_LAC_IPC, DTI_NOP);
    if (a <= 10)              return mi(4'd0, ACI_NOP, PCI_IPC_IAC, DTI_SMD);
    if (a == 32'h0B)          return mi(4'd0, ACI_NOP, PCI_LAC_IPC, DTI_BUSY);
    if (a == 32'h0C)          return mi(4'd0, ACI_LCR, PCI_IPC_IAC, DTI_MSR_SMD);
    if (a == 32'h0D)          return mi(4'd0, ACI_LBR, PCI_IPC_IAC, DTI_SMD);
    if (a == 32'h0E)          return mi(4'd0, ACI_LAR, PCI_IPC,     DTI_NOP);
    if (a == 32'h0F)          return mi(4'd0, ACI_NOP, PCI_IPC_IAC, DTI_MAD_SMD);
    if (a <= 32'h24) begin
      unique case ((a - 32'h10) % 3)
        0:       return mi(4'd0, ACI_SCR, PCI_IPC,     DTI_NOP);
        1:       return mi(4'd0, ACI_LAR, PCI_IPC,     DTI_NOP);
        default: return mi(4'd0, ACI_NOP, PCI_IPC_IAC, DTI_MAD_SMD);
      endcase
    end
    if (a == 32'h25)          return mi(4'd0, ACI_NOP, PCI_LAC_IPC, DTI_BUSY);
    if (a == 32'h26)          return mj(WP_RUN | WP_LOOP, PCI_LPC, DTI_NOP);
    return '0;
  endfunction

  // Loader word: data[28:13], address[12:8], ADEN[7], CPEN[6], unused[5],
  // OP[4:1], DLS[0].
  function automatic logic [28:0] lw(logic [15:0] data, logic [AW-1:0] addr,
                                     logic aden, logic [3:0] op, logic dls);
    return {data, addr, aden, 1'b1, 1'b0, op, dls};
  endfunction

  function automatic logic [28:0] loader_word(int unsigned page, int unsigned a);
    if (page != 0)                   return '0;
    if (a == 0)                      return lw(16'h0000, '0, 1'b1, OP_B_MDI_LPC, 1'b0);
    if (a <= WP_PROG_LEN)            return lw(wp_program(a - 1), '0, 1'b1, OP_B_SPD, 1'b0);
    if (a == WP_PROG_LEN + 1)        return lw(16'(WP_RUN), '0, 1'b1, OP_B_MDI_LPC, 1'b0);
    if (a == WP_PROG_LEN + 2)        return lw(16'h0000, '0, 1'b1, OP_NOP, 1'b0);
    if (a <= WP_PROG_LEN + 12)       return lw(16'h0000, '0, 1'b1, OP_B_MDI, 1'b0);
    if (a == WP_PROG_LEN + 13)       return lw(16'h0000, '0, 1'b1, OP_B_MDI_LPC, 1'b0);
    if (a == WP_PROG_LEN + 14)       return lw(NULL_ZERO, ED_ADDR, 1'b0, OP_ED_LNW, 1'b0);
    if (a == WP_PROG_LEN + 15)       return lw(MU_DEFAULT, ED_ADDR, 1'b0, OP_ED_LUW, 1'b0);
    if (a == WP_PROG_LEN + 16)       return lw(16'h0000, ED_ADDR, 1'b0, OP_ED_LCW, 1'b0);
    if (a == WP_PROG_LEN + 17)       return lw(16'(WP_RUN | WP_ENTRY), '0, 1'b1, OP_B_MDI_LPC, 1'b0);
    if (a == WP_PROG_LEN + 18)       return lw(16'h0000, '0, 1'b0, OP_NOP, 1'b1);
    return '0;
  endfunction

  // Sequencer word: address[15:11], ADEN[10], CPEN[9], ABUSY[8], OP[7:4],
  // WPBI[3], ADCBI[2], DATIN[1], DATOUT[0]. Busy inhibits are active high
  // (1 = do not wait), so a plain step has WPBI = ADCBI = 1.
  function automatic logic [15:0] sw(logic [AW-1:0] addr, logic aden, logic cpen,
                                     logic abusy, logic [3:0] op, logic wpbi,
                                     logic adcbi, logic datin, logic datout);
    return {addr, aden, cpen, abusy, op, wpbi, adcbi, datin, datout};
  endfunction

  function automatic logic [15:0] seq_program(int unsigned page, int unsigned a);
    if (page == 0) begin
      if (a == 0) return sw(ED_ADDR, 1'b0, 1'b0, 1'b1, OP_ED_LUW, 1'b1, 1'b1, 1'b0, 1'b1);
      unique case ((a - 1) % 5)
        0:       return sw(ED_ADDR, 1'b0, 1'b1, 1'b1, OP_ED_SCA,    1'b1, 1'b1, 1'b0, 1'b0);
        1:       return sw('0,      1'b0, 1'b0, 1'b1, OP_NOP,       1'b1, 1'b0, 1'b0, 1'b0);
        2:       return sw('0,      1'b1, 1'b1, 1'b1, OP_B_RAR_MDI, 1'b1, 1'b1, 1'b0, 1'b0);
        3:       return sw('0,      1'b0, 1'b1, 1'b1, OP_NOP,       1'b0, 1'b1, 1'b0, 1'b0);
        default: return sw('0,      1'b0, 1'b1, 1'b1, OP_NOP,       1'b1, 1'b1, 1'b0, 1'b0);
      endcase
    end
    if (a == 0) return sw(ED_ADDR, 1'b0, 1'b0, 1'b1, OP_ED_SCA, 1'b1, 1'b1, 1'b0, 1'b0);
    if (a == 1) return sw('0,      1'b0, 1'b0, 1'b1, OP_NOP,    1'b1, 1'b0, 1'b0, 1'b0);
    if (a == 2) return sw(ED_ADDR, 1'b0, 1'b0, 1'b1, OP_ED_RAR, 1'b1, 1'b1, 1'b1, 1'b0);
    return sw('0, 1'b0, 1'b0, 1'b0, OP_NOP, 1'b1, 1'b1, 1'b0, 1'b0);
  endfunction

endpackage
