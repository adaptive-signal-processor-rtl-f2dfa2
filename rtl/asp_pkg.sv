// asp_pkg: types and constants shared by the adaptive signal processor (ASP).
//
// The ASP modules talk over one system dataway: a 16-bit data bus, a 4-bit
// operation code, a 5-bit module address, the ADEN and CPEN control lines and
// the four clock phases T1..T4. The instruction code tables (ACI, PCI, DTI,
// dataway OP codes) and the bit layouts follow the document's code summary.
//
// Bit numbering: the document numbers bus bits D0 (MSB) to D15 (LSB). In this
// RTL the same bus is logic [15:0], so document bit Dk is RTL bit [15-k].
package asp_pkg;

  localparam int unsigned DW = 16;       // dataway and ALU word width
  localparam int unsigned AW = 5;        // dataway module address width
  localparam int unsigned NCH = 8;       // weight channels per weight processor
  localparam int unsigned WBITS = 8;     // weight DAC resolution
  localparam int unsigned ADC_BITS = 12; // error ADC resolution

  // DRAM map used by the weight processor microprogram (this design's choice):
  // word 0 sign word, word 1 error, words 2..9 weights 1..8.
  localparam logic [3:0] DRAM_SIGN    = 4'd0;
  localparam logic [3:0] DRAM_ERROR   = 4'd1;
  localparam logic [3:0] DRAM_WEIGHT0 = 4'd2;

  // Arithmetic control instructions (program word PD4..PD7).
  typedef enum logic [3:0] {
    ACI_NOP = 4'd0, ACI_LAR = 4'd1, ACI_PAR = 4'd2, ACI_LBR = 4'd3,
    ACI_CBR = 4'd4, ACI_LCR = 4'd5, ACI_SCR = 4'd6, ACI_LFR = 4'd7,
    ACI_CFR = 4'd8
  } aci_e;

  // Program control instructions (program word PD8..PD11).
  typedef enum logic [3:0] {
    PCI_NOP = 4'd0, PCI_LPC = 4'd1, PCI_IPC = 4'd2, PCI_LAC_IPC = 4'd3,
    PCI_IAC = 4'd4, PCI_LSC_IPC = 4'd5, PCI_ISC = 4'd6, PCI_IPC_IAC = 4'd7,
    PCI_ISC_LPC = 4'd8
  } pci_e;

  // Data transfer instructions (program word PD12..PD15).
  typedef enum logic [3:0] {
    DTI_NOP = 4'd0, DTI_SMD = 4'd1, DTI_MMD = 4'd2, DTI_MAD = 4'd3,
    DTI_MSR = 4'd4, DTI_MPD = 4'd5, DTI_BUSY = 4'd6, DTI_MAD_SMD = 4'd7,
    DTI_MSR_SMD = 4'd8
  } dti_e;

  // Dataway OP codes. Codes 0..7 are addressed (ADEN = 0, only the module
  // whose address matches responds); codes 8..15 are broadcast (ADEN = 1).
  localparam logic [3:0] OP_NOP         = 4'd0;
  // weight processor, addressed
  localparam logic [3:0] OP_WP_MDI      = 4'd1;
  localparam logic [3:0] OP_WP_MDO      = 4'd2;
  localparam logic [3:0] OP_WP_SPD      = 4'd3;  // MDI-SPD-IPC
  localparam logic [3:0] OP_WP_LPC      = 4'd4;
  localparam logic [3:0] OP_WP_IPC      = 4'd5;
  localparam logic [3:0] OP_WP_MDI_LPC  = 4'd6;
  // error digitizer, addressed
  localparam logic [3:0] OP_ED_LNW      = 4'd1;
  localparam logic [3:0] OP_ED_LUW      = 4'd2;
  localparam logic [3:0] OP_ED_LCW      = 4'd3;
  localparam logic [3:0] OP_ED_RAR      = 4'd4;
  localparam logic [3:0] OP_ED_SCA      = 4'd5;
  // broadcast
  localparam logic [3:0] OP_B_RAR_MDI   = 4'd10;
  localparam logic [3:0] OP_B_SPD       = 4'd11;  // MDI-SPD-IPC
  localparam logic [3:0] OP_B_IPC       = 4'd12;
  localparam logic [3:0] OP_B_MDI_LPC   = 4'd13;
  localparam logic [3:0] OP_B_MDI       = 4'd14;

  // Control lines of the dataway driven by the bus master (test controller).
  typedef struct packed {
    logic [AW-1:0] addr;
    logic          aden;   // 1: broadcast codes, 0: addressed codes
    logic          cpen;   // 1: weight processors execute their microcode
    logic [3:0]    op;
  } dw_ctrl_t;

  localparam dw_ctrl_t DW_IDLE = '{addr: '0, aden: 1'b0, cpen: 1'b0, op: OP_NOP};

  // Clock generator modes.
  typedef enum logic [1:0] {
    CLK_RUN = 2'd0, CLK_SINGLE_CYCLE = 2'd1, CLK_SINGLE_STEP = 2'd2
  } clk_mode_e;

  // Saturating 2's complement limits used by the ALU overflow substitution.
  localparam logic [DW-1:0] WORD_MAX = 16'h7FFF;
  localparam logic [DW-1:0] WORD_MIN = 16'h8000;

endpackage
