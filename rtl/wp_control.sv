// wp_control: microprogram control section of one weight processor.
//
// Holds the 64 x 16 program memory (PRAM), the 8-bit program counter (PC),
// the 4-bit address counter (AC) that points into the data memory, and the
// 4-bit step counter (SC). It decodes the program word at PRAM[PC[5:0]] and
// the dataway input-output instructions (IOI) addressed to this module.
//
// Program word (document bit PD0 = MSB = RTL bit 15):
//   normal format: PD0-3 data nibble, PD4-7 ACI, PD8-11 PCI, PD12-15 DTI
//   jump format:   PD0-7 8-bit reference address, PD8-11 PCI, PD12-15 DTI
// The jump format is recognised by its PCI (LPC or ISC-LPC); its ACI is NOP.
//
// PC bit 6 selects the mode, as in the document: with PC[6]=0 instruction
// decoding is disabled and the PRAM can be loaded from the dataway (MDI-SPD-IPC
// writes the bus word to PRAM[PC[5:0]] and advances PC); with PC[6]=1 the
// microprogram runs, one composite instruction per system clock cycle while
// the dataway CPEN line is high. PC bit 7 is not used but counts.
//
// Step counter: its terminal count (SC=15) advances the PC and inhibits a
// jump. ISC alone therefore repeats its instruction until SC overflows, and
// ISC-LPC closes a loop. A PCI of NOP holds the PC (this design's reading).
//
// Dataway IOI: addressed codes (ADEN=0, address = MY_ADDR) MDI, MDO,
// MDI-SPD-IPC, LPC, IPC, MDI-LPC; broadcast codes (ADEN=1) RAR-MDI (taken as
// MDI), MDI-SPD-IPC, IPC, MDI-LPC, MDI. A PC change requested over the dataway
// takes priority over the microprogram's own PCI in the same cycle. The IOI LPC
// (without MDI) loads the PC from the module's internal data bus.
//
// Timing: all state changes on the clock edge where `commit` (the T4 phase
// strobe) is high; decode outputs are combinational from the current state.
// `busy` is the module's dataway BUSY status: high while a microinstruction
// executes whose DTI is not BUSY ("WP not busy").
module wp_control
  import asp_pkg::*;
#(
  parameter logic [AW-1:0] MY_ADDR = 5'd2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          commit,
  input  dw_ctrl_t      dw,
  input  logic [DW-1:0] sysbus,     // system data bus as seen by this module
  input  logic [DW-1:0] ibus,       // internal data bus of the module
  // decoded microinstruction
  output logic          exec,       // a microinstruction executes this cycle
  output aci_e          aci,
  output dti_e          dti,
  output logic [3:0]    data_nib,   // data field of a normal word
  output logic [7:0]    ref_addr,   // reference address of a jump word
  output logic          jump_fmt,
  output logic [3:0]    ac,
  output logic [7:0]    pc,
  // dataway
  output logic          ioi_mdi,    // internal bus takes the system bus
  output logic          ioi_mdo,    // internal bus is driven onto the system bus
  output logic          busy
);

  logic [DW-1:0] pram [64];
  logic [DW-1:0] pword;
  logic [3:0]    sc;
  pci_e          pci;
  logic [3:0]    op;
  logic          addressed, broadcast;
  logic          io_spd, io_ipc, io_lpc_bus, io_lpc_int;
  logic          sc_tc;

  assign pword = pram[pc[5:0]];
  assign exec  = pc[6] && dw.cpen;

  // instruction field decode
  always_comb begin
    pci      = pci_e'(pword[7:4]);
    dti      = dti_e'(pword[3:0]);
    jump_fmt = (pci == PCI_LPC) || (pci == PCI_ISC_LPC);
    aci      = jump_fmt ? ACI_NOP : aci_e'(pword[11:8]);
    data_nib = pword[15:12];
    ref_addr = pword[15:8];
  end

  // dataway IOI decode
  assign op        = dw.op;
  assign addressed = !dw.aden && (dw.addr == MY_ADDR);
  assign broadcast = dw.aden;

  always_comb begin
    ioi_mdi    = 1'b0;
    ioi_mdo    = 1'b0;
    io_spd     = 1'b0;
    io_ipc     = 1'b0;
    io_lpc_bus = 1'b0;
    io_lpc_int = 1'b0;
    if (addressed) begin
      unique case (op)
        OP_WP_MDI:     ioi_mdi = 1'b1;
        OP_WP_MDO:     ioi_mdo = 1'b1;
        OP_WP_SPD:     begin ioi_mdi = 1'b1; io_spd = 1'b1; end
        OP_WP_LPC:     io_lpc_int = 1'b1;
        OP_WP_IPC:     io_ipc = 1'b1;
        OP_WP_MDI_LPC: begin ioi_mdi = 1'b1; io_lpc_bus = 1'b1; end
        default: ;
      endcase
    end else if (broadcast) begin
      unique case (op)
        OP_B_RAR_MDI:  ioi_mdi = 1'b1;
        OP_B_SPD:      begin ioi_mdi = 1'b1; io_spd = 1'b1; end
        OP_B_IPC:      io_ipc = 1'b1;
        OP_B_MDI_LPC:  begin ioi_mdi = 1'b1; io_lpc_bus = 1'b1; end
        OP_B_MDI:      ioi_mdi = 1'b1;
        default: ;
      endcase
    end
  end

  assign busy  = exec && (dti != DTI_BUSY);
  assign sc_tc = (sc == 4'hF);

  // PRAM download: only while decoding is disabled
  always_ff @(posedge clk) begin
    if (commit && io_spd && !pc[6])
      pram[pc[5:0]] <= sysbus;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= '0;
      ac <= '0;
      sc <= '0;
    end else if (commit) begin
      // microprogram side: AC, SC and the PC when no IOI overrides it
      if (exec) begin
        unique case (pci)
          PCI_LAC_IPC: ac <= data_nib;
          PCI_IAC,
          PCI_IPC_IAC: ac <= ac + 4'd1;
          PCI_LSC_IPC: sc <= data_nib;
          PCI_ISC,
          PCI_ISC_LPC: sc <= sc + 4'd1;
          default: ;
        endcase
      end
      if (io_lpc_bus)
        pc <= sysbus[7:0];
      else if (io_lpc_int)
        pc <= ibus[7:0];
      else if (io_ipc || io_spd)
        pc <= pc + 8'd1;
      else if (exec) begin
        unique case (pci)
          PCI_LPC:     pc <= ref_addr;
          PCI_IPC,
          PCI_LAC_IPC,
          PCI_LSC_IPC,
          PCI_IPC_IAC: pc <= pc + 8'd1;
          PCI_ISC:     if (sc_tc) pc <= pc + 8'd1;
          PCI_ISC_LPC: pc <= sc_tc ? pc + 8'd1 : ref_addr;
          default: ;   // NOP and IAC hold the PC
        endcase
      end
    end
  end

endmodule
