// tb_wp_control: downloads a small program over the dataway, then runs it and
// checks the PC trace, the address and step counters (LAC, LSC, ISC repeat,
// ISC-LPC loop), the busy status, CPEN hold, the field decode, addressed and
// broadcast IOI decoding and the IOI priority over the program's PCI.
`timescale 1ns/1ps
module tb_wp_control;
  import asp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;
  logic commit;
  int slot = 0;
  always @(posedge clk) slot <= (slot == 4) ? 0 : slot + 1;
  assign commit = (slot == 3);

  dw_ctrl_t dw = DW_IDLE;
  logic [15:0] sysbus = 0, ibus = 16'h0055;
  logic exec, jump_fmt, ioi_mdi, ioi_mdo, busy;
  aci_e aci; dti_e dti;
  logic [3:0] data_nib, ac;
  logic [7:0] ref_addr, pc;
  int checks = 0, failures = 0;

  wp_control #(.MY_ADDR(5'd6)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s (pc=%02x ac=%0d)", s, pc, ac); end
  endtask
  task automatic cyc(input logic [3:0] op, input logic aden, input logic [4:0] addr,
                     input logic cpen, input logic [15:0] data);
    @(negedge clk iff slot == 0);
    dw = '{addr: addr, aden: aden, cpen: cpen, op: op};
    sysbus = data;
    @(negedge clk iff slot == 4);
  endtask
  function automatic logic [15:0] nw(input int d, input int a, input int p, input int t);
    return 16'((d << 12) | (a << 8) | (p << 4) | t);
  endfunction

  logic [15:0] prog [8];
  initial begin
    prog[0] = nw(5, 1, 3, 0);     // LAR, LAC(5)-IPC
    prog[1] = nw(13, 0, 5, 1);    // LSC(13)-IPC, SMD
    prog[2] = nw(0, 0, 6, 0);     // ISC: repeats until SC terminal count
    prog[3] = nw(0, 6, 7, 3);     // SCR, IPC-IAC, MAD
    prog[4] = nw(14, 0, 5, 0);    // LSC(14)-IPC
    prog[5] = nw(0, 0, 7, 0);     // IPC-IAC (loop body)
    prog[6] = 16'h4580;           // jump format: ISC-LPC to 0x45
    prog[7] = nw(0, 0, 0, 6);     // PCI NOP, DTI BUSY: holds
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    // download: MDI-LPC(00) broadcast, then MDI-SPD-IPC broadcast
    cyc(OP_B_MDI_LPC, 1, 0, 1, 16'h0000);
    chk(pc == 8'h00 && !exec, "PC loaded from the bus, decoding off");
    for (int i = 0; i < 8; i++) begin
      cyc(OP_B_SPD, 1, 0, 1, prog[i]);
    end
    chk(pc == 8'h08, "SPD advanced the PC per word");
    // addressed to another module: ignored
    cyc(OP_WP_MDI_LPC, 0, 5'd7, 1, 16'h0040);
    chk(pc == 8'h08, "IOI for another address ignored");
    // addressed to this module
    cyc(OP_WP_MDI_LPC, 0, 5'd6, 0, 16'h0040);
    chk(pc == 8'h40, "addressed MDI-LPC");
    chk(!exec && !busy, "CPEN low: no execution");
    @(negedge clk);
    chk(aci == ACI_LAR && pci_ok(0) && data_nib == 4'd5, "field decode of word 0");
    cyc(OP_NOP, 0, 0, 0, 0);
    chk(pc == 8'h40, "CPEN low holds the PC");
    // run
    cyc(OP_NOP, 0, 0, 1, 0);  chk(pc == 8'h41 && ac == 4'd5, "LAC(5)-IPC");
    chk(dti == DTI_SMD && busy, "word 1 decode and busy");
    cyc(OP_NOP, 0, 0, 1, 0);  chk(pc == 8'h42, "LSC-IPC");
    cyc(OP_NOP, 0, 0, 1, 0);  chk(pc == 8'h42, "ISC repeats (SC 13->14)");
    cyc(OP_NOP, 0, 0, 1, 0);  chk(pc == 8'h42, "ISC repeats (SC 14->15)");
    cyc(OP_NOP, 0, 0, 1, 0);  chk(pc == 8'h43, "ISC terminal count advances");
    cyc(OP_NOP, 0, 0, 1, 0);  chk(pc == 8'h44 && ac == 4'd6, "IPC-IAC");
    cyc(OP_NOP, 0, 0, 1, 0);  chk(pc == 8'h45, "LSC(14)");
    cyc(OP_NOP, 0, 0, 1, 0);  chk(pc == 8'h46 && ac == 4'd7, "loop body 1");
    chk(jump_fmt && ref_addr == 8'h45 && aci == ACI_NOP, "jump format decode");
    cyc(OP_NOP, 0, 0, 1, 0);  chk(pc == 8'h45, "ISC-LPC jumps");
    cyc(OP_NOP, 0, 0, 1, 0);  chk(pc == 8'h46 && ac == 4'd8, "loop body 2");
    cyc(OP_NOP, 0, 0, 1, 0);  chk(pc == 8'h47, "ISC-LPC terminal count falls through");
    chk(exec && !busy, "DTI BUSY clears busy");
    cyc(OP_NOP, 0, 0, 1, 0);  chk(pc == 8'h47, "PCI NOP holds");
    // IOI IPC overrides the program, IOI LPC takes the internal bus
    cyc(OP_B_IPC, 1, 0, 1, 0); chk(pc == 8'h48, "broadcast IPC");
    cyc(OP_WP_LPC, 0, 5'd6, 1, 0); chk(pc == 8'h55, "IOI LPC from the internal bus");
    // MDO / MDI decode
    @(negedge clk iff slot == 0);
    dw = '{addr: 5'd6, aden: 1'b0, cpen: 1'b0, op: OP_WP_MDO}; #1;
    chk(ioi_mdo && !ioi_mdi, "MDO decode");
    dw = '{addr: 5'd0, aden: 1'b1, cpen: 1'b0, op: OP_B_RAR_MDI}; #1;
    chk(ioi_mdi && !ioi_mdo, "RAR-MDI seen as MDI");
    // no PRAM write while running
    cyc(OP_WP_MDI_LPC, 0, 5'd6, 0, 16'h0047);
    cyc(OP_B_SPD, 1, 0, 0, 16'hFFFF);
    cyc(OP_WP_MDI_LPC, 0, 5'd6, 0, 16'h0047);
    chk(dti == DTI_BUSY, "PRAM not written while PC[6]=1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit pci_ok(input int dummy);
    return !jump_fmt;
  endfunction

  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
