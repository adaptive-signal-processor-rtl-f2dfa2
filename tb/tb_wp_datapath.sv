// tb_wp_datapath: drives the decoded ACI/DTI controls of the weight processor
// ALU section and checks the DRAM, the A, B, C, F registers, the C shift and
// the signum add/subtract chosen by C's MSB, against a model kept in the tb.
`timescale 1ns/1ps
module tb_wp_datapath;
  import asp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;
  logic commit = 0, exec = 0;
  aci_e aci = ACI_NOP; dti_e dti = DTI_NOP;
  logic [3:0] data_nib = 0, ac = 0;
  logic [15:0] ibus = 0, dram_rd, alu_y, reg_a, reg_b;
  logic of_pos, of_neg;
  logic [7:0] reg_c; logic [3:0] reg_f;
  int checks = 0, failures = 0;
  logic [15:0] mem [16];

  wp_datapath dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  task automatic step(input aci_e a, input dti_e d, input logic [3:0] adr,
                      input logic [15:0] bus, input logic [3:0] nib, input logic ex = 1);
    @(negedge clk);
    aci = a; dti = d; ac = adr; ibus = bus; data_nib = nib; exec = ex; commit = 1;
    @(negedge clk);
    commit = 0; exec = 0; aci = ACI_NOP; dti = DTI_NOP;
  endtask

  initial begin
    logic [7:0] c;
    int w, e, r;
    repeat (3) @(posedge clk); rst_n = 1;
    // fill the DRAM with SMD, read it back
    for (int i = 0; i < 16; i++) begin
      mem[i] = 16'($urandom);
      step(ACI_NOP, DTI_SMD, 4'(i), mem[i], 0);
    end
    for (int i = 0; i < 16; i++) begin
      ac = 4'(i); #1; chk(dram_rd == mem[i], $sformatf("DRAM[%0d] readback", i));
    end
    // exec low: no store, no register load
    step(ACI_LBR, DTI_SMD, 4'd3, 16'hDEAD, 0, 0);
    ac = 3; #1; chk(dram_rd == mem[3] && reg_b == 0, "nothing happens without exec");
    // register loads
    step(ACI_LAR, DTI_NOP, 4'd5, 0, 0);       chk(reg_a == mem[5], "LAR");
    step(ACI_LBR, DTI_NOP, 0, 16'h1234, 0);   chk(reg_b == 16'h1234, "LBR");
    step(ACI_CBR, DTI_NOP, 0, 0, 0);          chk(reg_b == 0, "CBR");
    step(ACI_LFR, DTI_NOP, 0, 0, 4'd2);       chk(reg_f == 4'd2, "LFR");
    step(ACI_CFR, DTI_NOP, 0, 0, 0);          chk(reg_f == 4'd0, "CFR");
    // signum update of 8 weights, as the adapt program does it
    c = 8'($urandom);
    e = $urandom_range(0, 4000) - 2000;
    step(ACI_LCR, DTI_NOP, 0, {c, 8'h00}, 0);  chk(reg_c == c, "LCR");
    step(ACI_LBR, DTI_NOP, 0, 16'(e), 0);
    for (int k = 0; k < 8; k++) begin
      w = int'(signed'(mem[2 + k]));
      step(ACI_LAR, DTI_NOP, 4'(2 + k), 0, 0);
      r = c[7 - k] ? w + e : w - e;
      if (r > 32767) r = 32767;
      if (r < -32768) r = -32768;
      #1; chk(alu_y == 16'(r), $sformatf("signum result channel %0d", k + 1));
      // MAD-SMD: ALU output goes round the internal bus into the DRAM
      step(ACI_NOP, DTI_MAD_SMD, 4'(2 + k), alu_y, 0);
      ac = 4'(2 + k); #1; chk(dram_rd == 16'(r), "weight written back");
      step(ACI_SCR, DTI_NOP, 0, 0, 0);
      chk(reg_c == 8'(c << (k + 1)), "SCR shifts the sign word");
    end
    // overflow substitution
    step(ACI_LBR, DTI_NOP, 0, 16'h7000, 0);
    step(ACI_NOP, DTI_SMD, 4'd0, 16'h7000, 0);
    step(ACI_LAR, DTI_NOP, 4'd0, 0, 0);
    step(ACI_LFR, DTI_NOP, 0, 0, 4'd1);
    #1; chk(alu_y == 16'h7FFF && of_pos && !of_neg, "positive overflow saturates");
    step(ACI_LFR, DTI_NOP, 0, 0, 4'd3);
    #1; chk(alu_y == 16'h0000 && !of_pos, "B-A");
    // PAR presents A
    @(negedge clk); aci = ACI_PAR; exec = 1; #1;
    chk(alu_y == reg_a, "PAR presents A");
    exec = 0; aci = ACI_NOP;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
