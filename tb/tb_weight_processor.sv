// tb_weight_processor: one weight processor on a dataway driven by the tb.
// Downloads a clipped LMS microprogram and initial weights over the bus, then
// runs adapt passes: each pass latches the channel signs, takes an error word
// from the bus (RAR-MDI) and updates the 8 weights. Checks the DAC codes and
// the DRAM against an integer model (with saturation), that a pass of weight
// updates takes 24 instruction cycles before the WP reports not busy, the
// overflow flags, and reading the DRAM back with MDO.
`timescale 1ns/1ps
module tb_weight_processor;
  import asp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;
  int slot = 0;
  always @(posedge clk) slot <= (slot == 4) ? 0 : slot + 1;
  logic commit, t2;
  assign commit = (slot == 3);
  assign t2 = (slot == 1);

  dw_ctrl_t dw = DW_IDLE;
  logic [15:0] sysbus_in = 0, sysbus_out;
  logic sysbus_oe, busy, of_pos, of_neg;
  logic [7:0] disc_in = 0;
  logic [7:0][7:0] dac_code;
  int checks = 0, failures = 0;

  weight_processor #(.MY_ADDR(5'd3)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  // one dataway cycle; returns busy and overflow as seen during the cycle
  task automatic cyc(input logic [3:0] op, input logic aden, input logic [4:0] addr,
                     input logic cpen, input logic [15:0] data, output logic b, output logic ofp, output logic ofn);
    @(negedge clk iff slot == 0);
    dw = '{addr: addr, aden: aden, cpen: cpen, op: op};
    sysbus_in = data;
    @(negedge clk iff slot == 3);
    b = busy; ofp = of_pos; ofn = of_neg;
    @(negedge clk iff slot == 4);
  endtask
  function automatic logic [15:0] nw(input int d, input int a, input int p, input int t);
    return 16'((d << 12) | (a << 8) | (p << 4) | t);
  endfunction

  // program: 0 CFR-LAC(0)-IPC; 1..10 IPC-IAC SMD; 0B LAC(0)-IPC BUSY;
  // 0C LCR MSR-SMD IPC-IAC; 0D LBR SMD IPC-IAC; 0E LAR IPC; 0F MAD-SMD IPC-IAC;
  // 7 x (SCR IPC; LAR IPC; MAD-SMD IPC-IAC); 25 LAC(0)-IPC BUSY; 26 jump 4C
  logic [15:0] prog [$];
  int w [8];
  initial begin
    logic b, ofp, ofn;
    int e, ncyc, n_sat;
    logic [7:0] s;
    prog.push_back(nw(0, 8, 3, 0));
    repeat (10) prog.push_back(nw(0, 0, 7, 1));
    prog.push_back(nw(0, 0, 3, 6));
    prog.push_back(nw(0, 5, 7, 8));
    prog.push_back(nw(0, 3, 7, 1));
    prog.push_back(nw(0, 1, 2, 0));
    prog.push_back(nw(0, 0, 7, 7));
    repeat (7) begin
      prog.push_back(nw(0, 6, 2, 0));
      prog.push_back(nw(0, 1, 2, 0));
      prog.push_back(nw(0, 0, 7, 7));
    end
    prog.push_back(nw(0, 0, 3, 6));
    prog.push_back(16'h4C10);

    repeat (3) @(posedge clk); rst_n = 1;
    // download (addressed this time: address 3, ADEN = 0)
    cyc(OP_WP_MDI_LPC, 0, 5'd3, 1, 16'h0000, b, ofp, ofn);
    foreach (prog[i]) cyc(OP_WP_SPD, 0, 5'd3, 1, prog[i], b, ofp, ofn);
    cyc(OP_WP_MDI_LPC, 0, 5'd3, 1, 16'h0040, b, ofp, ofn);
    cyc(OP_NOP, 0, 0, 1, 0, b, ofp, ofn);                   // CFR, LAC(0)
    // initial data: sign, error, weights
    for (int i = 0; i < 10; i++) begin
      int v;
      v = (i < 2) ? 0 : ($urandom_range(0, 40000) - 20000);
      if (i >= 2) w[i - 2] = v;
      cyc(OP_WP_MDI, 0, 5'd3, 1, 16'(v), b, ofp, ofn);
    end
    cyc(OP_NOP, 0, 0, 1, 0, b, ofp, ofn);                   // 0B
    for (int k = 0; k < 8; k++)
      chk(dac_code[k] == {~w[k][15], w[k][14:8]}, "initial weights reach the DACs");

    n_sat = 0;
    for (int pass = 0; pass < 60; pass++) begin
      s = 8'($urandom);
      disc_in = s;                   // [k] = channel k+1
      e = (pass < 40) ? ($urandom_range(0, 4095) - 2048) : 2047;
      if (pass >= 40) disc_in = 8'hFF;
      cyc(OP_NOP, 0, 0, 1, 0, b, ofp, ofn);                 // 0C: sign word
      cyc(OP_B_RAR_MDI, 1, 0, 1, 16'(e), b, ofp, ofn);      // 0D: error from the bus
      ncyc = 0;
      do begin
        cyc(OP_NOP, 0, 0, 1, 0, b, ofp, ofn);
        ncyc++;
        if (ofp || ofn) n_sat++;
      end while (b && ncyc < 100);
      chk(ncyc == 24, $sformatf("8 weight updates in 24 cycles (took %0d)", ncyc));
      cyc(OP_NOP, 0, 0, 1, 0, b, ofp, ofn);                 // 26: jump to 0C
      for (int k = 0; k < 8; k++) begin
        w[k] = disc_in[k] ? w[k] + e : w[k] - e;
        if (w[k] > 32767) w[k] = 32767;
        if (w[k] < -32768) w[k] = -32768;
        chk(dac_code[k] == {~w[k][15], w[k][14:8]},
            $sformatf("pass %0d channel %0d code %02x expected %02x", pass, k + 1, dac_code[k], {~w[k][15], w[k][14:8]}));
      end
    end
    chk(n_sat > 0, "positive saturation reached");
    // read weight 3 back with MDO: stop the WP (PC to 0), AC is 0 -> sign word
    cyc(OP_WP_MDI_LPC, 0, 5'd3, 0, 16'h0000, b, ofp, ofn);
    @(negedge clk iff slot == 0);
    dw = '{addr: 5'd3, aden: 1'b0, cpen: 1'b0, op: OP_WP_MDO}; #1;
    chk(sysbus_oe && sysbus_out == 16'hFF00, "MDO drives DRAM[AC] (the sign word)");
    dw = '{addr: 5'd4, aden: 1'b0, cpen: 1'b0, op: OP_WP_MDO}; #1;
    chk(!sysbus_oe, "MDO to another address does not drive the bus");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
