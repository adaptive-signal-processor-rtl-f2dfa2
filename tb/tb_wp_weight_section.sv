// tb_wp_weight_section: checks that a DRAM store to a weight address loads the
// matching DAC holding register in offset binary, that other stores leave the
// registers alone, and the channel order of the latched sign word.
`timescale 1ns/1ps
module tb_wp_weight_section;
  import asp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;
  logic commit = 0, t2 = 0, store = 0;
  logic [3:0] ac = 0;
  logic [15:0] ibus = 0;
  logic [7:0] disc_in = 0;
  logic [7:0][7:0] dac_code;
  logic [7:0] sign_word;
  logic [7:0] expect_code [8];
  int checks = 0, failures = 0;

  wp_weight_section dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    logic [15:0] w;
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);
    for (int k = 0; k < 8; k++) begin
      chk(dac_code[k] == 8'h80, "reset weight is offset-binary zero");
      expect_code[k] = 8'h80;
    end
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      ac = 4'($urandom);
      w = 16'($urandom);
      ibus = w;
      store = 1'($urandom);
      commit = 1'($urandom_range(0, 3) != 0);
      if (store && commit && ac >= 2 && ac <= 9)
        expect_code[ac - 2] = {~w[15], w[14:8]};
      @(negedge clk); commit = 0; store = 0;
      for (int k = 0; k < 8; k++)
        chk(dac_code[k] == expect_code[k], $sformatf("channel %0d code", k + 1));
    end
    // -1.0 and +0.99 in the weight format
    @(negedge clk); ac = 4'd2; ibus = 16'h8000; store = 1; commit = 1;
    @(negedge clk); commit = 0; store = 0;
    chk(dac_code[0] == 8'h00, "most negative weight -> code 00");
    @(negedge clk); ac = 4'd9; ibus = 16'h7FFF; store = 1; commit = 1;
    @(negedge clk); commit = 0; store = 0;
    chk(dac_code[7] == 8'hFF, "most positive weight -> code FF");
    // sign word: channel 1 at the MSB, latched on T2
    for (int i = 0; i < 20; i++) begin
      @(negedge clk); disc_in = 8'($urandom); t2 = 1;
      @(negedge clk); t2 = 0;
      for (int k = 0; k < 8; k++) chk(sign_word[7 - k] == disc_in[k], "sign word order");
      disc_in = ~disc_in;
      @(negedge clk);
      chk(sign_word[7] == ~disc_in[0], "sign word held between T2 strobes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
