// wp_weight_section: digital side of the 8 hybrid weight channels of one
// weight processor.
//
// Each channel has an 8-bit DAC holding register that drives the multiplying
// DAC of the analog weight, and a voltage discriminator that reports the sign
// of the channel input. This module holds the 8 holding registers and a latch
// for the 8 discriminator outputs.
//
// Weight write: the document says the weight is loaded from the data bus into
// the DAC holding register but not by which instruction. Here a DRAM store
// (any DTI with SMD) to word DRAM_WEIGHT0+k also loads holding register k, so
// the register always shadows the weight kept in DRAM. The DAC takes bus bits
// D0..D7 (the upper byte of the 16-bit weight) with the sign bit inverted,
// i.e. offset binary, as in the document's weight register format.
//
// Sign word: discriminator k is 1 when the input of channel k+1 is >= 0. The
// latch samples them on every T2 strobe (this design's choice, so the word is
// stable at T4). sign_word puts channel 1 at its MSB (bus D0), channel 8 at
// its LSB side (D7), as in the document's sign register format.
module wp_weight_section
  import asp_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       commit,
  input  logic                       t2,
  input  logic                       store,       // DRAM store this cycle
  input  logic [3:0]                 ac,
  input  logic [DW-1:0]              ibus,
  input  logic [NCH-1:0]             disc_in,     // [k] = channel k+1 input >= 0
  output logic [NCH-1:0][WBITS-1:0]  dac_code,    // offset binary, [k] = channel k+1
  output logic [7:0]                 sign_word    // [7] = channel 1
);

  logic [NCH-1:0] disc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      disc_q <= '0;
    end else if (t2) begin
      disc_q <= disc_in;
    end
  end

  always_comb begin
    for (int k = 0; k < NCH; k++)
      sign_word[7-k] = disc_q[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dac_code <= {NCH{8'h80}};   // offset binary zero weight
    end else if (commit && store) begin
      for (int k = 0; k < NCH; k++) begin
        if (ac == DRAM_WEIGHT0 + 4'(k))
          dac_code[k] <= {~ibus[15], ibus[14:8]};
      end
    end
  end

endmodule
