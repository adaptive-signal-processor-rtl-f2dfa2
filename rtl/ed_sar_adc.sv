// ed_sar_adc: digital part of the error digitizer's 12-bit successive
// approximation ADC.
//
// The document specifies a bipolar 12-bit successive approximation converter
// with a sample-and-hold, a maximum conversion time of 2 us, a busy status for
// the whole conversion and an output holding register loaded automatically at
// the end. The comparator and the trial DAC are analog and sit outside this
// module: `trial` is the offset-binary code of the internal DAC and `comp` is
// 1 when the held input is at or above that trial level.
//
// Operation: `start` (one clock) raises `hold` (the S/H holds from then on),
// sets busy and the trial code to mid scale. Every CLKS_PER_BIT clocks the
// current bit is kept or cleared from `comp` and the next lower bit is tried.
// After NBITS decisions the result, converted to 2's complement by inverting
// the MSB, is written to the holding register `result` and busy falls. A
// conversion takes NBITS*CLKS_PER_BIT clocks; with the default 2 clocks per
// bit at a 50 ns master clock that is 1.2 us, inside the 2 us maximum.
// A start while busy is ignored (this design's choice).
module ed_sar_adc #(
  parameter int unsigned NBITS        = 12,
  parameter int unsigned CLKS_PER_BIT = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             comp,
  output logic             busy,
  output logic             hold,
  output logic [NBITS-1:0] trial,
  output logic [NBITS-1:0] result
);

  localparam int unsigned CW = (CLKS_PER_BIT > 1) ? $clog2(CLKS_PER_BIT) : 1;

  logic [NBITS-1:0]         sar;
  logic [NBITS-1:0]         bit_mask;   // one-hot: bit under test
  logic [CW-1:0]            tick;
  logic [NBITS-1:0]         decided;    // SAR with the bit under test settled

  assign decided = comp ? sar : (sar & ~bit_mask);

  assign trial = sar;
  assign hold  = busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      sar      <= '0;
      bit_mask <= '0;
      tick     <= '0;
      result   <= '0;
    end else if (!busy) begin
      if (start) begin
        busy     <= 1'b1;
        bit_mask <= {1'b1, {(NBITS-1){1'b0}}};
        sar      <= {1'b1, {(NBITS-1){1'b0}}};
        tick     <= '0;
      end
    end else if (tick != CW'(CLKS_PER_BIT - 1)) begin
      tick <= tick + 1'b1;
    end else begin
      tick <= '0;
      // decide the bit under test, then try the next one
      if (bit_mask[0]) begin
        busy   <= 1'b0;
        result <= decided ^ {1'b1, {(NBITS-1){1'b0}}};
        sar    <= decided;
      end else begin
        sar <= decided | (bit_mask >> 1);
      end
      bit_mask <= bit_mask >> 1;
    end
  end

endmodule
