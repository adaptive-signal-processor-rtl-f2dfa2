// tc_sequencer: adapt sequencer of the test controller.
//
// A firmware sequencer that is dataway master while the adaptive algorithm
// runs: it issues the error digitizer commands (start conversion, read the
// ADC) in step with the weight processor microprograms and stops those
// microprograms where they must wait.
//
// Memory: 2 pages of 16 words x 16 bits (a PROM in the document), selected by
// `page_sel`, contents from asp_program_pkg, or from INIT_FILE ($readmemh,
// one word per line) when that is not empty. A 4-bit address counter fetches one
// sequence word per system clock cycle. Word layout (bit 15 = D0):
//   [15:11] system address  [10] ADEN  [9] CPEN  [8] ABUSY
//   [7:4]   OP code         [3] WPBI   [2] ADCBI [1] DATIN  [0] DATOUT
// (sequencer word 1 = D0..D7, word 2 = D8..D15 as in the document).
//
// Waits: the counter holds while (WPBI=0 and a weight processor is busy) or
// (ADCBI=0 and the ADC is busy); a set bit inhibits that wait. Taking a set
// bit as "inhibit" is this design's reading of the names. The word is
// re-issued every cycle while it waits.
// DATOUT drives the manual switch register's 16-bit data onto the bus
// (`data_oe`); DATIN asks the test controller to capture the data bus.
// ABUSY is the adapt busy status bit, brought out while the word is issued.
//
// Triggering: a 16-word sequence runs once per trigger. With `ext_trig_sel`
// the trigger is a rising edge of `ext_trig`; otherwise the sequencer restarts
// after a retrigger wait of 0 (rate_sel=0) or 2^(rate_sel+3) instruction
// periods (rate_sel=1..8: 2^4..2^11), counted from the end of the previous
// sequence, so that exactly that many idle cycles separate two sequences.
// With a wait of 0 the next sequence follows without a gap. `enable` (a run switch) must be on for a sequence to start.
// State changes on the T4 strobe `commit`.
module tc_sequencer
  import asp_pkg::*;
#(
  parameter string INIT_FILE = ""
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          commit,
  input  logic          enable,
  input  logic          page_sel,
  input  logic          ext_trig_sel,
  input  logic          ext_trig,
  input  logic [3:0]    rate_sel,
  input  logic          wp_busy,
  input  logic          adc_busy,
  output logic          active,
  output dw_ctrl_t      dw,
  output logic          data_oe,
  output logic          datin,
  output logic          abusy,
  output logic          waiting,
  output logic [15:0]   seq_word,
  output logic [3:0]    seq_addr
);

  logic [15:0] prom [32];
  logic [11:0] wait_cnt;
  logic [11:0] wait_len;
  logic [2:0]  trig_sync;
  logic        ext_edge;
  logic        trig_now;

  initial begin
    for (int i = 0; i < 32; i++)
      prom[i] = (INIT_FILE == "") ? asp_program_pkg::seq_program(i / 16, i % 16) : '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, prom);
  end

  assign seq_word = prom[{page_sel, seq_addr}];
  assign dw.addr  = seq_word[15:11];
  assign dw.aden  = seq_word[10];
  assign dw.cpen  = seq_word[9];
  assign dw.op    = seq_word[7:4];
  assign abusy    = active && seq_word[8];
  assign data_oe  = active && seq_word[0];
  assign datin    = active && seq_word[1];
  assign waiting  = active && ((!seq_word[3] && wp_busy) || (!seq_word[2] && adc_busy));

  always_comb begin
    if (rate_sel == 4'd0 || rate_sel > 4'd8) wait_len = '0;
    else                                     wait_len = 12'(1) << (rate_sel + 4'd3);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) trig_sync <= '0;
    else        trig_sync <= {trig_sync[1:0], ext_trig};
  end

  assign ext_edge = trig_sync[1] && !trig_sync[2];
  assign trig_now = ext_trig_sel ? 1'b0 : (wait_cnt + 12'd1 >= wait_len);

  logic ext_pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active      <= 1'b0;
      seq_addr    <= '0;
      wait_cnt    <= '0;
      ext_pending <= 1'b0;
    end else begin
      if (ext_edge && ext_trig_sel && !active) ext_pending <= 1'b1;
      if (commit) begin
        if (!active) begin
          if (enable && (trig_now || ext_pending)) begin
            active      <= 1'b1;
            seq_addr    <= '0;
            ext_pending <= 1'b0;
          end else if (wait_cnt != '1) begin
            wait_cnt <= wait_cnt + 1'b1;
          end
        end else if (!waiting) begin
          if (seq_addr == 4'hF && (ext_trig_sel || wait_len != '0 || !enable)) begin
            active   <= 1'b0;
            wait_cnt <= '0;
          end
          seq_addr <= seq_addr + 1'b1;
        end
      end
    end
  end

endmodule
