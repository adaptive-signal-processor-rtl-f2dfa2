// tc_timing_gen: clock phase generator of the test controller.
//
// Divides the master clock into system clock cycles of SLOTS master-clock
// slots. Slots 0..3 carry the clock phases T1..T4; any further slots are idle.
// With the default of 5 slots of 50 ns a cycle lasts 250 ns, the document's
// composite instruction period, while each phase lasts 50 ns, its phase
// duration (the document also says a cycle has 4 time slots; the idle fifth
// slot is how this design reconciles 4 x 50 ns phases with a 250 ns period).
//
// Modes (the document's three):
//   RUN           the slots advance on every master clock
//   SINGLE CYCLE  each press of `button` runs one complete T1..T4 cycle
//   SINGLE STEP   each press of `button` advances one master-clock slot
// `button` is a level from a push button; it is synchronised and edge
// detected here (no debouncing).
//
// Outputs: `tph` is the one-hot phase of the current slot (T1 = bit 0), for
// display. `tstb[k]` is high for exactly one master clock when phase T(k+1)
// is executed; every module of the design commits its state on tstb[3] (T4).
module tc_timing_gen
  import asp_pkg::*;
#(
  parameter int unsigned SLOTS = 5
) (
  input  logic      clk,
  input  logic      rst_n,
  input  clk_mode_e mode,
  input  logic      button,
  output logic [3:0] tph,
  output logic [3:0] tstb
);

  localparam int unsigned SW = $clog2(SLOTS);

  logic [SW-1:0] slot;
  logic [2:0]    btn_sync;
  logic          press;
  logic          cycle_run;   // SINGLE CYCLE: a cycle is in progress
  logic          advance;

  assign press = btn_sync[1] && !btn_sync[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) btn_sync <= '0;
    else        btn_sync <= {btn_sync[1:0], button};
  end

  always_comb begin
    unique case (mode)
      CLK_RUN:          advance = 1'b1;
      CLK_SINGLE_CYCLE: advance = cycle_run || press;
      CLK_SINGLE_STEP:  advance = press;
      default:          advance = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot      <= '0;
      cycle_run <= 1'b0;
    end else begin
      if (advance)
        slot <= (slot == SW'(SLOTS - 1)) ? '0 : slot + 1'b1;
      if (mode != CLK_SINGLE_CYCLE)
        cycle_run <= 1'b0;
      else if (advance)
        cycle_run <= (slot != SW'(SLOTS - 1));
    end
  end

  always_comb begin
    tph = '0;
    if (slot < 4) tph[slot[1:0]] = 1'b1;
    tstb = advance ? tph : 4'b0000;
  end

endmodule
