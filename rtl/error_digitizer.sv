// error_digitizer: dataway interface and converter control of the error
// digitizer (ED) module.
//
// The analog half of the ED (sum and difference amplifiers, low pass, null
// weight DAC, mu weight DAC, sample-and-hold and comparator) is outside the
// RTL; this module holds the registers that set it up and runs the ADC:
//   null weight register  12 bits, offset binary, bus D0..D11
//   mu weight register    10 bits, unipolar binary, bus D2..D11
//   control word register 12 bits, bus D0..D11
//   ADC holding register  12 bits, 2's complement, LSB justified: ADC bit 0
//                         (MSB) on D4 ... bit 11 on D15, sign-extended into
//                         D0..D3
// Control word bits (the document names them but does not place them; the
// placement is this design's choice): D0 zero reference 1 input, D1 zero
// reference 2 input, D2 resolution control on, D3 not used, D4..D11 reserved
// for a future ADC resolution control. The bits are brought out unchanged.
//
// Dataway OP codes: addressed (ADEN=0, address MY_ADDR) LNW, LuW, LCW load the
// registers from the bus, RAR drives the ADC register onto the bus, SCA starts
// a conversion; broadcast (ADEN=1) RAR-MDI drives the ADC register onto the
// bus for the weight processors to take in. adc_busy is the ED's dataway
// status line. Registers load on the T4 strobe `commit`; the conversion then
// runs on the master clock (see ed_sar_adc).
module error_digitizer
  import asp_pkg::*;
#(
  parameter logic [AW-1:0] MY_ADDR      = 5'd1,
  parameter int unsigned   CLKS_PER_BIT = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                commit,
  input  dw_ctrl_t            dw,
  input  logic [DW-1:0]       sysbus_in,
  output logic [DW-1:0]       sysbus_out,
  output logic                sysbus_oe,
  output logic                adc_busy,
  // to the analog section
  output logic [11:0]         null_weight,
  output logic [9:0]          mu_weight,
  output logic [11:0]         ctrl_word,
  output logic                adc_hold,
  output logic [ADC_BITS-1:0] adc_trial,
  input  logic                adc_comp
);

  logic                addressed;
  logic                do_read, do_sca;
  logic [ADC_BITS-1:0] adc_reg;

  assign addressed = !dw.aden && (dw.addr == MY_ADDR);
  assign do_read   = (addressed && dw.op == OP_ED_RAR) || (dw.aden && dw.op == OP_B_RAR_MDI);
  assign do_sca    = commit && addressed && (dw.op == OP_ED_SCA);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      null_weight <= 12'h800;   // offset binary zero
      mu_weight   <= '0;
      ctrl_word   <= '0;
    end else if (commit && addressed) begin
      unique case (dw.op)
        OP_ED_LNW: null_weight <= sysbus_in[15:4];
        OP_ED_LUW: mu_weight   <= sysbus_in[13:4];
        OP_ED_LCW: ctrl_word   <= sysbus_in[15:4];
        default: ;
      endcase
    end
  end

  ed_sar_adc #(.NBITS(ADC_BITS), .CLKS_PER_BIT(CLKS_PER_BIT)) u_adc (
    .clk, .rst_n,
    .start  (do_sca),
    .comp   (adc_comp),
    .busy   (adc_busy),
    .hold   (adc_hold),
    .trial  (adc_trial),
    .result (adc_reg)
  );

  assign sysbus_out = {{4{adc_reg[ADC_BITS-1]}}, adc_reg};
  assign sysbus_oe  = do_read;

endmodule
