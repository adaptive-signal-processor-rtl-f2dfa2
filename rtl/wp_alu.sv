// wp_alu: 16-bit arithmetic-logic unit of the weight processor.
//
// The function is chosen by the 4-bit F register together with the most
// significant bit of the C (sign) shift register, as the document describes
// for its ALU function-control PROM. The contents of that PROM are not given;
// this design's table is:
//   F=0  signum step: A+B when C[MSB]=1 (channel input positive), else A-B
//   F=1  A+B    F=2  A-B    F=3  B-A    F=4  A      F=5  B
//   F=6  A&B    F=7  A|B    F=8  A^B    other F: A
// F=0 is what the clipped LMS update needs: weight (A) plus or minus the
// scaled error (B) by the sign of the channel input, so a cleared F register
// selects it. `present_a` (the PAR instruction) forces the output to A.
//
// Operands and result are 2's complement. When an add or subtract overflows,
// the output is replaced by the largest (7FFF) or smallest (8000) value and
// of_pos / of_neg flags the direction, as in the document.
//
// Purely combinational; the result is valid within the same clock phase.
module wp_alu
  import asp_pkg::*;
(
  input  logic [3:0]    f,
  input  logic          c_msb,
  input  logic          present_a,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  output logic [DW-1:0] y,
  output logic          of_pos,
  output logic          of_neg
);

  typedef enum logic [1:0] {ARITH_NONE, ARITH_ADD, ARITH_SUB_AB, ARITH_SUB_BA} arith_e;

  arith_e          arith;
  logic [DW-1:0]   logic_res;
  logic [DW:0]     sum;       // one extra bit for overflow detection
  logic [DW-1:0]   op_x, op_y;

  always_comb begin
    arith     = ARITH_NONE;
    logic_res = a;
    if (present_a) begin
      arith     = ARITH_NONE;
      logic_res = a;
    end else begin
      unique case (f)
        4'd0:    arith = c_msb ? ARITH_ADD : ARITH_SUB_AB;
        4'd1:    arith = ARITH_ADD;
        4'd2:    arith = ARITH_SUB_AB;
        4'd3:    arith = ARITH_SUB_BA;
        4'd4:    logic_res = a;
        4'd5:    logic_res = b;
        4'd6:    logic_res = a & b;
        4'd7:    logic_res = a | b;
        4'd8:    logic_res = a ^ b;
        default: logic_res = a;
      endcase
    end
  end

  always_comb begin
    op_x = (arith == ARITH_SUB_BA) ? b : a;
    op_y = (arith == ARITH_SUB_BA) ? a : b;
    if (arith == ARITH_ADD)
      sum = {op_x[DW-1], op_x} + {op_y[DW-1], op_y};
    else
      sum = {op_x[DW-1], op_x} - {op_y[DW-1], op_y};
  end

  always_comb begin
    of_pos = 1'b0;
    of_neg = 1'b0;
    y      = logic_res;
    if (arith != ARITH_NONE) begin
      // the two top bits of the extended sum differ exactly on overflow
      of_pos = (sum[DW] == 1'b0) && (sum[DW-1] == 1'b1);
      of_neg = (sum[DW] == 1'b1) && (sum[DW-1] == 1'b0);
      if (of_pos)      y = WORD_MAX;
      else if (of_neg) y = WORD_MIN;
      else             y = sum[DW-1:0];
    end
  end

endmodule
