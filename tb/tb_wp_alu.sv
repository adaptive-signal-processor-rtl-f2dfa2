// tb_wp_alu: checks every ALU function of the weight processor against an
// integer reference, including the signum step and overflow substitution.
`timescale 1ns/1ps
module tb_wp_alu;
  import asp_pkg::*;
  logic [3:0]  f;
  logic        c_msb, present_a;
  logic [15:0] a, b, y;
  logic        of_pos, of_neg;
  int checks = 0, failures = 0;

  wp_alu dut (.*);

  function automatic void model(input logic [3:0] ff, input logic c, input logic pa,
                                input logic [15:0] aa, input logic [15:0] bb,
                                output logic [15:0] yy, output logic op, output logic on);
    int sa, sb, r;
    bit arith;
    sa = int'(signed'(aa)); sb = int'(signed'(bb));
    arith = 1; op = 0; on = 0; r = 0;
    if (pa) begin arith = 0; yy = aa; end
    else case (ff)
      0: r = c ? sa + sb : sa - sb;
      1: r = sa + sb;
      2: r = sa - sb;
      3: r = sb - sa;
      default: begin
        arith = 0;
        case (ff)
          5: yy = bb; 6: yy = aa & bb; 7: yy = aa | bb; 8: yy = aa ^ bb;
          default: yy = aa;
        endcase
      end
    endcase
    if (arith) begin
      if (r > 32767) begin yy = 16'h7FFF; op = 1; end
      else if (r < -32768) begin yy = 16'h8000; on = 1; end
      else yy = 16'(r);
    end
  endfunction

  initial begin
    logic [15:0] ey; logic eop, eon;
    int nofp = 0, nofn = 0;
    for (int i = 0; i < 4000; i++) begin
      f = 4'($urandom_range(0, 15));
      if (i % 3 == 0) f = 4'd0;
      c_msb = 1'($urandom);
      present_a = ($urandom_range(0, 15) == 0);
      a = 16'($urandom); b = 16'($urandom);
      if (i % 5 == 0) begin a = 16'h7F00 + 16'($urandom_range(0, 255)); b = 16'($urandom_range(0, 1023)); end
      #1;
      model(f, c_msb, present_a, a, b, ey, eop, eon);
      checks++;
      if (y !== ey || of_pos !== eop || of_neg !== eon) begin
        failures++;
        if (failures < 10) $display("FAIL f=%0d c=%0d pa=%0d a=%04x b=%04x y=%04x exp %04x of %0d%0d exp %0d%0d",
                                    f, c_msb, present_a, a, b, y, ey, of_pos, of_neg, eop, eon);
      end
      nofp += eop; nofn += eon;
    end
    // directed: signum step with positive and negative input sign
    f = 0; present_a = 0; a = 16'd1000; b = 16'd24;
    c_msb = 1; #1; checks++; if (y != 16'd1024) failures++;
    c_msb = 0; #1; checks++; if (y != 16'd976) failures++;
    checks++; if (nofp == 0 || nofn == 0) begin failures++; $display("FAIL: overflow never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
