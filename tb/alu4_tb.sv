// alu4_tb: exhaustive check of the 8-function ALU over all 8 x 16 x 16
// input combinations, against results computed here with integer arithmetic
// reduced modulo 16. Also checks the zero and sign status outputs, and a
// second instance built with the increment option in place of preset.
module alu4_tb;
  import lab5_pkg::*;

  alu_op_t    s;
  logic [3:0] a, b, f, f_inc;
  logic       zero, sign, zero_inc, sign_inc;
  int checks = 0, failures = 0;

  alu4 dut (.s(s), .a(a), .b(b), .f(f), .zero(zero), .sign(sign));
  alu4 #(.WIDTH(4), .INC_FOR_PRESET(1'b1)) dut_inc (
    .s(s), .a(a), .b(b), .f(f_inc), .zero(zero_inc), .sign(sign_inc));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_alu(int op, int x, int y, bit inc);
    int r;
    case (op)
      0: r = 0;
      1: r = y - x;
      2: r = x - y;
      3: r = x + y;
      4: r = x ^ y;
      5: r = x | y;
      6: r = x & y;
      default: r = inc ? x + 1 : 15;
    endcase
    return ((r % 16) + 16) % 16;
  endfunction

  initial begin
    int e, ei;
    for (int op = 0; op < 8; op++)
      for (int x = 0; x < 16; x++)
        for (int y = 0; y < 16; y++) begin
          s = alu_op_t'(op);
          a = 4'(x);
          b = 4'(y);
          #1;
          e  = ref_alu(op, x, y, 1'b0);
          ei = ref_alu(op, x, y, 1'b1);
          checks += 4;
          if (int'(f) != e) begin
            failures++;
            $display("FAIL op=%0d a=%0d b=%0d f=%0d expected %0d", op, x, y, f, e);
          end
          if (zero !== (e == 0)) begin
            failures++;
            $display("FAIL zero op=%0d a=%0d b=%0d", op, x, y);
          end
          if (sign !== (e >= 8)) begin
            failures++;
            $display("FAIL sign op=%0d a=%0d b=%0d", op, x, y);
          end
          if (int'(f_inc) != ei) begin
            failures++;
            $display("FAIL inc op=%0d a=%0d b=%0d f=%0d expected %0d", op, x, y, f_inc, ei);
          end
        end
    // the lab's own function table, spot values
    s = ALU_SUB_BA; a = 4'd3; b = 4'd5; #1; checks++; if (f !== 4'd2)  failures++;
    s = ALU_SUB_AB; a = 4'd3; b = 4'd5; #1; checks++; if (f !== 4'hE)  failures++;
    s = ALU_PRESET;                     #1; checks++; if (f !== 4'hF)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
