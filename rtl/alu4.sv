// alu4: combinational 8-function ALU on two 4-bit operands.
//
// The 3-bit function select s2 s1 s0 picks one of eight results:
//   000 clear (0000)   001 B - A   010 A - B     011 A + B
//   100 A xor B        101 A or B  110 A and B   111 preset (1111)
// Sums and differences are taken modulo 2^WIDTH (carries and borrows out of
// the top bit are dropped), which is the same for signed and unsigned
// operands. The function table follows the lab.
//
// The lab suggests two optional extensions, which this module also has:
// status outputs zero (F is all zeros) and sign (the top bit of F), and,
// with the parameter INC_FOR_PRESET set to 1, an increment A + 1 in place of
// preset. The default keeps the lab's preset.
module alu4
  import lab5_pkg::*;
#(
  parameter int unsigned WIDTH          = DATA_W,
  parameter bit          INC_FOR_PRESET = 1'b0  // 1: code 111 gives A + 1
) (
  input  alu_op_t          s,     // function select s2 s1 s0
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] f,
  output logic             zero,  // Z: f == 0
  output logic             sign   // S: most significant bit of f
);

  always_comb begin
    unique case (s)
      ALU_CLEAR:  f = '0;
      ALU_SUB_BA: f = b - a;
      ALU_SUB_AB: f = a - b;
      ALU_ADD:    f = a + b;
      ALU_XOR:    f = a ^ b;
      ALU_OR:     f = a | b;
      ALU_AND:    f = a & b;
      ALU_PRESET: f = INC_FOR_PRESET ? a + WIDTH'(1) : '1;
    endcase
  end

  assign zero = (f == '0);
  assign sign = f[WIDTH-1];

endmodule
