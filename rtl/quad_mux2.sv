// quad_mux2: "quad" 2:1 multiplexer, four 2:1 multiplexers sharing one
// select, one per bit of a 4-bit word.
//
// f = a while s = 0 and f = b while s = 1. Purely combinational. In both
// datapaths it sits in front of the register file's data input: input 0 is
// the external data (switches), input 1 the internal result, and s is the
// data-source bit DS of the control word. The function follows the lab; the
// WIDTH parameter (default 4) is this design's own.
module quad_mux2 #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,  // selected by s = 0
  input  logic [WIDTH-1:0] b,  // selected by s = 1
  input  logic             s,
  output logic [WIDTH-1:0] f
);

  assign f = s ? b : a;

endmodule
