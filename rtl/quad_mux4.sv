// quad_mux4: "quad" 4:1 multiplexer, i.e. four 4:1 multiplexers sharing one
// 2-bit select, one per bit of a 4-bit word.
//
// f follows a, b, c or d for sel = 00, 01, 10, 11. Purely combinational. In
// the register file it is the read port: sel is the source register address
// and a..d are the outputs of R0..R3. The select coding follows the lab; the
// WIDTH parameter (default 4, the lab's word width) is this design's own.
module quad_mux4 #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,    // selected by 00
  input  logic [WIDTH-1:0] b,    // selected by 01
  input  logic [WIDTH-1:0] c,    // selected by 10
  input  logic [WIDTH-1:0] d,    // selected by 11
  input  logic [1:0]       sel,
  output logic [WIDTH-1:0] f
);

  always_comb begin
    unique case (sel)
      2'b00: f = a;
      2'b01: f = b;
      2'b10: f = c;
      2'b11: f = d;
    endcase
  end

endmodule
