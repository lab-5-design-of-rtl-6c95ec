// decoder2to4: 2-line to 4-line decoder with active-high outputs and one
// active-high enable.
//
// While en is 1, output y[sel] is 1 and the other three are 0; while en is 0
// all four outputs are 0. In the register file the select is the destination
// register address and the enable is the load-enable input, so the outputs
// pick the one register that loads. Purely combinational. Active-high
// outputs and enable are as the lab specifies.
module decoder2to4 (
  input  logic [1:0] sel,  // address of the output to raise
  input  logic       en,   // enable, active high
  output logic [3:0] y     // one-hot when enabled, all zero otherwise
);

  always_comb begin
    y = 4'b0000;
    if (en) begin
      unique case (sel)
        2'b00: y = 4'b0001;
        2'b01: y = 4'b0010;
        2'b10: y = 4'b0100;
        2'b11: y = 4'b1000;
      endcase
    end
  end

endmodule
