// reg4: 4-bit register of positive edge-triggered D flip-flops.
//
// On a rising edge of clk, q takes d if load is 1 and keeps its value
// otherwise. An asynchronous active-low reset clears it.
//
// In the lab each register has only D, Clk and Q, and the register file
// drives each register's Clk from its own decoder output, so the register
// sees an edge only when it is the destination. Here every register shares
// one free-running clock and the decoder output becomes the synchronous load
// enable: the same register loads at the same moment, without a gated clock.
// The reset is this design's addition; the lab's registers have none.
module reg4 #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,  // asynchronous reset to zero, active low
  input  logic             load,   // sample d on this rising edge of clk
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end

endmodule
