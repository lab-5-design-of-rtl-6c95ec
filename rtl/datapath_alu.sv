// datapath_alu: register-file datapath with an ALU, the lab's final design.
//
// A two-read-port register file feeds the A and B operands of an 8-function
// ALU; the ALU result F drives data_out (the LEDs) and input 1 of a quad 2:1
// multiplexer whose input 0 is external data. The multiplexer output is the
// register file's data input. A 10-bit control word
// [D1 D0 SA1 SA0 SB1 SB0 s2 s1 s0 DS] and the load enable le run one
// microoperation per clock cycle:
//   DS = 0: R[D] <- data_in
//   DS = 1: R[D] <- f(R[SA], R[SB]), f chosen by s2 s1 s0 (see alu4)
// A sequence of such control words is a microprogram. Structure, control
// word and function codes follow the lab.
//
// Timing: data_out, zero and sign are combinational from the control word
// and the register contents. The result is written on the rising clk edge
// during which le is 1, so the ALU reads the old values and a register may
// be operand and destination of the same microoperation. zero and sign are
// the optional ALU status outputs the lab proposes as an extension.
module datapath_alu
  import lab5_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W
) (
  input  logic             clk,
  input  logic             rst_n,     // clears R0..R3, active low
  input  logic             le,        // load enable LE
  input  alu_ctrl_t        ctrl,      // [D1 D0 SA1 SA0 SB1 SB0 s2 s1 s0 DS]
  input  logic [WIDTH-1:0] data_in,   // external data
  output logic [WIDTH-1:0] data_out,  // ALU output F
  output logic             zero,      // ALU status Z
  output logic             sign       // ALU status S
);

  logic [WIDTH-1:0] op_a, op_b, wr_data;

  regfile_2r #(.WIDTH(WIDTH)) u_rf (
    .clk        (clk),
    .rst_n      (rst_n),
    .le         (le),
    .dst_sel    (ctrl.dst),
    .src_a_sel  (ctrl.src_a),
    .src_b_sel  (ctrl.src_b),
    .data_in    (wr_data),
    .data_out_a (op_a),
    .data_out_b (op_b)
  );

  alu4 #(.WIDTH(WIDTH)) u_alu (
    .s    (ctrl.fn),
    .a    (op_a),
    .b    (op_b),
    .f    (data_out),
    .zero (zero),
    .sign (sign)
  );

  quad_mux2 #(.WIDTH(WIDTH)) u_src_mux (
    .a (data_in),
    .b (data_out),
    .s (ctrl.ds),
    .f (wr_data)
  );

endmodule
