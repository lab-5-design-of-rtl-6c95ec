// lab5_top: the two datapaths of the design side by side.
//
// rt_*  : the register-transfer datapath (datapath_rt), a 4x4 register file
//         whose data input is either external data or its own read port.
// alu_* : the ALU datapath (datapath_alu), a 4x4 register file with two
//         read ports feeding an 8-function ALU whose result is written back.
// The two share only clk and rst_n; each has its own load enable, control
// word, external data input and LED output. Placing both in one top is this
// design's choice; each datapath works exactly as when used alone.
module lab5_top
  import lab5_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W
) (
  input  logic             clk,
  input  logic             rst_n,
  // register-transfer datapath
  input  logic             rt_le,
  input  rt_ctrl_t         rt_ctrl,
  input  logic [WIDTH-1:0] rt_data_in,
  output logic [WIDTH-1:0] rt_data_out,
  // ALU datapath
  input  logic             alu_le,
  input  alu_ctrl_t        alu_ctrl,
  input  logic [WIDTH-1:0] alu_data_in,
  output logic [WIDTH-1:0] alu_data_out,
  output logic             alu_zero,
  output logic             alu_sign
);

  datapath_rt #(.WIDTH(WIDTH)) u_rt (
    .clk      (clk),
    .rst_n    (rst_n),
    .le       (rt_le),
    .ctrl     (rt_ctrl),
    .data_in  (rt_data_in),
    .data_out (rt_data_out)
  );

  datapath_alu #(.WIDTH(WIDTH)) u_alu (
    .clk      (clk),
    .rst_n    (rst_n),
    .le       (alu_le),
    .ctrl     (alu_ctrl),
    .data_in  (alu_data_in),
    .data_out (alu_data_out),
    .zero     (alu_zero),
    .sign     (alu_sign)
  );

endmodule
