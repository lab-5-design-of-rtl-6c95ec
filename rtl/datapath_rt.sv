// datapath_rt: register-transfer datapath, a one-port register file with a
// quad 2:1 multiplexer on its input.
//
// A 5-bit control word [D1 D0 S1 S0 DS] and the load enable le run one
// microoperation per clock cycle:
//   DS = 0: R[D] <- data_in          (load from the external switches)
//   DS = 1: R[D] <- R[S]             (copy between registers, R[D] = R[S] allowed)
// The register file's read port drives data_out (the LEDs) and, through the
// 2:1 multiplexer's input 1, loops back to its own data input; input 0 is the
// external data. The structure and control-word layout follow the lab.
//
// Timing: data_out shows R[S] combinationally. The selected value is written
// on the rising clk edge during which le is 1; with le at 0 nothing changes.
// One le pulse spanning one clk edge performs one transfer.
module datapath_rt
  import lab5_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W
) (
  input  logic             clk,
  input  logic             rst_n,     // clears R0..R3, active low
  input  logic             le,        // load enable LE
  input  rt_ctrl_t         ctrl,      // [D1 D0 S1 S0 DS]
  input  logic [WIDTH-1:0] data_in,   // external data
  output logic [WIDTH-1:0] data_out   // register file data out
);

  logic [WIDTH-1:0] wr_data;

  quad_mux2 #(.WIDTH(WIDTH)) u_src_mux (
    .a (data_in),
    .b (data_out),
    .s (ctrl.ds),
    .f (wr_data)
  );

  regfile_1r #(.WIDTH(WIDTH)) u_rf (
    .clk      (clk),
    .rst_n    (rst_n),
    .le       (le),
    .dst_sel  (ctrl.dst),
    .src_sel  (ctrl.src),
    .data_in  (wr_data),
    .data_out (data_out)
  );

endmodule
