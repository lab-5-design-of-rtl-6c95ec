// regfile_2r: 4x4 register file with one write port and two read ports.
//
// The one-port register file of the lab extended by a second quad 4:1
// multiplexer, so that any two registers (source A and source B) can be read
// at once and fed to the two ALU operands. Writing works as in regfile_1r:
// a 2-to-4 decoder, enabled by the load enable le, turns the destination
// address into the load signal of one of R0..R3.
//
// Timing: data_out_a and data_out_b are combinational from their selects and
// the register contents; data_in is stored on the rising clk edge during
// which le is 1. Reads in that cycle still see the old contents, so a
// register can be a source and the destination of one microoperation. The
// shared clock with decoder-driven load enables, and the reset, are this
// design's choices (see reg4).
module regfile_2r
  import lab5_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W
) (
  input  logic             clk,
  input  logic             rst_n,      // clears all registers, active low
  input  logic             le,         // load enable
  input  reg_sel_t         dst_sel,    // destination register select D1 D0
  input  reg_sel_t         src_a_sel,  // source register A select SA1 SA0
  input  reg_sel_t         src_b_sel,  // source register B select SB1 SB0
  input  logic [WIDTH-1:0] data_in,
  output logic [WIDTH-1:0] data_out_a,
  output logic [WIDTH-1:0] data_out_b
);

  logic [NUM_REGS-1:0] load;
  logic [WIDTH-1:0]    r [NUM_REGS];

  decoder2to4 u_dec (
    .sel (dst_sel),
    .en  (le),
    .y   (load)
  );

  for (genvar i = 0; i < NUM_REGS; i++) begin : g_reg
    reg4 #(.WIDTH(WIDTH)) u_reg (
      .clk   (clk),
      .rst_n (rst_n),
      .load  (load[i]),
      .d     (data_in),
      .q     (r[i])
    );
  end

  quad_mux4 #(.WIDTH(WIDTH)) u_mux_a (
    .a   (r[0]),
    .b   (r[1]),
    .c   (r[2]),
    .d   (r[3]),
    .sel (src_a_sel),
    .f   (data_out_a)
  );

  quad_mux4 #(.WIDTH(WIDTH)) u_mux_b (
    .a   (r[0]),
    .b   (r[1]),
    .c   (r[2]),
    .d   (r[3]),
    .sel (src_b_sel),
    .f   (data_out_b)
  );

  // At most one register loads per cycle.
  a_one_dest: assert property (@(posedge clk) $onehot0(load));

endmodule
