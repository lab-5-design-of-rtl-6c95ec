// regfile_1r: 4x4 register file with one write port and one read port.
//
// Four 4-bit registers R0..R3, a 2-to-4 decoder that picks the destination
// and a quad 4:1 multiplexer that picks the source, wired as in the lab's
// register file. The decoder's select is the destination register address
// and its enable is the load-enable input le; its one-hot output decides
// which register takes data_in.
//
// Timing: data_out is combinational from src_sel and the register contents.
// A write takes effect on the rising clk edge during which le is 1, so one
// le pulse held high across one clk edge is one transfer (the lab's lo-hi-lo
// LE pulse). Because the registers change only after the edge, a register
// may be both source and destination in the same cycle and still reads its
// old value. In the lab the decoder outputs clock the registers directly;
// here they are load enables on a shared clock (see reg4).
module regfile_1r
  import lab5_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W
) (
  input  logic             clk,
  input  logic             rst_n,     // clears all registers, active low
  input  logic             le,        // load enable
  input  reg_sel_t         dst_sel,   // destination register select D1 D0
  input  reg_sel_t         src_sel,   // source register select S1 S0
  input  logic [WIDTH-1:0] data_in,
  output logic [WIDTH-1:0] data_out
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

  quad_mux4 #(.WIDTH(WIDTH)) u_mux (
    .a   (r[0]),
    .b   (r[1]),
    .c   (r[2]),
    .d   (r[3]),
    .sel (src_sel),
    .f   (data_out)
  );

  // At most one register loads per cycle.
  a_one_dest: assert property (@(posedge clk) $onehot0(load));

endmodule
