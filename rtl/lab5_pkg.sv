// lab5_pkg: types and constants shared by the register-file datapaths.
//
// The design moves 4-bit words between four registers R0..R3. Two control
// words steer it. The register-transfer datapath takes a 5-bit word
// [D1 D0 S1 S0 DS]: destination, source and data-source select. The ALU
// datapath takes a 10-bit word [D1 D0 SA1 SA0 SB1 SB0 s2 s1 s0 DS]:
// destination, two sources, ALU function and data-source select. Both
// layouts, the ALU function codes and the meaning of DS follow the lab
// text; packing them MSB-first into structs is this design's choice.
package lab5_pkg;

  // Word width of the registers, buses, multiplexers and ALU.
  localparam int unsigned DATA_W = 4;
  // Number of registers in the file (addressed by a 2-bit select).
  localparam int unsigned NUM_REGS = 4;

  typedef logic [1:0] reg_sel_t;

  // ALU function select s2 s1 s0.
  typedef enum logic [2:0] {
    ALU_CLEAR  = 3'b000,  // F = 0000
    ALU_SUB_BA = 3'b001,  // F = B - A
    ALU_SUB_AB = 3'b010,  // F = A - B
    ALU_ADD    = 3'b011,  // F = A + B
    ALU_XOR    = 3'b100,  // F = A xor B
    ALU_OR     = 3'b101,  // F = A or B
    ALU_AND    = 3'b110,  // F = A and B
    ALU_PRESET = 3'b111   // F = 1111
  } alu_op_t;

  // Data source select DS: 0 loads external data, 1 the internal result.
  typedef enum logic {
    DS_EXTERNAL = 1'b0,
    DS_INTERNAL = 1'b1
  } data_src_t;

  // 5-bit control word of the register-transfer datapath: [D1 D0 S1 S0 DS].
  typedef struct packed {
    reg_sel_t  dst;
    reg_sel_t  src;
    data_src_t ds;
  } rt_ctrl_t;

  // 10-bit control word of the ALU datapath:
  // [D1 D0 SA1 SA0 SB1 SB0 s2 s1 s0 DS].
  typedef struct packed {
    reg_sel_t  dst;
    reg_sel_t  src_a;
    reg_sel_t  src_b;
    alu_op_t   fn;
    data_src_t ds;
  } alu_ctrl_t;

endpackage
