// datapath_alu_tb: the ALU datapath.
// Part 1 runs the example microprogram: load R0..R3 with 5, 3, 9, 12, then
//   R0 <- R0 + R1   (8)     R1 <- R0 - R2  (15)   R2 <- 0      R3 <- 1111
//   R0 <- R2 AND R3 (0)     R1 <- R1 OR R2 (15)   R2 <- R1 XOR R3 (0)
//   R3 <- R3 XOR R3 (0)
// followed by the control words 10 01 11 011 1 (R2 <- R1 + R3 = 15) and
// 11 11 11 010 1 (R3 <- R3 - R3 = 0). The expected register contents are
// written out by hand. Each step is checked one clock edge after le rises,
// and the ALU output is checked before the edge. Part 2 runs a random
// microprogram against a model. Registers are read back through the ALU
// with A OR A, which passes A unchanged.
module datapath_alu_tb;
  import lab5_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b1, le = 1'b0;
  alu_ctrl_t  ctrl = '0;
  logic [3:0] data_in = '0, data_out;
  logic       zero, sign;
  int checks = 0, failures = 0;
  logic [3:0] model [4];

  datapath_alu dut (
    .clk(clk), .rst_n(rst_n), .le(le), .ctrl(ctrl),
    .data_in(data_in), .data_out(data_out), .zero(zero), .sign(sign));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] ref_alu(alu_op_t op, logic [3:0] x, logic [3:0] y);
    case (op)
      ALU_CLEAR:  return 4'h0;
      ALU_SUB_BA: return y - x;
      ALU_SUB_AB: return x - y;
      ALU_ADD:    return x + y;
      ALU_XOR:    return x ^ y;
      ALU_OR:     return x | y;
      ALU_AND:    return x & y;
      default:    return 4'hF;
    endcase
  endfunction

  task automatic expect4(input logic [3:0] got, input logic [3:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  // One microoperation from a packed 10-bit control word.
  task automatic micro_op(input alu_ctrl_t cw, input logic [3:0] din, input bit do_le);
    logic [3:0] f;
    @(negedge clk);
    ctrl    = cw;
    data_in = din;
    le      = do_le;
    f       = ref_alu(cw.fn, model[cw.src_a], model[cw.src_b]);
    #1 expect4(data_out, f, "ALU output before the edge");
    checks++;
    if (zero !== (f == 4'h0) || sign !== f[3]) begin
      failures++;
      $display("FAIL status flags");
    end
    @(posedge clk);
    #1;
    if (do_le) model[cw.dst] = (cw.ds == DS_INTERNAL) ? f : din;
    @(negedge clk) le = 1'b0;
  endtask

  task automatic read_all(input string what);
    for (int k = 0; k < 4; k++) begin
      ctrl.src_a = reg_sel_t'(k);
      ctrl.src_b = reg_sel_t'(k);
      ctrl.fn    = ALU_OR;
      #1 expect4(data_out, model[k], $sformatf("%s R%0d", what, k));
    end
  endtask

  task automatic expect_regs(input logic [3:0] r0, r1, r2, r3, input string what);
    expect4(model[0], r0, {what, " R0 (model)"});
    expect4(model[1], r1, {what, " R1 (model)"});
    expect4(model[2], r2, {what, " R2 (model)"});
    expect4(model[3], r3, {what, " R3 (model)"});
    read_all(what);
  endtask

  initial begin
    for (int k = 0; k < 4; k++) model[k] = 4'h0;
    #1 rst_n = 1'b0;  // asynchronous reset, before the first clock edge
    #1 read_all("reset");
    @(negedge clk) rst_n = 1'b1;
    // example microprogram, control words [D SA SB s DS]
    micro_op(10'b00_00_00_000_0, 4'd5,  1'b1);
    micro_op(10'b01_00_00_000_0, 4'd3,  1'b1);
    micro_op(10'b10_00_00_000_0, 4'd9,  1'b1);
    micro_op(10'b11_00_00_000_0, 4'd12, 1'b1);
    expect_regs(4'd5, 4'd3, 4'd9, 4'd12, "init");
    micro_op(10'b00_00_01_011_1, 4'h0, 1'b1);  expect_regs(4'd8, 4'd3,  4'd9, 4'd12, "R0<-R0+R1");
    micro_op(10'b01_00_10_010_1, 4'h0, 1'b1);  expect_regs(4'd8, 4'd15, 4'd9, 4'd12, "R1<-R0-R2");
    micro_op(10'b10_00_00_000_1, 4'h0, 1'b1);  expect_regs(4'd8, 4'd15, 4'd0, 4'd12, "R2<-0");
    micro_op(10'b11_00_00_111_1, 4'h0, 1'b1);  expect_regs(4'd8, 4'd15, 4'd0, 4'd15, "R3<-1111");
    micro_op(10'b00_10_11_110_1, 4'h0, 1'b1);  expect_regs(4'd0, 4'd15, 4'd0, 4'd15, "R0<-R2&R3");
    micro_op(10'b01_01_10_101_1, 4'h0, 1'b1);  expect_regs(4'd0, 4'd15, 4'd0, 4'd15, "R1<-R1|R2");
    micro_op(10'b10_01_11_100_1, 4'h0, 1'b1);  expect_regs(4'd0, 4'd15, 4'd0, 4'd15, "R2<-R1^R3");
    micro_op(10'b11_11_11_100_1, 4'h0, 1'b1);  expect_regs(4'd0, 4'd15, 4'd0, 4'd0,  "R3<-R3^R3");
    micro_op(10'b10_01_11_011_1, 4'h0, 1'b1);  expect_regs(4'd0, 4'd15, 4'd15, 4'd0, "R2<-R1+R3");
    micro_op(10'b11_11_11_010_1, 4'h0, 1'b1);  expect_regs(4'd0, 4'd15, 4'd15, 4'd0, "R3<-R3-R3");
    // le low: the control word is applied but nothing is written
    micro_op(10'b01_00_00_000_1, 4'h0, 1'b0);  expect_regs(4'd0, 4'd15, 4'd15, 4'd0, "no LE");
    // random microprogram
    for (int it = 0; it < 400; it++) begin
      micro_op(alu_ctrl_t'($urandom), 4'($urandom), ($urandom % 4) != 0);
      read_all("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
