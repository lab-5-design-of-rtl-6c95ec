// lab5_top_tb: end-to-end test of both datapaths at their default size.
// The top is instantiated without parameter overrides. Both datapaths run
// side by side, each driven by its own stream of microoperations and each
// checked against its own model:
//   register-transfer datapath: the full register-transfer table (loads and
//     all 16 source/destination pairs), then a random microprogram;
//   ALU datapath: register initialisation, every ALU function with every
//     destination, then a random microprogram.
// It counts how often each mechanism of the design happened: external load
// (DS = 0), internal write-back (DS = 1), a register that is its own source,
// each of the eight ALU functions written back, a cycle with le = 0 that
// must change nothing, and the zero and sign status outputs being raised.
// A mechanism that never happened counts as a failure. Each microoperation
// is checked one clock edge after le rises, and not before.
module lab5_top_tb;
  import lab5_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b1;
  logic       rt_le = 1'b0, alu_le = 1'b0;
  rt_ctrl_t   rt_ctrl = '0;
  alu_ctrl_t  alu_ctrl = '0;
  logic [3:0] rt_data_in = '0, alu_data_in = '0;
  logic [3:0] rt_data_out, alu_data_out;
  logic       alu_zero, alu_sign;

  int checks = 0, failures = 0;
  logic [3:0] rt_model [4];
  logic [3:0] alu_model [4];

  // mechanism counters
  int n_ext_load = 0, n_rt_transfer = 0, n_self = 0, n_hold = 0;
  int n_zero = 0, n_sign = 0;
  int n_fn [8];

  lab5_top dut (
    .clk(clk), .rst_n(rst_n),
    .rt_le(rt_le), .rt_ctrl(rt_ctrl), .rt_data_in(rt_data_in), .rt_data_out(rt_data_out),
    .alu_le(alu_le), .alu_ctrl(alu_ctrl), .alu_data_in(alu_data_in),
    .alu_data_out(alu_data_out), .alu_zero(alu_zero), .alu_sign(alu_sign));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  // One clock cycle in which both datapaths execute a microoperation.
  task automatic step(input rt_ctrl_t rc, input logic [3:0] rd, input bit rle,
                      input alu_ctrl_t ac, input logic [3:0] ad, input bit ale);
    logic [3:0] rt_res, f, before_rt, before_alu;
    @(negedge clk);
    rt_ctrl = rc;  rt_data_in = rd;  rt_le = rle;
    alu_ctrl = ac; alu_data_in = ad; alu_le = ale;
    rt_res = (rc.ds == DS_INTERNAL) ? rt_model[rc.src] : rd;
    f      = ref_alu(ac.fn, alu_model[ac.src_a], alu_model[ac.src_b]);
    #1;
    expect4(rt_data_out, rt_model[rc.src], "rt data out");
    expect4(alu_data_out, f, "alu data out");
    checks++;
    if (alu_zero !== (f == 4'h0) || alu_sign !== f[3]) begin
      failures++;
      $display("FAIL alu status flags");
    end
    if (alu_zero) n_zero++;
    if (alu_sign) n_sign++;
    before_rt  = rt_model[rc.dst];
    before_alu = alu_model[ac.dst];
    @(posedge clk);
    #1;
    if (rle) begin
      rt_model[rc.dst] = rt_res;
      if (rc.ds == DS_EXTERNAL) n_ext_load++;
      else begin
        n_rt_transfer++;
        if (rc.src == rc.dst) n_self++;
      end
    end
    if (ale) begin
      alu_model[ac.dst] = (ac.ds == DS_INTERNAL) ? f : ad;
      if (ac.ds == DS_EXTERNAL) n_ext_load++;
      else begin
        n_fn[ac.fn]++;
        if (ac.src_a == ac.dst || ac.src_b == ac.dst) n_self++;
      end
    end
    if (!rle && !ale) begin
      n_hold++;
      checks++;
      if (rt_model[rc.dst] !== before_rt || alu_model[ac.dst] !== before_alu) failures++;
    end
    @(negedge clk);
    rt_le = 1'b0; alu_le = 1'b0;
  endtask

  task automatic read_all(input string what);
    for (int k = 0; k < 4; k++) begin
      rt_ctrl.src    = reg_sel_t'(k);
      alu_ctrl.src_a = reg_sel_t'(k);
      alu_ctrl.src_b = reg_sel_t'(k);
      alu_ctrl.fn    = ALU_AND;  // A and A = A
      #1;
      expect4(rt_data_out, rt_model[k], $sformatf("%s rt R%0d", what, k));
      expect4(alu_data_out, alu_model[k], $sformatf("%s alu R%0d", what, k));
    end
  endtask

  function automatic rt_ctrl_t rcw(int d, int s, bit ds);
    rt_ctrl_t c;
    c.dst = reg_sel_t'(d);
    c.src = reg_sel_t'(s);
    c.ds  = ds ? DS_INTERNAL : DS_EXTERNAL;
    return c;
  endfunction

  initial begin
    int cyc;
    alu_ctrl_t ac;
    for (int k = 0; k < 8; k++) n_fn[k] = 0;
    for (int k = 0; k < 4; k++) begin
      rt_model[k]  = 4'h0;
      alu_model[k] = 4'h0;
    end
    #1 rst_n = 1'b0;  // asynchronous reset, before the first clock edge
    #1 read_all("reset");
    @(negedge clk) rst_n = 1'b1;

    // initial loads of both register files
    for (int d = 0; d < 4; d++) begin
      ac = '0; ac.dst = reg_sel_t'(d); ac.ds = DS_EXTERNAL;
      step(rcw(d, 0, 1'b0), 4'(d * 3 + 1), 1'b1, ac, 4'(d * 5 + 2), 1'b1);
    end
    read_all("init");
    // register-transfer table (d, s = 0..3) alongside every ALU function to
    // every destination with random sources
    cyc = 0;
    for (int s = 0; s < 4; s++)
      for (int d = 0; d < 4; d++) begin
        for (int fn = 0; fn < 8; fn += 4) begin
          ac.dst   = reg_sel_t'(d);
          ac.src_a = reg_sel_t'($urandom);
          ac.src_b = reg_sel_t'($urandom);
          ac.fn    = alu_op_t'(fn + s);
          ac.ds    = DS_INTERNAL;
          step(rcw(d, s, 1'b1), 4'h0, 1'b1, ac, 4'h0, 1'b1);
        end
        read_all("table");
      end
    // idle cycles: control words applied, le low on both
    for (int it = 0; it < 4; it++) begin
      step(rcw(it, 3 - it, 1'b1), 4'($urandom), 1'b0, alu_ctrl_t'($urandom), 4'($urandom), 1'b0);
      read_all("idle");
    end
    // random microprograms on both
    for (int it = 0; it < 500; it++) begin
      step(rt_ctrl_t'($urandom), 4'($urandom), ($urandom % 4) != 0,
           alu_ctrl_t'($urandom), 4'($urandom), ($urandom % 4) != 0);
      if (it % 10 == 0) read_all("random");
    end
    read_all("final");

    $display("mechanisms: ext_load=%0d rt_transfer=%0d self=%0d hold=%0d zero=%0d sign=%0d",
             n_ext_load, n_rt_transfer, n_self, n_hold, n_zero, n_sign);
    $display("ALU write-backs per function: %0d %0d %0d %0d %0d %0d %0d %0d",
             n_fn[0], n_fn[1], n_fn[2], n_fn[3], n_fn[4], n_fn[5], n_fn[6], n_fn[7]);
    checks += 6;
    if (n_ext_load == 0)    begin failures++; $display("FAIL no external load");   end
    if (n_rt_transfer == 0) begin failures++; $display("FAIL no register transfer"); end
    if (n_self == 0)        begin failures++; $display("FAIL no self transfer");   end
    if (n_hold == 0)        begin failures++; $display("FAIL no idle cycle");      end
    if (n_zero == 0)        begin failures++; $display("FAIL zero never raised");  end
    if (n_sign == 0)        begin failures++; $display("FAIL sign never raised");  end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (n_fn[k] == 0) begin failures++; $display("FAIL ALU function %0d never written back", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
