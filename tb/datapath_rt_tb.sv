// datapath_rt_tb: the register-transfer datapath.
// Part 1 runs every row of the register-transfer table: the four external
// loads R[d] <- data, and all sixteen transfers R[d] <- R[s] (d, s = 0..3),
// each transfer starting from freshly loaded, distinct register contents and
// followed by a read-back of all four registers. Part 2 runs a random
// microprogram of loads, transfers and idle cycles against a model. Each
// microoperation must complete on the one clock edge at which le is 1.
module datapath_rt_tb;
  import lab5_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b1, le = 1'b0;
  rt_ctrl_t   ctrl = '0;
  logic [3:0] data_in = '0, data_out;
  int checks = 0, failures = 0;
  logic [3:0] model [4];
  localparam logic [3:0] INIT [4] = '{4'h3, 4'h5, 4'hA, 4'hC};

  datapath_rt dut (
    .clk(clk), .rst_n(rst_n), .le(le), .ctrl(ctrl),
    .data_in(data_in), .data_out(data_out));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One microoperation: set the control word at the falling edge, pulse le
  // across one rising edge, update the model.
  task automatic micro_op(input int d, input int s, input bit ds, input logic [3:0] din,
                          input bit do_le);
    logic [3:0] res;
    @(negedge clk);
    ctrl.dst = reg_sel_t'(d);
    ctrl.src = reg_sel_t'(s);
    ctrl.ds  = ds ? DS_INTERNAL : DS_EXTERNAL;
    data_in  = din;
    le       = do_le;
    res      = ds ? model[s] : din;
    @(posedge clk);
    #1;
    if (do_le) model[d] = res;
    @(negedge clk) le = 1'b0;
  endtask

  task automatic read_all(input string what);
    for (int k = 0; k < 4; k++) begin
      ctrl.src = reg_sel_t'(k);
      #1;
      checks++;
      if (data_out !== model[k]) begin
        failures++;
        $display("FAIL %s: R%0d=%h expected %h", what, k, data_out, model[k]);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < 4; k++) model[k] = 4'h0;
    #1 rst_n = 1'b0;  // asynchronous reset, before the first clock edge
    #1 read_all("reset");
    @(negedge clk) rst_n = 1'b1;
    // Table rows 1-4: R[d] <- abcd
    for (int d = 0; d < 4; d++) micro_op(d, 0, 1'b0, INIT[d], 1'b1);
    read_all("external load");
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (model[k] !== INIT[k]) failures++;
    end
    // Table rows 5-20: R[d] <- R[s]
    for (int s = 0; s < 4; s++)
      for (int d = 0; d < 4; d++) begin
        for (int k = 0; k < 4; k++) micro_op(k, 0, 1'b0, INIT[k], 1'b1);
        micro_op(d, s, 1'b1, 4'h0, 1'b1);
        read_all($sformatf("R%0d <- R%0d", d, s));
        checks++;  // worked out directly from the table
        if (model[d] !== INIT[s]) failures++;
      end
    // random microprogram
    for (int it = 0; it < 300; it++) begin
      micro_op($urandom % 4, $urandom % 4, 1'($urandom), 4'($urandom), ($urandom % 4) != 0);
      read_all("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
