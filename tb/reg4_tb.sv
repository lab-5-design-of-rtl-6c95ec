// reg4_tb: the 4-bit register. Checks that reset clears it, that it takes d
// on a rising edge only while load is 1, that it holds otherwise, and that
// the new value appears after the edge and not before.
module reg4_tb;
  logic       clk = 1'b0, rst_n = 1'b1, load = 1'b0;
  logic [3:0] d = '0, q;
  int checks = 0, failures = 0;

  reg4 dut (.clk(clk), .rst_n(rst_n), .load(load), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [3:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, exp);
    end
  endtask

  initial begin
    logic [3:0] model;
    #1 rst_n = 1'b0;  // asynchronous reset, before the first clock edge
    #1;
    check(4'h0, "reset");
    @(negedge clk);
    rst_n = 1'b1;
    model = 4'h0;
    for (int it = 0; it < 300; it++) begin
      @(negedge clk);
      load = 1'($urandom);
      d    = 4'($urandom);
      #1 check(model, "before edge");
      @(posedge clk);
      #1;
      if (load) model = d;
      check(model, "after edge");
    end
    // asynchronous reset clears without a clock edge
    @(negedge clk);
    load = 1'b1; d = 4'hF;
    @(posedge clk);
    #1 check(4'hF, "load F");
    #1 rst_n = 1'b0;
    #1 check(4'h0, "async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
