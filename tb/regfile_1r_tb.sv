// regfile_1r_tb: the one-port 4x4 register file against a model array.
// Every register is loaded and read back through each source select, then a
// random mix of writes (le = 1) and idle cycles (le = 0) runs, with reads of
// random registers before and after each edge. This checks the decoder
// routing, the mux routing, that a write lands exactly one clock edge after
// le is raised, that le = 0 writes nothing, and that a read in the write
// cycle still sees the old value.
module regfile_1r_tb;
  import lab5_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b1, le = 1'b0;
  reg_sel_t   dst_sel = '0, src_sel = '0;
  logic [3:0] data_in = '0, data_out;
  int checks = 0, failures = 0;
  logic [3:0] model [4];

  regfile_1r dut (
    .clk(clk), .rst_n(rst_n), .le(le), .dst_sel(dst_sel), .src_sel(src_sel),
    .data_in(data_in), .data_out(data_out));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all(input string what);
    for (int k = 0; k < 4; k++) begin
      src_sel = reg_sel_t'(k);
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
    // load distinct values into each register
    for (int k = 0; k < 4; k++) begin
      @(negedge clk);
      le = 1'b1; dst_sel = reg_sel_t'(k); data_in = 4'(4'hA + k);
      @(posedge clk);
      #1 model[k] = 4'(4'hA + k);
      @(negedge clk) le = 1'b0;
      read_all("initial load");
    end
    for (int it = 0; it < 400; it++) begin
      @(negedge clk);
      le      = ($urandom % 4) != 0;
      dst_sel = reg_sel_t'($urandom);
      data_in = 4'($urandom);
      src_sel = dst_sel;
      #1;
      checks++;  // before the edge the destination still holds its old value
      if (data_out !== model[dst_sel]) begin
        failures++;
        $display("FAIL pre-edge R%0d=%h expected %h", dst_sel, data_out, model[dst_sel]);
      end
      @(posedge clk);
      #1;
      if (le) model[dst_sel] = data_in;
      @(negedge clk) le = 1'b0;
      read_all("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
