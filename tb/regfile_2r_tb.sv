// regfile_2r_tb: the two-read-port 4x4 register file against a model array.
// Random writes and idle cycles; after each, every (A, B) pair of source
// selects is read, so both multiplexers are checked against all registers,
// including the case of both ports reading the same register. A write must
// appear one clock edge after le is raised, and not before.
module regfile_2r_tb;
  import lab5_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b1, le = 1'b0;
  reg_sel_t   dst_sel = '0, src_a_sel = '0, src_b_sel = '0;
  logic [3:0] data_in = '0, data_out_a, data_out_b;
  int checks = 0, failures = 0;
  logic [3:0] model [4];

  regfile_2r dut (
    .clk(clk), .rst_n(rst_n), .le(le), .dst_sel(dst_sel),
    .src_a_sel(src_a_sel), .src_b_sel(src_b_sel),
    .data_in(data_in), .data_out_a(data_out_a), .data_out_b(data_out_b));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_pairs(input string what);
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        src_a_sel = reg_sel_t'(i);
        src_b_sel = reg_sel_t'(j);
        #1;
        checks += 2;
        if (data_out_a !== model[i]) begin
          failures++;
          $display("FAIL %s: A R%0d=%h expected %h", what, i, data_out_a, model[i]);
        end
        if (data_out_b !== model[j]) begin
          failures++;
          $display("FAIL %s: B R%0d=%h expected %h", what, j, data_out_b, model[j]);
        end
      end
  endtask

  initial begin
    for (int k = 0; k < 4; k++) model[k] = 4'h0;
    #1 rst_n = 1'b0;  // asynchronous reset, before the first clock edge
    #1 read_pairs("reset");
    @(negedge clk) rst_n = 1'b1;
    for (int it = 0; it < 300; it++) begin
      @(negedge clk);
      le        = (it < 8) || (($urandom % 4) != 0);
      dst_sel   = reg_sel_t'(it < 8 ? it : $urandom);
      data_in   = 4'($urandom);
      src_a_sel = dst_sel;
      src_b_sel = dst_sel;
      #1;
      checks++;
      if (data_out_a !== model[dst_sel] || data_out_b !== model[dst_sel]) begin
        failures++;
        $display("FAIL pre-edge R%0d changed early", dst_sel);
      end
      @(posedge clk);
      #1;
      if (le) model[dst_sel] = data_in;
      @(negedge clk) le = 1'b0;
      read_pairs("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
