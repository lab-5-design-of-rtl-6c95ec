// decoder2to4_tb: exhaustive check of the 2-to-4 decoder.
// All eight (en, sel) combinations are applied; the expected output is
// worked out as "bit sel set when enabled, all zero otherwise".
module decoder2to4_tb;
  logic [1:0] sel;
  logic       en;
  logic [3:0] y;
  int checks = 0, failures = 0;

  decoder2to4 dut (.sel(sel), .en(en), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] exp_y;
    for (int e = 0; e < 2; e++) begin
      for (int s = 0; s < 4; s++) begin
        en  = e[0];
        sel = s[1:0];
        #1;
        exp_y = 4'b0000;
        if (e == 1) exp_y[s] = 1'b1;
        checks++;
        if (y !== exp_y) begin
          failures++;
          $display("FAIL en=%0d sel=%0d y=%b expected %b", e, s, y, exp_y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
