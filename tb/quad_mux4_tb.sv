// quad_mux4_tb: the quad 4:1 multiplexer with random data on all four inputs
// and every select value; the expected output is the input the select names.
module quad_mux4_tb;
  logic [3:0] a, b, c, d, f;
  logic [1:0] sel;
  int checks = 0, failures = 0;

  quad_mux4 dut (.a(a), .b(b), .c(c), .d(d), .sel(sel), .f(f));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] in [4];
    for (int it = 0; it < 100; it++) begin
      for (int k = 0; k < 4; k++) in[k] = 4'($urandom);
      a = in[0]; b = in[1]; c = in[2]; d = in[3];
      for (int s = 0; s < 4; s++) begin
        sel = s[1:0];
        #1;
        checks++;
        if (f !== in[s]) begin
          failures++;
          $display("FAIL sel=%0d f=%h expected %h", s, f, in[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
