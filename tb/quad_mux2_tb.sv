// quad_mux2_tb: the quad 2:1 multiplexer with random data on both inputs;
// s = 0 must pass a and s = 1 must pass b.
module quad_mux2_tb;
  logic [3:0] a, b, f;
  logic       s;
  int checks = 0, failures = 0;

  quad_mux2 dut (.a(a), .b(b), .s(s), .f(f));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 200; it++) begin
      a = 4'($urandom);
      b = 4'($urandom);
      s = 1'($urandom);
      #1;
      checks++;
      if (f !== (s ? b : a)) begin
        failures++;
        $display("FAIL s=%0d a=%h b=%h f=%h", s, a, b, f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
