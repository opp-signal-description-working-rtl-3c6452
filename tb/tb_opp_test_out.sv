// tb_opp_test_out: self-checking test of the test output enable.
// With TEST_EN low every output must be low; with it high the internal
// signals must appear unchanged. Random values, both settings.
module tb_opp_test_out;
  logic test_en;
  logic [3:0] test_in, test_out;
  int checks = 0, failures = 0;

  opp_test_out #(.W(4)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      test_en = 1'(i % 2);
      test_in = 4'($urandom);
      #1;
      checks++;
      if (test_out !== (test_en ? test_in : 4'h0)) begin
        failures++;
        $display("FAIL en=%b in=%h out=%h", test_en, test_in, test_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
