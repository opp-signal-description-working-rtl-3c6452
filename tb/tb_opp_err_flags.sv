// tb_opp_err_flags: self-checking test of the sticky error flags.
//
// Random error events, resets and clears are applied; a reference model
// (flags hold every error until a reset or clear, and a clear wins over an
// error in the same CLK) is compared with the flags after every CLK.
module tb_opp_err_flags;
  logic clk = 0, rst = 1, clr = 0;
  logic [3:0] err = 0, flags, model;
  int checks = 0, failures = 0, clears = 0;

  opp_err_flags #(.N(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 0;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      rst = (c < 2) || ($urandom_range(0, 200) == 0);
      clr = ($urandom_range(0, 40) == 0);
      err = ($urandom_range(0, 10) == 0) ? 4'($urandom) : 4'h0;
      @(posedge clk);
      if (rst || clr) begin model = 0; if (clr) clears++; end
      else model = model | err;
      #1;
      checks++;
      if (flags !== model) begin
        failures++;
        $display("FAIL flags %b expected %b at %0t", flags, model, $time);
      end
    end
    checks++;
    if (clears == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
