// tb_opp_cell_timing: self-checking test of the cell-time phase tracker.
//
// CELL_CLK is driven high for one CLK in sixteen, starting at a random
// offset, and C_CLK_TAP is stepped through all sixteen values. An independent
// edge counter, restarted at every CELL_CLK edge, gives the expected phase,
// received word number (phase - tap mod 16) and sampling strobe (phase 14).
// The strobe must come exactly once per cell time. One CELL_CLK pulse is also
// moved to check that the tracker realigns.
module tb_opp_cell_timing;
  logic       clk = 0;
  logic       cell_clk = 0;
  logic [3:0] cc_tap = 0;
  logic [3:0] phase, rx_word;
  logic       sample;
  int checks = 0, failures = 0;
  int exp_phase = -1;   // unknown until the first CELL_CLK
  int ncyc = 0, strobes_in_cell = 0;

  opp_cell_timing dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (cycle %0d)", what, got, exp, ncyc);
    end
  endtask

  int offset;
  initial begin
    offset = $urandom_range(3, 15);
    for (int c = 0; c < 16 * 40; c++) begin
      @(negedge clk);
      ncyc = c;
      // CELL_CLK pattern; cell 20 comes 5 clocks late to test realignment
      if (c < 16 * 20 + offset) cell_clk = ((c - offset) % 16 == 0) && c >= offset;
      else                      cell_clk = ((c - offset - 5) % 16 == 0);
      if (c % 32 == 7) cc_tap = cc_tap + 4'd1;
      if (cell_clk) exp_phase = 0;
      #1;
      if (exp_phase >= 0) begin
        check("phase", int'(phase), exp_phase);
        check("rx_word", int'(rx_word), (exp_phase - int'(cc_tap) + 16) % 16);
        check("sample", int'(sample), int'(exp_phase == 14));
      end
      if (cell_clk) begin
        if (c > offset) check("one strobe per cell", strobes_in_cell, 1);
        strobes_in_cell = 0;
      end
      if (exp_phase >= 0 && sample) strobes_in_cell++;
      if (exp_phase >= 0) exp_phase = (exp_phase + 1) % 16;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
