// tb_opp_ctrl_sampler: self-checking test of the once-per-cell sampler.
//
// A strobe is given every sixteenth CLK. RESET, CLR_ERR and TIME_SYNC are
// changed at random every CLK; the outputs must follow only the values present
// at the strobe edge, hold them for the cell time, and ts_valid must pulse for
// exactly the CLK after each strobe. RESET_OPP must mirror the held reset.
module tb_opp_ctrl_sampler;
  logic clk = 0, sample = 0, reset_n = 0, clr_err = 0, time_sync = 0;
  logic rst, clr, ts_bit, ts_valid, reset_opp;
  int checks = 0, failures = 0;
  logic m_rst_n, m_clr, m_ts, m_valid;   // reference model state
  bit   known = 0;

  opp_ctrl_sampler dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    m_valid = 0;
    for (int c = 0; c < 16 * 200; c++) begin
      @(negedge clk);
      sample    = (c % 16 == 14);
      reset_n   = 1'($urandom);
      clr_err   = 1'($urandom);
      time_sync = 1'($urandom);
      @(posedge clk);
      // reference: capture what the DUT sees at this edge
      m_valid = sample;
      if (sample) begin
        m_rst_n = reset_n; m_clr = clr_err; m_ts = time_sync; known = 1;
      end
      #1;
      check("ts_valid", ts_valid, m_valid);
      if (known) begin
        check("rst", rst, ~m_rst_n);
        check("reset_opp", reset_opp, m_rst_n);
        check("clr", clr, m_clr);
        check("ts_bit", ts_bit, m_ts);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
