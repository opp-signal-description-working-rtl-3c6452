// tb_opp_ipp_tx: self-checking test of the output register to the IPP.
//
// The phase input steps 0..15 as in the chip and rc_data is random. One CLK
// after each edge D_OPP must hold the word given at that edge, PARI_OPP must
// make the 33 bits odd (counted bit by bit here), and SOC_OPP must be high
// exactly for word 0, once per 16 CLK. During reset the outputs are zero
// with PARI_OPP one. CLK_OPP must be the inverted CLK.
module tb_opp_ipp_tx;
  logic clk = 0, rst = 1;
  logic [3:0] phase = 0;
  logic [31:0] rc_data = 0, d_opp;
  logic soc_opp, pari_opp, clk_opp;
  int checks = 0, failures = 0, socs = 0;

  opp_ipp_tx dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  logic [31:0] e_d; logic [3:0] e_ph; logic e_rst; int ones;
  initial begin
    for (int c = 0; c < 16 * 100; c++) begin
      @(negedge clk);
      check("clk_opp low half", clk_opp, 1);
      rst     = (c < 20) || (c >= 800 && c < 830);
      phase   = 4'((c + 3) % 16);
      rc_data = $urandom;
      e_d = rc_data; e_ph = phase; e_rst = rst;
      @(posedge clk); #1;
      check("clk_opp high half", clk_opp, 0);
      if (e_rst) begin
        check("reset d_opp", d_opp, 0);
        check("reset soc", soc_opp, 0);
        check("reset parity", pari_opp, 1);
      end else begin
        check("d_opp", d_opp, e_d);
        check("soc_opp", soc_opp, e_ph == 0);
        ones = pari_opp;
        for (int b = 0; b < 32; b++) ones += d_opp[b];
        check("odd parity", ones % 2, 1);
        if (soc_opp) socs++;
      end
    end
    // c = 13 mod 16 gives word 0: 100 times, 3 of them in reset
    check("soc count", socs, 97);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
