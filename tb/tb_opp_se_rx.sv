// tb_opp_se_rx: self-checking test of the SE input register and parity check.
//
// Random slice data and control are driven each CLK with correct odd parity,
// except that now and then one slice's parity bit is flipped. One CLK later
// the assembled 32-bit word, the control bits, the word number, the start of
// cell mark and exactly the flipped slices' parity errors must appear.
module tb_opp_se_rx;
  import opp_pkg::*;
  logic clk = 0;
  logic [SE_SLICES-1:0][SLICE_W-1:0] d_se;
  logic [SE_SLICES-1:0] ctrl_se, pari_se;
  word_idx_t word_num;
  rx_word_t rx;
  int checks = 0, failures = 0, errs_seen = 0;

  opp_se_rx dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
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

  logic [31:0] e_data; logic [3:0] e_ctrl, e_flip; word_idx_t e_word;
  int ones;
  initial begin
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      e_data   = $urandom;
      e_ctrl   = 4'($urandom);
      e_flip   = ($urandom_range(0, 3) == 0) ? 4'($urandom) : 4'h0;
      e_word   = word_idx_t'(c % 16);
      word_num = e_word;
      for (int s = 0; s < 4; s++) begin
        d_se[s] = e_data[8*s +: 8];
        ctrl_se[s] = e_ctrl[s];
        // count ones by hand: parity bit makes the total odd
        ones = e_ctrl[s];
        for (int b = 0; b < 8; b++) ones += e_data[8*s + b];
        pari_se[s] = (ones % 2 == 0) ^ e_flip[s];
      end
      @(posedge clk); #1;
      check("data", rx.data, e_data);
      check("ctrl", rx.ctrl, e_ctrl);
      check("word", rx.word, e_word);
      check("soc",  rx.soc, e_word == 0);
      check("perr", rx.perr, e_flip);
      if (e_flip != 0) errs_seen++;
    end
    checks++;
    if (errs_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
