// tb_opp_top: end-to-end test of the OPP core-clock side at its default sizes.
//
// The testbench plays the switch around the chip: it drives CLK and a
// CELL_CLK pulse every sixteenth CLK, sends cells from the four SE slices
// with the word alignment set by C_CLK_TAP, supplies the recycle words the
// chip asks for, and drives RESET, CLR_ERR, TIME_SYNC and TEST_EN.
// Checked every CLK against values the testbench works out itself:
//   - the received word, its control bits, its word number and start of
//     cell mark, one CLK after the pins, for C_CLK_TAP = 0, 1, 5 and 15;
//   - per-slice parity errors where the testbench corrupted a parity bit;
//   - D_OPP, SOC_OPP (word 0 only) and odd PARI_OPP to the IPP;
//   - the internal reset and RESET_OPP, changing only at the sampling edge.
// Checked per operation: a parity error sets its sticky flag, the flag shows
// on TEST_IPP only with TEST_EN high, CLR_ERR clears it without a reset, a
// TIME_SYNC sequence loads the time stamp, which then counts cell times.
// Each mechanism is counted and one that never happened counts as a failure.
module tb_opp_top;
  import opp_pkg::*;

  logic clk = 0, cell_clk = 0, reset_n = 0, clr_err = 0, time_sync = 0;
  logic test_en = 0;
  logic [3:0] c_clk_tap = 0;
  logic [SE_SLICES-1:0][SLICE_W-1:0] d_se = '0;
  logic [SE_SLICES-1:0] ctrl_se = '0, pari_se = '0;
  logic [WORD_W-1:0] rc_data;
  word_idx_t tx_word;
  rx_word_t rx_word;
  logic core_rst, ts_loaded, soc_opp, pari_opp, clk_opp, reset_opp;
  logic [TS_W-1:0] time_stamp;
  logic [3:0] err_flags, test_ipp;
  logic [31:0] d_opp;

  opp_top dut (.*);

  always #4 clk = ~clk;   // 125 MHz-class period; the chip runs up to 120 MHz

  int checks = 0, failures = 0;
  // mechanism counters
  int n_rst_release = 0, n_tap[int], n_perr = 0, n_clr = 0, n_ts_load = 0;
  int n_test_gated = 0, n_test_shown = 0, n_soc_opp = 0, n_rx_soc = 0;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  // ---------------------------------------------------------------- drive
  int          cyc = -1;          // CLK count; CELL_CLK high when cyc%16 == 0
  logic [3:0]  inject = 0;        // parity bits to corrupt on the next word
  logic [31:0] e_data;            // what was driven for the coming edge
  logic [3:0]  e_ctrl, e_perr;
  int          e_word, e_phase, cell_id = 0;
  bit          e_valid = 0;

  function automatic logic [31:0] recycle_word(int ph, int cyc_now);
    return {8'hA5, 8'(cyc_now / 16), 12'h000, 4'(ph)};
  endfunction

  assign rc_data = recycle_word(int'(tx_word), cyc);

  always @(negedge clk) begin
    cyc++;
    cell_clk = (cyc % 16 == 0);
    e_phase  = cyc % 16;
    e_word   = (e_phase - int'(c_clk_tap) + 16) % 16;
    if (e_word == 0) cell_id++;
    e_data = {8'(cell_id), 8'(e_word), 16'($urandom)};
    e_ctrl = 4'($urandom);
    e_perr = inject;
    inject = 0;
    for (int s = 0; s < 4; s++) begin
      d_se[s]    = e_data[8*s +: 8];
      ctrl_se[s] = e_ctrl[s];
      pari_se[s] = ~(^{e_data[8*s +: 8], e_ctrl[s]}) ^ e_perr[s];
    end
    e_valid = 1;
    #1;
    if (cyc >= 16) check("tx_word", tx_word, e_phase);
  end

  // ---------------------------------------------------------------- check
  logic        m_rst_known = 0, m_rst = 0;
  logic [31:0] exp_d;
  int          exp_ph;
  logic        m_rst_old = 0;   // reset seen by the registers at this edge
  logic        m_known_old = 0;
  always @(posedge clk) begin
    m_rst_old   = m_rst;
    m_known_old = m_rst_known;
    if (e_valid && cyc >= 16 && e_phase == 14) begin
      if (m_rst_known && m_rst && reset_n) n_rst_release++;
      m_rst = ~reset_n; m_rst_known = 1;
    end
    exp_d  = recycle_word(e_phase, cyc);
    exp_ph = e_phase;
    #1;
    if (e_valid && cyc >= 16) begin
      check("rx data", rx_word.data, e_data);
      check("rx ctrl", rx_word.ctrl, e_ctrl);
      check("rx word", rx_word.word, e_word);
      check("rx soc",  rx_word.soc, e_word == 0);
      check("rx perr", rx_word.perr, e_perr);
      if (rx_word.soc) begin
        n_rx_soc++;
        n_tap[int'(c_clk_tap)] = 1;
      end
      if (e_perr != 0) n_perr++;
    end
    if (m_rst_known) begin
      check("core_rst", core_rst, m_rst);
      check("reset_opp", reset_opp, !m_rst);
      if (!m_known_old) begin
        // first sampling edge: register state before it is arbitrary
      end else if (m_rst_old) begin
        check("d_opp in reset", d_opp, 0);
        check("soc_opp in reset", soc_opp, 0);
      end else begin
        check("d_opp", d_opp, exp_d);
        check("soc_opp", soc_opp, exp_ph == 0);
        check("pari_opp odd", $countones({d_opp, pari_opp}) % 2, 1);
        if (soc_opp) n_soc_opp++;
      end
    end
  end

  // ---------------------------------------------------------------- steps
  task automatic wait_cells(int n);
    repeat (16 * n) @(negedge clk);
  endtask

  // wait for the start of a cell time (just after the CELL_CLK edge)
  task automatic to_cell_start();
    do @(posedge clk); while (!cell_clk);
    @(negedge clk);
  endtask

  task automatic send_sync(logic [31:0] v);
    time_sync = 1;
    to_cell_start();
    for (int i = 31; i >= 0; i--) begin
      time_sync = v[i];
      to_cell_start();
    end
    time_sync = 0;
  endtask

  logic [31:0] ts_val;
  initial begin
    // reset held for 200 CLK (the chip needs 160)
    reset_n = 0;
    repeat (200) @(negedge clk);
    reset_n = 1;
    wait_cells(2);
    check("out of reset", core_rst, 0);

    // cell alignment for several C_CLK_TAP settings
    c_clk_tap = 1;  wait_cells(4);
    c_clk_tap = 5;  wait_cells(4);
    c_clk_tap = 15; wait_cells(4);
    c_clk_tap = 0;  wait_cells(4);

    // parity error on slice 2: flag set, shown only with TEST_EN
    test_en = 0;
    @(negedge clk); inject = 4'b0100;
    repeat (3) @(negedge clk);
    check("flag set", err_flags, 4'b0100);
    check("test outputs low", test_ipp, 0);
    if (err_flags != 0 && test_ipp == 0) n_test_gated++;
    test_en = 1; #1;
    check("test outputs shown", test_ipp, 4'b0100);
    if (test_ipp == 4'b0100) n_test_shown++;
    @(negedge clk); inject = 4'b1001;
    repeat (3) @(negedge clk);
    check("flags sticky", err_flags, 4'b1101);

    // CLR_ERR for 160 CLK clears the flags, chip keeps running
    clr_err = 1;
    repeat (160) @(negedge clk);
    clr_err = 0;
    check("flags cleared", err_flags, 0);
    check("no reset by CLR_ERR", core_rst, 0);
    if (err_flags == 0) n_clr++;
    wait_cells(2);

    // TIME_SYNC: load a value and watch the time stamp count cell times
    ts_val = 32'hDEAD_0123;
    to_cell_start();
    send_sync(ts_val);
    for (int i = 0; i < 16 && !ts_loaded; i++) @(posedge clk);
    #1;
    check("ts loaded", ts_loaded, 1);
    check("ts value", time_stamp, ts_val);
    if (ts_loaded && time_stamp == ts_val) n_ts_load++;
    wait_cells(5);
    check("ts counts cells", time_stamp, ts_val + 5);

    // second reset and release mid-cell
    @(negedge clk); reset_n = 0;
    repeat (170) @(negedge clk);
    repeat (7) @(negedge clk);
    reset_n = 1;
    wait_cells(3);
    check("time stamp reset", time_stamp <= 3, 1);

    // mechanism coverage
    check("reset released", n_rst_release >= 2, 1);
    check("taps used", n_tap.num(), 4);
    check("parity errors seen", n_perr, 2);
    check("CLR_ERR cleared", n_clr, 1);
    check("time stamp loaded", n_ts_load, 1);
    check("test outputs gated", n_test_gated, 1);
    check("test outputs shown", n_test_shown, 1);
    check("SOC to IPP", n_soc_opp > 20, 1);
    check("SOC from SE", n_rx_soc > 20, 1);
    $display("mechanisms: resets=%0d taps=%0d perr=%0d clr=%0d ts_load=%0d gated=%0d shown=%0d soc_opp=%0d rx_soc=%0d",
             n_rst_release, n_tap.num(), n_perr, n_clr, n_ts_load, n_test_gated,
             n_test_shown, n_soc_opp, n_rx_soc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
