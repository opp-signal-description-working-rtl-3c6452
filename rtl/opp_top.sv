// opp_top: core-clock side of the Output Port Processor (OPP) of a gigabit
// ATM switch.
//
// The OPP sits between the output of the switch core and an ATM link port.
// This top holds the parts of it that are clocked by the core clock CLK:
//   - opp_cell_timing follows CELL_CLK (one CLK in sixteen) and gives the
//     position of each CLK edge in the 16-word cell time, the word number of
//     the SE data for the C_CLK_TAP setting, and the sampling strobe.
//   - opp_ctrl_sampler samples RESET, CLR_ERR and TIME_SYNC once per cell
//     time at that strobe; the held reset resets the rest and drives RESET_OPP.
//   - opp_se_rx registers the four 8-bit SE slices, checks their odd parity
//     and marks word 0 of each cell; the words leave on `rx_word`.
//   - opp_err_flags holds one sticky parity error flag per slice, cleared by
//     reset or CLR_ERR; opp_test_out puts them on TEST_IPP when TEST_EN is high.
//   - opp_timestamp keeps the 32-bit time stamp and reloads it from the
//     TIME_SYNC serial stream (ts_loaded pulses on each reload).
//   - opp_ipp_tx sends the recycle cell stream to the IPP on D_OPP with
//     SOC_OPP, PARI_OPP and CLK_OPP.
// The cell store and queueing between the received stream and the outputs,
// and the link interface, are outside this top: the received words leave on
// `rx_word`, and the word for the IPP comes in on `rc_data` for word number
// `tx_word` (combinational request, loaded at the same CLK edge).
//
// Timing: received words appear on rx_word one CLK after the pins. Word 0 of
// the IPP cell is on D_OPP in the CLK period after the edge that sees
// CELL_CLK high. RESET, CLR_ERR and TIME_SYNC take effect one CLK after their
// sampling edge, two edges before the CELL_CLK edge.
module opp_top
  import opp_pkg::*;
#(
  parameter int unsigned TS_BITS = TS_W
) (
  input  logic                              clk,
  input  logic                              cell_clk,
  input  logic                              reset_n,
  input  logic                              clr_err,
  input  logic [3:0]                        c_clk_tap,
  input  logic                              time_sync,
  input  logic                              test_en,
  input  logic [SE_SLICES-1:0][SLICE_W-1:0] d_se,
  input  logic [SE_SLICES-1:0]              ctrl_se,
  input  logic [SE_SLICES-1:0]              pari_se,
  input  logic [WORD_W-1:0]                 rc_data,
  output word_idx_t                         tx_word,
  output rx_word_t                          rx_word,
  output logic                              core_rst,
  output logic [TS_BITS-1:0]                time_stamp,
  output logic                              ts_loaded,
  output logic [SE_SLICES-1:0]              err_flags,
  output logic [WORD_W-1:0]                 d_opp,
  output logic                              soc_opp,
  output logic                              pari_opp,
  output logic                              clk_opp,
  output logic                              reset_opp,
  output logic [SE_SLICES-1:0]              test_ipp
);

  word_idx_t phase, rx_num;
  logic      sample, rst, clr, ts_bit, ts_valid;

  opp_cell_timing u_timing (
    .clk, .cell_clk, .cc_tap(c_clk_tap),
    .phase, .rx_word(rx_num), .sample
  );

  opp_ctrl_sampler u_sampler (
    .clk, .sample, .reset_n, .clr_err, .time_sync,
    .rst, .clr, .ts_bit, .ts_valid, .reset_opp
  );

  opp_se_rx u_rx (
    .clk, .d_se, .ctrl_se, .pari_se, .word_num(rx_num), .rx(rx_word)
  );

  opp_err_flags #(.N(SE_SLICES)) u_flags (
    .clk, .rst, .clr, .err(rx_word.perr), .flags(err_flags)
  );

  opp_test_out #(.W(SE_SLICES)) u_test (
    .test_en, .test_in(err_flags), .test_out(test_ipp)
  );

  opp_timestamp #(.TS_W(TS_BITS)) u_ts (
    .clk, .rst, .ts_bit, .ts_valid, .time_stamp, .loaded(ts_loaded)
  );

  opp_ipp_tx u_ipp (
    .clk, .rst, .phase, .rc_data, .d_opp, .soc_opp, .pari_opp, .clk_opp
  );

  assign tx_word  = phase;
  assign core_rst = rst;

endmodule
