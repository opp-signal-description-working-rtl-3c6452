// opp_cell_timing: cell-time phase tracking from CELL_CLK.
//
// CELL_CLK is high for one CLK period in every sixteen. A 4-bit counter is
// loaded with 1 at every CLK edge that sees CELL_CLK high and counts up
// otherwise, so `phase` (0 at the edge that sees CELL_CLK high, 1..15 at the
// edges that follow) says where the present edge lies in the cell time.
//
// Outputs, all combinational from the counter and the pins:
//   phase   - position of this edge in the cell time.
//   rx_word - word number of the SE data sampled at this edge. With
//             C_CLK_TAP = 0 word 0 is at the pins on the clock period CELL_CLK
//             is high; each tap step delays it by one CLK period, so
//             rx_word = (phase - cc_tap) mod 16. This follows the pin
//             description.
//   sample  - one edge per cell time, SAMPLE_LEAD (2) edges before the edge
//             that sees CELL_CLK high: the edge at which RESET, CLR_ERR and
//             TIME_SYNC are sampled, whatever C_CLK_TAP is.
//
// The counter has no reset, by design: the chip reset is itself sampled with
// the strobe made here. Every CELL_CLK pulse realigns it, so it is correct from
// the first pulse on. Counting the phase this way is this design's own choice.
module opp_cell_timing
  import opp_pkg::*;
#(
  parameter int unsigned WORDS       = WORDS_PER_CELL,
  parameter int unsigned LEAD        = SAMPLE_LEAD,
  parameter int unsigned IDX_W       = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic             cell_clk,
  input  logic [IDX_W-1:0] cc_tap,
  output logic [IDX_W-1:0] phase,
  output logic [IDX_W-1:0] rx_word,
  output logic             sample
);

  logic [IDX_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (cell_clk) cnt <= IDX_W'(1);
    else          cnt <= IDX_W'((32'(cnt) + 1) % WORDS);
  end

  always_comb begin
    phase   = cell_clk ? '0 : cnt;
    rx_word = IDX_W'((32'(phase) + WORDS - 32'(cc_tap)) % WORDS);
    sample  = (32'(phase) == WORDS - LEAD);
  end

endmodule
