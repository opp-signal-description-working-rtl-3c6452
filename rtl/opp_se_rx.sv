// opp_se_rx: input register and parity check for the four SE slices.
//
// Each CLK the OPP receives one 32-bit word as four 8-bit slices, D0_SE..D3_SE,
// with one control bit (CTRLx_SE) and one odd parity bit (PARIx_SE) per slice.
// This block registers all of it together with the word number of the data
// at that edge (from opp_cell_timing), so the word, its position in the cell
// and its start-of-cell mark appear at `rx` one CLK after the pins.
//
// Parity: for each slice the nine bits D<7..0>, CTRL and the parity bit must
// hold an odd number of ones; `rx.perr[s]` is set for a slice that fails.
// The pin text speaks of a twelve-bit parity field, while each slice delivers
// eight data bits and one control bit; the check covers those nine bits.
// Slice s is placed on word bits 8s+7..8s and CTRL bit s; that mapping, and
// the single register stage, are this design's choices. The analog deskew
// circuits in front of the register are not part of this block.
module opp_se_rx
  import opp_pkg::*;
(
  input  logic                             clk,
  input  logic [SE_SLICES-1:0][SLICE_W-1:0] d_se,
  input  logic [SE_SLICES-1:0]             ctrl_se,
  input  logic [SE_SLICES-1:0]             pari_se,
  input  word_idx_t                        word_num,
  output rx_word_t                         rx
);

  logic [SE_SLICES-1:0][SLICE_W-1:0] d_q;
  logic [SE_SLICES-1:0]              ctrl_q, pari_q;
  word_idx_t                         word_q;

  always_ff @(posedge clk) begin
    d_q    <= d_se;
    ctrl_q <= ctrl_se;
    pari_q <= pari_se;
    word_q <= word_num;
  end

  always_comb begin
    rx.data = d_q;
    rx.ctrl = ctrl_q;
    rx.word = word_q;
    rx.soc  = (word_q == '0);
    for (int s = 0; s < SE_SLICES; s++)
      rx.perr[s] = ~(^{d_q[s], ctrl_q[s], pari_q[s]});
  end

endmodule
