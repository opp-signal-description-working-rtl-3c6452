// opp_ipp_tx: output register of the recycle path from the OPP to the IPP.
//
// One 32-bit word leaves on D_OPP every CLK, with PARI_OPP, odd parity over
// the 32 bits, changing with it. SOC_OPP is high with word 0 of each cell,
// once per cell time. The register loads the word numbered `phase` (from
// opp_cell_timing) from `rc_data` at each CLK edge, so word 0 is on D_OPP
// during the CLK period after the edge that sees CELL_CLK high. CLK_OPP is
// the inverted CLK: its rising edge falls in the middle of each D_OPP word.
// During reset D_OPP is zero, SOC_OPP low and PARI_OPP one.
//
// The 32-bit word, odd parity and the SOC rule follow the pin description;
// the one-period offset from CELL_CLK, the form of CLK_OPP and the reset
// values are this design's choices.
module opp_ipp_tx
  import opp_pkg::*;
#(
  parameter int unsigned WORDS = WORDS_PER_CELL,
  parameter int unsigned IDX_W = $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [IDX_W-1:0]  phase,
  input  logic [WORD_W-1:0] rc_data,
  output logic [WORD_W-1:0] d_opp,
  output logic              soc_opp,
  output logic              pari_opp,
  output logic              clk_opp
);

  always_ff @(posedge clk) begin
    if (rst) begin
      d_opp    <= '0;
      soc_opp  <= 1'b0;
      pari_opp <= 1'b1;
    end else begin
      d_opp    <= rc_data;
      soc_opp  <= (phase == '0);
      pari_opp <= odd_parity32(rc_data);
    end
  end

  assign clk_opp = ~clk;

endmodule
