// opp_err_flags: sticky error flags.
//
// Each flag is set by a one-cycle error event and stays set until the chip
// is reset or CLR_ERR is applied; clearing does not stop anything else in the
// chip. Both clears are the sampled, once-per-cell-time versions from
// opp_ctrl_sampler. A clear wins over an error in the same CLK. The pin
// description requires that every flag CLR_ERR clears is also cleared by
// RESET; which flags exist is this design's choice (one SE parity error flag
// per slice).
module opp_err_flags #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clr,
  input  logic [N-1:0] err,
  output logic [N-1:0] flags
);

  always_ff @(posedge clk) begin
    if (rst || clr) flags <= '0;
    else            flags <= flags | err;
  end

endmodule
