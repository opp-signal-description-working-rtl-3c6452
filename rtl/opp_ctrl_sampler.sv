// opp_ctrl_sampler: once-per-cell sampling of RESET, CLR_ERR and TIME_SYNC.
//
// The three global inputs have a setup and hold requirement only at one CLK
// edge per cell time, two edges before the edge that sees CELL_CLK high
// (`sample`, from opp_cell_timing). They are captured at that edge and held
// for the rest of the cell time:
//   rst       - internal reset, active high (RESET pin is asserted low).
//   clr       - internal error clear (CLR_ERR taken as asserted high).
//   ts_bit    - the TIME_SYNC bit of this cell time, with ts_valid high for
//               the one CLK after the sampling edge.
//   reset_opp - RESET_OPP pin, the held reset, asserted low, for the link side
//               (it changes on CLK only, not on the link clock).
// The sampling point is the pin description's; the polarities of CLR_ERR
// and RESET_OPP are this design's choice. The held values are arbitrary until
// the first strobe after power-up; RESET is held for 160 CLK (ten strobes).
module opp_ctrl_sampler (
  input  logic clk,
  input  logic sample,
  input  logic reset_n,
  input  logic clr_err,
  input  logic time_sync,
  output logic rst,
  output logic clr,
  output logic ts_bit,
  output logic ts_valid,
  output logic reset_opp
);

  logic rst_n_q;

  always_ff @(posedge clk) begin
    ts_valid <= sample;
    if (sample) begin
      rst_n_q <= reset_n;
      clr     <= clr_err;
      ts_bit  <= time_sync;
    end
  end

  // The strobe marks one edge per cell time, never two in a row.
  a_single_strobe: assert property (@(posedge clk) sample |=> !sample)
    else $error("sample strobe longer than one CLK");

  assign rst       = ~rst_n_q;
  assign reset_opp = rst_n_q;

endmodule
