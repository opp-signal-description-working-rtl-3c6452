// opp_timestamp: time stamp register/counter with serial resynchronisation.
//
// The time stamp counts cell times. To bring a hot-swapped board into step
// with the rest of the switch, a master sends on TIME_SYNC, one bit per cell
// time, a start bit ("1") followed by the 32-bit current time stamp, most
// significant bit first, with at least 32 zero bits between sequences. The
// sampled bits (ts_bit, with one ts_valid pulse per cell time) are shifted
// into a 33-bit shift register. When its 33rd bit is one, the lower 32 bits
// are loaded into the time stamp on the next CLK and the shift register is
// cleared. A board coming out of reset is in step within 97 cell times.
//
// The shift register, the load rule and the 33-bit width follow the pin
// description. Counting once per cell time (on ts_valid), loading the value
// without a correction for the transfer time, and clearing both registers on
// reset are this design's choices.
module opp_timestamp #(
  parameter int unsigned TS_W = 32
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            ts_bit,
  input  logic            ts_valid,
  output logic [TS_W-1:0] time_stamp,
  output logic            loaded
);

  logic [TS_W:0] sr;

  always_ff @(posedge clk) begin
    loaded <= 1'b0;
    if (rst) begin
      sr         <= '0;
      time_stamp <= '0;
    end else if (sr[TS_W]) begin
      time_stamp <= sr[TS_W-1:0];
      sr         <= '0;
      loaded     <= 1'b1;
    end else if (ts_valid) begin
      sr         <= {sr[TS_W-1:0], ts_bit};
      time_stamp <= time_stamp + 1'b1;
    end
  end

endmodule
