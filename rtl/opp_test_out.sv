// opp_test_out: enable for the test output pins.
//
// When TEST_EN is low every test output pin is inactive and low; when it is
// high the internal test signals appear on the pins. The rule is the pin
// description's; the width and the signals routed here (the SE parity
// error flags, in the top level) are this design's choice, the test outputs
// being left to be defined.
module opp_test_out #(
  parameter int unsigned W = 4
) (
  input  logic         test_en,
  input  logic [W-1:0] test_in,
  output logic [W-1:0] test_out
);

  always_comb test_out = test_en ? test_in : '0;

endmodule
