// Behavioural model of a one-bit unit-element DAC (in silicon a unit current
// source or a unit switched capacitor). When its control bit d is one it
// delivers its element weight, otherwise nothing. The "analog" output is an
// integer in units of 2^-16 of a nominal element, so the mismatch of a real
// element is expressed by a WEIGHT slightly different from 65536. Output
// follows the input with no delay.
module unit_dac #(
  parameter int unsigned WEIGHT = 65536
) (
  input  logic        d,
  output logic [31:0] y
);

  assign y = d ? 32'(WEIGHT) : 32'd0;

endmodule
