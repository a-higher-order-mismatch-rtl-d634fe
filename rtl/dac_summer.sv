// Behavioural model of the summation block that adds the outputs of the
// unit-element DACs into the DAC output y[n] (in silicon a current summing
// node or a charge-sharing capacitor). Values are integers in units of 2^-16
// of a nominal element; the sum is taken with no delay.
module dac_summer #(
  parameter int N_EL = 7
) (
  input  logic [31:0] yi [N_EL],
  output logic [31:0] y
);

  always_comb begin
    y = '0;
    for (int i = 0; i < N_EL; i++) y = y + yi[i];
  end

endmodule
