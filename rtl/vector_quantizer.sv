// Vector quantizer of the mismatch-shaping encoder: turns on the x[n]
// elements whose filter outputs w_i[n] are largest and turns the rest off, so
// the selection bits always add up to x[n].
//
// How it works: every element counts how many other elements beat it, where
// j beats i if w_j > w_i, or w_j == w_i and j < i (ties go to the lower
// index; this tie rule is this design's choice). Element i is selected when
// its count, its rank, is below x[n]. All ranks are distinct, so exactly
// min(x, N_EL) elements are selected. Purely combinational: N_EL*(N_EL-1)/2
// signed comparators and one small population count per element.
module vector_quantizer
  import vfms_pkg::*;
#(
  parameter int N_EL = 7,
  localparam int XW = $clog2(N_EL + 1)
) (
  input  logic [XW-1:0] x,          // number of elements to turn on
  input  state_t        w [N_EL],   // filter outputs
  output logic [N_EL-1:0] sel       // selection vector x_i[n]
);

  logic [XW-1:0] rank [N_EL];

  always_comb begin
    for (int i = 0; i < N_EL; i++) begin
      rank[i] = '0;
      for (int j = 0; j < N_EL; j++) begin
        if (j != i && ((w[j] > w[i]) || (w[j] == w[i] && j < i)))
          rank[i] = rank[i] + 1'b1;
      end
      sel[i] = (rank[i] < x);
    end
  end

endmodule
