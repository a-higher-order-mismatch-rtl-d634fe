// Smallest element selector of the third-order encoder: f[n] = -min{t_i[n]}.
//
// The first integrator of every third-order filter accumulates -a1*x_i, whose
// common part grows without bound because the elements are on half of the
// time on average. Feeding back the negated smallest first-integrator output
// as a common input to all filters pins the smallest of them at about zero.
// Adding the same value to every filter does not change which elements the
// vector quantizer picks, only the size of the numbers.
// The function f[n] = -min{t_i[n]} is the method's; the implementation, a
// combinational linear scan of N_EL-1 signed comparisons and one negation,
// is this design's.
module min_selector
  import vfms_pkg::*;
#(
  parameter int N_EL = 7
) (
  input  state_t t [N_EL],   // first-integrator outputs t_i[n]
  output state_t f           // common filter input f[n]
);

  state_t m;

  always_comb begin
    m = t[0];
    for (int i = 1; i < N_EL; i++)
      if (t[i] < m) m = t[i];
    f = -m;
  end

endmodule
