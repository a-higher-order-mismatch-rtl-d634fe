// Digital encoder of a vector-feedback mismatch-shaping DAC.
//
// It receives x[n], the output of the modulator's M-level quantizer
// (0 <= x[n] <= M-1), and decides which of the N_EL = M-1 unit elements to
// turn on. Every element owns an SDM-like IIR filter (a CRFB loop filter with
// no quantizer of its own); the vector quantizer acts as the common quantizer
// of all N_EL loops, selecting the x[n] elements with the largest filter
// outputs. The selection vector is fed back to the filters, so each element's
// usage sequence is the output of a noise-shaping loop and the errors caused
// by element mismatch are pushed out of the signal band with the filters'
// noise transfer function.
//
// ORDER = 3 uses the third-order filter and the smallest element selector,
// which feeds f[n] = -min{t_i[n]} back to all filters as a common input;
// ORDER = 4 uses the fourth-order filter with zero input.
//
// Timing: one sample per clock cycle in which en is high. The filter outputs
// come from registers; the vector quantizer and the filter updates are
// combinational within the cycle. The selection vector is also registered at
// the output (this design's choice), so sel holds the selection for the x
// presented in the previous enabled cycle, with sel_valid high for one cycle.
// Synchronous active-low reset.
module dem_encoder
  import vfms_pkg::*;
#(
  parameter int ORDER = 3,
  parameter int N_EL  = 7,
  localparam int XW = $clog2(N_EL + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic [XW-1:0]   x,          // x[n], number of elements to turn on
  output logic [N_EL-1:0] sel,        // registered selection vector x_i[n]
  output logic            sel_valid
);

  state_t          w [N_EL];
  logic [N_EL-1:0] sel_c;

  vector_quantizer #(.N_EL(N_EL)) u_vq (
    .x   (x),
    .w   (w),
    .sel (sel_c)
  );

  if (ORDER == 3) begin : g_order3
    state_t t [N_EL];
    state_t f;

    min_selector #(.N_EL(N_EL)) u_minsel (
      .t (t),
      .f (f)
    );

    for (genvar i = 0; i < N_EL; i++) begin : g_filt
      crfb3_filter u_filt (
        .clk   (clk),
        .rst_n (rst_n),
        .en    (en),
        .f     (f),
        .x_i   (sel_c[i]),
        .w     (w[i]),
        .t     (t[i])
      );
    end
  end else begin : g_order4
    for (genvar i = 0; i < N_EL; i++) begin : g_filt
      crfb4_filter u_filt (
        .clk   (clk),
        .rst_n (rst_n),
        .en    (en),
        .x_i   (sel_c[i]),
        .w     (w[i])
      );
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sel       <= '0;
      sel_valid <= 1'b0;
    end else begin
      sel_valid <= en;
      if (en) sel <= sel_c;
    end
  end

  // The selection must always realise the code: min(x, N_EL) elements on.
  a_count : assert property (@(posedge clk) disable iff (!rst_n)
    en |-> $countones(sel_c) == ((int'(x) > N_EL) ? N_EL : int'(x)))
    else $error("dem_encoder: selection count differs from the code");

  initial assert (ORDER == 3 || ORDER == 4)
    else $error("dem_encoder: ORDER must be 3 or 4");

endmodule
