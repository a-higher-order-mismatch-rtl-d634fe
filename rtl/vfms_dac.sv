// M-level mismatch-shaping DAC with a higher-order vector-feedback encoder.
//
// The feedback DAC of a multi-bit sigma-delta modulator is built from M-1
// nominally equal unit elements. The digital encoder (dem_encoder) chooses
// which elements realise each code x[n] so that the error caused by their
// mismatch is high-pass shaped with a third- or fourth-order noise transfer
// function; the unit-element DAC models (unit_dac) and the summation block
// (dac_summer) then form the output y[n].
//
// Parameters: ORDER (3 or 4) is the order of mismatch shaping, NBITS the
// resolution of the modulator's quantizer, M = 2**NBITS levels and M-1
// elements. The default, three bits and third order, is the method's main
// example. MISMATCH_PPM sets the spread of the modelled element weights
// (10000 ppm = 1 %, each weight a fixed pseudo-random value in +/- that range).
//
// Timing: x is taken in every cycle with en high; sel and y show the
// corresponding selection and output one clock later, flagged by sel_valid.
// y is the model of the analog output in units of 2^-16 of a nominal element.
module vfms_dac
  import vfms_pkg::*;
#(
  parameter int ORDER        = 3,
  parameter int NBITS        = 3,
  parameter int MISMATCH_PPM = 10000,
  localparam int N_EL = (1 << NBITS) - 1,
  localparam int XW   = $clog2(N_EL + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic [XW-1:0]   x,          // x[n] from the modulator's quantizer
  output logic [N_EL-1:0] sel,        // unit-element controls x_i[n]
  output logic            sel_valid,
  output logic [31:0]     y           // modelled DAC output y[n]
);

  logic [31:0] yi [N_EL];

  dem_encoder #(.ORDER(ORDER), .N_EL(N_EL)) u_enc (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (en),
    .x         (x),
    .sel       (sel),
    .sel_valid (sel_valid)
  );

  for (genvar i = 0; i < N_EL; i++) begin : g_dac
    unit_dac #(.WEIGHT(elem_weight(i, MISMATCH_PPM))) u_dac (
      .d (sel[i]),
      .y (yi[i])
    );
  end

  dac_summer #(.N_EL(N_EL)) u_sum (
    .yi (yi),
    .y  (y)
  );

endmodule
