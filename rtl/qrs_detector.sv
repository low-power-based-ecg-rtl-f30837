// qrs_detector: QRS complex detector, hypothesis test then comparator.
//
// The multi-scaled product (multiscale_product) multiplies the wavelet scales
// chosen by the noise flag ND, and the soft-threshold comparator
// (soft_threshold) turns the product into a binary QRS output held for HOLD
// samples per detection. The two-stage structure follows the design.
//
// Timing: MP1 is registered on each input sample strobe; the QRS output
// follows MP1 combinationally and is held by the counter, so a product
// above Vth shows on qrs_o one cycle after the sample strobe that formed it.
module qrs_detector
  import ecg_pkg::*;
#(
  parameter int unsigned HOLD = HOLD_SAMPLES
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    sample_valid_i,
  input  logic    nd_i,
  input  sample_t wf2_i,
  input  sample_t wf3_i,
  input  sample_t wf4_i,
  input  mp_t     vth_i,
  output mp_t     mp_o,
  output logic    qrs_o,
  output logic    hold_active_o
);

  multiscale_product u_msp (
    .clk            (clk),
    .rst_n          (rst_n),
    .sample_valid_i (sample_valid_i),
    .nd_i           (nd_i),
    .wf2_i          (wf2_i),
    .wf3_i          (wf3_i),
    .wf4_i          (wf4_i),
    .mp_o           (mp_o)
  );

  soft_threshold #(
    .HOLD (HOLD)
  ) u_soft (
    .clk            (clk),
    .rst_n          (rst_n),
    .sample_valid_i (sample_valid_i),
    .vth_i          (vth_i),
    .mp_i           (mp_o),
    .qrs_o          (qrs_o),
    .hold_active_o  (hold_active_o)
  );

endmodule
