// ecg_detector: wavelet-based QRS detector for a cardiac pacemaker.
//
// Digitised ECG samples enter a four-scale decimating wavelet filter bank.
// The finest scale WF1 goes to the zero-crossing noise detector, whose flag
// ND picks which scales the QRS detector multiplies: WF2 x WF2 on a clean
// signal, WF3 x WF4 on a noisy one. The product is compared with the
// threshold Vth and a detection is held for HOLD samples. The block
// structure and connections follow the design's block diagram.
//
// Interface: sample_i is a signed 8-bit sample, strobed by sample_valid_i
// (at most one per clock, any spacing). vth_i, noise_level_i and
// reset_interval_i are static configuration. qrs_o is the detector output;
// nd_o, mp_o and the WF outputs are brought out for observation.
// Timing: the QRS path is registered once per sample (see qrs_detector); the
// wavelet scales lag the input by their filter and decimation delays.
module ecg_detector
  import ecg_pkg::*;
#(
  parameter int unsigned HOLD = HOLD_SAMPLES
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  sample_t               sample_i,
  input  logic                  sample_valid_i,
  input  mp_t                   vth_i,
  input  logic [ZC_CNT_W-1:0]   noise_level_i,
  input  logic [INTERVAL_W-1:0] reset_interval_i,
  output logic                  qrs_o,
  output logic                  nd_o,
  output mp_t                   mp_o,
  output sample_t               wf1_o,
  output sample_t               wf2_o,
  output sample_t               wf3_o,
  output sample_t               wf4_o,
  output logic [LEVELS-1:0]     wf_valid_o,
  output logic [ZC_CNT_W-1:0]   zc_count_o,
  output logic                  hold_active_o
);

  wavelet_decomposer u_wavelet (
    .clk            (clk),
    .rst_n          (rst_n),
    .sample_i       (sample_i),
    .sample_valid_i (sample_valid_i),
    .wf1_o          (wf1_o),
    .wf2_o          (wf2_o),
    .wf3_o          (wf3_o),
    .wf4_o          (wf4_o),
    .wf_valid_o     (wf_valid_o)
  );

  noise_detector u_noise (
    .clk              (clk),
    .rst_n            (rst_n),
    .wf1_i            (wf1_o),
    .wf1_valid_i      (wf_valid_o[0]),
    .sample_valid_i   (sample_valid_i),
    .reset_interval_i (reset_interval_i),
    .noise_level_i    (noise_level_i),
    .nd_o             (nd_o),
    .zc_count_o       (zc_count_o)
  );

  qrs_detector #(
    .HOLD (HOLD)
  ) u_qrs (
    .clk            (clk),
    .rst_n          (rst_n),
    .sample_valid_i (sample_valid_i),
    .nd_i           (nd_o),
    .wf2_i          (wf2_o),
    .wf3_i          (wf3_o),
    .wf4_i          (wf4_o),
    .vth_i          (vth_i),
    .mp_o           (mp_o),
    .qrs_o          (qrs_o),
    .hold_active_o  (hold_active_o)
  );

endmodule
