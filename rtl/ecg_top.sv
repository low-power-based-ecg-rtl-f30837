// ecg_top: pacemaker sensing chain, SAR ADC control plus ECG detector.
//
// The SAR logic runs the successive approximation against an external
// sample-and-hold, DAC and comparator (analog parts, reached through the
// adc_* ports). Each finished 8-bit code is converted from offset binary
// (0..255, mid-scale 128 = 0 V differential) to two's complement by inverting
// its MSB and handed to the ECG detector as one sample. The pairing of the
// SAR ADC with the detector follows the design; the offset-binary mapping is
// this implementation's choice.
//
// Interface: adc_start_i requests a conversion (the sampling-rate timer is
// outside); adc_sample_o, adc_dac_o and adc_comp_i connect the analog parts.
// adc_data_o / adc_eoc_o show each raw code. qrs_o is the detection output
// that the pacing logic uses; nd_o and mp_o are for observation.
// Timing: a conversion takes one sampling cycle and N bit cycles; the code
// reaches the detector in the cycle of adc_eoc_o.
module ecg_top
  import ecg_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // SAR ADC
  input  logic                  adc_start_i,
  input  logic                  adc_comp_i,
  output logic                  adc_sample_o,
  output logic [SAMPLE_W-1:0]   adc_dac_o,
  output logic [SAMPLE_W-1:0]   adc_data_o,
  output logic                  adc_eoc_o,
  output logic                  adc_busy_o,
  // detector configuration
  input  mp_t                   vth_i,
  input  logic [ZC_CNT_W-1:0]   noise_level_i,
  input  logic [INTERVAL_W-1:0] reset_interval_i,
  // detector outputs
  output logic                  qrs_o,
  output logic                  nd_o,
  output mp_t                   mp_o
);

  sample_t                 sample;
  sample_t                 wf1, wf2, wf3, wf4;
  logic [LEVELS-1:0]       wf_valid;
  logic [ZC_CNT_W-1:0]     zc_count;
  logic                    hold_active;

  sar_logic #(
    .N (SAMPLE_W)
  ) u_sar (
    .clk      (clk),
    .rst_n    (rst_n),
    .start_i  (adc_start_i),
    .comp_i   (adc_comp_i),
    .sample_o (adc_sample_o),
    .dac_o    (adc_dac_o),
    .data_o   (adc_data_o),
    .eoc_o    (adc_eoc_o),
    .busy_o   (adc_busy_o)
  );

  assign sample = sample_t'({~adc_data_o[SAMPLE_W-1], adc_data_o[SAMPLE_W-2:0]});

  ecg_detector u_det (
    .clk              (clk),
    .rst_n            (rst_n),
    .sample_i         (sample),
    .sample_valid_i   (adc_eoc_o),
    .vth_i            (vth_i),
    .noise_level_i    (noise_level_i),
    .reset_interval_i (reset_interval_i),
    .qrs_o            (qrs_o),
    .nd_o             (nd_o),
    .mp_o             (mp_o),
    .wf1_o            (wf1),
    .wf2_o            (wf2),
    .wf3_o            (wf3),
    .wf4_o            (wf4),
    .wf_valid_o       (wf_valid),
    .zc_count_o       (zc_count),
    .hold_active_o    (hold_active)
  );

endmodule
