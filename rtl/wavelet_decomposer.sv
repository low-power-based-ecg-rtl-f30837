// wavelet_decomposer: four-scale decimating wavelet filter bank.
//
// Level 1 filters the input samples; its decimated lowpass output feeds
// level 2, whose lowpass feeds level 3, whose lowpass feeds level 4. The
// decimated highpass output of level k is the wavelet detail WF<k>. Level 4
// has only a highpass filter. This follows the filter-bank diagram of the
// design, where the levels run from clk, clk/2, clk/4 and clk/8. Here all
// levels run from one clock and a level works only on the cycles its input
// is valid, which gives the same rates without derived clocks.
//
// Rates: WF1 updates once every 2 input samples, WF2 every 4, WF3 every 8,
// WF4 every 16. wf_valid_o[k-1] pulses for one cycle when WF<k> changes;
// the WF outputs hold their value in between. Each level adds one cycle of
// latency to its strobe (WF1 strobe 1 cycle after the input strobe, WF4 four
// cycles after). Filters: see wavelet_stage.
module wavelet_decomposer
  import ecg_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  sample_t             sample_i,
  input  logic                sample_valid_i,
  output sample_t             wf1_o,
  output sample_t             wf2_o,
  output sample_t             wf3_o,
  output sample_t             wf4_o,
  output logic [LEVELS-1:0]   wf_valid_o
);

  sample_t lp [LEVELS];
  sample_t hp [LEVELS];
  logic    lp_valid [LEVELS];

  for (genvar k = 0; k < LEVELS; k++) begin : g_level
    wavelet_stage #(
      .HAS_LPF (k < LEVELS-1)
    ) u_stage (
      .clk         (clk),
      .rst_n       (rst_n),
      .x_i         ((k == 0) ? sample_i       : lp[(k == 0) ? 0 : k-1]),
      .in_valid_i  ((k == 0) ? sample_valid_i : lp_valid[(k == 0) ? 0 : k-1]),
      .lp_o        (lp[k]),
      .hp_o        (hp[k]),
      .out_valid_o (lp_valid[k])
    );
    assign wf_valid_o[k] = lp_valid[k];
  end

  assign wf1_o = hp[0];
  assign wf2_o = hp[1];
  assign wf3_o = hp[2];
  assign wf4_o = hp[3];

endmodule
