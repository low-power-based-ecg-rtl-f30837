// noise_detector: zero-crossing noise detector on the finest wavelet scale.
//
// The sign bit of each new WF1 value is XORed with the sign bit of the
// previous WF1 value (held in a one-sample register); a 1 marks a zero
// crossing and increments an 8-bit crossing counter. A 32-bit reset counter
// counts input samples and, after reset_interval_i samples, closes the
// interval: it clears the crossing counter and updates ND. ND is 1 when the
// crossings of the closing interval exceed noise_level_i. This structure
// (XOR of current and previous sign, crossing counter, reset counter with a
// reset-interval input, noise-level input) follows the design; holding ND
// for the whole next interval, counting the interval in input samples and
// saturating the crossing counter are this implementation's choices.
//
// Interface: wf1_valid_i strobes a new WF1 value; sample_valid_i strobes each
// input sample (the interval time base). reset_interval_i = 0 is treated as 1.
// Timing: nd_o and zc_count_o are registers; nd_o changes one cycle after the
// sample strobe that ends an interval. A crossing strobed in the same cycle
// as the interval end is counted in the closing interval.
module noise_detector
  import ecg_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  sample_t               wf1_i,
  input  logic                  wf1_valid_i,
  input  logic                  sample_valid_i,
  input  logic [INTERVAL_W-1:0] reset_interval_i,
  input  logic [ZC_CNT_W-1:0]   noise_level_i,
  output logic                  nd_o,
  output logic [ZC_CNT_W-1:0]   zc_count_o
);

  logic                  prev_sign;      // Z^-1 of the WF1 sign bit
  logic                  crossing;
  logic [INTERVAL_W-1:0] interval_cnt;
  logic                  interval_end;
  logic [ZC_CNT_W-1:0]   zc_next;

  assign crossing     = wf1_valid_i && (wf1_i[SAMPLE_W-1] ^ prev_sign);
  assign interval_end = sample_valid_i &&
                        ((interval_cnt + 1'b1) >= reset_interval_i);

  always_comb begin
    zc_next = zc_count_o;
    if (crossing && (zc_count_o != '1)) zc_next = zc_count_o + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_sign    <= 1'b0;
      interval_cnt <= '0;
      zc_count_o   <= '0;
      nd_o         <= 1'b0;
    end else begin
      if (wf1_valid_i) prev_sign <= wf1_i[SAMPLE_W-1];
      if (interval_end) begin
        interval_cnt <= '0;
        zc_count_o   <= '0;
        nd_o         <= (zc_next > noise_level_i);
      end else begin
        if (sample_valid_i) interval_cnt <= interval_cnt + 1'b1;
        zc_count_o <= zc_next;
      end
    end
  end

endmodule
