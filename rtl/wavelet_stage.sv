// wavelet_stage: one level of the decimating wavelet filter bank.
//
// Each accepted input sample x[m] (in_valid) goes through a lowpass and a
// highpass filter; every second filter output is kept (decimation by two).
//   lowpass : lp[m] = (x[m] + 3x[m-1] + 3x[m-2] + x[m-3]) >>> 3   (DC gain 1)
//   highpass: hp[m] = (x[m] - x[m-1]) >>> 1
// These are the quadratic-spline wavelet filters H = [1 3 3 1]/8 and
// G = 2[1 -1], with G scaled by 1/4 so the detail stays within 8 bits. The
// filter bank structure (LPF and HPF per level, each followed by a 2:1
// decimator, the lowpass branch feeding the next level) follows the design;
// the taps, the >>> scaling and keeping the odd-numbered outputs
// (m = 1, 3, 5, ...) are this implementation's choice.
//
// Timing: the filters are combinational on the incoming sample and the tap
// registers. On every second in_valid the outputs lp_o/hp_o are registered
// and out_valid pulses for one cycle in the following cycle. lp_o/hp_o hold
// their value until the next output. Without a lowpass (HAS_LPF = 0, the last
// level) lp_o stays zero and the lowpass sum goes unused.
module wavelet_stage
  import ecg_pkg::*;
#(
  parameter bit HAS_LPF = 1'b1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t x_i,
  input  logic    in_valid_i,
  output sample_t lp_o,
  output sample_t hp_o,
  output logic    out_valid_o
);

  // Sum width: 8-bit samples with weights adding to 8 need 11 bits signed.
  localparam int unsigned ACC_W = SAMPLE_W + 3;
  typedef logic signed [ACC_W-1:0] acc_t;

  sample_t x1, x2, x3;   // x[m-1], x[m-2], x[m-3]
  logic    phase;        // 0: even-numbered input, 1: odd-numbered (kept)
  acc_t    lp_sum, hp_sum;
  acc_t    pair12;

  always_comb begin
    pair12 = acc_t'(x1) + acc_t'(x2);
    lp_sum = acc_t'(x_i) + acc_t'(x3) + pair12 + (pair12 <<< 1);
    hp_sum = acc_t'(x_i) - acc_t'(x1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1          <= '0;
      x2          <= '0;
      x3          <= '0;
      phase       <= 1'b0;
      lp_o        <= '0;
      hp_o        <= '0;
      out_valid_o <= 1'b0;
    end else begin
      out_valid_o <= 1'b0;
      if (in_valid_i) begin
        x1    <= x_i;
        phase <= ~phase;
        x2    <= x1;
        x3    <= x2;
        if (phase) begin
          if (HAS_LPF) lp_o <= sample_t'(lp_sum >>> 3);
          hp_o        <= sample_t'(hp_sum >>> 1);
          out_valid_o <= 1'b1;
        end
      end
    end
  end

endmodule
