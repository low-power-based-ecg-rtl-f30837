// soft_threshold: threshold comparator with a detection hold.
//
// The comparator tests Vth < MP1. A 2:1 multiplexer passes the comparator
// result while the hold counter is idle and a constant 1 while it is active;
// its output is the detector output and also arms the counter. Once armed,
// the counter counts input samples and releases the multiplexer after the
// hold, so one QRS complex yields one output pulse of HOLD samples and the
// comparator cannot re-trigger inside that window. This loop (comparator,
// mux with constant 1, counter armed by the output and reset after 200
// samples) follows the design.
//
// Timing, in input samples (sample_valid_i strobes): the output rises
// combinationally as soon as MP1 exceeds Vth; the sample strobe seen with
// the output high arms the counter, which holds the output for the next
// HOLD-1 strobes. The output is therefore high for exactly HOLD strobes from
// the triggering one, then follows the comparator again (a comparator still
// high re-triggers). Counting the triggering sample as the first of the HOLD
// is this implementation's choice.
module soft_threshold
  import ecg_pkg::*;
#(
  parameter int unsigned HOLD = HOLD_SAMPLES
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sample_valid_i,
  input  mp_t  vth_i,
  input  mp_t  mp_i,
  output logic qrs_o,
  output logic hold_active_o
);

  localparam int unsigned CNT_W = (HOLD > 2) ? $clog2(HOLD) : 1;

  logic             above;    // comparator: Vth < MP1
  logic             active;   // hold counter running (mux select)
  logic [CNT_W-1:0] cnt;

  assign above         = vth_i < mp_i;
  assign qrs_o         = active ? 1'b1 : above;
  assign hold_active_o = active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      cnt    <= '0;
    end else if (sample_valid_i) begin
      if (active) begin
        if (cnt >= CNT_W'(HOLD - 1)) begin
          active <= 1'b0;
          cnt    <= '0;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end else if (qrs_o && (HOLD > 1)) begin
        active <= 1'b1;
        cnt    <= CNT_W'(1);
      end
    end
  end

endmodule
