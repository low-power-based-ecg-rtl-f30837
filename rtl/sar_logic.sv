// sar_logic: successive approximation register of an N-bit SAR ADC.
//
// A conversion starts with start_i. The first cycle is the sampling cycle:
// sample_o tells the sample-and-hold to take VIN and the result register is
// cleared. Then one bit is decided per clock, MSB first: the trial code (bits
// decided so far plus a 1 in the bit under test) drives the DAC on dac_o, the
// comparator answers comp_i = 1 when VIN is above the DAC voltage, and the
// bit is kept on 1 and cleared on 0. After N such cycles the code is on
// data_o and eoc_o pulses for one cycle. This procedure (sample and reset,
// MSB set first, keep or clear on the comparator result, N clocks per
// conversion, EOC output) follows the design; the start handshake and the
// separate sampling cycle are this implementation's choices.
//
// Timing: start_i accepted in IDLE at cycle t; sample_o high in cycle t+1;
// bit decisions in cycles t+2 .. t+N+1; eoc_o and the new data_o in cycle
// t+N+2. data_o holds until the next conversion ends. start_i while busy_o
// is ignored. comp_i must be valid in the same cycle as dac_o.
module sar_logic #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start_i,
  input  logic         comp_i,
  output logic         sample_o,
  output logic [N-1:0] dac_o,
  output logic [N-1:0] data_o,
  output logic         eoc_o,
  output logic         busy_o
);

  typedef enum logic [1:0] {
    S_IDLE,
    S_SAMPLE,
    S_CONVERT
  } sar_state_e;

  sar_state_e   state;
  logic [N-1:0] result;   // bits decided so far
  logic [N-1:0] mask;     // one-hot: bit under test

  assign sample_o = (state == S_SAMPLE);
  assign busy_o   = (state != S_IDLE);
  assign dac_o    = (state == S_CONVERT) ? (result | mask) : result;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      result <= '0;
      mask   <= '0;
      data_o <= '0;
      eoc_o  <= 1'b0;
    end else begin
      eoc_o <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start_i) state <= S_SAMPLE;
        end
        S_SAMPLE: begin
          result <= '0;
          mask   <= {1'b1, {(N-1){1'b0}}};
          state  <= S_CONVERT;
        end
        S_CONVERT: begin
          if (comp_i) result <= result | mask;
          mask <= mask >> 1;
          if (mask[0]) begin
            data_o <= comp_i ? (result | mask) : result;
            eoc_o  <= 1'b1;
            state  <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The bit under test is always a single bit while converting.
  a_onehot_mask: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_CONVERT) |-> $onehot(mask));

endmodule
