// sar_analog_model: behavioural model of the analog half of the SAR ADC for
// simulation only: a sample-and-hold, an ideal N-bit DAC and an ideal
// comparator. Voltages are reals in volts.
//   S/H        : takes vin_i on the rising clock edge while sample_i is high
//                and holds it.
//   DAC        : vdac = vref_i * code / 2^N.
//   comparator : comp_o = 1 when the held input is above vdac.
module sar_analog_model #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  real          vin_i,
  input  real          vref_i,
  input  logic         sample_i,
  input  logic [N-1:0] dac_i,
  output logic         comp_o
);

  real vhold = 0.0;
  real vdac;

  always @(posedge clk) if (sample_i) vhold <= vin_i;

  always_comb begin
    vdac   = vref_i * real'(dac_i) / real'(2 ** N);
    comp_o = (vhold > vdac);
  end

endmodule
