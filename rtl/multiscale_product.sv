// multiscale_product: hypothesis test of the QRS detector (multi-scaled
// product).
//
// Two 2:1 multiplexers steered by the noise flag ND choose the operands of an
// 8x8 signed multiplier: ND = 0 gives WF2 x WF2, ND = 1 gives WF3 x WF4. The
// coarser scales are used when the finest scale is noisy. This selection
// follows the design. The 16-bit product is then reduced to the unsigned
// 8-bit MP1 that the 8-bit threshold comparator expects: negative products
// become 0 and products above 255 become 255 (this saturation is this
// implementation's choice).
//
// Timing: MP1 is registered on every input sample strobe (sample_valid_i)
// from the current wavelet outputs and ND, so it is valid one cycle after the
// strobe and holds until the next one.
module multiscale_product
  import ecg_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    sample_valid_i,
  input  logic    nd_i,
  input  sample_t wf2_i,
  input  sample_t wf3_i,
  input  sample_t wf4_i,
  output mp_t     mp_o
);

  localparam int unsigned PROD_W = 2 * SAMPLE_W;
  localparam logic signed [PROD_W-1:0] MP_MAX = PROD_W'((1 << MP_W) - 1);

  msp_mode_e                 mode;
  sample_t                   op_a, op_b;
  logic signed [PROD_W-1:0]  product;
  mp_t                       mp_sat;

  always_comb begin
    mode = msp_mode_e'(nd_i);
    op_a = (mode == MODE_NOISY) ? wf3_i : wf2_i;
    op_b = (mode == MODE_NOISY) ? wf4_i : wf2_i;
    product = op_a * op_b;
    if (product < 0)
      mp_sat = '0;
    else if (product > MP_MAX)
      mp_sat = '1;
    else
      mp_sat = mp_t'(product);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              mp_o <= '0;
    else if (sample_valid_i) mp_o <= mp_sat;
  end

endmodule
