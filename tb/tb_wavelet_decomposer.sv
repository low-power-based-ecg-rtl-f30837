// tb_wavelet_decomposer: checks the four-scale filter bank against the
// untimed reference model. Samples (random, plus the constant input of the
// design's own decomposer run) are strobed with random gaps of 0..5 idle
// cycles. Each WF<k> strobe is compared with the model's next detail for
// that level, the output rate per level (one detail per 2^k samples) is
// checked, and the strobe latency of each level (k cycles after the input
// strobe that completes it) is checked.
module tb_wavelet_decomposer;
  import ecg_pkg::*;
  import ecg_ref_pkg::*;

  localparam int NSAMP = 4000;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  sample_t           sample;
  logic              sample_valid = 1'b0;
  sample_t           wf [LEVELS];
  logic [LEVELS-1:0] wf_valid;

  int checks = 0, failures = 0;

  wavelet_decomposer dut (
    .clk            (clk),
    .rst_n          (rst_n),
    .sample_i       (sample),
    .sample_valid_i (sample_valid),
    .wf1_o          (wf[0]),
    .wf2_o          (wf[1]),
    .wf3_o          (wf[2]),
    .wf4_o          (wf[3]),
    .wf_valid_o     (wf_valid)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  wavelet_model model = new();
  int exp_q [LEVELS][$];
  int exp_cyc [LEVELS][$];
  int got_count [LEVELS];
  longint cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  // Compare every strobe with the model.
  always @(posedge clk) begin : compare
    int e;
    longint ec;
    if (rst_n) begin
      for (int k = 0; k < LEVELS; k++) begin
        if (wf_valid[k]) begin
          got_count[k]++;
          checks++;
          if (exp_q[k].size() == 0) begin
            failures++;
            $display("level %0d: unexpected strobe", k+1);
          end else begin
            e = exp_q[k].pop_front();
            ec = exp_cyc[k].pop_front();
            if (int'(wf[k]) != e) begin
              failures++;
              $display("level %0d: got %0d expected %0d", k+1, wf[k], e);
            end
            checks++;
            if (cycle != ec) begin
              failures++;
              $display("level %0d: strobe at cycle %0d expected %0d", k+1, cycle, ec);
            end
          end
        end
      end
    end
  end

  task automatic send(int x);
    @(negedge clk);
    sample = sample_t'(x);
    sample_valid = 1'b1;
    model.push(x);
    for (int k = 0; k < LEVELS; k++)
      if (model.updated[k]) begin
        exp_q[k].push_back(model.wf[k]);
        // strobe sampled at posedge number cycle+1+k (cycle counts posedges seen)
        exp_cyc[k].push_back(cycle + 1 + k);
      end
    @(negedge clk);
    sample_valid = 1'b0;
    repeat ($urandom_range(0, 5)) @(negedge clk);
  endtask

  initial begin
    sample = '0;
    foreach (got_count[k]) got_count[k] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // constant input as in the design's decomposer run
    for (int i = 0; i < 64; i++) send(51);
    // random samples over the full signed range
    for (int i = 64; i < NSAMP; i++) send($signed($urandom_range(0, 255)) - 128);
    repeat (20) @(negedge clk);
    for (int k = 0; k < LEVELS; k++) begin
      checks++;
      if (got_count[k] != NSAMP >> (k+1) || exp_q[k].size() != 0) begin
        failures++;
        $display("level %0d: %0d details for %0d samples", k+1, got_count[k], NSAMP);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
