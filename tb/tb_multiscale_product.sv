// tb_multiscale_product: checks the ND-steered multi-scaled product. Directed
// cases reproduce the design's own run (operands 3, 1, 7, 15 giving 15 and
// 21) and the clamping limits; random scales and ND follow. MP1 must equal
// clamp(WF2*WF2, 0, 255) for ND = 0 and clamp(WF3*WF4, 0, 255) for ND = 1
// one cycle after the sample strobe, and must hold without a strobe.
module tb_multiscale_product;
  import ecg_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    sample_valid = 1'b0;
  logic    nd = 1'b0;
  sample_t wf2 = '0, wf3 = '0, wf4 = '0;
  mp_t     mp;

  int checks = 0, failures = 0;

  multiscale_product dut (
    .clk            (clk),
    .rst_n          (rst_n),
    .sample_valid_i (sample_valid),
    .nd_i           (nd),
    .wf2_i          (wf2),
    .wf3_i          (wf3),
    .wf4_i          (wf4),
    .mp_o           (mp)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_mp(bit n, int a2, int a3, int a4);
    int p;
    if (n) p = a3 * a4;
    else   p = a2 * a2;
    if (p < 0)   return 0;
    if (p > 255) return 255;
    return p;
  endfunction

  task automatic apply(bit n, int a2, int a3, int a4);
    int e, held;
    @(negedge clk);
    nd = n; wf2 = sample_t'(a2); wf3 = sample_t'(a3); wf4 = sample_t'(a4);
    sample_valid = 1'b1;
    e = expect_mp(n, a2, a3, a4);
    @(negedge clk);
    sample_valid = 1'b0;
    checks++;
    if (int'(mp) != e) begin
      failures++;
      $display("nd=%0b wf2=%0d wf3=%0d wf4=%0d: mp=%0d expected %0d", n, a2, a3, a4, mp, e);
    end
    // change inputs without a strobe: MP1 must hold
    held = int'(mp);
    nd = ~n; wf2 = sample_t'(a2 + 1); wf3 = sample_t'(a4); wf4 = sample_t'(a3 + 2);
    @(negedge clk);
    checks++;
    if (int'(mp) != held) begin
      failures++;
      $display("mp changed without a strobe");
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    apply(1'b1, 3, 1, 15);     // WF3 x WF4 = 15
    apply(1'b0, 3, 7, 15);     // WF2 x WF2 = 9
    apply(1'b1, 0, 3, 7);      // 21
    apply(1'b1, 0, -3, 7);     // negative -> 0
    apply(1'b1, 0, -20, -20);  // 400 -> 255
    apply(1'b0, -16, 0, 0);    // 256 -> 255
    apply(1'b0, -15, 0, 0);    // 225
    apply(1'b1, 0, -128, -128);
    apply(1'b1, 0, 127, -128);
    for (int i = 0; i < 3000; i++)
      apply(1'($urandom_range(0, 1)),
            int'($urandom_range(0, 255)) - 128,
            int'($urandom_range(0, 40)) - 20,
            int'($urandom_range(0, 40)) - 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
