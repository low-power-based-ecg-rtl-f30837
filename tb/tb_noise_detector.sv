// tb_noise_detector: checks the zero-crossing noise detector against the
// reference model. WF1 values and input-sample strobes are driven at random
// (quiet stretches with few sign changes and noisy stretches with many), with
// a short interval so ND toggles often. After every clock the crossing count
// and ND are compared with the model. Both ND transitions and the interval
// reset must be seen.
module tb_noise_detector;
  import ecg_pkg::*;
  import ecg_ref_pkg::*;

  localparam int INTERVAL = 12;
  localparam int LEVEL    = 3;

  logic                  clk = 1'b0;
  logic                  rst_n = 1'b0;
  sample_t               wf1 = '0;
  logic                  wf1_valid = 1'b0;
  logic                  sample_valid = 1'b0;
  logic                  nd;
  logic [ZC_CNT_W-1:0]   zc_count;

  int checks = 0, failures = 0;

  noise_detector dut (
    .clk              (clk),
    .rst_n            (rst_n),
    .wf1_i            (wf1),
    .wf1_valid_i      (wf1_valid),
    .sample_valid_i   (sample_valid),
    .reset_interval_i (INTERVAL_W'(INTERVAL)),
    .noise_level_i    (ZC_CNT_W'(LEVEL)),
    .nd_o             (nd),
    .zc_count_o       (zc_count)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  noise_model model = new(INTERVAL, LEVEL);

  initial begin
    int noisy;
    int v;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    noisy = 0;
    for (int i = 0; i < 20000; i++) begin
      if (i % 400 == 0) noisy = !noisy;
      @(negedge clk);
      wf1_valid    = ($urandom_range(0, 1) == 1);
      sample_valid = ($urandom_range(0, 2) != 0);
      // quiet: mostly positive values; noisy: random sign
      if (noisy) v = int'($urandom_range(0, 255)) - 128;
      else       v = ($urandom_range(0, 15) == 0) ? -3 : int'($urandom_range(0, 100));
      wf1 = sample_t'(v);
      // model: crossings of this cycle belong to the interval that is open
      if (wf1_valid)    model.wf1(v);
      if (sample_valid) model.tick();
      @(posedge clk);
      #1;
      checks++;
      if (nd !== model.nd || int'(zc_count) != model.zc) begin
        failures++;
        if (failures < 10)
          $display("cycle %0d: nd=%0b zc=%0d expected nd=%0b zc=%0d",
                   i, nd, zc_count, model.nd, model.zc);
      end
    end
    checks++;
    if (model.nd_rises == 0 || model.nd_falls == 0) begin
      failures++;
      $display("ND never toggled both ways");
    end
    $display("crossings=%0d nd_rises=%0d nd_falls=%0d",
             model.crossings_total, model.nd_rises, model.nd_falls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
