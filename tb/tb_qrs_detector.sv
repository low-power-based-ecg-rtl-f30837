// tb_qrs_detector: checks the QRS complex detector (multi-scaled product plus
// soft threshold) at its default 200-sample hold. Random wavelet scales with
// occasional large "QRS" slopes are applied on each sample strobe, with ND
// switching between the two products. MP1 and the output are compared with
// the reference model after every strobe; both products, clamping, triggers,
// releases and blocked re-triggers must all occur.
module tb_qrs_detector;
  import ecg_pkg::*;
  import ecg_ref_pkg::*;

  localparam int VTH = 40;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    sample_valid = 1'b0;
  logic    nd = 1'b0;
  sample_t wf2 = '0, wf3 = '0, wf4 = '0;
  mp_t     mp;
  logic    qrs, hold_active;

  int checks = 0, failures = 0;

  qrs_detector dut (
    .clk            (clk),
    .rst_n          (rst_n),
    .sample_valid_i (sample_valid),
    .nd_i           (nd),
    .wf2_i          (wf2),
    .wf3_i          (wf3),
    .wf4_i          (wf4),
    .vth_i          (mp_t'(VTH)),
    .mp_o           (mp),
    .qrs_o          (qrs),
    .hold_active_o  (hold_active)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  qrs_model model = new(HOLD_SAMPLES, VTH);

  initial begin
    int burst, nd_uses [2];
    int a2, a3, a4;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    burst = 0;
    nd_uses = '{0, 0};
    for (int i = 0; i < 30000; i++) begin
      @(negedge clk);
      if (i % 5000 == 0) nd = ~nd;
      if (burst > 0) burst--;
      else if ($urandom_range(0, 599) == 0) burst = $urandom_range(2, 12);
      if (burst > 0) begin
        a2 = int'($urandom_range(0, 60)) - 30;
        a3 = int'($urandom_range(5, 40));
        a4 = int'($urandom_range(0, 40)) - 5;
      end else begin
        a2 = int'($urandom_range(0, 12)) - 6;
        a3 = int'($urandom_range(0, 12)) - 6;
        a4 = int'($urandom_range(0, 12)) - 6;
      end
      wf2 = sample_t'(a2); wf3 = sample_t'(a3); wf4 = sample_t'(a4);
      sample_valid = 1'b1;
      model.tick(nd, a2, a3, a4);
      nd_uses[nd]++;
      @(negedge clk);
      sample_valid = 1'b0;
      checks++;
      if (int'(mp) != model.mp || qrs !== model.out() || hold_active !== model.active) begin
        failures++;
        if (failures < 10)
          $display("sample %0d: mp=%0d qrs=%0b expected mp=%0d qrs=%0b",
                   i, mp, qrs, model.mp, model.out());
      end
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    checks++;
    if (model.triggers == 0 || model.releases == 0 || model.blocked == 0 ||
        model.mp_clamps == 0 || nd_uses[0] == 0 || nd_uses[1] == 0) begin
      failures++;
      $display("mechanism missing");
    end
    $display("triggers=%0d releases=%0d blocked=%0d clamps=%0d",
             model.triggers, model.releases, model.blocked, model.mp_clamps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
