// tb_soft_threshold: checks the threshold comparator and its 200-sample hold
// at the default HOLD. MP1 is driven with random bursts above and below Vth
// and samples are strobed with random gaps. After every clock the output is
// compared with the reference model; each output pulse must last exactly HOLD
// sample strobes (or a multiple, when the comparator re-triggers). Triggers,
// hold releases and comparator hits blocked by the hold are counted and must
// all occur.
module tb_soft_threshold;
  import ecg_pkg::*;
  import ecg_ref_pkg::*;

  localparam int VTH = 15;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic sample_valid = 1'b0;
  mp_t  mp = '0;
  logic qrs, hold_active;

  int checks = 0, failures = 0;

  soft_threshold dut (
    .clk            (clk),
    .rst_n          (rst_n),
    .sample_valid_i (sample_valid),
    .vth_i          (mp_t'(VTH)),
    .mp_i           (mp),
    .qrs_o          (qrs),
    .hold_active_o  (hold_active)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  qrs_model model = new(HOLD_SAMPLES, VTH);

  initial begin
    int burst;
    int high_run, pulses;
    bit prev_q;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // directed: MP1 = 49 against Vth = 15 must give an output of 1 at once,
    // MP1 = 15 (not above Vth) must not
    @(negedge clk);
    mp = mp_t'(15);
    #1;
    checks++;
    if (qrs !== 1'b0) begin
      failures++;
      $display("MP1 = Vth gave a detection");
    end
    mp = mp_t'(49);
    #1;
    checks++;
    if (qrs !== 1'b1) begin
      failures++;
      $display("MP1 = 49 > Vth = 15 gave no detection");
    end
    mp = '0;
    model.mp = 0;
    burst = 0; high_run = 0; pulses = 0; prev_q = 0;
    for (int i = 0; i < 60000; i++) begin
      @(negedge clk);
      if (burst > 0) burst--;
      else if ($urandom_range(0, 999) == 0) burst = $urandom_range(1, 30);
      sample_valid = ($urandom_range(0, 1) == 1);
      // the model's mp changes only on a strobe; the RTL's MP1 input is free,
      // so drive it only with the strobe and keep it otherwise
      if (sample_valid) begin
        int nv;
        nv = (burst > 0) ? int'($urandom_range(VTH + 1, 255)) : int'($urandom_range(0, VTH));
        // model: counter sees the old value, then the new value is loaded
        model.tick(1'b0, 0, 0, 0);
        model.mp = nv;
        if (qrs) high_run++;
      end
      @(posedge clk);
      #1;
      if (sample_valid) mp = mp_t'(model.mp);
      #1;
      checks++;
      if (qrs !== model.out()) begin
        failures++;
        if (failures < 10) $display("step %0d: qrs=%0b expected %0b", i, qrs, model.out());
      end
      if (prev_q && !qrs) begin
        pulses++;
        checks++;
        if (high_run % HOLD_SAMPLES != 0) begin
          failures++;
          $display("pulse lasted %0d strobes", high_run);
        end
        high_run = 0;
      end
      prev_q = qrs;
    end
    checks++;
    if (model.triggers == 0 || model.releases == 0 || model.blocked == 0 || pulses == 0) begin
      failures++;
      $display("mechanism missing");
    end
    $display("triggers=%0d releases=%0d blocked=%0d pulses=%0d",
             model.triggers, model.releases, model.blocked, pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
