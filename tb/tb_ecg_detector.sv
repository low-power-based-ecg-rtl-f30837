// tb_ecg_detector: end-to-end check of the wavelet ECG detector at its default
// sizes (8-bit samples, 200-sample hold, 32-bit interval counter). A synthetic
// ECG with noisy stretches is strobed in with 5..9 idle cycles between
// samples. After every sample MP1, ND and the QRS output are compared with
// the chained reference models (filter bank, noise detector, QRS detector),
// and every WF strobe is checked against the filter-bank model. It also
// checks that each R peak in the clean stretches is flagged and that the
// mechanisms of the design all occur: detail output at all four scales, zero
// crossings, ND rising and falling, both products, triggers, hold releases.
module tb_ecg_detector;
  import ecg_pkg::*;
  import ecg_ref_pkg::*;

  localparam int VTH      = 12;
  localparam int LEVEL    = 30;
  localparam int INTERVAL = 256;
  localparam int NSAMP    = 12000;

  logic                  clk = 1'b0;
  logic                  rst_n = 1'b0;
  sample_t               sample = '0;
  logic                  sample_valid = 1'b0;
  logic                  qrs, nd, hold_active;
  mp_t                   mp;
  sample_t               wf [LEVELS];
  logic [LEVELS-1:0]     wf_valid;
  logic [ZC_CNT_W-1:0]   zc_count;

  int checks = 0, failures = 0;

  ecg_detector dut (
    .clk              (clk),
    .rst_n            (rst_n),
    .sample_i         (sample),
    .sample_valid_i   (sample_valid),
    .vth_i            (mp_t'(VTH)),
    .noise_level_i    (ZC_CNT_W'(LEVEL)),
    .reset_interval_i (INTERVAL_W'(INTERVAL)),
    .qrs_o            (qrs),
    .nd_o             (nd),
    .mp_o             (mp),
    .wf1_o            (wf[0]),
    .wf2_o            (wf[1]),
    .wf3_o            (wf[2]),
    .wf4_o            (wf[3]),
    .wf_valid_o       (wf_valid),
    .zc_count_o       (zc_count),
    .hold_active_o    (hold_active)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NSAMP * 12 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  wavelet_model wav   = new();
  noise_model   noise = new(INTERVAL, LEVEL);
  qrs_model     qm    = new(HOLD_SAMPLES, VTH);
  ecg_source    src   = new(800, 60, 20, 1500, 2500);

  int strobes [LEVELS];
  int exp_wf  [LEVELS];

  // every WF strobe must carry the model's latest detail of that level
  always @(posedge clk) begin
    if (rst_n)
      for (int k = 0; k < LEVELS; k++)
        if (wf_valid[k]) begin
          strobes[k]++;
          checks++;
          if (int'(wf[k]) != exp_wf[k]) begin
            failures++;
            if (failures < 10) $display("WF%0d=%0d expected %0d", k+1, wf[k], exp_wf[k]);
          end
        end
  end

  initial begin
    int x, uses [2];
    bit q_hist [$];
    bit clean_hist [$];
    int detected, missed;
    int r;
    bit hit, clean;
    foreach (strobes[k]) strobes[k] = 0;
    uses = '{0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NSAMP; n++) begin
      x = src.next();
      @(negedge clk);
      sample = sample_t'(x);
      sample_valid = 1'b1;
      // reference: QRS path sees the old scales and flag, then the interval
      // counter advances, then the sample enters the filter bank
      uses[noise.nd]++;
      qm.tick(noise.nd, wav.wf[1], wav.wf[2], wav.wf[3]);
      noise.tick();
      wav.push(x);
      if (wav.updated[0]) noise.wf1(wav.wf[0]);
      foreach (exp_wf[k]) exp_wf[k] = wav.wf[k];
      @(negedge clk);
      sample_valid = 1'b0;
      checks++;
      if (int'(mp) != qm.mp || nd !== noise.nd || qrs !== qm.out()) begin
        failures++;
        if (failures < 10)
          $display("sample %0d: mp=%0d nd=%0b qrs=%0b expected mp=%0d nd=%0b qrs=%0b",
                   n, mp, nd, qrs, qm.mp, noise.nd, qm.out());
      end
      q_hist.push_back(qrs);
      clean_hist.push_back(!src.noisy);
      repeat ($urandom_range(4, 8)) @(negedge clk);
    end
    // each R peak in a clean stretch must be flagged within 60 samples
    detected = 0; missed = 0;
    foreach (src.r_peaks[i]) begin
      r = src.r_peaks[i];
      hit = 0;
      clean = 1;
      if (r + 60 >= NSAMP) continue;
      for (int t = r - 20; t < r + 60; t++) begin
        if (q_hist[t]) hit = 1;
        if (!clean_hist[t]) clean = 0;
      end
      if (!clean) continue;
      checks++;
      if (hit) detected++;
      else begin
        missed++;
        failures++;
        $display("R peak at sample %0d not detected", r);
      end
    end
    $display("clean beats detected=%0d missed=%0d", detected, missed);
    $display("WF strobes %0d %0d %0d %0d, crossings=%0d nd_rises=%0d nd_falls=%0d",
             strobes[0], strobes[1], strobes[2], strobes[3],
             noise.crossings_total, noise.nd_rises, noise.nd_falls);
    $display("clean-mode samples=%0d noisy-mode samples=%0d triggers=%0d releases=%0d blocked=%0d clamps=%0d",
             uses[0], uses[1], qm.triggers, qm.releases, qm.blocked, qm.mp_clamps);
    checks++;
    if (strobes[3] == 0 || noise.crossings_total == 0 || noise.nd_rises == 0 ||
        noise.nd_falls == 0 || uses[0] == 0 || uses[1] == 0 || qm.triggers == 0 ||
        qm.releases == 0 || detected == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
