// tb_ecg_top: end-to-end test of the sensing chain at its default sizes. A
// synthetic ECG (beats every 800 +/- 60 samples, with repeating noisy
// stretches) is turned into voltages for the behavioural sample-and-hold,
// DAC and comparator; the SAR logic converts each one and the ECG detector
// processes the codes. Checks:
//   - every code equals the ideal 8-bit quantisation of the voltage and
//     takes N+2 cycles from start to end of conversion;
//   - after every sample, MP1, ND and the QRS output equal the chained
//     reference models driven with the same samples;
//   - every R peak in a clean stretch is flagged, and no detection starts
//     in a clean stretch away from an R peak;
//   - each mechanism occurs: conversions, details at all four scales, zero
//     crossings, ND rising and falling, both products, product clamping,
//     threshold triggers, hold releases and re-triggers blocked by the hold.
module tb_ecg_top;
  import ecg_pkg::*;
  import ecg_ref_pkg::*;

  localparam int  VTH      = 12;
  localparam int  LEVEL    = 30;
  localparam int  INTERVAL = 256;
  localparam int  NSAMP    = 16000;
  localparam real VREF     = 1.2;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic                adc_start = 1'b0;
  logic                adc_comp, adc_sample, adc_eoc, adc_busy;
  logic [SAMPLE_W-1:0] adc_dac, adc_data;
  logic                qrs, nd;
  mp_t                 mp;
  real                 vin = 0.0;

  int checks = 0, failures = 0;

  ecg_top dut (
    .clk              (clk),
    .rst_n            (rst_n),
    .adc_start_i      (adc_start),
    .adc_comp_i       (adc_comp),
    .adc_sample_o     (adc_sample),
    .adc_dac_o        (adc_dac),
    .adc_data_o       (adc_data),
    .adc_eoc_o        (adc_eoc),
    .adc_busy_o       (adc_busy),
    .vth_i            (mp_t'(VTH)),
    .noise_level_i    (ZC_CNT_W'(LEVEL)),
    .reset_interval_i (INTERVAL_W'(INTERVAL)),
    .qrs_o            (qrs),
    .nd_o             (nd),
    .mp_o             (mp)
  );

  sar_analog_model #(.N(SAMPLE_W)) analog (
    .clk      (clk),
    .vin_i    (vin),
    .vref_i   (VREF),
    .sample_i (adc_sample),
    .dac_i    (adc_dac),
    .comp_o   (adc_comp)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NSAMP * 16 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  wavelet_model wav   = new();
  noise_model   noise = new(INTERVAL, LEVEL);
  qrs_model     qm    = new(HOLD_SAMPLES, VTH);
  ecg_source    src   = new(800, 60, 20, 1500, 2500);

  initial begin
    int x, cyc, uses [2], wf_counts [LEVELS];
    int conversions;
    bit q_hist [$];
    bit clean_hist [$];
    int detected, missed, spurious;
    int r, lat, lat_min, lat_max;
    bit hit, clean, near;
    uses = '{0, 0};
    conversions = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NSAMP; n++) begin
      x = src.next();
      // centre of code 128 + x
      vin = VREF * (real'(128 + x) + 0.5) / 256.0;
      @(negedge clk);
      adc_start = 1'b1;
      @(negedge clk);
      adc_start = 1'b0;
      cyc = 1;
      while (!adc_eoc && cyc < 40) begin
        @(negedge clk);
        cyc++;
      end
      conversions++;
      checks += 2;
      if (int'(adc_data) != 128 + x) begin
        failures++;
        if (failures < 10) $display("sample %0d: code %0d expected %0d", n, adc_data, 128 + x);
      end
      if (cyc != SAMPLE_W + 2) begin
        failures++;
        if (failures < 10) $display("sample %0d: eoc %0d cycles after start", n, cyc);
      end
      // the detector takes the code at the coming clock edge
      uses[noise.nd]++;
      qm.tick(noise.nd, wav.wf[1], wav.wf[2], wav.wf[3]);
      noise.tick();
      wav.push(x);
      if (wav.updated[0]) noise.wf1(wav.wf[0]);
      @(negedge clk);
      checks++;
      if (int'(mp) != qm.mp || nd !== noise.nd || qrs !== qm.out()) begin
        failures++;
        if (failures < 10)
          $display("sample %0d: mp=%0d nd=%0b qrs=%0b expected mp=%0d nd=%0b qrs=%0b",
                   n, mp, nd, qrs, qm.mp, noise.nd, qm.out());
      end
      q_hist.push_back(qrs);
      clean_hist.push_back(!src.noisy);
    end
    foreach (wf_counts[k]) wf_counts[k] = wav.wf_count[k];

    // every R peak in a clean stretch is flagged within 60 samples
    detected = 0; missed = 0;
    lat_min = 1000; lat_max = -1000;
    foreach (src.r_peaks[i]) begin
      r = src.r_peaks[i];
      if (r + 60 >= NSAMP) continue;
      hit = 0;
      clean = 1;
      lat = 0;
      for (int t = r - 20; t < r + 60; t++) begin
        if (q_hist[t] && !hit) lat = t - r;
        if (q_hist[t]) hit = 1;
        if (!clean_hist[t]) clean = 0;
      end
      if (!clean) continue;
      checks++;
      if (hit) begin
        detected++;
        if (lat < lat_min) lat_min = lat;
        if (lat > lat_max) lat_max = lat;
      end else begin
        missed++;
        failures++;
        $display("R peak at sample %0d not detected", r);
      end
    end
    // no detection may start in a clean stretch away from an R peak
    spurious = 0;
    for (int t = 1; t < NSAMP; t++) begin
      if (q_hist[t] && !q_hist[t-1] && clean_hist[t]) begin
        near = 0;
        foreach (src.r_peaks[i])
          if (t >= src.r_peaks[i] - 40 && t <= src.r_peaks[i] + 60) near = 1;
        checks++;
        if (!near) begin
          spurious++;
          failures++;
          $display("spurious detection at sample %0d", t);
        end
      end
    end

    $display("conversions=%0d, details per scale %0d %0d %0d %0d",
             conversions, wf_counts[0], wf_counts[1], wf_counts[2], wf_counts[3]);
    $display("zero crossings=%0d, ND rises=%0d falls=%0d",
             noise.crossings_total, noise.nd_rises, noise.nd_falls);
    $display("samples in clean mode=%0d noisy mode=%0d, product clamps=%0d",
             uses[0], uses[1], qm.mp_clamps);
    $display("triggers=%0d hold releases=%0d blocked re-triggers=%0d",
             qm.triggers, qm.releases, qm.blocked);
    $display("clean beats detected=%0d missed=%0d, spurious=%0d", detected, missed, spurious);
    $display("detection relative to the R peak: %0d to %0d samples", lat_min, lat_max);
    checks++;
    if (conversions == 0 || wf_counts[3] == 0 || noise.crossings_total == 0 ||
        noise.nd_rises == 0 || noise.nd_falls == 0 || uses[0] == 0 || uses[1] == 0 ||
        qm.mp_clamps == 0 || qm.triggers == 0 || qm.releases == 0 || qm.blocked == 0 ||
        detected == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
