// ecg_ref_pkg: untimed reference models of the ECG detector, used by the
// testbenches to work out expected outputs independently of the RTL.
//
// Each model is written from the arithmetic definition of its block, with
// plain integers and floor division, not from the RTL's bit-level structure.
//   wavelet_model : four-level filter bank, lowpass (x0+3x1+3x2+x3)/8 and
//                   highpass (x0-x1)/2 (both rounded toward -infinity), every
//                   second output kept.
//   noise_model   : zero crossings of the WF1 sign per interval of input
//                   samples, ND = crossings > noise level.
//   qrs_model     : MP1 = clamp(product of the selected scales, 0, 255),
//                   output high for HOLD samples from a sample with MP1 > Vth.
package ecg_ref_pkg;

  function automatic int floor_div(int a, int b);
    int q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q = q - 1;
    return q;
  endfunction

  class wavelet_model;
    int hist [4][$];     // recent inputs of each level, newest last
    int n_in [4];        // inputs seen by each level
    int wf   [4];        // last detail per level
    int wf_count [4];    // details produced per level
    bit updated [4];     // level produced a detail on the last push

    function new();
      foreach (wf[k]) begin
        wf[k] = 0;
        n_in[k] = 0;
        wf_count[k] = 0;
      end
    endfunction

    function int tap(int k, int back);
      int m = hist[k].size() - 1 - back;
      return (m >= 0) ? hist[k][m] : 0;
    endfunction

    // Push one input sample through the levels it reaches.
    function void push(int x);
      int v = x;
      foreach (updated[k]) updated[k] = 0;
      for (int k = 0; k < 4; k++) begin
        int lp, hp;
        hist[k].push_back(v);
        if (hist[k].size() > 4) void'(hist[k].pop_front());
        n_in[k]++;
        if (n_in[k] % 2 == 1) break;   // input m = 0, 2, 4, ...: output dropped
        lp = floor_div(tap(k,0) + 3*tap(k,1) + 3*tap(k,2) + tap(k,3), 8);
        hp = floor_div(tap(k,0) - tap(k,1), 2);
        wf[k] = hp;
        wf_count[k]++;
        updated[k] = 1;
        v = lp;
      end
    endfunction
  endclass

  class noise_model;
    int interval, level;
    int zc, icnt;
    bit prev_sign, nd;
    int crossings_total, nd_rises, nd_falls;

    function new(int interval, int level);
      this.interval = (interval < 1) ? 1 : interval;
      this.level = level;
      zc = 0; icnt = 0; prev_sign = 0; nd = 0;
      crossings_total = 0; nd_rises = 0; nd_falls = 0;
    endfunction

    // A new WF1 value arrives.
    function void wf1(int v);
      bit s = (v < 0);
      if (s != prev_sign) begin
        if (zc < 255) zc++;
        crossings_total++;
      end
      prev_sign = s;
    endfunction

    // An input sample arrives (interval time base).
    function void tick();
      icnt++;
      if (icnt >= interval) begin
        bit nd_new = (zc > level);
        if (nd_new && !nd) nd_rises++;
        if (!nd_new && nd) nd_falls++;
        nd = nd_new;
        zc = 0;
        icnt = 0;
      end
    endfunction
  endclass

  class qrs_model;
    int hold, vth;
    int mp;
    bit active;
    int cnt;
    int triggers, releases, blocked, mp_clamps;

    function new(int hold, int vth);
      this.hold = hold; this.vth = vth;
      mp = 0; active = 0; cnt = 0;
      triggers = 0; releases = 0; blocked = 0; mp_clamps = 0;
    endfunction

    static function int product(bit nd, int wf2, int wf3, int wf4);
      return nd ? wf3 * wf4 : wf2 * wf2;
    endfunction

    function bit out();
      return active || (mp > vth);
    endfunction

    // One input sample: the hold counter sees the old MP1, then MP1 is
    // reloaded from the current scales and noise flag.
    function void tick(bit nd, int wf2, int wf3, int wf4);
      int p = product(nd, wf2, wf3, wf4);
      if (active) begin
        if (mp > vth) blocked++;
        cnt++;
        if (cnt >= hold) begin
          active = 0;
          releases++;
        end
      end else if (mp > vth) begin
        triggers++;
        if (hold > 1) begin
          active = 1;
          cnt = 1;
        end
      end
      if (p < 0 || p > 255) mp_clamps++;
      mp = (p < 0) ? 0 : (p > 255) ? 255 : p;
    endfunction
  endclass

  // Synthetic ECG in ADC codes around 0: a beat every PERIOD +/- JITTER
  // samples with P wave, Q dip, R spike, S dip and T wave, and windows of
  // uniform random noise. r_peaks records the sample index of every R peak.
  class ecg_source;
    int period, jitter, noise_amp;
    int n, next_beat, beat_start;
    int r_peaks [$];
    bit noisy;
    int noise_on, noise_off;   // noise window, in samples, repeated

    function new(int period, int jitter, int noise_amp, int noise_on, int noise_off);
      this.period = period; this.jitter = jitter; this.noise_amp = noise_amp;
      this.noise_on = noise_on; this.noise_off = noise_off;
      n = 0; beat_start = -1000000; next_beat = 100; noisy = 0;
    endfunction

    static function int bump(int t, int t0, int half, int amp);
      int d = (t > t0) ? t - t0 : t0 - t;
      return (d >= half) ? 0 : (amp * (half - d)) / half;
    endfunction

    function int next();
      int t, v;
      if (n == next_beat) begin
        beat_start = n;
        r_peaks.push_back(n + 100);
        next_beat = n + period + int'($urandom_range(0, 2 * jitter)) - jitter;
      end
      t = n - beat_start;
      v = bump(t, 40, 25, 10)       // P wave
        - bump(t, 70, 10, 12)       // Q
        + bump(t, 100, 24, 90)      // R
        - bump(t, 130, 10, 20)      // S
        + bump(t, 250, 50, 18);     // T wave
      noisy = (noise_off > 0) && ((n % (noise_on + noise_off)) >= noise_off);
      if (noisy) v += int'($urandom_range(0, 2 * noise_amp)) - noise_amp;
      if (v > 127) v = 127;
      if (v < -128) v = -128;
      n++;
      return v;
    endfunction
  endclass

endpackage
