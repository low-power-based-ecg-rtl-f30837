// tb_sar_logic: checks the SAR control logic with a behavioural S/H, DAC and
// comparator. For voltages across the range (including both rails and exact
// code boundaries) a conversion must return floor(vin / vref * 2^N) clamped to
// 0..2^N-1, the sampling cycle must come one cycle after start, the bit cycles
// must number exactly N (MSB tested first), EOC must come N+2 cycles after
// start, and a start while busy must be ignored.
module tb_sar_logic;

  localparam int N = 8;
  localparam real VREF = 1.2;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  logic         comp, sample, eoc, busy;
  logic [N-1:0] dac, data;
  real          vin = 0.0;

  int checks = 0, failures = 0;

  sar_logic #(.N(N)) dut (
    .clk      (clk),
    .rst_n    (rst_n),
    .start_i  (start),
    .comp_i   (comp),
    .sample_o (sample),
    .dac_o    (dac),
    .data_o   (data),
    .eoc_o    (eoc),
    .busy_o   (busy)
  );

  sar_analog_model #(.N(N)) analog (
    .clk      (clk),
    .vin_i    (vin),
    .vref_i   (VREF),
    .sample_i (sample),
    .dac_i    (dac),
    .comp_o   (comp)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ideal_code(real v);
    // largest code whose DAC voltage is strictly below v, plus handling of
    // v <= 0 (code 0)
    int c = 0;
    for (int k = 1; k < 2 ** N; k++)
      if (v > VREF * real'(k) / real'(2 ** N)) c = k;
    return c;
  endfunction

  task automatic convert(real v);
    int cyc, sample_at, bits, eoc_at, first_trial;
    @(negedge clk);
    vin = v;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1; sample_at = -1; bits = 0; eoc_at = -1; first_trial = -1;
    while (eoc_at < 0 && cyc < 40) begin
      if (sample && sample_at < 0) sample_at = cyc;
      if (busy && !sample) begin
        if (first_trial < 0) first_trial = int'(dac);
        bits++;
        start = (bits == 3);   // a start while busy must be ignored
      end
      if (eoc) eoc_at = cyc;
      @(negedge clk);
      start = 1'b0;
      cyc++;
    end
    checks += 4;
    if (int'(data) != ideal_code(v)) begin
      failures++;
      $display("vin=%f: code %0d expected %0d", v, data, ideal_code(v));
    end
    if (sample_at != 1) begin
      failures++;
      $display("sampling cycle at %0d", sample_at);
    end
    if (bits != N || first_trial != (1 << (N-1))) begin
      failures++;
      $display("%0d bit cycles, first trial %0h", bits, first_trial);
    end
    if (eoc_at != N + 2) begin
      failures++;
      $display("eoc at cycle %0d after the start cycle", eoc_at);
    end
    // idle after the conversion (the ignored start must not have queued one)
    checks++;
    if (busy) begin
      failures++;
      $display("busy after eoc");
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    convert(0.0);
    convert(VREF);
    convert(VREF * 0.5);
    convert(VREF * 0.5 + 0.001);
    convert(VREF * 77.0 / 256.0 + 0.0001);
    convert(VREF * 51.0 / 256.0 + 0.002);
    for (int i = 0; i < 500; i++) convert(VREF * real'($urandom_range(0, 100000)) / 100000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
