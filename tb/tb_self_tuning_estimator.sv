// tb_self_tuning_estimator: checks the generic table after reset, the
// calibration sequence (Mout open and Q2/Q4 parking requested while the
// output sinks at a known rate, then Mout closed) and the look-up of the
// calibrated table. Expected rows are computed here from the rule
//   k = nearest multiple of Delta V1 to Delta V2 (at least 2, at most 33),
//   Ith = 100 + k*44 + 22 (zero-current code, load and bleeder current,
//         half a row step of margin), Vth = Vref - min(gdev*floor(k*dV1/8), dv_max),
// with dV1 the calibrated drop over eight samples in 1/8 code units and
// Delta V2 given in the same units.
module tb_self_tuning_estimator;
  logic clk = 0, rst_n = 0, cal_start = 0, sample_valid = 0;
  logic [11:0] vout = 12'd660, vref = 12'd660;
  logic [3:0]  gdev = 4'd3;
  logic [11:0] dv_max = 12'd150;
  logic cal_active, mout, lut_ready;
  logic [14:0] dv1;
  logic [14:0] dv2 = '0;   // 1/8 code units
  logic [9:0]  ith;
  logic [11:0] vth;
  int checks = 0, failures = 0;

  self_tuning_estimator dut (.clk, .rst_n, .cal_start, .sample_valid, .vout, .vref,
                             .gdev, .dv_max, .cal_active, .mout, .lut_ready, .dv1,
                             .dv2, .ith, .vth);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_lookup(input int d2, input int d1);
    int k, ith_e, dev, vth_e;
    dv2 = 15'(d2);
    k = 2;
    while (k < 33 && real'(d2) >= real'(k * d1) + real'(d1) / 2.0) k++;
    ith_e = 100 + k * 44 + 22;
    if (ith_e > 1023) ith_e = 1023;
    dev = int'(gdev) * ((k * d1) / 8);
    if (dev > int'(dv_max)) dev = int'(dv_max);
    vth_e = int'(vref) - dev;
    if (vth_e < 0) vth_e = 0;
    #1;
    checks++;
    if (int'(ith) != ith_e || int'(vth) != vth_e) begin
      failures++;
      $display("FAIL dv2=%0d dv1=%0d ith=%0d/%0d vth=%0d/%0d", d2, d1, ith, ith_e, vth, vth_e);
    end
  endtask

  // one ADC sample every 10 clocks
  task automatic sample(input int v);
    repeat (9) @(negedge clk);
    vout = 12'(v);
    sample_valid = 1;
    @(negedge clk) sample_valid = 0;
  endtask

  int v;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (40) @(negedge clk);
    // generic table, Delta V1 = 12/8 codes
    checks++;
    if (mout || lut_ready || cal_active || dv1 != 15'd12) begin
      failures++; $display("FAIL after reset");
    end
    for (int d = 0; d < 480; d += 7) check_lookup(d, 12);
    // calibration: output sinks 11 codes every 8 samples
    @(negedge clk) cal_start = 1;
    @(negedge clk) cal_start = 0;
    checks++;
    if (!cal_active || mout) begin failures++; $display("FAIL calibration not started"); end
    v = 700 * 8;
    for (int n = 0; n < 30 && !lut_ready; n++) begin
      sample(v / 8);
      v -= 11;
      checks++;
      if (mout && !lut_ready) begin failures++; $display("FAIL mout before table ready"); end
    end
    repeat (40) @(negedge clk);
    checks++;
    if (!lut_ready || !mout || cal_active) begin failures++; $display("FAIL calibration did not end"); end
    // 4 settle samples; the drop is taken between samples 4 and 12
    checks++;
    if (dv1 < 15'd10 || dv1 > 15'd12) begin failures++; $display("FAIL dv1=%0d", dv1); end
    for (int d = 0; d < 560; d++) check_lookup(d, int'(dv1));
    gdev = 4'd9;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
