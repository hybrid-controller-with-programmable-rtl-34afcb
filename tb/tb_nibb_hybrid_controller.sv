// tb_nibb_hybrid_controller: end-to-end test of the complete controller, at its
// default parameters, closed around the behavioural power stage, DAC,
// comparator and ADC (8.2 uH, 30 uF, 15 ohm bleeder, 50 MHz clock, 1 MHz ADC).
// Vref is 3.3 V (660 codes). The run:
//   1. start-up in buck mode at Vin = 5 V with the load switch open,
//   2. LUT calibration with the bleeder current, Mout closes, 0.8 A load,
//   3. Vin = 3.8 V (enhanced buck); 0.8 -> 3.5 A loading step with the
//      current-constrained profile; 3.5 -> 0.8 A unloading step,
//   4. Vin = 3.0 V (enhanced boost), Vin = 2.6 V (boost); 0.8 -> 3.0 A
//      loading step (3.5 A at this input would need more inductor current
//      than the 4.6 A DAC range) with the voltage-deviation and current-constrained
//      profile, then back to 0.8 A.
// After each settling interval the mean output over the last 200 samples must
// be within 10 codes (50 mV) of Vref and the expected mode must be active.
// Each loading recovery must end within 400 us with the output back at Vref
// and a deviation below 1.5 V; the unloading step must be handled in one
// episode with an overshoot below 0.7 V (ramping 2.7 A down at -Vout/L puts
// about 0.3 V on 30 uF, and detection at det_th adds about 0.2 V). Every
// mechanism (four modes, calibration, loading and unloading episodes, current
// and voltage slides, at least two switching periods) is counted and must
// have happened.
module tb_nibb_hybrid_controller;
  import nibb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic adc_valid, cmp;
  logic [11:0] vout_adc, vin_adc;
  logic [9:0]  dac_code;
  gates_t      gates;
  logic        mout;
  logic [11:0] vref = 12'd660;
  logic        cal_start = 0;
  profile_e    profile = PROF_CURRENT;
  mode_e       mode;
  logic [8:0]  period;
  logic        cal_active, lut_ready, tr_active;
  logic [14:0] cal_dv1;
  logic        ev_load, ev_unload, ev_slide_v, ev_slide_i;
  int          vin_mv = 5000, iload_ma = 0;
  int checks = 0, failures = 0;

  nibb_plant_model plant (.clk, .gates, .mout, .dac_code, .vin_mv, .iload_ma,
                          .cmp, .adc_valid, .vout_adc, .vin_adc);

  nibb_hybrid_controller dut (
    .clk, .rst_n, .adc_valid, .vout_adc, .vin_adc, .cmp_async(cmp), .dac_code,
    .gates, .mout, .vref, .cal_start, .profile,
    .ie2_delta(10'd40), .det_th(12'd30), .i_hyst(10'd40), .i_max(10'd1000),
    .gdev(4'd5), .dv_max(12'd200),
    .mode, .period, .cal_active, .lut_ready, .cal_dv1, .tr_active,
    .ev_load, .ev_unload, .ev_slide_v, .ev_slide_i);

  always #10 clk = ~clk;   // one 50 MHz controller clock per 20 time units

  // mechanism counters
  int n_mode[4], n_load = 0, n_unload = 0, n_slide_v = 0, n_slide_i = 0, n_cal = 0;
  int n_period_change = 0;
  logic [8:0] last_period = '0;
  logic       last_cal = 0;
  always @(posedge clk) if (rst_n) begin
    n_mode[mode]++;
    if (ev_load)    n_load++;
    if (ev_unload)  n_unload++;
    if (ev_slide_v) n_slide_v++;
    if (ev_slide_i) n_slide_i++;
    if (last_cal && !cal_active) n_cal++;
    last_cal <= cal_active;
    if (period != last_period) n_period_change++;
    last_period <= period;
  end

  initial begin
    repeat (2000000) @(posedge clk);   // 40 ms of controller clocks
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endfunction

  task automatic run_us(input int us);
    repeat (us * 50) @(negedge clk);
  endtask

  task automatic settle(input int us, input mode_e m, input string what);
    real sum;
    run_us(us - 200);
    sum = 0.0;
    for (int n = 0; n < 200; n++) begin
      @(posedge adc_valid);
      sum += real'(vout_adc);
    end
    sum /= 200.0;
    check(sum > 650.0 && sum < 670.0 && mode == m,
          $sformatf("%s: mean vout %0.1f codes, mode %s", what, sum, mode.name()));
  endtask

  // Loading step; returns when the transient controller lets go.
  task automatic load_step(input int to_ma, input string what);
    int vmin, t0;
    vmin = 4095;
    iload_ma = to_ma;
    t0 = 0;
    while (!tr_active && t0 < 50000) begin @(negedge clk); t0++; end
    check(tr_active, {what, ": transient controller engaged"});
    t0 = 0;
    while (tr_active && t0 < 20000) begin
      @(negedge clk);
      t0++;
      if (int'(vout_adc) < vmin) vmin = int'(vout_adc);
    end
    check(!tr_active, {what, ": recovery ended within 400 us"});
    check(int'(dut.vout_s) >= 650, $sformatf("%s: output at Vref after recovery (%0d)", what, dut.vout_s));
    check(660 - vmin < 300, $sformatf("%s: deviation %0d codes", what, 660 - vmin));
    $display("%s: deviation %0d mV, recovery %0d us", what, (660 - vmin) * 5, t0 / 50);
  endtask

  int n_before, vmax;
  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1;
    // 1. start-up, buck, load switch open
    settle(2000, MODE_BUCK, "start-up buck 5 V");
    check(!mout && !lut_ready, "load switch open before calibration");
    // 2. calibration
    @(negedge clk) cal_start = 1;
    @(negedge clk) cal_start = 0;
    wait (lut_ready);
    check(cal_dv1 >= 15'd8 && cal_dv1 <= 15'd16, $sformatf("calibrated dV1 %0d", cal_dv1));
    check(mout, "load switch closed after calibration");
    iload_ma = 800;
    settle(2000, MODE_BUCK, "buck 5 V, 0.8 A");
    // 3. enhanced buck and its transients
    vin_mv = 3800;
    settle(2000, MODE_ENH_BUCK, "enhanced buck 3.8 V, 0.8 A");
    profile = PROF_CURRENT;
    load_step(3500, "enhanced buck loading, current-constrained");
    settle(1500, MODE_ENH_BUCK, "enhanced buck 3.8 V, 3.5 A");
    n_before = n_unload;
    iload_ma = 800;
    wait (tr_active);
    repeat (2) @(negedge clk);
    check(n_unload == n_before + 1 && gates == G_DISCH, "unloading episode with Q2+Q3 on");
    vmax = 0;
    repeat (300 * 50) begin
      @(negedge clk);
      if (int'(vout_adc) > vmax) vmax = int'(vout_adc);
    end
    check(vmax - 660 < 140 && n_unload == n_before + 1,
          $sformatf("unloading: overshoot %0d mV, %0d episode(s)", (vmax - 660) * 5, n_unload - n_before));
    $display("unloading: overshoot %0d mV", (vmax - 660) * 5);
    settle(1500, MODE_ENH_BUCK, "enhanced buck 3.8 V after unloading");
    // 4. enhanced boost and boost
    vin_mv = 3000;
    settle(2000, MODE_ENH_BOOST, "enhanced boost 3.0 V, 0.8 A");
    vin_mv = 2600;
    settle(2000, MODE_BOOST, "boost 2.6 V, 0.8 A");
    profile = PROF_VOLT_CURRENT;
    load_step(3000, "boost loading, voltage and current constrained");
    settle(2000, MODE_BOOST, "boost 2.6 V, 3.0 A");
    iload_ma = 800;
    settle(2000, MODE_BOOST, "boost 2.6 V back to 0.8 A");
    // mechanisms
    check(n_mode[MODE_BUCK] > 0 && n_mode[MODE_ENH_BUCK] > 0 &&
          n_mode[MODE_ENH_BOOST] > 0 && n_mode[MODE_BOOST] > 0, "all four modes active");
    check(n_cal == 1, "one calibration");
    check(n_load >= 2, "loading episodes");
    check(n_unload >= 1, "unloading episodes");
    check(n_slide_i >= 2, "current slides");
    check(n_slide_v >= 1, "voltage slide");
    check(n_period_change >= 2, "frequency scaling");
    $display("mechanisms: modes %0d/%0d/%0d/%0d cal %0d load %0d unload %0d slide_v %0d slide_i %0d period changes %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_cal, n_load, n_unload,
             n_slide_v, n_slide_i, n_period_change);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
