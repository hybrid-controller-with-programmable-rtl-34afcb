// tb_nibb_steady_state: steady-state operating points of the complete
// controller at its default parameters, closed around the behavioural power
// stage (8.2 uH, 30 uF, 15 ohm bleeder, 50 MHz clock, 1 MHz ADC), Vref = 3.3 V
// and a 1 A load after calibration.
//
// Operating points, visited in this order: Vin = 3.8 V and 3.4 V (enhanced
// buck), 3.2 V and 2.8 V (enhanced boost), 2.5 V (boost), then a step to
// 3.0 V, which must move the converter from boost to enhanced boost and
// lengthen the switching period. At each point, over a 1 ms window:
//   - the expected mode is active and the mean output is within 50 mV of Vref;
//   - the period equals max(250, 500 - 2*|Vin - Vref|) clocks, computed here
//     from the ADC's Vin code, and the number of switching periods in the
//     window matches it;
//   - the boosting/discharging interval t_e2 occurs in every period of an
//     enhanced mode and never in buck or boost;
//   - charge balance: the output receives the inductor current only outside
//     the interval in which Q1+Q4 are on (t_e2 in enhanced buck, t_e1 in
//     boost and enhanced boost), so mean(i_L while feeding the output) times
//     that fraction of time must equal the load plus bleeder current within
//     10 %. In enhanced buck this is I_L(avg) = Iout / (1 - t_e2/Ts).
module tb_nibb_steady_state;
  import nibb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic adc_valid, cmp;
  logic [11:0] vout_adc, vin_adc;
  logic [9:0]  dac_code;
  gates_t      gates;
  logic        mout;
  logic [11:0] vref = 12'd660;
  logic        cal_start = 0;
  mode_e       mode;
  logic [8:0]  period;
  logic        cal_active, lut_ready, tr_active;
  logic [14:0] cal_dv1;
  logic        ev_load, ev_unload, ev_slide_v, ev_slide_i;
  int          vin_mv = 3800, iload_ma = 0;
  int checks = 0, failures = 0;

  nibb_plant_model plant (.clk, .gates, .mout, .dac_code, .vin_mv, .iload_ma,
                          .cmp, .adc_valid, .vout_adc, .vin_adc);

  nibb_hybrid_controller dut (
    .clk, .rst_n, .adc_valid, .vout_adc, .vin_adc, .cmp_async(cmp), .dac_code,
    .gates, .mout, .vref, .cal_start, .profile(PROF_CURRENT),
    .ie2_delta(10'd40), .det_th(12'd30), .i_hyst(10'd40), .i_max(10'd1000),
    .gdev(4'd5), .dv_max(12'd200),
    .mode, .period, .cal_active, .lut_ready, .cal_dv1, .tr_active,
    .ev_load, .ev_unload, .ev_slide_v, .ev_slide_i);

  always #10 clk = ~clk;   // one 50 MHz controller clock per 20 time units

  initial begin
    repeat (1500000) @(posedge clk);   // 30 ms of controller clocks
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endfunction

  // Measurement window: statistics gathered on every clock while `meas` is set.
  logic meas = 0;
  int   n_clk, n_q1q4, n_per, n_per_e2, n_tr;
  real  sum_vout, sum_il_fed, sum_iout;
  logic seen_e2;
  always @(posedge clk) if (meas) begin
    n_clk++;
    sum_vout += real'(vout_adc);
    sum_iout += real'(iload_ma) * 1.0e-3 + plant.vc / 15.0;
    if (gates == G_CHARGE) n_q1q4++;
    else                   sum_il_fed += plant.il;
    if (dut.u_seq.phase == 2'd1) seen_e2 = 1'b1;
    if (tr_active) n_tr++;
    if (dut.cycle_start) begin
      n_per++;
      if (seen_e2) n_per_e2++;
      seen_e2 = 1'b0;
    end
  end

  task automatic point(input int mv, input int settle_us, input mode_e m,
                       input string what);
    int  vmode, exp_period, exp_per;
    real iout, ifed;
    vin_mv = mv;
    repeat (settle_us * 50) @(negedge clk);
    n_clk = 0; n_q1q4 = 0; n_per = 0; n_per_e2 = 0; n_tr = 0;
    sum_vout = 0.0; sum_il_fed = 0.0; sum_iout = 0.0; seen_e2 = 1'b0;
    meas = 1;
    repeat (50000) @(negedge clk);   // 1 ms
    meas = 0;
    vmode      = int'(vin_adc) - int'(vref);
    exp_period = 500 - 2 * (vmode < 0 ? -vmode : vmode);
    if (exp_period < 250) exp_period = 250;
    exp_per    = 50000 / exp_period;
    check(mode == m, $sformatf("%s: mode %s", what, mode.name()));
    check(sum_vout / n_clk > 650.0 && sum_vout / n_clk < 670.0,
          $sformatf("%s: mean vout %0.1f codes", what, sum_vout / n_clk));
    check(int'(period) == exp_period,
          $sformatf("%s: period %0d, expected %0d", what, period, exp_period));
    check(n_per >= exp_per - 1 && n_per <= exp_per + 1,
          $sformatf("%s: %0d periods in 1 ms, expected %0d", what, n_per, exp_per));
    if (m == MODE_ENH_BUCK || m == MODE_ENH_BOOST)
      check(n_per_e2 >= n_per - 1, $sformatf("%s: t_e2 in %0d of %0d periods", what, n_per_e2, n_per));
    else
      check(n_per_e2 == 0, $sformatf("%s: no t_e2 (%0d)", what, n_per_e2));
    check(n_tr == 0, $sformatf("%s: no transient episode", what));
    iout = sum_iout / n_clk;
    ifed = sum_il_fed / n_clk;   // mean(i_L while feeding) * (1 - t_Q1Q4/Ts)
    check(ifed > 0.9 * iout && ifed < 1.1 * iout,
          $sformatf("%s: charge balance, %0.3f A delivered vs %0.3f A drawn", what, ifed, iout));
    $display("%s: mode %s period %0d vout %0.1f mV, Q1+Q4 share %0.3f, I_L avg %0.3f A, Iout %0.3f A",
             what, mode.name(), period, sum_vout / n_clk * 5.0, real'(n_q1q4) / n_clk,
             ifed / (1.0 - real'(n_q1q4) / n_clk), iout);
  endtask

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (1500 * 50) @(negedge clk);
    @(negedge clk) cal_start = 1;
    @(negedge clk) cal_start = 0;
    wait (lut_ready);
    iload_ma = 1000;
    point(3800, 2000, MODE_ENH_BUCK,  "Vin 3.8 V");
    point(3400, 1500, MODE_ENH_BUCK,  "Vin 3.4 V");
    point(3200, 1500, MODE_ENH_BOOST, "Vin 3.2 V");
    point(2800, 1500, MODE_ENH_BOOST, "Vin 2.8 V");
    point(2500, 1500, MODE_BOOST,     "Vin 2.5 V");
    point(3000, 1500, MODE_ENH_BOOST, "Vin 2.5 -> 3.0 V");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
