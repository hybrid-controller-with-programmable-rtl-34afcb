// tb_transient_controller: closed-loop test of the transient suppression block
// on the behavioural power stage (8.2 uH, 30 uF, Vin = 3.8 V, 1 MHz ADC).
// Between episodes the block is reset and the plant state is set directly.
// The estimator's table is replaced by a stub: Ith = 100 + 30*dV2 + 7 DAC codes
// (zero-current code plus the load and bleeder current the measured drop
// implies; dV2 in codes per interval) and
// Vth = Vref - 120 codes. Checked:
//   - a 0.8 -> 3.5 A step is detected and Q1+Q4 are on while Delta V2 is
//     taken; dV2 (1/8 code units, two intervals) is four times the drop
//     between the two samples seen here,
//   - current-constrained profile: once inside, the inductor current stays in
//     the band Ith..Ith+2*hyst (plus 0.1 A for comparator delay) while
//     sliding, and the episode ends with v_out >= Vref and a preset of the
//     voltage loop with Ith,
//   - voltage-and-current profile: the voltage slide happens, v_out stays
//     at most 12 codes above Vth and at most 40 below it (it still falls
//     while the inductor current is below the load), then the current slide,
//   - a 3.5 -> 0.8 A step is detected as unloading, Q2+Q3 are on until the
//     inductor current is near the new load, then Q2+Q4 while the new load
//     is measured, and the episode ends with a lowering preset of the voltage
//     loop with the looked-up Ith less 2*hyst, within 40 codes (0.2 A) of
//     the load plus bleeder current.
module tb_transient_controller;
  import nibb_pkg::*;

  localparam real ILSB = 5.0e-3;

  logic clk = 0, rst_n = 0;
  logic [11:0] vref = 12'd660;
  logic [11:0] det_th = 12'd20;
  logic [9:0]  hyst = 10'd20, i_max = 10'd1000;
  profile_e    profile = PROF_CURRENT;
  logic        enable = 1'b1;
  logic        cmp, adc_valid;
  logic [11:0] vout_adc, vin_adc, lut_vth;
  logic [14:0] dv2;
  logic [9:0]  lut_ith;
  logic        active, hold_loop, preset, preset_lower, ev_load, ev_unload, ev_slide_v, ev_slide_i;
  gates_t      tr_gates, gates;
  logic [9:0]  dac, preset_val;
  int          vin_mv = 3800, iload_ma = 800;
  int checks = 0, failures = 0;

  // sample strobe one clock after the ADC, as the top's input register does
  logic        sample;
  logic [11:0] vs;
  always @(posedge clk) begin
    sample <= adc_valid;
    if (adc_valid) vs <= vout_adc;
  end

  nibb_plant_model plant (.clk, .gates, .mout(1'b1), .dac_code(dac), .vin_mv, .iload_ma,
                          .cmp, .adc_valid, .vout_adc, .vin_adc);

  logic [1:0] cmp_sync;
  always @(posedge clk) cmp_sync <= {cmp_sync[0], cmp};

  transient_controller dut (
    .clk, .rst_n, .enable, .sample_valid(sample), .vout(vs), .vref, .cmp(cmp_sync[1]), .vin(vin_adc), .buck_type(vin_mv > 3300),
    .profile, .det_th, .hyst, .i_max, .dv2, .lut_ith, .lut_vth,
    .active, .hold_loop, .gates(tr_gates), .dac, .preset, .preset_lower, .preset_val,
    .ev_load, .ev_unload, .ev_slide_v, .ev_slide_i);

  assign gates = active ? tr_gates : G_PASS;

  always_comb begin
    int c;
    c = 100 + (30 * int'(dv2)) / 8 + 7;
    if (c < 0) c = 0;
    if (c > 1023) c = 1023;
    lut_ith = 10'(c);
    lut_vth = vref - 12'd120;
  end

  always #10 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic start(input real il0, input real vc0, input int load);
    rst_n = 0;
    @(negedge clk);
    plant.il = il0;
    plant.vc = vc0;
    iload_ma = load;
    @(negedge clk) rst_n = 1;
  endtask

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endfunction

  // Loading step, either profile.
  task automatic loading(input profile_e p);
    int s1, s2, band_viol, slide_v_seen, v_min, v_max_dev;
    bit in_band;
    real lo, hi;
    profile = p;
    start(0.8, 3.3, 3500);
    wait (ev_load);
    check(1, "loading detected");
    // the two samples that make Delta V2
    @(posedge sample); #1 s1 = int'(vs);
    check(tr_gates == G_CHARGE, "Q1+Q4 during measurement");
    @(posedge sample);
    @(posedge sample); #1 s2 = int'(vs);
    wait (dut.st == dut.T_ON);
    check(int'(dv2) == 4 * (s1 - s2), $sformatf("dV2 %0d vs %0d", dv2, 4 * (s1 - s2)));
    band_viol = 0;
    in_band = 0;
    slide_v_seen = 0;
    v_min = 4095;
    v_max_dev = 0;
    while (!preset && active) begin
      @(negedge clk);
      if (dut.st == dut.T_SLIDE_V) begin
        slide_v_seen = 1;
        if (int'(vs) < v_min) v_min = int'(vs);
        if (int'(vs) - int'(lut_vth) > v_max_dev) v_max_dev = int'(vs) - int'(lut_vth);
      end
      if (dut.st == dut.T_SLIDE_I) begin
        lo = (real'(dut.ith_r) - 100.0) * ILSB - 0.1;
        hi = (real'(dut.ith_r) - 100.0 + 2.0 * real'(hyst)) * ILSB + 0.1;
        if (plant.il >= lo && plant.il <= hi) in_band = 1;
        else if (in_band) band_viol++;
      end
    end
    check(preset && preset_val == dut.ith_r, "preset with Ith at the end of recovery");
    check(int'(vs) >= int'(vref), "recovery ends at Vref");
    check(band_viol == 0, $sformatf("current outside band %0d clocks", band_viol));
    check(dut.ith_r > 10'd650 && dut.ith_r < 10'd950, $sformatf("Ith estimate %0d", dut.ith_r));
    if (p == PROF_VOLT_CURRENT) begin
      check(slide_v_seen == 1, "voltage slide happened");
      check(v_min >= int'(lut_vth) - 40 && v_max_dev <= 12,
            $sformatf("voltage slide range %0d..+%0d around %0d", v_min, v_max_dev, lut_vth));
    end
    @(negedge clk);
    check(!active, "control returned");
  endtask

  real il_end;
  int  iexp;
  initial begin
    cmp_sync = '0;
    repeat (5) @(negedge clk);
    loading(PROF_CURRENT);
    loading(PROF_VOLT_CURRENT);
    // unloading
    start(3.5, 3.3, 800);
    wait (ev_unload);
    check(1, "unloading detected");
    @(negedge clk);
    check(tr_gates == G_DISCH, "Q2+Q3 during unloading");
    wait (dut.st == dut.T_MEAS1);
    il_end = plant.il;
    @(negedge clk);
    check(tr_gates == G_FREE, "Q2+Q4 while the new load is measured");
    wait (preset || !active);
    iexp = 100 + int'((0.8 + real'(vs) * 5.0e-3 / 15.0) / ILSB) - 40;
    check(preset && preset_lower, "lowering preset at the end of unloading");
    check(preset_val == lut_ith - 10'd40 && int'(preset_val) - iexp <= 40 && iexp - int'(preset_val) <= 40,
          $sformatf("unloading preset %0d, load plus bleeder %0d", preset_val, iexp));
    @(negedge clk);
    check(!active, "control returned after unloading");
    check(il_end < 1.6 && il_end > 0.2, $sformatf("current at end of unloading %f", il_end));
    // disabled: no detection
    enable = 0;
    start(0.8, 3.3, 3500);
    repeat (5000) @(negedge clk);
    check(!active, "no episode while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
