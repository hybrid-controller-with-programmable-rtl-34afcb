// tb_voltage_compensator: checks the PI voltage loop against a real-valued
// model (integrator gain 1/16 DAC code per ADC code and update, proportional
// gain 2, integrator and output clamped to 0..1023), plus the rules around
// it: no update for a zero error, none while hold is high, and preset loading
// both the output and the integrator when it raises the reference, leaving
// both alone when it would lower it, unless preset_lower is set.
module tb_voltage_compensator;
  logic clk = 0, rst_n = 0, update = 0, hold = 0, preset = 0, preset_lower = 0;
  logic [9:0]  preset_val = '0;
  logic [11:0] vout, vref;
  logic [9:0]  iref;
  logic signed [12:0] err;
  int checks = 0, failures = 0;
  real integ_m;
  int  iref_m;

  voltage_compensator dut (.clk, .rst_n, .update, .hold, .preset, .preset_lower, .preset_val,
                           .vout, .vref, .iref, .err);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input int v, input bit hld);
    int e;
    vout = 12'(v);
    hold = hld;
    e = int'(vref) - v;
    @(negedge clk) update = 1;
    @(negedge clk) update = 0;
    if (!hld && e != 0) begin
      real o;
      integ_m = integ_m + real'(e) / 16.0;
      if (integ_m < 0.0) integ_m = 0.0;
      if (integ_m > 1023.0) integ_m = 1023.0;
      o = $floor(integ_m) + 2.0 * real'(e);
      if (o < 0.0) o = 0.0;
      if (o > 1023.0) o = 1023.0;
      iref_m = int'(o);
    end
    checks++;
    if (int'(iref) != iref_m || int'(err) != e) begin
      failures++;
      $display("FAIL vout=%0d hold=%0d iref=%0d expected %0d", v, hld, iref, iref_m);
    end
  endtask

  initial begin
    vref = 12'd660;
    vout = 12'd660;
    integ_m = 0.0;
    iref_m = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    step(660, 0);                       // zero error: nothing moves
    for (int n = 0; n < 40; n++) step(640, 0);   // output low: Iref climbs
    step(660, 0);
    step(700, 1);                       // held
    for (int n = 0; n < 300; n++) step(660 + int'($urandom_range(0, 80)) - 40, 0);
    for (int n = 0; n < 100; n++) step(300, 0);  // saturate high
    for (int n = 0; n < 100; n++) step(900, 0);  // saturate low
    // preset: raises the reference ...
    preset_val = 10'd321;
    @(negedge clk) preset = 1;
    @(negedge clk) preset = 0;
    integ_m = 321.0;
    iref_m  = 321;
    checks++;
    if (iref != 10'd321) begin failures++; $display("FAIL preset"); end
    step(650, 0);
    step(670, 0);
    for (int n = 0; n < 20; n++) step(640, 0);
    // ... but never lowers it
    preset_val = 10'd100;
    @(negedge clk) preset = 1;
    @(negedge clk) preset = 0;
    checks++;
    if (int'(iref) != iref_m) begin failures++; $display("FAIL preset lowered the reference"); end
    step(655, 0);
    // ... unless preset_lower is set (after an unloading step)
    preset_val = 10'd150;
    @(negedge clk) begin preset = 1; preset_lower = 1; end
    @(negedge clk) begin preset = 0; preset_lower = 0; end
    integ_m = 150.0;
    iref_m  = 150;
    checks++;
    if (iref != 10'd150) begin failures++; $display("FAIL lowering preset"); end
    for (int n = 0; n < 10; n++) step(675, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
