// tb_mode_select: self-checking test of the mode selection with hysteresis.
// The expected mode is computed from the switching thresholds written out
// explicitly (up-moves at vmode > -110, > 10, >= 130; down-moves at
// vmode <= -130, <= -10, < 110 for ENH_BAND=120, HYST=10), first for a
// directed walk across every boundary, then for random samples.
module tb_mode_select;
  import nibb_pkg::*;

  logic clk = 0, rst_n = 0, update = 0;
  logic [ADC_W-1:0] vin, vref;
  mode_e mode;
  logic signed [ADC_W:0] vmode;
  int checks = 0, failures = 0;
  int exp_mode;

  mode_select dut (.clk, .rst_n, .update, .vin, .vref, .mode, .vmode);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int up_level(input int x);
    return int'(x > -110) + int'(x > 10) + int'(x >= 130);
  endfunction
  function automatic int down_level(input int x);
    return int'(x > -130) + int'(x > -10) + int'(x >= 110);
  endfunction

  task automatic apply(input int dv);
    int u, d;
    vin = ADC_W'(660 + dv);
    @(negedge clk) update = 1;
    @(negedge clk) update = 0;
    u = up_level(dv);
    d = down_level(dv);
    if (u > exp_mode)      exp_mode = u;
    else if (d < exp_mode) exp_mode = d;
    checks++;
    if (int'(mode) != exp_mode || int'(vmode) != dv) begin
      failures++;
      $display("FAIL dv=%0d mode=%0d expected %0d vmode=%0d", dv, mode, exp_mode, vmode);
    end
  endtask

  initial begin
    vref = 12'd660;   // 3.3 V at 5 mV/LSB
    vin  = 12'd1000;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // first update classifies without hysteresis
    vin = 12'd860;
    @(negedge clk) update = 1;
    @(negedge clk) update = 0;
    checks++;
    if (mode != MODE_BUCK) begin failures++; $display("FAIL first classify"); end
    exp_mode = 3;
    // directed walk down and up through every boundary
    apply(200);  apply(115); apply(105); apply(5);   apply(-5);
    apply(-15);  apply(-125); apply(-135); apply(-300); apply(-115);
    apply(-105); apply(5);   apply(15);  apply(125); apply(135);
    checks++;
    if (mode != MODE_BUCK) begin failures++; $display("FAIL walk end"); end
    // without update the mode holds
    vin = 12'd100;
    repeat (5) @(negedge clk);
    checks++;
    if (mode != MODE_BUCK) begin failures++; $display("FAIL changed without update"); end
    // random samples near unity
    for (int n = 0; n < 400; n++)
      apply(int'($urandom_range(0, 600)) - 300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
