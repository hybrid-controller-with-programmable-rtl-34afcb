// tb_period_gen: checks the frequency-scaling law by timing the distance
// between successive cycle_start pulses: max(250, 500 - 2*|vmode|) clocks,
// with a new vmode taking effect only from the next full period.
module tb_period_gen;
  logic clk = 0, rst_n = 0;
  logic signed [12:0] vmode = '0;
  logic cycle_start;
  logic [8:0] period, cnt;
  int checks = 0, failures = 0;

  period_gen dut (.clk, .rst_n, .vmode, .cycle_start, .period, .cnt);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected(input int v);
    int m = (v < 0) ? -v : v;
    int t = 500 - 2 * m;
    return (t < 250) ? 250 : t;
  endfunction

  // Count clocks from one cycle_start to the next.
  task automatic measure(output int n);
    n = 0;
    do @(posedge clk); while (!cycle_start);
    do begin @(posedge clk); n++; end while (!cycle_start);
  endtask

  int n, v;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    measure(n);
    checks++;
    if (n != 500) begin failures++; $display("FAIL reset period %0d", n); end
    for (int k = 0; k < 12; k++) begin
      case (k)
        0: v = 60;  1: v = -60; 2: v = 124; 3: v = 125; 4: v = -300; 5: v = 7;
        default: v = int'($urandom_range(0, 400)) - 200;
      endcase
      @(negedge clk) vmode = 13'(v);
      // the period in progress keeps its length; the following one adapts
      measure(n);
      measure(n);
      checks++;
      if (n != expected(v)) begin
        failures++;
        $display("FAIL vmode=%0d period=%0d expected %0d", v, n, expected(v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
