// tb_cpm_sequencer: runs the steady-state switch sequencer against a simple
// integer inductor model (current units per clock: Q1+Q4 +6, Q2+Q3 -5,
// Q1+Q3 +1 in buck-type modes and -1 in boost-type modes), with a comparator
// delayed by two clocks as in the top's synchroniser. For each mode it
// checks over several periods:
//   - the order of the leg settings inside a period
//     (buck: Q2Q3,Q1Q3; boost: Q1Q4,Q1Q3; enhanced buck: Q2Q3,Q1Q4,Q1Q3;
//     enhanced boost: Q1Q4,Q2Q3,Q1Q3),
//   - that each threshold-ended interval ends with the current within a
//     settling margin of its level (Iref, Iref+delta or Iref-delta),
//   - that a mode request made mid-period is applied at the next period,
//   - that a Q1+Q4 interval whose threshold is out of reach ends after
//     CHG_MAX = 180 clocks.
module tb_cpm_sequencer;
  import nibb_pkg::*;

  localparam int T = 200;      // switching period in clocks
  localparam int MARGIN = 6 * 8;

  logic clk = 0, rst_n = 0, cycle_start;
  mode_e mode_in;
  logic cmp;
  logic [9:0] iref = 10'd300, ie2_delta = 10'd60;
  gates_t gates;
  logic [9:0] dac;
  logic [1:0] phase;
  mode_e mode_act;
  int checks = 0, failures = 0;
  int il = 300, cnt = 0, up = 6, t_first;
  logic [1:0] cmp_d;

  cpm_sequencer dut (.clk, .rst_n, .cycle_start, .mode_in, .cmp, .iref, .ie2_delta,
                     .gates, .dac, .phase, .mode_act);

  always #5 clk = ~clk;
  assign cycle_start = (cnt == 0);
  assign cmp = cmp_d[1];

  always @(posedge clk) begin
    cnt <= (cnt == T - 1) ? 0 : cnt + 1;
    if (gates == G_CHARGE)     il <= il + up;
    else if (gates == G_DISCH) il <= il - 5;
    else if (gates == G_PASS)  il <= il + ((mode_act >= MODE_ENH_BUCK) ? 1 : -1);
    cmp_d <= {cmp_d[0], il > int'(dac)};
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Record the leg settings of one period and the current at each change.
  gates_t seq[$];
  int     il_at[$];
  task automatic record_period();
    gates_t last;
    seq.delete();
    il_at.delete();
    do @(negedge clk); while (!cycle_start);
    @(negedge clk);
    last = gates;
    seq.push_back(gates);
    for (int k = 1; k < T; k++) begin
      @(negedge clk);
      if (gates != last) begin
        if (il_at.size() == 0) t_first = k;
        il_at.push_back(il);
        seq.push_back(gates);
        last = gates;
      end
    end
  endtask

  function automatic int near(input int a, input int b);
    return (a - b <= MARGIN) && (b - a <= MARGIN);
  endfunction

  task automatic check_mode(input mode_e m);
    int lvl1, lvl2;
    mode_in = m;
    repeat (3) record_period();    // settle
    record_period();
    checks++;
    if (mode_act != m) begin failures++; $display("FAIL mode_act %0d", mode_act); end
    lvl1 = int'(iref);
    lvl2 = (m == MODE_ENH_BUCK) ? int'(iref) + int'(ie2_delta) : int'(iref) - int'(ie2_delta);
    checks++;
    case (m)
      MODE_BUCK:
        if (!(seq.size() == 2 && seq[0] == G_DISCH && seq[1] == G_PASS && near(il_at[0], lvl1))) begin
          failures++; $display("FAIL buck sequence n=%0d", seq.size());
        end
      MODE_BOOST:
        if (!(seq.size() == 2 && seq[0] == G_CHARGE && seq[1] == G_PASS && near(il_at[0], lvl1))) begin
          failures++; $display("FAIL boost sequence n=%0d", seq.size());
        end
      MODE_ENH_BUCK:
        if (!(seq.size() == 3 && seq[0] == G_DISCH && seq[1] == G_CHARGE && seq[2] == G_PASS
              && near(il_at[0], lvl1) && near(il_at[1], lvl2))) begin
          failures++; $display("FAIL enhanced buck sequence n=%0d", seq.size());
        end
      default:
        if (!(seq.size() == 3 && seq[0] == G_CHARGE && seq[1] == G_DISCH && seq[2] == G_PASS
              && near(il_at[0], lvl1) && near(il_at[1], lvl2))) begin
          failures++; $display("FAIL enhanced boost sequence n=%0d", seq.size());
        end
    endcase
  endtask

  initial begin
    mode_in = MODE_BUCK;
    cmp_d = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      check_mode(MODE_BUCK);
      check_mode(MODE_ENH_BUCK);
      check_mode(MODE_ENH_BOOST);
      check_mode(MODE_BOOST);
      iref = 10'(250 + 60 * r);
    end
    // maximum Q1+Q4 time: a peak that cannot be reached in time
    up = 1;
    iref = 10'd1000;
    mode_in = MODE_BOOST;
    repeat (2) record_period();
    il = 0;
    record_period();
    checks++;
    if (!(seq.size() == 2 && seq[0] == G_CHARGE && t_first == 180)) begin
      failures++; $display("FAIL charge limit: %0d intervals, first change at %0d", seq.size(), t_first);
    end
    up = 6;
    iref = 10'd300;
    // a request mid-period waits for the period boundary
    mode_in = MODE_BUCK;
    repeat (2) record_period();
    repeat (T / 2) @(negedge clk);
    mode_in = MODE_BOOST;
    @(negedge clk);
    checks++;
    if (mode_act != MODE_BUCK) begin failures++; $display("FAIL mid-period mode change"); end
    do @(negedge clk); while (!cycle_start);
    @(negedge clk);
    checks++;
    if (mode_act != MODE_BOOST) begin failures++; $display("FAIL mode not taken at boundary"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
