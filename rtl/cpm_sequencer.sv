// cpm_sequencer: inner current-programmed switch sequencer for all four
// steady-state modes, driven by a single current comparator.
//
// Each switching period starts on cycle_start; the mode is sampled there, so a
// mode change always takes effect at a period boundary. The period is split in
// up to three intervals (t_e1, t_e2, t_e3):
//   buck        t_e1 Q2+Q3 (current falls) until the valley Iref is reached,
//               then Q1+Q3 until the end of the period     (valley control)
//   boost       t_e1 Q1+Q4 (current rises) until the peak Iref is reached,
//               then Q1+Q3 until the end of the period     (peak control)
//   enh. buck   t_e1 Q2+Q3 down to the valley Iref, t_e2 a short boosting
//               phase Q1+Q4 up to Iref+ie2_delta, t_e3 Q1+Q3 to the end
//   enh. boost  t_e1 Q1+Q4 up to the peak Iref, t_e2 Q2+Q3 down to
//               Iref-ie2_delta, t_e3 Q1+Q3 to the end
// The sequences follow the source. The source ends t_e2 "by the current
// comparator" without saying at which level; moving the DAC to Iref +/-
// ie2_delta for t_e2 is this design's reading.
//
// cmp is the synchronised comparator output, high when the inductor current
// is above the DAC level. Because the DAC and the synchroniser need time to
// settle, cmp is ignored for BLANK clocks after each change of interval.
// If an interval's threshold is not met within the period, the next period
// simply starts over from t_e1 (cycle-by-cycle limiting). An interval with
// Q1+Q4 on (boost t_e1, enhanced-buck t_e2) also ends after CHG_MAX clocks:
// while Q1+Q4 are on the output gets no current, and without this limit a
// saturated reference would hold them on for whole periods and the output
// would collapse (maximum-duty limit, this design's choice).
module cpm_sequencer
  import nibb_pkg::*;
#(
  parameter int DW    = DAC_W,
  parameter int BLANK   = 4,
  parameter int CHG_MAX = 180    // longest Q1+Q4 interval, clocks
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           cycle_start,
  input  mode_e          mode_in,
  input  logic           cmp,
  input  logic [DW-1:0]  iref,
  input  logic [DW-1:0]  ie2_delta,
  output gates_t         gates,
  output logic [DW-1:0]  dac,
  output logic [1:0]     phase,     // 0: t_e1, 1: t_e2, 2: t_e3
  output mode_e          mode_act
);

  typedef enum logic [1:0] {PH_E1 = 2'd0, PH_E2 = 2'd1, PH_E3 = 2'd2} phase_e;

  localparam int DMAX = (1 << DW) - 1;

  phase_e ph;
  logic [$clog2(BLANK + 1)-1:0] blank;
  logic [$clog2(CHG_MAX + 1)-1:0] chg;
  logic charging, chg_limit;
  logic buck_type;   // t_e1 is a falling (valley) interval
  logic settled;
  int   up_level, down_level;

  assign buck_type = (mode_act == MODE_BUCK) || (mode_act == MODE_ENH_BUCK);
  assign settled   = (blank == '0);
  assign phase     = ph;
  assign charging  = (gates == G_CHARGE);
  assign chg_limit = charging && (int'(chg) >= CHG_MAX - 1);

  always_comb begin
    up_level   = int'(iref) + int'(ie2_delta);
    down_level = int'(iref) - int'(ie2_delta);
    if (up_level > DMAX) up_level = DMAX;
    if (down_level < 0)  down_level = 0;
    gates = G_PASS;
    dac   = iref;
    unique case (ph)
      PH_E1: gates = buck_type ? G_DISCH : G_CHARGE;
      PH_E2: begin
        gates = buck_type ? G_CHARGE : G_DISCH;
        dac   = buck_type ? DW'(up_level) : DW'(down_level);
      end
      default: gates = G_PASS;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph       <= PH_E1;
      blank    <= '0;
      chg      <= '0;
      mode_act <= MODE_BUCK;
    end else if (cycle_start) begin
      ph       <= PH_E1;
      mode_act <= mode_in;
      blank    <= ($bits(blank))'(BLANK);
      chg      <= '0;
    end else if (chg_limit) begin
      ph    <= (ph == PH_E1 && (mode_act == MODE_ENH_BOOST)) ? PH_E2 : PH_E3;
      blank <= ($bits(blank))'(BLANK);
      chg   <= '0;
    end else if (!settled) begin
      if (charging) chg <= chg + 1'b1;
      blank <= blank - 1'b1;
    end else begin
      if (charging) chg <= chg + 1'b1;
      unique case (ph)
        PH_E1:
          // valley reached (current below Iref) or peak reached (above Iref)
          if (buck_type ? !cmp : cmp) begin
            ph    <= (mode_act == MODE_ENH_BUCK || mode_act == MODE_ENH_BOOST) ? PH_E2 : PH_E3;
            blank <= ($bits(blank))'(BLANK);
          end
        PH_E2:
          if (buck_type ? cmp : !cmp) begin
            ph    <= PH_E3;
            blank <= ($bits(blank))'(BLANK);
          end
        default: ;
      endcase
    end
  end

endmodule
