// transient_controller: transient suppression block of the hybrid controller.
//
// It watches every output sample. When the output falls more than det_th below
// Vref (loading step) or rises more than det_th above it (unloading step) it
// takes the switches and the DAC away from the steady-state sequencer
// (active=1) until the output is back, then hands control back.
//
// Loading, both profiles (after the source):
//   1. Q1+Q4 on (the current rises with Vin/L, the capacitor alone feeds the
//      load). The drop of the output per sampling interval, Delta V2, is
//      measured (over two intervals, after one interval of settling, with
//      FRAC fractional bits) and looked up in the estimator's LUT, giving Ith
//      and Vth.
//   Current-constrained profile (PROF_CURRENT):
//   2. On reaching Ith the controller slides along i_L = Ith until
//      v_out >= Vref (sigma_i = i_L - Ith): "on" while the current is below
//      Ith, "off" once it is above Ith+2*hyst. The band is placed above Ith
//      so that the mean current is not below the estimated load. Both states must feed the
//      output, so with Vin above Vout on is Q1+Q3 and off is Q2+Q3, and with
//      Vin below Vout on is Q1+Q4 and off is Q1+Q3 (this design's choice of
//      subcircuits; the source gives only the sliding surfaces).
//   Voltage-deviation and current-constrained profile (PROF_VOLT_CURRENT):
//   2. When v_out reaches Vth first, it slides along v_out = Vth: Q1+Q4 while
//      v_out > Vth, Q1+Q3 while v_out < Vth (sigma_v = v_C - Vth), so the
//      current keeps rising at about constant voltage until it reaches Ith.
//   In boost-type modes Ith is raised by Vref/Vin, since the inductor feeds
//   the output only part of each cycle (this design's choice).
//   3. Then the current slide above, until v_out >= Vref.
// On exit the voltage loop is preset with Ith as the new load estimate.
// The two current levels of the hysteresis band come from the single DAC and
// comparator; the band width, hyst, is programmable. While the load is being
// measured the DAC holds i_max so the comparator still limits the current.
//
// Unloading: Q2+Q3 on (fastest fall of the inductor current, -Vout/L) until
// the output stops rising, i.e. the inductor current has fallen to the new
// load, or until the current reaches zero (DAC at I_ZERO). The new load is
// then measured with Q2+Q4 on (Q1 and Q3 off, as in the estimator's block
// diagram): the inductor current freewheels at about the new load while the
// capacitor alone feeds the output, and Delta V2 over the same window is
// looked up in the LUT. The voltage loop is preset with that Ith (less the
// current band 2*hyst on the buck side, where Iref is a valley level), with
// preset_lower set so the preset may lower Iref, and the steady-state loop
// resumes. The source calls for a conventional time-optimal pattern without
// detailing it; this single off-interval ended at the voltage peak, followed
// by the estimator's measurement, is this design's reading.
// Protection choices of this design: the current comparator is ignored for
// BLANK clocks after each DAC change, an episode ends after TIMEOUT clocks,
// and detection is disarmed for LOCKOUT samples after each episode.
// Event outputs pulse for one clock when a mechanism starts.
module transient_controller
  import nibb_pkg::*;
#(
  parameter int W       = ADC_W,
  parameter int DW      = DAC_W,
  parameter int BLANK   = 4,
  parameter int TIMEOUT = 20000,
  parameter int LOCKOUT = 32,
  parameter int FRAC    = 3,     // fractional bits of dv2 (as the estimator's dv1)
  parameter int I_ZERO  = 100    // DAC code of zero inductor current
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           enable,
  input  logic           sample_valid,
  input  logic [W-1:0]   vout,
  input  logic [W-1:0]   vref,
  input  logic           cmp,
  input  logic [W-1:0]   vin,
  input  logic           buck_type,   // Vin above Vout (buck or enhanced buck)
  input  profile_e       profile,
  input  logic [W-1:0]   det_th,
  input  logic [DW-1:0]  hyst,
  input  logic [DW-1:0]  i_max,
  // estimator look-up
  output logic [W+FRAC-1:0] dv2,
  input  logic [DW-1:0]  lut_ith,
  input  logic [W-1:0]   lut_vth,
  // control outputs
  output logic           active,
  output logic           hold_loop,
  output gates_t         gates,
  output logic [DW-1:0]  dac,
  output logic           preset,
  output logic           preset_lower,
  output logic [DW-1:0]  preset_val,
  // mechanism events
  output logic           ev_load,
  output logic           ev_unload,
  output logic           ev_slide_v,
  output logic           ev_slide_i
);

  typedef enum logic [2:0] {
    T_IDLE, T_MEAS1, T_MEAS2, T_LUT, T_ON, T_SLIDE_V, T_SLIDE_I, T_UNLOAD
  } tstate_e;

  localparam int DMAX = (1 << DW) - 1;

  tstate_e        st;
  logic [W-1:0]   v_a;
  logic [DW-1:0]  ith_r;
  logic [W-1:0]   vth_r;
  logic           sw_on;                 // slide: charging sub-interval
  logic           second;                // second interval of the Delta V2 window
  logic [$clog2(BLANK + 1)-1:0] blank;
  logic [$clog2(TIMEOUT + 1)-1:0] tmo;
  logic [$clog2(LOCKOUT + 1)-1:0] lock;
  logic           settled;
  logic signed [W:0] err;
  int             i_hi, i_lo;
  logic [DW-1:0]  ith_eff;
  logic           unl;                   // measuring the load after unloading

  // In boost-type modes the inductor current reaches the output only part of
  // the time, so a load estimate is raised by Vout/Vin (taken as Vref/Vin).
  logic [DW+W-1:0] ith_scaled, ith_above_zero;
  always_comb begin
    ith_above_zero = (lut_ith > DW'(I_ZERO)) ? (DW + W)'(lut_ith - DW'(I_ZERO)) : '0;
    ith_scaled     = ith_above_zero * (DW + W)'(vref);
    if (vin != '0) ith_scaled = ith_scaled / (DW + W)'(vin);
    ith_scaled = ith_scaled + (DW + W)'(I_ZERO);
    if (buck_type || vin >= vref)       ith_eff = lut_ith;
    else if (ith_scaled > (DW + W)'(DMAX)) ith_eff = DW'(DMAX);
    else                                ith_eff = DW'(ith_scaled);
  end

  // Preset after unloading: with valley control (buck side) Iref is the
  // bottom of the ripple, so the current band 2*hyst is taken off the estimate;
  // with peak control (boost side) the estimate is used as it is.
  logic [DW-1:0] unl_preset;
  always_comb begin
    unl_preset = ith_eff;
    if (buck_type)
      unl_preset = (int'(ith_eff) > I_ZERO + 2 * int'(hyst)) ? ith_eff - DW'(2 * int'(hyst)) : DW'(I_ZERO);
  end

  assign settled   = (blank == '0);
  assign err       = $signed({1'b0, vref}) - $signed({1'b0, vout});
  assign active    = (st != T_IDLE);
  assign hold_loop = active;

  always_comb begin
    i_hi = int'(ith_r) + 2 * int'(hyst);
    i_lo = int'(ith_r);
    if (i_hi > DMAX) i_hi = DMAX;
    if (i_lo < 0)    i_lo = 0;
    gates = G_CHARGE;
    dac   = ith_r;
    unique case (st)
      T_MEAS1, T_MEAS2, T_LUT: begin
        dac   = i_max;
        if (unl) gates = G_FREE;
        else     gates = (settled && cmp) ? G_DISCH : G_CHARGE;
      end
      T_ON:      gates = G_CHARGE;
      T_SLIDE_V: gates = sw_on ? G_CHARGE : G_PASS;
      T_SLIDE_I: begin
        if (buck_type) gates = sw_on ? G_PASS : G_DISCH;
        else           gates = sw_on ? G_CHARGE : G_PASS;
        dac   = sw_on ? DW'(i_hi) : DW'(i_lo);
      end
      T_UNLOAD: begin
        gates = G_DISCH;
        dac   = DW'(I_ZERO);
      end
      default:   gates = G_PASS;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= T_IDLE;
      v_a        <= '0;
      dv2        <= '0;
      ith_r      <= '0;
      vth_r      <= '0;
      sw_on      <= 1'b0;
      second     <= 1'b0;
      blank      <= '0;
      tmo        <= '0;
      lock       <= '0;
      preset     <= 1'b0;
      preset_lower <= 1'b0;
      preset_val <= '0;
      unl        <= 1'b0;
      ev_load    <= 1'b0;
      ev_unload  <= 1'b0;
      ev_slide_v <= 1'b0;
      ev_slide_i <= 1'b0;
    end else begin
      preset     <= 1'b0;
      preset_lower <= 1'b0;
      ev_load    <= 1'b0;
      ev_unload  <= 1'b0;
      ev_slide_v <= 1'b0;
      ev_slide_i <= 1'b0;
      if (!settled) blank <= blank - 1'b1;
      if (st != T_IDLE) tmo <= tmo + 1'b1;

      if (st != T_IDLE && int'(tmo) >= TIMEOUT) begin
        st   <= T_IDLE;
        lock <= ($bits(lock))'(LOCKOUT);
      end else begin
        unique case (st)
          T_IDLE: begin
            tmo <= '0;
            if (sample_valid && lock != '0) lock <= lock - 1'b1;
            if (sample_valid && enable && lock == '0) begin
              if (err > $signed({1'b0, det_th})) begin
                st      <= T_MEAS1;
                unl     <= 1'b0;
                blank   <= ($bits(blank))'(BLANK);
                ev_load <= 1'b1;
              end else if (-err > $signed({1'b0, det_th})) begin
                st        <= T_UNLOAD;
                v_a       <= vout;
                blank     <= ($bits(blank))'(BLANK);
                ev_unload <= 1'b1;
              end
            end
          end
          // First full sampling interval with Q1+Q4 on starts here.
          T_MEAS1: if (sample_valid) begin
            v_a    <= vout;
            st     <= T_MEAS2;
            second <= 1'b0;
          end
          // Delta V2 is taken over two sampling intervals for one more bit.
          T_MEAS2: if (sample_valid) begin
            second <= 1'b1;
            if (second) begin
              dv2 <= (vout < v_a) ? (W + FRAC)'(v_a - vout) << (FRAC - 1) : '0;
              st  <= T_LUT;
            end
          end
          T_LUT: begin
            ith_r <= ith_eff;
            vth_r <= lut_vth;
            blank <= ($bits(blank))'(BLANK);
            if (unl) begin
              st           <= T_IDLE;
              preset       <= 1'b1;
              preset_lower <= 1'b1;
              preset_val   <= unl_preset;
              lock         <= ($bits(lock))'(LOCKOUT);
            end else begin
              st <= T_ON;
            end
          end
          T_ON:
            if (settled && cmp) begin
              st         <= T_SLIDE_I;
              sw_on      <= 1'b0;
              blank      <= ($bits(blank))'(BLANK);
              ev_slide_i <= 1'b1;
            end else if (profile == PROF_VOLT_CURRENT && sample_valid && vout <= vth_r) begin
              st         <= T_SLIDE_V;
              sw_on      <= 1'b0;
              ev_slide_v <= 1'b1;
            end
          T_SLIDE_V: begin
            if (sw_on && settled && cmp) begin
              st         <= T_SLIDE_I;
              sw_on      <= 1'b0;
              blank      <= ($bits(blank))'(BLANK);
              ev_slide_i <= 1'b1;
            end else if (sample_valid) begin
              if (vout > vth_r) begin
                if (!sw_on) blank <= ($bits(blank))'(BLANK);
                sw_on <= 1'b1;
              end else if (vout < vth_r) begin
                sw_on <= 1'b0;
              end
            end
          end
          T_SLIDE_I: begin
            if (sample_valid && vout >= vref) begin
              st         <= T_IDLE;
              preset     <= 1'b1;
              preset_val <= ith_r;
              lock       <= ($bits(lock))'(LOCKOUT);
            end else if (settled) begin
              if (sw_on && cmp) begin
                sw_on <= 1'b0;
                blank <= ($bits(blank))'(BLANK);
              end else if (!sw_on && !cmp) begin
                sw_on <= 1'b1;
                blank <= ($bits(blank))'(BLANK);
              end
            end
          end
          // output peak (current down to the load) or current down to zero:
          // measure the new load
          T_UNLOAD:
            if ((sample_valid && vout <= v_a) || (settled && !cmp)) begin
              st    <= T_MEAS1;
              unl   <= 1'b1;
              blank <= ($bits(blank))'(BLANK);
            end else if (sample_valid) begin
              v_a <= vout;
            end
          default: st <= T_IDLE;
        endcase
      end
    end
  end

endmodule
