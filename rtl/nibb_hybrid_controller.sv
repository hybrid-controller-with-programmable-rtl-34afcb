// nibb_hybrid_controller: complete digital controller of a four-switch
// non-inverting buck-boost (NIBB) converter.
//
// Steady state is a classic two-loop current-programmed controller: a digital
// voltage loop (voltage_compensator) produces the current reference Iref once
// per switching period, an external DAC turns it into the level of a single
// current comparator, and cpm_sequencer turns the comparator's decisions into
// the switch sequence of the active mode. mode_select picks buck, enhanced
// buck, enhanced boost or boost from Vin against Vref with hysteresis, and
// period_gen scales the switching frequency with the distance from unity.
//
// Load transients are handled by the same DAC and comparator: the
// transient_controller takes over the switches (current-constrained or
// voltage-deviation-and-current-constrained recovery for loading steps,
// a discharge interval and a load measurement for unloading steps), using Ith/Vth
// from the self_tuning_estimator, whose LUT is calibrated at start-up with
// the bleeding-resistor current while the load switch Mout is open.
//
// Priority of the switch and DAC owners: calibration, then transient
// controller, then steady-state sequencer. The transient controller is armed
// only once the LUT is calibrated and Mout is closed.
//
// Interface and timing (this design's choices): one clock (50 MHz assumed by
// the period defaults); adc_valid qualifies vout_adc and vin_adc (12-bit,
// 5 mV/LSB assumed); cmp_async is the comparator output, high when the
// inductor current exceeds the DAC level, synchronised here by two flops;
// dac_code is a 10-bit current reference whose code I_ZERO means zero
// inductor current (the sense path is offset so that light loads, where the
// valley current is negative, can still be programmed). Gate outputs are the "on" commands
// of Q1..Q4; dead time is left to the gate drivers.
module nibb_hybrid_controller
  import nibb_pkg::*;
#(
  parameter int W  = ADC_W,
  parameter int DW = DAC_W,
  parameter int T_MAX = 500,
  parameter int T_MIN = 250,
  parameter int LUT_ROWS = 32,
  parameter int IUNIT_CODE = 44,
  parameter int I_ZERO = 100
) (
  input  logic           clk,
  input  logic           rst_n,
  // converters
  input  logic           adc_valid,
  input  logic [W-1:0]   vout_adc,
  input  logic [W-1:0]   vin_adc,
  input  logic           cmp_async,
  output logic [DW-1:0]  dac_code,
  // power stage
  output gates_t         gates,
  output logic           mout,
  // configuration
  input  logic [W-1:0]   vref,
  input  logic           cal_start,
  input  profile_e       profile,
  input  logic [DW-1:0]  ie2_delta,
  input  logic [W-1:0]   det_th,
  input  logic [DW-1:0]  i_hyst,
  input  logic [DW-1:0]  i_max,
  input  logic [3:0]     gdev,
  input  logic [W-1:0]   dv_max,
  // status
  output mode_e          mode,
  output logic [$clog2(T_MAX + 1)-1:0] period,
  output logic           cal_active,
  output logic           lut_ready,
  output logic [W+2:0]   cal_dv1,     // calibrated Delta V1, 1/8 ADC code units
  output logic           tr_active,
  output logic           ev_load,
  output logic           ev_unload,
  output logic           ev_slide_v,
  output logic           ev_slide_i
);

  localparam int PW = $clog2(T_MAX + 1);

  // ---- input capture -------------------------------------------------------
  logic [1:0]   cmp_sync;
  logic         cmp;
  logic [W-1:0] vout_s, vin_s;
  logic         sample;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmp_sync <= '0;
      vout_s   <= '0;
      vin_s    <= '0;
      sample   <= 1'b0;
    end else begin
      cmp_sync <= {cmp_sync[0], cmp_async};
      sample   <= adc_valid;
      if (adc_valid) begin
        vout_s <= vout_adc;
        vin_s  <= vin_adc;
      end
    end
  end
  assign cmp = cmp_sync[1];

  // ---- steady-state controller --------------------------------------------
  logic signed [W:0] vmode;
  logic              cycle_start;
  logic [DW-1:0]     iref;
  gates_t            cpm_gates;
  logic [DW-1:0]     cpm_dac;
  mode_e             mode_sel;

  mode_select #(.W(W)) u_mode (
    .clk, .rst_n, .update(sample), .vin(vin_s), .vref,
    .mode(mode_sel), .vmode
  );

  period_gen #(.W(W), .T_MAX(T_MAX), .T_MIN(T_MIN)) u_period (
    .clk, .rst_n, .vmode, .cycle_start, .period, .cnt()
  );

  logic          tr_hold, tr_preset, tr_preset_lower;
  logic [DW-1:0] tr_preset_val;

  voltage_compensator #(.W(W), .DW(DW)) u_comp (
    .clk, .rst_n, .update(cycle_start), .hold(tr_hold || cal_active),
    .preset(tr_preset), .preset_lower(tr_preset_lower), .preset_val(tr_preset_val),
    .vout(vout_s), .vref, .iref, .err()
  );

  cpm_sequencer #(.DW(DW)) u_seq (
    .clk, .rst_n, .cycle_start, .mode_in(mode_sel), .cmp, .iref, .ie2_delta,
    .gates(cpm_gates), .dac(cpm_dac), .phase(), .mode_act(mode)
  );

  // ---- transient-mode controller ------------------------------------------
  logic [W+2:0]        dv2;
  logic [DW-1:0]       lut_ith;
  logic [W-1:0]        lut_vth;
  gates_t              tr_gates;
  logic [DW-1:0]       tr_dac;

  self_tuning_estimator #(.W(W), .DW(DW), .ROWS(LUT_ROWS), .IUNIT_CODE(IUNIT_CODE),
                          .I_ZERO(I_ZERO)) u_est (
    .clk, .rst_n, .cal_start, .sample_valid(sample), .vout(vout_s), .vref,
    .gdev, .dv_max, .cal_active, .mout, .lut_ready, .dv1(cal_dv1),
    .dv2, .ith(lut_ith), .vth(lut_vth)
  );

  transient_controller #(.W(W), .DW(DW), .I_ZERO(I_ZERO)) u_tr (
    .clk, .rst_n, .enable(lut_ready && mout && !cal_active),
    .sample_valid(sample), .vout(vout_s), .vref, .cmp,
    .vin(vin_s), .buck_type(mode_sel == MODE_BUCK || mode_sel == MODE_ENH_BUCK), .profile,
    .det_th, .hyst(i_hyst), .i_max,
    .dv2, .lut_ith, .lut_vth,
    .active(tr_active), .hold_loop(tr_hold), .gates(tr_gates), .dac(tr_dac),
    .preset(tr_preset), .preset_lower(tr_preset_lower), .preset_val(tr_preset_val),
    .ev_load, .ev_unload, .ev_slide_v, .ev_slide_i
  );

  // ---- switch and DAC ownership -------------------------------------------
  always_comb begin
    if (cal_active) begin
      gates    = G_FREE;     // Q1, Q3 off; Q2, Q4 on
      dac_code = i_max;
    end else if (tr_active) begin
      gates    = tr_gates;
      dac_code = tr_dac;
    end else begin
      gates    = cpm_gates;
      dac_code = cpm_dac;
    end
  end

  // Exactly one switch of each leg is on.
  // The leg check is disabled during reset, so rst_n is also read by the
  // (simulation-only) checker clocked on clk; lint reports this as a net
  // used both synchronously and asynchronously, which is intended here.
  assert property (@(posedge clk) disable iff (!rst_n) gates.q1 != gates.q2);
  assert property (@(posedge clk) disable iff (!rst_n) gates.q3 != gates.q4);

endmodule
