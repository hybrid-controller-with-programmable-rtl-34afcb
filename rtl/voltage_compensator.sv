// voltage_compensator: digital outer voltage loop of the current-programmed
// controller.
//
// Once per switching period (`update`) it forms the error between the output
// sample and the reference and, when the error is non-zero, updates the
// current reference Iref handed to the inner comparator loop (left branch of
// the steady-state flowchart: sample Vout, compute the error, update Iref only
// if the error is not zero). The control law is a PI, the steady-state linear
// law the source names for hybrid controllers; gains and number formats are
// this design's choice:
//   e      = Vref - Vout                       (ADC codes, signed)
//   integ += e * 2^(FRAC-KI_SH)                (FRAC fractional bits)
//   Iref   = integ/2^FRAC + KP * e             (DAC codes, saturated)
// The integrator is clamped to the DAC range (anti-windup).
//
// `hold` freezes the loop while the transient controller or the estimator owns
// the switches; `preset` loads integrator and output with preset_val (the new
// load estimate) so that steady state resumes without a second transient.
// After a loading step a preset only ever raises the reference, since an
// estimate below the present reference would pull the loop the wrong way;
// after an unloading step the new load is lower and preset_lower lets the
// preset lower it (both rules are this design's choice).
// iref is registered; it changes one clock after update or preset.
module voltage_compensator
  import nibb_pkg::*;
#(
  parameter int W     = ADC_W,
  parameter int DW    = DAC_W,
  parameter int KP    = 2,
  parameter int KI_SH = 4,
  parameter int FRAC  = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 update,
  input  logic                 hold,
  input  logic                 preset,
  input  logic                 preset_lower,   // preset may also lower Iref
  input  logic [DW-1:0]        preset_val,
  input  logic [W-1:0]         vout,
  input  logic [W-1:0]         vref,
  output logic [DW-1:0]        iref,
  output logic signed [W:0]    err
);

  localparam int IW      = DW + FRAC + 2;
  localparam int OUT_MAX = (1 << DW) - 1;

  logic signed [IW-1:0] integ, integ_sum, integ_next;
  int                   out_int;

  assign err = $signed({1'b0, vref}) - $signed({1'b0, vout});

  always_comb begin
    integ_sum  = integ + (IW'(err) <<< (FRAC - KI_SH));
    integ_next = integ_sum;
    if (integ_sum < 0)
      integ_next = '0;
    else if (integ_sum > IW'(OUT_MAX) <<< FRAC)
      integ_next = IW'(OUT_MAX) <<< FRAC;
    out_int = int'(integ_next[IW-1:FRAC]) + KP * int'(err);
    if (out_int < 0)       out_int = 0;
    if (out_int > OUT_MAX) out_int = OUT_MAX;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ <= '0;
      iref  <= '0;
    end else if (preset) begin
      if (preset_lower || preset_val > iref) begin
        integ <= IW'(preset_val) <<< FRAC;
        iref  <= preset_val;
      end
    end else if (update && !hold && err != 0) begin
      integ <= integ_next;
      iref  <= DW'(out_int);
    end
  end

endmodule
