// mode_select: steady-state operating-mode selection of the NIBB controller.
//
// On every input-voltage sample it forms vmode = Vin[n] - Vref[n] (the
// right-hand branch of the steady-state flowchart) and decides whether a mode
// change is required. The Vin axis is cut at -ENH_BAND, 0 and +ENH_BAND:
//   vmode >= ENH_BAND        conventional buck
//   0 < vmode < ENH_BAND     enhanced buck   (Vin slightly above Vout)
//   -ENH_BAND < vmode <= 0   enhanced boost  (Vin slightly below Vout)
//   vmode <= -ENH_BAND       conventional boost
// To avoid toggling, the mode only moves when vmode has crossed a boundary by
// more than HYST codes; the mode is then set to where vmode lies shifted back
// by HYST. Decisions use Vref rather than the measured Vout, as the source
// prescribes. The band edges and hysteresis width are this design's choice.
//
// Interface: `update` qualifies vin. mode is registered and changes one clock
// after an update; vmode is combinational. The first update after reset
// classifies without hysteresis.
module mode_select
  import nibb_pkg::*;
#(
  parameter int W        = ADC_W,
  parameter int ENH_BAND = 120,   // 0.6 V at 5 mV/LSB
  parameter int HYST     = 10     // 50 mV at 5 mV/LSB
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                update,
  input  logic [W-1:0]        vin,
  input  logic [W-1:0]        vref,
  output mode_e               mode,
  output logic signed [W:0]   vmode
);

  function automatic mode_e classify(input int x);
    if (x >= ENH_BAND)       return MODE_BUCK;
    else if (x > 0)          return MODE_ENH_BUCK;
    else if (x > -ENH_BAND)  return MODE_ENH_BOOST;
    else                     return MODE_BOOST;
  endfunction

  logic  first;
  mode_e raw, toward_up, toward_down;

  assign vmode       = $signed({1'b0, vin}) - $signed({1'b0, vref});
  assign raw         = classify(int'(vmode));
  // Shifted by HYST towards the present mode: a move is kept only if it
  // survives this shift.
  assign toward_up   = classify(int'(vmode) - HYST);
  assign toward_down = classify(int'(vmode) + HYST);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode  <= MODE_BUCK;
      first <= 1'b1;
    end else if (update) begin
      first <= 1'b0;
      if (first)
        mode <= raw;
      else if (raw > mode && toward_up > mode)
        mode <= toward_up;
      else if (raw < mode && toward_down < mode)
        mode <= toward_down;
    end
  end

endmodule
