// nibb_plant_model: behavioural model of everything around the digital
// controller, for simulation only (not synthesizable).
//
// It holds the four-switch non-inverting buck-boost power stage (inductor L,
// output capacitor C, bleeding resistor RBLD, load switch Mout and a current
// load), the current-reference DAC, the current comparator and the two-channel
// voltage ADC. Each clock advances the state by DT seconds (forward Euler):
//   node A = Vin if Q1 else 0,  node B = vC if Q3 else 0
//   L di/dt = A - B
//   C dv/dt = (Q3 ? iL : 0) - (Mout ? Iload : 0) - vC/RBLD
// cmp (registered) is iL > (dac_code - I_ZERO)*ILSB: code I_ZERO is
// zero current, so the sensed current is offset by I_ZERO*ILSB. Every ADC_DIV clocks the ADC
// delivers truncated samples of vC and Vin (VLSB volts per code) with a
// one-clock adc_valid pulse. Vin and the load are given in mV and mA.
// Defaults: 8.2 uH and 30 uF (the reference prototype), 50 MHz clock,
// 1 MHz ADC rate, 15 ohm bleeder (0.22 A unit current at 3.3 V).
module nibb_plant_model
  import nibb_pkg::*;
#(
  parameter real L       = 8.2e-6,
  parameter real C       = 30.0e-6,
  parameter real RBLD    = 15.0,
  parameter real DT      = 20.0e-9,
  parameter real VLSB    = 5.0e-3,
  parameter real ILSB    = 5.0e-3,
  parameter int  ADC_DIV = 50,
  parameter int  I_ZERO  = 100
) (
  input  logic                 clk,
  input  gates_t               gates,
  input  logic                 mout,
  input  logic [DAC_W-1:0]     dac_code,
  input  int                   vin_mv,
  input  int                   iload_ma,
  output logic                 cmp,
  output logic                 adc_valid,
  output logic [ADC_W-1:0]     vout_adc,
  output logic [ADC_W-1:0]     vin_adc
);

  real il = 0.0;
  real vc = 0.0;
  int  div = 0;

  function automatic logic [ADC_W-1:0] quant(input real v);
    int c;
    c = int'($floor(v / VLSB));
    if (c < 0) c = 0;
    if (c > (1 << ADC_W) - 1) c = (1 << ADC_W) - 1;
    return ADC_W'(c);
  endfunction

  initial begin
    cmp       = 1'b0;
    adc_valid = 1'b0;
    vout_adc  = '0;
    vin_adc   = '0;
  end

  always @(posedge clk) begin
    real vin, va, vb, icap;
    vin  = real'(vin_mv) * 1.0e-3;
    va   = gates.q1 ? vin : 0.0;
    vb   = gates.q3 ? vc : 0.0;
    il   = il + (va - vb) * DT / L;
    icap = (gates.q3 ? il : 0.0) - (mout ? real'(iload_ma) * 1.0e-3 : 0.0) - vc / RBLD;
    vc   = vc + icap * DT / C;
    if (vc < 0.0) vc = 0.0;
    cmp <= (il > (real'(dac_code) - real'(I_ZERO)) * ILSB);
    if (div == ADC_DIV - 1) begin
      div       = 0;
      adc_valid <= 1'b1;
      vout_adc  <= quant(vc);
      vin_adc   <= quant(vin);
    end else begin
      div       = div + 1;
      adc_valid <= 1'b0;
    end
  end

endmodule
