// self_tuning_estimator: load-current estimator with a self-calibrated
// look-up table (LUT) giving the transient thresholds Ith and Vth.
//
// Calibration: the output is known to discharge only through the bleeding
// resistor Rbld, whose current Vref/Rbld is the unit current Iunit. While
// calibrating, the load switch Mout is open and the power stage is parked with
// Q1/Q3 off and Q2/Q4 on (cal_active asks the top for this). The estimator
// waits SETTLE samples, then measures the drop of the output over 2^CAL_LOG2
// sampling intervals; that drop is Delta V1 per interval with CAL_LOG2
// fractional bits (dv1, in 1/2^CAL_LOG2 ADC codes). Averaging over several
// intervals is this design's choice; it keeps dv1 from being a single LSB.
//
// LUT: row r (r = 0..ROWS-1) stands for a drop of k = r+2 times Delta V1 per
// interval. A drop of k*Delta V1 while Q1/Q4 are on means a load of
// (k-1)*Iunit (the source's estimate) plus the bleeder's own Iunit; the
// inductor has to carry both after recovery. Half a row step is added so that
// the threshold is not below the load when the drop falls between two rows
// (the threshold plays the role of the new peak current):
//   in_tab[r]  = k * dv1
//   ith_tab[r] = I_ZERO + (k + 1/2) * IUNIT_CODE  (DAC codes, saturated)
//   vth_tab[r] = Vref - min(gdev * k * dv1, dv_max) (ADC codes, floored at 0)
// The input column and Ith follow the source. The Vth rule (deviation grows
// with the load up to a programmable maximum) is this design's choice; the
// source only says the table holds a voltage threshold per row. Rows are
// written one per clock. After reset a generic table built from DV1_GENERIC
// is written first, then Mout stays open until a calibration is started with
// cal_start; after it, Mout closes (mout=1) and lut_ready is set.
//
// I_ZERO is the DAC code of zero inductor current (the current sense is
// offset so that the DAC can also ask for small and negative currents).
//
// Look-up (combinational): dv2 is the drop of one sampling interval, in the
// same 1/2^CAL_LOG2 code units as dv1. The row chosen is the first whose in_tab is within half a Delta V1
// of dv2 or above it (nearest row); drops beyond the table give the last row.
module self_tuning_estimator
  import nibb_pkg::*;
#(
  parameter int W           = ADC_W,
  parameter int DW          = DAC_W,
  parameter int ROWS        = 32,
  parameter int CAL_LOG2    = 3,
  parameter int SETTLE      = 4,
  parameter int IUNIT_CODE  = 44,
  parameter int I_ZERO      = 100,
  parameter int DV1_GENERIC = 12
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cal_start,
  input  logic            sample_valid,
  input  logic [W-1:0]    vout,
  input  logic [W-1:0]    vref,
  input  logic [3:0]      gdev,
  input  logic [W-1:0]    dv_max,
  output logic            cal_active,
  output logic            mout,
  output logic            lut_ready,
  output logic [W+CAL_LOG2-1:0] dv1,
  // look-up port
  input  logic [W+CAL_LOG2-1:0] dv2,   // 1/2^CAL_LOG2 code units
  output logic [DW-1:0]   ith,
  output logic [W-1:0]    vth
);

  localparam int FW   = W + CAL_LOG2 + 2;   // fixed-point width for k*dv1
  localparam int RW   = $clog2(ROWS);
  localparam int DMAX = (1 << DW) - 1;

  typedef enum logic [2:0] {
    S_GEN_FILL, S_IDLE, S_SETTLE, S_MEAS, S_FILL, S_RUN
  } state_e;

  state_e           state;
  logic [RW-1:0]    row;
  logic [CAL_LOG2:0] scnt;
  logic [W-1:0]     v_start;
  logic [FW-1:0]    acc;              // k * dv1 for the row being written
  logic [FW-1:0]    in_tab  [ROWS];
  logic [DW-1:0]    ith_tab [ROWS];
  logic [W-1:0]     vth_tab [ROWS];

  // Row contents for the row being written.
  int ith_new, dev_new, vth_new;
  always_comb begin
    ith_new = I_ZERO + (int'(row) + 2) * IUNIT_CODE + IUNIT_CODE / 2;
    if (ith_new > DMAX) ith_new = DMAX;
    dev_new = int'(gdev) * int'(acc[FW-1:CAL_LOG2]);
    if (dev_new > int'(dv_max)) dev_new = int'(dv_max);
    vth_new = int'(vref) - dev_new;
    if (vth_new < 0) vth_new = 0;
  end

  assign cal_active = (state == S_SETTLE) || (state == S_MEAS);
  assign mout       = (state == S_RUN);
  assign lut_ready  = (state == S_RUN);

  int meas_drop;
  always_comb begin
    meas_drop = int'(v_start) - int'(vout);
    if (meas_drop < 1) meas_drop = 1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_GEN_FILL;
      row     <= '0;
      scnt    <= '0;
      v_start <= '0;
      dv1     <= (W + CAL_LOG2)'(DV1_GENERIC);
      acc     <= FW'(2 * DV1_GENERIC);
    end else begin
      unique case (state)
        S_GEN_FILL, S_FILL: begin
          in_tab[row]  <= acc;
          ith_tab[row] <= DW'(ith_new);
          vth_tab[row] <= W'(vth_new);
          acc          <= acc + FW'(dv1);
          row          <= row + 1'b1;
          if (row == RW'(ROWS - 1))
            state <= (state == S_GEN_FILL) ? S_IDLE : S_RUN;
        end
        S_IDLE, S_RUN:
          if (cal_start) begin
            state <= S_SETTLE;
            scnt  <= '0;
          end
        S_SETTLE:
          if (sample_valid) begin
            scnt <= scnt + 1'b1;
            if (int'(scnt) == SETTLE - 1) begin
              state   <= S_MEAS;
              scnt    <= '0;
              v_start <= vout;
            end
          end
        S_MEAS:
          if (sample_valid) begin
            scnt <= scnt + 1'b1;
            if (int'(scnt) == (1 << CAL_LOG2) - 1) begin
              dv1   <= (W + CAL_LOG2)'(meas_drop);
              acc   <= FW'(2 * meas_drop);
              row   <= '0;
              state <= S_FILL;
            end
          end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Nearest-row look-up.
  // Compared at twice the scale so that half a Delta V1 is exact.
  logic [FW:0]   dv2_x2;
  logic [RW-1:0] addr;
  assign dv2_x2 = (FW + 1)'(dv2) << 1;
  always_comb begin
    addr = RW'(ROWS - 1);
    for (int r = ROWS - 1; r >= 0; r--)
      if (dv2_x2 < {in_tab[r], 1'b0} + (FW + 1)'(dv1)) addr = RW'(r);
  end
  assign ith = ith_tab[addr];
  assign vth = vth_tab[addr];

endmodule
