// period_gen: switching-period generator with frequency scaling.
//
// The switching frequency follows the distance from unity conversion ratio:
// far from unity (pure buck or boost) the converter runs fast to keep the
// ripple small, near unity it slows down to save switching and drive losses.
// The source states this rule and the 100-200 kHz range; the linear law is
// this design's choice:
//   period = max(T_MIN, T_MAX - SLOPE * |vmode|)   (in clock cycles)
// With a 50 MHz clock the defaults give 500 cycles (100 kHz) at unity and
// 250 cycles (200 kHz) from |vmode| = 125 codes (0.625 V) outward.
//
// Timing: cnt runs 0..period-1; cycle_start is high while cnt == 0, i.e. on
// the first clock of each switching period. A new period value is taken only
// at the end of a period, so a period is never cut short.
module period_gen #(
  parameter int W     = 12,
  parameter int T_MAX = 500,
  parameter int T_MIN = 250,
  parameter int SLOPE = 2,
  parameter int PW    = $clog2(T_MAX + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [W:0]    vmode,
  output logic                 cycle_start,
  output logic [PW-1:0]        period,
  output logic [PW-1:0]        cnt
);

  int mag, target;
  logic [PW-1:0] period_next;

  always_comb begin
    mag    = (vmode < 0) ? -int'(vmode) : int'(vmode);
    target = T_MAX - SLOPE * mag;
    if (target < T_MIN) target = T_MIN;
    period_next = PW'(target);
  end

  assign cycle_start = (cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      period <= PW'(T_MAX);
    end else if (cnt >= period - 1'b1) begin
      cnt    <= '0;
      period <= period_next;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

endmodule
