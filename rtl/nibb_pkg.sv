// nibb_pkg: types and constants shared by the non-inverting buck-boost (NIBB)
// hybrid controller.
//
// The power stage has two switch pairs: Q1/Q2 (buck leg) and Q3/Q4 (boost leg).
// Every control state of the controller applies one of four leg settings,
// which are the equivalent subcircuits of the converter:
//   G_CHARGE  Q1+Q4 on : inductor across Vin, current rises with Vin/L
//   G_DISCH   Q2+Q3 on : inductor feeds the output, current falls with -Vout/L
//   G_PASS    Q1+Q3 on : Vin to Vout through L, slope (Vin-Vout)/L
//   G_FREE    Q2+Q4 on : inductor shorted, output fed by the capacitor only
//                        (used while the estimator calibrates)
// Converter widths: a 12-bit output/input voltage ADC and a 10-bit current
// reference DAC. These widths are this design's choice; the source leaves them
// open.
package nibb_pkg;

  localparam int ADC_W = 12;
  localparam int DAC_W = 10;

  // Ordered by rising input voltage, so a larger code means a higher Vin/Vout.
  typedef enum logic [1:0] {
    MODE_BOOST     = 2'd0,
    MODE_ENH_BOOST = 2'd1,
    MODE_ENH_BUCK  = 2'd2,
    MODE_BUCK      = 2'd3
  } mode_e;

  typedef struct packed {
    logic q1;
    logic q2;
    logic q3;
    logic q4;
  } gates_t;

  // Loading-transient recovery profile.
  typedef enum logic {
    PROF_CURRENT      = 1'b0,  // current-constrained (two steps)
    PROF_VOLT_CURRENT = 1'b1   // voltage-deviation and current constrained (three steps)
  } profile_e;

  localparam gates_t G_CHARGE = '{q1: 1'b1, q2: 1'b0, q3: 1'b0, q4: 1'b1};
  localparam gates_t G_DISCH  = '{q1: 1'b0, q2: 1'b1, q3: 1'b1, q4: 1'b0};
  localparam gates_t G_PASS   = '{q1: 1'b1, q2: 1'b0, q3: 1'b1, q4: 1'b0};
  localparam gates_t G_FREE   = '{q1: 1'b0, q2: 1'b1, q3: 1'b0, q4: 1'b1};

endpackage
