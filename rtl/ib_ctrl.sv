// ib_ctrl: control of the interconnection boxes (IBs) of the multimode filter.
// An IB either connects or disconnects a signal path. For the selected mode this
// block gives, for each of the eleven numerator multipliers a00..a33, the set
// of delayed Y1 taps (i,j) its pre-adder sums: tap (i,j) goes to the multiplier
// of the independent coefficient that a_ij equals under the mode's symmetry
// (diagonal: a_ij = a_ji; fourfold rotational: a_ij = a_j(3-i); quadrantal:
// a_ij = a_(3-i)j; octagonal: diagonal and quadrantal). A multiplier whose mask
// is empty has its input disconnected (held at 0), which is the job of the
// eight multiplier IBs; mul_on reports which multipliers are in use.
// The table holds 4 x 11 x 16 connection bits; a tap that no mode routes to a
// multiplier gives a constant-0 mask bit. The mode-to-connection table is derived from the coefficient sharing rules;
// the wiring of the individual boxes is this design's own. Purely combinational.
module ib_ctrl
  import symfilt_pkg::*;
(
  input  mode_t                 mode,
  output tapmask_t [NUM_A-1:0]  tap_mask,
  output logic     [NUM_A-1:0]  mul_on
);

  // One connection pattern per mode, worked out when the design is elaborated.
  localparam ibpattern_t IB_TABLE [4] = '{ib_pattern(DSM), ib_pattern(FRSM),
                                         ib_pattern(QSM), ib_pattern(OSM)};

  always_comb begin
    tap_mask = IB_TABLE[mode];
    for (int unsigned c = 0; c < NUM_A; c++) mul_on[c] = |tap_mask[c];
  end

endmodule
