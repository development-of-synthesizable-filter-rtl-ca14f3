// adpll_pkg: widths and types shared by the ADPLL blocks.
//
// The period and divider counts are 8 bits wide, as the measured input
// half-period ("PeriodCount") and the derived divider count
// ("DividerMaxValue") are 8-bit quantities in the reference design. The
// filter counter width and the pending-correction width are this design's
// own choices.
package adpll_pkg;

  // Width of the measured input half-period and of the divider count.
  localparam int unsigned CNT_W = 8;
  // Width of the random walk filter capacity N (counter holds -N..+N).
  localparam int unsigned FILT_W = 8;
  // Width of the signed pending phase-correction register.
  localparam int unsigned CORR_W = 4;

  typedef logic [CNT_W-1:0]  count_t;
  typedef logic [FILT_W-1:0] filt_cap_t;

  // Phase relation of the output edge to the input edge, as judged by the
  // phase detector at an input rising edge.
  typedef enum logic [1:0] {
    PH_NONE    = 2'b00,  // no decision (loop not running)
    PH_ALIGNED = 2'b01,  // output rose in the same clock as the input
    PH_LEAD    = 2'b10,  // output rose earlier: feedback is ahead
    PH_LAG     = 2'b11   // output is late: feedback lags
  } phase_rel_e;

endpackage
