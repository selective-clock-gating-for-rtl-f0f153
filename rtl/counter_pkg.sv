// counter_pkg: types shared by the selectively clock-gated counter.
//
// op_e is the two-bit operation code S1S0 of the counter. Its encoding is the
// function table of the counter: 00 holds (inhibition), 01 counts up, 10 counts
// down and 11 loads the parallel input X.
//
// gate_style_e picks one of the gated clock generators of the design:
//   GATE_LATCH_AND - enable latched while the clock is low, ANDed with the
//                    clock (gated clock idles low)
//   GATE_LATCH_OR  - inhibit latched while the clock is high, ORed with the
//                    clock (gated clock idles high)
//   GATE_FREE_OR   - inhibit ORed straight into the clock, no latch; correct
//                    only while the inhibit settles within the high phase of
//                    the clock (a bound on the clock period)
// The latch-free AND form is not offered: an inhibit that changes while the
// clock is high makes it emit spurious edges.
package counter_pkg;

  typedef enum logic [1:0] {
    OP_HOLD = 2'b00,
    OP_UP   = 2'b01,
    OP_DOWN = 2'b10,
    OP_LOAD = 2'b11
  } op_e;

  typedef enum logic [1:0] {
    GATE_LATCH_AND = 2'd0,
    GATE_LATCH_OR  = 2'd1,
    GATE_FREE_OR   = 2'd2
  } gate_style_e;

endpackage
