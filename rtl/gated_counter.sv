// gated_counter: synchronous binary counter with clock gating on groups of bits.
//
// A WIDTH-bit counter (16 by default) with four synchronous operations chosen
// by s = S1S0 (hold, count up, count down, parallel load of x) and an
// asynchronous active-low reset r_n. Each bit is a counter_cell.
//
// Clock gating: the bits are split into groups of GROUP_BITS consecutive bits.
// The lowest group runs on ck itself. Every higher group g has a gated clock
// generator that watches the lowest bit of the group (bit g*GROUP_BITS): in a
// count, no bit of a group can change unless its lowest bit does, so comparing
// that one bit's D_int with its q decides whether the group needs a clock
// edge. The generator of group g is fed by the clock of group g-1, not by ck,
// so the group clocks form a chain; a group only ticks when all groups below
// it tick, which holds for counting in either direction since a bit toggles
// only when all lower bits toggle. A parallel load enables every generator.
// GROUP_BITS = 2 (eight groups, seven generators) is the default, the
// grouping that gave the largest savings; 8 and 4 are the other groupings of
// the design and GROUP_BITS = WIDTH gives the plain, ungated counter.
//
// Interface: q is the count, group_ck the clock each group receives (bit 0 is
// ck). Timing: q changes on the rising edge of ck, one operation per cycle.
// Each chained generator adds a gate delay, so in silicon the higher groups
// switch slightly after the lower ones; in RTL all edges share one time step.
//
// Following the design: the cell, the grouping by consecutive significance,
// the per-group generator on the group's lowest bit and the chained group
// clocks. This design's own choices: the load enable into each generator, the
// active-low reset, and the default generator form (latch plus AND).
module gated_counter
  import counter_pkg::*;
#(
  parameter int unsigned WIDTH      = 16,
  parameter int unsigned GROUP_BITS = 2,
  parameter gate_style_e STYLE      = GATE_LATCH_AND,
  localparam int unsigned NGROUPS   = (WIDTH + GROUP_BITS - 1) / GROUP_BITS
) (
  input  logic               ck,
  input  logic               r_n,
  input  op_e                s,
  input  logic [WIDTH-1:0]   x,
  output logic [WIDTH-1:0]   q,
  output logic [NGROUPS-1:0] group_ck
);

  logic [WIDTH-1:0] t_up, t_dn, d_int;

  // Toggle conditions: t_up[i] = q[i-1] & ... & q[0], t_dn[i] likewise on ~q.
  assign t_up[0] = 1'b1;
  assign t_dn[0] = 1'b1;
  for (genvar i = 1; i < WIDTH; i++) begin : g_toggle
    assign t_up[i] = t_up[i-1] &  q[i-1];
    assign t_dn[i] = t_dn[i-1] & ~q[i-1];
  end

  assign group_ck[0] = ck;

  for (genvar g = 1; g < NGROUPS; g++) begin : g_gen
    gated_ck_gen #(.STYLE(STYLE)) u_gen (
      .ck       (group_ck[g-1]),
      .d_int    (d_int[g*GROUP_BITS]),
      .q        (q[g*GROUP_BITS]),
      .load     (s == OP_LOAD),
      .gated_ck (group_ck[g])
    );
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_cell
    counter_cell u_cell (
      .ck    (group_ck[i / GROUP_BITS]),
      .r_n   (r_n),
      .s     (s),
      .x     (x[i]),
      .t_up  (t_up[i]),
      .t_dn  (t_dn[i]),
      .d_int (d_int[i]),
      .q     (q[i])
    );
  end

endmodule
