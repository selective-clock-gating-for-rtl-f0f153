// counter_cell: one bit of the synchronous up/down/load counter.
//
// The cell is a D flip-flop whose next state D_int comes from a four-way
// selector driven by the operation code S1S0:
//   hold : D_int = q
//   up   : D_int = q ^ t_up   (t_up = AND of all lower bits)
//   down : D_int = q ^ t_dn   (t_dn = AND of all lower bits inverted)
//   load : D_int = x
// The toggle terms t_up/t_dn are formed outside the cell, by the counter.
// D_int is brought out because a clock gating generator compares it with q:
// when both are equal the cell would not change and its clock can be stopped.
//
// Timing: q takes D_int on the rising edge of ck. r_n clears q to 0
// asynchronously while it is low.
//
// The selector, the toggle structure and the asynchronous reset follow the
// cell of the design; the selector decodes S1S0 by the counter's function
// table. An active-low reset is this design's choice, after the inverted
// reset pin of the flip-flop.
module counter_cell
  import counter_pkg::*;
(
  input  logic ck,
  input  logic r_n,
  input  op_e  s,
  input  logic x,
  input  logic t_up,
  input  logic t_dn,
  output logic d_int,
  output logic q
);

  always_comb begin
    unique case (s)
      OP_HOLD: d_int = q;
      OP_UP:   d_int = q ^ t_up;
      OP_DOWN: d_int = q ^ t_dn;
      OP_LOAD: d_int = x;
      default: d_int = q;
    endcase
  end

  always_ff @(posedge ck or negedge r_n) begin
    if (!r_n) q <= 1'b0;
    else      q <= d_int;
  end

endmodule
