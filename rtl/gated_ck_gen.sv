// gated_ck_gen: gated clock generator for one cell or one group of cells.
//
// The generator watches one flip-flop: its excitation d_int and its state q.
// When they are equal the flip-flop would not change on the next edge, so the
// inhibit INH = ~(d_int ^ q) is raised and the next clock pulse is held back.
// The counter also raises `load` during a parallel load, because a load can
// change bits of a group whose lowest bit stays the same; the extra OR gate
// that does this is this design's addition.
//
// Three forms, chosen by STYLE:
//   GATE_LATCH_AND (default): en = ~INH goes through a latch that is
//     transparent while ck is low and closed while it is high;
//     gated_ck = ck & en_latched. Idles low when inhibited.
//   GATE_LATCH_OR: INH goes through a latch that is transparent while ck is
//     high; gated_ck = ck | inh_latched. Idles high when inhibited. Changes of
//     INH while ck is high are hidden by the OR, and the latch holds the value
//     through the low phase, so the next rising edge is clean.
//   GATE_FREE_OR: gated_ck = ck | INH with no latch. Correct only if INH
//     settles while ck is high, i.e. the clock period is bounded by the
//     propagation delay from the clock edge through q and the comparator.
// The forms and their gates follow the design; the latch in the two latched
// forms is intentional (it filters glitches on INH) and is the only storage.
//
// Timing: a rising edge of gated_ck coincides with a rising edge of ck on
// which the enable sampled at the end of the previous low phase (latched
// forms) was set.
module gated_ck_gen
  import counter_pkg::*;
#(
  parameter gate_style_e STYLE = GATE_LATCH_AND
) (
  input  logic ck,
  input  logic d_int,
  input  logic q,
  input  logic load,
  output logic gated_ck
);

  logic inh;
  assign inh = ~((d_int ^ q) | load);

  if (STYLE == GATE_LATCH_AND) begin : g_latch_and
    logic en_l;
    always_latch begin
      if (!ck) en_l = ~inh;
    end
    assign gated_ck = ck & en_l;
  end else if (STYLE == GATE_LATCH_OR) begin : g_latch_or
    logic inh_l;
    always_latch begin
      if (ck) inh_l = inh;
    end
    assign gated_ck = ck | inh_l;
  end else begin : g_free_or
    assign gated_ck = ck | inh;
  end

endmodule
