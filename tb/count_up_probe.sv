// count_up_probe: one counter configuration under a count-up run, with its
// own checks. Used by tb_count_up_workload.
//
// It instantiates gated_counter with the given grouping and generator form,
// follows the shared clock, reset and operation inputs with its own model,
// and after each rising edge of ck checks the count and each group's clock
// edge count against the rule that group g (lowest bit k = g*GROUP_BITS) is
// clocked only when bit k changes. It reports the number of checks and
// failures, the clock edges that reached flip-flops (a measure of clock
// power), the largest number of bits that switched on one edge, and the edges
// of each group. Sampling starts when `run` is high.
module count_up_probe
  import counter_pkg::*;
#(
  parameter int unsigned GROUP_BITS = 2,
  parameter gate_style_e STYLE      = GATE_LATCH_AND
) (
  input  logic        ck,
  input  logic        r_n,
  input  op_e         s,
  input  logic        run,
  output int          checks,
  output int          failures,
  output int          ff_edges,
  output int          max_switch,
  output int          group_edges [16]
);

  localparam int W  = 16;
  localparam int NG = (W + GROUP_BITS - 1) / GROUP_BITS;

  logic [W-1:0]  q, q_prev;
  logic [NG-1:0] group_ck;
  int            pulse_cnt [NG];
  int            pulse_prev [NG];
  logic [W-1:0]  model;

  gated_counter #(.WIDTH(W), .GROUP_BITS(GROUP_BITS), .STYLE(STYLE)) dut (
    .ck(ck), .r_n(r_n), .s(s), .x('0), .q(q), .group_ck(group_ck));

  for (genvar g = 0; g < NG; g++) begin : g_mon
    initial pulse_cnt[g] = 0;
    always @(posedge group_ck[g]) pulse_cnt[g] = pulse_cnt[g] + 1;
  end

  initial begin
    checks = 0; failures = 0; ff_edges = 0; max_switch = 0;
    foreach (group_edges[i]) group_edges[i] = 0;
    model = '0;
    wait (run);
    forever begin
      @(negedge ck);
      q_prev = q;
      pulse_prev = pulse_cnt;
      @(posedge ck);
      #1;
      if (s == OP_UP) model = model + 1'b1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL GROUP_BITS=%0d STYLE=%s: count 0x%0h expected 0x%0h",
                 GROUP_BITS, STYLE.name(), q, model);
      end
      if ($countones(q ^ q_prev) > max_switch) max_switch = $countones(q ^ q_prev);
      for (int g = 0; g < NG; g++) begin
        int got;
        got = pulse_cnt[g] - pulse_prev[g];
        checks++;
        if (got != int'((g == 0) || (q[g*GROUP_BITS] != q_prev[g*GROUP_BITS]))) begin
          failures++;
          $display("FAIL GROUP_BITS=%0d STYLE=%s: group %0d gave %0d edges",
                   GROUP_BITS, STYLE.name(), g, got);
        end
        group_edges[g] += got;
        ff_edges += got * GROUP_BITS;
      end
    end
  end

endmodule
