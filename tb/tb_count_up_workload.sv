// tb_count_up_workload: the evaluation workload, 500 cycles of counting up
// from reset, run side by side on every grouping of the 16-bit counter.
//
// Configurations: groups of 16 bits (the plain counter, no gating), 8, 4 and
// 2 bits with the latch-and-AND generator, and groups of 2 bits with the
// latch-and-OR and the latch-free OR generators. Each probe checks its own
// count and group clocks every cycle. At the end the test compares, for each
// configuration, the clock edges seen by each group with the closed form
// floor(N / 2^k) for a group whose lowest bit is k (bit k toggles once every
// 2^k counts; group 0 is clocked all N cycles), and the total flip-flop clock
// edges with the sum of GROUP_BITS times that. It prints the totals, which
// show how much clock activity each grouping removes.
module tb_count_up_workload;
  import counter_pkg::*;

  localparam int N     = 500;
  localparam int NCFG  = 6;
  localparam int GB [NCFG] = '{16, 8, 4, 2, 2, 2};

  logic ck;
  logic r_n = 1'b0;
  op_e  s   = OP_HOLD;
  logic run = 1'b0;
  int   checks = 0, failures = 0;

  int c_checks [NCFG], c_fail [NCFG], c_edges [NCFG], c_maxsw [NCFG];
  int c_group [NCFG][16];

  initial begin
    ck = 1'b0;
    forever #5 ck = ~ck;
  end

  count_up_probe #(.GROUP_BITS(16), .STYLE(GATE_LATCH_AND)) p0 (
    .ck, .r_n, .s, .run, .checks(c_checks[0]), .failures(c_fail[0]),
    .ff_edges(c_edges[0]), .max_switch(c_maxsw[0]), .group_edges(c_group[0]));
  count_up_probe #(.GROUP_BITS(8), .STYLE(GATE_LATCH_AND)) p1 (
    .ck, .r_n, .s, .run, .checks(c_checks[1]), .failures(c_fail[1]),
    .ff_edges(c_edges[1]), .max_switch(c_maxsw[1]), .group_edges(c_group[1]));
  count_up_probe #(.GROUP_BITS(4), .STYLE(GATE_LATCH_AND)) p2 (
    .ck, .r_n, .s, .run, .checks(c_checks[2]), .failures(c_fail[2]),
    .ff_edges(c_edges[2]), .max_switch(c_maxsw[2]), .group_edges(c_group[2]));
  count_up_probe #(.GROUP_BITS(2), .STYLE(GATE_LATCH_AND)) p3 (
    .ck, .r_n, .s, .run, .checks(c_checks[3]), .failures(c_fail[3]),
    .ff_edges(c_edges[3]), .max_switch(c_maxsw[3]), .group_edges(c_group[3]));
  count_up_probe #(.GROUP_BITS(2), .STYLE(GATE_LATCH_OR)) p4 (
    .ck, .r_n, .s, .run, .checks(c_checks[4]), .failures(c_fail[4]),
    .ff_edges(c_edges[4]), .max_switch(c_maxsw[4]), .group_edges(c_group[4]));
  count_up_probe #(.GROUP_BITS(2), .STYLE(GATE_FREE_OR)) p5 (
    .ck, .r_n, .s, .run, .checks(c_checks[5]), .failures(c_fail[5]),
    .ff_edges(c_edges[5]), .max_switch(c_maxsw[5]), .group_edges(c_group[5]));

  initial begin : watchdog
    repeat (2000) @(posedge ck);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    r_n = 1'b1;
    // The probes start sampling at the next falling edge, where the count-up
    // operation is applied.
    run = 1'b1;
    @(negedge ck);
    s   = OP_UP;
    repeat (N) @(posedge ck);
    #2;
    @(negedge ck);
    s = OP_HOLD;
    run = 1'b0;
    #1;
    for (int c = 0; c < NCFG; c++) begin
      int exp_total, ng;
      ng = 16 / GB[c];
      exp_total = 0;
      checks += c_checks[c];
      failures += c_fail[c];
      for (int g = 0; g < ng; g++) begin
        int exp_g;
        exp_g = N >> (g * GB[c]);
        exp_total += exp_g * GB[c];
        checks++;
        if (c_group[c][g] != exp_g) begin
          failures++;
          $display("FAIL config %0d group %0d: %0d clock edges, expected %0d",
                   c, g, c_group[c][g], exp_g);
        end
      end
      checks++;
      if (c_edges[c] != exp_total) begin
        failures++;
        $display("FAIL config %0d: %0d flip-flop clock edges, expected %0d", c, c_edges[c], exp_total);
      end
      $display("config %0d (groups of %0d bits, %0d generators): %0d flip-flop clock edges (%0d%% of ungated), at most %0d bits switching on one edge",
               c, GB[c], ng - 1, c_edges[c], (100 * c_edges[c]) / c_edges[0], c_maxsw[c]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
