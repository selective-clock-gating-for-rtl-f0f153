// tb_gated_ck_gen: self-checking test of the three gated clock generator forms.
//
// The two latched forms get inputs (d_int, q, load) that change at random
// times in both clock phases; the latch-free OR form gets inputs that change
// only while the clock is high, which is the condition it needs. For every
// clock cycle the test works out whether a pulse is due: for the AND form the
// enable at the rising edge, for the OR forms the enable at the preceding
// falling edge. It checks that exactly that many rising edges appear on each
// gated clock, that every gated rising edge coincides with a rising edge of
// ck, and that an inhibited OR-form clock stays high.
module tb_gated_ck_gen;
  import counter_pkg::*;

  logic ck;
  logic d_l = 1'b0, q_l = 1'b0, ld_l = 1'b0;
  logic d_f = 1'b0, q_f = 1'b0, ld_f = 1'b0;
  logic gck_and, gck_or, gck_free;
  int   checks = 0, failures = 0;
  int   pulses [3] = '{default: 0};
  int   suppressed [3] = '{default: 0};
  int   passed [3] = '{default: 0};
  time  last_rise = 0;

  gated_ck_gen #(.STYLE(GATE_LATCH_AND)) u_and (
    .ck(ck), .d_int(d_l), .q(q_l), .load(ld_l), .gated_ck(gck_and));
  gated_ck_gen #(.STYLE(GATE_LATCH_OR)) u_or (
    .ck(ck), .d_int(d_l), .q(q_l), .load(ld_l), .gated_ck(gck_or));
  gated_ck_gen #(.STYLE(GATE_FREE_OR)) u_free (
    .ck(ck), .d_int(d_f), .q(q_f), .load(ld_f), .gated_ck(gck_free));

  initial begin
    ck = 1'b0;
    forever #5 ck = ~ck;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0d expected %0d", what, $time, got, exp);
    end
  endtask

  always @(posedge ck) last_rise = $time;

  always @(posedge gck_and)  begin pulses[0]++; check("AND edge aligned", int'($time == last_rise), 1); end
  always @(posedge gck_or)   begin pulses[1]++; check("OR edge aligned",  int'($time == last_rise), 1); end
  always @(posedge gck_free) begin pulses[2]++; check("free edge aligned", int'($time == last_rise), 1); end

  // Latched forms: new inputs at a random point of either phase.
  initial begin
    forever begin
      @(posedge ck);
      #(1 + $urandom_range(3));
      {d_l, q_l} = 2'($urandom);
      ld_l = ($urandom_range(7) == 0);
      if ($urandom_range(1) == 1) begin
        #5;
        {d_l, q_l} = 2'($urandom);
        ld_l = ($urandom_range(7) == 0);
      end
    end
  end

  // Latch-free form: new inputs only while ck is high.
  initial begin
    forever begin
      @(posedge ck);
      #(1 + $urandom_range(3));
      {d_f, q_f} = 2'($urandom);
      ld_f = ($urandom_range(7) == 0);
    end
  end

  initial begin : watchdog
    repeat (5000) @(posedge ck);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic en_fall_l, en_fall_f, en_rise_l;
    int   p0 [3];
    @(negedge ck);
    for (int n = 0; n < 1000; n++) begin
      @(negedge ck);
      en_fall_l = (d_l ^ q_l) | ld_l;
      en_fall_f = (d_f ^ q_f) | ld_f;
      p0 = pulses;
      #2;
      check("inhibited OR clock high in low phase", int'(gck_or),   int'(!en_fall_l));
      check("inhibited free clock high in low phase", int'(gck_free), int'(!en_fall_f));
      @(posedge ck);
      en_rise_l = (d_l ^ q_l) | ld_l;
      #1;
      check("AND pulses", pulses[0] - p0[0], int'(en_rise_l));
      check("OR pulses",  pulses[1] - p0[1], int'(en_fall_l));
      check("free pulses", pulses[2] - p0[2], int'(en_fall_f));
      if (en_rise_l) passed[0]++; else suppressed[0]++;
      if (en_fall_l) passed[1]++; else suppressed[1]++;
      if (en_fall_f) passed[2]++; else suppressed[2]++;
    end
    for (int k = 0; k < 3; k++) begin
      $display("form %0d: %0d pulses passed, %0d suppressed", k, passed[k], suppressed[k]);
      check("pulse passed at least once", int'(passed[k] > 0), 1);
      check("pulse suppressed at least once", int'(suppressed[k] > 0), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
