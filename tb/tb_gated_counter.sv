// tb_gated_counter: end-to-end test of the clock-gated counter at its default
// size (16 bits, groups of 2 bits, latch-and-AND generators).
//
// A reference model kept here as an integer follows every operation. After
// each rising edge of ck the test checks the count, and it checks for every
// group that its clock gave exactly one rising edge when the group's lowest
// bit changed or a load took place, and none otherwise (group 0 runs on ck
// and ticks every cycle). The stimulus covers a
// long count up from zero (through 127->128 and 255->256, where many bits
// switch at once), wrap-around up and down, holds, loads that change a group
// without changing its lowest bit, random operations, and an asynchronous
// reset in the middle of a cycle. Each of these is counted and must occur.
module tb_gated_counter;
  import counter_pkg::*;

  localparam int W  = 16;
  localparam int GB = 2;
  localparam int NG = W / GB;

  logic          ck;
  logic          r_n = 1'b0;
  op_e           s = OP_HOLD;
  logic [W-1:0]  x = '0;
  logic [W-1:0]  q;
  logic [NG-1:0] group_ck;

  int checks = 0, failures = 0;
  int pulse_cnt [NG];

  // Mechanism counters.
  int n_up = 0, n_down = 0, n_hold = 0, n_load = 0, n_reset = 0;
  int n_wrap_up = 0, n_wrap_down = 0, n_load_lsb_same = 0, n_wide_switch = 0;
  int n_gated [NG];
  int n_passed [NG];

  gated_counter dut (.*);

  initial begin
    ck = 1'b0;
    forever #5 ck = ~ck;
  end

  for (genvar g = 0; g < NG; g++) begin : g_mon
    initial pulse_cnt[g] = 0;
    always @(posedge group_ck[g]) pulse_cnt[g] = pulse_cnt[g] + 1;
  end

  initial begin : watchdog
    repeat (20000) @(posedge ck);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s at %0t: got %0d (0x%0h) expected %0d (0x%0h)",
                 what, $time, got, got, exp, exp);
    end
  endtask

  logic [W-1:0] model = '0;

  // One synchronous operation: apply at the falling edge, check after the
  // rising edge.
  task automatic step(op_e op, logic [W-1:0] xin = '0);
    logic [W-1:0] nxt;
    int cnt0 [NG];
    int flips;
    @(negedge ck);
    s = op;
    x = xin;
    unique case (op)
      OP_HOLD: begin nxt = model;      n_hold++; end
      OP_UP:   begin nxt = model + 1'b1; n_up++;   if (model == '1) n_wrap_up++; end
      OP_DOWN: begin nxt = model - 1'b1; n_down++; if (model == '0) n_wrap_down++; end
      default: begin nxt = xin;        n_load++; end
    endcase
    flips = $countones(nxt ^ model);
    if (flips >= 8) n_wide_switch++;
    cnt0 = pulse_cnt;
    @(posedge ck);
    #1;
    check("count", int'(q), int'(nxt));
    for (int g = 0; g < NG; g++) begin
      bit due;
      due = (g == 0) || (op == OP_LOAD) || (nxt[g*GB] != model[g*GB]);
      if (g > 0 && op == OP_LOAD && nxt[g*GB] == model[g*GB] &&
          nxt[g*GB +: GB] != model[g*GB +: GB])
        n_load_lsb_same++;
      check($sformatf("group %0d clock edges", g), pulse_cnt[g] - cnt0[g], int'(due));
      if (due) n_passed[g]++; else n_gated[g]++;
    end
    model = nxt;
  endtask

  initial begin
    foreach (n_gated[g]) begin n_gated[g] = 0; n_passed[g] = 0; end
    #12;
    check("count in reset", int'(q), 0);
    r_n = 1'b1;

    // Count up from zero past 256.
    for (int n = 0; n < 600; n++) step(OP_UP);
    // Wrap-around in both directions.
    step(OP_LOAD, 16'hFFFD);
    repeat (5) step(OP_UP);
    step(OP_LOAD, 16'h0002);
    repeat (5) step(OP_DOWN);
    // Loads that change a group but not its lowest bit.
    step(OP_LOAD, 16'h0000);
    step(OP_LOAD, 16'h0002);
    step(OP_LOAD, 16'hAAAA);
    step(OP_LOAD, 16'hFFFF);
    repeat (4) step(OP_HOLD);
    // Random operations.
    for (int n = 0; n < 3000; n++) begin
      op_e op;
      logic [W-1:0] v;
      op = op_e'($urandom_range(3));
      v  = W'($urandom);
      if (op == OP_LOAD && $urandom_range(1) == 1)
        v = model ^ W'(1 << (1 + 2 * $urandom_range(NG - 1)));
      step(op, v);
    end

    // Asynchronous reset between clock edges.
    step(OP_LOAD, 16'h1234);
    #2 r_n = 1'b0;
    s = OP_HOLD;
    #1 check("async reset clears", int'(q), 0);
    n_reset++;
    model = '0;
    @(posedge ck); #1;
    check("held in reset", int'(q), 0);
    @(negedge ck) r_n = 1'b1;
    repeat (3) step(OP_UP);

    $display("up=%0d down=%0d hold=%0d load=%0d reset=%0d wrap_up=%0d wrap_down=%0d",
             n_up, n_down, n_hold, n_load, n_reset, n_wrap_up, n_wrap_down);
    $display("loads changing a group but not its lowest bit=%0d, steps with >=8 bits switching=%0d",
             n_load_lsb_same, n_wide_switch);
    check("count up seen",   int'(n_up > 0), 1);
    check("count down seen", int'(n_down > 0), 1);
    check("hold seen",       int'(n_hold > 0), 1);
    check("load seen",       int'(n_load > 0), 1);
    check("reset seen",      int'(n_reset > 0), 1);
    check("wrap up seen",    int'(n_wrap_up > 0), 1);
    check("wrap down seen",  int'(n_wrap_down > 0), 1);
    check("load with same group lsb seen", int'(n_load_lsb_same > 0), 1);
    check("wide switch seen", int'(n_wide_switch > 0), 1);
    for (int g = 0; g < NG; g++) begin
      $display("group %0d: clock passed %0d, gated off %0d", g, n_passed[g], n_gated[g]);
      check("group clock passed", int'(n_passed[g] > 0), 1);
      if (g > 0) check("group clock gated off", int'(n_gated[g] > 0), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
