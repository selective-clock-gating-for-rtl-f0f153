// tb_counter_cell: self-checking test of one counter bit.
//
// Drives every operation code with random x, t_up, t_dn and the current state,
// and checks d_int combinationally and q after each rising clock edge against
// a reference worked out here from the operation table. Also checks that the
// asynchronous reset clears q between clock edges.
module tb_counter_cell;
  import counter_pkg::*;

  logic ck, r_n = 1'b0;
  op_e  s  = OP_HOLD;
  logic x = 1'b0, t_up = 1'b0, t_dn = 1'b0;
  logic d_int, q;
  int   checks = 0, failures = 0;
  int   op_seen [4] = '{default: 0};

  counter_cell dut (.*);

  initial begin
    ck = 1'b0;
    forever #5 ck = ~ck;
  end

  function automatic logic ref_next(op_e op, logic cur, logic xi, logic tu, logic td);
    case (op)
      OP_HOLD: return cur;
      OP_UP:   return tu ? ~cur : cur;
      OP_DOWN: return td ? ~cur : cur;
      default: return xi;
    endcase
  endfunction

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b (s=%s x=%b t_up=%b t_dn=%b)",
               what, got, exp, s.name(), x, t_up, t_dn);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge ck);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_q;
    #12;
    check("q in reset", q, 1'b0);
    r_n = 1'b1;
    exp_q = 1'b0;
    for (int n = 0; n < 400; n++) begin
      @(negedge ck);
      s    = op_e'($urandom_range(3));
      x    = 1'($urandom);
      t_up = 1'($urandom);
      t_dn = 1'($urandom);
      op_seen[s]++;
      #1;
      check("d_int", d_int, ref_next(s, exp_q, x, t_up, t_dn));
      exp_q = ref_next(s, exp_q, x, t_up, t_dn);
      @(posedge ck);
      #1;
      check("q", q, exp_q);
    end
    // Asynchronous reset in the middle of the low phase.
    @(negedge ck);
    s = OP_LOAD; x = 1'b1;
    @(posedge ck); #1;
    check("q loaded 1", q, 1'b1);
    #2 r_n = 1'b0;
    #1 check("q async reset", q, 1'b0);
    @(posedge ck); #1;
    check("q held in reset", q, 1'b0);
    r_n = 1'b1;
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (op_seen[k] == 0) begin
        failures++;
        $display("FAIL operation %0d never exercised", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
