// tb_loop_unit: self-checking test of the loop unit.
//
// Drives write_context, push_loop and pop_loop and checks, cycle by cycle,
// the exported counters, the stack depth and the automatic pop against
// values written out from the loop parameters: a loop (start, end, inc, II)
// holds start + n*inc during cycles [n*II, (n+1)*II) after its push and pops
// at the end of cycle ((end-start)/inc + 1)*II - 1. Also checks nesting, the
// always-zero counter, stack overflow and an explicit pop.
module tb_loop_unit;
  import spm_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  logic ctx_we, push, pop;
  logic [LIDX_W-1:0] ctx_idx, push_idx;
  loop_ctx_t ctx_wdata;
  loop_cnts_t loop_cnt;
  logic active, tick, loop_done, overflow;
  logic [LIDX_W-1:0] cur_loop;
  logic [LIDX_W:0] depth;

  int checks = 0, failures = 0;

  loop_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  task automatic idle();
    ctx_we = 0; push = 0; pop = 0; ctx_idx = '0; push_idx = '0; ctx_wdata = '0;
  endtask

  task automatic write_ctx(input int idx, input loop_type_e t, input int ii,
                           input int st, input int en, input int inc);
    @(negedge clk);
    ctx_we = 1; ctx_idx = LIDX_W'(idx);
    ctx_wdata = '{loop_type: t, ii: II_W'(ii), start_count: LOOP_W'(st),
                  end_count: LOOP_W'(en), increment: LOOP_W'(inc)};
    @(negedge clk);
    idle();
  endtask

  task automatic do_push(input int idx);
    @(negedge clk);
    push = 1; push_idx = LIDX_W'(idx);
    @(negedge clk);
    idle();
  endtask

  // Runs one loop alone from its push to its pop and checks every cycle.
  task automatic run_single(input int idx, input int ii, input int st, input int en, input int inc);
    int trips, total;
    trips = (en - st) / inc + 1;
    total = trips * ii;
    do_push(idx);                  // now in cycle 0 after the push
    for (int c = 0; c < total; c++) begin
      chk(active && cur_loop == LIDX_W'(idx), "loop active on top");
      chk(loop_cnt[idx] == LOOP_W'(st + (c / ii) * inc), $sformatf("count cycle %0d = %0d", c, loop_cnt[idx]));
      chk(loop_done == (c == total - 1), $sformatf("loop_done at cycle %0d", c));
      @(negedge clk);
    end
    chk(!active && depth == 0, "stack empty after last iteration");
  endtask

  initial begin
    idle();
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(!active && depth == 0, "empty after reset");

    // Single loops with different II and increments.
    write_ctx(0, LOOP_COUNTED, 3, 2, 8, 3);
    run_single(0, 3, 2, 8, 3);
    write_ctx(1, LOOP_COUNTED, 1, 0, 15, 1);
    run_single(1, 1, 0, 15, 1);
    write_ctx(2, LOOP_COUNTED, 15, 100, 104, 2);
    run_single(2, 15, 100, 104, 2);

    // Nested: outer ctx 1 (II 3, 0..2), inner ctx 2 (II 1, 10..13). The
    // inner loop is entered in the second cycle of each outer period; after
    // the inner pop the outer loop runs a fresh period of three cycles.
    write_ctx(1, LOOP_COUNTED, 3, 0, 2, 1);
    write_ctx(2, LOOP_COUNTED, 1, 10, 13, 1);
    do_push(1);
    for (int o = 0; o < 3; o++) begin
      chk(cur_loop == 1 && loop_cnt[1] == LOOP_W'(o), $sformatf("outer value %0d", o));
      @(negedge clk);
      push = 1; push_idx = 2;
      chk(!tick && !loop_done, "no tick in second cycle of outer period");
      @(negedge clk);
      idle();
      chk(depth == 2 && cur_loop == 2, "inner on top of outer");
      for (int k = 0; k < 4; k++) begin
        chk(loop_cnt[2] == LOOP_W'(10 + k), $sformatf("inner value %0d", 10 + k));
        chk(loop_cnt[1] == LOOP_W'(o), "outer frozen while inner runs");
        chk(loop_done == (k == 3), "inner pop on last value");
        @(negedge clk);
      end
      chk(depth == 1 && cur_loop == 1, "back in outer loop");
      chk(loop_cnt[1] == LOOP_W'(o) && !tick, "outer period restarted");
      @(negedge clk);
      chk(loop_cnt[1] == LOOP_W'(o) && !tick, "outer still in its period");
      @(negedge clk);
      chk(tick && loop_done == (o == 2), "outer tick at end of its period");
      @(negedge clk);
    end
    chk(!active, "nest finished");

    // Always-zero counter.
    write_ctx(3, LOOP_ZERO, 1, 7, 300, 1);
    do_push(3);
    repeat (3) begin
      chk(loop_cnt[3] == '0, "zero counter reads zero");
      @(negedge clk);
    end
    pop = 1;
    chk(active, "zero loop on stack before pop");
    @(negedge clk);
    idle();
    chk(!active, "explicit pop empties stack");

    // Overflow: five pushes of long loops, the oldest entry is dropped.
    for (int k = 0; k < 4; k++) write_ctx(k, LOOP_COUNTED, 15, 0, 500, 1);
    for (int k = 0; k < 4; k++) begin
      @(negedge clk); push = 1; push_idx = LIDX_W'(k);
      chk(!overflow, "no overflow below four entries");
    end
    @(negedge clk); push = 1; push_idx = 1;
    chk(overflow, "overflow on fifth push");
    @(negedge clk); idle();
    chk(depth == 4 && cur_loop == 1, "depth capped at four");
    // pop down: expect 1, 3, 2, 1 (entry 0 was dropped)
    for (int k = 0; k < 4; k++) begin
      int exp_top;
      exp_top = (k == 0) ? 1 : 4 - k;
      chk(cur_loop == LIDX_W'(exp_top), $sformatf("stack order entry %0d is %0d", k, cur_loop));
      pop = 1;
      @(negedge clk);
      idle();
    end
    chk(!active, "stack empty after four pops");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
