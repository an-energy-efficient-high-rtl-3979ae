// loop_unit: hardware loop counters for up to four nested loops.
//
// The loop unit keeps the loop variables that the stream address generators
// need, so the function units never compute them. It holds
//   * a four-entry loop context register file (start count, end count,
//     increment, initiation interval II, loop type), written in one cycle by
//     write_context;
//   * four 9-bit loop count registers, one per context;
//   * a four-entry loop stack of context indices; its top is the loop body
//     the program is currently in;
//   * one 4-bit II counter.
// push_loop pushes a context index and loads that loop's counter with its
// start count. While the stack is not empty, the II counter counts 1..II;
// each time it reaches II (a "tick") the top loop's counter takes
// count + increment, unless the count already equals the end count: then
// the loop has finished, its entry is popped automatically and counting
// continues for the enclosing loop. An opcode may also pop explicitly.
//
// Timing: a push at clock edge e makes the counter equal start_count after
// e; it changes every II cycles after that. The end count is inclusive: the
// loop variable takes start, start+inc, ..., end, each for II cycles, and the
// pop happens at the edge that ends the last of them (a C loop i<N is
// programmed with end count N-1). Counter outputs are registered.
//
// From the published design: the context fields, the 9- and 4-bit widths,
// the stack, the II counter with its compare and clear, the start/next
// multiplexer and the end-count compare that pops the loop. This design's
// own choices: inclusive end count; a push onto a full stack drops the
// oldest (outermost) entry so the innermost four loops stay in hardware;
// push and pop in one cycle replace the top entry; a context of type
// LOOP_ZERO exports the always-zero counter used for vectors and ALU
// addresses; everything resets to zero with an empty stack.
module loop_unit
  import spm_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // write_context to the loop unit
  input  logic                  ctx_we,
  input  logic [LIDX_W-1:0]     ctx_idx,
  input  loop_ctx_t             ctx_wdata,
  // push_loop / pop_loop from the opcode
  input  logic                  push,
  input  logic [LIDX_W-1:0]     push_idx,
  input  logic                  pop,
  // to the address generators
  output loop_cnts_t            loop_cnt,
  // status
  output logic                  active,      // stack not empty
  output logic [LIDX_W-1:0]     cur_loop,    // context index on top of the stack
  output logic [LIDX_W:0]       depth,       // number of stack entries
  output logic                  tick,        // II period elapsed this cycle
  output logic                  loop_done,   // automatic pop this cycle
  output logic                  overflow     // push onto a full stack this cycle
);

  loop_ctx_t                     ctx_q   [NUM_LOOPS];
  logic [LOOP_W-1:0]             cnt_q   [NUM_LOOPS];
  logic [NUM_LOOPS-1:0][LIDX_W-1:0] stack_q;   // entry 0 is the top
  logic [LIDX_W:0]               depth_q;
  logic [II_W-1:0]               ii_cnt_q;

  loop_ctx_t                     top_ctx;
  logic [LOOP_W-1:0]             cur_cnt;
  logic [LOOP_W-1:0]             next_cnt;
  logic                          do_pop;

  assign active   = (depth_q != '0);
  assign cur_loop = stack_q[0];
  assign depth    = depth_q;
  assign top_ctx  = ctx_q[stack_q[0]];
  assign cur_cnt  = cnt_q[stack_q[0]];
  assign next_cnt = cur_cnt + top_ctx.increment;

  assign tick      = active && (ii_cnt_q == top_ctx.ii);
  assign loop_done = tick && (cur_cnt == top_ctx.end_count);
  assign do_pop    = active && (loop_done || pop);
  assign overflow  = push && !do_pop && (depth_q == (LIDX_W+1)'(NUM_LOOPS));

  // Exported counters; a LOOP_ZERO context reads as the zero counter.
  always_comb begin
    for (int k = 0; k < NUM_LOOPS; k++)
      loop_cnt[k] = (ctx_q[k].loop_type == LOOP_ZERO) ? '0 : cnt_q[k];
  end

  // Loop context register file.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NUM_LOOPS; k++) ctx_q[k] <= '0;
    end else if (ctx_we) begin
      ctx_q[ctx_idx] <= ctx_wdata;
    end
  end

  // Loop count registers: start count on push, next count on a tick.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NUM_LOOPS; k++) cnt_q[k] <= '0;
    end else begin
      if (tick && !loop_done)
        cnt_q[stack_q[0]] <= next_cnt;
      if (push)
        cnt_q[push_idx] <= ctx_q[push_idx].start_count;
    end
  end

  // Loop stack: pop first, then push.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stack_q <= '0;
      depth_q <= '0;
    end else begin
      logic [NUM_LOOPS-1:0][LIDX_W-1:0] s;
      logic [LIDX_W:0]                  d;
      s = stack_q;
      d = depth_q;
      if (do_pop) begin
        for (int k = 0; k < NUM_LOOPS-1; k++) s[k] = s[k+1];
        s[NUM_LOOPS-1] = '0;
        d = d - 1'b1;
      end
      if (push) begin
        for (int k = NUM_LOOPS-1; k > 0; k--) s[k] = s[k-1];
        s[0] = push_idx;
        if (d != (LIDX_W+1)'(NUM_LOOPS)) d = d + 1'b1;
      end
      stack_q <= s;
      depth_q <= d;
    end
  end

  // II counter: counts 1..II and restarts on a tick, a push or a pop.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      ii_cnt_q <= II_W'(1);
    else if (tick || push || do_pop)
      ii_cnt_q <= II_W'(1);
    else if (active)
      ii_cnt_q <= ii_cnt_q + 1'b1;
  end

  // A loop on the stack must have a non-zero initiation interval.
  a_ii_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
    active |-> top_ctx.ii != '0);

endmodule
