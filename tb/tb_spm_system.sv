// tb_spm_system: end-to-end test of the scratch-pad memory system at its
// default sizes (8 KB Input, 8 KB Scratch, 2 KB Output, 32-bit words).
//
// The testbench plays the host and the function units and runs a small
// streaming kernel, B[i][j] = A[i][j] + S[j], over two 4 x 8 blocks:
//   * the host writes block A into the free Input bank and swaps it in;
//   * S is stored into Scratch through ALU-computed addresses (indirect
//     mode, i term from the always-zero counter) and read back with opcode
//     unroll constants;
//   * a two-level loop nest (outer i, II 2; inner j, II 1) runs in the loop
//     unit; each inner cycle loads A[i][j] from Input port 0 and S[j] from
//     Scratch port 2, both addressed from the loop counters;
//   * the sum is stored two cycles later, when j has moved on, through
//     Output ports 4 and 5 (the same pattern in both generators) with array
//     variable rotation: the compensation in the opcode undoes the advance
//     of j;
//   * the host swaps the Output buffer and reads B back.
// Every loaded and stored word is compared with values computed here, the
// load latency (two cycles) is checked on every load, and the inner loop
// must take exactly 8 cycles per outer iteration. Each mechanism is counted
// and one that never happened counts as a failure.
module tb_spm_system;
  import spm_pkg::*;

  localparam int NAG = 6, DW = 32, NI = 4, NJ = 8;
  localparam int S_BASE = 100, B_ROWSH = 3;

  logic clk = 1'b0;
  logic rst_n;
  logic wc_valid;
  logic [2:0] wc_target;
  logic [1:0] wc_idx;
  logic [31:0] wc_data;
  logic lp_push, lp_pop;
  logic [LIDX_W-1:0] lp_push_idx;
  logic [NAG-1:0] req_valid, req_we;
  logic [NAG-1:0][AIDX_W-1:0] req_ctx;
  logic [NAG-1:0][CONST_W-1:0] req_const;
  logic [NAG-1:0][MOD_W-1:0] req_comp;
  logic [NAG-1:0][ADDR_W-1:0] alu_addr;
  logic [NAG-1:0][DW-1:0] req_wdata;
  logic [NAG-1:0] rvalid;
  logic [NAG-1:0][DW-1:0] rdata;
  logic in_swap, in_h_en, in_h_we, in_bank;
  logic [ADDR_W-1:0] in_h_addr;
  logic [DW-1:0] in_h_wdata, in_h_rdata;
  logic out_swap, out_h_en, out_h_we, out_bank;
  logic [ADDR_W-1:0] out_h_addr;
  logic [DW-1:0] out_h_wdata, out_h_rdata;
  loop_cnts_t loop_cnt;
  logic loop_active, loop_tick, loop_done, loop_overflow;
  logic [LIDX_W-1:0] loop_cur;
  logic [LIDX_W:0] loop_depth;

  spm_system dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Mechanism counters.
  int n_wc_loop, n_wc_ag, n_push, n_autopop, n_pop, n_ii_tick, n_nest;
  int n_unroll, n_alu, n_rotate, n_zero, n_in_swap, n_out_swap, n_two_ag, n_dual;

  initial begin
    repeat (20000) @(posedge clk);
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

  function automatic logic [DW-1:0] a_val(input int blk, input int i, input int j);
    return DW'((blk + 1) * 1000 + i * 37 + j * 5);
  endfunction
  function automatic logic [DW-1:0] s_val(input int j);
    return DW'(32'h0005_0000 + j * 11);
  endfunction

  task automatic idle();
    wc_valid = 0; wc_target = '0; wc_idx = '0; wc_data = '0;
    lp_push = 0; lp_pop = 0; lp_push_idx = '0;
    req_valid = '0; req_we = '0; req_ctx = '0; req_const = '0; req_comp = '0;
    alu_addr = '0; req_wdata = '0;
    in_swap = 0; in_h_en = 0; in_h_we = 0; in_h_addr = '0; in_h_wdata = '0;
    out_swap = 0; out_h_en = 0; out_h_we = 0; out_h_addr = '0; out_h_wdata = '0;
  endtask

  task automatic write_context(input int target, input int idx, input logic [31:0] data);
    @(negedge clk);
    wc_valid = 1; wc_target = 3'(target); wc_idx = 2'(idx); wc_data = data;
    if (target == 6) n_wc_loop++; else n_wc_ag++;
    @(negedge clk);
    wc_valid = 0;
  endtask

  function automatic logic [31:0] lctx(input loop_type_e t, input int ii, input int st,
                                       input int en, input int inc);
    loop_ctx_t c;
    c = '{loop_type: t, ii: II_W'(ii), start_count: LOOP_W'(st),
          end_count: LOOP_W'(en), increment: LOOP_W'(inc)};
    return 32'(c);
  endfunction

  function automatic logic [31:0] actx(input int i_sel, input int j_sel, input bit const_sel,
                                       input bit alu_sel, input int modp, input int x,
                                       input int y, input int base);
    addr_ctx_t c;
    c = '0;
    c.i_sel = LIDX_W'(i_sel); c.j_sel = LIDX_W'(j_sel); c.const_sel = const_sel;
    c.alu_sel = alu_sel; c.mod_period = MOD_W'(modp); c.x = SH_W'(x); c.y = SH_W'(y);
    c.base = ADDR_W'(base);
    return 32'(c);
  endfunction

  // Host writes block blk (row-major, 8 words per row) into the free Input bank.
  task automatic host_fill(input int blk);
    for (int i = 0; i < NI; i++)
      for (int j = 0; j < NJ; j++) begin
        @(negedge clk);
        in_h_en = 1; in_h_we = 1; in_h_addr = ADDR_W'(i * NJ + j); in_h_wdata = a_val(blk, i, j);
      end
    @(negedge clk);
    in_h_en = 0; in_h_we = 0;
  endtask

  // One block through the loop nest. Loop context 0 is the outer loop
  // (i = 0..3, II 2), context 1 the inner loop (j = 0..7, II 1).
  task automatic run_block(input int blk);
    int  li_q [$];
    int  lj_q [$];
    int  lc_q [$];
    bit  need_inner, finished;
    int  inner_start, store_cnt;
    store_cnt = 0;
    finished = 0;
    @(negedge clk);
    lp_push = 1; lp_push_idx = 0; n_push++;
    @(negedge clk);
    idle();
    need_inner = 1;
    while (!finished || li_q.size() != 0) begin
      // Stores return no read data.
      chk(rvalid[5:3] == '0 && rvalid[1] == 1'b0, "no read data for stores or idle ports");
      // Results of earlier loads: add and store with rotation.
      if (rvalid[0] || rvalid[2]) begin
        int li, lj, lc, comp;
        chk(rvalid[0] && rvalid[2] && li_q.size() != 0, "both loads return together");
        li = li_q.pop_front(); lj = lj_q.pop_front(); lc = lc_q.pop_front();
        chk(cycle - lc == 2, $sformatf("load latency %0d", cycle - lc));
        chk(rdata[0] == a_val(blk, li, lj), $sformatf("A[%0d][%0d] loaded", li, lj));
        chk(rdata[2] == s_val(lj), $sformatf("S[%0d] loaded", lj));
        chk(int'(loop_cnt[0]) == li, "outer variable unchanged at store");
        comp = int'(loop_cnt[1]) - lj;
        if (comp != 0) n_rotate++;
        begin
          int p;
          p = (lj % 2 == 0) ? 4 : 5;
          req_valid[p] = 1; req_we[p] = 1; req_ctx[p] = 0; req_comp[p] = MOD_W'(comp);
          req_wdata[p] = rdata[0] + rdata[2];
        end
        store_cnt++;
      end
      // Loads while the inner loop is on top of the stack.
      if (loop_depth == 2 && loop_cur == 1) begin
        req_valid[0] = 1; req_we[0] = 0; req_ctx[0] = 0;
        req_valid[2] = 1; req_we[2] = 0; req_ctx[2] = 0;
        li_q.push_back(int'(loop_cnt[0])); lj_q.push_back(int'(loop_cnt[1]));
        lc_q.push_back(cycle);
        if (loop_done) chk(cycle - inner_start == NJ - 1, "inner loop takes 8 cycles");
      end
      // Loop control.
      if (loop_done) n_autopop++;
      if (loop_tick && loop_cur == 0) n_ii_tick++;
      if (need_inner) begin
        lp_push = 1; lp_push_idx = 1; n_push++; n_nest++;
        need_inner = 0;
        inner_start = cycle + 1;
      end else if (loop_depth == 1 && loop_cur == 0 && loop_tick) begin
        if (loop_done) finished = 1;
        else need_inner = 1;
      end
      @(negedge clk);
      idle();
    end
    chk(store_cnt == NI * NJ, "one store per element");
    chk(!loop_active, "loop nest finished");
  endtask

  initial begin
    idle();
    n_wc_loop = 0; n_wc_ag = 0; n_push = 0; n_autopop = 0; n_pop = 0; n_ii_tick = 0;
    n_nest = 0; n_unroll = 0; n_alu = 0; n_rotate = 0; n_zero = 0; n_in_swap = 0;
    n_out_swap = 0; n_two_ag = 0; n_dual = 0;
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Loop contexts: outer, inner, the always-zero counter in context 3.
    write_context(6, 0, lctx(LOOP_COUNTED, 2, 0, NI - 1, 1));
    write_context(6, 1, lctx(LOOP_COUNTED, 1, 0, NJ - 1, 1));
    write_context(6, 3, lctx(LOOP_ZERO, 1, 0, 0, 0));
    // Input port 0: A[i][j] = i*8 + j (j on the i path, i on the j path).
    write_context(0, 0, actx(1, 0, 0, 0, 0, 0, B_ROWSH, 0));
    // Scratch port 2: vector S[j].
    write_context(2, 0, actx(1, 3, 0, 0, 0, 0, 0, S_BASE));
    // Scratch port 3: ctx 1 indirect store S[alu], ctx 2 unrolled S[const].
    write_context(3, 1, actx(3, 3, 0, 1, 0, 0, 0, S_BASE));
    write_context(3, 2, actx(3, 3, 1, 0, 0, 0, 0, S_BASE));
    // Output ports 4 and 5: B[i][j] with rotation enabled, same pattern.
    write_context(4, 0, actx(1, 0, 0, 0, 1, 0, B_ROWSH, 0));
    write_context(5, 0, actx(1, 0, 0, 0, 1, 0, B_ROWSH, 0));
    n_two_ag++;

    // S through ALU addresses; the i term comes from the zero counter.
    for (int j = 0; j < NJ; j++) begin
      @(negedge clk);
      req_valid[3] = 1; req_we[3] = 1; req_ctx[3] = 1; alu_addr[3] = ADDR_W'(j);
      req_wdata[3] = s_val(j);
      n_alu++; n_zero++;
    end
    @(negedge clk);
    idle();
    // Read S back through port 3 with unroll constants and check the
    // two-cycle latency.
    for (int j = 0; j < NJ; j++) begin
      @(negedge clk);
      req_valid[3] = 1; req_we[3] = 0; req_ctx[3] = 2; req_const[3] = CONST_W'(j);
      n_unroll++;
      @(negedge clk);
      idle();
      chk(!rvalid[3], "no data after one cycle");
      @(negedge clk);
      chk(rvalid[3] && rdata[3] == s_val(j), $sformatf("S[%0d] via unroll constant", j));
    end

    // Two blocks through the double buffers.
    host_fill(0);
    @(negedge clk); in_swap = 1; n_in_swap++;
    @(negedge clk); idle();
    chk(in_bank == 1, "Input bank swapped");
    host_fill(1);                       // next block into the free bank
    for (int blk = 0; blk < 2; blk++) begin
      run_block(blk);
      @(negedge clk); out_swap = 1; n_out_swap++;
      if (blk == 0) begin in_swap = 1; n_in_swap++; end
      @(negedge clk); idle();
      // Host drains the results.
      for (int i = 0; i < NI; i++)
        for (int j = 0; j < NJ; j++) begin
          out_h_en = 1; out_h_addr = ADDR_W'((i << B_ROWSH) + j);
          @(negedge clk);
          out_h_en = 0;
          chk(out_h_rdata == a_val(blk, i, j) + s_val(j), $sformatf("B%0d[%0d][%0d]", blk, i, j));
        end
    end

    // Both ports of Scratch in one cycle, and an explicit pop.
    @(negedge clk);
    req_valid[2] = 1; req_ctx[2] = 0;   // S[j] with j = inner counter (7 after the loop)
    req_valid[3] = 1; req_ctx[3] = 2; req_const[3] = 4'd3;
    n_dual++;
    @(negedge clk); idle();
    @(negedge clk);
    chk(rdata[2] == s_val(NJ - 1) && rdata[3] == s_val(3), "dual-port read");
    lp_push = 1; lp_push_idx = 3;
    @(negedge clk); idle();
    chk(loop_active && loop_cnt[3] == '0, "zero loop pushed");
    lp_pop = 1; n_pop++;
    @(negedge clk); idle();
    chk(!loop_active, "explicit pop");

    $display("mechanisms: wc_loop=%0d wc_ag=%0d push=%0d nest=%0d autopop=%0d pop=%0d ii_tick=%0d unroll=%0d alu=%0d rotate=%0d zero=%0d in_swap=%0d out_swap=%0d two_ag=%0d dual=%0d",
             n_wc_loop, n_wc_ag, n_push, n_nest, n_autopop, n_pop, n_ii_tick, n_unroll, n_alu,
             n_rotate, n_zero, n_in_swap, n_out_swap, n_two_ag, n_dual);
    chk(n_wc_loop > 0, "write_context to loop unit happened");
    chk(n_wc_ag > 0, "write_context to generator happened");
    chk(n_push > 0 && n_nest > 0, "push_loop and nesting happened");
    chk(n_autopop > 0, "automatic pop happened");
    chk(n_pop > 0, "explicit pop happened");
    chk(n_ii_tick > 0, "II > 1 ticks happened");
    chk(n_unroll > 0, "unroll constant used");
    chk(n_alu > 0, "ALU address used");
    chk(n_rotate > 0, "array variable rotation used");
    chk(n_zero > 0, "zero counter used");
    chk(n_in_swap > 0 && n_out_swap > 0, "buffer swaps happened");
    chk(n_two_ag > 0, "one pattern in two generators");
    chk(n_dual > 0, "both ports of one SRAM in one cycle");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
