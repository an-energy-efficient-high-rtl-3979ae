// tb_fir_workload: a 32-tap FIR filter run through the memory system at its
// default sizes.
//
// y[n] = sum_{k=0..31} h[k] * x[n+k] for n = 0..NOUT-1. The testbench is
// the host and the function units:
//   * the host streams x into the Input SRAM's free bank and swaps it in;
//   * h is stored into Scratch with the loop unit walking k (port 3);
//   * for every output the outer loop body rewrites the base of the x
//     context to X_BASE + n (a write_context of the packed word, the way
//     software handles the dimensions the generator does not), and pushes
//     the inner tap loop (k = 0..31, II 1);
//   * each inner cycle loads x[n+k] on Input port 0 and h[k] on Scratch
//     port 2; the multiply-accumulate is done here;
//   * two cycles after the last tap the sum is stored to Output[n] on port 4,
//     addressed by the outer loop counter;
//   * the host swaps the Output buffer and reads y back.
// y is compared with a direct convolution computed here, every load with
// the value written, the load latency with two cycles, and the tap loop
// must take exactly 32 cycles per output.
module tb_fir_workload;
  import spm_pkg::*;

  localparam int NAG = 6, DW = 32, TAPS = 32, NOUT = 24;
  localparam int H_BASE = 512, X_BASE = 64;

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

  logic [DW-1:0] h [TAPS];
  logic [DW-1:0] x [NOUT + TAPS];

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

  // i term from loop context li (shift 0), j term from the zero counter.
  function automatic logic [31:0] vec_ctx(input int li, input int base);
    addr_ctx_t c;
    c = '0;
    c.i_sel = LIDX_W'(li); c.j_sel = LIDX_W'(3); c.base = ADDR_W'(base);
    return 32'(c);
  endfunction

  initial begin
    int n_out, store_n, pending;
    logic [DW-1:0] acc;
    int  k_q [$];
    int  c_q [$];
    bit  need_inner, finished;
    int  inner_start;

    for (int k = 0; k < TAPS; k++) h[k] = DW'($urandom_range(0, 1000)) - 500;
    for (int k = 0; k < NOUT + TAPS; k++) x[k] = DW'($urandom_range(0, 60000)) - 30000;

    idle();
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Loop contexts: 0 outer n (II 4), 1 inner k (II 1), 2 coefficient
    // store loop, 3 the always-zero counter.
    write_context(6, 0, lctx(LOOP_COUNTED, 4, 0, NOUT - 1, 1));
    write_context(6, 1, lctx(LOOP_COUNTED, 1, 0, TAPS - 1, 1));
    write_context(6, 2, lctx(LOOP_COUNTED, 1, 0, TAPS - 1, 1));
    write_context(6, 3, lctx(LOOP_ZERO, 1, 0, 0, 0));
    write_context(3, 0, vec_ctx(2, H_BASE));     // Scratch port 3: h[k] stores
    write_context(2, 0, vec_ctx(1, H_BASE));     // Scratch port 2: h[k] loads
    write_context(0, 0, vec_ctx(1, X_BASE));     // Input port 0: x[n+k]
    write_context(4, 0, vec_ctx(0, 0));          // Output port 4: y[n]

    // Host streams x in and swaps it to the cluster.
    for (int k = 0; k < NOUT + TAPS; k++) begin
      @(negedge clk);
      in_h_en = 1; in_h_we = 1; in_h_addr = ADDR_W'(X_BASE + k); in_h_wdata = x[k];
    end
    @(negedge clk); idle(); in_swap = 1;
    @(negedge clk); idle();

    // Coefficients into Scratch, one per cycle under loop control.
    lp_push = 1; lp_push_idx = 2;
    @(negedge clk); idle();
    while (loop_active) begin
      req_valid[3] = 1; req_we[3] = 1; req_ctx[3] = 0; req_wdata[3] = h[loop_cnt[2]];
      @(negedge clk); idle();
    end

    // The filter.
    n_out = 0; pending = 0; acc = '0; finished = 0; store_n = 0; inner_start = 0;
    lp_push = 1; lp_push_idx = 0;
    @(negedge clk); idle();
    need_inner = 1;
    while (!finished || k_q.size() != 0 || pending != 0) begin
      chk(rvalid[5:3] == '0 && rvalid[1] == 1'b0, "no read data on store or idle ports");
      if (rvalid[0] || rvalid[2]) begin
        int k, c;
        k = k_q.pop_front(); c = c_q.pop_front();
        chk(rvalid[0] && rvalid[2], "tap operands return together");
        chk(cycle - c == 2, "load latency two cycles");
        chk(rdata[2] == h[k], $sformatf("h[%0d]", k));
        chk(rdata[0] == x[n_out + k], $sformatf("x[%0d+%0d]", n_out, k));
        acc = acc + rdata[0] * rdata[2];
        if (k == TAPS - 1) begin
          chk(int'(loop_cnt[0]) == n_out, "outer counter still names this output");
          req_valid[4] = 1; req_we[4] = 1; req_ctx[4] = 0; req_wdata[4] = acc;
          acc = '0; n_out++; store_n++;
        end
      end
      if (loop_depth == 2 && loop_cur == 1) begin
        req_valid[0] = 1; req_ctx[0] = 0;
        req_valid[2] = 1; req_ctx[2] = 0;
        k_q.push_back(int'(loop_cnt[1])); c_q.push_back(cycle);
        if (loop_done) chk(cycle - inner_start == TAPS - 1, "tap loop takes 32 cycles");
      end
      if (need_inner) begin
        // Outer body: move the x window and enter the tap loop.
        wc_valid = 1; wc_target = 3'd0; wc_idx = 2'd0;
        wc_data = vec_ctx(1, X_BASE) + 32'(loop_cnt[0]);
        lp_push = 1; lp_push_idx = 1;
        need_inner = 0;
        inner_start = cycle + 1;
      end else if (loop_depth == 1 && loop_cur == 0 && loop_tick) begin
        if (loop_done) finished = 1;
        else need_inner = 1;
      end
      @(negedge clk);
      idle();
    end
    chk(store_n == NOUT, "one store per output");
    chk(!loop_active, "loops finished");

    // Host reads y.
    @(negedge clk); out_swap = 1;
    @(negedge clk); idle();
    for (int n = 0; n < NOUT; n++) begin
      logic [DW-1:0] e;
      e = '0;
      for (int k = 0; k < TAPS; k++) e += h[k] * x[n + k];
      out_h_en = 1; out_h_addr = ADDR_W'(n);
      @(negedge clk);
      out_h_en = 0;
      chk(out_h_rdata == e, $sformatf("y[%0d] = %0d expected %0d", n, $signed(out_h_rdata), $signed(e)));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
