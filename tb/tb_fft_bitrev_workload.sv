// tb_fft_bitrev_workload: the bit-reversal phase of a 128-point complex FFT
// run through the memory system at its default sizes, using indirect access
// A[B[i]] and array variable rotation.
//
//   * The host streams 128 complex points (re at 2m, im at 2m+1) into the
//     Input SRAM and swaps it in.
//   * The index table B[i] = 2 * bitrev7(i) is stored into Scratch under
//     loop control (port 3), the function units computing each entry.
//   * One loop, i = 0..127 with II 1: every cycle Scratch port 2 loads B[i].
//     Two cycles later the function units pass B[i] as the ALU address to
//     Input ports 0 (base 0, real part) and 1 (base 1, imaginary part),
//     which offset it by their base. Two cycles after that both parts are
//     stored to Output[2i] and Output[2i+1] on ports 4 and 5, addressed from
//     the loop counter with the compensation for the four cycles the loop
//     variable has moved on.
//   * The host swaps the Output buffer and reads the reordered array back.
// Every word is compared with values computed here, and the loop must take
// exactly 128 cycles.
module tb_fft_bitrev_workload;
  import spm_pkg::*;

  localparam int NAG = 6, DW = 32, NPT = 128;
  localparam int T_BASE = 1024;

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

  logic [DW-1:0] re [NPT];
  logic [DW-1:0] im [NPT];

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

  function automatic int bitrev7(input int v);
    int r;
    r = 0;
    for (int b = 0; b < 7; b++) if (v[b]) r |= 1 << (6 - b);
    return r;
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

  function automatic logic [31:0] actx(input int i_sel, input bit alu_sel, input int modp,
                                       input int x, input int base);
    addr_ctx_t c;
    c = '0;
    c.i_sel = LIDX_W'(i_sel); c.j_sel = LIDX_W'(3); c.alu_sel = alu_sel;
    c.mod_period = MOD_W'(modp); c.x = SH_W'(x); c.base = ADDR_W'(base);
    return 32'(c);
  endfunction

  initial begin
    int b_q [$];     // i whose B[i] load is in flight, with issue cycle
    int bc_q [$];
    int a_q [$];     // i whose A[B[i]] loads are in flight
    int ac_q [$];
    int n_rot, start_cycle, stores;

    for (int m = 0; m < NPT; m++) begin
      re[m] = $urandom;
      im[m] = $urandom;
    end

    idle();
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    write_context(6, 0, lctx(LOOP_COUNTED, 1, 0, NPT - 1, 1));
    write_context(6, 3, lctx(LOOP_ZERO, 1, 0, 0, 0));
    write_context(3, 0, actx(0, 0, 0, 0, T_BASE));     // B[i] stores
    write_context(2, 0, actx(0, 0, 0, 0, T_BASE));     // B[i] loads
    write_context(0, 0, actx(3, 1, 0, 0, 0));          // A.re[B[i]]: base 0 + ALU
    write_context(1, 0, actx(3, 1, 0, 0, 1));          // A.im[B[i]]: base 1 + ALU
    write_context(4, 0, actx(0, 0, 1, 1, 0));          // out.re[i] = 2i, rotated
    write_context(5, 0, actx(0, 0, 1, 1, 1));          // out.im[i] = 2i+1, rotated

    for (int m = 0; m < NPT; m++)
      for (int p = 0; p < 2; p++) begin
        @(negedge clk);
        in_h_en = 1; in_h_we = 1; in_h_addr = ADDR_W'(2 * m + p);
        in_h_wdata = p ? im[m] : re[m];
      end
    @(negedge clk); idle(); in_swap = 1;
    @(negedge clk); idle();

    // Index table.
    lp_push = 1; lp_push_idx = 0;
    @(negedge clk); idle();
    while (loop_active) begin
      req_valid[3] = 1; req_we[3] = 1; req_wdata[3] = DW'(2 * bitrev7(int'(loop_cnt[0])));
      @(negedge clk); idle();
    end

    // Gather.
    n_rot = 0; stores = 0;
    lp_push = 1; lp_push_idx = 0;
    @(negedge clk); idle();
    start_cycle = cycle;
    while (loop_active || b_q.size() != 0 || a_q.size() != 0) begin
      chk(rvalid[5:3] == '0, "no read data on store or idle ports");
      if (rvalid[0] || rvalid[1]) begin
        int i, c, comp;
        i = a_q.pop_front(); c = ac_q.pop_front();
        chk(rvalid[0] && rvalid[1] && cycle - c == 2, "element loads return after two cycles");
        chk(rdata[0] == re[bitrev7(i)] && rdata[1] == im[bitrev7(i)],
            $sformatf("A[B[%0d]]", i));
        comp = int'(loop_cnt[0]) - i;
        if (comp != 0) n_rot++;
        for (int p = 4; p < 6; p++) begin
          req_valid[p] = 1; req_we[p] = 1; req_comp[p] = MOD_W'(comp);
          req_wdata[p] = rdata[p - 4];
        end
        stores++;
      end
      if (rvalid[2]) begin
        int i, c;
        i = b_q.pop_front(); c = bc_q.pop_front();
        chk(cycle - c == 2, "table load latency two cycles");
        chk(rdata[2] == DW'(2 * bitrev7(i)), $sformatf("B[%0d]", i));
        for (int p = 0; p < 2; p++) begin
          req_valid[p] = 1; alu_addr[p] = ADDR_W'(rdata[2]);
        end
        a_q.push_back(i); ac_q.push_back(cycle);
      end
      if (loop_active) begin
        req_valid[2] = 1;
        b_q.push_back(int'(loop_cnt[0])); bc_q.push_back(cycle);
        if (loop_done) chk(cycle - start_cycle == NPT - 1, "index loop takes 128 cycles");
      end
      @(negedge clk);
      idle();
    end
    chk(stores == NPT, "one store pair per point");
    chk(n_rot > 0, "rotation used");

    @(negedge clk); out_swap = 1;
    @(negedge clk); idle();
    for (int m = 0; m < NPT; m++)
      for (int p = 0; p < 2; p++) begin
        out_h_en = 1; out_h_addr = ADDR_W'(2 * m + p);
        @(negedge clk);
        out_h_en = 0;
        chk(out_h_rdata == (p ? im[bitrev7(m)] : re[bitrev7(m)]),
            $sformatf("out[%0d].%s", m, p ? "im" : "re"));
      end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
