// tb_addr_gen: self-checking test of the stream address generator.
//
// Loads random address contexts, drives random loop counters and random
// requests, and checks every address one cycle after its request against
//     base + (((i - comp*[mod!=0]) << x) | (j' << y))   with j' = const or
//     loop counter, and the shifted j term replaced by the ALU address when
//     alu_sel is set,
// evaluated here with integer arithmetic and masked to 9 and 13 bits. Also
// checks the store flag and data, the one-cycle latency, that the pipeline
// registers hold when no request is present, and a few hand-computed cases
// (A[i][j].imag from a row-major array of two-word structs, a rotated
// access, an indirect access).
module tb_addr_gen;
  import spm_pkg::*;

  localparam int DW = 32;

  logic clk = 1'b0;
  logic rst_n;
  logic ctx_we;
  logic [AIDX_W-1:0] ctx_idx;
  addr_ctx_t ctx_wdata;
  loop_cnts_t loop_cnt;
  logic req_valid, req_we;
  logic [AIDX_W-1:0] req_ctx;
  logic [CONST_W-1:0] req_const;
  logic [MOD_W-1:0] req_comp;
  logic [ADDR_W-1:0] alu_addr;
  logic [DW-1:0] req_wdata;
  logic addr_valid, addr_we;
  logic [ADDR_W-1:0] addr;
  logic [DW-1:0] addr_wdata;

  addr_ctx_t model_ctx [NUM_ACTX];
  int checks = 0, failures = 0;

  addr_gen dut (.*);

  always #5 clk = ~clk;

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

  function automatic int expect_addr(input addr_ctx_t c, input loop_cnts_t lc,
                                     input int cst, input int comp, input int alu);
    int iv, jv, it, jt;
    iv = int'(lc[c.i_sel]);
    if (c.mod_period != 0) iv = (iv - comp) & 32'h1ff;
    it = (iv * (1 << c.x)) & 32'h1fff;
    jv = c.const_sel ? cst : int'(lc[c.j_sel]);
    jt = c.alu_sel ? alu : ((jv * (1 << c.y)) & 32'h1fff);
    return (int'(c.base) + (it | jt)) & 32'h1fff;
  endfunction

  task automatic write_ctx(input int idx, input addr_ctx_t c);
    @(negedge clk);
    ctx_we = 1; ctx_idx = AIDX_W'(idx); ctx_wdata = c;
    model_ctx[idx] = c;
    @(negedge clk);
    ctx_we = 0;
  endtask

  // Issues one request in the current cycle and checks the address in the
  // next one.
  task automatic access(input int idx, input int cst, input int comp, input int alu,
                        input logic we, input int expected, input string what);
    int e;
    @(negedge clk);
    req_valid = 1; req_ctx = AIDX_W'(idx); req_const = CONST_W'(cst);
    req_comp = MOD_W'(comp); alu_addr = ADDR_W'(alu); req_we = we;
    req_wdata = $urandom;
    e = (expected >= 0) ? expected : expect_addr(model_ctx[idx], loop_cnt, cst, comp, alu);
    begin
      logic [DW-1:0] wd;
      wd = req_wdata;
      @(negedge clk);
      req_valid = 0;
      chk(addr_valid, {what, ": valid one cycle after request"});
      chk(addr == ADDR_W'(e), $sformatf("%s: addr %0d expected %0d", what, addr, e));
      chk(addr_we == we, {what, ": store flag"});
      if (we) chk(addr_wdata == wd, {what, ": store data"});
    end
  endtask

  initial begin
    addr_ctx_t c;
    ctx_we = 0; ctx_idx = '0; ctx_wdata = '0; loop_cnt = '0;
    req_valid = 0; req_we = 0; req_ctx = '0; req_const = '0; req_comp = '0;
    alu_addr = '0; req_wdata = '0;
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(!addr_valid, "idle after reset");

    // A[i][j].imag, A row-major, 16 Complex (2 words) per row, base 0x100:
    // address = 0x100 + 1 + i*32 + j*2. i in counter 1, j in counter 2.
    c = '0;
    c.i_sel = 1; c.j_sel = 2; c.x = 5; c.y = 1; c.base = 13'h101;
    write_ctx(0, c);
    loop_cnt = '0; loop_cnt[1] = 9'd3; loop_cnt[2] = 9'd7;
    access(0, 0, 0, 0, 1'b0, 13'h101 + 3*32 + 7*2, "A[3][7].imag");

    // Hold: with no request the address stays put.
    loop_cnt[1] = 9'd9;
    @(negedge clk);
    chk(!addr_valid && addr == 13'(13'h101 + 3*32 + 7*2), "pipeline holds without request");

    // Unrolled by 4: j term is the opcode constant.
    c.const_sel = 1;
    write_ctx(1, c);
    access(1, 3, 0, 0, 1'b0, 13'h101 + 9*32 + 3*2, "unroll constant 3");

    // Rotation: mod period set, compensation 2 subtracted from i.
    c = '0; c.i_sel = 0; c.j_sel = 3; c.mod_period = 4'd5; c.x = 2; c.base = 13'd40;
    write_ctx(2, c);
    loop_cnt[0] = 9'd6; loop_cnt[3] = 9'd0;
    access(2, 0, 2, 0, 1'b1, 40 + (6 - 2) * 4, "rotated A[i-2]");
    // Same compensation ignored when the period field is zero.
    c.mod_period = 0;
    write_ctx(3, c);
    access(3, 0, 2, 0, 1'b0, 40 + 6 * 4, "no rotation when period is zero");

    // Indirect: base 1000 + ALU address 77, i from a zero counter.
    c = '0; c.alu_sel = 1; c.i_sel = 3; c.base = 13'd1000;
    write_ctx(0, c);
    access(0, 0, 0, 77, 1'b0, 1077, "indirect A[B[i]]");

    // Random contexts and requests.
    for (int n = 0; n < 400; n++) begin
      if (n % 8 == 0) begin
        c = addr_ctx_t'($urandom);
        write_ctx($urandom_range(0, NUM_ACTX-1), c);
      end
      for (int k = 0; k < NUM_LOOPS; k++) loop_cnt[k] = LOOP_W'($urandom);
      access($urandom_range(0, NUM_ACTX-1), $urandom_range(0, 15), $urandom_range(0, 15),
             $urandom_range(0, 8191), 1'($urandom), -1, $sformatf("random %0d", n));
    end

    // Back-to-back requests, one address per cycle.
    for (int k = 0; k < NUM_LOOPS; k++) loop_cnt[k] = LOOP_W'(k + 1);
    @(negedge clk);
    for (int n = 0; n < 8; n++) begin
      int e;
      req_valid = 1; req_ctx = AIDX_W'(n % NUM_ACTX); req_const = CONST_W'(n);
      req_comp = MOD_W'(n); alu_addr = ADDR_W'(n * 100); req_we = 0;
      e = expect_addr(model_ctx[n % NUM_ACTX], loop_cnt, n, n, n * 100);
      @(negedge clk);
      chk(addr_valid && addr == ADDR_W'(e), $sformatf("back-to-back %0d", n));
    end
    req_valid = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
