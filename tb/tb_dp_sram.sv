// tb_dp_sram: self-checking test of the dual-ported scratch SRAM.
//
// Runs random reads and writes on both ports at once against a reference
// array kept in the testbench, checking every read word one cycle after its
// request, that a read does not see a write to the same word by the other
// port in the same cycle, and that port B's data is kept when both ports
// write one word together. Runs at the default 8 KB size.
module tb_dp_sram;
  localparam int SIZE = 8192, DW = 32, AW = 13, DEPTH = SIZE * 8 / DW;

  logic clk = 1'b0;
  logic a_en, a_we, b_en, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [DW-1:0] a_wdata, b_wdata, a_rdata, b_rdata;

  logic [DW-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  dp_sram dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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

  initial begin
    logic          ra, rb;
    logic [DW-1:0] ea, eb;
    a_en = 0; b_en = 0; a_we = 0; b_we = 0; a_addr = '0; b_addr = '0; a_wdata = '0; b_wdata = '0;

    // Fill every word through alternating ports.
    for (int k = 0; k < DEPTH; k += 2) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = AW'(k);     a_wdata = $urandom; ref_mem[k]     = a_wdata;
      b_en = 1; b_we = 1; b_addr = AW'(k + 1); b_wdata = $urandom; ref_mem[k + 1] = b_wdata;
    end
    // Upper address bits beyond the depth are ignored.
    @(negedge clk);
    a_en = 1; a_we = 0; a_addr = AW'(DEPTH + 5);
    b_en = 1; b_we = 0; b_addr = AW'(3);
    @(negedge clk);
    a_en = 0; b_en = 0;
    chk(a_rdata == ref_mem[5], "address wraps at the depth");
    chk(b_rdata == ref_mem[3], "plain read");

    // Random traffic.
    for (int n = 0; n < 6000; n++) begin
      int ia, ib;
      @(negedge clk);
      ia = $urandom_range(0, DEPTH - 1);
      ib = (n % 10 == 0) ? ia : $urandom_range(0, DEPTH - 1);
      a_en = 1'($urandom_range(0, 3) != 0); a_we = 1'($urandom); a_addr = AW'(ia); a_wdata = $urandom;
      b_en = 1'($urandom_range(0, 3) != 0); b_we = 1'($urandom); b_addr = AW'(ib); b_wdata = $urandom;
      ra = a_en && !a_we; rb = b_en && !b_we;
      ea = ref_mem[ia]; eb = ref_mem[ib];          // old contents
      if (a_en && a_we) ref_mem[ia] = a_wdata;
      if (b_en && b_we) ref_mem[ib] = b_wdata;     // port B wins a collision
      @(posedge clk);
      #1;
      if (ra) chk(a_rdata == ea, $sformatf("port A read %0d", ia));
      if (rb) chk(b_rdata == eb, $sformatf("port B read %0d", ib));
    end

    // Read everything back.
    @(negedge clk);
    a_we = 0; b_we = 0;
    for (int k = 0; k < DEPTH; k += 2) begin
      a_en = 1; a_addr = AW'(k); b_en = 1; b_addr = AW'(k + 1);
      @(negedge clk);
      chk(a_rdata == ref_mem[k] && b_rdata == ref_mem[k + 1], $sformatf("final read %0d", k));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
