// tb_dbuf_sram: self-checking test of the double-buffered I/O SRAM.
//
// Streams blocks through the buffer the way a host and the cluster share
// it: the host writes block n into the free bank while the cluster reads
// block n-1 and writes results into the active bank; a swap then exchanges
// the banks and the host reads the results back. Every word is compared
// with what the testbench wrote. Also checks bank_sel, that the banks are
// really separate, and that a read issued in the swap cycle returns data
// from the bank selected when it was issued. Runs at the Output SRAM's
// 2 KB size to keep the run short.
module tb_dbuf_sram;
  localparam int SIZE = 2048, DW = 32, AW = 13, DEPTH = SIZE * 8 / DW;
  localparam int BLK = 64;

  logic clk = 1'b0;
  logic rst_n, swap, bank_sel;
  logic a_en, a_we, b_en, b_we, h_en, h_we;
  logic [AW-1:0] a_addr, b_addr, h_addr;
  logic [DW-1:0] a_wdata, b_wdata, h_wdata, a_rdata, b_rdata, h_rdata;

  int checks = 0, failures = 0;

  dbuf_sram #(.SIZE_BYTES(SIZE), .DATA_W(DW), .ADDR_W(AW)) dut (.*);

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

  function automatic logic [DW-1:0] pattern(input int blk, input int k);
    return DW'(blk * 32'h0001_0000 + k * 7 + 1);
  endfunction

  task automatic idle();
    swap = 0; a_en = 0; b_en = 0; h_en = 0; a_we = 0; b_we = 0; h_we = 0;
    a_addr = '0; b_addr = '0; h_addr = '0; a_wdata = '0; b_wdata = '0; h_wdata = '0;
  endtask

  initial begin
    idle();
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(bank_sel == 0, "cluster starts on bank 0");

    // Host fills block 0 into bank 1, cluster writes marker words in bank 0.
    for (int k = 0; k < BLK; k++) begin
      h_en = 1; h_we = 1; h_addr = AW'(k); h_wdata = pattern(0, k);
      a_en = 1; a_we = 1; a_addr = AW'(k); a_wdata = ~pattern(0, k);
      @(negedge clk);
    end
    idle();
    // Separate banks: the cluster sees its markers, the host its block.
    for (int k = 0; k < BLK; k++) begin
      a_en = 1; a_addr = AW'(k); h_en = 1; h_addr = AW'(k);
      @(negedge clk);
      chk(a_rdata == ~pattern(0, k) && h_rdata == pattern(0, k), $sformatf("banks separate %0d", k));
    end
    idle();

    for (int blk = 1; blk <= 4; blk++) begin
      // Swap, with a host read and a cluster read issued in the swap cycle.
      swap = 1;
      h_en = 1; h_addr = AW'(2);
      a_en = 1; a_addr = AW'(2);
      @(negedge clk);
      idle();
      chk(bank_sel == blk[0], $sformatf("bank_sel after swap %0d", blk));
      chk(h_rdata == ((blk == 1) ? pattern(0, 2) : pattern(blk - 1, 2)),
          "host read in swap cycle from old host bank");
      chk(a_rdata == ((blk == 1) ? ~pattern(0, 2) : (pattern(blk - 2, 2) + 32'd5)),
          "cluster read in swap cycle from old cluster bank");
      // Cluster reads block blk-1 on port A and B, writes results over it;
      // host meanwhile writes block blk.
      for (int k = 0; k < BLK; k += 2) begin
        a_en = 1; a_we = 0; a_addr = AW'(k);
        b_en = 1; b_we = 0; b_addr = AW'(k + 1);
        h_en = 1; h_we = 1; h_addr = AW'(k); h_wdata = pattern(blk, k);
        @(negedge clk);
        chk(a_rdata == pattern(blk - 1, k) && b_rdata == pattern(blk - 1, k + 1),
            $sformatf("cluster reads block %0d word %0d", blk - 1, k));
        a_en = 1; a_we = 1; a_addr = AW'(k);     a_wdata = pattern(blk - 1, k) + 32'd5;
        b_en = 1; b_we = 1; b_addr = AW'(k + 1); b_wdata = pattern(blk - 1, k + 1) + 32'd5;
        h_en = 1; h_we = 1; h_addr = AW'(k + 1); h_wdata = pattern(blk, k + 1);
        @(negedge clk);
      end
      idle();
      // Host reads back the results of the block before, still in its bank
      // from the previous round (nothing yet for the first round).
      if (blk >= 2) begin
        for (int k = BLK; k < BLK + 4; k++) begin
          h_en = 1; h_addr = AW'(k);
          @(negedge clk);
        end
        idle();
      end
    end
    // Final swap: the host reads the results of block 3.
    swap = 1;
    @(negedge clk);
    idle();
    for (int k = 0; k < BLK; k++) begin
      h_en = 1; h_addr = AW'(k);
      @(negedge clk);
      chk(h_rdata == pattern(3, k) + 32'd5, $sformatf("host reads result %0d", k));
    end
    idle();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
