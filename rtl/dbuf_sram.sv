// dbuf_sram: double-buffered stream I/O SRAM (the Input and Output SRAMs).
//
// Blocks of a stream are moved in and out by a host processor or DMA engine
// while the cluster works on the previous block. The buffer has two banks,
// each a dual-ported SRAM of SIZE_BYTES. The cluster's two address
// generator ports reach the active bank; the host port reaches the other
// bank. A swap pulse exchanges the two roles at a clock edge, so a block the
// host has just written becomes visible to the cluster and the block the
// cluster has just produced becomes readable by the host. The cluster may
// use whatever space a block leaves free as temporary storage.
//
// Interface and timing: every port behaves like a dp_sram port (address,
// enable, write enable and data taken at the edge, read data one cycle
// later). bank_sel tells which bank the cluster sees (0: bank 0). Read data
// is steered by the bank selection of the cycle in which the read was
// issued, so a swap does not disturb a read in flight. Accesses issued in
// the swap cycle go to the banks chosen before the swap.
//
// From the published design: the Input and Output SRAMs are double
// buffered, 8 KB and 2 KB, streamed in and out by a host or DMA engine. This
// design's own choices: two whole banks of the stated size (one for the
// cluster, one for the host), the host using port A of its bank, and the
// swap pulse.
module dbuf_sram #(
  parameter int unsigned SIZE_BYTES = 8192,
  parameter int unsigned DATA_W     = 32,
  parameter int unsigned ADDR_W     = 13
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                swap,
  output logic                bank_sel,
  // cluster port A
  input  logic                a_en,
  input  logic                a_we,
  input  logic [ADDR_W-1:0]   a_addr,
  input  logic [DATA_W-1:0]   a_wdata,
  output logic [DATA_W-1:0]   a_rdata,
  // cluster port B
  input  logic                b_en,
  input  logic                b_we,
  input  logic [ADDR_W-1:0]   b_addr,
  input  logic [DATA_W-1:0]   b_wdata,
  output logic [DATA_W-1:0]   b_rdata,
  // host / DMA port
  input  logic                h_en,
  input  logic                h_we,
  input  logic [ADDR_W-1:0]   h_addr,
  input  logic [DATA_W-1:0]   h_wdata,
  output logic [DATA_W-1:0]   h_rdata
);

  logic sel_q;      // bank the cluster sees
  logic rsel_q;     // bank selection of last cycle, steers read data

  logic [1:0]             en_a, we_a, en_b, we_b;
  logic [ADDR_W-1:0]      addr_a [2];
  logic [ADDR_W-1:0]      addr_b [2];
  logic [DATA_W-1:0]      wd_a   [2];
  logic [DATA_W-1:0]      wd_b   [2];
  logic [DATA_W-1:0]      rd_a   [2];
  logic [DATA_W-1:0]      rd_b   [2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q  <= 1'b0;
      rsel_q <= 1'b0;
    end else begin
      rsel_q <= sel_q;
      if (swap) sel_q <= ~sel_q;
    end
  end

  assign bank_sel = sel_q;

  // Bank k: port A from the cluster's port A when active, else from the
  // host; port B from the cluster's port B when active, else idle.
  always_comb begin
    for (int k = 0; k < 2; k++) begin
      if (sel_q == k[0]) begin
        en_a[k] = a_en;  we_a[k] = a_we;  addr_a[k] = a_addr;  wd_a[k] = a_wdata;
        en_b[k] = b_en;  we_b[k] = b_we;  addr_b[k] = b_addr;  wd_b[k] = b_wdata;
      end else begin
        en_a[k] = h_en;  we_a[k] = h_we;  addr_a[k] = h_addr;  wd_a[k] = h_wdata;
        en_b[k] = 1'b0;  we_b[k] = 1'b0;  addr_b[k] = '0;      wd_b[k] = '0;
      end
    end
  end

  for (genvar k = 0; k < 2; k++) begin : g_bank
    dp_sram #(
      .SIZE_BYTES (SIZE_BYTES),
      .DATA_W     (DATA_W),
      .ADDR_W     (ADDR_W)
    ) u_bank (
      .clk     (clk),
      .a_en    (en_a[k]),
      .a_we    (we_a[k]),
      .a_addr  (addr_a[k]),
      .a_wdata (wd_a[k]),
      .a_rdata (rd_a[k]),
      .b_en    (en_b[k]),
      .b_we    (we_b[k]),
      .b_addr  (addr_b[k]),
      .b_wdata (wd_b[k]),
      .b_rdata (rd_b[k])
    );
  end

  assign a_rdata = rd_a[rsel_q];
  assign b_rdata = rd_b[rsel_q];
  assign h_rdata = rd_a[~rsel_q];

endmodule
