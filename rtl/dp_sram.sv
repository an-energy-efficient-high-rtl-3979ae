// dp_sram: software-managed dual-ported scratch SRAM.
//
// Two independent read/write ports, A and B, each driven by its own stream
// address generator. A port reads or writes one DATA_W-bit word per cycle:
// the address, write enable and write data are taken at the clock edge and
// read data appears after that edge (one cycle latency) and holds until the
// next read on the port. In one cycle a port either reads or writes; a read
// of a word the other port writes in the same cycle returns the old
// contents. If both ports write one word in the same cycle,
// port B's data is kept. Memory contents are not reset.
//
// From the published design: dual-ported, one address generator per port,
// sizes of 8 KB (Input, Scratch) and 2 KB (Output). This design's own
// choices: 32-bit words, word addressing, one-cycle synchronous read, the
// write-collision rule, and that a 13-bit generated address is reduced to
// its low log2(DEPTH) bits.
module dp_sram #(
  parameter int unsigned SIZE_BYTES = 8192,
  parameter int unsigned DATA_W     = 32,
  parameter int unsigned ADDR_W     = 13,
  localparam int unsigned DEPTH     = SIZE_BYTES * 8 / DATA_W,
  localparam int unsigned IDX_W     = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic                a_en,
  input  logic                a_we,
  input  logic [ADDR_W-1:0]   a_addr,
  input  logic [DATA_W-1:0]   a_wdata,
  output logic [DATA_W-1:0]   a_rdata,
  input  logic                b_en,
  input  logic                b_we,
  input  logic [ADDR_W-1:0]   b_addr,
  input  logic [DATA_W-1:0]   b_wdata,
  output logic [DATA_W-1:0]   b_rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  wire [IDX_W-1:0] a_idx = a_addr[IDX_W-1:0];
  wire [IDX_W-1:0] b_idx = b_addr[IDX_W-1:0];

  always_ff @(posedge clk) begin
    if (a_en && a_we) mem[a_idx] <= a_wdata;
    if (b_en && b_we) mem[b_idx] <= b_wdata;
  end

  always_ff @(posedge clk) begin
    if (a_en && !a_we) a_rdata <= mem[a_idx];
    if (b_en && !b_we) b_rdata <= mem[b_idx];
  end

endmodule
