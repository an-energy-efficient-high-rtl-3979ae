// spm_system: the scratch-pad memory system of a streaming VLIW cluster.
//
// Function units reach their data through three software-managed,
// dual-ported SRAMs instead of a register file: a double-buffered Input
// SRAM that a host or DMA engine streams blocks into, a Scratch SRAM for
// local state and a double-buffered Output SRAM that results are streamed
// out of. Every SRAM port has its own stream address generator (six in
// all, four address contexts each, 24 access patterns at once), and all
// generators compute addresses from the loop variables kept by one loop
// unit. Port p of the memory system is generator p:
//     0, 1 -> Input SRAM ports A, B
//     2, 3 -> Scratch SRAM ports A, B
//     4, 5 -> Output SRAM ports A, B
//
// Instructions seen by the memory system:
//   write_context: wc_valid with wc_target (0..5 a generator, 6 the loop
//     unit), wc_idx (context register) and the 32-bit wc_data;
//   push_loop / pop_loop: lp_push with lp_push_idx, lp_pop;
//   load_context / store_context on port p: req_valid[p], req_we[p] and the
//     immediate fields req_ctx[p] (context), req_const[p] (unroll constant),
//     req_comp[p] (rotation compensation), plus alu_addr[p] for ALU-computed
//     addresses and req_wdata[p] for stores.
// Timing: a write_context or push takes effect at the next clock edge. A
// load issued in cycle t returns rdata[p] with rvalid[p] in cycle t+2 (one
// cycle in the address generator's pipeline, one in the SRAM); a store
// issued in cycle t writes the SRAM at the end of cycle t+1. Every port can
// issue one access per cycle, so six words move per cycle.
//
// From the published design: the three SRAMs and their sizes, one address
// generator per SRAM port, the shared loop unit and the four instructions.
// This design's own choices: the target encoding of write_context, the
// port numbering, the 32-bit data words and the host ports with a swap
// pulse per double-buffered SRAM. The function units, the interconnect and
// the microcode memory are outside this block: their side is the port
// arrays above.
module spm_system
  import spm_pkg::*;
#(
  parameter int unsigned IN_BYTES  = 8192,
  parameter int unsigned SCR_BYTES = 8192,
  parameter int unsigned OUT_BYTES = 2048,
  parameter int unsigned DATA_W    = 32,
  localparam int unsigned NUM_AG   = 6,
  localparam int unsigned TGT_W    = 3
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  // write_context
  input  logic                                 wc_valid,
  input  logic [TGT_W-1:0]                     wc_target,
  input  logic [1:0]                           wc_idx,
  input  logic [CTX_WORD_W-1:0]                wc_data,
  // push_loop / pop_loop
  input  logic                                 lp_push,
  input  logic [LIDX_W-1:0]                    lp_push_idx,
  input  logic                                 lp_pop,
  // load_context / store_context, one set per port
  input  logic [NUM_AG-1:0]                    req_valid,
  input  logic [NUM_AG-1:0]                    req_we,
  input  logic [NUM_AG-1:0][AIDX_W-1:0]        req_ctx,
  input  logic [NUM_AG-1:0][CONST_W-1:0]       req_const,
  input  logic [NUM_AG-1:0][MOD_W-1:0]         req_comp,
  input  logic [NUM_AG-1:0][ADDR_W-1:0]        alu_addr,
  input  logic [NUM_AG-1:0][DATA_W-1:0]        req_wdata,
  output logic [NUM_AG-1:0]                    rvalid,
  output logic [NUM_AG-1:0][DATA_W-1:0]        rdata,
  // host / DMA side of the Input SRAM
  input  logic                                 in_swap,
  input  logic                                 in_h_en,
  input  logic                                 in_h_we,
  input  logic [ADDR_W-1:0]                    in_h_addr,
  input  logic [DATA_W-1:0]                    in_h_wdata,
  output logic [DATA_W-1:0]                    in_h_rdata,
  output logic                                 in_bank,
  // host / DMA side of the Output SRAM
  input  logic                                 out_swap,
  input  logic                                 out_h_en,
  input  logic                                 out_h_we,
  input  logic [ADDR_W-1:0]                    out_h_addr,
  input  logic [DATA_W-1:0]                    out_h_wdata,
  output logic [DATA_W-1:0]                    out_h_rdata,
  output logic                                 out_bank,
  // loop unit status
  output loop_cnts_t                           loop_cnt,
  output logic                                 loop_active,
  output logic [LIDX_W-1:0]                    loop_cur,
  output logic [LIDX_W:0]                      loop_depth,
  output logic                                 loop_tick,
  output logic                                 loop_done,
  output logic                                 loop_overflow
);

  localparam logic [TGT_W-1:0] TGT_LOOP = TGT_W'(6);

  // Generator outputs towards the SRAM ports.
  logic [NUM_AG-1:0]               sp_en, sp_we;
  logic [NUM_AG-1:0][ADDR_W-1:0]   sp_addr;
  logic [NUM_AG-1:0][DATA_W-1:0]   sp_wdata;
  logic [NUM_AG-1:0][DATA_W-1:0]   sp_rdata;
  logic [NUM_AG-1:0]               rvalid_q;

  loop_unit u_loop (
    .clk       (clk),
    .rst_n     (rst_n),
    .ctx_we    (wc_valid && (wc_target == TGT_LOOP)),
    .ctx_idx   (wc_idx[LIDX_W-1:0]),
    .ctx_wdata (loop_ctx_t'(wc_data)),
    .push      (lp_push),
    .push_idx  (lp_push_idx),
    .pop       (lp_pop),
    .loop_cnt  (loop_cnt),
    .active    (loop_active),
    .cur_loop  (loop_cur),
    .depth     (loop_depth),
    .tick      (loop_tick),
    .loop_done (loop_done),
    .overflow  (loop_overflow)
  );

  for (genvar p = 0; p < NUM_AG; p++) begin : g_ag
    addr_gen #(.DATA_W(DATA_W)) u_ag (
      .clk        (clk),
      .rst_n      (rst_n),
      .ctx_we     (wc_valid && (wc_target == TGT_W'(p))),
      .ctx_idx    (wc_idx[AIDX_W-1:0]),
      .ctx_wdata  (addr_ctx_t'(wc_data)),
      .loop_cnt   (loop_cnt),
      .req_valid  (req_valid[p]),
      .req_we     (req_we[p]),
      .req_ctx    (req_ctx[p]),
      .req_const  (req_const[p]),
      .req_comp   (req_comp[p]),
      .alu_addr   (alu_addr[p]),
      .req_wdata  (req_wdata[p]),
      .addr_valid (sp_en[p]),
      .addr_we    (sp_we[p]),
      .addr       (sp_addr[p]),
      .addr_wdata (sp_wdata[p])
    );
  end

  dbuf_sram #(.SIZE_BYTES(IN_BYTES), .DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_input (
    .clk      (clk),
    .rst_n    (rst_n),
    .swap     (in_swap),
    .bank_sel (in_bank),
    .a_en (sp_en[0]), .a_we (sp_we[0]), .a_addr (sp_addr[0]), .a_wdata (sp_wdata[0]), .a_rdata (sp_rdata[0]),
    .b_en (sp_en[1]), .b_we (sp_we[1]), .b_addr (sp_addr[1]), .b_wdata (sp_wdata[1]), .b_rdata (sp_rdata[1]),
    .h_en (in_h_en),  .h_we (in_h_we),  .h_addr (in_h_addr),  .h_wdata (in_h_wdata),  .h_rdata (in_h_rdata)
  );

  dp_sram #(.SIZE_BYTES(SCR_BYTES), .DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_scratch (
    .clk (clk),
    .a_en (sp_en[2]), .a_we (sp_we[2]), .a_addr (sp_addr[2]), .a_wdata (sp_wdata[2]), .a_rdata (sp_rdata[2]),
    .b_en (sp_en[3]), .b_we (sp_we[3]), .b_addr (sp_addr[3]), .b_wdata (sp_wdata[3]), .b_rdata (sp_rdata[3])
  );

  dbuf_sram #(.SIZE_BYTES(OUT_BYTES), .DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_output (
    .clk      (clk),
    .rst_n    (rst_n),
    .swap     (out_swap),
    .bank_sel (out_bank),
    .a_en (sp_en[4]), .a_we (sp_we[4]), .a_addr (sp_addr[4]), .a_wdata (sp_wdata[4]), .a_rdata (sp_rdata[4]),
    .b_en (sp_en[5]), .b_we (sp_we[5]), .b_addr (sp_addr[5]), .b_wdata (sp_wdata[5]), .b_rdata (sp_rdata[5]),
    .h_en (out_h_en), .h_we (out_h_we), .h_addr (out_h_addr), .h_wdata (out_h_wdata), .h_rdata (out_h_rdata)
  );

  // Load data is valid the cycle after the SRAM port read.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rvalid_q <= '0;
    else        rvalid_q <= sp_en & ~sp_we;
  end

  assign rvalid = rvalid_q;
  assign rdata  = sp_rdata;

endmodule
