// addr_gen: stream address generator for one SRAM port.
//
// A load_context/store_context instruction names one of the generator's four
// address contexts (written earlier by write_context). The context selects
// two loop counters, i and j, and the generator computes
//     address = base + (((i - comp) << x) | (j << y))
// which is the row-major address of A[i][j] when the row size and element
// size are powers of two (2^x and 2^y words). Special cases, all chosen by
// context fields:
//   * const_sel: the j term is the opcode constant (an unroll offset) instead
//     of a loop counter;
//   * alu_sel: the j term is an address computed by an ALU, which gives
//     indirect access A[B[i]] (the ALU address is offset by the base);
//   * mod_period != 0: array variable rotation. The compensation carried in
//     the opcode is subtracted from the i loop variable, so an older copy of
//     a modulo-scheduled loop body still addresses its own element after the
//     single shared loop variable has moved on.
// Vectors and pure ALU addresses select a loop context of type LOOP_ZERO,
// whose counter always reads zero.
//
// Timing: the request is taken at a clock edge; the base, the shifted i term
// and the shifted/selected j term are registered there (the registers load
// only when a request is present, acting as a clock enable), and the OR and
// the final add are combinational after the registers. The address, with the
// store flag and data, is therefore valid in the cycle after the request and
// drives the SRAM port, which is written or read at the next edge. One
// request per cycle.
//
// From the published design: the context fields and widths, the two 4x1
// loop-counter multiplexers, the subtractor on the i path, the opcode
// constant and ALU address multiplexers on the j path, the shifters, the
// pipeline registers before the add, the OR and the adder. This design's own
// choices: the compensation comes from the opcode and is applied only when
// the context's modulo period is non-zero; subtraction and shifts wrap at
// 9 and 13 bits; the store data travels through the pipeline with the
// address.
module addr_gen
  import spm_pkg::*;
#(
  parameter int unsigned DATA_W = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // write_context
  input  logic                 ctx_we,
  input  logic [AIDX_W-1:0]    ctx_idx,
  input  addr_ctx_t            ctx_wdata,
  // loop counters from the loop unit
  input  loop_cnts_t           loop_cnt,
  // load_context / store_context
  input  logic                 req_valid,
  input  logic                 req_we,       // store
  input  logic [AIDX_W-1:0]    req_ctx,      // context index from the opcode
  input  logic [CONST_W-1:0]   req_const,    // unroll constant from the opcode
  input  logic [MOD_W-1:0]     req_comp,     // rotation compensation from the opcode
  input  logic [ADDR_W-1:0]    alu_addr,     // address computed by an ALU
  input  logic [DATA_W-1:0]    req_wdata,
  // to the SRAM port
  output logic                 addr_valid,
  output logic                 addr_we,
  output logic [ADDR_W-1:0]    addr,
  output logic [DATA_W-1:0]    addr_wdata
);

  addr_ctx_t              ctx_q [NUM_ACTX];
  addr_ctx_t              c;
  logic [LOOP_W-1:0]      i_var, i_rot, j_var, j_val;
  logic [ADDR_W-1:0]      i_term, j_shift, j_term;

  logic [ADDR_W-1:0]      base_q, i_q, j_q;
  logic                   valid_q, we_q;
  logic [DATA_W-1:0]      wdata_q;

  // Address context register file.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NUM_ACTX; k++) ctx_q[k] <= '0;
    end else if (ctx_we) begin
      ctx_q[ctx_idx] <= ctx_wdata;
    end
  end

  // Address expression up to the pipeline registers.
  always_comb begin
    c       = ctx_q[req_ctx];
    i_var   = loop_cnt[c.i_sel];
    i_rot   = i_var - ((c.mod_period != '0) ? LOOP_W'(req_comp) : '0);
    i_term  = ADDR_W'(i_rot) << c.x;
    j_var   = loop_cnt[c.j_sel];
    j_val   = c.const_sel ? LOOP_W'(req_const) : j_var;
    j_shift = ADDR_W'(j_val) << c.y;
    j_term  = c.alu_sel ? alu_addr : j_shift;
  end

  // Pipeline registers, loaded only for a request.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
      we_q    <= 1'b0;
      base_q  <= '0;
      i_q     <= '0;
      j_q     <= '0;
      wdata_q <= '0;
    end else begin
      valid_q <= req_valid;
      if (req_valid) begin
        we_q    <= req_we;
        base_q  <= c.base;
        i_q     <= i_term;
        j_q     <= j_term;
        wdata_q <= req_wdata;
      end
    end
  end

  assign addr_valid = valid_q;
  assign addr_we    = valid_q && we_q;
  assign addr       = base_q + (i_q | j_q);
  assign addr_wdata = wdata_q;

endmodule
