// spm_pkg: types and constants shared by the scratch-pad memory system.
//
// The memory system feeds the function units of a VLIW cluster from three
// dual-ported scratch SRAMs. Each SRAM port has a stream address generator
// that computes array addresses from loop counters kept by a loop unit.
// Everything the compiler programs is a 32-bit context word:
//   * a loop context (start, end, increment, initiation interval, type),
//     written into the loop unit's four-entry context register file;
//   * an address context (loop-counter selects, shift amounts, modulo period,
//     base address at the least significant end), written into one of the
//     four context registers of an address generator.
// The field widths (9-bit loop counts, 4-bit II, 4-bit shift amounts and
// modulo period, 13-bit addresses) are the ones the design is published
// with. The order of the loop context fields, the 1-bit loop type and the
// 2-bit counter selects are this design's own choices.
package spm_pkg;

  // Loop unit sizes.
  localparam int unsigned NUM_LOOPS = 4;   // loop contexts, counters and stack entries
  localparam int unsigned LOOP_W    = 9;   // loop count / increment width
  localparam int unsigned II_W      = 4;   // initiation interval width
  localparam int unsigned LIDX_W    = $clog2(NUM_LOOPS);

  // Address generator sizes.
  localparam int unsigned NUM_ACTX  = 4;   // address contexts per generator
  localparam int unsigned AIDX_W    = $clog2(NUM_ACTX);
  localparam int unsigned ADDR_W    = 13;  // generated address width
  localparam int unsigned SH_W      = 4;   // shift amount (x, y) width
  localparam int unsigned MOD_W     = 4;   // modulo period / compensation width
  localparam int unsigned CONST_W   = 4;   // unroll constant from the opcode

  localparam int unsigned CTX_WORD_W = 32; // width of a write_context source

  // Loop type. A ZERO context is the special always-zero loop counter that
  // vectors (one loop variable) and ALU addresses (none) select.
  typedef enum logic {
    LOOP_COUNTED = 1'b0,
    LOOP_ZERO    = 1'b1
  } loop_type_e;

  // Loop context: 1 + 4 + 9 + 9 + 9 = 32 bits.
  typedef struct packed {
    loop_type_e              loop_type;
    logic [II_W-1:0]         ii;
    logic [LOOP_W-1:0]       start_count;
    logic [LOOP_W-1:0]       end_count;
    logic [LOOP_W-1:0]       increment;
  } loop_ctx_t;

  // Address context, in the field order of the generator's context word,
  // base address at the lsb so that software can add to the packed word:
  // 1 + 2 + 2 + 1 + 1 + 4 + 4 + 4 + 13 = 32 bits.
  typedef struct packed {
    logic                    rsvd;
    logic [LIDX_W-1:0]       i_sel;       // loop counter for the i term
    logic [LIDX_W-1:0]       j_sel;       // loop counter for the j term
    logic                    const_sel;   // j term uses the opcode constant
    logic                    alu_sel;     // j term replaced by the ALU address
    logic [MOD_W-1:0]        mod_period;  // non-zero enables array variable rotation
    logic [SH_W-1:0]         x;           // left shift of the i term
    logic [SH_W-1:0]         y;           // left shift of the j term
    logic [ADDR_W-1:0]       base;
  } addr_ctx_t;

  // Counter values the loop unit exports to every address generator.
  typedef logic [NUM_LOOPS-1:0][LOOP_W-1:0] loop_cnts_t;

endpackage
