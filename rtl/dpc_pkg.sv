// dpc_pkg: sizes, configuration formats and instruction encoding shared by the
// Dynamically Programmable Cache (DPC) modules.
//
// The DPC is a level-1 data cache whose lines are interleaved with rows of
// FPGA logical elements (LEs). The sizes below follow the reference design:
// 256-bit (32-byte) cache lines, an FPGA array of 16 rows of 8 LEs, 16 cache
// lines per FPGA row (256 lines, 8 KB), LEs with two 3-input look-up tables
// and a four-deep result history, and three virtualization registers (stored
// configurations) per row. The bit layout of a row configuration, the
// switch-box source codes, the address split and the instruction encoding on
// the I-cache bus are this design's own choices.
package dpc_pkg;

  // ---------------- geometry ----------------
  localparam int unsigned LINE_BITS     = 256;               // one cache line
  localparam int unsigned LINE_BYTES    = LINE_BITS / 8;     // 32
  localparam int unsigned NUM_ROWS      = 16;                // FPGA rows
  localparam int unsigned LES_PER_ROW   = 8;                 // LEs per row (one byte)
  localparam int unsigned LINES_PER_ROW = 16;                // cache lines per FPGA row
  localparam int unsigned NUM_LINES     = NUM_ROWS * LINES_PER_ROW;  // 256
  localparam int unsigned NUM_VR        = 3;                 // stored configurations per row
  localparam int unsigned HIST_DEPTH    = 4;                 // result flops per LE
  localparam int unsigned LUT_INPUTS    = 3;                 // inputs of each SRAM-LUT
  localparam int unsigned LUT_SIZE      = 1 << LUT_INPUTS;   // 8 SRAM bits per LUT

  // ---------------- CPU side address split ----------------
  localparam int unsigned ADDR_BITS   = 32;
  localparam int unsigned WORD_BITS   = 32;
  localparam int unsigned OFFSET_BITS = $clog2(LINE_BYTES);         // 5
  localparam int unsigned INDEX_BITS  = $clog2(NUM_LINES);          // 8
  localparam int unsigned TAG_BITS    = ADDR_BITS - INDEX_BITS - OFFSET_BITS; // 19
  localparam int unsigned ROW_BITS    = $clog2(NUM_ROWS);           // 4
  localparam int unsigned LSEL_BITS   = $clog2(LINES_PER_ROW);      // 4
  localparam int unsigned BSEL_BITS   = $clog2(LINE_BYTES);         // 5
  localparam int unsigned POS_BITS    = LSEL_BITS + BSEL_BITS;      // byte position in a row's group
  localparam int unsigned VR_BITS     = 2;
  localparam int unsigned IBUS_BITS   = 256;                        // I-cache bus into the decoder

  typedef logic [LINE_BITS-1:0] line_t;

  // ---------------- switch box ----------------
  // Source of one LE input. "Left" is LE i-1 of the same row; for LE 0 the
  // carry source is the row carry-in. "Previous row" is row r-1 (zero for row 0).
  typedef enum logic [2:0] {
    SRC_ZERO      = 3'd0,  // constant 0
    SRC_OPA       = 3'd1,  // bit i of operand byte A
    SRC_OPB       = 3'd2,  // bit i of operand byte B
    SRC_CARRY     = 3'd3,  // carry out of the left LE (row carry-in for LE 0)
    SRC_OWN_HIST  = 3'd4,  // this LE's selected history flop (data forwarding)
    SRC_PREV_SUM  = 3'd5,  // sum bit i of the previous row, same cycle
    SRC_PREV_SHL  = 3'd6,  // sum bit i-1 of the previous row (shift left by one)
    SRC_PREV_COUT = 3'd7   // carry out of the previous row
  } sb_src_e;

  // Row carry-in selection.
  typedef enum logic [1:0] {
    CIN_ZERO      = 2'd0,
    CIN_ONE       = 2'd1,
    CIN_PREV_COUT = 2'd2,  // carry out of the previous row (wider adders)
    CIN_PREV_NCO  = 2'd3   // inverted carry out of the previous row
  } cin_sel_e;

  // Configuration of one LE with its switch box: 27 bits.
  typedef struct packed {
    sb_src_e [LUT_INPUTS-1:0] src;       // src[k] feeds LUT address bit k
    logic    [1:0]            out_sel;   // which history flop drives the output
    logic    [LUT_SIZE-1:0]   carry_lut; // SRAM-LUT contents, carry
    logic    [LUT_SIZE-1:0]   sum_lut;   // SRAM-LUT contents, sum
  } le_cfg_t;

  // Operand / destination byte position inside a row's group of lines.
  typedef struct packed {
    logic [LSEL_BITS-1:0] line;
    logic [BSEL_BITS-1:0] byte_sel;
  } pos_t;

  // Configuration of one FPGA row: 246 bits, stored in the low bits of one
  // cache line (a virtualization register).
  typedef struct packed {
    cin_sel_e                  cin_sel;
    logic                      store_en;  // write the row's sum byte to dst each execute
    pos_t                      dst;
    pos_t                      opb;
    pos_t                      opa;
    le_cfg_t [LES_PER_ROW-1:0] le;
  } row_cfg_t;

  localparam int unsigned ROW_CFG_BITS = $bits(row_cfg_t);

  // ---------------- I-cache bus instruction ----------------
  // [255:254] opcode
  // EXEC  : [15:0] row mask, [17:16] VR context, [26:18] byte-position offset
  //         added to both operand positions
  // CFG   : [253:250] row, [249:248] VR slot, [ROW_CFG_BITS-1:0] configuration
  typedef enum logic [1:0] {
    OP_NOP  = 2'd0,
    OP_EXEC = 2'd1,
    OP_CFG  = 2'd2
  } op_e;

  // Line index (0..255) of VR slot `slot` of row `row`: slots use the first
  // NUM_VR lines of the row's group.
  function automatic logic [INDEX_BITS-1:0] vr_line_index(logic [ROW_BITS-1:0] row,
                                                         logic [VR_BITS-1:0]  slot);
    return {row, {(LSEL_BITS-VR_BITS){1'b0}}, slot};
  endfunction

endpackage
