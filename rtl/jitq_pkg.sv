// jitq_pkg: types and constants shared by the HBM-PIM just-in-time
// quantization (JIT-Q) pseudo-channel.
//
// The PIM unit works on 256-bit DRAM words split into 16 lanes of 16 bits,
// one BF16 weight per lane. Commands are broadcast to every PIM unit of a
// pseudo-channel; each command names a register-file or bank-word source,
// a register or immediate second operand and a destination register.
// The command set (add, multiply, compare, max, single-bit shift and the
// counter-based conditional shift) follows the operations the design relies
// on; the encoding, the field layout and the host-access commands are this
// design's own choices.
//
// The package also holds the pim-jitq-strided placement: an N x N (16 x 16)
// tile is laid out row-major, its first half in the even bank and its second
// half in the odd bank, one element per DRAM word, and the 16 lanes of a word
// carry the same element of 16 different tiles.
package jitq_pkg;

  // ---------------------------------------------------------------------
  // Geometry
  // ---------------------------------------------------------------------
  localparam int unsigned WORD_W   = 256;             // SIMD ALU width (bits)
  localparam int unsigned LANE_W   = 16;              // one BF16 element per lane
  localparam int unsigned LANES    = WORD_W / LANE_W; // 16
  localparam int unsigned ROWBUF_B = 1024;            // row buffer size (bytes)
  localparam int unsigned COLS     = ROWBUF_B * 8 / WORD_W; // 32 words per row
  localparam int unsigned COL_W    = $clog2(COLS);    // 5
  localparam int unsigned NREGS    = 16;              // PIM registers per ALU
  localparam int unsigned REG_W    = $clog2(NREGS);   // 4
  localparam int unsigned ROW_AW   = 16;              // row address field width
  localparam int unsigned UNIT_AW  = 8;               // PIM unit index field width
  localparam int unsigned CNT_W    = 5;               // per-lane shift counter

  // MX block geometry
  localparam int unsigned MX_N     = 16;              // elements per MX block
  localparam int unsigned TILE_E   = MX_N * MX_N;     // elements per tile (256)

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [LANE_W-1:0] lane_t;

  // ---------------------------------------------------------------------
  // PIM command set
  // ---------------------------------------------------------------------
  typedef enum logic [3:0] {
    OP_NOP     = 4'd0,
    OP_MOV     = 4'd1,  // rd = A                          (bank -> register)
    OP_WR      = 4'd2,  // bank word = R[ra]               (register -> bank)
    OP_ADD     = 4'd3,  // rd = A + B            per lane
    OP_SUB     = 4'd4,  // rd = A - B            per lane
    OP_MAX     = 4'd5,  // rd = max(A, B)        pim-MAX, unsigned
    OP_CMP     = 4'd6,  // rd = (A > B) ? ~0 : 0 pim-CMP, unsigned
    OP_AND     = 4'd7,  // rd = A & B
    OP_OR      = 4'd8,  // rd = A | B
    OP_BSHIFT  = 4'd9,  // rd = A >> 1           pim-bitSHIFT, every lane
    OP_CBSHIFT = 4'd10, // rd = S>0 ? A >> 1 : A, S-- ; counter-based bitSHIFT
    OP_LDCNT   = 4'd11, // S  = min(A, 2^CNT_W-1) per lane
    OP_HWR     = 4'd12, // host write: bank word = wdata   (one unit only)
    OP_HRD     = 4'd13, // host read:  bank word -> data bus (one unit only)
    OP_MUL     = 4'd14  // rd = A * B, low 16 bits, per lane
  } pim_op_e;

  typedef struct packed {
    pim_op_e            op;
    logic               a_bank; // A operand from the open row of bank `odd`
    logic               b_imm;  // B operand is imm replicated to all lanes
    logic               odd;    // bank of the pair: 0 even, 1 odd
    logic [ROW_AW-1:0]  row;    // row the bank access needs open
    logic [COL_W-1:0]   col;    // 256b word within the row
    logic [REG_W-1:0]   ra;
    logic [REG_W-1:0]   rb;
    logic [REG_W-1:0]   rd;
    lane_t              imm;
    logic [UNIT_AW-1:0] unit;   // target unit of OP_HWR / OP_HRD
    word_t              wdata;  // host write data
  } pim_cmd_t;

  // Does the command touch a bank column?
  function automatic logic cmd_uses_bank(pim_cmd_t c);
    return (c.op == OP_WR) || (c.op == OP_HWR) || (c.op == OP_HRD) ||
           (c.a_bank && (c.op inside {OP_MOV, OP_ADD, OP_SUB, OP_MUL, OP_MAX,
                                      OP_CMP, OP_AND, OP_OR, OP_BSHIFT,
                                      OP_CBSHIFT, OP_LDCNT}));
  endfunction

  // Does the command write the bank?
  function automatic logic cmd_writes_bank(pim_cmd_t c);
    return (c.op == OP_WR) || (c.op == OP_HWR);
  endfunction

  // ---------------------------------------------------------------------
  // pim-jitq-strided placement
  // ---------------------------------------------------------------------
  // Each tile group (LANES tiles per PIM unit, one per lane) owns
  // GROUP_ROWS consecutive rows in both banks of every PIM unit:
  //   rows 0..3   input BF16 tile           (REG_IN)
  //   rows 4..7   row-quantized elements    (REG_ROWQ)
  //   rows 8..11  column-quantized elements (REG_COLQ)
  //   row  12     shared exponents, even bank: col = {mode, block}
  localparam int unsigned GROUP_ROWS   = 16;
  localparam int unsigned REGION_ROWS  = (TILE_E / 2) / COLS; // 4

  typedef enum logic [1:0] {
    REG_IN   = 2'd0,
    REG_ROWQ = 2'd1,
    REG_COLQ = 2'd2,
    REG_SHX  = 2'd3
  } region_e;

  typedef struct packed {
    logic              odd;
    logic [ROW_AW-1:0] row;
    logic [COL_W-1:0]  col;
  } bank_addr_t;

  // Physical word of element `e` (row-major index in the tile) of `region`
  // for tile group `grp`. For REG_SHX, e[4:0] is {col_mode, block}.
  function automatic bank_addr_t strided_addr(logic [ROW_AW-1:0] grp,
                                              region_e region,
                                              logic [7:0] e);
    bank_addr_t a;
    logic [ROW_AW-1:0] base;
    base = grp * ROW_AW'(GROUP_ROWS);
    if (region == REG_SHX) begin
      a.odd = 1'b0;
      a.row = base + ROW_AW'(3 * REGION_ROWS);
      a.col = e[COL_W-1:0];
    end else begin
      a.odd = e[7];
      a.row = base + ROW_AW'(32'(region) * REGION_ROWS) + ROW_AW'(e[6:5]);
      a.col = e[4:0];
    end
    return a;
  endfunction

endpackage
