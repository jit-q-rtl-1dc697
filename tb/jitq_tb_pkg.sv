// jitq_tb_pkg: test helpers for the JIT-Q PIM pseudo-channel.
//
// * mx_ref_block: a plain software model of the MX quantization of one
//   16-element block of BF16 values, written from the arithmetic rules, not
//   from the PIM command sequence:
//     E   = max of the 8-bit exponents of the block (shared exponent)
//     d_p = 1 when both exponents of pair p are below E, else 0
//     q_i = significand (hidden bit set unless the exponent is 0) shifted
//           right by (E - d - e_i) + (8 - m), i.e. the top m bits after
//           aligning to the sub-block exponent, truncated
//     out_i = {sign_i, 15'(q_i)}, shared word = {d_7..d_0, E}
// * mx_kernel: the host-side PIM kernel for one block, the sequence of
//   broadcast commands (max reduction for the shared exponent, compare for
//   the sub-block exponents, counter-based conditional shifts for the
//   mantissas) that every PIM unit executes in lock step on its own lanes.
//   It either stores one element per word or packs the block into the
//   dense MXn layout.
// * mx_pack_ref: the packed layout as a bit stream, from the quantized
//   elements. The field sizes (8-bit shared exponent, one bit per element
//   pair, sign and m mantissa bits per element, 16*n bits per block) follow
//   the MX format; placing all sub-block bits in the shared word and the
//   element records in order after it is this design's choice.
// * fp32_bf16_kernel / fp32_bf16_ref: scalar conversion FP32 -> BF16 with
//   round to nearest even, the element-wise case of the same idea.
package jitq_tb_pkg;
  import jitq_pkg::*;

  typedef pim_cmd_t cmd_q_t[$];

  localparam lane_t EXP_MASK = 16'h7F80;
  localparam lane_t MAN_MASK = 16'h007F;
  localparam lane_t SGN_MASK = 16'h8000;

  function automatic void mx_ref_block(input lane_t x[MX_N], input int m,
                                       output lane_t q[MX_N], output lane_t shx);
    int e[MX_N];
    int emax, d, s, sig;
    logic [7:0] dbits;
    emax = 0;
    for (int i = 0; i < MX_N; i++) begin
      e[i] = int'(x[i][14:7]);
      if (e[i] > emax) emax = e[i];
    end
    dbits = '0;
    for (int p = 0; p < MX_N/2; p++) begin
      int pm;
      pm = (e[2*p] > e[2*p+1]) ? e[2*p] : e[2*p+1];
      d  = (emax > pm) ? 1 : 0;
      dbits[p] = d[0];
      for (int k = 2*p; k < 2*p+2; k++) begin
        s   = emax - d - e[k] + (8 - m);
        sig = int'(x[k][6:0]) + ((e[k] != 0) ? 128 : 0);
        q[k] = {x[k][15], 15'((s >= 8) ? 0 : (sig >> s))};
      end
    end
    shx = {dbits, 8'(emax)};
  endfunction

  // Packed MXn storage of one block, 16*n bits per lane: the shared word
  // {d bits, E} (kept at its own address) followed by n-1 words holding the
  // 16 element records {sign, mantissa[m-1:0]} of m+1 bits, record j at bit
  // offset j*(m+1) of the stream, word k = stream bits 16k+15..16k.
  function automatic void mx_pack_ref(input lane_t q[MX_N], input int m,
                                      output lane_t w[9]);
    logic [16*9-1:0] st;
    int wd;
    wd = m + 1;
    st = '0;
    for (int j = 0; j < MX_N; j++)
      for (int b = 0; b < wd; b++)
        st[j*wd + b] = (b == m) ? q[j][15] : q[j][b];
    for (int k = 0; k < 9; k++) w[k] = st[16*k +: 16];
  endfunction

  function automatic pim_cmd_t c_op(pim_op_e op, int rd, int ra, int rb = 0,
                                    logic b_imm = 1'b0, lane_t imm = '0);
    pim_cmd_t c = '0;
    c.op = op; c.rd = REG_W'(rd); c.ra = REG_W'(ra); c.rb = REG_W'(rb);
    c.b_imm = b_imm; c.imm = imm;
    return c;
  endfunction

  // op with A from a bank word and B an immediate
  function automatic pim_cmd_t c_bank(pim_op_e op, int rd, bank_addr_t a, lane_t imm);
    pim_cmd_t c = '0;
    c.op = op; c.rd = REG_W'(rd); c.a_bank = 1'b1; c.b_imm = 1'b1; c.imm = imm;
    c.odd = a.odd; c.row = a.row; c.col = a.col;
    return c;
  endfunction

  function automatic pim_cmd_t c_wr(int ra, bank_addr_t a);
    pim_cmd_t c = '0;
    c.op = OP_WR; c.ra = REG_W'(ra); c.odd = a.odd; c.row = a.row; c.col = a.col;
    return c;
  endfunction

  // Register use: R0 E, R1/R2 pair exponents, R3 pair flag, R4 E-d+(8-m),
  // R5 shift amount, R6 mantissa, R7 scratch, R8 d bits, R9 shared word.
  // cond_shift = 0 gives the kernel for an ALU without the counter-based
  // shift: each conditional bit shift is then done with compare, shift,
  // subtract, and, subtract and add (R5 shift amount, R10 mask, R11 scratch).
  // pack = 1 stores the block in the packed layout of mx_pack_ref instead of
  // one element per word: word k goes to out_a[k], k < m. Each record is
  // built in R14, moved to its bit offset with a multiply by a power of two
  // (the low half of the product keeps the bits that fit) and ORed into one
  // of two accumulators (R12, R13); the part of a record that spills into
  // the next word is shifted down with single-bit shifts.
  function automatic void mx_kernel(ref cmd_q_t k, input bank_addr_t in_a[MX_N],
                                    input bank_addr_t out_a[MX_N],
                                    input bank_addr_t shx_a, input int m,
                                    input bit cond_shift = 1'b1,
                                    input bit pack = 1'b0);
    int wd;
    wd = m + 1;
    // 1. shared exponent: pim-MAX over the block
    k.push_back(c_bank(OP_AND, 0, in_a[0], EXP_MASK));
    for (int j = 1; j < MX_N; j++) begin
      k.push_back(c_bank(OP_AND, 1, in_a[j], EXP_MASK));
      k.push_back(c_op(OP_MAX, 0, 0, 1));
    end
    k.push_back(c_op(OP_AND, 8, 0, 0, 1'b1, 16'h0000));
    if (pack) begin
      k.push_back(c_op(OP_AND, 12, 0, 0, 1'b1, 16'h0000));
      k.push_back(c_op(OP_AND, 13, 0, 0, 1'b1, 16'h0000));
    end
    // 2. per pair: sub-block exponent, then the two mantissas
    for (int p = 0; p < MX_N/2; p++) begin
      k.push_back(c_bank(OP_AND, 1, in_a[2*p],   EXP_MASK));
      k.push_back(c_bank(OP_AND, 2, in_a[2*p+1], EXP_MASK));
      k.push_back(c_op(OP_MAX, 3, 1, 2));
      k.push_back(c_op(OP_CMP, 3, 0, 3));                       // E > pair max
      k.push_back(c_op(OP_AND, 7, 3, 0, 1'b1, lane_t'(1 << (8 + p))));
      k.push_back(c_op(OP_OR,  8, 8, 7));
      k.push_back(c_op(OP_AND, 3, 3, 0, 1'b1, 16'h0080));       // d in exponent units
      k.push_back(c_op(OP_SUB, 4, 0, 3));
      k.push_back(c_op(OP_ADD, 4, 4, 0, 1'b1, lane_t'((8 - m) << 7)));
      for (int h = 0; h < 2; h++) begin
        int j = 2*p + h;
        int re = 1 + h;
        k.push_back(c_op(OP_SUB, 5, 4, re));
        for (int s = 0; s < 7; s++) k.push_back(c_op(OP_BSHIFT, 5, 5));
        if (cond_shift) k.push_back(c_op(OP_LDCNT, 0, 5));
        k.push_back(c_bank(OP_AND, 6, in_a[j], MAN_MASK));
        k.push_back(c_op(OP_CMP, 7, re, 0, 1'b1, 16'h0000));     // hidden bit
        k.push_back(c_op(OP_AND, 7, 7, 0, 1'b1, 16'h0080));
        k.push_back(c_op(OP_OR,  6, 6, 7));
        for (int s = 0; s < 8; s++) begin
          if (cond_shift) begin
            k.push_back(c_op(OP_CBSHIFT, 6, 6));
          end else begin
            k.push_back(c_op(OP_CMP,    10, 5, 0, 1'b1, 16'h0000));  // S > 0
            k.push_back(c_op(OP_BSHIFT, 11, 6));
            k.push_back(c_op(OP_SUB,    11, 6, 11));
            k.push_back(c_op(OP_AND,    11, 11, 10));
            k.push_back(c_op(OP_SUB,    6, 6, 11));
            k.push_back(c_op(OP_ADD,    5, 5, 10));                  // S - 1
          end
        end
        if (!pack) begin
          k.push_back(c_bank(OP_AND, 7, in_a[j], SGN_MASK));
          k.push_back(c_op(OP_OR, 6, 6, 7));
          k.push_back(c_wr(6, out_a[j]));
        end else begin
          int o, wk, sh, acc;
          o   = j * wd;
          wk  = o / 16;
          sh  = o % 16;
          acc = 12 + (wk % 2);
          k.push_back(c_bank(OP_CMP, 15, in_a[j], 16'h7FFF));       // sign set
          k.push_back(c_op(OP_AND, 15, 15, 0, 1'b1, lane_t'(1 << m)));
          k.push_back(c_op(OP_OR,  14, 6, 15));                      // record
          k.push_back(c_op(OP_MUL, 15, 14, 0, 1'b1, lane_t'(1 << sh)));
          k.push_back(c_op(OP_OR,  acc, acc, 15));
          if (sh + wd > 16) begin                                    // spill
            k.push_back(c_op(OP_BSHIFT, 15, 14));
            for (int c = 1; c < 16 - sh; c++) k.push_back(c_op(OP_BSHIFT, 15, 15));
            k.push_back(c_op(OP_OR, 12 + ((wk + 1) % 2), 12 + ((wk + 1) % 2), 15));
          end
          if (o + wd >= 16 * (wk + 1)) begin                         // word full
            k.push_back(c_wr(acc, out_a[wk]));
            k.push_back(c_op(OP_AND, acc, acc, 0, 1'b1, 16'h0000));
          end
        end
      end
    end
    // 3. shared word {d bits, E}
    k.push_back(c_op(OP_MOV, 9, 0));
    for (int s = 0; s < 7; s++) k.push_back(c_op(OP_BSHIFT, 9, 9));
    k.push_back(c_op(OP_OR, 9, 9, 8));
    k.push_back(c_wr(9, shx_a));
  endfunction

  // Scalar-to-scalar conversion FP32 -> BF16 for one word position (16
  // elements per PIM unit). The FP32 value is held as two 16-bit halves in
  // the same lane of two words: hi_a (sign, exponent, top 7 mantissa bits,
  // i.e. the truncated BF16) and lo_a (the low 16 mantissa bits). Rounding
  // is to nearest, ties to even: add 1 to hi when lo > 0x8000, or when
  // lo == 0x8000 and hi is odd. A carry out of the mantissa correctly bumps
  // the exponent. NaN payloads are not treated specially.
  // R1 = (lo > 0x7FFF), R2 = (lo > 0x8000); R1 - R2 is all ones exactly
  // when lo == 0x8000.
  function automatic void fp32_bf16_kernel(ref cmd_q_t k, input bank_addr_t hi_a,
                                           input bank_addr_t lo_a,
                                           input bank_addr_t out_a);
    pim_cmd_t c;
    k.push_back(c_bank(OP_CMP, 1, lo_a, 16'h7FFF));
    k.push_back(c_bank(OP_CMP, 2, lo_a, 16'h8000));
    k.push_back(c_op(OP_SUB, 1, 1, 2));                          // tie
    k.push_back(c_bank(OP_AND, 3, hi_a, 16'h0001));              // hi odd
    k.push_back(c_op(OP_AND, 1, 1, 3));
    k.push_back(c_op(OP_AND, 2, 2, 0, 1'b1, 16'h0001));
    k.push_back(c_op(OP_OR,  1, 1, 2));                          // round up
    c = c_bank(OP_ADD, 4, hi_a, '0);
    c.b_imm = 1'b0;
    c.rb    = REG_W'(1);
    k.push_back(c);
    k.push_back(c_wr(4, out_a));
  endfunction

  function automatic lane_t fp32_bf16_ref(logic [31:0] f);
    logic up;
    up = (f[15:0] > 16'h8000) || (f[15:0] == 16'h8000 && f[16]);
    return f[31:16] + lane_t'(up);
  endfunction

  // Random BF16 weight with exponent near `base`; about 1 in 16 is zero.
  function automatic lane_t rand_bf16(int base);
    int e;
    if (($urandom % 16) == 0) return '0;
    e = base + int'($urandom % 12) - 6;
    return {1'($urandom), 8'(e), 7'($urandom)};
  endfunction

endpackage
