// pim_simd_alu: the 256-bit SIMD ALU of a PIM unit, 16 lanes of 16 bits,
// extended for quantization.
//
// Every operation works lane by lane; there is no cross-lane path. Beside
// add, subtract, multiply (low half of the product) and bitwise logic it
// provides the two operations the JIT-Q routine needs: a compare (pim-CMP,
// all-ones where A > B) with its max form (pim-MAX), and a single-bit right
// shift (pim-bitSHIFT). The shift has a plain form that shifts every lane
// and the counter-based conditional form:
// OP_LDCNT loads a per-lane shift amount S_i, and each OP_CBSHIFT shifts only
// the lanes whose S_i is above zero and decrements those counters. A lane
// therefore ends up shifted by S_i after enough OP_CBSHIFT commands.
//
// The result y is combinational from op, a and b. The counters change at the
// clock edge when en is high and op is OP_LDCNT or OP_CBSHIFT. Compare and
// max are unsigned, which orders the biased exponent fields of BF16 values
// with the sign masked off. Operand widths and encodings are this design's
// own; the conditional shift follows the design's description.
module pim_simd_alu
  import jitq_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,       // command is executed this cycle
  input  pim_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y,
  output logic [LANES*CNT_W-1:0] cnt_q  // per-lane shift counters
);

  localparam int unsigned CNT_MAX = (1 << CNT_W) - 1;

  logic [CNT_W-1:0] cnt [LANES];

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      lane_t la, lb, ly;
      la = a[l*LANE_W +: LANE_W];
      lb = b[l*LANE_W +: LANE_W];
      unique case (op)
        OP_MOV:     ly = la;
        OP_ADD:     ly = la + lb;
        OP_SUB:     ly = la - lb;
        OP_MUL:     ly = la * lb;
        OP_MAX:     ly = (la > lb) ? la : lb;
        OP_CMP:     ly = (la > lb) ? '1 : '0;
        OP_AND:     ly = la & lb;
        OP_OR:      ly = la | lb;
        OP_BSHIFT:  ly = la >> 1;
        OP_CBSHIFT: ly = (cnt[l] != '0) ? (la >> 1) : la;
        default:    ly = la;
      endcase
      y[l*LANE_W +: LANE_W] = ly;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < LANES; l++) cnt[l] <= '0;
    end else if (en) begin
      for (int l = 0; l < LANES; l++) begin
        if (op == OP_LDCNT) begin
          cnt[l] <= (a[l*LANE_W +: LANE_W] > lane_t'(CNT_MAX))
                      ? CNT_W'(CNT_MAX) : a[l*LANE_W +: CNT_W];
        end else if (op == OP_CBSHIFT && cnt[l] != '0) begin
          cnt[l] <= cnt[l] - 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int l = 0; l < LANES; l++) cnt_q[l*CNT_W +: CNT_W] = cnt[l];
  end

endmodule
