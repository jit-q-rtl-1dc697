// tb_pim_simd_alu: every lane operation on random operands against a
// per-lane software model, then the counter-based conditional shift: load
// random per-lane amounts (some above the counter range), apply a run of
// conditional shifts and check that each lane moved by exactly its amount
// (saturated) and that the counters end at zero.
module tb_pim_simd_alu;
  import jitq_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    en = 0;
  pim_op_e op = OP_NOP;
  word_t   a = '0, b = '0, y;
  logic [LANES*CNT_W-1:0] cnt_q;

  int checks = 0, failures = 0;

  pim_simd_alu dut (.*);

  function automatic word_t rnd_word();
    word_t w;
    for (int i = 0; i < WORD_W / 32; i++) w[i*32 +: 32] = $urandom;
    return w;
  endfunction

  function automatic lane_t ref_lane(pim_op_e o, lane_t x, lane_t z);
    case (o)
      OP_ADD:    return x + z;
      OP_SUB:    return x - z;
      OP_MUL:    return 16'((32'(x) * 32'(z)) & 32'hFFFF);
      OP_MAX:    return (x >= z) ? x : z;
      OP_CMP:    return (x > z) ? 16'hFFFF : 16'h0000;
      OP_AND:    return x & z;
      OP_OR:     return x | z;
      OP_BSHIFT: return {1'b0, x[15:1]};
      default:   return x;
    endcase
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static pim_op_e ops [9] = '{OP_MOV, OP_ADD, OP_SUB, OP_MUL, OP_MAX, OP_CMP, OP_AND, OP_OR, OP_BSHIFT};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int it = 0; it < 900; it++) begin
      pim_op_e o;
      word_t x, z;
      o = ops[it % 9];
      x = rnd_word();
      z = rnd_word();
      if (it % 5 == 0) z = x;             // equal operands for compare/max
      op <= o; a <= x; b <= z; en <= 1;
      #1;
      for (int l = 0; l < LANES; l++) begin
        checks++;
        if (y[l*LANE_W +: LANE_W] !== ref_lane(o, x[l*LANE_W +: LANE_W], z[l*LANE_W +: LANE_W])) begin
          failures++;
          $display("FAIL op %s lane %0d", o.name(), l);
        end
      end
      @(posedge clk);
    end
    // counter-based conditional shifts
    for (int rep = 0; rep < 20; rep++) begin
      word_t amt, data, cur;
      int s [LANES];
      for (int l = 0; l < LANES; l++) begin
        s[l] = (l == 0) ? 0 : (l == 1) ? 40 : int'($urandom % 20);
        amt[l*LANE_W +: LANE_W] = lane_t'(s[l]);
        if (s[l] > 31) s[l] = 31;
      end
      data = rnd_word();
      op <= OP_LDCNT; a <= amt; en <= 1;
      @(posedge clk);
      #1;
      for (int l = 0; l < LANES; l++) begin
        checks++;
        if (cnt_q[l*CNT_W +: CNT_W] !== CNT_W'(s[l])) begin
          failures++; $display("FAIL counter load lane %0d", l);
        end
      end
      cur = data;
      for (int k = 0; k < 32; k++) begin
        op <= OP_CBSHIFT; a <= cur; en <= 1;
        #1;
        cur = y;
        @(posedge clk);
      end
      #1;
      for (int l = 0; l < LANES; l++) begin
        checks += 2;
        if (cur[l*LANE_W +: LANE_W] !== (data[l*LANE_W +: LANE_W] >> s[l])) begin
          failures++; $display("FAIL conditional shift lane %0d amount %0d", l, s[l]);
        end
        if (cnt_q[l*CNT_W +: CNT_W] !== '0) begin
          failures++; $display("FAIL counter lane %0d not drained", l);
        end
      end
      // idle cycle: counters hold when en is low
      op <= OP_LDCNT; a <= amt; en <= 0;
      @(posedge clk);
      #1;
      checks++;
      if (cnt_q !== '0) begin failures++; $display("FAIL counters moved with en low"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
