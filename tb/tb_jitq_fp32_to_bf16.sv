// tb_jitq_fp32_to_bf16: scalar-to-scalar just-in-time conversion, FP32
// master weights to BF16, on the full-size pseudo-channel.
//
// Scalar conversion needs no blocks and no shared exponent: every element
// is rounded on its own. 32,768 random FP32 weights (one tile group: 256
// element positions x 128 tiles) are written as two 16-bit halves, the high
// halves into the input region and the low halves into the column-output
// region, which this test uses as scratch. For every element position the
// kernel rounds the 16 lanes of every PIM unit to nearest-even BF16 and
// writes the result into the row-output region. Every result is read back
// over the host port and compared with a plain model. Special low halves
// are forced in some lanes so that ties to even (kept and rounded up),
// rounding up and a mantissa carry into the exponent all occur; each is
// counted and must occur at least once.
module tb_jitq_fp32_to_bf16;
  import jitq_pkg::*;
  import jitq_tb_pkg::*;

  localparam int UNITS  = 8;        // must match the pseudo-channel default
  localparam int NTILES = LANES * UNITS;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        cmd_valid = 0, cmd_ready;
  pim_cmd_t    cmd = '0;
  logic        host_valid = 0, host_ready, host_write = 0;
  logic [15:0] host_tile = '0;
  region_e     host_region = REG_IN;
  logic [7:0]  host_elem = '0;
  word_t       host_wdata = '0;
  logic        host_rvalid;
  word_t       host_rdata;
  logic        idle;
  logic [31:0] n_act, n_pre, n_col, n_exec, n_wait;

  int checks = 0, failures = 0;
  int m_tie_even = 0, m_tie_up = 0, m_up = 0, m_carry = 0;

  jitq_pch dut (.*);

  word_t rq [$];
  always @(posedge clk) if (rst_n && host_rvalid) rq.push_back(host_rdata);

  logic [31:0] f [NTILES][TILE_E];

  task automatic send_cmd(pim_cmd_t c);
    logic r;
    cmd = c; cmd_valid = 1;
    do begin
      r = cmd_ready;
      @(negedge clk);
    end while (!r);
    cmd_valid = 0;
  endtask

  task automatic host_req(logic wr, int tile, region_e rg, int e, word_t d);
    logic r;
    host_valid = 1; host_write = wr; host_tile = 16'(tile); host_region = rg;
    host_elem = 8'(e); host_wdata = d;
    do begin
      r = host_ready;
      @(negedge clk);
    end while (!r);
    host_valid = 0;
  endtask

  task automatic host_read(int tile, region_e rg, int e, output word_t d);
    int n0;
    n0 = rq.size();
    host_req(1'b0, tile, rg, e, '0);
    while (rq.size() == n0) @(negedge clk);
    d = rq.pop_back();
  endtask

  task automatic wait_idle();
    do @(negedge clk); while (!idle);
    repeat (4) @(negedge clk);
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < NTILES; t++)
      for (int e = 0; e < TILE_E; e++) begin
        logic [15:0] hi, lo;
        hi = rand_bf16(110 + (t % 16));
        lo = 16'($urandom);
        case (($urandom % 8))
          0: lo = 16'h8000;                               // exact tie
          1: lo = 16'h7FFF;
          2: begin hi[6:0] = 7'h7F; lo = 16'hC000; end    // carry into exponent
          default: ;
        endcase
        f[t][e] = {hi, lo};
      end
    for (int u = 0; u < UNITS; u++)
      for (int e = 0; e < TILE_E; e++) begin
        word_t wh, wl;
        for (int l = 0; l < LANES; l++) begin
          wh[l*LANE_W +: LANE_W] = f[LANES * u + l][e][31:16];
          wl[l*LANE_W +: LANE_W] = f[LANES * u + l][e][15:0];
        end
        host_req(1'b1, LANES * u, REG_IN,   e, wh);
        host_req(1'b1, LANES * u, REG_COLQ, e, wl);
      end
    wait_idle();
    for (int e = 0; e < TILE_E; e++) begin
      cmd_q_t k;
      k.delete();                   // static lifetime: empty it every pass
      fp32_bf16_kernel(k, strided_addr('0, REG_IN, 8'(e)), strided_addr('0, REG_COLQ, 8'(e)),
                       strided_addr('0, REG_ROWQ, 8'(e)));
      foreach (k[i]) send_cmd(k[i]);
    end
    wait_idle();
    for (int u = 0; u < UNITS; u++)
      for (int e = 0; e < TILE_E; e++) begin
        word_t got;
        host_read(LANES * u, REG_ROWQ, e, got);
        for (int l = 0; l < LANES; l++) begin
          logic [31:0] v;
          lane_t exp_b;
          v = f[LANES * u + l][e];
          exp_b = fp32_bf16_ref(v);
          if (v[15:0] == 16'h8000) begin
            if (exp_b == v[31:16]) m_tie_even++; else m_tie_up++;
          end else if (exp_b != v[31:16]) m_up++;
          if (exp_b[14:7] != v[30:23]) m_carry++;
          checks++;
          if (got[l*LANE_W +: LANE_W] !== exp_b) begin
            failures++;
            if (failures < 20)
              $display("FAIL unit %0d lane %0d elem %0d: fp32 %h got %h exp %h", u, l, e, v,
                       got[l*LANE_W +: LANE_W], exp_b);
          end
        end
      end
    $display("ties kept even %0d, ties rounded up %0d, other round-ups %0d, exponent carries %0d",
             m_tie_even, m_tie_up, m_up, m_carry);
    checks += 4;
    if (m_tie_even == 0) begin failures++; $display("FAIL no tie kept even"); end
    if (m_tie_up == 0)   begin failures++; $display("FAIL no tie rounded up"); end
    if (m_up == 0)       begin failures++; $display("FAIL no round-up"); end
    if (m_carry == 0)    begin failures++; $display("FAIL no exponent carry"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
