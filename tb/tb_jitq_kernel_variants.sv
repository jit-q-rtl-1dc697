// tb_jitq_kernel_variants: cost of the counter-based conditional shift.
//
// Quantizes the 16 row blocks of 128 tiles (all lanes of all 8 PIM units)
// from BF16 to MX6 twice on the full-size pseudo-channel: once with the
// kernel that uses the per-lane shift counters (OP_LDCNT + OP_CBSHIFT), and
// once with a kernel for an ALU without them, in which every conditional
// single-bit shift takes six plain commands (compare, shift, subtract, and,
// subtract, add). The second result is written to the column-output region
// so that both can be checked against the reference model. The test then
// compares issued commands and cycles: the counter-based kernel must be
// faster. Both runs report their command and cycle counts.
module tb_jitq_kernel_variants;
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

  jitq_pch dut (.*);

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  word_t rq [$];
  always @(posedge clk) if (rst_n && host_rvalid) rq.push_back(host_rdata);

  lane_t x [NTILES][TILE_E];

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

  // row blocks of all tiles into region `dst`, shared words at slot base `sb`
  task automatic run_pass(bit cond, region_e dst, int sb, output longint cycles,
                          output int cmds);
    longint c0;
    int e0;
    c0 = cyc;
    e0 = int'(n_exec);
    for (int b = 0; b < MX_N; b++) begin
      cmd_q_t k;
      bank_addr_t in_a[MX_N], out_a[MX_N], shx_a;
      for (int j = 0; j < MX_N; j++) begin
        in_a[j]  = strided_addr('0, REG_IN, 8'(16 * b + j));
        out_a[j] = strided_addr('0, dst,    8'(16 * b + j));
      end
      shx_a = strided_addr('0, REG_SHX, 8'(sb + b));
      mx_kernel(k, in_a, out_a, shx_a, 4, cond);
      foreach (k[i]) send_cmd(k[i]);
    end
    wait_idle();
    cycles = cyc - c0;
    cmds   = int'(n_exec) - e0;
  endtask

  task automatic check_pass(region_e dst, int sb);
    for (int u = 0; u < UNITS; u++)
      for (int b = 0; b < MX_N; b++) begin
        word_t got [MX_N];
        word_t gs;
        for (int j = 0; j < MX_N; j++) host_read(LANES * u, dst, 16 * b + j, got[j]);
        host_read(LANES * u, REG_SHX, sb + b, gs);
        for (int l = 0; l < LANES; l++) begin
          lane_t blk[MX_N], q[MX_N], shx;
          for (int j = 0; j < MX_N; j++) blk[j] = x[LANES * u + l][16 * b + j];
          mx_ref_block(blk, 4, q, shx);
          for (int j = 0; j < MX_N; j++) begin
            checks++;
            if (got[j][l*LANE_W +: LANE_W] !== q[j]) begin
              failures++;
              if (failures < 20)
                $display("FAIL region %0d unit %0d lane %0d block %0d elem %0d: got %h exp %h",
                         dst, u, l, b, j, got[j][l*LANE_W +: LANE_W], q[j]);
            end
          end
          checks++;
          if (gs[l*LANE_W +: LANE_W] !== shx) begin
            failures++;
            if (failures < 20) $display("FAIL shared unit %0d lane %0d block %0d", u, l, b);
          end
        end
      end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint cy_opt, cy_base;
    int     cm_opt, cm_base;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int tl = 0; tl < NTILES; tl++)
      for (int e = 0; e < TILE_E; e++) x[tl][e] = rand_bf16(112 + 2 * (tl % 8));
    for (int u = 0; u < UNITS; u++)
      for (int e = 0; e < TILE_E; e++) begin
        word_t w;
        for (int l = 0; l < LANES; l++) w[l*LANE_W +: LANE_W] = x[LANES * u + l][e];
        host_req(1'b1, LANES * u, REG_IN, e, w);
      end
    wait_idle();
    run_pass(1'b1, REG_ROWQ, 0,  cy_opt,  cm_opt);
    run_pass(1'b0, REG_COLQ, 16, cy_base, cm_base);
    check_pass(REG_ROWQ, 0);
    check_pass(REG_COLQ, 16);
    $display("counter-based shift: %0d commands, %0d cycles", cm_opt, cy_opt);
    $display("plain shift only   : %0d commands, %0d cycles", cm_base, cy_base);
    $display("time ratio %0.3f", real'(cy_opt) / real'(cy_base));
    checks += 2;
    if (cm_opt >= cm_base) begin failures++; $display("FAIL command count not lower"); end
    if (cy_opt >= cy_base) begin failures++; $display("FAIL cycle count not lower"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
