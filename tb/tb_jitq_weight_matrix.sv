// tb_jitq_weight_matrix: just-in-time quantization of one whole weight
// matrix held in one pseudo-channel at its default size.
//
// The matrix is H x H BF16 weights with H = 1024, the hidden size of a
// 345M-parameter BERT, e.g. its attention query projection. It is cut into
// (H/16)^2 = 4096 tiles of 16 x 16. Tile (R, C) gets number t = R*(H/16) + C
// and goes to tile group t/128, unit (t/16) mod 8, lane t mod 16. The
// matrix therefore fills 32 of the 64 tile groups. The host writes all
// weights over the data bus. The PIM kernel then quantizes every row block
// and every column block of every tile to MX6, group by group, and the
// host reads back and checks every output word and shared word against the
// reference model. The cycle counts of the two passes are reported, with
// their duration at a 1.2 GHz command clock. Counted mechanisms: every tile
// group is touched (activations in each), and the column pass needs more
// activations than the row pass.
module tb_jitq_weight_matrix;
  import jitq_pkg::*;
  import jitq_tb_pkg::*;

  localparam int UNITS   = 8;       // must match the pseudo-channel default
  localparam int H       = 1024;
  localparam int NTILES  = (H / 16) * (H / 16);
  localparam int PER_GRP = LANES * UNITS;
  localparam int NGRP    = NTILES / PER_GRP;
  localparam int M       = 4;       // MX6

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
  int m_grp_act = 0;

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

  function automatic int elem_of(bit col_mode, int b, int j);
    return col_mode ? (16 * j + b) : (16 * b + j);
  endfunction

  task automatic run_group(int g, bit col_mode);
    for (int b = 0; b < MX_N; b++) begin
      cmd_q_t k;
      bank_addr_t in_a[MX_N], out_a[MX_N], shx_a;
      for (int j = 0; j < MX_N; j++) begin
        in_a[j]  = strided_addr(ROW_AW'(g), REG_IN, 8'(elem_of(col_mode, b, j)));
        out_a[j] = strided_addr(ROW_AW'(g), col_mode ? REG_COLQ : REG_ROWQ,
                                8'(elem_of(col_mode, b, j)));
      end
      shx_a = strided_addr(ROW_AW'(g), REG_SHX, 8'({col_mode, 4'(b)}));
      mx_kernel(k, in_a, out_a, shx_a, M);
      foreach (k[i]) send_cmd(k[i]);
    end
  endtask

  task automatic check_group(int g, bit col_mode);
    for (int u = 0; u < UNITS; u++) begin
      int t0;
      t0 = PER_GRP * g + LANES * u;
      for (int b = 0; b < MX_N; b++) begin
        word_t got [MX_N];
        word_t gs;
        for (int j = 0; j < MX_N; j++)
          host_read(t0, col_mode ? REG_COLQ : REG_ROWQ, elem_of(col_mode, b, j), got[j]);
        host_read(t0, REG_SHX, int'({col_mode, 4'(b)}), gs);
        for (int l = 0; l < LANES; l++) begin
          lane_t blk[MX_N], q[MX_N], shx;
          for (int j = 0; j < MX_N; j++) blk[j] = x[t0 + l][elem_of(col_mode, b, j)];
          mx_ref_block(blk, M, q, shx);
          for (int j = 0; j < MX_N; j++) begin
            checks++;
            if (got[j][l*LANE_W +: LANE_W] !== q[j]) begin
              failures++;
              if (failures < 20)
                $display("FAIL %s tile %0d block %0d elem %0d: got %h exp %h",
                         col_mode ? "col" : "row", t0 + l, b, j,
                         got[j][l*LANE_W +: LANE_W], q[j]);
            end
          end
          checks++;
          if (gs[l*LANE_W +: LANE_W] !== shx) begin
            failures++;
            if (failures < 20)
              $display("FAIL %s shared tile %0d block %0d", col_mode ? "col" : "row", t0 + l, b);
          end
        end
      end
    end
  endtask

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t_row, t_col;
    int a0, a_row, a_col;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // weights: exponents vary with the tile, as they do across a layer
    for (int t = 0; t < NTILES; t++)
      for (int e = 0; e < TILE_E; e++) x[t][e] = rand_bf16(108 + (t % 13));
    for (int t0 = 0; t0 < NTILES; t0 += LANES)
      for (int e = 0; e < TILE_E; e++) begin
        word_t w;
        for (int l = 0; l < LANES; l++) w[l*LANE_W +: LANE_W] = x[t0 + l][e];
        host_req(1'b1, t0, REG_IN, e, w);
      end
    wait_idle();
    // row pass over the whole matrix
    a0 = int'(n_act);
    t_row = cyc;
    for (int g = 0; g < NGRP; g++) begin
      int ag;
      ag = int'(n_act);
      run_group(g, 1'b0);
      wait_idle();
      if (int'(n_act) > ag) m_grp_act++;
    end
    t_row = cyc - t_row;
    a_row = int'(n_act) - a0;
    // column pass
    a0 = int'(n_act);
    t_col = cyc;
    for (int g = 0; g < NGRP; g++) begin
      int ag;
      ag = int'(n_act);
      run_group(g, 1'b1);
      wait_idle();
      if (int'(n_act) > ag) m_grp_act++;
    end
    t_col = cyc - t_col;
    a_col = int'(n_act) - a0;
    for (int g = 0; g < NGRP; g++) begin
      check_group(g, 1'b0);
      check_group(g, 1'b1);
    end
    $display("%0d x %0d matrix, %0d tiles in %0d tile groups", H, H, NTILES, NGRP);
    $display("row pass: %0d cycles (%0d us at 1.2 GHz), %0d activations",
             t_row, t_row / 1200, a_row);
    $display("column pass: %0d cycles (%0d us at 1.2 GHz), %0d activations",
             t_col, t_col / 1200, a_col);
    checks += 2;
    if (m_grp_act != 2 * NGRP) begin
      failures++; $display("FAIL a tile group saw no activation (%0d)", m_grp_act);
    end
    if (a_col <= a_row) begin failures++; $display("FAIL column pass not costlier"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
