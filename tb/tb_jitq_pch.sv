// tb_jitq_pch: end-to-end just-in-time quantization in one pseudo-channel,
// with every parameter of the pseudo-channel at its default.
//
// 1. The host writes 16 x UNITS random BF16 tiles (16 x 16 each) of tile
//    group GRP through the data bus, in the strided placement.
// 2. The host's PIM kernel quantizes every row block (MX6), then every
//    column block (MX6), of all tiles at once: each command is broadcast
//    and every PIM unit works on its 16 lanes. While the kernel runs the
//    host reads input words over the data bus, so the two request streams
//    compete for the controller queue.
// 3. A second pass re-quantizes the row blocks to MX9 and MX4 in turn.
// 4. The host reads back every quantized word and shared-exponent word and
//    compares them with the reference model.
// Counted mechanisms, each of which must occur: row activations and
// precharges, waits on DRAM timing, command-queue back-pressure, host
// requests overtaking the kernel, sub-block exponent 1 and 0, mantissas
// shifted out to zero, lanes whose conditional shift stops early (skipped
// shifts), all-zero inputs. Column quantization must need more row
// activations than row quantization, since a tile column spans four rows of
// each bank while a tile row sits in one.
module tb_jitq_pch;
  import jitq_pkg::*;
  import jitq_tb_pkg::*;

  localparam int UNITS  = 8;        // must match the pseudo-channel default
  localparam int GRP    = 1;
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

  // mechanism counters
  int m_backpressure = 0, m_overtake = 0, m_d1 = 0, m_d0 = 0, m_flush = 0,
      m_skip = 0, m_zero = 0;
  always @(posedge clk) if (rst_n) begin
    if (cmd_valid && !cmd_ready) m_backpressure++;
    if (cmd_valid && host_valid) m_overtake++;
  end

  // read responses
  word_t rq [$];
  always @(posedge clk) if (rst_n && host_rvalid) rq.push_back(host_rdata);

  lane_t x [NTILES][TILE_E];

  // ---------------------------------------------------------------------
  // drivers (falling edge)
  // ---------------------------------------------------------------------
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

  task automatic wait_idle();
    do @(negedge clk); while (!idle);
    repeat (4) @(negedge clk);
  endtask

  // reads one word: returns data
  task automatic host_read(int tile, region_e rg, int e, output word_t d);
    int n0;
    n0 = rq.size();
    host_req(1'b0, tile, rg, e, '0);
    while (rq.size() == n0) @(negedge clk);
    d = rq.pop_back();
  endtask

  // ---------------------------------------------------------------------
  // kernel for one block of every tile of the group
  // ---------------------------------------------------------------------
  task automatic run_block(bit col_mode, int b, int m);
    cmd_q_t k;
    bank_addr_t in_a[MX_N], out_a[MX_N], shx_a;
    for (int j = 0; j < MX_N; j++) begin
      int e;
      e = col_mode ? (16 * j + b) : (16 * b + j);
      in_a[j]  = strided_addr(ROW_AW'(GRP), REG_IN, 8'(e));
      out_a[j] = strided_addr(ROW_AW'(GRP), col_mode ? REG_COLQ : REG_ROWQ, 8'(e));
    end
    shx_a = strided_addr(ROW_AW'(GRP), REG_SHX, 8'({col_mode, 4'(b)}));
    mx_kernel(k, in_a, out_a, shx_a, m);
    foreach (k[i]) send_cmd(k[i]);
  endtask

  // check one pass (row or column blocks) against the model
  task automatic check_pass(bit col_mode, int m, bit count);
    for (int u = 0; u < UNITS; u++) begin
      int t0;
      t0 = NTILES * GRP + LANES * u;
      for (int b = 0; b < MX_N; b++) begin
        word_t got [MX_N];
        word_t gs;
        for (int j = 0; j < MX_N; j++) begin
          int e;
          e = col_mode ? (16 * j + b) : (16 * b + j);
          host_read(t0, col_mode ? REG_COLQ : REG_ROWQ, e, got[j]);
        end
        host_read(t0, REG_SHX, int'({col_mode, 4'(b)}), gs);
        for (int l = 0; l < LANES; l++) begin
          lane_t blk[MX_N], q[MX_N], shx;
          int tl;
          tl = LANES * u + l;
          for (int j = 0; j < MX_N; j++)
            blk[j] = x[tl][col_mode ? (16 * j + b) : (16 * b + j)];
          mx_ref_block(blk, m, q, shx);
          for (int j = 0; j < MX_N; j++) begin
            checks++;
            if (got[j][l*LANE_W +: LANE_W] !== q[j]) begin
              failures++;
              if (failures < 20)
                $display("FAIL %s m=%0d unit %0d lane %0d block %0d elem %0d: got %h exp %h",
                         col_mode ? "col" : "row", m, u, l, b, j,
                         got[j][l*LANE_W +: LANE_W], q[j]);
            end
            if (count) begin
              int s;
              s = int'(shx[7:0]) - int'(shx[8 + j/2]) - int'(blk[j][14:7]) + (8 - m);
              if (blk[j][14:0] != 0 && q[j][14:0] == 0) m_flush++;
              if (s < 8) m_skip++;
            end
          end
          checks++;
          if (gs[l*LANE_W +: LANE_W] !== shx) begin
            failures++;
            if (failures < 20)
              $display("FAIL %s shared unit %0d lane %0d block %0d: got %h exp %h",
                       col_mode ? "col" : "row", u, l, b, gs[l*LANE_W +: LANE_W], shx);
          end
          if (count) begin
            for (int p = 0; p < 8; p++) if (shx[8 + p]) m_d1++; else m_d0++;
            if (shx == 0) m_zero++;
          end
        end
      end
    end
  endtask

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t_row, t_col;
    int a_row, a_col, a0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // 1. weights
    for (int tl = 0; tl < NTILES; tl++)
      for (int e = 0; e < TILE_E; e++) begin
        x[tl][e] = rand_bf16(110 + 3 * (tl % 8));
        if (tl == 3) x[tl][e] = '0;                       // an all-zero tile
        if (tl == 9 && e == 40) x[tl][e] = 16'h7F00;      // far outlier
      end
    for (int u = 0; u < UNITS; u++)
      for (int e = 0; e < TILE_E; e++) begin
        word_t w;
        for (int l = 0; l < LANES; l++) w[l*LANE_W +: LANE_W] = x[LANES * u + l][e];
        host_req(1'b1, NTILES * GRP + LANES * u, REG_IN, e, w);
      end
    wait_idle();
    // 2. row then column quantization, MX6, with concurrent host reads
    a0 = int'(n_act);
    t_row = cyc;
    fork
      for (int b = 0; b < MX_N; b++) run_block(1'b0, b, 4);
      begin
        word_t d;
        repeat (200) @(negedge clk);
        for (int i = 0; i < 4; i++) begin
          host_read(NTILES * GRP + LANES * i, REG_IN, 17 * i, d);
          checks++;
          if (d[15:0] !== x[LANES * i][17 * i]) begin
            failures++; $display("FAIL concurrent host read %0d", i);
          end
          repeat (500) @(negedge clk);
        end
      end
    join
    wait_idle();
    t_row = cyc - t_row;
    a_row = int'(n_act) - a0;
    a0 = int'(n_act);
    t_col = cyc;
    for (int b = 0; b < MX_N; b++) run_block(1'b1, b, 4);
    wait_idle();
    t_col = cyc - t_col;
    a_col = int'(n_act) - a0;
    check_pass(1'b0, 4, 1'b1);
    check_pass(1'b1, 4, 1'b1);
    // 3. other MX formats, row blocks
    for (int b = 0; b < MX_N; b++) run_block(1'b0, b, 7);
    wait_idle();
    check_pass(1'b0, 7, 1'b0);
    for (int b = 0; b < MX_N; b++) run_block(1'b0, b, 2);
    wait_idle();
    check_pass(1'b0, 2, 1'b0);
    // mechanisms
    $display("row pass: %0d cycles, %0d activations; column pass: %0d cycles, %0d activations",
             t_row, a_row, t_col, a_col);
    $display("acts %0d pres %0d cols %0d execs %0d timing-waits %0d backpressure %0d overtake %0d",
             n_act, n_pre, n_col, n_exec, n_wait, m_backpressure, m_overtake);
    $display("d=1 %0d d=0 %0d flushed %0d early-stop shifts %0d zero blocks %0d",
             m_d1, m_d0, m_flush, m_skip, m_zero);
    checks += 11;
    if (n_act == 0)          begin failures++; $display("FAIL no activation"); end
    if (n_pre == 0)          begin failures++; $display("FAIL no precharge"); end
    if (n_wait == 0)         begin failures++; $display("FAIL no timing wait"); end
    if (m_backpressure == 0) begin failures++; $display("FAIL no back-pressure"); end
    if (m_overtake == 0)     begin failures++; $display("FAIL host never overtook"); end
    if (m_d1 == 0)           begin failures++; $display("FAIL no sub-block exponent 1"); end
    if (m_d0 == 0)           begin failures++; $display("FAIL no sub-block exponent 0"); end
    if (m_flush == 0)        begin failures++; $display("FAIL no mantissa shifted out"); end
    if (m_skip == 0)         begin failures++; $display("FAIL no skipped conditional shift"); end
    if (m_zero == 0)         begin failures++; $display("FAIL no zero block"); end
    if (a_col <= a_row)      begin failures++; $display("FAIL column pass not costlier in activations"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
