// tb_jitq_mx_packed: quantization straight into the packed MX storage
// layout, on the full-size pseudo-channel.
//
// 128 random BF16 tiles (all lanes of all 8 PIM units) are written through
// the host port. Then, for MX9, MX6 and MX4 in turn, the packing kernel
// quantizes all 16 row blocks into the row-output region and all 16 column
// blocks into the column-output region. A block then takes n words per
// lane (16*n bits): its shared word plus n-1 words of element records
// {sign, m mantissa bits}. For MX6 and MX4 some records cross a word
// boundary. Every packed word and shared word is read back over the host
// port and compared with the software model (mx_ref_block followed by
// mx_pack_ref). The packing multiplies by powers of two, so this test also
// covers the ALU multiply inside a kernel. Counted mechanisms, each of which
// must occur: records split over two words, and sign bits set in the records.
// The words of a block after word n-2 are never written, which is checked
// by finding them still zero.
module tb_jitq_mx_packed;
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
  int m_split = 0, m_sign = 0;

  jitq_pch dut (.*);

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

  // all 16 blocks of one direction, packed, into `dst`
  task automatic run_pass(bit col_mode, int m);
    region_e dst;
    dst = col_mode ? REG_COLQ : REG_ROWQ;
    for (int b = 0; b < MX_N; b++) begin
      cmd_q_t k;
      bank_addr_t in_a[MX_N], out_a[MX_N], shx_a;
      for (int j = 0; j < MX_N; j++) begin
        in_a[j]  = strided_addr('0, REG_IN, 8'(elem_of(col_mode, b, j)));
        out_a[j] = strided_addr('0, dst,    8'(elem_of(col_mode, b, j)));
      end
      shx_a = strided_addr('0, REG_SHX, 8'({col_mode, 4'(b)}));
      mx_kernel(k, in_a, out_a, shx_a, m, 1'b1, 1'b1);
      foreach (k[i]) send_cmd(k[i]);
    end
    wait_idle();
  endtask

  task automatic check_pass(bit col_mode, int m);
    region_e dst;
    int nw;
    dst = col_mode ? REG_COLQ : REG_ROWQ;
    nw  = m + 1;                                   // n - 1 record words
    for (int u = 0; u < UNITS; u++)
      for (int b = 0; b < MX_N; b++) begin
        word_t got [MX_N];
        word_t gs;
        for (int j = 0; j < MX_N; j++) host_read(LANES * u, dst, elem_of(col_mode, b, j), got[j]);
        host_read(LANES * u, REG_SHX, int'({col_mode, 4'(b)}), gs);
        for (int l = 0; l < LANES; l++) begin
          lane_t blk[MX_N], q[MX_N], shx, pw[9];
          for (int j = 0; j < MX_N; j++) blk[j] = x[LANES * u + l][elem_of(col_mode, b, j)];
          mx_ref_block(blk, m, q, shx);
          mx_pack_ref(q, m, pw);
          for (int j = 0; j < MX_N; j++) if (q[j][15]) m_sign++;
          for (int w = 0; w < MX_N; w++) begin
            lane_t exp_w;
            exp_w = (w < nw) ? pw[w] : '0;
            checks++;
            if (got[w][l*LANE_W +: LANE_W] !== exp_w) begin
              failures++;
              if (failures < 20)
                $display("FAIL %s m=%0d unit %0d lane %0d block %0d word %0d: got %h exp %h",
                         col_mode ? "col" : "row", m, u, l, b, w,
                         got[w][l*LANE_W +: LANE_W], exp_w);
            end
          end
          checks++;
          if (gs[l*LANE_W +: LANE_W] !== shx) begin
            failures++;
            if (failures < 20)
              $display("FAIL %s m=%0d shared unit %0d lane %0d block %0d", col_mode ? "col" : "row",
                       m, u, l, b);
          end
        end
      end
  endtask

  task automatic clear_outputs();
    for (int u = 0; u < UNITS; u++)
      for (int e = 0; e < TILE_E; e++) begin
        host_req(1'b1, LANES * u, REG_ROWQ, e, '0);
        host_req(1'b1, LANES * u, REG_COLQ, e, '0);
      end
    wait_idle();
  endtask

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fmt [3];
    fmt = '{7, 4, 2};
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
    foreach (fmt[f]) begin
      int m, e0;
      m = fmt[f];
      for (int j = 0; j < MX_N; j++)
        if ((j * (m + 1)) % 16 + (m + 1) > 16) m_split++;
      clear_outputs();
      e0 = int'(n_exec);
      run_pass(1'b0, m);
      $display("MX%0d packed row pass: %0d commands, %0d words per block instead of 16",
               m + 2, int'(n_exec) - e0, m + 2);
      run_pass(1'b1, m);
      check_pass(1'b0, m);
      check_pass(1'b1, m);
    end
    $display("records split over two words per block (all formats): %0d, sign bits set: %0d",
             m_split, m_sign);
    checks += 2;
    if (m_split == 0) begin failures++; $display("FAIL no record split over two words"); end
    if (m_sign == 0)  begin failures++; $display("FAIL no sign bit set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
