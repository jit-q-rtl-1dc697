// tb_pim_unit: one PIM unit with its even and odd bank, driven directly.
//
// Opens row 0 of both banks, loads 16 lanes x 16 BF16 values with host
// writes, runs the MX6 kernel for one block on each bank half and compares
// the quantized words (columns 16..31) and the shared-exponent word (over
// input column 0), read back through the host path, with the reference model. Also checks host read latency (one
// cycle) and that host commands for another unit are ignored.
module tb_pim_unit;
  import jitq_pkg::*;
  import jitq_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             exec_valid = 0;
  pim_cmd_t         exec_cmd = '0;
  logic [1:0]       rd_en, wr_en;
  logic [COL_W-1:0] col [2];
  word_t            wdata, rdata [2];
  logic             host_rvalid;
  word_t            host_rdata;
  logic [1:0]       act = 0, pre = 0;

  int checks = 0, failures = 0;

  pim_unit #(.UNIT_ID(3)) dut (
    .clk, .rst_n, .exec_valid, .exec_cmd,
    .bk_rd_en(rd_en), .bk_wr_en(wr_en), .bk_col(col), .bk_wdata(wdata),
    .bk_rdata(rdata), .host_rvalid, .host_rdata
  );

  for (genvar b = 0; b < 2; b++) begin : g_b
    dram_bank #(.ROWS(4)) u_bank (
      .clk, .rst_n, .act(act[b]), .pre(pre[b]), .row('0),
      .rd_en(rd_en[b]), .wr_en(wr_en[b]), .col(col[b]), .wdata,
      .rdata(rdata[b]), .row_open(), .open_row()
    );
  end

  task automatic issue(pim_cmd_t c);
    exec_cmd   <= c;
    exec_valid <= 1'b1;
    @(posedge clk);
    exec_valid <= 1'b0;
    @(posedge clk);
  endtask

  task automatic host_write(logic odd, int cl, word_t d, int unit = 3);
    pim_cmd_t c = '0;
    c.op = OP_HWR; c.odd = odd; c.col = COL_W'(cl); c.unit = UNIT_AW'(unit); c.wdata = d;
    issue(c);
  endtask

  task automatic host_read(logic odd, int cl, output word_t d, input int unit = 3);
    pim_cmd_t c = '0;
    c.op = OP_HRD; c.odd = odd; c.col = COL_W'(cl); c.unit = UNIT_AW'(unit);
    exec_cmd   <= c;
    exec_valid <= 1'b1;
    @(posedge clk);
    exec_valid <= 1'b0;
    #1;
    checks++;
    if (host_rvalid !== (unit == 3)) begin
      failures++;
      $display("FAIL host_rvalid=%0b one cycle after read for unit %0d", host_rvalid, unit);
    end
    d = host_rdata;
    @(posedge clk);
  endtask

  lane_t x [2][LANES][MX_N];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t w;
    cmd_q_t k;
    bank_addr_t in_a[MX_N], out_a[MX_N], shx_a;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    act <= 2'b11;
    @(posedge clk);
    act <= 2'b00;
    @(posedge clk);
    // inputs: block of bank b in columns 0..15
    for (int b = 0; b < 2; b++)
      for (int j = 0; j < MX_N; j++) begin
        for (int l = 0; l < LANES; l++) begin
          x[b][l][j] = rand_bf16(120 + 4 * (l % 4));
          if (l == 5) x[b][l][j] = '0;            // all-zero block
          w[l*LANE_W +: LANE_W] = x[b][l][j];
        end
        host_write(b[0], j, w);
      end
    // a host write for another unit must not land
    host_write(1'b0, 0, '1, 2);
    host_read(1'b0, 0, w);
    checks++;
    if (w[15:0] !== x[0][0][0]) begin
      failures++;
      $display("FAIL foreign host write landed");
    end
    host_read(1'b0, 0, w, 2);   // not ours: no rvalid
    for (int b = 0; b < 2; b++) begin
      for (int j = 0; j < MX_N; j++) begin
        in_a[j]  = '{odd: b[0], row: '0, col: COL_W'(j)};
        out_a[j] = '{odd: b[0], row: '0, col: COL_W'(16 + j)};
      end
      shx_a = '{odd: b[0], row: '0, col: '0};   // input word 0 is no longer needed
      k.delete();
      mx_kernel(k, in_a, out_a, shx_a, 4);
      foreach (k[i]) issue(k[i]);
    end
    // check
    for (int b = 0; b < 2; b++) begin
      word_t got_q [MX_N];
      word_t got_s;
      for (int j = 0; j < MX_N; j++) host_read(b[0], 16 + j, got_q[j]);
      host_read(b[0], 0, got_s);
      for (int l = 0; l < LANES; l++) begin
        lane_t q[MX_N], shx;
        mx_ref_block(x[b][l], 4, q, shx);
        for (int j = 0; j < MX_N; j++) begin
          checks++;
          if (got_q[j][l*LANE_W +: LANE_W] !== q[j]) begin
            failures++;
            $display("FAIL bank %0d lane %0d elem %0d: got %h exp %h", b, l, j,
                     got_q[j][l*LANE_W +: LANE_W], q[j]);
          end
        end
        checks++;
        if (got_s[l*LANE_W +: LANE_W] !== shx) begin
          failures++;
          $display("FAIL bank %0d lane %0d shared: got %h exp %h", b, l,
                   got_s[l*LANE_W +: LANE_W], shx);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
