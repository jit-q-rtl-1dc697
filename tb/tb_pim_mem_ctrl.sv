// tb_pim_mem_ctrl: the in-order PIM command queue with DRAM timing.
//
// Sends a random mix of register-only commands and bank commands to random
// rows of the even and odd banks, with random gaps, and watches the outputs
// cycle by cycle. Checks: commands leave in the order they came (tagged
// through imm); a bank command only issues with its row open; ACT to column
// >= tRCD, ACT to PRE >= tRAS, PRE to ACT >= tRP, column to column >= tCCDL,
// column to PRE >= 2; the first access to a closed bank issues exactly tRCD
// cycles after its ACT; register-only commands stream at one per cycle; the
// counters match what was observed.
module tb_pim_mem_ctrl;
  import jitq_pkg::*;

  localparam longint T_RP = 18, T_RAS = 40, T_RCD = 18, T_CCDL = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              cmd_valid = 0, cmd_ready;
  pim_cmd_t          cmd = '0;
  logic [1:0]        bank_act, bank_pre;
  logic [ROW_AW-1:0] bank_row;
  logic              exec_valid, idle;
  pim_cmd_t          exec_cmd;
  logic [31:0]       n_act, n_pre, n_col, n_exec, n_wait;

  int checks = 0, failures = 0;

  pim_mem_ctrl dut (.*);

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  pim_cmd_t sent [$];
  int       n_recv = 0, o_act = 0, o_pre = 0, o_col = 0, backpressure = 0;
  longint   t_act [2] = '{-1000, -1000};
  longint   t_pre [2] = '{-1000, -1000};
  longint   t_col = -1000;
  longint   t_colp [2] = '{-1000, -1000};
  logic     opn [2] = '{0, 0};
  int       orow [2];

  task automatic err(string s);
    failures++;
    $display("FAIL @%0d %s", cyc, s);
  endtask

  // Monitor
  always @(posedge clk) if (rst_n) begin
    if (cmd_valid && !cmd_ready) backpressure++;
    for (int b = 0; b < 2; b++) begin
      if (bank_act[b]) begin
        checks += 2;
        if (opn[b]) err("ACT to open bank");
        if (cyc - t_pre[b] < T_RP) err("tRP violated");
        opn[b] = 1; orow[b] = int'(bank_row); t_act[b] = cyc; o_act++;
      end
      if (bank_pre[b]) begin
        checks += 3;
        if (!opn[b]) err("PRE to closed bank");
        if (cyc - t_act[b] < T_RAS) err("tRAS violated");
        if (cyc - t_colp[b] < 2) err("column to PRE too short");
        opn[b] = 0; t_pre[b] = cyc; o_pre++;
      end
    end
    if (exec_valid) begin
      pim_cmd_t e;
      e = sent.pop_front();
      checks++;
      if (exec_cmd !== e) err($sformatf("out of order: got tag %0d exp %0d", exec_cmd.imm, e.imm));
      if (cmd_uses_bank(exec_cmd)) begin
        int b;
        b = int'(exec_cmd.odd);
        checks += 3;
        if (!opn[b] || orow[b] != int'(exec_cmd.row)) err("row not open");
        if (cyc - t_act[b] < T_RCD) err("tRCD violated");
        if (cyc - t_col < T_CCDL) err("tCCDL violated");
        t_col = cyc; t_colp[b] = cyc; o_col++;
      end
      n_recv++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    err("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Driven at the falling edge; returns at a falling edge.
  task automatic send(pim_cmd_t c);
    logic r;
    cmd = c; cmd_valid = 1;
    sent.push_back(c);
    do begin
      r = cmd_ready;
      @(negedge clk);
    end while (!r);
    cmd_valid = 0;
  endtask

  int tag = 0;
  function automatic pim_cmd_t mk(bit bankop, bit odd, int row, int col);
    pim_cmd_t c = '0;
    c.op = bankop ? OP_MOV : OP_ADD; c.a_bank = bankop; c.odd = odd;
    c.row = ROW_AW'(row); c.col = COL_W'(col); c.imm = lane_t'(tag++);
    return c;
  endfunction

  initial begin
    longint c0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // exact latency of a first access
    send(mk(1, 0, 5, 3));
    wait (exec_valid);
    #1;
    checks++;
    if (cyc - t_act[0] != T_RCD)
      err($sformatf("first access %0d cycles after ACT", cyc - t_act[0]));
    @(negedge clk);
    // register-only throughput: 8 commands, one per cycle
    c0 = cyc;
    for (int i = 0; i < 8; i++) send(mk(0, 0, 0, 0));
    @(negedge clk);
    checks++;
    if (n_recv != 9 || cyc - c0 != 9) err($sformatf("register ops took %0d cycles", cyc - c0));
    // random mix
    for (int i = 0; i < 600; i++) begin
      bit bk;
      bk = ($urandom % 3) != 0;
      send(mk(bk, 1'($urandom), int'($urandom % 4), int'($urandom % 32)));
      if (($urandom % 4) == 0) repeat ($urandom % 30) @(negedge clk);
    end
    wait (idle);
    repeat (3) @(negedge clk);
    checks += 5;
    if (sent.size() != 0) err("commands lost");
    if (n_act != 32'(o_act) || n_pre != 32'(o_pre) || n_col != 32'(o_col)) err("counters");
    if (n_exec != 32'(n_recv)) err("exec counter");
    if (n_wait == 0) err("never waited on timing");
    if (backpressure == 0) err("queue never filled");
    $display("acts %0d pres %0d cols %0d execs %0d waits %0d backpressure %0d",
             o_act, o_pre, o_col, n_recv, n_wait, backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
