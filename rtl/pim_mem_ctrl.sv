// pim_mem_ctrl: the PIM command path of the memory controller for one
// pseudo-channel.
//
// The host enqueues PIM commands (valid/ready). They are issued strictly in
// order and broadcast to every PIM unit of the pseudo-channel. Before a
// command that touches a bank column the controller makes sure the needed
// row is open in that bank of every pair (even or odd): if another row is
// open it precharges it, then it activates the new row. Activation and
// precharge are broadcast to the even (or odd) banks of all units at once,
// the all-bank mode that lets PIM work on many banks in parallel.
//
// Timing is counted in controller clocks. The defaults assume a 1.2 GHz
// command clock (0.833 ns) and convert the DRAM parameters tRP = 15 ns,
// tRAS = 33 ns and tCCDL = 3.33 ns to 18, 40 and 4 cycles. tRCD is not among
// the design's parameters; 18 cycles (15 ns) is this model's choice, as are
// the two cycles kept between the last column command and a precharge (the
// PIM unit writes a bank one cycle after the command) and the queue depth.
// Register-only commands issue at one per cycle. A command is issued in the
// cycle exec_valid is high; ACT/PRE appear on bank_act/bank_pre, one cycle
// each, with bank_row.
module pim_mem_ctrl
  import jitq_pkg::*;
#(
  parameter int unsigned DEPTH     = 8,
  parameter int unsigned T_RP      = 18,
  parameter int unsigned T_RAS     = 40,
  parameter int unsigned T_RCD     = 18,
  parameter int unsigned T_CCDL    = 4,
  parameter int unsigned T_COL2PRE = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // command queue
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  pim_cmd_t          cmd,
  // broadcast to banks: index 0 even banks, 1 odd banks
  output logic [1:0]        bank_act,
  output logic [1:0]        bank_pre,
  output logic [ROW_AW-1:0] bank_row,
  // broadcast to PIM units
  output logic              exec_valid,
  output pim_cmd_t          exec_cmd,
  // status and counters
  output logic              idle,
  output logic [31:0]       n_act,
  output logic [31:0]       n_pre,
  output logic [31:0]       n_col,
  output logic [31:0]       n_exec,
  output logic [31:0]       n_wait
);

  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned TW = 8;

  // ---------------------------------------------------------------------
  // In-order queue
  // ---------------------------------------------------------------------
  pim_cmd_t        q [DEPTH];
  logic [PW-1:0]   wp, rp;
  logic [PW:0]     cnt;
  logic            deq;
  pim_cmd_t        head;

  assign cmd_ready = (cnt != (PW+1)'(DEPTH));
  assign head      = q[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (cmd_valid && cmd_ready) begin
        q[wp] <= cmd;
        wp    <= (32'(wp) == DEPTH-1) ? '0 : wp + 1'b1;
      end
      if (deq) rp <= (32'(rp) == DEPTH-1) ? '0 : rp + 1'b1;
      cnt <= cnt + (PW+1)'(cmd_valid && cmd_ready) - (PW+1)'(deq);
    end
  end

  // ---------------------------------------------------------------------
  // Bank state and timers, per bank parity
  // ---------------------------------------------------------------------
  logic [1:0]        open;
  logic [ROW_AW-1:0] orow    [2];
  logic [TW-1:0]     t_ras   [2];
  logic [TW-1:0]     t_rp    [2];
  logic [TW-1:0]     t_rcd   [2];
  logic [TW-1:0]     t_c2p   [2];
  logic [TW-1:0]     t_ccd;

  logic       have, bank_op, p, row_hit;
  logic       do_act, do_pre, do_exec;

  assign have    = (cnt != '0);
  assign bank_op = cmd_uses_bank(head);
  assign p       = head.odd;
  assign row_hit = open[p] && (orow[p] == head.row);

  always_comb begin
    do_act  = 1'b0;
    do_pre  = 1'b0;
    do_exec = 1'b0;
    if (have) begin
      if (!bank_op) begin
        do_exec = 1'b1;
      end else if (row_hit) begin
        do_exec = (t_rcd[p] == '0) && (t_ccd == '0);
      end else if (open[p]) begin
        do_pre  = (t_ras[p] == '0) && (t_c2p[p] == '0);
      end else begin
        do_act  = (t_rp[p] == '0);
      end
    end
  end

  assign deq        = do_exec;
  assign exec_valid = do_exec;
  assign exec_cmd   = head;
  assign bank_row   = head.row;
  always_comb begin
    bank_act = '0;
    bank_pre = '0;
    bank_act[p] = do_act;
    bank_pre[p] = do_pre;
  end
  assign idle = !have;

  function automatic logic [TW-1:0] dec(logic [TW-1:0] v);
    return (v == '0) ? '0 : v - 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      open  <= '0;
      for (int i = 0; i < 2; i++) begin
        orow[i]  <= '0;
        t_ras[i] <= '0;
        t_rp[i]  <= '0;
        t_rcd[i] <= '0;
        t_c2p[i] <= '0;
      end
      t_ccd  <= '0;
      n_act  <= '0;
      n_pre  <= '0;
      n_col  <= '0;
      n_exec <= '0;
      n_wait <= '0;
    end else begin
      for (int i = 0; i < 2; i++) begin
        t_ras[i] <= dec(t_ras[i]);
        t_rp[i]  <= dec(t_rp[i]);
        t_rcd[i] <= dec(t_rcd[i]);
        t_c2p[i] <= dec(t_c2p[i]);
      end
      t_ccd <= dec(t_ccd);
      if (do_act) begin
        open[p]  <= 1'b1;
        orow[p]  <= head.row;
        t_ras[p] <= TW'(T_RAS - 1);
        t_rcd[p] <= TW'(T_RCD - 1);
        n_act    <= n_act + 1;
      end
      if (do_pre) begin
        open[p]  <= 1'b0;
        t_rp[p]  <= TW'(T_RP - 1);
        n_pre    <= n_pre + 1;
      end
      if (do_exec) begin
        n_exec <= n_exec + 1;
        if (bank_op) begin
          t_ccd    <= TW'(T_CCDL - 1);
          t_c2p[p] <= TW'(T_COL2PRE - 1);
          n_col    <= n_col + 1;
        end
      end
      if (have && !do_exec && !do_act && !do_pre) n_wait <= n_wait + 1;
    end
  end

  // The PIM unit needs two cycles between column commands to one bank.
  initial begin
    assert (T_CCDL >= 2 && T_COL2PRE >= 2 && T_RP >= 1 && T_RAS >= 1 && T_RCD >= 1)
      else $error("pim_mem_ctrl: timing parameters below the pipeline minimum");
  end

  a_row_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                (exec_valid && bank_op) |-> (open[p] && orow[p] == head.row))
    else $error("pim_mem_ctrl: column command issued without its row open");

endmodule
