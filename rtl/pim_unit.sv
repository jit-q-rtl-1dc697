// pim_unit: one PIM compute unit placed between an even and an odd DRAM
// bank, holding a 256-bit SIMD ALU and a 16-entry register file.
//
// Every command of the pseudo-channel is broadcast to all units; each unit
// executes it on its own banks and registers, so all units work in lock
// step on different data. Host accesses (OP_HWR, OP_HRD) are executed only by
// the unit whose UNIT_ID matches cmd.unit, which models the shared data bus
// that serves one bank at a time.
//
// Timing: a command accepted in cycle t (exec_valid) starts its bank read in
// cycle t, and in cycle t+1 the ALU combines the bank word or register A
// with register or immediate B, writes the destination register and, for
// OP_WR / OP_HWR, writes the bank. Host read data appears on host_rdata with
// host_rvalid in cycle t+1. Commands may arrive every cycle, but two
// commands that access the same bank must be at least two cycles apart
// (the memory controller spaces column commands by tCCD, which is longer),
// and the bank's row must be open. The unit has no instruction fetch.
module pim_unit
  import jitq_pkg::*;
#(
  parameter int unsigned UNIT_ID = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  // broadcast command
  input  logic                exec_valid,
  input  pim_cmd_t            exec_cmd,
  // column ports of the bank pair, index 0 even, 1 odd
  output logic [1:0]          bk_rd_en,
  output logic [1:0]          bk_wr_en,
  output logic [COL_W-1:0]    bk_col   [2],
  output word_t               bk_wdata,
  input  word_t               bk_rdata [2],
  // host data bus
  output logic                host_rvalid,
  output word_t               host_rdata
);

  // ---------------------------------------------------------------------
  // Stage 0: decode, bank read
  // ---------------------------------------------------------------------
  logic     mine0, rd0;
  assign mine0 = !(exec_cmd.op inside {OP_HWR, OP_HRD}) ||
                 (exec_cmd.unit == UNIT_ID[UNIT_AW-1:0]);
  assign rd0   = exec_valid && mine0 && cmd_uses_bank(exec_cmd) &&
                 !cmd_writes_bank(exec_cmd);

  logic     v1;
  pim_cmd_t c1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      c1 <= '0;
    end else begin
      v1 <= exec_valid && mine0;
      if (exec_valid && mine0) c1 <= exec_cmd;
    end
  end

  // ---------------------------------------------------------------------
  // Stage 1: ALU, register write-back, bank write
  // ---------------------------------------------------------------------
  word_t qa, qb, opa, opb, y;
  logic  rf_we, wr1;

  pim_regfile #(.N(NREGS)) u_rf (
    .clk, .rst_n,
    .ra(c1.ra), .rb(c1.rb), .qa, .qb,
    .we(rf_we), .wa(c1.rd), .wd(y)
  );

  assign opa = c1.a_bank ? bk_rdata[c1.odd] : qa;
  assign opb = c1.b_imm  ? {LANES{c1.imm}}  : qb;

  pim_simd_alu u_alu (
    .clk, .rst_n,
    .en(v1), .op(c1.op), .a(opa), .b(opb), .y,
    .cnt_q()
  );

  assign rf_we = v1 && (c1.op inside {OP_MOV, OP_ADD, OP_SUB, OP_MUL, OP_MAX,
                                      OP_CMP, OP_AND, OP_OR, OP_BSHIFT,
                                      OP_CBSHIFT});
  assign wr1   = v1 && cmd_writes_bank(c1);

  always_comb begin
    bk_rd_en = '0;
    bk_wr_en = '0;
    bk_col[0] = exec_cmd.col;
    bk_col[1] = exec_cmd.col;
    if (rd0) bk_rd_en[exec_cmd.odd] = 1'b1;
    if (wr1) begin
      bk_wr_en[c1.odd] = 1'b1;
      bk_col[c1.odd]   = c1.col;
    end
  end
  assign bk_wdata = (c1.op == OP_HWR) ? c1.wdata : qa;

  assign host_rvalid = v1 && (c1.op == OP_HRD);
  assign host_rdata  = bk_rdata[c1.odd];

  // A bank cannot take a write and a read in the same cycle.
  a_no_col_clash: assert property (@(posedge clk) disable iff (!rst_n)
                                   (wr1 && rd0) |-> (c1.odd != exec_cmd.odd))
    else $error("pim_unit: bank column clash, commands too close");

endmodule
