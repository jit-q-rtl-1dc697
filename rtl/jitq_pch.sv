// jitq_pch: one HBM-PIM pseudo-channel that quantizes weights just in time.
//
// The pseudo-channel holds UNITS PIM units, each sitting between an even and
// an odd DRAM bank. High-precision (BF16) weights stay in the banks in the
// pim-jitq-strided placement; when a quantized copy is needed the host
// streams a PIM kernel into cmd_*, and every command is broadcast to all PIM
// units, which quantize their tiles in place and write the low-precision
// result back into their own banks. No weight crosses the data bus.
//
// Two request streams enter the memory controller queue:
//   * cmd_*  : PIM commands with physical bank/row/column fields, as issued
//              by the host's PIM kernel.
//   * host_* : ordinary reads and writes of one 256-bit word over the shared
//              data bus, addressed logically (tile, region, element) and
//              placed by jitq_strided_map. The word covers the 16 tiles
//              whose numbers differ only in their low four bits.
// Host requests win when both are valid. The controller issues commands in
// order, opens rows in all even or all odd banks together and keeps the DRAM
// timing. Read data returns on host_rdata with host_rvalid one cycle after
// the controller issues the read. The counters report activations,
// precharges, column commands, issued commands and cycles spent waiting on
// DRAM timing.
//
// UNITS = 8 follows from 256 PIM units serving 512 banks per stack spread over
// 32 pseudo-channels of 16 banks; the pseudo-channel count and ROWS are this
// design's choices.
module jitq_pch
  import jitq_pkg::*;
#(
  parameter int unsigned UNITS     = 8,
  parameter int unsigned ROWS      = 1024,
  parameter int unsigned DEPTH     = 8,
  parameter int unsigned T_RP      = 18,
  parameter int unsigned T_RAS     = 40,
  parameter int unsigned T_RCD     = 18,
  parameter int unsigned T_CCDL    = 4,
  parameter int unsigned TILE_W    = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // PIM command stream
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  pim_cmd_t          cmd,
  // host word access
  input  logic              host_valid,
  output logic              host_ready,
  input  logic              host_write,
  input  logic [TILE_W-1:0] host_tile,
  input  region_e           host_region,
  input  logic [7:0]        host_elem,
  input  word_t             host_wdata,
  output logic              host_rvalid,
  output word_t             host_rdata,
  // status
  output logic              idle,
  output logic [31:0]       n_act,
  output logic [31:0]       n_pre,
  output logic [31:0]       n_col,
  output logic [31:0]       n_exec,
  output logic [31:0]       n_wait
);

  // ---------------------------------------------------------------------
  // Host request -> host command
  // ---------------------------------------------------------------------
  logic [UNIT_AW-1:0] h_unit;
  bank_addr_t         h_addr;
  pim_cmd_t           h_cmd, q_cmd;
  logic               q_valid, q_ready;

  jitq_strided_map #(.UNITS(UNITS), .TILE_W(TILE_W)) u_map (
    .tile(host_tile), .region(host_region), .elem(host_elem),
    .unit(h_unit), .lane(), .group(), .addr(h_addr)
  );

  always_comb begin
    h_cmd       = '0;
    h_cmd.op    = host_write ? OP_HWR : OP_HRD;
    h_cmd.odd   = h_addr.odd;
    h_cmd.row   = h_addr.row;
    h_cmd.col   = h_addr.col;
    h_cmd.unit  = h_unit;
    h_cmd.wdata = host_wdata;
  end

  assign q_valid    = host_valid || cmd_valid;
  assign q_cmd      = host_valid ? h_cmd : cmd;
  assign host_ready = q_ready;
  assign cmd_ready  = q_ready && !host_valid;

  // ---------------------------------------------------------------------
  // Memory controller
  // ---------------------------------------------------------------------
  logic [1:0]        bank_act, bank_pre;
  logic [ROW_AW-1:0] bank_row;
  logic              exec_valid;
  pim_cmd_t          exec_cmd;

  pim_mem_ctrl #(
    .DEPTH(DEPTH), .T_RP(T_RP), .T_RAS(T_RAS), .T_RCD(T_RCD),
    .T_CCDL(T_CCDL), .T_COL2PRE(2)
  ) u_ctrl (
    .clk, .rst_n,
    .cmd_valid(q_valid), .cmd_ready(q_ready), .cmd(q_cmd),
    .bank_act, .bank_pre, .bank_row,
    .exec_valid, .exec_cmd,
    .idle, .n_act, .n_pre, .n_col, .n_exec, .n_wait
  );

  // ---------------------------------------------------------------------
  // PIM units and their bank pairs
  // ---------------------------------------------------------------------
  logic [UNITS-1:0] u_rvalid;
  word_t            u_rdata [UNITS];

  for (genvar u = 0; u < UNITS; u++) begin : g_unit
    logic [1:0]       rd_en, wr_en;
    logic [COL_W-1:0] col [2];
    word_t            wdata;
    word_t            rdata [2];

    pim_unit #(.UNIT_ID(u)) u_pim (
      .clk, .rst_n,
      .exec_valid, .exec_cmd,
      .bk_rd_en(rd_en), .bk_wr_en(wr_en), .bk_col(col),
      .bk_wdata(wdata), .bk_rdata(rdata),
      .host_rvalid(u_rvalid[u]), .host_rdata(u_rdata[u])
    );

    for (genvar b = 0; b < 2; b++) begin : g_bank
      dram_bank #(.ROWS(ROWS)) u_bank (
        .clk, .rst_n,
        .act(bank_act[b]), .pre(bank_pre[b]), .row(bank_row),
        .rd_en(rd_en[b]), .wr_en(wr_en[b]), .col(col[b]),
        .wdata, .rdata(rdata[b]),
        .row_open(), .open_row()
      );
    end
  end

  // Shared data bus: only the addressed unit drives it.
  always_comb begin
    host_rvalid = 1'b0;
    host_rdata  = '0;
    for (int u = 0; u < UNITS; u++) begin
      if (u_rvalid[u]) begin
        host_rvalid = 1'b1;
        host_rdata  = u_rdata[u];
      end
    end
  end

  a_one_driver: assert property (@(posedge clk) disable iff (!rst_n)
                                 $onehot0(u_rvalid))
    else $error("jitq_pch: several units drive the data bus");

endmodule
