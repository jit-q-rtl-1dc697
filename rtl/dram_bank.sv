// dram_bank: one DRAM bank with its row buffer, as seen by a PIM unit and by
// the host data bus.
//
// A row must be activated (act) before its 256-bit words can be read or
// written; precharge (pre) closes it. A row is 1024 bytes, so it holds 32
// words. The row buffer is modelled as the index of the open row: column
// reads and writes go straight to the array entry of that row, which is the
// same as reading and updating a physical row buffer that is restored on
// precharge. Reads return data one clock after rd_en (registered). DRAM
// timing (tRAS, tRP, tRCD, tCCD) is enforced by the memory controller, not
// here; the bank only checks, with assertions, that commands arrive in a
// legal state.
//
// Row buffer size follows the design's memory parameters; the number of rows
// per bank is not given by the design and is this model's choice.
module dram_bank
  import jitq_pkg::*;
#(
  parameter int unsigned ROWS = 1024
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    act,     // activate `row`
  input  logic                    pre,     // precharge (close) the open row
  input  logic [ROW_AW-1:0]       row,
  input  logic                    rd_en,   // read word `col` of the open row
  input  logic                    wr_en,   // write word `col` of the open row
  input  logic [COL_W-1:0]        col,
  input  word_t                   wdata,
  output word_t                   rdata,   // valid the cycle after rd_en
  output logic                    row_open,
  output logic [ROW_AW-1:0]       open_row
);

  localparam int unsigned RIDX_W = (ROWS > 1) ? $clog2(ROWS) : 1;

  word_t mem [ROWS*COLS];

  logic [RIDX_W+COL_W-1:0] waddr;
  assign waddr = {open_row[RIDX_W-1:0], col};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_open <= 1'b0;
      open_row <= '0;
    end else if (act) begin
      row_open <= 1'b1;
      open_row <= row;
    end else if (pre) begin
      row_open <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en && row_open) mem[waddr] <= wdata;
    if (rd_en) rdata <= mem[waddr];
  end

  // Protocol rules of a bank.
  a_act_closed: assert property (@(posedge clk) disable iff (!rst_n)
                                 act |-> !row_open)
    else $error("dram_bank: ACT to a bank with an open row");
  a_act_range:  assert property (@(posedge clk) disable iff (!rst_n)
                                 act |-> (32'(row) < ROWS))
    else $error("dram_bank: ACT to a row beyond the bank");
  a_col_open:   assert property (@(posedge clk) disable iff (!rst_n)
                                 (rd_en || wr_en) |-> (row_open && !act && !pre))
    else $error("dram_bank: column access without an open row");
  a_act_pre:    assert property (@(posedge clk) disable iff (!rst_n)
                                 !(act && pre))
    else $error("dram_bank: ACT and PRE in the same cycle");

endmodule
