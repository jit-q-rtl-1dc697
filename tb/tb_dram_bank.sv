// tb_dram_bank: activate/precharge and column access of one bank.
//
// Writes random words into every column of several rows, each through its
// own activate / write / precharge sequence, then re-opens the rows in a
// different order and reads every word back, checking the data and the
// one-cycle read latency. Also checks row_open/open_row.
module tb_dram_bank;
  import jitq_pkg::*;

  localparam int unsigned ROWS = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              act = 0, pre = 0, rd_en = 0, wr_en = 0;
  logic [ROW_AW-1:0] row = '0;
  logic [COL_W-1:0]  col = '0;
  word_t             wdata = '0, rdata;
  logic              row_open;
  logic [ROW_AW-1:0] open_row;

  int checks = 0, failures = 0;
  word_t model [ROWS][COLS];

  dram_bank #(.ROWS(ROWS)) dut (.*);

  function automatic word_t rnd_word();
    word_t w;
    for (int i = 0; i < WORD_W / 32; i++) w[i*32 +: 32] = $urandom;
    return w;
  endfunction

  task automatic open_r(int r);
    act <= 1; row <= ROW_AW'(r);
    @(posedge clk);
    act <= 0;
    @(posedge clk);
    checks++;
    if (!row_open || open_row != ROW_AW'(r)) begin
      failures++; $display("FAIL row %0d not open", r);
    end
  endtask

  task automatic close_r();
    pre <= 1;
    @(posedge clk);
    pre <= 0;
    @(posedge clk);
    checks++;
    if (row_open) begin failures++; $display("FAIL row still open"); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    checks++;
    if (row_open) begin failures++; $display("FAIL open after reset"); end
    for (int r = 0; r < ROWS; r++) begin
      open_r(r);
      for (int c = 0; c < COLS; c++) begin
        model[r][c] = rnd_word();
        wr_en <= 1; col <= COL_W'(c); wdata <= model[r][c];
        @(posedge clk);
      end
      wr_en <= 0;
      close_r();
    end
    for (int i = 0; i < ROWS; i++) begin
      int r;
      r = (i * 3 + 1) % ROWS;
      open_r(r);
      for (int c = COLS - 1; c >= 0; c--) begin
        rd_en <= 1; col <= COL_W'(c);
        @(posedge clk);
        rd_en <= 0;
        #1;
        checks++;
        if (rdata !== model[r][c]) begin
          failures++; $display("FAIL row %0d col %0d", r, c);
        end
      end
      close_r();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
