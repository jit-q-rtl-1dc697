// tb_pim_regfile: random writes and reads of the 16 x 256-bit register file
// against a software copy; checks reset to zero and that a read in the
// write cycle sees the old value.
module tb_pim_regfile;
  import jitq_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [REG_W-1:0] ra = '0, rb = '0, wa = '0;
  logic             we = 0;
  word_t            wd = '0, qa, qb;

  int checks = 0, failures = 0;
  word_t model [NREGS];

  pim_regfile dut (.*);

  function automatic word_t rnd_word();
    word_t w;
    for (int i = 0; i < WORD_W / 32; i++) w[i*32 +: 32] = $urandom;
    return w;
  endfunction

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
    for (int i = 0; i < NREGS; i++) model[i] = '0;
    for (int it = 0; it < 2000; it++) begin
      logic [REG_W-1:0] a, b, w;
      logic e;
      word_t d;
      a = REG_W'($urandom); b = REG_W'($urandom); w = REG_W'($urandom);
      e = 1'($urandom); d = rnd_word();
      ra <= a; rb <= b; wa <= w; we <= e; wd <= d;
      #1;
      checks += 2;
      if (qa !== model[a]) begin failures++; $display("FAIL qa r%0d", a); end
      if (qb !== model[b]) begin failures++; $display("FAIL qb r%0d", b); end
      @(posedge clk);
      if (e) model[w] = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
