// pim_regfile: the register file of a PIM unit, NREGS (16) registers of one
// 256-bit DRAM word each.
//
// Two combinational read ports (ra, rb) feed the SIMD ALU and the bank write
// path; one write port updates register wa at the clock edge. A read of the
// register being written returns the old value. Registers clear on reset.
// The register count follows the design's PIM parameters; the port count and
// the reset behaviour are this model's choices.
module pim_regfile
  import jitq_pkg::*;
#(
  parameter int unsigned N = NREGS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [$clog2(N)-1:0] ra,
  input  logic [$clog2(N)-1:0] rb,
  output word_t                qa,
  output word_t                qb,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] wa,
  input  word_t                wd
);

  word_t regs [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) regs[i] <= '0;
    end else if (we) begin
      regs[wa] <= wd;
    end
  end

  assign qa = regs[ra];
  assign qb = regs[rb];

endmodule
