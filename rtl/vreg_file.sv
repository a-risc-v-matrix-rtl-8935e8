// vreg_file: vector register file of the issue unit.
//
// 128 registers of 64 bits (four Q5.10 numbers each), seen by the instructions
// as 32 groups of four: register 4*g + r is row r of group g. Two
// asynchronous read ports feed the execution units; one synchronous write port
// takes the selected result. A write and a read of the same register in one
// cycle return the old value. The register count and width are the design's;
// the port count is this design's choice. Registers reset to zero.
module vreg_file
  import fixp_pkg::*;
#(
  parameter int unsigned NREGS = 128
)(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(NREGS)-1:0] ra1,
  output fxvec_t                   rd1,
  input  logic [$clog2(NREGS)-1:0] ra2,
  output fxvec_t                   rd2,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] wa,
  input  fxvec_t                   wd
);

  fxvec_t regs [NREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = regs[ra1];
  assign rd2 = regs[ra2];

endmodule
