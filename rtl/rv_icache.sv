// rv_icache: instruction memory of the fetch stage.
//
// A word-addressed array read asynchronously by the program counter (byte
// address bits above 1), so an instruction is available in the cycle its PC
// is. A write port loads the program; there is no miss handling, the memory
// is the whole program space. Depth is this design's choice.
module rv_icache #(
  parameter int unsigned WORDS = 1024
)(
  input  logic        clk,
  input  logic [31:0] pc,
  output logic [31:0] instr,
  input  logic        ld_we,
  input  logic [$clog2(WORDS)-1:0] ld_addr,   // word index
  input  logic [31:0] ld_data
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) if (ld_we) mem[ld_addr] <= ld_data;

  assign instr = mem[pc[$clog2(WORDS)+1:2]];

endmodule
