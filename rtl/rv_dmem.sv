// rv_dmem: scalar data memory of the memory stage.
//
// Word-wide array: asynchronous read, write at the clock edge, addressed by
// byte address bits above 1 (word accesses only). A second read port lets a
// host or testbench inspect it. Depth is this design's choice.
module rv_dmem #(
  parameter int unsigned WORDS = 1024
)(
  input  logic        clk,
  input  logic [31:0] addr,
  output logic [31:0] rdata,
  input  logic        we,
  input  logic [31:0] wdata,
  input  logic [31:0] dbg_addr,
  output logic [31:0] dbg_data
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) if (we) mem[addr[AW+1:2]] <= wdata;

  assign rdata    = mem[addr[AW+1:2]];
  assign dbg_data = mem[dbg_addr[AW+1:2]];

endmodule
