// vec_dcache: data memory of the vector unit, as 64-bit words.
//
// Byte addresses are decoded into the regions of the data memory map:
//   weights1 0x0000-0x61ff, weights2 0x6200-0x637f, bias1 0x6380-0x639f,
//   bias2 0x63a0-0x63bf, imagearr 0x8000-0x9fff, usermem 0xa000-0xbfff.
// The first five are lookup tables: read-only to the vector unit, filled
// through the preload port (on an FPGA their contents would be fixed at build
// time). usermem is read-write. A word is addressed by byte address bits 15:3.
// Reads outside a region return zero; stores outside usermem are dropped and
// flagged on `st_err` for that cycle.
//
// Reads are asynchronous, like the lookup tables of the design, so a load
// completes in the cycle its address is presented; stores take effect at the
// clock edge. A second read port serves a host or testbench.
// The map is the design's, with the end of bias2 read as 0x63bf (16 numbers);
// the preload and debug ports are this design's own.
module vec_dcache
  import fixp_pkg::*;
#(
  parameter int unsigned ADDR_W = 16
)(
  input  logic              clk,
  // vector unit port
  input  logic [ADDR_W-1:0] addr,
  output fxvec_t            rdata,
  input  logic              we,
  input  fxvec_t            wdata,
  output logic              st_err,
  // preload port (any mapped region)
  input  logic              pl_we,
  input  logic [ADDR_W-1:0] pl_addr,
  input  fxvec_t            pl_data,
  // debug read port
  input  logic [ADDR_W-1:0] dbg_addr,
  output fxvec_t            dbg_data
);

  localparam int unsigned WORDS = (1 << ADDR_W) / 8;

  fxvec_t mem [WORDS];

  function automatic logic mapped(input logic [ADDR_W-1:0] a);
    return (32'(a) <= 32'h63bf) || (32'(a) >= 32'h8000 && 32'(a) <= 32'hbfff);
  endfunction

  function automatic logic in_user(input logic [ADDR_W-1:0] a);
    return (32'(a) >= 32'ha000 && 32'(a) <= 32'hbfff);
  endfunction

  assign st_err = we && !in_user(addr);

  always_ff @(posedge clk) begin
    if (pl_we && mapped(pl_addr)) mem[pl_addr[ADDR_W-1:3]] <= pl_data;
    else if (we && in_user(addr)) mem[addr[ADDR_W-1:3]] <= wdata;
  end

  assign rdata    = mapped(addr)     ? mem[addr[ADDR_W-1:3]]     : '0;
  assign dbg_data = mapped(dbg_addr) ? mem[dbg_addr[ADDR_W-1:3]] : '0;

endmodule
