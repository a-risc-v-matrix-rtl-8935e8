// rv_matmul_top: RISC-V CPU with the systolic-array matrix coprocessor.
//
// The five-stage pipeline fetches from the instruction memory and uses the
// scalar data memory for LW/SW. Vector instructions leave the pipeline in
// execute and queue in the issue unit, which owns the 128 vector registers,
// the adder, ReLU, the 4x4 systolic array and the vector data memory with its
// lookup-table regions. The CPU stalls only when the issue unit's buffer is
// full; scalar code otherwise runs on while vector work completes.
//
// Ports: a program load port for the instruction memory, a preload port for
// the vector data memory's tables (weights, biases, images), debug read ports
// for both data memories, the current PC, `vec_busy` while vector work is
// pending, and event pulses that show pipeline and issue-unit mechanisms.
// Hold rst_n low while loading the program; execution starts at address 0.
module rv_matmul_top
  import fixp_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter int unsigned IBUF_DEPTH = 4,
  parameter int unsigned VADDR_W    = 16
)(
  input  logic        clk,
  input  logic        rst_n,
  // program load
  input  logic        im_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] im_addr,
  input  logic [31:0] im_data,
  // vector data memory preload / debug
  input  logic        vpl_we,
  input  logic [VADDR_W-1:0] vpl_addr,
  input  fxvec_t      vpl_data,
  input  logic [VADDR_W-1:0] vdbg_addr,
  output fxvec_t      vdbg_data,
  // scalar data memory debug
  input  logic [31:0] sdbg_addr,
  output logic [31:0] sdbg_data,
  // status
  output logic [31:0] pc,
  output logic        vec_busy,
  output logic        ev_load_use,
  output logic        ev_flush,
  output logic        ev_vec_stall,
  output logic        ev_forward,
  output logic        ev_mul_overlap,
  output logic        ev_hazard_wait,
  output logic        ev_store_err
);

  logic [31:0] imem_instr, dmem_addr, dmem_wdata, dmem_rdata;
  logic        dmem_we, vec_valid, vec_full;
  vinstr_t     vec_instr;

  rv_icache #(.WORDS(IMEM_WORDS)) u_icache (
    .clk, .pc, .instr(imem_instr),
    .ld_we(im_we), .ld_addr(im_addr), .ld_data(im_data)
  );

  rv_core u_core (
    .clk, .rst_n,
    .imem_pc(pc), .imem_instr,
    .dmem_addr, .dmem_wdata, .dmem_we, .dmem_rdata,
    .vec_valid, .vec_instr, .vec_full,
    .ev_load_use, .ev_flush, .ev_vec_stall, .ev_forward
  );

  rv_dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .addr(dmem_addr), .rdata(dmem_rdata), .we(dmem_we), .wdata(dmem_wdata),
    .dbg_addr(sdbg_addr), .dbg_data(sdbg_data)
  );

  array_unit #(.IBUF_DEPTH(IBUF_DEPTH), .ADDR_W(VADDR_W)) u_vec (
    .clk, .rst_n,
    .in_valid(vec_valid), .in_instr(vec_instr), .full(vec_full), .busy(vec_busy),
    .pl_we(vpl_we), .pl_addr(vpl_addr), .pl_data(vpl_data),
    .dbg_addr(vdbg_addr), .dbg_data(vdbg_data),
    .ev_mul_overlap, .ev_hazard_wait, .ev_store_err
  );

endmodule
