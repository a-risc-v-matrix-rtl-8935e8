// rv_core: five-stage RISC-V pipeline (fetch, decode, execute, memory,
// write-back) that also hands the custom vector instructions to the
// systolic-array issue unit.
//
// Instruction set: the RV32I integer subset LUI, AUIPC, JAL, JALR, the six
// conditional branches, LW, SW, the register-immediate and register-register
// ALU operations. Every load and store is a 32-bit word access. FENCE, ECALL,
// EBREAK and unknown opcodes retire as no-ops. The five vector opcodes
// (VFIXADD/MULT/LOAD/STOR/RELU) are recognised in decode; in execute the
// instruction and its base register value (rs1, forwarded) go to the issue
// unit instead of the ALU path, and nothing is written back.
//
// Hazards: results are forwarded from the memory and write-back stages into
// execute, and the register file writes through to decode. A load followed by
// an instruction that reads its destination stalls one cycle. Branches and
// jumps resolve in execute; the two younger instructions are flushed. If the
// issue unit's buffer is full while a vector instruction sits in execute, the
// front of the pipeline holds and a bubble goes to memory.
//
// Memory interfaces are combinational: the instruction at imem_pc must be on
// imem_instr in the same cycle, and dmem_rdata must follow dmem_addr in the
// same cycle. After reset the PC is 0.
//
// The five stages and the dispatch of vector instructions from decode/operand
// read to the issue logic are the design's; the forwarding/stall scheme, the
// branch resolution point and the instruction subset boundaries are this
// design's choices.
module rv_core
  import rv_pkg::*;
  import fixp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  output logic [31:0] imem_pc,
  input  logic [31:0] imem_instr,
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata,
  output logic        dmem_we,
  input  logic [31:0] dmem_rdata,
  output logic        vec_valid,
  output vinstr_t     vec_instr,
  input  logic        vec_full,
  // events, one cycle each
  output logic        ev_load_use,
  output logic        ev_flush,
  output logic        ev_vec_stall,
  output logic        ev_forward
);

  typedef struct packed {
    logic        valid;
    logic        reg_write, mem_read, mem_write;
    logic [4:0]  rd;
    logic [31:0] val;      // ALU result or PC+4; the address for loads/stores
    logic [31:0] sdata;
  } exmem_t;

  typedef struct packed {
    logic        valid;
    logic        reg_write;
    logic [4:0]  rd;
    logic [31:0] val;
  } memwb_t;

  logic [31:0] pc_q;
  logic        ifid_valid;
  logic [31:0] ifid_pc, ifid_instr;
  idex_t       dd, d, ex;   // dd: decoded fields, d: dd plus register values
  exmem_t      mem;
  memwb_t      wb;

  // ---------------- fetch ----------------
  assign imem_pc = pc_q;

  // ---------------- decode ----------------
  logic [31:0] rf_rd1, rf_rd2;
  logic [31:0] wb_val;
  logic        wb_we;

  rv_regfile u_rf (
    .clk, .rst_n,
    .ra1(dd.rs1), .rd1(rf_rd1),
    .ra2(dd.rs2), .rd2(rf_rd2),
    .we(wb_we), .wa(wb.rd), .wd(wb_val)
  );

  always_comb begin
    logic [31:0] ins;
    logic [6:0]  opc;
    logic [2:0]  f3;
    ins = ifid_instr;
    opc = ins[6:0];
    f3  = ins[14:12];
    dd          = '0;
    dd.valid     = ifid_valid;
    dd.pc        = ifid_pc;
    dd.instr     = ins;
    dd.rd        = ins[11:7];
    dd.funct3    = f3;
    dd.alu_op    = ALU_ADD;
    dd.wb_sel    = WB_ALU;
    unique case (opc)
      7'b0110111: begin // LUI
        dd.imm = {ins[31:12], 12'b0}; dd.b_imm = 1'b1; dd.alu_op = ALU_PASSB; dd.reg_write = 1'b1;
      end
      7'b0010111: begin // AUIPC
        dd.imm = {ins[31:12], 12'b0}; dd.a_pc = 1'b1; dd.b_imm = 1'b1; dd.reg_write = 1'b1;
      end
      7'b1101111: begin // JAL
        dd.imm = {{12{ins[31]}}, ins[19:12], ins[20], ins[30:21], 1'b0};
        dd.jal = 1'b1; dd.reg_write = 1'b1; dd.wb_sel = WB_PC4;
      end
      7'b1100111: begin // JALR
        dd.imm = {{21{ins[31]}}, ins[30:20]}; dd.rs1 = ins[19:15];
        dd.jalr = 1'b1; dd.reg_write = 1'b1; dd.wb_sel = WB_PC4;
      end
      7'b1100011: begin // branches
        dd.imm = {{20{ins[31]}}, ins[7], ins[30:25], ins[11:8], 1'b0};
        dd.rs1 = ins[19:15]; dd.rs2 = ins[24:20]; dd.branch = 1'b1;
      end
      7'b0000011: begin // LW
        dd.imm = {{21{ins[31]}}, ins[30:20]}; dd.rs1 = ins[19:15]; dd.b_imm = 1'b1;
        dd.mem_read = 1'b1; dd.reg_write = 1'b1; dd.wb_sel = WB_MEM;
      end
      7'b0100011: begin // SW
        dd.imm = {{21{ins[31]}}, ins[30:25], ins[11:7]}; dd.rs1 = ins[19:15]; dd.rs2 = ins[24:20];
        dd.b_imm = 1'b1; dd.mem_write = 1'b1;
      end
      7'b0010011: begin // OP-IMM
        dd.imm = {{21{ins[31]}}, ins[30:20]}; dd.rs1 = ins[19:15]; dd.b_imm = 1'b1; dd.reg_write = 1'b1;
        unique case (f3)
          3'b000: dd.alu_op = ALU_ADD;
          3'b001: dd.alu_op = ALU_SLL;
          3'b010: dd.alu_op = ALU_SLT;
          3'b011: dd.alu_op = ALU_SLTU;
          3'b100: dd.alu_op = ALU_XOR;
          3'b101: dd.alu_op = ins[30] ? ALU_SRA : ALU_SRL;
          3'b110: dd.alu_op = ALU_OR;
          default: dd.alu_op = ALU_AND;
        endcase
      end
      7'b0110011: begin // OP
        dd.rs1 = ins[19:15]; dd.rs2 = ins[24:20]; dd.reg_write = 1'b1;
        unique case (f3)
          3'b000: dd.alu_op = ins[30] ? ALU_SUB : ALU_ADD;
          3'b001: dd.alu_op = ALU_SLL;
          3'b010: dd.alu_op = ALU_SLT;
          3'b011: dd.alu_op = ALU_SLTU;
          3'b100: dd.alu_op = ALU_XOR;
          3'b101: dd.alu_op = ins[30] ? ALU_SRA : ALU_SRL;
          3'b110: dd.alu_op = ALU_OR;
          default: dd.alu_op = ALU_AND;
        endcase
      end
      default: begin
        if (is_vec_opcode(opc)) begin
          dd.is_vec = 1'b1;
          if (opc == OPC_VFIXLOAD || opc == OPC_VFIXSTOR) dd.rs1 = ins[19:15];
        end
      end
    endcase
    if (dd.rd == 5'd0) dd.reg_write = 1'b0;
  end

  always_comb begin
    d         = dd;
    d.rs1_val = rf_rd1;
    d.rs2_val = rf_rd2;
  end

  // ---------------- execute ----------------
  logic [31:0] fwd1, fwd2, alu_a, alu_b, alu_y, target;
  logic        f1_mem, f2_mem, f1_wb, f2_wb;
  logic        cond, taken, stall_ex, lu_stall;

  always_comb begin
    f1_mem = mem.valid && mem.reg_write && mem.rd == ex.rs1 && ex.rs1 != 5'd0;
    f2_mem = mem.valid && mem.reg_write && mem.rd == ex.rs2 && ex.rs2 != 5'd0;
    f1_wb  = wb.valid && wb.reg_write && wb.rd == ex.rs1 && ex.rs1 != 5'd0;
    f2_wb  = wb.valid && wb.reg_write && wb.rd == ex.rs2 && ex.rs2 != 5'd0;
    fwd1 = f1_mem ? mem.val : f1_wb ? wb_val : ex.rs1_val;
    fwd2 = f2_mem ? mem.val : f2_wb ? wb_val : ex.rs2_val;
  end

  assign alu_a = ex.a_pc  ? ex.pc  : fwd1;
  assign alu_b = ex.b_imm ? ex.imm : fwd2;

  rv_alu u_alu (.op(ex.alu_op), .a(alu_a), .b(alu_b), .y(alu_y));

  always_comb begin
    unique case (ex.funct3)
      3'b000:  cond = (fwd1 == fwd2);
      3'b001:  cond = (fwd1 != fwd2);
      3'b100:  cond = ($signed(fwd1) <  $signed(fwd2));
      3'b101:  cond = ($signed(fwd1) >= $signed(fwd2));
      3'b110:  cond = (fwd1 <  fwd2);
      3'b111:  cond = (fwd1 >= fwd2);
      default: cond = 1'b0;
    endcase
    taken  = ex.valid && ((ex.branch && cond) || ex.jal || ex.jalr);
    target = ex.jalr ? ((fwd1 + ex.imm) & ~32'd1) : (ex.pc + ex.imm);
  end

  // vector dispatch
  assign stall_ex  = ex.valid && ex.is_vec && vec_full;
  assign vec_valid = ex.valid && ex.is_vec && !vec_full;
  always_comb begin
    vec_instr        = '0;
    vec_instr.op     = vop_of(ex.instr[6:0]);
    vec_instr.vd     = ex.instr[11:7];
    vec_instr.vs1    = ex.instr[19:15];
    vec_instr.vs2    = ex.instr[24:20];
    vec_instr.stride = ex.instr[31:20];
    vec_instr.base   = fwd1;
  end

  assign lu_stall = ex.valid && ex.mem_read && ex.rd != 5'd0 && d.valid &&
                    (ex.rd == d.rs1 || ex.rd == d.rs2);

  // ---------------- memory ----------------
  assign dmem_addr  = mem.val;
  assign dmem_wdata = mem.sdata;
  assign dmem_we    = mem.valid && mem.mem_write;

  // ---------------- write-back ----------------
  assign wb_we  = wb.valid && wb.reg_write;
  assign wb_val = wb.val;

  // ---------------- pipeline registers ----------------
  exmem_t ex_out;
  always_comb begin
    ex_out           = '0;
    ex_out.valid     = ex.valid && !ex.is_vec;
    ex_out.reg_write = ex.reg_write;
    ex_out.mem_read  = ex.mem_read;
    ex_out.mem_write = ex.mem_write;
    ex_out.rd        = ex.rd;
    ex_out.val       = (ex.wb_sel == WB_PC4) ? ex.pc + 32'd4 : alu_y;
    ex_out.sdata     = fwd2;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc_q       <= '0;
      ifid_valid <= 1'b0;
      ifid_pc    <= '0;
      ifid_instr <= '0;
      ex         <= '0;
      mem        <= '0;
      wb         <= '0;
    end else begin
      wb.valid     <= mem.valid;
      wb.reg_write <= mem.reg_write;
      wb.rd        <= mem.rd;
      wb.val       <= mem.mem_read ? dmem_rdata : mem.val;
      if (stall_ex) begin
        // hold fetch, decode and execute; keep execute's operands current
        ex.rs1_val <= fwd1;
        ex.rs2_val <= fwd2;
        mem        <= '0;
      end else if (taken) begin
        pc_q       <= target;
        ifid_valid <= 1'b0;
        ex         <= '0;
        mem        <= ex_out;
      end else if (lu_stall) begin
        ex         <= '0;
        mem        <= ex_out;
      end else begin
        pc_q       <= pc_q + 32'd4;
        ifid_valid <= 1'b1;
        ifid_pc    <= pc_q;
        ifid_instr <= imem_instr;
        ex         <= d;
        mem        <= ex_out;
      end
    end
  end

  assign ev_load_use  = lu_stall && !stall_ex && !taken;
  assign ev_flush     = taken && !stall_ex;
  assign ev_vec_stall = stall_ex;
  assign ev_forward   = ex.valid && (f1_mem || f2_mem || f1_wb || f2_wb);

endmodule
