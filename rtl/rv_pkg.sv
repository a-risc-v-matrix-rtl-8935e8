// rv_pkg: types shared by the scalar RISC-V pipeline.
//
// ALU operations and the decoded control record that travels down the
// pipeline. The encodings are this design's own; the instruction set is the
// RV32I base subset listed in rv_core.
package rv_pkg;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU,
    ALU_XOR, ALU_SRL, ALU_SRA, ALU_OR,  ALU_AND, ALU_PASSB
  } alu_op_e;

  typedef enum logic [1:0] {WB_ALU, WB_MEM, WB_PC4} wb_sel_e;

  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    logic [31:0] instr;
    logic [4:0]  rs1, rs2, rd;
    logic [31:0] rs1_val, rs2_val, imm;
    alu_op_e     alu_op;
    logic        a_pc;      // ALU operand A is the PC (AUIPC, JAL)
    logic        b_imm;     // ALU operand B is the immediate
    logic        reg_write;
    logic        mem_read, mem_write;
    logic        branch;    // conditional branch, condition in funct3
    logic        jal, jalr;
    wb_sel_e     wb_sel;
    logic        is_vec;    // custom vector instruction for the array unit
    logic [2:0]  funct3;
  } idex_t;

endpackage
