// rv_asm_pkg: instruction encoders used by the CPU testbenches to build
// programs, plus the fixed-point reference arithmetic shared by the
// testbenches. The reference works on signed integers (value * 1024) and is
// independent of the RTL's sign-magnitude datapath.
package rv_asm_pkg;

  function automatic logic [31:0] r_type(int f7, int rs2, int rs1, int f3, int rd, int opc);
    return {7'(f7), 5'(rs2), 5'(rs1), 3'(f3), 5'(rd), 7'(opc)};
  endfunction
  function automatic logic [31:0] i_type(int imm, int rs1, int f3, int rd, int opc);
    return {12'(imm), 5'(rs1), 3'(f3), 5'(rd), 7'(opc)};
  endfunction
  function automatic logic [31:0] s_type(int imm, int rs2, int rs1, int f3, int opc);
    logic [11:0] i = 12'(imm);
    return {i[11:5], 5'(rs2), 5'(rs1), 3'(f3), i[4:0], 7'(opc)};
  endfunction
  function automatic logic [31:0] b_type(int off, int rs2, int rs1, int f3);
    logic [12:0] i = 13'(off);
    return {i[12], i[10:5], 5'(rs2), 5'(rs1), 3'(f3), i[4:1], i[11], 7'b1100011};
  endfunction

  function automatic logic [31:0] ADDI(int rd, int rs1, int imm); return i_type(imm, rs1, 0, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SLLI(int rd, int rs1, int sh);  return i_type(sh, rs1, 1, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SRAI(int rd, int rs1, int sh);  return i_type(32'h400 | sh, rs1, 5, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SLTI(int rd, int rs1, int imm); return i_type(imm, rs1, 2, rd, 7'b0010011); endfunction
  function automatic logic [31:0] XORI(int rd, int rs1, int imm); return i_type(imm, rs1, 4, rd, 7'b0010011); endfunction
  function automatic logic [31:0] ANDI(int rd, int rs1, int imm); return i_type(imm, rs1, 7, rd, 7'b0010011); endfunction
  function automatic logic [31:0] ADD (int rd, int rs1, int rs2); return r_type(0, rs2, rs1, 0, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SUB (int rd, int rs1, int rs2); return r_type(32, rs2, rs1, 0, rd, 7'b0110011); endfunction
  function automatic logic [31:0] OR_ (int rd, int rs1, int rs2); return r_type(0, rs2, rs1, 6, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SLTU(int rd, int rs1, int rs2); return r_type(0, rs2, rs1, 3, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SRL (int rd, int rs1, int rs2); return r_type(0, rs2, rs1, 5, rd, 7'b0110011); endfunction
  function automatic logic [31:0] LUI (int rd, int imm20);        return {20'(imm20), 5'(rd), 7'b0110111}; endfunction
  function automatic logic [31:0] AUIPC(int rd, int imm20);       return {20'(imm20), 5'(rd), 7'b0010111}; endfunction
  function automatic logic [31:0] LW  (int rd, int rs1, int imm); return i_type(imm, rs1, 2, rd, 7'b0000011); endfunction
  function automatic logic [31:0] SW  (int rs2, int rs1, int imm); return s_type(imm, rs2, rs1, 2, 7'b0100011); endfunction
  function automatic logic [31:0] BEQ (int rs1, int rs2, int off); return b_type(off, rs2, rs1, 0); endfunction
  function automatic logic [31:0] BNE (int rs1, int rs2, int off); return b_type(off, rs2, rs1, 1); endfunction
  function automatic logic [31:0] BLT (int rs1, int rs2, int off); return b_type(off, rs2, rs1, 4); endfunction
  function automatic logic [31:0] BGEU(int rs1, int rs2, int off); return b_type(off, rs2, rs1, 7); endfunction
  function automatic logic [31:0] JAL (int rd, int off);
    logic [20:0] i = 21'(off);
    return {i[20], i[10:1], i[11], i[19:12], 5'(rd), 7'b1101111};
  endfunction
  function automatic logic [31:0] JALR(int rd, int rs1, int imm); return i_type(imm, rs1, 0, rd, 7'b1100111); endfunction

  // Vector instructions (custom opcodes 0x78..0x7C).
  function automatic logic [31:0] VADD (int vd, int vs1, int vs2); return r_type(0, vs2, vs1, 0, vd, 7'b1111000); endfunction
  function automatic logic [31:0] VMULT(int vd, int vs1, int vs2); return r_type(0, vs2, vs1, 0, vd, 7'b1111001); endfunction
  function automatic logic [31:0] VLOAD(int vd, int base, int stride); return i_type(stride, base, 0, vd, 7'b1111010); endfunction
  function automatic logic [31:0] VSTOR(int vs, int base, int stride); return i_type(stride, base, 0, vs, 7'b1111011); endfunction
  function automatic logic [31:0] VRELU(int vd, int vs1);          return r_type(0, 0, vs1, 0, vd, 7'b1111100); endfunction

  // ---- reference fixed-point arithmetic on signed integers (value*1024) ----
  function automatic int fx2int(logic [15:0] f);
    return f[15] ? -int'(f[14:0]) : int'(f[14:0]);
  endfunction
  function automatic logic [15:0] int2fx(int v);
    int m = (v < 0) ? -v : v;
    return {(v < 0) && (m != 0), 15'(m)};
  endfunction
  // product truncated towards zero to 1/1024
  function automatic int ref_mul(int a, int b);
    int m = ((a < 0 ? -a : a) * (b < 0 ? -b : b)) >>> 10;
    return ((a < 0) != (b < 0)) ? -m : m;
  endfunction
  // random value with magnitude below lim (in 1/1024 units)
  function automatic int rnd_val(int lim);
    int m = int'($urandom_range(lim - 1, 0));
    return ($urandom_range(1, 0) == 1) ? -m : m;
  endfunction

endpackage
