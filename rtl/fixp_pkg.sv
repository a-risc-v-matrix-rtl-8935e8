// fixp_pkg: types and constants shared by the fixed-point datapath and the
// vector issue unit.
//
// Numbers are 16-bit sign-magnitude fixed point: bit 15 is the sign, bits
// 14:10 the integer part and bits 9:0 the fraction (Q5.10), so the range is
// about -32..+32 with a resolution of 1/1024. A vector register holds four such
// numbers; lane 0 sits in the most significant 16 bits (bits 63:48), lane 3 in
// bits 15:0.
//
// The five custom opcodes are the ones of the systolic-array instruction set.
// How an instruction travels from the CPU to the issue unit (the vinstr_t
// record, which carries the already-read base register) is this design's own
// choice.
package fixp_pkg;

  localparam int unsigned FX_W   = 16;  // width of one number
  localparam int unsigned MAG_W  = 15;  // magnitude bits
  localparam int unsigned FRAC_W = 10;  // fraction bits
  localparam int unsigned LANES  = 4;   // numbers per vector register
  localparam int unsigned VEC_W  = FX_W * LANES;

  typedef struct packed {
    logic              sign;  // 1 = negative
    logic [MAG_W-1:0]  mag;
  } fx_t;

  // Lane 0 is the leftmost (most significant) element.
  typedef fx_t [0:LANES-1] fxvec_t;

  // Custom opcodes, instruction bits 6:0.
  localparam logic [6:0] OPC_VFIXADD  = 7'b1111000;
  localparam logic [6:0] OPC_VFIXMULT = 7'b1111001;
  localparam logic [6:0] OPC_VFIXLOAD = 7'b1111010;
  localparam logic [6:0] OPC_VFIXSTOR = 7'b1111011;
  localparam logic [6:0] OPC_VFIXRELU = 7'b1111100;

  typedef enum logic [2:0] {
    VOP_ADD  = 3'd0,
    VOP_MUL  = 3'd1,
    VOP_LOAD = 3'd2,
    VOP_STOR = 3'd3,
    VOP_RELU = 3'd4
  } vop_e;

  // One vector instruction as handed from the CPU to the issue unit.
  // vd is instruction bits 11:7 (the source group for VFIXSTOR), vs1 bits
  // 19:15, vs2 bits 24:20, stride bits 31:20. base is the value of the scalar
  // register named by bits 19:15 (loads and stores only).
  typedef struct packed {
    vop_e        op;
    logic [4:0]  vd;
    logic [4:0]  vs1;
    logic [4:0]  vs2;
    logic [11:0] stride;
    logic [31:0] base;
  } vinstr_t;

  // Returns 1 if the 32-bit word is one of the five vector instructions.
  function automatic logic is_vec_opcode(input logic [6:0] opc);
    return opc inside {OPC_VFIXADD, OPC_VFIXMULT, OPC_VFIXLOAD, OPC_VFIXSTOR, OPC_VFIXRELU};
  endfunction

  function automatic vop_e vop_of(input logic [6:0] opc);
    unique case (opc)
      OPC_VFIXADD:  return VOP_ADD;
      OPC_VFIXMULT: return VOP_MUL;
      OPC_VFIXLOAD: return VOP_LOAD;
      OPC_VFIXSTOR: return VOP_STOR;
      default:      return VOP_RELU;
    endcase
  endfunction

endpackage
