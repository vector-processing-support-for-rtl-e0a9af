// vp_pkg: constants, instruction encoding and shared types of the vector
// processor. Eight lanes/banks follow the document; the register counts, the
// maximum vector length, the memory sizes and the instruction encoding are this
// design's own choices (the document gives only the instruction counts: 16
// scalar and 8 vector instructions).
//
// Instruction format (32 bits):  op[31:27] rd[26:23] rs1[22:19] rs2[18:15] imm[14:0]
package vp_pkg;

  localparam int unsigned XLEN      = 32;
  localparam int unsigned VP_NLANES    = 8;     // banks of VRF, lanes, memory banks
  localparam int unsigned VP_NVREG     = 8;     // vector registers
  localparam int unsigned VP_MAXVL     = 64;    // elements per vector register
  localparam int unsigned VLW       = $clog2(VP_MAXVL + 1);
  localparam int unsigned VP_NSREG     = 16;    // scalar registers, r0 reads as 0
  localparam int unsigned VP_BANK_DEPTH = 4096; // words per data-memory bank
  localparam int unsigned VP_IMEM_DEPTH = 1024; // instruction words

  typedef enum logic [4:0] {
    // 16 scalar instructions
    OP_NOP   = 5'd0,  OP_ADD  = 5'd1,  OP_SUB  = 5'd2,  OP_AND  = 5'd3,
    OP_OR    = 5'd4,  OP_XOR  = 5'd5,  OP_SLT  = 5'd6,  OP_ADDI = 5'd7,
    OP_LUI   = 5'd8,  OP_LW   = 5'd9,  OP_SW   = 5'd10, OP_BEQ  = 5'd11,
    OP_BNE   = 5'd12, OP_JMP  = 5'd13, OP_SETVL = 5'd14, OP_HALT = 5'd15,
    // 8 vector instructions (bit 4 set)
    OP_VLD   = 5'd16, OP_VST  = 5'd17, OP_VLDX = 5'd18, OP_VSTX = 5'd19,
    OP_VADD  = 5'd20, OP_VMUL = 5'd21, OP_VSADD = 5'd22, OP_VSMUL = 5'd23
  } opcode_t;

  typedef struct packed {
    opcode_t     op;
    logic [3:0]  rd;
    logic [3:0]  rs1;
    logic [3:0]  rs2;
    logic [14:0] imm;
  } instr_t;

  // Vector instruction as handed from the scalar unit to the vector unit.
  //   VADD/VMUL     vd = va (op) vb
  //   VSADD/VSMUL   vd = va (op) sval            (sval = scalar rs2)
  //   VLD / VST     vd/vs <-> mem[base + i]      (base = scalar rs1 + imm)
  //   VLDX / VSTX   vd/vs <-> mem[base + vb[i]]  (vb holds integer word offsets)
  typedef struct packed {
    opcode_t               op;
    logic [2:0]            vd;    // destination, or store-data register
    logic [2:0]            va;
    logic [2:0]            vb;    // second operand or index register
    logic [XLEN-1:0]       base;
    logic [XLEN-1:0]       sval;
    logic [VLW-1:0]        vl;
  } vec_cmd_t;

  function automatic logic is_vector(opcode_t op);
    return op[4];
  endfunction

  function automatic logic is_vmem(opcode_t op);
    return op inside {OP_VLD, OP_VST, OP_VLDX, OP_VSTX};
  endfunction


endpackage
