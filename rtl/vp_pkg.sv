// vp_pkg: constants, instruction encoding and shared types of the vector processor.
//
// The processor has a 32-bit scalar unit and an eight-lane vector unit. Eight lanes,
// eight vector registers, 32-bit elements, a 256-word instruction memory and 512-word
// data memory banks are the published figures; the instruction encoding below is this
// design's own, since only the count of scalar instructions (16) is known.
//
// Instruction word (32 bits):
//   [31]    V: 0 = scalar instruction, 1 = vector instruction
//   [30:27] opcode (16 scalar opcodes, up to 16 vector opcodes)
//   scalar: [26:23] rd  [22:19] rs  [18:15] rt  [14:0] imm15 (sign-extended)
//   vector: [25:23] vd  [22:19] rs (scalar operand / base)  [18:16] va  [15:13] vb
//           [12:0] imm13 (address offset, added modulo the data address space)
package vp_pkg;

  localparam int unsigned XLEN      = 32;  // scalar and element width
  localparam int unsigned LANES     = 8;   // vector lanes = register banks = memory banks per group
  localparam int unsigned PC_W      = 8;   // log2(IMEM_DEPTH)
  localparam int unsigned DGROUPS   = 2;   // two groups of eight banks
  localparam int unsigned DROW_W    = 9;   // log2(DBANK_DEPTH)
  localparam int unsigned LANE_W    = 3;   // log2(LANES)
  // word address = {group, row[8:0], lane[2:0]}
  localparam int unsigned DADDR_W   = 1 + DROW_W + LANE_W;

  typedef logic [XLEN-1:0]    word_t;
  typedef logic [DADDR_W-1:0] daddr_t;
  typedef logic [PC_W-1:0]    pc_t;

  typedef enum logic [3:0] {
    OP_NOP  = 4'd0,
    OP_ADD  = 4'd1,
    OP_SUB  = 4'd2,
    OP_AND  = 4'd3,
    OP_OR   = 4'd4,
    OP_SLL  = 4'd5,   // rd = rs << imm[4:0]
    OP_MUL  = 4'd6,   // rd = rs[15:0] * rt[15:0], signed
    OP_ADDI = 4'd7,
    OP_SLT  = 4'd8,   // rd = (rs < rt), signed
    OP_LW   = 4'd9,   // rd = M[rs + imm]
    OP_SW   = 4'd10,  // M[rs + imm] = rt
    OP_BEQ  = 4'd11,  // if rs == rt: pc = pc + 1 + imm
    OP_BNE  = 4'd12,
    OP_JMP  = 4'd13,  // pc = imm
    OP_MTS  = 4'd14,  // rd=0: VLR = rs ; rd=1: VMR[32*imm +: 32] = rs
    OP_HALT = 4'd15
  } sop_e;

  typedef enum logic [3:0] {
    VOP_VADD  = 4'd0,  // vd = va + vb
    VOP_VSUB  = 4'd1,  // vd = va - vb
    VOP_VMUL  = 4'd2,  // vd = va * vb
    VOP_VADDS = 4'd3,  // vd = va + s
    VOP_VMULS = 4'd4,  // vd = va * s
    VOP_VLD   = 4'd5,  // vd[i] = M[base + i]
    VOP_VST   = 4'd6,  // M[base + i] = vd[i]
    VOP_VLDX  = 4'd7,  // vd[i] = M[base + vb[i]]
    VOP_VSTX  = 4'd8   // M[base + vb[i]] = vd[i]
  } vop_e;

  // Memory operations handled by the vector memory interface.
  typedef enum logic [1:0] {
    VM_LD  = 2'd0,
    VM_ST  = 2'd1,
    VM_LDX = 2'd2,
    VM_STX = 2'd3
  } vmop_e;

  // A vector instruction as handed from the scalar unit to the vector unit.
  typedef struct packed {
    vop_e       op;
    logic [2:0] vd;
    logic [2:0] va;
    logic [2:0] vb;
    logic [12:0] imm;
    word_t      s;     // value of scalar register rs
  } vinstr_t;

  // One-clock event flags of the processor, for performance counters.
  typedef struct packed {
    logic forward;       // an execute operand was forwarded
    logic load_use;      // decode held for a load-use dependence
    logic mts_wait;      // vector instruction held behind a VLR/VMR write
    logic flush;         // taken branch or jump squashed two instructions
    logic vec_wait;      // vector instruction waited for the vector unit
    logic mem_wait;      // scalar load/store waited for the memory interface
    logic mem_conflict;  // indexed access lost a clock to a memory-lane conflict
  } vp_events_t;

  function automatic logic is_vmem(vop_e op);
    return op inside {VOP_VLD, VOP_VST, VOP_VLDX, VOP_VSTX};
  endfunction

  function automatic logic is_varith(vop_e op);
    return op inside {VOP_VADD, VOP_VSUB, VOP_VMUL, VOP_VADDS, VOP_VMULS};
  endfunction

endpackage
