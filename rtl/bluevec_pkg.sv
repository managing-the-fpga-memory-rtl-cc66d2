// bluevec_pkg: types and constants shared by the BlueVec vector co-processor.
//
// A vector is 256 bits, matching one transfer of the external memory per
// processor clock. It is viewed as 32 bytes (B), 16 half-words (H) or
// 8 words (W). The register file has 32 vectors, addressed by the three
// 5-bit register fields of a host custom instruction.
//
// The opcode numbering, the placement of the element width in the custom
// instruction's 8-bit extension field (n[6:2] = opcode, n[1:0] = width, built by ci_ext) and
// the layout of vinstr_t are choices of this implementation.
package bluevec_pkg;

  localparam int unsigned VLEN      = 256;  // bits per vector
  localparam int unsigned NUM_VREGS = 32;   // vector registers
  localparam int unsigned VREG_W    = 5;    // register index width
  localparam int unsigned HLANES    = VLEN / 16;  // half-word lanes (16)

  typedef logic [VLEN-1:0]   vec_t;
  typedef logic [VREG_W-1:0] vreg_t;

  typedef enum logic [1:0] {
    EW_B = 2'd0,  // 32 lanes of 8 bits
    EW_H = 2'd1,  // 16 lanes of 16 bits
    EW_W = 2'd2   // 8 lanes of 32 bits
  } ewidth_t;

  typedef enum logic [4:0] {
    OP_NOP      = 5'd0,
    OP_ADD      = 5'd1,   // vC[i] = vA[i] + vB[i]
    OP_SUB      = 5'd2,   // vC[i] = vA[i] - vB[i]
    OP_SHL      = 5'd3,   // vC[i] = vA[i] << sA
    OP_SHR      = 5'd4,   // vC[i] = vA[i] >>> sA (arithmetic)
    OP_MUL      = 5'd5,   // vC[i] = vA[i] * vB[i] (low bits), 3-cycle latency
    OP_CMP      = 5'd6,   // vC[i] = (vA[i] <= vB[i]) ? 1 : 0 (signed)
    OP_COND     = 5'd7,   // vC[i] = vB[i] ? vC[i] : vA[i]  (vA = else, vB = cond)
    OP_SET      = 5'd8,   // vC[i] = sA[i] ? sB : vC[i]
    OP_INDEX    = 5'd9,   // result = vA[sA]
    OP_HTOW     = 5'd10,  // vC.w[i] = sA[0] ? vA.h[2i] : vA.h[i]  (sign-extended)
    OP_WTOH     = 5'd11,  // vC.h[i] = vA.w[i], vC.h[8+i] = vB.w[i] (truncated)
    OP_LDLOCAL  = 5'd12,  // vC[i] = LOCAL_i[vA[i]]      (H only)
    OP_STLOCAL  = 5'd13,  // LOCAL_i[vB[i]] = vA[i]      (H only)
    OP_LOAD     = 5'd14,  // vC.. vC+sB-1 = MEM[sA ..], held until Commit
    OP_STORE    = 5'd15,  // MEM[sA] = vA
    OP_COMMIT   = 5'd16,  // write loaded vectors into the register file
    OP_RECORD   = 5'd17,  // start recording at sA / stop recording
    OP_PLAYBACK = 5'd18   // issue recorded instructions sA .. sB-1
  } opcode_t;

  // One decoded instruction, as issued into the pipeline or recorded.
  typedef struct packed {
    opcode_t     op;
    ewidth_t     ew;
    vreg_t       a;    // source A register
    vreg_t       b;    // source B register
    vreg_t       c;    // destination register (also read by Cond/Set)
    logic [31:0] sa;   // scalar operand A (host dataa)
    logic [31:0] sb;   // scalar operand B (host datab)
  } vinstr_t;

  localparam int unsigned VINSTR_W = $bits(vinstr_t);

  // Custom-instruction extension field encoding.
  function automatic logic [7:0] ci_ext(opcode_t op, ewidth_t ew);
    return {1'b0, op, ew};
  endfunction

endpackage
