// vec_alu: the lane-parallel arithmetic of the BlueVec execute stage.
//
// Purely combinational. A 256-bit vector is treated as 32 bytes, 16
// half-words or 8 words according to `ew`, and every lane computes the same
// operation: add, subtract, shift left / arithmetic shift right by a scalar
// amount, signed compare (a <= b gives 1), conditional select (Cond), masked
// scalar broadcast (Set), half-word to word conversion (HtoW), word to
// half-word packing (WtoH) and Index, which extracts one element as a
// sign-extended 32-bit scalar. The operations and their lane semantics follow
// the instruction set listing of the design; signedness of Cmp, HtoW and
// Index, the shift flavours and the WtoH operand layout are this
// implementation's choices. Multiplication and the lane-local memory
// accesses are done outside this block. Opcodes it does not compute give 0.
module vec_alu
  import bluevec_pkg::*;
(
  input  opcode_t     op,
  input  ewidth_t     ew,
  input  vec_t        va,    // source A (vElse for Cond)
  input  vec_t        vb,    // source B (vCond for Cond)
  input  vec_t        vd,    // old destination value (Cond, Set)
  input  logic [31:0] sa,    // scalar A: shift amount, Set mask, Index, HtoW upper
  input  logic [31:0] sb,    // scalar B: Set value
  output vec_t        res,
  output logic [31:0] scalar_res  // Index result
);

  function automatic vec_t lanes8(opcode_t o, vec_t a, vec_t b, vec_t d,
                                  logic [31:0] s0, logic [31:0] s1);
    vec_t r;
    r = '0;
    for (int i = 0; i < 32; i++) begin
      logic [7:0] x, y, z;
      x = a[8*i +: 8]; y = b[8*i +: 8]; z = d[8*i +: 8];
      unique case (o)
        OP_ADD:  r[8*i +: 8] = x + y;
        OP_SUB:  r[8*i +: 8] = x - y;
        OP_SHL:  r[8*i +: 8] = x << s0[4:0];
        OP_SHR:  r[8*i +: 8] = $signed(x) >>> s0[4:0];
        OP_CMP:  r[8*i +: 8] = ($signed(x) <= $signed(y)) ? 8'd1 : 8'd0;
        OP_COND: r[8*i +: 8] = (y != 0) ? z : x;
        OP_SET:  r[8*i +: 8] = s0[i] ? s1[7:0] : z;
        default: r[8*i +: 8] = '0;
      endcase
    end
    return r;
  endfunction

  function automatic vec_t lanes16(opcode_t o, vec_t a, vec_t b, vec_t d,
                                   logic [31:0] s0, logic [31:0] s1);
    vec_t r;
    r = '0;
    for (int i = 0; i < 16; i++) begin
      logic [15:0] x, y, z;
      x = a[16*i +: 16]; y = b[16*i +: 16]; z = d[16*i +: 16];
      unique case (o)
        OP_ADD:  r[16*i +: 16] = x + y;
        OP_SUB:  r[16*i +: 16] = x - y;
        OP_SHL:  r[16*i +: 16] = x << s0[4:0];
        OP_SHR:  r[16*i +: 16] = $signed(x) >>> s0[4:0];
        OP_CMP:  r[16*i +: 16] = ($signed(x) <= $signed(y)) ? 16'd1 : 16'd0;
        OP_COND: r[16*i +: 16] = (y != 0) ? z : x;
        OP_SET:  r[16*i +: 16] = s0[i] ? s1[15:0] : z;
        default: r[16*i +: 16] = '0;
      endcase
    end
    return r;
  endfunction

  function automatic vec_t lanes32(opcode_t o, vec_t a, vec_t b, vec_t d,
                                   logic [31:0] s0, logic [31:0] s1);
    vec_t r;
    r = '0;
    for (int i = 0; i < 8; i++) begin
      logic [31:0] x, y, z;
      x = a[32*i +: 32]; y = b[32*i +: 32]; z = d[32*i +: 32];
      unique case (o)
        OP_ADD:  r[32*i +: 32] = x + y;
        OP_SUB:  r[32*i +: 32] = x - y;
        OP_SHL:  r[32*i +: 32] = x << s0[4:0];
        OP_SHR:  r[32*i +: 32] = $signed(x) >>> s0[4:0];
        OP_CMP:  r[32*i +: 32] = ($signed(x) <= $signed(y)) ? 32'd1 : 32'd0;
        OP_COND: r[32*i +: 32] = (y != 0) ? z : x;
        OP_SET:  r[32*i +: 32] = s0[i] ? s1 : z;
        default: r[32*i +: 32] = '0;
      endcase
    end
    return r;
  endfunction

  vec_t htow, wtoh;

  always_comb begin
    htow = '0;
    wtoh = '0;
    for (int i = 0; i < 8; i++) begin
      logic [15:0] h;
      h = sa[0] ? va[16*(2*i) +: 16] : va[16*i +: 16];
      htow[32*i +: 32] = {{16{h[15]}}, h};
      wtoh[16*i +: 16]     = va[32*i +: 16];
      wtoh[16*(8+i) +: 16] = vb[32*i +: 16];
    end
  end

  always_comb begin
    unique case (op)
      OP_HTOW: res = htow;
      OP_WTOH: res = wtoh;
      default: begin
        unique case (ew)
          EW_B:    res = lanes8(op, va, vb, vd, sa, sb);
          EW_H:    res = lanes16(op, va, vb, vd, sa, sb);
          default: res = lanes32(op, va, vb, vd, sa, sb);
        endcase
      end
    endcase
  end

  always_comb begin
    unique case (ew)
      EW_B:    begin
        logic [7:0] e8;
        e8 = va[8*sa[4:0] +: 8];
        scalar_res = {{24{e8[7]}}, e8};
      end
      EW_H:    begin
        logic [15:0] e16;
        e16 = va[16*sa[3:0] +: 16];
        scalar_res = {{16{e16[15]}}, e16};
      end
      default: scalar_res = va[32*sa[2:0] +: 32];
    endcase
  end

endmodule
