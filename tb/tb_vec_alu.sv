// tb_vec_alu: self-checking test of the lane ALU.
// For every operation and element width, random operands (with many equal
// and sign-boundary elements) are compared with a reference computed here
// element by element with signed integer arithmetic. Also checks Index for
// every element position and HtoW / WtoH.
module tb_vec_alu;
  import bluevec_pkg::*;
  opcode_t op; ewidth_t ew;
  vec_t va, vb, vd, res;
  logic [31:0] sa, sb, sres;
  int checks = 0, failures = 0;

  vec_alu dut (.op, .ew, .va, .vb, .vd, .sa, .sb, .res, .scalar_res(sres));

  function automatic longint get_s(vec_t v, int w, int i);
    longint x = 0;
    for (int k = 0; k < w; k++) x[k] = v[i*w + k];
    if (x[w-1]) x = x - (longint'(1) << w);
    return x;
  endfunction

  function automatic void put(ref vec_t v, input int w, input int i, input longint x);
    for (int k = 0; k < w; k++) v[i*w + k] = x[k];
  endfunction

  function automatic vec_t rnd();
    vec_t v;
    for (int i = 0; i < 32; i++) begin
      int s = $urandom % 5;
      v[8*i +: 8] = (s == 0) ? 8'h00 : (s == 1) ? 8'h80 : (s == 2) ? 8'hff : 8'($urandom);
    end
    return v;
  endfunction

  function automatic vec_t model(opcode_t o, ewidth_t e, vec_t a, vec_t b, vec_t d,
                                 logic [31:0] s0, logic [31:0] s1);
    vec_t r = '0;
    int w = (e == EW_B) ? 8 : (e == EW_H) ? 16 : 32;
    int n = 256 / w;
    if (o == OP_HTOW) begin
      for (int i = 0; i < 8; i++) put(r, 32, i, get_s(a, 16, s0[0] ? 2*i : i));
      return r;
    end
    if (o == OP_WTOH) begin
      for (int i = 0; i < 8; i++) begin
        put(r, 16, i,     get_s(a, 32, i));
        put(r, 16, 8 + i, get_s(b, 32, i));
      end
      return r;
    end
    for (int i = 0; i < n; i++) begin
      longint x = get_s(a, w, i), y = get_s(b, w, i), z = get_s(d, w, i), q;
      case (o)
        OP_ADD:  q = x + y;
        OP_SUB:  q = x - y;
        OP_SHL:  q = x * (longint'(1) << s0[4:0]);
        OP_SHR:  q = (s0[4:0] >= w) ? ((x < 0) ? -1 : 0) : (x >>> s0[4:0]);
        OP_CMP:  q = (x <= y) ? 1 : 0;
        OP_COND: q = (y != 0) ? z : x;
        OP_SET:  q = s0[i] ? longint'(s1) : z;
        default: q = 0;
      endcase
      put(r, w, i, q);
    end
    return r;
  endfunction

  initial begin
    opcode_t ops [9] = '{OP_ADD, OP_SUB, OP_SHL, OP_SHR, OP_CMP, OP_COND, OP_SET, OP_HTOW, OP_WTOH};
    for (int t = 0; t < 600; t++) begin
      foreach (ops[k]) begin
        for (int e = 0; e < 3; e++) begin
          op = ops[k]; ew = ewidth_t'(e);
          va = rnd(); vb = (t % 4 == 0) ? va : rnd(); vd = rnd();
          sa = $urandom; sb = $urandom;
          if (op == OP_SHL || op == OP_SHR) sa = $urandom % 40;
          #1;
          checks++;
          if (res !== model(op, ew, va, vb, vd, sa, sb)) begin
            failures++;
            if (failures < 10) $display("op %s ew %0d mismatch", op.name(), e);
          end
        end
      end
    end
    // Index
    for (int t = 0; t < 300; t++) begin
      op = OP_INDEX; va = rnd(); ew = ewidth_t'(t % 3); sa = $urandom % 64;
      #1;
      checks++;
      begin
        int w, idx;
        w = (ew == EW_B) ? 8 : (ew == EW_H) ? 16 : 32;
        idx = sa % (256 / w);
        if (sres !== 32'(get_s(va, w, idx))) begin
          failures++; $display("index mismatch ew=%0d idx=%0d", ew, idx);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
