// tb_bluevec_core: end-to-end test of one BlueVec core with a behavioural
// memory, driven through its custom-instruction port the way a host would.
//
//  1. Burst-loads 16 random vectors into v0..v15 and 16 more into v16..v31,
//     checking that nothing changes before Commit.
//  2. Fills the lane-local memories through Set/Add/StoreLocalH.
//  3. Records a random program of 300 vector instructions (respecting the
//     LoadLocalH and Mul result delays), plays it back at one instruction per
//     cycle, then stores all 32 registers and dumps the lane memories to
//     memory; everything is compared with a reference model in this file.
//  4. Timing: ordinary instructions complete one cycle after start, Index
//     three cycles after issue, playback of N instructions in N cycles.
// The core is built with LOCAL_DEPTH = 64 so that the lane memories are
// small enough to dump.
module tb_bluevec_core;
  import bluevec_pkg::*;
  localparam int LD = 64, WORDS = 4096;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        ci_start, ci_done;
  logic [7:0]  ci_n;
  logic [4:0]  ci_a, ci_b, ci_c;
  logic [31:0] ci_dataa, ci_datab, ci_result;
  logic [31:0] avm_address;
  logic        avm_read, avm_write, avm_waitrequest, avm_readdatavalid;
  logic [5:0]  avm_burstcount;
  vec_t        avm_writedata, avm_readdata;
  int checks = 0, failures = 0;

  bluevec_core #(.LOCAL_DEPTH(LD)) dut (.*);
  avalon_mem_model #(.WORDS(WORDS), .LAT(10), .WAIT_PCT(20)) mem (
    .clk, .rst_n, .address(avm_address), .read(avm_read), .write(avm_write),
    .burstcount(avm_burstcount), .writedata(avm_writedata), .waitrequest(avm_waitrequest),
    .readdata(avm_readdata), .readdatavalid(avm_readdatavalid));

  // ------------------------------------------------------ reference model
  vec_t        R [32];
  logic [15:0] L [16][LD];

  function automatic longint gs(vec_t v, int w, int i);
    longint x = 0;
    for (int k = 0; k < w; k++) x[k] = v[i*w + k];
    if (x[w-1]) x = x - (longint'(1) << w);
    return x;
  endfunction
  function automatic void ps(ref vec_t v, input int w, input int i, input longint x);
    for (int k = 0; k < w; k++) v[i*w + k] = x[k];
  endfunction

  // execute one instruction on the reference state
  function automatic void ref_exec(vinstr_t in);
    vec_t a, b, d, r;
    int w, n;
    a = R[in.a]; b = R[in.b]; d = R[in.c]; r = '0;
    w = (in.ew == EW_B) ? 8 : (in.ew == EW_H) ? 16 : 32;
    n = 256 / w;
    case (in.op)
      OP_HTOW: begin for (int i = 0; i < 8; i++) ps(r, 32, i, gs(a, 16, in.sa[0] ? 2*i : i)); R[in.c] = r; end
      OP_WTOH: begin for (int i = 0; i < 8; i++) begin ps(r, 16, i, gs(a, 32, i)); ps(r, 16, 8+i, gs(b, 32, i)); end R[in.c] = r; end
      OP_LDLOCAL: begin for (int i = 0; i < 16; i++) ps(r, 16, i, L[i][a[16*i +: 16] % LD]); R[in.c] = r; end
      OP_STLOCAL: for (int i = 0; i < 16; i++) L[i][b[16*i +: 16] % LD] = a[16*i +: 16];
      OP_ADD, OP_SUB, OP_SHL, OP_SHR, OP_CMP, OP_COND, OP_SET, OP_MUL: begin
        for (int i = 0; i < n; i++) begin
          longint x, y, z, q;
          x = gs(a, w, i); y = gs(b, w, i); z = gs(d, w, i);
          case (in.op)
            OP_ADD:  q = x + y;
            OP_SUB:  q = x - y;
            OP_MUL:  q = x * y;
            OP_SHL:  q = x * (longint'(1) << in.sa[4:0]);
            OP_SHR:  q = x >>> in.sa[4:0];
            OP_CMP:  q = (x <= y) ? 1 : 0;
            OP_COND: q = (y != 0) ? z : x;
            default: q = in.sa[i] ? longint'(in.sb) : z;
          endcase
          ps(r, w, i, q);
        end
        R[in.c] = r;
      end
      default: ;
    endcase
  endfunction

  // ------------------------------------------------------ host driver
  int last_cycles;
  task automatic ci(opcode_t op, ewidth_t ew, int a, int b, int c,
                    logic [31:0] sa, logic [31:0] sb, output logic [31:0] res);
    @(negedge clk);
    ci_start = 1; ci_n = ci_ext(op, ew); ci_a = 5'(a); ci_b = 5'(b); ci_c = 5'(c);
    ci_dataa = sa; ci_datab = sb;
    @(negedge clk);
    ci_start = 0;
    last_cycles = 1;
    while (!ci_done) begin @(negedge clk); last_cycles++; end
    res = ci_result;
  endtask
  logic [31:0] dummy;
  task automatic cx(opcode_t op, ewidth_t ew, int a, int b, int c, logic [31:0] sa = 0, logic [31:0] sb = 0);
    ci(op, ew, a, b, c, sa, sb, dummy);
  endtask

  // wait until all memory traffic is done
  task automatic drain();
    repeat (5) @(posedge clk);
    while (avm_read || avm_write || mem.q.size() != 0) @(posedge clk);
    repeat (5) @(posedge clk);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // playback rate observation
  int play_cycles, play_issued;
  always @(posedge clk) if (dut.play_busy) begin
    play_cycles++;
    if (dut.play_ready) play_issued++;
  end

  initial begin
    vinstr_t prog [$];
    vinstr_t ins;
    int      busy_until [32];   // instruction index before which a register may not be read
    logic [31:0] r;
    ci_start = 0; ci_n = 0; ci_a = 0; ci_b = 0; ci_c = 0; ci_dataa = 0; ci_datab = 0;
    for (int i = 0; i < WORDS; i++) for (int k = 0; k < 8; k++) mem.mem[i][32*k +: 32] = $urandom;
    for (int i = 0; i < 32; i++) R[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. loads and commit
    cx(OP_LOAD, EW_W, 0, 0, 0, 32'd100 << 5, 16);
    cx(OP_LOAD, EW_W, 0, 0, 16, 32'd200 << 5, 16);
    checks++;
    if (last_cycles != 1) begin failures++; $display("load blocked for %0d cycles", last_cycles); end
    drain();
    checks++;
    if (dut.u_rf.regs[3] !== '0) begin failures++; $display("register changed before Commit"); end
    cx(OP_COMMIT, EW_W, 0, 0, 0);
    for (int i = 0; i < 16; i++) begin R[i] = mem.mem[100 + i]; R[16 + i] = mem.mem[200 + i]; end
    for (int i = 0; i < 32; i++) begin
      checks++;
      if (dut.u_rf.regs[i] !== R[i]) begin failures++; $display("v%0d wrong after commit", i); end
    end

    // 2. fill lane memories: L[l][a] = v31.h[l] + a
    for (int a = 0; a < LD; a++) begin
      ins = '{op: OP_SET, ew: EW_H, a: 0, b: 0, c: 30, sa: 32'hffff, sb: 32'(a)};
      cx(ins.op, ins.ew, ins.a, ins.b, ins.c, ins.sa, ins.sb); ref_exec(ins);
      ins = '{op: OP_ADD, ew: EW_H, a: 31, b: 30, c: 29, sa: 0, sb: 0};
      cx(ins.op, ins.ew, ins.a, ins.b, ins.c); ref_exec(ins);
      ins = '{op: OP_STLOCAL, ew: EW_H, a: 29, b: 30, c: 0, sa: 0, sb: 0};
      cx(ins.op, ins.ew, ins.a, ins.b, ins.c); ref_exec(ins);
      checks++;
      if (last_cycles != 1) begin failures++; $display("ordinary instruction took %0d cycles", last_cycles); end
    end

    // 3. random program, recorded and played back
    for (int i = 0; i < 32; i++) busy_until[i] = 0;
    for (int p = 0; p < 300; p++) begin
      opcode_t ops [13] = '{OP_ADD, OP_SUB, OP_SHL, OP_SHR, OP_CMP, OP_COND, OP_SET,
                            OP_HTOW, OP_WTOH, OP_MUL, OP_LDLOCAL, OP_STLOCAL, OP_NOP};
      int tries;
      tries = 0;
      forever begin
        ins.op = ops[$urandom % 13];
        ins.ew = ewidth_t'($urandom % 3);
        if (ins.op == OP_LDLOCAL || ins.op == OP_STLOCAL) ins.ew = EW_H;
        ins.a = vreg_t'($urandom); ins.b = vreg_t'($urandom); ins.c = vreg_t'($urandom);
        ins.sa = (ins.op == OP_SHL || ins.op == OP_SHR) ? ($urandom % 12) : $urandom;
        ins.sb = $urandom;
        tries++;
        if (busy_until[ins.a] <= p && busy_until[ins.b] <= p && busy_until[ins.c] <= p) break;
        if (tries > 50) begin ins = '{op: OP_NOP, ew: EW_W, a: 0, b: 0, c: 0, sa: 0, sb: 0}; break; end
      end
      if (ins.op == OP_LDLOCAL) busy_until[ins.c] = p + 2;
      if (ins.op == OP_MUL)     busy_until[ins.c] = p + 3;
      prog.push_back(ins);
    end
    // stores of every register at the end of the recorded program
    for (int i = 0; i < 32; i++)
      prog.push_back('{op: OP_STORE, ew: EW_W, a: vreg_t'(i), b: 0, c: 0, sa: 32'(1000 + i) << 5, sb: 0});
    cx(OP_RECORD, EW_W, 0, 0, 0, 32'd10, 0);
    foreach (prog[i]) begin
      cx(prog[i].op, prog[i].ew, prog[i].a, prog[i].b, prog[i].c, prog[i].sa, prog[i].sb);
      ref_exec(prog[i]);
    end
    cx(OP_RECORD, EW_W, 0, 0, 0, 32'd10 + 32'(prog.size()), 0);
    play_cycles = 0; play_issued = 0;
    cx(OP_PLAYBACK, EW_W, 0, 0, 0, 32'd10, 32'd10 + 32'(prog.size()));
    drain();
    checks++;
    if (play_issued != prog.size()) begin failures++; $display("played %0d of %0d", play_issued, prog.size()); end
    $display("playback: %0d instructions in %0d cycles", play_issued, play_cycles);
    for (int i = 0; i < 32; i++) begin
      checks++;
      if (mem.mem[1000 + i] !== R[i]) begin failures++; $display("v%0d wrong after program", i); end
    end
    // dump lane memories
    for (int a = 0; a < LD; a++) begin
      cx(OP_SET, EW_H, 0, 0, 1, 32'hffff, 32'(a));
      cx(OP_LDLOCAL, EW_H, 1, 0, 2);
      cx(OP_NOP, EW_W, 0, 0, 0);
      cx(OP_STORE, EW_W, 2, 0, 0, 32'(2000 + a) << 5, 0);
    end
    drain();
    for (int a = 0; a < LD; a++)
      for (int l = 0; l < 16; l++) begin
        checks++;
        if (mem.mem[2000 + a][16*l +: 16] !== L[l][a]) begin failures++; $display("local %0d[%0d] wrong", l, a); end
      end

    // 4. Index latency and value
    for (int i = 0; i < 16; i++) begin
      ci(OP_INDEX, EW_H, 7, 0, 0, 32'(i), 0, r);
      checks += 2;
      if (r !== 32'(gs(R[7], 16, i))) begin failures++; $display("Index %0d wrong", i); end
      if (last_cycles != 3) begin failures++; $display("Index took %0d cycles after issue", last_cycles); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
