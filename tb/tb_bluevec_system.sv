// tb_bluevec_system: four BlueVec cores, at the default sizes, running the
// I-value accumulation loop concurrently against one shared behavioural
// memory.
//
// Each simulated host processor (one fork branch per core) keeps its neurons'
// I-values in its core's lane-local memories and streams (target, weight)
// vectors from memory: targets and weights are fetched eight vectors at a
// time with burst loads into v8..v15 and v16..v23, the next iteration's
// loads are issued right after each Commit so they overlap the work, and the
// update itself (for j = 0..7: LoadLocalH v0,v(8+j); NoOp; AddH v0,v0,v(16+j);
// StoreLocalH v0,v(8+j)) is recorded once and played back every iteration.
// Afterwards each core dumps its I-values to memory with a played-back
// sequence of stores, and runs a short Mul / Index check. Every result is
// compared with a reference accumulation computed here. The test also
// counts, and requires at least once, each mechanism: forwarding from E, W
// and the multiplier, Commit waiting for load data, burst reads, recording,
// playback, memory-queue back-pressure, waitrequest stalls, arbiter
// contention, stores and Index.
module tb_bluevec_system;
  import bluevec_pkg::*;
  localparam int NC = 4, WORDS = 4096, NIT = 6, NADDR = 128;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NC-1:0]        ci_start, ci_done;
  logic [NC-1:0][7:0]   ci_n;
  logic [NC-1:0][4:0]   ci_a, ci_b, ci_c;
  logic [NC-1:0][31:0]  ci_dataa, ci_datab, ci_result;
  logic [31:0]          mem_address;
  logic                 mem_read, mem_write, mem_waitrequest, mem_readdatavalid;
  logic [5:0]           mem_burstcount;
  vec_t                 mem_writedata, mem_readdata;
  int checks = 0, failures = 0;

  bluevec_system dut (.*);
  avalon_mem_model #(.WORDS(WORDS), .LAT(12), .WAIT_PCT(15)) mem (
    .clk, .rst_n, .address(mem_address), .read(mem_read), .write(mem_write),
    .burstcount(mem_burstcount), .writedata(mem_writedata), .waitrequest(mem_waitrequest),
    .readdata(mem_readdata), .readdatavalid(mem_readdatavalid));

  // ------------------------------------------------------ mechanism counters
  int n_fwd_e, n_fwd_w, n_fwd_m, n_commit_wait, n_play, n_rec, n_mq_stall, n_contention, n_index;
  for (genvar g = 0; g < NC; g++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (dut.g_core[g].u_core.fwd_e_hit) n_fwd_e++;
      if (dut.g_core[g].u_core.fwd_w_hit) n_fwd_w++;
      if (dut.g_core[g].u_core.fwd_m_hit) n_fwd_m++;
      if (dut.g_core[g].u_core.slot_valid && dut.g_core[g].u_core.slot.op == OP_COMMIT
          && !dut.g_core[g].u_core.fire) n_commit_wait++;
      if (dut.g_core[g].u_core.play_ready) n_play++;
      if (dut.g_core[g].u_core.rec_we) n_rec++;
      if (dut.g_core[g].u_core.mu_req_valid && !dut.g_core[g].u_core.mu_req_ready) n_mq_stall++;
      if (dut.g_core[g].u_core.w_host_idx) n_index++;
    end
  end
  always @(posedge clk) if (rst_n && $countones(dut.m_read | dut.m_write) > 1) n_contention++;

  // ------------------------------------------------------ host driver
  task automatic ci(int c, opcode_t op, ewidth_t ew, int a, int b, int d,
                    logic [31:0] sa, logic [31:0] sb, output logic [31:0] res);
    @(negedge clk);
    ci_start[c] = 1; ci_n[c] = ci_ext(op, ew); ci_a[c] = 5'(a); ci_b[c] = 5'(b); ci_c[c] = 5'(d);
    ci_dataa[c] = sa; ci_datab[c] = sb;
    @(negedge clk);
    ci_start[c] = 0;
    while (!ci_done[c]) @(negedge clk);
    res = ci_result[c];
  endtask

  // memory map per core c (vector words): targets at T, weights at W, dump at D
  function automatic int T(int c); return 64 + c * 256; endfunction
  function automatic int W(int c); return 128 + c * 256; endfunction
  function automatic int D(int c); return 2048 + c * 256; endfunction

  logic [15:0] acc [NC][16][NADDR];

  task automatic run_core(int c);
    logic [31:0] r;
    int p;
    // zero the I-values used
    ci(c, OP_SET, EW_H, 0, 0, 2, 32'hffff, 0, r);
    for (int a = 0; a < NADDR; a++) begin
      ci(c, OP_SET, EW_H, 0, 0, 1, 32'hffff, 32'(a), r);
      ci(c, OP_STLOCAL, EW_H, 2, 1, 0, 0, 0, r);
    end
    // record the update sequence at instruction address 0
    ci(c, OP_RECORD, EW_W, 0, 0, 0, 0, 0, r);
    for (int j = 0; j < 8; j++) begin
      ci(c, OP_LDLOCAL, EW_H, 8 + j, 0, 0, 0, 0, r);
      ci(c, OP_NOP,     EW_W, 0, 0, 0, 0, 0, r);
      ci(c, OP_ADD,     EW_H, 0, 16 + j, 0, 0, 0, r);
      ci(c, OP_STLOCAL, EW_H, 0, 8 + j, 0, 0, 0, r);
    end
    ci(c, OP_RECORD, EW_W, 0, 0, 0, 32, 0, r);
    // accumulation loop
    ci(c, OP_LOAD, EW_W, 0, 0, 8,  32'(T(c)) << 5, 8, r);
    ci(c, OP_LOAD, EW_W, 0, 0, 16, 32'(W(c)) << 5, 8, r);
    for (int it = 0; it < NIT; it++) begin
      ci(c, OP_COMMIT, EW_W, 0, 0, 0, 0, 0, r);
      if (it < NIT - 1) begin
        ci(c, OP_LOAD, EW_W, 0, 0, 8,  32'(T(c) + 8 * (it + 1)) << 5, 8, r);
        ci(c, OP_LOAD, EW_W, 0, 0, 16, 32'(W(c) + 8 * (it + 1)) << 5, 8, r);
      end
      ci(c, OP_PLAYBACK, EW_W, 0, 0, 0, 0, 32, r);
    end
    // record and play a dump of all used I-values: 4 instructions per address
    ci(c, OP_RECORD, EW_W, 0, 0, 0, 64, 0, r);
    for (int a = 0; a < NADDR; a++) begin
      ci(c, OP_SET,     EW_H, 0, 0, 1, 32'hffff, 32'(a), r);
      ci(c, OP_LDLOCAL, EW_H, 1, 0, 3, 0, 0, r);
      ci(c, OP_NOP,     EW_W, 0, 0, 0, 0, 0, r);
      ci(c, OP_STORE,   EW_W, 3, 0, 0, 32'(D(c) + a) << 5, 0, r);
    end
    p = 64 + 4 * NADDR;
    ci(c, OP_RECORD, EW_W, 0, 0, 0, 32'(p), 0, r);
    ci(c, OP_PLAYBACK, EW_W, 0, 0, 0, 64, 32'(p), r);
    // multiply: v24 = v16 * v17, two instructions later v25 = v24 + v24
    ci(c, OP_RECORD, EW_W, 0, 0, 0, 32'(p), 0, r);
    ci(c, OP_MUL, EW_H, 16, 17, 24, 0, 0, r);
    ci(c, OP_NOP, EW_W, 0, 0, 0, 0, 0, r);
    ci(c, OP_NOP, EW_W, 0, 0, 0, 0, 0, r);
    ci(c, OP_ADD, EW_H, 24, 24, 25, 0, 0, r);
    ci(c, OP_RECORD, EW_W, 0, 0, 0, 32'(p + 4), 0, r);
    ci(c, OP_PLAYBACK, EW_W, 0, 0, 0, 32'(p), 32'(p + 4), r);
    for (int i = 0; i < 16; i++) begin
      logic [15:0] x, y, e;
      x = mem.mem[W(c) + 8 * (NIT - 1)][16*i +: 16];
      y = mem.mem[W(c) + 8 * (NIT - 1) + 1][16*i +: 16];
      e = 16'(x * y * 2);
      ci(c, OP_INDEX, EW_H, 25, 0, 0, 32'(i), 0, r);
      checks++;
      if (r !== {{16{e[15]}}, e}) begin failures++; $display("core %0d: Mul/Index lane %0d wrong", c, i); end
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0, t1;
    ci_start = '0; ci_n = '0; ci_a = '0; ci_b = '0; ci_c = '0; ci_dataa = '0; ci_datab = '0;
    {n_fwd_e, n_fwd_w, n_fwd_m, n_commit_wait, n_play, n_rec, n_mq_stall, n_contention, n_index} = '0;
    // synaptic update tuples: per lane a target address and a small signed weight
    for (int c = 0; c < NC; c++) begin
      for (int l = 0; l < 16; l++) for (int a = 0; a < NADDR; a++) acc[c][l][a] = 0;
      for (int k = 0; k < 8 * NIT; k++) begin
        for (int l = 0; l < 16; l++) begin
          logic [15:0] tgt, w;
          tgt = 16'($urandom % NADDR);
          w   = 16'($urandom % 2001) - 16'd1000;
          mem.mem[T(c) + k][16*l +: 16] = tgt;
          mem.mem[W(c) + k][16*l +: 16] = w;
          acc[c][l][tgt] += w;
        end
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    t0 = $time;
    fork
      run_core(0);
      run_core(1);
      run_core(2);
      run_core(3);
    join
    t1 = $time;
    repeat (200) @(posedge clk);
    for (int c = 0; c < NC; c++)
      for (int a = 0; a < NADDR; a++)
        for (int l = 0; l < 16; l++) begin
          checks++;
          if (mem.mem[D(c) + a][16*l +: 16] !== acc[c][l][a]) begin
            failures++;
            if (failures < 10) $display("core %0d I-value lane %0d addr %0d wrong", c, l, a);
          end
        end
    $display("cycles=%0d fwdE=%0d fwdW=%0d fwdM=%0d commit_wait=%0d played=%0d recorded=%0d",
             (t1 - t0) / 10, n_fwd_e, n_fwd_w, n_fwd_m, n_commit_wait, n_play, n_rec);
    $display("mq_stall=%0d contention=%0d index=%0d bursts=%0d waitstalls=%0d writes=%0d",
             n_mq_stall, n_contention, n_index, mem.n_burst_reads, mem.n_wait_stalls, mem.n_writes);
    checks++; if (n_fwd_e == 0)       begin failures++; $display("never: forwarding from E"); end
    checks++; if (n_fwd_w == 0)       begin failures++; $display("never: forwarding from W"); end
    checks++; if (n_fwd_m == 0)       begin failures++; $display("never: forwarding from multiplier"); end
    checks++; if (n_commit_wait == 0) begin failures++; $display("never: commit wait"); end
    checks++; if (n_play == 0)        begin failures++; $display("never: playback"); end
    checks++; if (n_rec == 0)         begin failures++; $display("never: record"); end
    checks++; if (n_mq_stall == 0)    begin failures++; $display("never: memory queue stall"); end
    checks++; if (n_contention == 0)  begin failures++; $display("never: arbiter contention"); end
    checks++; if (n_index == 0)       begin failures++; $display("never: index"); end
    checks++; if (mem.n_burst_reads == 0) begin failures++; $display("never: burst read"); end
    checks++; if (mem.n_wait_stalls == 0) begin failures++; $display("never: waitrequest"); end
    checks++; if (mem.n_writes == 0)  begin failures++; $display("never: store"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
