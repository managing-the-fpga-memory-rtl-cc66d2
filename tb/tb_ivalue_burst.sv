// tb_ivalue_burst: the I-value accumulation workload on one BlueVec core at
// its default sizes, run two ways on the same 1024 synaptic updates.
//
//  A. The plain vector loop: for every 16 updates the host issues Commit,
//     two single-vector prefetch Loads, LoadLocalH, NoOp, AddH and
//     StoreLocalH itself.
//  B. The burst loop: 8-vector burst Loads (128 updates per iteration) and
//     the 32-instruction update sequence recorded once and played back at
//     one instruction per cycle.
//
// The host is modelled as issuing a custom instruction only every HOST_GAP
// cycles after the previous one completed, since a scalar host cannot issue
// back to back. The I-values (16-bit, in the lane-local memories, at 128
// addresses spread over the full 4096-entry depth) are checked against a
// reference after each version, and version B must take fewer cycles than
// version A. Cycle counts per update are printed.
module tb_ivalue_burst;
  import bluevec_pkg::*;
  localparam int WORDS = 4096, NUPD_VEC = 64, NADDR = 128, HOST_GAP = 3;
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

  bluevec_core dut (.*);
  avalon_mem_model #(.WORDS(WORDS), .LAT(12), .WAIT_PCT(10)) mem (
    .clk, .rst_n, .address(avm_address), .read(avm_read), .write(avm_write),
    .burstcount(avm_burstcount), .writedata(avm_writedata), .waitrequest(avm_waitrequest),
    .readdata(avm_readdata), .readdatavalid(avm_readdatavalid));

  localparam int TW = 100, WW = 300, DW = 1000;   // vector word addresses
  logic [15:0] addrs [NADDR];
  logic [15:0] acc [16][NADDR];

  task automatic ci(opcode_t op, ewidth_t ew, int a, int b, int c,
                    logic [31:0] sa = 0, logic [31:0] sb = 0);
    repeat (HOST_GAP) @(negedge clk);
    ci_start = 1; ci_n = ci_ext(op, ew); ci_a = 5'(a); ci_b = 5'(b); ci_c = 5'(c);
    ci_dataa = sa; ci_datab = sb;
    @(negedge clk);
    ci_start = 0;
    while (!ci_done) @(negedge clk);
  endtask

  task automatic zero_ivalues();
    ci(OP_SET, EW_H, 0, 0, 2, 32'hffff, 0);
    for (int k = 0; k < NADDR; k++) begin
      ci(OP_SET, EW_H, 0, 0, 1, 32'hffff, 32'(addrs[k]));
      ci(OP_STLOCAL, EW_H, 2, 1, 0);
    end
  endtask

  task automatic check_ivalues(string tag);
    for (int k = 0; k < NADDR; k++) begin
      ci(OP_SET, EW_H, 0, 0, 1, 32'hffff, 32'(addrs[k]));
      ci(OP_LDLOCAL, EW_H, 1, 0, 3);
      ci(OP_NOP, EW_W, 0, 0, 0);
      ci(OP_STORE, EW_W, 3, 0, 0, 32'(DW + k) << 5);
    end
    repeat (100) @(posedge clk);
    for (int k = 0; k < NADDR; k++)
      for (int l = 0; l < 16; l++) begin
        checks++;
        if (mem.mem[DW + k][16*l +: 16] !== acc[l][k]) begin
          failures++;
          if (failures < 10) $display("%s: lane %0d address %0d wrong", tag, l, addrs[k]);
        end
      end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0, cyc_a, cyc_b;
    ci_start = 0; ci_n = 0; ci_a = 0; ci_b = 0; ci_c = 0; ci_dataa = 0; ci_datab = 0;
    // 128 distinct neuron addresses spread over the whole lane-local depth
    for (int k = 0; k < NADDR; k++) addrs[k] = 16'(k * 32 + ($urandom % 32));
    for (int l = 0; l < 16; l++) for (int k = 0; k < NADDR; k++) acc[l][k] = 0;
    for (int v = 0; v < NUPD_VEC; v++)
      for (int l = 0; l < 16; l++) begin
        int k;
        logic [15:0] w;
        k = $urandom % NADDR;
        w = 16'($urandom % 2001) - 16'd1000;
        mem.mem[TW + v][16*l +: 16] = addrs[k];
        mem.mem[WW + v][16*l +: 16] = w;
        acc[l][k] += w;
      end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---------------- A: plain loop, 16 updates per iteration
    zero_ivalues();
    t0 = $time;
    ci(OP_LOAD, EW_W, 0, 0, 8,  32'(TW) << 5, 1);
    ci(OP_LOAD, EW_W, 0, 0, 16, 32'(WW) << 5, 1);
    for (int v = 0; v < NUPD_VEC; v++) begin
      ci(OP_COMMIT, EW_W, 0, 0, 0);
      if (v < NUPD_VEC - 1) begin
        ci(OP_LOAD, EW_W, 0, 0, 8,  32'(TW + v + 1) << 5, 1);
        ci(OP_LOAD, EW_W, 0, 0, 16, 32'(WW + v + 1) << 5, 1);
      end
      ci(OP_LDLOCAL, EW_H, 8, 0, 0);
      ci(OP_NOP, EW_W, 0, 0, 0);
      ci(OP_ADD, EW_H, 0, 16, 0);
      ci(OP_STLOCAL, EW_H, 0, 8, 0);
    end
    cyc_a = ($time - t0) / 10;
    check_ivalues("plain loop");

    // ---------------- B: burst loop with record/playback, 128 per iteration
    zero_ivalues();
    ci(OP_RECORD, EW_W, 0, 0, 0, 0);
    for (int j = 0; j < 8; j++) begin
      ci(OP_LDLOCAL, EW_H, 8 + j, 0, 0);
      ci(OP_NOP, EW_W, 0, 0, 0);
      ci(OP_ADD, EW_H, 0, 16 + j, 0);
      ci(OP_STLOCAL, EW_H, 0, 8 + j, 0);
    end
    ci(OP_RECORD, EW_W, 0, 0, 0, 32);
    t0 = $time;
    ci(OP_LOAD, EW_W, 0, 0, 8,  32'(TW) << 5, 8);
    ci(OP_LOAD, EW_W, 0, 0, 16, 32'(WW) << 5, 8);
    for (int it = 0; it < NUPD_VEC / 8; it++) begin
      ci(OP_COMMIT, EW_W, 0, 0, 0);
      if (it < NUPD_VEC / 8 - 1) begin
        ci(OP_LOAD, EW_W, 0, 0, 8,  32'(TW + 8 * (it + 1)) << 5, 8);
        ci(OP_LOAD, EW_W, 0, 0, 16, 32'(WW + 8 * (it + 1)) << 5, 8);
      end
      ci(OP_PLAYBACK, EW_W, 0, 0, 0, 0, 32);
    end
    cyc_b = ($time - t0) / 10;
    check_ivalues("burst loop");

    $display("plain loop: %0d cycles (%0.2f per update); burst+playback: %0d cycles (%0.2f per update)",
             cyc_a, real'(cyc_a) / (16 * NUPD_VEC), cyc_b, real'(cyc_b) / (16 * NUPD_VEC));
    checks++;
    if (!(cyc_b < cyc_a)) begin failures++; $display("burst loop not faster"); end
    checks++;
    if (mem.n_burst_reads != 2 * NUPD_VEC / 8) begin
      failures++; $display("expected %0d burst reads, saw %0d", 2 * NUPD_VEC / 8, mem.n_burst_reads);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
