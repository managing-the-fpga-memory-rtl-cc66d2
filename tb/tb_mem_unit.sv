// tb_mem_unit: self-checking test of the load/store/commit unit against a
// behavioural memory with random waitrequest and an 8-cycle read latency.
// Rounds of random burst loads (1..8 vectors, random destination register)
// and stores are requested, then committed. Checks: every committed vector
// carries the right destination (vDest + k modulo 32) and data, in request
// order; nothing is committed before Commit; loads beyond the LDBUF
// reservation are refused; stores reach memory; bursts are single commands.
module tb_mem_unit;
  import bluevec_pkg::*;
  localparam int WORDS = 1024;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        req_valid, req_store, req_ready, commit_req, commit_we, commit_done, loads_pending;
  logic [31:0] req_addr, req_burst;
  vreg_t       req_dest, commit_dest;
  vec_t        req_data, commit_data;
  logic [31:0] avm_address;
  logic        avm_read, avm_write, avm_waitrequest, avm_readdatavalid;
  logic [5:0]  avm_burstcount;
  vec_t        avm_writedata, avm_readdata;
  int checks = 0, failures = 0;

  mem_unit dut (.*);
  avalon_mem_model #(.WORDS(WORDS), .LAT(8), .WAIT_PCT(30)) mem (
    .clk, .rst_n, .address(avm_address), .read(avm_read), .write(avm_write),
    .burstcount(avm_burstcount), .writedata(avm_writedata), .waitrequest(avm_waitrequest),
    .readdata(avm_readdata), .readdatavalid(avm_readdatavalid));

  vec_t  ref_mem [WORDS];
  vreg_t exp_dest [$];
  vec_t  exp_data [$];

  function automatic vec_t pattern(int i);
    vec_t v;
    for (int k = 0; k < 8; k++) v[32*k +: 32] = 32'(i * 1000 + k) ^ 32'h5a5a0000;
    return v;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // nothing may be committed unless asked
  always @(posedge clk) if (rst_n && commit_we && !commit_req) begin
    failures++; $display("commit write without commit request");
  end

  task automatic request(bit store, int word, int burst, int dest);
    @(negedge clk);
    req_valid = 1; req_store = store; req_addr = 32'(word) << 5; req_burst = 32'(burst);
    req_dest = vreg_t'(dest);
    for (int k = 0; k < 8; k++) req_data[32*k +: 32] = $urandom;
    #1;
    while (!req_ready) begin @(negedge clk); #1; end
    if (store) ref_mem[word] = req_data;
    else for (int k = 0; k < burst; k++) begin
      exp_dest.push_back(vreg_t'(dest + k));
      exp_data.push_back(ref_mem[word + k]);
    end
    @(posedge clk); #1;
    req_valid = 0;
  endtask

  task automatic do_commit();
    int guard = 0;
    @(negedge clk);
    commit_req = 1;
    while (!commit_done && guard < 2000) begin
      #1;
      if (commit_we) begin
        checks++;
        if (exp_dest.size() == 0) begin failures++; $display("unexpected commit"); end
        else begin
          vreg_t d;
          vec_t  v;
          d = exp_dest.pop_front();
          v = exp_data.pop_front();
          if (commit_dest !== d || commit_data !== v) begin
            failures++; $display("commit mismatch: dest %0d vs %0d", commit_dest, d);
          end
        end
      end
      @(negedge clk); guard++;
    end
    commit_req = 0;
    checks++;
    if (exp_dest.size() != 0 || loads_pending) begin failures++; $display("commit left %0d", exp_dest.size()); end
  endtask

  initial begin
    req_valid = 0; req_store = 0; req_addr = 0; req_burst = 0; req_dest = 0; req_data = '0;
    commit_req = 0;
    for (int i = 0; i < WORDS; i++) begin mem.mem[i] = pattern(i); ref_mem[i] = pattern(i); end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 40; round++) begin
      int used, b;
      used = 0;
      while (used < 24) begin
        b = 1 + $urandom % 8;
        if ($urandom % 4 == 0) request(1, 900 + $urandom % 100, 1, 0);
        else begin
          request(0, $urandom % 800, b, $urandom % 32);
          used += b;
        end
      end
      do_commit();
    end
    // reservation limit: 32 vectors requested, a further load must be refused
    request(0, 10, 16, 0);
    request(0, 40, 16, 16);
    @(negedge clk);
    req_valid = 1; req_store = 0; req_addr = 32'd100 << 5; req_burst = 1; #1;
    checks++;
    if (req_ready) begin failures++; $display("load accepted beyond buffer reservation"); end
    req_store = 1; #1;
    checks++;
    if (!req_ready) begin failures++; $display("store refused while loads reserved"); end
    req_valid = 0;
    do_commit();
    repeat (40) @(posedge clk);
    for (int i = 900; i < 1000; i++) begin
      checks++;
      if (mem.mem[i] !== ref_mem[i]) begin failures++; $display("store word %0d wrong", i); end
    end
    checks++;
    if (mem.n_burst_reads == 0 || mem.n_wait_stalls == 0) begin failures++; $display("no bursts or stalls seen"); end
    $display("bursts=%0d reads=%0d writes=%0d stalls=%0d", mem.n_burst_reads, mem.n_reads, mem.n_writes, mem.n_wait_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
