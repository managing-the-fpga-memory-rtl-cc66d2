// tb_mem_arbiter: self-checking test of the shared-memory arbiter.
// Four behavioural masters issue random burst reads and single writes, each
// in its own region of a behavioural memory with random waitrequest. Checks:
// every master receives exactly its own read beats with the right data and
// in order; writes land; no master waits more than a bounded number of
// grants while requesting (round-robin); contention actually occurs.
module tb_mem_arbiter;
  localparam int N = 4, WORDS = 2048, BW = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0][31:0]    m_address;
  logic [N-1:0]          m_read, m_write, m_waitrequest, m_readdatavalid;
  logic [N-1:0][BW-1:0]  m_burstcount;
  logic [N-1:0][255:0]   m_writedata, m_readdata;
  logic [31:0]           s_address;
  logic                  s_read, s_write, s_waitrequest, s_readdatavalid;
  logic [BW-1:0]         s_burstcount;
  logic [255:0]          s_writedata, s_readdata;
  int checks = 0, failures = 0, contention = 0;

  mem_arbiter #(.N(N)) dut (.*);
  avalon_mem_model #(.WORDS(WORDS), .LAT(6), .WAIT_PCT(25)) mem (
    .clk, .rst_n, .address(s_address), .read(s_read), .write(s_write),
    .burstcount(s_burstcount), .writedata(s_writedata), .waitrequest(s_waitrequest),
    .readdata(s_readdata), .readdatavalid(s_readdatavalid));

  logic [255:0] exp_q [N][$];
  logic [255:0] ref_mem [WORDS];
  int           ops_left [N];
  int           wait_run [N];
  bit           done_all;

  function automatic logic [255:0] pattern(int i);
    logic [255:0] v;
    for (int k = 0; k < 8; k++) v[32*k +: 32] = 32'(i * 77 + k * 3);
    return v;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // masters: present a new random command after the previous was accepted
  always @(posedge clk) begin
    if (rst_n) begin
      if ($countones(m_read | m_write) > 1) contention++;
      for (int i = 0; i < N; i++) begin
        if ((m_read[i] || m_write[i]) && !m_waitrequest[i]) begin
          if (m_read[i]) begin
            for (int k = 0; k < int'(m_burstcount[i]); k++)
              exp_q[i].push_back(ref_mem[(m_address[i] >> 5) + k]);
          end else begin
            ref_mem[m_address[i] >> 5] = m_writedata[i];
          end
          wait_run[i] = 0;
          m_read[i] <= 0; m_write[i] <= 0;
        end else if (m_read[i] || m_write[i]) begin
          wait_run[i]++;
          if (wait_run[i] > 200) begin failures++; wait_run[i] = 0; $display("master %0d starved", i); end
        end else if (ops_left[i] > 0 && ($urandom % 3) != 0) begin
          int base;
          base = i * 512 + ($urandom % 480);
          ops_left[i]--;
          m_address[i]    <= 32'(base) << 5;
          m_burstcount[i] <= BW'(1 + $urandom % 8);
          m_writedata[i]  <= {8{$urandom}};
          if ($urandom % 4 == 0) begin m_write[i] <= 1; m_burstcount[i] <= 1; end
          else m_read[i] <= 1;
        end
      end
      for (int i = 0; i < N; i++) if (m_readdatavalid[i]) begin
        checks++;
        if (exp_q[i].size() == 0) begin failures++; $display("master %0d: unexpected beat", i); end
        else begin
          logic [255:0] e;
          e = exp_q[i].pop_front();
          if (m_readdata[i] !== e) begin failures++; $display("master %0d: wrong data", i); end
        end
      end
    end
  end

  initial begin
    m_address = '0; m_read = '0; m_write = '0; m_burstcount = '0; m_writedata = '0;
    for (int i = 0; i < WORDS; i++) begin mem.mem[i] = pattern(i); ref_mem[i] = pattern(i); end
    for (int i = 0; i < N; i++) begin ops_left[i] = 300; wait_run[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    forever begin
      @(posedge clk);
      done_all = 1;
      for (int i = 0; i < N; i++)
        if (ops_left[i] != 0 || m_read[i] || m_write[i] || exp_q[i].size() != 0) done_all = 0;
      if (done_all) break;
    end
    repeat (20) @(posedge clk);
    for (int i = 0; i < WORDS; i++) begin
      checks++;
      if (mem.mem[i] !== ref_mem[i]) begin failures++; $display("word %0d wrong", i); end
    end
    checks++;
    if (contention == 0) begin failures++; $display("no contention seen"); end
    $display("contention cycles=%0d reads=%0d writes=%0d", contention, mem.n_reads, mem.n_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
