// avalon_mem_model: behavioural model of the external memory (testbench only).
//
// Not synthesizable. An Avalon-MM style slave with a 256-bit data bus:
// a read or write is accepted in a cycle where waitrequest is low;
// waitrequest is raised at random (WAIT_PCT percent of cycles) to exercise
// the masters' stall paths. A read burst of n beats returns its data in
// order, one beat per cycle, starting LAT cycles after acceptance; the data
// is captured when the read is accepted, so the memory behaves as if
// accesses happen in acceptance order. Addresses are byte addresses of
// 32-byte words, taken modulo WORDS. Counters record accesses for tests.
module avalon_mem_model #(
  parameter int unsigned WORDS    = 4096,
  parameter int unsigned LAT      = 8,
  parameter int unsigned WAIT_PCT = 20,
  parameter int unsigned BW       = 6
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [31:0]   address,
  input  logic          read,
  input  logic          write,
  input  logic [BW-1:0] burstcount,
  input  logic [255:0]  writedata,
  output logic          waitrequest,
  output logic [255:0]  readdata,
  output logic          readdatavalid
);

  typedef struct {
    logic [255:0] data;
    longint       due;
  } beat_t;

  logic [255:0] mem [WORDS];
  beat_t        q [$];
  longint       cyc;
  int           n_reads, n_burst_reads, n_writes, n_wait_stalls, n_beats;

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
    cyc = 0; n_reads = 0; n_burst_reads = 0; n_writes = 0; n_wait_stalls = 0; n_beats = 0;
  end

  function automatic int unsigned widx(logic [31:0] a, int k);
    return ((a >> 5) + k) % WORDS;
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      waitrequest   <= 1'b1;
      readdatavalid <= 1'b0;
      readdata      <= '0;
      q.delete();
    end else begin
      cyc++;
      if ((read || write) && waitrequest) n_wait_stalls++;
      if (!waitrequest && read) begin
        n_reads++;
        if (burstcount > 1) n_burst_reads++;
        for (int k = 0; k < int'(burstcount); k++)
          q.push_back('{data: mem[widx(address, k)], due: cyc + LAT + k});
      end
      if (!waitrequest && write) begin
        n_writes++;
        mem[widx(address, 0)] = writedata;
      end
      readdatavalid <= 1'b0;
      if (q.size() > 0 && q[0].due <= cyc) begin
        readdata      <= q[0].data;
        readdatavalid <= 1'b1;
        n_beats++;
        void'(q.pop_front());
      end
      waitrequest <= ($urandom % 100) < WAIT_PCT;
    end
  end

endmodule
