// bluevec_system: NUM_CORES BlueVec co-processors sharing one external memory.
//
// This is the multi-core arrangement: each host processor (outside this
// module) drives its own BlueVec core through a custom-instruction port, and
// all cores stream from one external DDR2-class memory whose 256-bit port is
// shared through a round-robin arbiter (mem_arbiter). The four-core default
// is the design's best configuration, with one vector core per host; host
// processors, their local memories, the network between them and the memory
// controller are not part of this RTL, so their connections are brought out
// as ports: per-core custom-instruction signals (packed arrays, index = core)
// and one Avalon-MM style burst master towards memory. Timing is that of
// bluevec_core and mem_arbiter; the arbiter adds no register stage.
module bluevec_system
  import bluevec_pkg::*;
#(
  parameter int unsigned NUM_CORES   = 4,
  parameter int unsigned LOCAL_DEPTH = 4096,
  parameter int unsigned IMEM_DEPTH  = 1024,
  parameter int unsigned LDBUF       = 32,
  parameter int unsigned MAX_BURST   = 32,
  localparam int unsigned BW         = $clog2(MAX_BURST) + 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // host custom-instruction ports, one per core
  input  logic [NUM_CORES-1:0]        ci_start,
  input  logic [NUM_CORES-1:0][7:0]   ci_n,
  input  logic [NUM_CORES-1:0][4:0]   ci_a,
  input  logic [NUM_CORES-1:0][4:0]   ci_b,
  input  logic [NUM_CORES-1:0][4:0]   ci_c,
  input  logic [NUM_CORES-1:0][31:0]  ci_dataa,
  input  logic [NUM_CORES-1:0][31:0]  ci_datab,
  output logic [NUM_CORES-1:0]        ci_done,
  output logic [NUM_CORES-1:0][31:0]  ci_result,
  // shared external memory
  output logic [31:0]                 mem_address,
  output logic                        mem_read,
  output logic                        mem_write,
  output logic [BW-1:0]               mem_burstcount,
  output vec_t                        mem_writedata,
  input  logic                        mem_waitrequest,
  input  vec_t                        mem_readdata,
  input  logic                        mem_readdatavalid
);

  logic [NUM_CORES-1:0][31:0]   m_address;
  logic [NUM_CORES-1:0]         m_read, m_write, m_waitrequest, m_readdatavalid;
  logic [NUM_CORES-1:0][BW-1:0] m_burstcount;
  logic [NUM_CORES-1:0][VLEN-1:0] m_writedata, m_readdata;

  for (genvar i = 0; i < NUM_CORES; i++) begin : g_core
    bluevec_core #(
      .LOCAL_DEPTH(LOCAL_DEPTH), .IMEM_DEPTH(IMEM_DEPTH),
      .LDBUF(LDBUF), .MAX_BURST(MAX_BURST)
    ) u_core (
      .clk, .rst_n,
      .ci_start (ci_start[i]), .ci_n(ci_n[i]), .ci_a(ci_a[i]), .ci_b(ci_b[i]),
      .ci_c     (ci_c[i]), .ci_dataa(ci_dataa[i]), .ci_datab(ci_datab[i]),
      .ci_done  (ci_done[i]), .ci_result(ci_result[i]),
      .avm_address      (m_address[i]),
      .avm_read         (m_read[i]),
      .avm_write        (m_write[i]),
      .avm_burstcount   (m_burstcount[i]),
      .avm_writedata    (m_writedata[i]),
      .avm_waitrequest  (m_waitrequest[i]),
      .avm_readdata     (m_readdata[i]),
      .avm_readdatavalid(m_readdatavalid[i])
    );
  end

  mem_arbiter #(.N(NUM_CORES), .DW(VLEN), .BW(BW)) u_arb (
    .clk, .rst_n,
    .m_address, .m_read, .m_write, .m_burstcount, .m_writedata,
    .m_waitrequest, .m_readdata, .m_readdatavalid,
    .s_address(mem_address), .s_read(mem_read), .s_write(mem_write),
    .s_burstcount(mem_burstcount), .s_writedata(mem_writedata),
    .s_waitrequest(mem_waitrequest), .s_readdata(mem_readdata),
    .s_readdatavalid(mem_readdatavalid)
  );

endmodule
