// mem_unit: BlueVec external-memory unit (memory-mapped burst master).
//
// Load(vDest, sAddr, n) reads n consecutive 256-bit vectors starting at byte
// address sAddr with a single burst of n beats; Store(vSrc, sAddr) writes one
// vector. Both are non-blocking: the issue stage hands them over through the
// req_* port (a valid/ready handshake) in the cycle they issue, and they are
// sent to memory in program order from a small command queue. Returned
// vectors do not touch the register file: they wait, tagged with their
// destination register (vDest + k, modulo 32), in a load buffer. While
// `commit_req` is high and every vector requested so far has arrived, the
// buffer drains one vector per cycle on commit_*; `commit_done` is high once
// nothing is left. A load is accepted only if the buffer has room reserved for
// all of its beats (LDBUF vectors in total), so the memory never has to be
// stalled on read data; software must Commit before requesting more than
// LDBUF uncommitted vectors.
//
// Memory port: Avalon-MM style master. Byte address (the low 5 bits are
// ignored: vectors are 32-byte aligned), read/write held until waitrequest
// is low, burstcount beats of readdata returned in order with readdatavalid.
// Non-burst stores, burst loads and the commit semantics follow the design;
// the queue sizes, the buffer organisation and the bus protocol are this
// implementation's choices. A burst length of 0 is treated as 1 and one
// above MAX_BURST as MAX_BURST.
module mem_unit
  import bluevec_pkg::*;
#(
  parameter int unsigned CMDQ      = 4,
  parameter int unsigned LDBUF     = 32,
  parameter int unsigned MAX_BURST = 32,
  localparam int unsigned BW       = $clog2(MAX_BURST) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // requests from the issue stage
  input  logic          req_valid,
  input  logic          req_store,
  input  logic [31:0]   req_addr,
  input  logic [31:0]   req_burst,
  input  vreg_t         req_dest,
  input  vec_t          req_data,
  output logic          req_ready,
  // commit
  input  logic          commit_req,
  output logic          commit_we,
  output vreg_t         commit_dest,
  output vec_t          commit_data,
  output logic          commit_done,
  output logic          loads_pending,   // uncommitted load vectors exist
  // memory master
  output logic [31:0]   avm_address,
  output logic          avm_read,
  output logic          avm_write,
  output logic [BW-1:0] avm_burstcount,
  output vec_t          avm_writedata,
  input  logic          avm_waitrequest,
  input  vec_t          avm_readdata,
  input  logic          avm_readdatavalid
);

  localparam int unsigned CW = $clog2(CMDQ);
  localparam int unsigned LW = $clog2(LDBUF);

  typedef struct packed {
    logic          store;
    logic [31:0]   addr;
    logic [BW-1:0] burst;
    vec_t          data;
  } cmd_t;

  typedef struct packed {
    vreg_t         dest;
    logic [BW-1:0] burst;
  } track_t;

  typedef struct packed {
    vreg_t dest;
    vec_t  data;
  } lbent_t;

  // ---------------------------------------------------------------- request
  logic [BW-1:0] burst_eff;
  always_comb begin
    if (req_burst == 0)              burst_eff = BW'(1);
    else if (req_burst > MAX_BURST)  burst_eff = BW'(MAX_BURST);
    else                             burst_eff = req_burst[BW-1:0];
  end

  cmd_t          cq [CMDQ];
  logic [CW-1:0] cq_wp, cq_rp;
  logic [CW:0]   cq_cnt;
  logic [LW:0]   reserved;        // vectors requested and not yet committed
  logic          room_for_load;

  assign room_for_load = (32'(reserved) + 32'(burst_eff)) <= LDBUF;
  assign req_ready     = (cq_cnt < (CW+1)'(CMDQ)) && (req_store || room_for_load);

  logic req_fire, cmd_fire;
  assign req_fire = req_valid && req_ready;
  assign cmd_fire = (cq_cnt != 0) && !avm_waitrequest;

  cmd_t head;
  assign head           = cq[cq_rp];
  assign avm_read       = (cq_cnt != 0) && !head.store;
  assign avm_write      = (cq_cnt != 0) &&  head.store;
  assign avm_address    = {head.addr[31:5], 5'b0};
  assign avm_burstcount = head.store ? BW'(1) : head.burst;
  assign avm_writedata  = head.data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cq_wp  <= '0;
      cq_rp  <= '0;
      cq_cnt <= '0;
    end else begin
      if (req_fire) begin
        cq[cq_wp] <= '{store: req_store, addr: req_addr, burst: burst_eff, data: req_data};
        cq_wp     <= (cq_wp == CW'(CMDQ-1)) ? '0 : cq_wp + CW'(1);
      end
      if (cmd_fire) cq_rp <= (cq_rp == CW'(CMDQ-1)) ? '0 : cq_rp + CW'(1);
      cq_cnt <= cq_cnt + (CW+1)'(req_fire) - (CW+1)'(cmd_fire);
    end
  end

  // ------------------------------------------------- destination tracking
  track_t        tq [LDBUF];
  logic [LW-1:0] tq_wp, tq_rp;
  logic [BW-1:0] beat;
  logic          last_beat;
  track_t        thead;

  assign thead     = tq[tq_rp];
  assign last_beat = avm_readdatavalid && (beat + BW'(1) == thead.burst);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tq_wp <= '0;
      tq_rp <= '0;
      beat  <= '0;
    end else begin
      if (req_fire && !req_store) begin
        tq[tq_wp] <= '{dest: req_dest, burst: burst_eff};
        tq_wp     <= (tq_wp == LW'(LDBUF-1)) ? '0 : tq_wp + LW'(1);
      end
      if (avm_readdatavalid) begin
        if (last_beat) begin
          beat  <= '0;
          tq_rp <= (tq_rp == LW'(LDBUF-1)) ? '0 : tq_rp + LW'(1);
        end else begin
          beat <= beat + BW'(1);
        end
      end
    end
  end

  // ------------------------------------------------------------ load buffer
  lbent_t        lb [LDBUF];
  logic [LW-1:0] lb_wp, lb_rp;
  logic [LW:0]   lb_cnt;
  logic          pop;

  assign pop         = commit_req && (lb_cnt == reserved) && (lb_cnt != 0);
  assign commit_we   = pop;
  assign commit_dest = lb[lb_rp].dest;
  assign commit_data = lb[lb_rp].data;
  assign commit_done = commit_req && (reserved == 0);
  assign loads_pending = (reserved != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lb_wp    <= '0;
      lb_rp    <= '0;
      lb_cnt   <= '0;
      reserved <= '0;
    end else begin
      if (avm_readdatavalid) begin
        lb[lb_wp] <= '{dest: thead.dest + vreg_t'(beat), data: avm_readdata};
        lb_wp     <= (lb_wp == LW'(LDBUF-1)) ? '0 : lb_wp + LW'(1);
      end
      if (pop) lb_rp <= (lb_rp == LW'(LDBUF-1)) ? '0 : lb_rp + LW'(1);
      lb_cnt   <= lb_cnt + (LW+1)'(avm_readdatavalid) - (LW+1)'(pop);
      reserved <= reserved + ((req_fire && !req_store) ? (LW+1)'(burst_eff) : '0)
                           - (LW+1)'(pop);
    end
  end

  // ------------------------------------------------------------ assertions
  a_room: assert property (@(posedge clk) disable iff (!rst_n)
                           avm_readdatavalid |-> (lb_cnt < reserved))
    else $error("mem_unit: read data without a reserved buffer entry");

endmodule
