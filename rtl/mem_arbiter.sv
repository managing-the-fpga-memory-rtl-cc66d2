// mem_arbiter: shares one external memory port among N BlueVec cores.
//
// Each core's memory unit is an Avalon-MM style master (read or write held
// until waitrequest is low, read bursts answered in order). The arbiter
// grants the shared port to one requesting master at a time in round-robin
// order, starting the search after the master served last; the granted
// command is passed through unchanged, and every other requester sees
// waitrequest. A command is forwarded only when the shared port accepts it,
// at which point a read's master index and burst length are pushed into an
// in-order tracking queue; returning read beats are steered to the master at
// the head of that queue and the entry is retired after its last beat. When
// the tracking queue is full, no further read is granted. The document only
// states that the cores share one DDR2 memory; the round-robin policy, the
// tracking queue (OUTQ entries) and the protocol are this implementation's.
// Read data is broadcast to every master unregistered; only readdatavalid
// is steered.
module mem_arbiter #(
  parameter int unsigned N      = 4,
  parameter int unsigned DW     = 256,
  parameter int unsigned BW     = 6,
  parameter int unsigned OUTQ   = 16,
  localparam int unsigned IW    = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // masters
  input  logic [N-1:0][31:0]   m_address,
  input  logic [N-1:0]         m_read,
  input  logic [N-1:0]         m_write,
  input  logic [N-1:0][BW-1:0] m_burstcount,
  input  logic [N-1:0][DW-1:0] m_writedata,
  output logic [N-1:0]         m_waitrequest,
  output logic [N-1:0][DW-1:0] m_readdata,
  output logic [N-1:0]         m_readdatavalid,
  // shared slave port
  output logic [31:0]          s_address,
  output logic                 s_read,
  output logic                 s_write,
  output logic [BW-1:0]        s_burstcount,
  output logic [DW-1:0]        s_writedata,
  input  logic                 s_waitrequest,
  input  logic [DW-1:0]        s_readdata,
  input  logic                 s_readdatavalid
);

  localparam int unsigned QW = $clog2(OUTQ);

  typedef struct packed {
    logic [IW-1:0] id;
    logic [BW-1:0] burst;
  } track_t;

  track_t        tq [OUTQ];
  logic [QW-1:0] tq_wp, tq_rp;
  logic [QW:0]   tq_cnt;
  logic          tq_full;
  assign tq_full = (tq_cnt == (QW+1)'(OUTQ));

  // eligible requests: a read needs a free tracking entry
  logic [N-1:0] elig;
  always_comb begin
    for (int i = 0; i < N; i++) elig[i] = m_write[i] | (m_read[i] & ~tq_full);
  end

  logic [IW-1:0] last_grant, sel;
  logic          any;
  always_comb begin
    any = 1'b0;
    sel = last_grant;
    for (int k = 1; k <= N; k++) begin
      int unsigned idx;
      idx = (int'(last_grant) + k) % N;
      if (!any && elig[idx]) begin
        any = 1'b1;
        sel = IW'(idx);
      end
    end
  end

  assign s_address    = m_address[sel];
  assign s_read       = any & m_read[sel];
  assign s_write      = any & m_write[sel];
  assign s_burstcount = m_burstcount[sel];
  assign s_writedata  = m_writedata[sel];

  logic accept;
  assign accept = any & ~s_waitrequest;

  always_comb begin
    for (int i = 0; i < N; i++)
      m_waitrequest[i] = !(accept && sel == IW'(i));
  end

  // read return steering
  track_t        th;
  logic [BW-1:0] beat;
  logic          last;
  assign th   = tq[tq_rp];
  assign last = s_readdatavalid && (beat + BW'(1) == th.burst);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      m_readdata[i]      = s_readdata;
      m_readdatavalid[i] = s_readdatavalid && (th.id == IW'(i));
    end
  end

  logic push;
  assign push = accept & s_read;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_grant <= IW'(N-1);
      tq_wp      <= '0;
      tq_rp      <= '0;
      tq_cnt     <= '0;
      beat       <= '0;
    end else begin
      if (accept) last_grant <= sel;
      if (push) begin
        tq[tq_wp] <= '{id: sel, burst: s_burstcount};
        tq_wp     <= (tq_wp == QW'(OUTQ-1)) ? '0 : tq_wp + QW'(1);
      end
      if (s_readdatavalid) begin
        if (last) begin
          beat  <= '0;
          tq_rp <= (tq_rp == QW'(OUTQ-1)) ? '0 : tq_rp + QW'(1);
        end else begin
          beat <= beat + BW'(1);
        end
      end
      tq_cnt <= tq_cnt + (QW+1)'(push) - (QW+1)'(last);
    end
  end

  a_no_stray: assert property (@(posedge clk) disable iff (!rst_n)
                               s_readdatavalid |-> (tq_cnt != 0))
    else $error("mem_arbiter: read data with no outstanding read");

endmodule
