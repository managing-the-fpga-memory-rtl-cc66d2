// rec_play_mem: record/playback instruction memory and sequencer.
//
// The host cannot issue vector instructions at one per cycle, so sequences
// are first recorded into this local memory (write port: one instruction
// per `wr_en`) and later played back by a single host instruction. A pulse
// on `start` with addresses [begin_addr, end_addr) starts playback; from the
// next cycle `out_valid` presents instruction begin_addr and each cycle in
// which the pipeline accepts it (`out_ready`) advances to the next one, so an
// unstalled sequence of N instructions issues in N consecutive cycles. `busy`
// is high from the cycle after `start` until the last instruction has been
// accepted. The memory has a registered read (block RAM style): it re-reads
// the current address while stalled and reads the next one when it
// advances. Playing back an empty range (begin == end) does nothing. The
// record/playback idea is the design's; DEPTH and the interface are this
// implementation's choices.
module rec_play_mem
  import bluevec_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // record port
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  vinstr_t       wr_data,
  // playback control
  input  logic          start,
  input  logic [AW-1:0] begin_addr,
  input  logic [AW-1:0] end_addr,
  output logic          busy,
  // instruction stream
  output logic          out_valid,
  output vinstr_t       out_instr,
  input  logic          out_ready
);

  vinstr_t       mem [DEPTH];
  vinstr_t       q;
  logic [AW-1:0] pc, end_q, rd_addr;
  logic          running, fire;

  assign fire = running & out_ready;

  always_comb begin
    if (start && !running) rd_addr = begin_addr;
    else if (fire)         rd_addr = pc + AW'(1);
    else                   rd_addr = pc;
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    q <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      pc      <= '0;
      end_q   <= '0;
    end else if (start && !running) begin
      running <= (begin_addr != end_addr);
      pc      <= begin_addr;
      end_q   <= end_addr;
    end else if (fire) begin
      pc <= pc + AW'(1);
      if (pc + AW'(1) == end_q) running <= 1'b0;
    end
  end

  assign busy      = running;
  assign out_valid = running;
  assign out_instr = q;

endmodule
