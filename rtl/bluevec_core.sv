// bluevec_core: one BlueVec vector co-processor.
//
// BlueVec extends a 32-bit host processor with 256-bit vector instructions
// delivered through the host's multi-cycle custom-instruction port: an 8-bit
// extension field selects the operation and element width (n[6:2] opcode,
// n[1:0] B/H/W), a/b/c name vector registers and dataa/datab carry scalars.
// The host raises `ci_start` for one cycle and waits for the one-cycle
// `ci_done` pulse (with `ci_result` for Index) before it starts the next
// instruction. The instruction is latched, then issued into a three-stage
// pipeline:
//
//   F  operand fetch: read up to three vector registers, overriding each with
//      the result of the instruction in E or in W, or of a multiply leaving
//      the multiplier, when it names the same register (forwarding, youngest
//      first). Loads, stores and multiplies leave the pipeline here.
//   E  execute: lane ALU; lane-local memory read or write.
//   W  writeback into the register file; Index returns its scalar here.
//
// Ordinary instructions complete (ci_done) in their issue cycle, so their
// results are usable by the very next instruction. Exceptions, as in the
// design: LoadLocalH data comes from block RAM one cycle late and cannot be
// forwarded from E, so one unrelated instruction (e.g. NoOp) must follow
// before its result is read; Mul has a three-cycle multiplier, so two
// instructions must separate it from a reader; Index answers three cycles
// after issue. The hardware does not interlock these cases.
//
// Load is non-blocking and fills a load buffer (see mem_unit); the register
// file changes only when a Commit is executed, which waits for the pipeline
// to drain and all loaded vectors to arrive, then writes them one per cycle.
// Store is non-blocking and single-vector.
//
// Record(x), with recording off, starts recording at instruction address x;
// every following host instruction is stored instead of executed until the
// next Record, which stops recording. Playback(begin, end) then issues the
// stored instructions begin..end-1 at one per cycle (stalling only on Commit
// and on a full memory queue) and completes when the last has issued.
// Recorded instructions keep the scalar operands they were recorded with; a
// recorded Index discards its result, and Record/Playback inside a recording
// do nothing when played back.
//
// The pipeline, forwarding, latencies and instruction semantics follow the
// design. The encoding, the latching of the host instruction, the exact
// Record/Playback operand convention and the sizes LOCAL_DEPTH, IMEM_DEPTH,
// LDBUF and CMDQ are this implementation's choices. The low five address bits
// of the memory port are always zero (32-byte vectors). The fwd_*_hit signals
// drive nothing; they mark reads served by each forwarding path, for tests.
module bluevec_core
  import bluevec_pkg::*;
#(
  parameter int unsigned LOCAL_DEPTH = 4096,
  parameter int unsigned IMEM_DEPTH  = 1024,
  parameter int unsigned LDBUF       = 32,
  parameter int unsigned MAX_BURST   = 32,
  parameter int unsigned CMDQ        = 4,
  parameter int unsigned MUL_LAT     = 3,
  localparam int unsigned BW         = $clog2(MAX_BURST) + 1,
  localparam int unsigned IAW        = $clog2(IMEM_DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // host custom-instruction slave
  input  logic          ci_start,
  input  logic [7:0]    ci_n,
  input  logic [4:0]    ci_a,
  input  logic [4:0]    ci_b,
  input  logic [4:0]    ci_c,
  input  logic [31:0]   ci_dataa,
  input  logic [31:0]   ci_datab,
  output logic          ci_done,
  output logic [31:0]   ci_result,
  // external memory master
  output logic [31:0]   avm_address,
  output logic          avm_read,
  output logic          avm_write,
  output logic [BW-1:0] avm_burstcount,
  output vec_t          avm_writedata,
  input  logic          avm_waitrequest,
  input  vec_t          avm_readdata,
  input  logic          avm_readdatavalid
);

  // ------------------------------------------------------------ host latch
  vinstr_t ci_instr;
  always_comb begin
    ci_instr.op = (ci_n[6:2] <= 5'd18) ? opcode_t'(ci_n[6:2]) : OP_NOP;
    ci_instr.ew = (ci_n[1:0] == 2'd3) ? EW_W : ewidth_t'(ci_n[1:0]);
    ci_instr.a  = ci_a;
    ci_instr.b  = ci_b;
    ci_instr.c  = ci_c;
    ci_instr.sa = ci_dataa;
    ci_instr.sb = ci_datab;
  end

  logic          pend_valid, recording, play_wait, idx_wait;
  vinstr_t       pend;
  logic [IAW-1:0] rec_ptr;

  // ------------------------------------------------------------ playback
  logic    play_busy, play_valid, play_ready, play_start;
  vinstr_t play_instr;
  logic    rec_we;

  rec_play_mem #(.DEPTH(IMEM_DEPTH)) u_rpm (
    .clk, .rst_n,
    .wr_en     (rec_we),
    .wr_addr   (rec_ptr),
    .wr_data   (pend),
    .start     (play_start),
    .begin_addr(pend.sa[IAW-1:0]),
    .end_addr  (pend.sb[IAW-1:0]),
    .busy      (play_busy),
    .out_valid (play_valid),
    .out_instr (play_instr),
    .out_ready (play_ready)
  );

  // ------------------------------------------------------------ issue slot
  logic    host_ctl;        // pending host instruction handled outside the pipeline
  logic    slot_valid, slot_host;
  vinstr_t slot;

  assign host_ctl = recording || pend.op == OP_RECORD || pend.op == OP_PLAYBACK;

  always_comb begin
    if (play_valid) begin
      slot_valid = 1'b1;
      slot_host  = 1'b0;
      slot       = play_instr;
    end else begin
      slot_valid = pend_valid && !host_ctl;
      slot_host  = 1'b1;
      slot       = pend;
    end
  end

  // pipeline registers
  logic        e_valid, e_we, e_host_idx;
  opcode_t     e_op;
  ewidth_t     e_ew;
  vreg_t       e_dest;
  vec_t        e_va, e_vb, e_vd;
  logic [31:0] e_sa, e_sb;

  logic        w_valid, w_we, w_ld, w_host_idx;
  vreg_t       w_dest;
  vec_t        w_alu;
  logic [31:0] w_scalar;
  vec_t        w_res;

  // multiplier
  logic  mul_in, mul_ov, mul_busy;
  vreg_t mul_od;
  vec_t  mul_or;

  // memory unit
  logic  mu_req_valid, mu_req_ready, commit_req, commit_we, commit_done, loads_pending;
  vreg_t commit_dest;
  vec_t  commit_data;

  logic pipe_empty;
  assign pipe_empty = !e_valid && !w_valid && !mul_busy;

  logic fire;
  always_comb begin
    mu_req_valid = slot_valid && (slot.op == OP_LOAD || slot.op == OP_STORE);
    commit_req   = slot_valid && slot.op == OP_COMMIT && pipe_empty;
    unique case (slot.op)
      OP_COMMIT:          fire = commit_req && commit_done;
      OP_LOAD, OP_STORE:  fire = mu_req_valid && mu_req_ready;
      default:            fire = slot_valid;
    endcase
  end
  assign play_ready = play_valid && fire;

  // ------------------------------------------------------- operand fetch
  vec_t rf_a, rf_b, rf_c, op_a, op_b, op_c, e_res;
  logic fwd_e_hit, fwd_w_hit, fwd_m_hit;   // observation only: a read was forwarded

  vec_regfile #(.NREGS(NUM_VREGS), .WIDTH(VLEN)) u_rf (
    .clk, .rst_n,
    .ra_addr(slot.a), .ra_data(rf_a),
    .rb_addr(slot.b), .rb_data(rf_b),
    .rc_addr(slot.c), .rc_data(rf_c),
    .wc_en(commit_we), .wc_addr(commit_dest), .wc_data(commit_data),
    .wm_en(mul_ov),    .wm_addr(mul_od),      .wm_data(mul_or),
    .ww_en(w_valid && w_we), .ww_addr(w_dest), .ww_data(w_res)
  );

  function automatic vec_t fwd(vreg_t r, vec_t from_rf,
                               logic e_ok, vreg_t ed, vec_t er,
                               logic w_ok, vreg_t wd, vec_t wr,
                               logic m_ok, vreg_t md, vec_t mr);
    if (e_ok && ed == r)      return er;
    else if (w_ok && wd == r) return wr;
    else if (m_ok && md == r) return mr;
    else                      return from_rf;
  endfunction

  logic e_fwd_ok, w_fwd_ok;
  assign e_fwd_ok = e_valid && e_we && e_op != OP_LDLOCAL;
  assign w_fwd_ok = w_valid && w_we;

  assign op_a = fwd(slot.a, rf_a, e_fwd_ok, e_dest, e_res, w_fwd_ok, w_dest, w_res, mul_ov, mul_od, mul_or);
  assign op_b = fwd(slot.b, rf_b, e_fwd_ok, e_dest, e_res, w_fwd_ok, w_dest, w_res, mul_ov, mul_od, mul_or);
  assign op_c = fwd(slot.c, rf_c, e_fwd_ok, e_dest, e_res, w_fwd_ok, w_dest, w_res, mul_ov, mul_od, mul_or);

  // Which source registers an instruction really reads (for the hit flags).
  logic rd_a, rd_b, hit_e, hit_w;
  always_comb begin
    unique case (slot.op)
      OP_NOP, OP_LOAD, OP_COMMIT, OP_RECORD, OP_PLAYBACK, OP_SET: rd_a = 1'b0;
      default:                                                    rd_a = 1'b1;
    endcase
    unique case (slot.op)
      OP_ADD, OP_SUB, OP_MUL, OP_CMP, OP_COND, OP_WTOH, OP_STLOCAL: rd_b = 1'b1;
      default:                                                      rd_b = 1'b0;
    endcase
    hit_e     = e_fwd_ok && ((rd_a && e_dest == slot.a) || (rd_b && e_dest == slot.b));
    hit_w     = w_fwd_ok && ((rd_a && w_dest == slot.a) || (rd_b && w_dest == slot.b));
    fwd_e_hit = fire && hit_e;
    fwd_w_hit = fire && hit_w && !hit_e;
    fwd_m_hit = fire && mul_ov && ((rd_a && mul_od == slot.a) || (rd_b && mul_od == slot.b))
                && !hit_e && !hit_w;
  end

  // ------------------------------------------------------- memory unit
  mem_unit #(.CMDQ(CMDQ), .LDBUF(LDBUF), .MAX_BURST(MAX_BURST)) u_mu (
    .clk, .rst_n,
    .req_valid(mu_req_valid), .req_store(slot.op == OP_STORE),
    .req_addr(slot.sa), .req_burst(slot.sb), .req_dest(slot.c), .req_data(op_a),
    .req_ready(mu_req_ready),
    .commit_req, .commit_we, .commit_dest, .commit_data, .commit_done, .loads_pending,
    .avm_address, .avm_read, .avm_write, .avm_burstcount, .avm_writedata,
    .avm_waitrequest, .avm_readdata, .avm_readdatavalid
  );

  // ------------------------------------------------------- multiplier
  assign mul_in = fire && slot.op == OP_MUL;

  vec_mul #(.LATENCY(MUL_LAT)) u_mul (
    .clk, .rst_n,
    .in_valid(mul_in), .in_ew(slot.ew), .in_dest(slot.c), .in_a(op_a), .in_b(op_b),
    .out_valid(mul_ov), .out_dest(mul_od), .out_res(mul_or), .busy(mul_busy)
  );

  // ------------------------------------------------------- execute
  logic [31:0] e_scalar;

  vec_alu u_alu (
    .op(e_op), .ew(e_ew), .va(e_va), .vb(e_vb), .vd(e_vd), .sa(e_sa), .sb(e_sb),
    .res(e_res), .scalar_res(e_scalar)
  );

  logic [HLANES*16-1:0] llm_rdata;

  lane_local_mem #(.LANES(HLANES), .DEPTH(LOCAL_DEPTH)) u_llm (
    .clk,
    .rd_en(e_valid && e_op == OP_LDLOCAL),
    .wr_en(e_valid && e_op == OP_STLOCAL),
    .addr (e_op == OP_STLOCAL ? e_vb : e_va),
    .wdata(e_va),
    .rdata(llm_rdata)
  );

  function automatic logic writes_vreg(opcode_t o);
    unique case (o)
      OP_ADD, OP_SUB, OP_SHL, OP_SHR, OP_CMP, OP_COND, OP_SET,
      OP_HTOW, OP_WTOH, OP_LDLOCAL: return 1'b1;
      default:                      return 1'b0;
    endcase
  endfunction

  function automatic logic uses_e(opcode_t o);
    return writes_vreg(o) || o == OP_STLOCAL || o == OP_INDEX;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_valid <= 1'b0; e_we <= 1'b0; e_host_idx <= 1'b0;
      e_op <= OP_NOP; e_ew <= EW_W; e_dest <= '0;
      e_va <= '0; e_vb <= '0; e_vd <= '0; e_sa <= '0; e_sb <= '0;
      w_valid <= 1'b0; w_we <= 1'b0; w_ld <= 1'b0; w_host_idx <= 1'b0;
      w_dest <= '0; w_alu <= '0; w_scalar <= '0;
    end else begin
      e_valid    <= fire && uses_e(slot.op);
      e_we       <= writes_vreg(slot.op);
      e_host_idx <= fire && slot_host && slot.op == OP_INDEX;
      e_op       <= slot.op;
      e_ew       <= slot.ew;
      e_dest     <= slot.c;
      e_va       <= op_a;
      e_vb       <= op_b;
      e_vd       <= op_c;
      e_sa       <= slot.sa;
      e_sb       <= slot.sb;

      w_valid    <= e_valid;
      w_we       <= e_we;
      w_ld       <= e_op == OP_LDLOCAL;
      w_host_idx <= e_valid && e_host_idx;
      w_dest     <= e_dest;
      w_alu      <= e_res;
      w_scalar   <= e_scalar;
    end
  end

  assign w_res = w_ld ? llm_rdata : w_alu;

  // ------------------------------------------------------- host control
  logic ctl_done;
  always_comb begin
    rec_we     = pend_valid && recording && pend.op != OP_RECORD && !play_busy;
    play_start = pend_valid && !recording && pend.op == OP_PLAYBACK;
    ctl_done   = pend_valid && (rec_we || pend.op == OP_RECORD);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_valid <= 1'b0;
      pend       <= '0;
      recording  <= 1'b0;
      rec_ptr    <= '0;
      play_wait  <= 1'b0;
      idx_wait   <= 1'b0;
    end else begin
      if (ci_start) begin
        pend_valid <= 1'b1;
        pend       <= ci_instr;
      end else if (pend_valid) begin
        if (host_ctl) begin
          if (rec_we) rec_ptr <= rec_ptr + IAW'(1);
          if (pend.op == OP_RECORD) begin
            recording <= !recording;
            if (!recording) rec_ptr <= pend.sa[IAW-1:0];
          end
          if (play_start) play_wait <= 1'b1;
          pend_valid <= 1'b0;
        end else if (!play_valid && fire) begin
          pend_valid <= 1'b0;
          if (pend.op == OP_INDEX) idx_wait <= 1'b1;
        end
      end
      if (play_wait && !play_busy && !play_start) play_wait <= 1'b0;
      if (idx_wait && w_host_idx) idx_wait <= 1'b0;
    end
  end

  always_comb begin
    ci_done   = 1'b0;
    ci_result = '0;
    if (pend_valid && host_ctl && !play_start) ci_done = ctl_done;
    if (pend_valid && !host_ctl && !play_valid && fire && pend.op != OP_INDEX) ci_done = 1'b1;
    if (play_wait && !play_busy) ci_done = 1'b1;
    if (w_host_idx) begin
      ci_done   = 1'b1;
      ci_result = w_scalar;
    end
  end

  a_one_at_a_time: assert property (@(posedge clk) disable iff (!rst_n)
                                    ci_start |-> !(pend_valid || play_wait || idx_wait))
    else $error("bluevec_core: new custom instruction before the previous completed");

endmodule
