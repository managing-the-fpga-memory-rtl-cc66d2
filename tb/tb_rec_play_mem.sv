// tb_rec_play_mem: self-checking test of record/playback.
// Records random instructions, plays back sub-ranges and checks that the
// exact sequence comes out in order; without back-pressure an N-instruction
// range must take exactly N cycles (one per cycle), and with random stalls
// no instruction may be lost or repeated. An empty range must not start.
module tb_rec_play_mem;
  import bluevec_pkg::*;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         wr_en, start, busy, out_valid, out_ready;
  logic [5:0]   wr_addr, b_addr, e_addr;
  vinstr_t      wr_data, out_instr;
  vinstr_t      ref_mem [DEPTH];
  int checks = 0, failures = 0;

  rec_play_mem #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .wr_en, .wr_addr, .wr_data, .start,
                                     .begin_addr(b_addr), .end_addr(e_addr), .busy,
                                     .out_valid, .out_instr, .out_ready);

  function automatic vinstr_t rnd_instr();
    vinstr_t v;
    v.op = opcode_t'($urandom % 19); v.ew = ewidth_t'($urandom % 3);
    v.a = vreg_t'($urandom); v.b = vreg_t'($urandom); v.c = vreg_t'($urandom);
    v.sa = $urandom; v.sb = $urandom;
    return v;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic play(int b, int e, int stall_pct);
    int idx, cycles;
    @(negedge clk);
    start = 1; b_addr = 6'(b); e_addr = 6'(e);
    @(negedge clk);
    start = 0;
    idx = b; cycles = 0;
    while (busy) begin
      out_ready = ($urandom % 100) >= stall_pct;
      #1;
      checks++;
      if (!out_valid || out_instr !== ref_mem[idx]) begin
        failures++; $display("playback of %0d mismatch", idx);
      end
      cycles++;
      if (out_ready) idx++;
      @(negedge clk);
      if (cycles > 1000) break;
    end
    out_ready = 0;
    checks++;
    if (idx != e) begin failures++; $display("range %0d..%0d ended at %0d", b, e, idx); end
    if (stall_pct == 0) begin
      checks++;
      if (cycles != e - b) begin failures++; $display("rate: %0d cycles for %0d", cycles, e - b); end
    end
  endtask

  initial begin
    wr_en = 0; start = 0; out_ready = 0; wr_addr = 0; b_addr = 0; e_addr = 0; wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 6'(i); wr_data = rnd_instr(); ref_mem[i] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    play(0, 40, 0);
    play(5, 6, 0);
    play(10, 63, 40);
    play(3, 30, 70);
    // empty range
    @(negedge clk); start = 1; b_addr = 7; e_addr = 7;
    @(negedge clk); start = 0;
    checks++;
    if (busy) begin failures++; $display("empty range started"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
