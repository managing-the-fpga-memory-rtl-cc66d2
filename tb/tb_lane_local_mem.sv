// tb_lane_local_mem: self-checking test of the 16 lane-local memories.
// Random vector stores and loads (each lane with its own address) against a
// per-lane reference; read data must appear exactly one cycle after the
// read, and a load must see a store made in the cycle before. Runs with a
// reduced DEPTH of 256 so that addresses collide often; address bits above
// the depth must be ignored.
module tb_lane_local_mem;
  localparam int DEPTH = 256;
  logic clk = 0;
  always #5 clk = ~clk;

  logic          rd_en, wr_en;
  logic [255:0]  addr, wdata, rdata;
  logic [15:0]   ref_mem [16][DEPTH];
  int checks = 0, failures = 0;

  lane_local_mem #(.DEPTH(DEPTH)) dut (.clk, .rd_en, .wr_en, .addr, .wdata, .rdata);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [255:0] expect_q;
    logic         pending;
    rd_en = 0; wr_en = 0; addr = '0; wdata = '0; pending = 0; expect_q = '0;
    // fill every entry so that all reads are defined
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1;
      for (int l = 0; l < 16; l++) begin
        addr[16*l +: 16]  = 16'(a);
        wdata[16*l +: 16] = 16'($urandom);
        ref_mem[l][a]     = wdata[16*l +: 16];
      end
    end
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      if (pending) begin
        checks++;
        if (rdata !== expect_q) begin failures++; $display("t=%0d read mismatch", t); end
      end
      pending = 0;
      wr_en = ($urandom % 2) == 0;
      rd_en = !wr_en;
      for (int l = 0; l < 16; l++) begin
        logic [15:0] a;
        a = 16'($urandom);
        addr[16*l +: 16]  = a;
        wdata[16*l +: 16] = 16'($urandom);
        if (wr_en) ref_mem[l][a % DEPTH] = wdata[16*l +: 16];
        else       expect_q[16*l +: 16]  = ref_mem[l][a % DEPTH];
      end
      pending = rd_en;
    end
    @(negedge clk);
    if (pending) begin
      checks++;
      if (rdata !== expect_q) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
