// tb_vec_regfile: self-checking test of the vector register file.
// Random writes on the three write ports (including same-register
// collisions, where the writeback port must win over the multiplier port,
// which must win over the commit port) against a reference array; all three
// read ports are compared every cycle.
module tb_vec_regfile;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [4:0]   ra, rb, rc, wca, wma, wwa;
  logic [255:0] rda, rdb, rdc, wcd, wmd, wwd;
  logic         wce, wme, wwe;
  logic [255:0] ref_regs [32];
  int checks = 0, failures = 0;

  vec_regfile dut (.clk, .rst_n, .ra_addr(ra), .ra_data(rda), .rb_addr(rb), .rb_data(rdb),
                   .rc_addr(rc), .rc_data(rdc), .wc_en(wce), .wc_addr(wca), .wc_data(wcd),
                   .wm_en(wme), .wm_addr(wma), .wm_data(wmd), .ww_en(wwe), .ww_addr(wwa), .ww_data(wwd));

  function automatic logic [255:0] rnd256();
    logic [255:0] v;
    for (int i = 0; i < 8; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {wce, wme, wwe} = '0; ra = 0; rb = 0; rc = 0; wca = 0; wma = 0; wwa = 0;
    wcd = '0; wmd = '0; wwd = '0;
    for (int i = 0; i < 32; i++) ref_regs[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      // compare reads of the current state
      ra = 5'($urandom); rb = 5'($urandom); rc = 5'($urandom);
      #1;
      checks += 3;
      if (rda !== ref_regs[ra]) begin failures++; $display("read A r%0d mismatch", ra); end
      if (rdb !== ref_regs[rb]) begin failures++; $display("read B r%0d mismatch", rb); end
      if (rdc !== ref_regs[rc]) begin failures++; $display("read C r%0d mismatch", rc); end
      wce = ($urandom % 3) == 0; wme = ($urandom % 3) == 0; wwe = ($urandom % 3) == 0;
      wca = 5'($urandom); wma = 5'($urandom); wwa = 5'($urandom);
      if (t % 7 == 0) begin wma = wca; wwa = wca; end
      wcd = rnd256(); wmd = rnd256(); wwd = rnd256();
      if (wce) ref_regs[wca] = wcd;
      if (wme) ref_regs[wma] = wmd;
      if (wwe) ref_regs[wwa] = wwd;
    end
    @(negedge clk);
    {wce, wme, wwe} = '0;
    for (int r = 0; r < 32; r++) begin
      ra = 5'(r); #1; checks++;
      if (rda !== ref_regs[r]) begin failures++; $display("final r%0d mismatch", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
