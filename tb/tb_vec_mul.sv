// tb_vec_mul: self-checking test of the lane-parallel multiplier.
// A random multiply (random element width) may start every cycle; each
// result must appear exactly three cycles after it started, with its
// destination tag, and equal the lane-wise low product computed here.
module tb_vec_mul;
  import bluevec_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    in_valid, out_valid, busy;
  ewidth_t in_ew;
  vreg_t   in_dest, out_dest;
  vec_t    in_a, in_b, out_res;
  int checks = 0, failures = 0;

  vec_mul dut (.clk, .rst_n, .in_valid, .in_ew, .in_dest, .in_a, .in_b,
               .out_valid, .out_dest, .out_res, .busy);

  typedef struct { logic v; vreg_t d; vec_t r; } exp_t;
  exp_t pipe [4];   // pipe[k]: expected output k cycles from now

  function automatic vec_t model(ewidth_t ew, vec_t a, vec_t b);
    vec_t r = '0;
    int n, w;
    w = (ew == EW_B) ? 8 : (ew == EW_H) ? 16 : 32;
    n = 256 / w;
    for (int i = 0; i < n; i++) begin
      longint unsigned x, y, p;
      x = 0; y = 0;
      for (int k = 0; k < w; k++) begin
        x[k] = a[i*w + k];
        y[k] = b[i*w + k];
      end
      p = x * y;
      for (int k = 0; k < w; k++) r[i*w + k] = p[k];
    end
    return r;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_ew = EW_W; in_dest = 0; in_a = '0; in_b = '0;
    for (int k = 0; k < 4; k++) pipe[k] = '{v: 1'b0, d: '0, r: '0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // check what is on the output now
      checks++;
      if (out_valid !== pipe[0].v) begin failures++; $display("t=%0d valid mismatch", t); end
      else if (pipe[0].v && (out_dest !== pipe[0].d || out_res !== pipe[0].r)) begin
        failures++; $display("t=%0d result mismatch", t);
      end
      for (int k = 0; k < 3; k++) pipe[k] = pipe[k+1];
      in_valid = t < 2900 && ($urandom % 4) != 0;
      in_ew    = ewidth_t'($urandom % 3);
      in_dest  = vreg_t'($urandom);
      for (int i = 0; i < 8; i++) begin in_a[32*i +: 32] = $urandom; in_b[32*i +: 32] = $urandom; end
      pipe[2] = '{v: in_valid, d: in_dest, r: model(in_ew, in_a, in_b)};
      pipe[3] = '{v: 1'b0, d: '0, r: '0};
    end
    checks++;
    if (busy) begin failures++; $display("busy after drain"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
