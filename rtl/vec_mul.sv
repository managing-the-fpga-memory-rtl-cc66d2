// vec_mul: lane-parallel vector multiplier with a fixed LATENCY.
//
// Every byte, half-word or word lane (selected by `ew`) multiplies its two
// operands and keeps the low bits of the product. The operands are captured
// on the clock edge ending the cycle in which `in_valid` is high, and the
// result, with the destination register tag, leaves the last of LATENCY
// pipeline registers: an operation started in cycle t is on `out_*` during
// cycle t+LATENCY. The three-cycle latency is the design's figure for
// multiplier blocks clocked above 200 MHz; the pipeline is fully pipelined,
// so one multiply may start every cycle. Where the pipeline registers sit
// (here: operands, raw products, result) is this implementation's choice.
module vec_mul
  import bluevec_pkg::*;
#(
  parameter int unsigned LATENCY = 3
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  ewidth_t in_ew,
  input  vreg_t   in_dest,
  input  vec_t    in_a,
  input  vec_t    in_b,
  output logic    out_valid,
  output vreg_t   out_dest,
  output vec_t    out_res,
  output logic    busy       // an operation is somewhere in the pipeline
);

  // Stage 1: operand registers.
  logic    s1_valid;
  ewidth_t s1_ew;
  vreg_t   s1_dest;
  vec_t    s1_a, s1_b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_ew    <= EW_W;
      s1_dest  <= '0;
      s1_a     <= '0;
      s1_b     <= '0;
    end else begin
      s1_valid <= in_valid;
      s1_ew    <= in_ew;
      s1_dest  <= in_dest;
      s1_a     <= in_a;
      s1_b     <= in_b;
    end
  end

  vec_t prod;
  always_comb begin
    prod = '0;
    unique case (s1_ew)
      EW_B: for (int i = 0; i < 32; i++)
              prod[8*i +: 8] = s1_a[8*i +: 8] * s1_b[8*i +: 8];
      EW_H: for (int i = 0; i < 16; i++)
              prod[16*i +: 16] = s1_a[16*i +: 16] * s1_b[16*i +: 16];
      default: for (int i = 0; i < 8; i++)
              prod[32*i +: 32] = s1_a[32*i +: 32] * s1_b[32*i +: 32];
    endcase
  end

  // Stages 2..LATENCY: product pipeline.
  logic  pv [2:LATENCY];
  vreg_t pd [2:LATENCY];
  vec_t  pr [2:LATENCY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 2; s <= LATENCY; s++) begin
        pv[s] <= 1'b0;
        pd[s] <= '0;
        pr[s] <= '0;
      end
    end else begin
      pv[2] <= s1_valid;
      pd[2] <= s1_dest;
      pr[2] <= prod;
      for (int s = 3; s <= LATENCY; s++) begin
        pv[s] <= pv[s-1];
        pd[s] <= pd[s-1];
        pr[s] <= pr[s-1];
      end
    end
  end

  assign out_valid = pv[LATENCY];
  assign out_dest  = pd[LATENCY];
  assign out_res   = pr[LATENCY];

  always_comb begin
    busy = s1_valid;
    for (int s = 2; s <= LATENCY; s++) busy = busy | pv[s];
  end

  initial assert (LATENCY >= 2) else $error("vec_mul: LATENCY must be at least 2");

endmodule
