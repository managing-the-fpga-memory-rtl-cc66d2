// vec_regfile: the BlueVec vector register file, NREGS vectors of WIDTH bits.
//
// Three asynchronous read ports serve the operand-fetch stage (source A,
// source B and the destination register, which Cond and Set also read).
// Three synchronous write ports serve, in rising priority, the Commit of
// loaded vectors, the multiplier's late writeback and the normal writeback
// stage; when two ports write the same register in one cycle the higher
// priority (younger instruction) wins. The 32-entry size follows the three
// 5-bit register fields of a host custom instruction; the port structure is
// this implementation's choice. All registers reset to zero.
module vec_regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 256,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [AW-1:0]    ra_addr,
  output logic [WIDTH-1:0] ra_data,
  input  logic [AW-1:0]    rb_addr,
  output logic [WIDTH-1:0] rb_data,
  input  logic [AW-1:0]    rc_addr,
  output logic [WIDTH-1:0] rc_data,
  // write ports, lowest priority first
  input  logic             wc_en,     // commit
  input  logic [AW-1:0]    wc_addr,
  input  logic [WIDTH-1:0] wc_data,
  input  logic             wm_en,     // multiplier writeback
  input  logic [AW-1:0]    wm_addr,
  input  logic [WIDTH-1:0] wm_data,
  input  logic             ww_en,     // pipeline writeback
  input  logic [AW-1:0]    ww_addr,
  input  logic [WIDTH-1:0] ww_data
);

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else begin
      if (wc_en) regs[wc_addr] <= wc_data;
      if (wm_en) regs[wm_addr] <= wm_data;
      if (ww_en) regs[ww_addr] <= ww_data;
    end
  end

  assign ra_data = regs[ra_addr];
  assign rb_data = regs[rb_addr];
  assign rc_data = regs[rc_addr];

endmodule
