// lane_local_mem: one block RAM per half-word vector lane (LOCAL_i).
//
// Each of the LANES lanes owns a DEPTH x 16-bit single-port memory. A
// LoadLocalH presents a vector of 16-bit addresses, one per lane; lane i
// reads LOCAL_i[addr[i]] and the read data appears one cycle later, on the
// registered block-RAM output (this is why the result cannot be forwarded in
// the execute stage). A StoreLocalH writes wdata[i] to LOCAL_i[addr[i]] at
// the clock edge. Only the low $clog2(DEPTH) bits of each address are used.
// The per-lane organisation, half-word lanes and one-cycle read latency
// follow the design; DEPTH is a per-application parameter whose value here
// (4096 entries, enough for the I-values of 64k neurons in one core) is this
// implementation's choice. Contents are not reset.
module lane_local_mem #(
  parameter int unsigned LANES = 16,
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               rd_en,
  input  logic               wr_en,
  input  logic [LANES*16-1:0] addr,
  input  logic [LANES*16-1:0] wdata,
  output logic [LANES*16-1:0] rdata
);

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic [15:0] mem [DEPTH];
    logic [AW-1:0] a;
    assign a = addr[16*l +: AW];

    always_ff @(posedge clk) begin
      if (wr_en) mem[a] <= wdata[16*l +: 16];
      if (rd_en) rdata[16*l +: 16] <= mem[a];
    end
  end

endmodule
