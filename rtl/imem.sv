// imem: instruction memory of one vector processor, a dual-port RAM. Port A
// is the scalar unit's fetch port, port B the host's port for loading a
// program. Both synchronous, one cycle read latency. The document says only
// that the host and the processors communicate through on-chip dual-port
// memories; a separate instruction memory and its size are this design's
// choice.
module imem #(
  parameter int unsigned DEPTH = vp_pkg::VP_IMEM_DEPTH,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] a_addr,
  output logic [31:0]   a_rdata,
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [31:0]   b_wdata,
  output logic [31:0]   b_rdata
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (b_en && b_we) mem[b_addr] <= b_wdata;
    if (b_en) b_rdata <= mem[b_addr];
    a_rdata <= mem[a_addr];
  end
endmodule
