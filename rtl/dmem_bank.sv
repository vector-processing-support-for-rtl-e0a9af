// dmem_bank: one bank of the on-chip data memory, a true dual-port RAM
// (the document: "on-chip dual port memories"). Port A serves the processor,
// port B the host. Both ports are synchronous: read data appears the cycle
// after the enable, as in FPGA block RAM (this design's choice). If both
// ports write the same word in one cycle, port A wins.
module dmem_bank #(
  parameter int unsigned DEPTH = vp_pkg::VP_BANK_DEPTH,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [31:0]   a_wdata,
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
    if (a_en && a_we) mem[a_addr] <= a_wdata;
    if (a_en) a_rdata <= mem[a_addr];
    if (b_en) b_rdata <= mem[b_addr];
  end
endmodule
