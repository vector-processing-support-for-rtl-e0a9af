// vrf_bank: one bank of the vector register file. It holds, for each of
// NVREG vector registers, the EPB elements whose index is congruent to this
// bank's number modulo the bank count. Three asynchronous read ports and one
// synchronous write port, as the document gives for each bank; asynchronous
// reads (LUT-RAM style) are this design's choice.
// Address = {register, row}, row = element index / NLANES.
module vrf_bank #(
  parameter int unsigned NVREG = vp_pkg::VP_NVREG,
  parameter int unsigned EPB   = vp_pkg::VP_MAXVL / vp_pkg::VP_NLANES,
  localparam int unsigned AW   = $clog2(NVREG * EPB)
) (
  input  logic                clk,
  input  logic [2:0][AW-1:0]  raddr,
  output logic [2:0][31:0]    rdata,
  input  logic                we,
  input  logic [AW-1:0]       waddr,
  input  logic [31:0]         wdata
);
  logic [31:0] mem [NVREG*EPB];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_comb begin
    for (int p = 0; p < 3; p++) rdata[p] = mem[raddr[p]];
  end
endmodule
