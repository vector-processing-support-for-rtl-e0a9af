// vrf: vector register file of NVREG registers x MAXVL single-precision
// elements, organised in NLANES banks (eight in the document). Element i of
// every register is stored in bank i mod NLANES at row i / NLANES, so one
// access to a row reaches NLANES consecutive elements, one per bank.
// Each bank has three read ports and one write port (document); the
// read port p of every bank is addressed by raddr_reg[p]/raddr_row[p] and
// returns rdata[p][bank]. The write port writes row waddr_row of register
// waddr_reg in every bank whose bit of wmask is set. Reads are combinational,
// writes take effect at the clock edge.
module vrf #(
  parameter int unsigned NLANES = vp_pkg::VP_NLANES,
  parameter int unsigned NVREG  = vp_pkg::VP_NVREG,
  parameter int unsigned MAXVL  = vp_pkg::VP_MAXVL,
  localparam int unsigned EPB   = MAXVL / NLANES,
  localparam int unsigned RGW   = $clog2(NVREG),
  localparam int unsigned RWW   = (EPB > 1) ? $clog2(EPB) : 1
) (
  input  logic                           clk,
  input  logic [2:0][RGW-1:0]            raddr_reg,
  input  logic [2:0][RWW-1:0]            raddr_row,
  output logic [2:0][NLANES-1:0][31:0]   rdata,
  input  logic                           we,
  input  logic [NLANES-1:0]              wmask,
  input  logic [RGW-1:0]                 waddr_reg,
  input  logic [RWW-1:0]                 waddr_row,
  input  logic [NLANES-1:0][31:0]        wdata
);
  localparam int unsigned AW = $clog2(NVREG * EPB);

  logic [2:0][AW-1:0] ra;
  logic [AW-1:0]      wa;

  always_comb begin
    for (int p = 0; p < 3; p++) ra[p] = AW'(raddr_reg[p] * EPB + raddr_row[p]);
    wa = AW'(waddr_reg * EPB + waddr_row);
  end

  for (genvar k = 0; k < NLANES; k++) begin : g_bank
    logic [2:0][31:0] rd;
    vrf_bank #(.NVREG(NVREG), .EPB(EPB)) u_bank (
      .clk   (clk),
      .raddr (ra),
      .rdata (rd),
      .we    (we && wmask[k]),
      .waddr (wa),
      .wdata (wdata[k])
    );
    for (genvar p = 0; p < 3; p++) begin : g_port
      assign rdata[p][k] = rd[p];
    end
  end
endmodule
