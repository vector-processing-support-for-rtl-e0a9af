// dmem: the data memory of one vector processor, NLANES (eight, as in the
// document) interleaved dual-port banks. Word address w lives in bank
// w mod NLANES at row w / NLANES (interleaving is this design's choice), so
// NLANES consecutive words can be read or written in one cycle.
//
// Port A: one independent port per bank (a_en/a_we/a_row/a_wdata[bank]),
//         driven by the vector memory control unit; a_rdata one cycle later.
// Port B: one word per cycle for the host, by word address; b_rdata one cycle
//         later.
module dmem #(
  parameter int unsigned NLANES     = vp_pkg::VP_NLANES,
  parameter int unsigned BANK_DEPTH = vp_pkg::VP_BANK_DEPTH,
  localparam int unsigned RW        = $clog2(BANK_DEPTH),
  localparam int unsigned BW        = $clog2(NLANES),
  localparam int unsigned WAW       = RW + BW
) (
  input  logic                      clk,
  input  logic [NLANES-1:0]         a_en,
  input  logic [NLANES-1:0]         a_we,
  input  logic [NLANES-1:0][RW-1:0] a_row,
  input  logic [NLANES-1:0][31:0]   a_wdata,
  output logic [NLANES-1:0][31:0]   a_rdata,
  input  logic                      b_en,
  input  logic                      b_we,
  input  logic [WAW-1:0]            b_addr,
  input  logic [31:0]               b_wdata,
  output logic [31:0]               b_rdata
);
  logic [NLANES-1:0][31:0] b_rd;
  logic [BW-1:0]           b_bank_q;

  for (genvar k = 0; k < NLANES; k++) begin : g_bank
    dmem_bank #(.DEPTH(BANK_DEPTH)) u_bank (
      .clk     (clk),
      .a_en    (a_en[k]),
      .a_we    (a_we[k]),
      .a_addr  (a_row[k]),
      .a_wdata (a_wdata[k]),
      .a_rdata (a_rdata[k]),
      .b_en    (b_en && (b_addr[BW-1:0] == BW'(k))),
      .b_we    (b_we),
      .b_addr  (b_addr[WAW-1:BW]),
      .b_wdata (b_wdata),
      .b_rdata (b_rd[k])
    );
  end

  always_ff @(posedge clk) begin
    if (b_en) b_bank_q <= b_addr[BW-1:0];
  end

  assign b_rdata = b_rd[b_bank_q];
endmodule
