// vector_unit: the vector core of one processor. At its centre is the
// eight-bank vector register file; around it the addition/multiplication lanes
// (vec_arith) and the vector memory control unit (vmcu). The three read ports
// and the write port of every bank are shared by these units in time
// (document: "connected to the addition, multiplication and vector memory
// control units in a time-multiplexed way"):
//   read port A : first arithmetic operand (va)
//   read port B : second arithmetic operand (vb), or the index vector of an
//                 indexed load/store
//   read port C : store data (vd)
//   write port  : arithmetic results, or load data
//
// One vector instruction is accepted (cmd_valid && cmd_ready) when the unit is
// idle; instructions are neither overlapped nor chained (this design's
// choice). An arithmetic instruction reads one row of NLANES elements per
// cycle and writes the results one cycle later, so vl elements take
// ceil(vl/NLANES) + 1 cycles. VSADD/VSMUL use the scalar cmd.sval as the
// second operand of every lane. Memory instructions are handed to the vmcu.
module vector_unit
  import vp_pkg::*;
#(
  parameter int unsigned NLANES     = vp_pkg::VP_NLANES,
  parameter int unsigned NVREG      = vp_pkg::VP_NVREG,
  parameter int unsigned MAXVL      = vp_pkg::VP_MAXVL,
  parameter int unsigned BANK_DEPTH = vp_pkg::VP_BANK_DEPTH,
  localparam int unsigned EPB       = MAXVL / NLANES,
  localparam int unsigned RGW       = $clog2(NVREG),
  localparam int unsigned RWW       = (EPB > 1) ? $clog2(EPB) : 1,
  localparam int unsigned RW        = $clog2(BANK_DEPTH)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      cmd_valid,
  input  vec_cmd_t                  cmd,
  output logic                      cmd_ready,
  output logic                      busy,
  // data memory port A of every bank
  output logic [NLANES-1:0]         a_en,
  output logic [NLANES-1:0]         a_we,
  output logic [NLANES-1:0][RW-1:0] a_row,
  output logic [NLANES-1:0][31:0]   a_wdata,
  input  logic [NLANES-1:0][31:0]   a_rdata,
  // scalar memory access, served by the vmcu
  input  logic                      s_req,
  input  logic                      s_we,
  input  logic [31:0]               s_addr,
  input  logic [31:0]               s_wdata,
  output logic                      s_gnt,
  output logic [31:0]               s_rdata,
  // observation
  output logic                      bank_conflict
);
  vec_cmd_t          c_q;
  logic              ar_run_q;
  logic [RWW-1:0]    ar_g_q;
  logic              wb_valid;
  logic [RWW-1:0]    wb_row_q;
  logic [RGW-1:0]    wb_reg_q;
  logic [NLANES-1:0] wb_mask_q;
  logic [RWW:0]      ngroups;
  logic              accept, ar_last;

  logic [2:0][RGW-1:0]          raddr_reg;
  logic [2:0][RWW-1:0]          raddr_row;
  logic [2:0][NLANES-1:0][31:0] rdata;
  logic                         we;
  logic [NLANES-1:0]            wmask;
  logic [RGW-1:0]               waddr_reg;
  logic [RWW-1:0]               waddr_row;
  logic [NLANES-1:0][31:0]      wdata;

  logic [NLANES-1:0][31:0]      op_b, ar_y;
  logic [NLANES-1:0]            ar_mask;

  logic                    m_busy, m_we;
  logic [RGW-1:0]          m_b_reg, m_c_reg, m_wreg;
  logic [RWW-1:0]          m_row, m_wrow;
  logic [NLANES-1:0]       m_wmask;
  logic [NLANES-1:0][31:0] m_wdata;

  assign busy      = ar_run_q || wb_valid || m_busy;
  assign cmd_ready = !busy;
  assign accept    = cmd_valid && cmd_ready;
  assign ngroups   = (RWW+1)'((int'(c_q.vl) + NLANES - 1) / NLANES);
  assign ar_last   = ({1'b0, ar_g_q} == ngroups - 1'b1);

  always_comb begin
    for (int l = 0; l < NLANES; l++) begin
      ar_mask[l] = (int'(ar_g_q) * NLANES + l) < int'(c_q.vl);
      op_b[l]    = (c_q.op == OP_VSADD || c_q.op == OP_VSMUL) ? c_q.sval : rdata[1][l];
    end
    raddr_reg[0] = c_q.va;
    raddr_row[0] = ar_g_q;
    raddr_reg[1] = ar_run_q ? c_q.vb : m_b_reg;
    raddr_row[1] = ar_run_q ? ar_g_q : m_row;
    raddr_reg[2] = m_c_reg;
    raddr_row[2] = m_row;
    if (wb_valid) begin
      we = 1'b1; wmask = wb_mask_q; waddr_reg = wb_reg_q; waddr_row = wb_row_q; wdata = ar_y;
    end else begin
      we = m_we; wmask = m_wmask; waddr_reg = m_wreg; waddr_row = m_wrow; wdata = m_wdata;
    end
  end

  vrf #(.NLANES(NLANES), .NVREG(NVREG), .MAXVL(MAXVL)) u_vrf (
    .clk       (clk),
    .raddr_reg (raddr_reg),
    .raddr_row (raddr_row),
    .rdata     (rdata),
    .we        (we),
    .wmask     (wmask),
    .waddr_reg (waddr_reg),
    .waddr_row (waddr_row),
    .wdata     (wdata)
  );

  vec_arith #(.NLANES(NLANES)) u_arith (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (ar_run_q),
    .is_mul    (c_q.op == OP_VMUL || c_q.op == OP_VSMUL),
    .a         (rdata[0]),
    .b         (op_b),
    .out_valid (wb_valid),
    .y         (ar_y)
  );

  vmcu #(.NLANES(NLANES), .NVREG(NVREG), .MAXVL(MAXVL), .BANK_DEPTH(BANK_DEPTH)) u_vmcu (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (accept && is_vmem(cmd.op)),
    .cmd        (cmd),
    .busy       (m_busy),
    .vrf_b_reg  (m_b_reg),
    .vrf_c_reg  (m_c_reg),
    .vrf_row    (m_row),
    .vrf_b_data (rdata[1]),
    .vrf_c_data (rdata[2]),
    .vrf_we     (m_we),
    .vrf_wmask  (m_wmask),
    .vrf_wreg   (m_wreg),
    .vrf_wrow   (m_wrow),
    .vrf_wdata  (m_wdata),
    .a_en       (a_en),
    .a_we       (a_we),
    .a_row      (a_row),
    .a_wdata    (a_wdata),
    .a_rdata    (a_rdata),
    .s_req      (s_req),
    .s_we       (s_we),
    .s_addr     (s_addr),
    .s_wdata    (s_wdata),
    .s_gnt      (s_gnt),
    .s_rdata    (s_rdata),
    .conflict   (bank_conflict)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_q       <= '0;
      ar_run_q  <= 1'b0;
      ar_g_q    <= '0;
      wb_row_q  <= '0;
      wb_reg_q  <= '0;
      wb_mask_q <= '0;
    end else begin
      wb_row_q  <= ar_g_q;
      wb_reg_q  <= c_q.vd;
      wb_mask_q <= ar_mask;
      if (accept) begin
        c_q      <= cmd;
        ar_g_q   <= '0;
        ar_run_q <= !is_vmem(cmd.op) && (cmd.vl != 0);
      end else if (ar_run_q) begin
        if (ar_last) ar_run_q <= 1'b0;
        else         ar_g_q   <= ar_g_q + 1'b1;
      end
    end
  end

  a_vector_op: assert property (@(posedge clk) disable iff (!rst_n)
                                cmd_valid |-> is_vector(cmd.op));
endmodule
