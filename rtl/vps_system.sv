// vps_system: the vector processing system: NPROC (two, as in the document)
// identical vector processors, each on its own FPGA, each with its own
// on-chip dual-port memories reached by the host over PCI and its own
// task request / response pair. The host schedules work between them (its
// software and the PCI interface are outside this RTL: their signals are this
// module's ports). The link drawn between the two FPGAs is not specified and
// is not modelled. Port arrays are indexed by processor.
module vps_system
  import vp_pkg::*;
#(
  parameter int unsigned NPROC      = 2,
  parameter int unsigned NLANES     = vp_pkg::VP_NLANES,
  parameter int unsigned NVREG      = vp_pkg::VP_NVREG,
  parameter int unsigned MAXVL      = vp_pkg::VP_MAXVL,
  parameter int unsigned BANK_DEPTH = vp_pkg::VP_BANK_DEPTH,
  parameter int unsigned IMEM_DEPTH = vp_pkg::VP_IMEM_DEPTH,
  localparam int unsigned DMEM_AW   = $clog2(BANK_DEPTH * NLANES),
  localparam int unsigned IMEM_AW   = $clog2(IMEM_DEPTH),
  localparam int unsigned HAW       = ((DMEM_AW > IMEM_AW) ? DMEM_AW : IMEM_AW) + 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [NPROC-1:0]           host_en,
  input  logic [NPROC-1:0]           host_we,
  input  logic [NPROC-1:0][HAW-1:0]  host_addr,
  input  logic [NPROC-1:0][31:0]     host_wdata,
  output logic [NPROC-1:0][31:0]     host_rdata,
  output logic [NPROC-1:0]           task_req,
  input  logic [NPROC-1:0]           task_resp,
  output logic [NPROC-1:0]           busy,
  output logic [NPROC-1:0]           ev_load_use,
  output logic [NPROC-1:0]           ev_vec_wait,
  output logic [NPROC-1:0]           ev_mem_wait,
  output logic [NPROC-1:0]           ev_branch,
  output logic [NPROC-1:0]           ev_bank_conflict
);
  for (genvar p = 0; p < NPROC; p++) begin : g_vp
    vector_processor #(
      .NLANES(NLANES), .NVREG(NVREG), .MAXVL(MAXVL),
      .BANK_DEPTH(BANK_DEPTH), .IMEM_DEPTH(IMEM_DEPTH)
    ) u_vp (
      .clk              (clk),
      .rst_n            (rst_n),
      .host_en          (host_en[p]),
      .host_we          (host_we[p]),
      .host_addr        (host_addr[p]),
      .host_wdata       (host_wdata[p]),
      .host_rdata       (host_rdata[p]),
      .task_req         (task_req[p]),
      .task_resp        (task_resp[p]),
      .busy             (busy[p]),
      .ev_load_use      (ev_load_use[p]),
      .ev_vec_wait      (ev_vec_wait[p]),
      .ev_mem_wait      (ev_mem_wait[p]),
      .ev_branch        (ev_branch[p]),
      .ev_bank_conflict (ev_bank_conflict[p])
    );
  end
endmodule
