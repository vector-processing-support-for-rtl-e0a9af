// vector_processor: one of the two identical vector microprocessors, one per
// FPGA. A five-stage scalar unit fetches the program from the instruction
// memory and executes the 16 scalar instructions; it hands the 8 vector
// instructions to the vector unit, whose eight lanes work on an eight-bank
// vector register file and an eight-bank data memory. Both memories are
// dual-ported, the second port belonging to the host, which also starts work
// through the task request / response handshake of host_if. The structure
// (vector core, five-stage scalar unit, eight banks, dual-port memories,
// request/response) follows the document; sizes and protocol are this
// design's choices (see vp_pkg and the sub-blocks).
//
// The ev_* outputs pulse for one cycle when the named event happens; they
// are for observation only.
module vector_processor
  import vp_pkg::*;
#(
  parameter int unsigned NLANES     = vp_pkg::VP_NLANES,
  parameter int unsigned NVREG      = vp_pkg::VP_NVREG,
  parameter int unsigned MAXVL      = vp_pkg::VP_MAXVL,
  parameter int unsigned BANK_DEPTH = vp_pkg::VP_BANK_DEPTH,
  parameter int unsigned IMEM_DEPTH = vp_pkg::VP_IMEM_DEPTH,
  localparam int unsigned DMEM_AW   = $clog2(BANK_DEPTH * NLANES),
  localparam int unsigned IMEM_AW   = $clog2(IMEM_DEPTH),
  localparam int unsigned HAW       = ((DMEM_AW > IMEM_AW) ? DMEM_AW : IMEM_AW) + 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           host_en,
  input  logic           host_we,
  input  logic [HAW-1:0] host_addr,
  input  logic [31:0]    host_wdata,
  output logic [31:0]    host_rdata,
  output logic           task_req,
  input  logic           task_resp,
  output logic           busy,
  output logic           ev_load_use,
  output logic           ev_vec_wait,
  output logic           ev_mem_wait,
  output logic           ev_branch,
  output logic           ev_bank_conflict
);
  localparam int unsigned RW = $clog2(BANK_DEPTH);

  logic start, done, running;
  logic               im_en, im_we;
  logic [IMEM_AW-1:0] im_addr;
  logic [31:0]        im_wdata, im_rdata;
  logic               dm_en, dm_we;
  logic [DMEM_AW-1:0] dm_addr;
  logic [31:0]        dm_wdata, dm_rdata;
  logic [IMEM_AW-1:0] fetch_addr;
  logic [31:0]        fetch_data;

  logic     vec_valid, vec_ready, vec_busy;
  vec_cmd_t vec_cmd;
  logic        s_req, s_we, s_gnt;
  logic [31:0] s_addr, s_wdata, s_rdata;

  logic [NLANES-1:0]         a_en, a_we;
  logic [NLANES-1:0][RW-1:0] a_row;
  logic [NLANES-1:0][31:0]   a_wdata, a_rdata;

  assign busy = running;

  host_if #(.DMEM_AW(DMEM_AW), .IMEM_AW(IMEM_AW)) u_host_if (
    .clk, .rst_n,
    .host_en, .host_we, .host_addr, .host_wdata, .host_rdata,
    .task_req, .task_resp,
    .start, .done,
    .im_en, .im_we, .im_addr, .im_wdata, .im_rdata,
    .dm_en, .dm_we, .dm_addr, .dm_wdata, .dm_rdata
  );

  imem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk, .a_addr(fetch_addr), .a_rdata(fetch_data),
    .b_en(im_en), .b_we(im_we), .b_addr(im_addr), .b_wdata(im_wdata), .b_rdata(im_rdata)
  );

  scalar_unit #(.IMEM_AW(IMEM_AW)) u_scalar (
    .clk, .rst_n, .start, .running, .done,
    .imem_addr(fetch_addr), .imem_rdata(fetch_data),
    .vec_valid, .vec_cmd, .vec_ready, .vec_busy,
    .mem_req(s_req), .mem_we(s_we), .mem_addr(s_addr), .mem_wdata(s_wdata),
    .mem_gnt(s_gnt), .mem_rdata(s_rdata),
    .ev_load_use, .ev_vec_wait, .ev_mem_wait, .ev_branch
  );

  vector_unit #(.NLANES(NLANES), .NVREG(NVREG), .MAXVL(MAXVL), .BANK_DEPTH(BANK_DEPTH)) u_vector (
    .clk, .rst_n,
    .cmd_valid(vec_valid), .cmd(vec_cmd), .cmd_ready(vec_ready), .busy(vec_busy),
    .a_en, .a_we, .a_row, .a_wdata, .a_rdata,
    .s_req, .s_we, .s_addr, .s_wdata, .s_gnt, .s_rdata,
    .bank_conflict(ev_bank_conflict)
  );

  dmem #(.NLANES(NLANES), .BANK_DEPTH(BANK_DEPTH)) u_dmem (
    .clk,
    .a_en, .a_we, .a_row, .a_wdata, .a_rdata,
    .b_en(dm_en), .b_we(dm_we), .b_addr(dm_addr), .b_wdata(dm_wdata), .b_rdata(dm_rdata)
  );
endmodule
