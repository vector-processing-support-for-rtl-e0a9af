// host_if: the link between the host and one vector processor (Fig. 1 of the
// design: "Task Request" towards the host, "Response" back). The processor
// asks for work by holding task_req high while it is idle. The host loads a
// program and its data through the host memory port and answers with a
// one-cycle task_resp; host_if then pulses start to the scalar unit and drops
// task_req until the scalar unit reports done (HALT retired). The request is
// a level and the response a pulse: this protocol is this design's choice.
//
// Host memory port: word address host_addr; bit HAW-1 selects the instruction
// memory (1) or the data memory (0). Reads return host_rdata one cycle after
// host_en. The host may access both memories at any time (dual-port RAMs).
module host_if
  import vp_pkg::*;
#(
  parameter int unsigned DMEM_AW = $clog2(vp_pkg::VP_BANK_DEPTH * vp_pkg::VP_NLANES),
  parameter int unsigned IMEM_AW = $clog2(vp_pkg::VP_IMEM_DEPTH),
  localparam int unsigned HAW    = ((DMEM_AW > IMEM_AW) ? DMEM_AW : IMEM_AW) + 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // host side
  input  logic               host_en,
  input  logic               host_we,
  input  logic [HAW-1:0]     host_addr,
  input  logic [31:0]        host_wdata,
  output logic [31:0]        host_rdata,
  output logic               task_req,
  input  logic               task_resp,
  // processor side
  output logic               start,
  input  logic               done,
  output logic               im_en,
  output logic               im_we,
  output logic [IMEM_AW-1:0] im_addr,
  output logic [31:0]        im_wdata,
  input  logic [31:0]        im_rdata,
  output logic               dm_en,
  output logic               dm_we,
  output logic [DMEM_AW-1:0] dm_addr,
  output logic [31:0]        dm_wdata,
  input  logic [31:0]        dm_rdata
);
  typedef enum logic {S_IDLE, S_RUN} state_t;
  state_t state_q;
  logic   rd_im_q;

  assign task_req = (state_q == S_IDLE);
  assign start    = (state_q == S_IDLE) && task_resp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      rd_im_q <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE: if (task_resp) state_q <= S_RUN;
        S_RUN:  if (done)      state_q <= S_IDLE;
      endcase
      if (host_en) rd_im_q <= host_addr[HAW-1];
    end
  end

  assign im_en    = host_en && host_addr[HAW-1];
  assign im_we    = host_we;
  assign im_addr  = host_addr[IMEM_AW-1:0];
  assign im_wdata = host_wdata;
  assign dm_en    = host_en && !host_addr[HAW-1];
  assign dm_we    = host_we;
  assign dm_addr  = host_addr[DMEM_AW-1:0];
  assign dm_wdata = host_wdata;
  assign host_rdata = rd_im_q ? im_rdata : dm_rdata;

  a_done_when_running: assert property (@(posedge clk) disable iff (!rst_n)
                                        done |-> state_q == S_RUN);
endmodule
