// vmcu: vector memory control unit. Moves vectors between the vector register
// file and the NLANES-bank data memory for the four vector memory instructions
// of the document: load, store, indexed load, indexed store.
//
// A vector of vl elements is processed in groups of NLANES elements (one VRF
// row, element i in lane i mod NLANES). For each group the unit forms one word
// address per lane: base + i (unit stride) or base + vb[i] (indexed, vb read
// through VRF read port B). Bank k serves, in a cycle, the lowest-numbered
// pending lane whose address falls in bank k; the group advances when no lane
// is pending. Unit-stride groups cover NLANES consecutive words, which always
// fall in distinct banks, so they move at full rate (one group per cycle, the
// document's "eight data can be loaded/stored"), at any alignment. Indexed
// groups take as many cycles as the most-used bank has elements (this
// conflict scheme is this design's choice; the document does not describe one).
//
// Store data come from VRF read port C (register vd). Load data return one
// cycle after the bank access (synchronous RAM) and are written through the
// VRF write port with a per-lane mask.
//
// Scalar loads/stores of the scalar unit use the same bank ports and are
// granted (s_gnt) only while no vector memory instruction runs, which keeps
// memory accesses in program order. s_rdata is valid the cycle after a granted
// read.
//
// Timing: start is accepted when busy is low; busy stays high until the last
// load data are written.
module vmcu
  import vp_pkg::*;
#(
  parameter int unsigned NLANES     = vp_pkg::VP_NLANES,
  parameter int unsigned NVREG      = vp_pkg::VP_NVREG,
  parameter int unsigned MAXVL      = vp_pkg::VP_MAXVL,
  parameter int unsigned BANK_DEPTH = vp_pkg::VP_BANK_DEPTH,
  localparam int unsigned EPB       = MAXVL / NLANES,
  localparam int unsigned RGW       = $clog2(NVREG),
  localparam int unsigned RWW       = (EPB > 1) ? $clog2(EPB) : 1,
  localparam int unsigned RW        = $clog2(BANK_DEPTH),
  localparam int unsigned BW        = $clog2(NLANES),
  localparam int unsigned LW        = (NLANES > 1) ? $clog2(NLANES) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // command
  input  logic                      start,
  input  vec_cmd_t                  cmd,
  output logic                      busy,
  // VRF read ports B (index) and C (store data), shared row
  output logic [RGW-1:0]            vrf_b_reg,
  output logic [RGW-1:0]            vrf_c_reg,
  output logic [RWW-1:0]            vrf_row,
  input  logic [NLANES-1:0][31:0]   vrf_b_data,
  input  logic [NLANES-1:0][31:0]   vrf_c_data,
  // VRF write port
  output logic                      vrf_we,
  output logic [NLANES-1:0]         vrf_wmask,
  output logic [RGW-1:0]            vrf_wreg,
  output logic [RWW-1:0]            vrf_wrow,
  output logic [NLANES-1:0][31:0]   vrf_wdata,
  // data memory, port A of every bank
  output logic [NLANES-1:0]         a_en,
  output logic [NLANES-1:0]         a_we,
  output logic [NLANES-1:0][RW-1:0] a_row,
  output logic [NLANES-1:0][31:0]   a_wdata,
  input  logic [NLANES-1:0][31:0]   a_rdata,
  // scalar access
  input  logic                      s_req,
  input  logic                      s_we,
  input  logic [31:0]               s_addr,
  input  logic [31:0]               s_wdata,
  output logic                      s_gnt,
  output logic [31:0]               s_rdata,
  // observation: a cycle in which a group could not be completed
  output logic                      conflict
);
  vec_cmd_t             c_q;
  logic                 run_q;
  logic [RWW-1:0]       g_q;
  logic [NLANES-1:0]    pend_q;
  logic                 is_idx, is_st;

  // load return pipeline
  logic                 rsp_q;
  logic [NLANES-1:0]    rsp_mask_q;
  logic [NLANES-1:0][BW-1:0] rsp_bank_q;
  logic [RWW-1:0]       rsp_row_q;
  logic [RGW-1:0]       rsp_reg_q;
  logic [BW-1:0]        s_bank_q;

  logic [NLANES-1:0][31:0]   addr;
  logic [NLANES-1:0][BW-1:0] bank;
  logic [NLANES-1:0]         grant, pend_nx;
  logic [NLANES-1:0][LW-1:0] sel;
  logic [RWW:0]              ngroups;
  logic                      last_group, group_done;

  function automatic logic [NLANES-1:0] group_mask(logic [RWW:0] g, logic [VLW-1:0] vl);
    logic [NLANES-1:0] m;
    for (int l = 0; l < NLANES; l++) m[l] = (int'(g) * NLANES + l) < int'(vl);
    return m;
  endfunction

  assign is_idx = (c_q.op == OP_VLDX) || (c_q.op == OP_VSTX);
  assign is_st  = (c_q.op == OP_VST)  || (c_q.op == OP_VSTX);
  assign ngroups = (RWW+1)'((int'(c_q.vl) + NLANES - 1) / NLANES);
  assign last_group = ({1'b0, g_q} == ngroups - 1'b1);

  assign vrf_b_reg = c_q.vb;
  assign vrf_c_reg = c_q.vd;
  assign vrf_row   = g_q;

  always_comb begin
    grant = '0;
    sel   = '0;
    a_en  = '0;
    a_we  = '0;
    a_row = '0;
    a_wdata = '0;
    for (int l = 0; l < NLANES; l++) begin
      addr[l] = c_q.base + (is_idx ? vrf_b_data[l] : 32'(int'(g_q) * NLANES + l));
      bank[l] = addr[l][BW-1:0];
    end
    if (run_q) begin
      for (int k = 0; k < NLANES; k++) begin
        for (int l = 0; l < NLANES; l++) begin
          if (!a_en[k] && pend_q[l] && bank[l] == BW'(k)) begin
            a_en[k]  = 1'b1;
            sel[k]   = LW'(l);
            grant[l] = 1'b1;
          end
        end
        if (a_en[k]) begin
          a_we[k]    = is_st;
          a_row[k]   = addr[sel[k]][BW +: RW];
          a_wdata[k] = vrf_c_data[sel[k]];
        end
      end
    end else if (s_req) begin
      // scalar access while no vector memory instruction runs
      for (int k = 0; k < NLANES; k++) begin
        if (s_addr[BW-1:0] == BW'(k)) begin
          a_en[k]    = 1'b1;
          a_we[k]    = s_we;
          a_row[k]   = s_addr[BW +: RW];
          a_wdata[k] = s_wdata;
        end
      end
    end
    pend_nx    = pend_q & ~grant;
    group_done = run_q && (pend_nx == '0);
  end

  assign s_gnt    = !run_q;
  assign s_rdata  = a_rdata[s_bank_q];
  assign busy     = run_q || rsp_q;
  assign conflict = run_q && !group_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q  <= 1'b0;
      g_q    <= '0;
      pend_q <= '0;
      c_q    <= '0;
      rsp_q  <= 1'b0;
      rsp_mask_q <= '0;
      rsp_bank_q <= '0;
      rsp_row_q  <= '0;
      rsp_reg_q  <= '0;
      s_bank_q   <= '0;
    end else begin
      rsp_q      <= run_q && !is_st && (grant != '0);
      rsp_mask_q <= grant;
      rsp_bank_q <= bank;
      rsp_row_q  <= g_q;
      rsp_reg_q  <= c_q.vd;
      if (!run_q && s_req) s_bank_q <= s_addr[BW-1:0];
      if (start && !busy) begin
        c_q    <= cmd;
        g_q    <= '0;
        pend_q <= group_mask('0, cmd.vl);
        run_q  <= (cmd.vl != 0);
      end else if (run_q) begin
        if (group_done) begin
          if (last_group) begin
            run_q <= 1'b0;
            pend_q <= '0;
          end else begin
            g_q    <= g_q + 1'b1;
            pend_q <= group_mask({1'b0, g_q} + 1'b1, c_q.vl);
          end
        end else begin
          pend_q <= pend_nx;
        end
      end
    end
  end

  // write back of load data
  always_comb begin
    vrf_we    = rsp_q;
    vrf_wmask = rsp_mask_q;
    vrf_wreg  = rsp_reg_q;
    vrf_wrow  = rsp_row_q;
    for (int l = 0; l < NLANES; l++) vrf_wdata[l] = a_rdata[rsp_bank_q[l]];
  end

  // a command must only arrive while the unit is free and must be a memory op
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                 start |-> !busy && is_vmem(cmd.op));
  // the bank arbiter grants each lane at most once per cycle and only pending lanes
  a_grant_pend: assert property (@(posedge clk) disable iff (!rst_n)
                                 (grant & ~pend_q) == '0);
endmodule
