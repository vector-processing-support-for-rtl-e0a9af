// scalar_unit: the five-stage pipelined scalar unit that runs the program of a
// vector processor and issues its vector instructions (document: "a tightly
// coupled five-stage pipelined scalar unit"; the pipeline's organisation below
// is this design's choice).
//
//   IF  : next PC drives the synchronous instruction memory
//   ID  : the fetched word is decoded, registers read (write-through from WB)
//   EX  : ALU, branch decision, SETVL, vector instruction issue
//   MEM : scalar load/store on the data memory (through the vector unit's vmcu)
//   WB  : register write; load data arrive here from the synchronous RAM
//
// Hazards: results are forwarded from MEM and WB into EX; a load followed by
// a user stalls one cycle; taken branches and jumps are resolved in EX and
// squash the one instruction fetched behind them. A vector instruction waits
// in EX until the vector unit is ready and is then handed over with the
// scalar operands and the vector length; a scalar load/store waits in MEM
// until the vmcu grants it (no vector memory instruction in progress). HALT
// waits in EX for the vector unit to drain, stops fetching and raises done
// for one cycle when it leaves WB.
//
// Control: start (one cycle) begins execution at address 0.
module scalar_unit
  import vp_pkg::*;
#(
  parameter int unsigned IMEM_AW = $clog2(vp_pkg::VP_IMEM_DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  output logic               running,
  output logic               done,
  // instruction memory (synchronous read)
  output logic [IMEM_AW-1:0] imem_addr,
  input  logic [31:0]        imem_rdata,
  // vector issue
  output logic               vec_valid,
  output vec_cmd_t           vec_cmd,
  input  logic               vec_ready,
  input  logic               vec_busy,
  // scalar data access
  output logic               mem_req,
  output logic               mem_we,
  output logic [31:0]        mem_addr,
  output logic [31:0]        mem_wdata,
  input  logic               mem_gnt,
  input  logic [31:0]        mem_rdata,
  // observation (one cycle each)
  output logic               ev_load_use,
  output logic               ev_vec_wait,
  output logic               ev_mem_wait,
  output logic               ev_branch
);
  logic [31:0] rf [VP_NSREG];

  logic               run_q, halting_q;
  logic [IMEM_AW-1:0] pc_id_q, pc_next;
  logic               id_valid_q;
  instr_t             id_ir;

  logic               ex_valid_q;
  instr_t             ex_ir_q;
  logic [IMEM_AW-1:0] ex_pc_q;
  logic [31:0]        ex_a_q, ex_b_q;

  logic               mem_valid_q;
  opcode_t            mem_op_q;
  logic [3:0]         mem_rd_q;
  logic               mem_wr_q;
  logic [31:0]        mem_res_q, mem_sd_q;

  logic               wb_valid_q;
  opcode_t            wb_op_q;
  logic [3:0]         wb_rd_q;
  logic               wb_wr_q;
  logic [31:0]        wb_res_q;
  logic [31:0]        wb_val;

  logic [VLW-1:0]     vl_q;

  logic [31:0]        id_a, id_b, ex_a, ex_b, ex_res, imm_s;
  logic               ex_wr, ex_taken;
  logic [IMEM_AW-1:0] ex_target;
  logic               stall_mem, stall_ex, stall_ld;
  logic               mem_ldst;

  function automatic logic writes_rd(opcode_t op);
    return op inside {OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLT, OP_ADDI, OP_LUI, OP_LW};
  endfunction

  assign id_ir   = instr_t'(imem_rdata);
  assign running = run_q;

  // ---------------- WB ----------------
  assign wb_val = (wb_op_q == OP_LW) ? mem_rdata : wb_res_q;

  // ---------------- ID: register read with write-through ----------------
  always_comb begin
    id_a = (id_ir.rs1 == 0) ? 32'd0 : rf[id_ir.rs1];
    id_b = (id_ir.rs2 == 0) ? 32'd0 : rf[id_ir.rs2];
    if (wb_valid_q && wb_wr_q && wb_rd_q != 0) begin
      if (wb_rd_q == id_ir.rs1) id_a = wb_val;
      if (wb_rd_q == id_ir.rs2) id_b = wb_val;
    end
  end

  // ---------------- EX ----------------
  always_comb begin
    ex_a = ex_a_q;
    ex_b = ex_b_q;
    if (wb_valid_q && wb_wr_q && wb_rd_q != 0) begin
      if (wb_rd_q == ex_ir_q.rs1) ex_a = wb_val;
      if (wb_rd_q == ex_ir_q.rs2) ex_b = wb_val;
    end
    if (mem_valid_q && mem_wr_q && mem_op_q != OP_LW && mem_rd_q != 0) begin
      if (mem_rd_q == ex_ir_q.rs1) ex_a = mem_res_q;
      if (mem_rd_q == ex_ir_q.rs2) ex_b = mem_res_q;
    end
    imm_s = {{17{ex_ir_q.imm[14]}}, ex_ir_q.imm};
    unique case (ex_ir_q.op)
      OP_ADD:  ex_res = ex_a + ex_b;
      OP_SUB:  ex_res = ex_a - ex_b;
      OP_AND:  ex_res = ex_a & ex_b;
      OP_OR:   ex_res = ex_a | ex_b;
      OP_XOR:  ex_res = ex_a ^ ex_b;
      OP_SLT:  ex_res = {31'd0, $signed(ex_a) < $signed(ex_b)};
      OP_LUI:  ex_res = {ex_ir_q.imm, 17'd0};
      default: ex_res = ex_a + imm_s;     // ADDI, LW/SW address, vector base
    endcase
    ex_wr     = writes_rd(ex_ir_q.op);
    ex_taken  = ex_valid_q && ((ex_ir_q.op == OP_BEQ && ex_a == ex_b) ||
                               (ex_ir_q.op == OP_BNE && ex_a != ex_b) ||
                               (ex_ir_q.op == OP_JMP));
    ex_target = (ex_ir_q.op == OP_JMP) ? IMEM_AW'(ex_ir_q.imm)
                                       : IMEM_AW'(ex_pc_q + IMEM_AW'(imm_s));

    vec_cmd.op   = ex_ir_q.op;
    vec_cmd.vd   = ex_ir_q.rd[2:0];
    vec_cmd.va   = ex_ir_q.rs1[2:0];
    vec_cmd.vb   = ex_ir_q.rs2[2:0];
    vec_cmd.base = ex_res;
    vec_cmd.sval = ex_b;
    vec_cmd.vl   = vl_q;
  end

  // ---------------- stalls ----------------
  assign mem_ldst  = mem_valid_q && (mem_op_q == OP_LW || mem_op_q == OP_SW);
  assign stall_mem = mem_ldst && !mem_gnt;
  assign stall_ex  = ex_valid_q && ((is_vector(ex_ir_q.op) && !vec_ready) ||
                                    (ex_ir_q.op == OP_HALT && vec_busy));
  assign stall_ld  = id_valid_q && ex_valid_q && ex_ir_q.op == OP_LW && ex_ir_q.rd != 0 &&
                     (ex_ir_q.rd == id_ir.rs1 || ex_ir_q.rd == id_ir.rs2);

  assign vec_valid = ex_valid_q && is_vector(ex_ir_q.op) && !stall_mem;

  assign mem_req   = mem_ldst;
  assign mem_we    = (mem_op_q == OP_SW);
  assign mem_addr  = mem_res_q;
  assign mem_wdata = mem_sd_q;

  assign ev_load_use = stall_ld && !stall_ex && !stall_mem;
  assign ev_vec_wait = stall_ex && !stall_mem;
  assign ev_mem_wait = stall_mem;
  assign ev_branch   = ex_taken && !stall_ex && !stall_mem;

  // ---------------- IF: next PC ----------------
  always_comb begin
    if (!run_q)                        pc_next = '0;
    else if (stall_mem || stall_ex)    pc_next = pc_id_q;
    else if (ex_taken)                 pc_next = ex_target;
    else if (stall_ld)                 pc_next = pc_id_q;
    else                               pc_next = pc_id_q + 1'b1;
  end
  assign imem_addr = pc_next;

  // ---------------- pipeline registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q <= 1'b0; halting_q <= 1'b0; done <= 1'b0;
      pc_id_q <= '0; id_valid_q <= 1'b0;
      ex_valid_q <= 1'b0; ex_ir_q <= '0; ex_pc_q <= '0; ex_a_q <= '0; ex_b_q <= '0;
      mem_valid_q <= 1'b0; mem_op_q <= OP_NOP; mem_rd_q <= '0; mem_wr_q <= 1'b0;
      mem_res_q <= '0; mem_sd_q <= '0;
      wb_valid_q <= 1'b0; wb_op_q <= OP_NOP; wb_rd_q <= '0; wb_wr_q <= 1'b0; wb_res_q <= '0;
      vl_q <= VLW'(VP_MAXVL);
    end else begin
      done <= 1'b0;
      // WB
      if (wb_valid_q && wb_wr_q && wb_rd_q != 0) rf[wb_rd_q] <= wb_val;
      if (wb_valid_q && wb_op_q == OP_HALT) begin
        run_q     <= 1'b0;
        halting_q <= 1'b0;
        done      <= 1'b1;
      end
      if (start && !run_q) begin
        run_q <= 1'b1;
        vl_q  <= VLW'(VP_MAXVL);
      end

      // MEM -> WB
      wb_valid_q <= mem_valid_q && !stall_mem;
      wb_op_q    <= mem_op_q;
      wb_rd_q    <= mem_rd_q;
      wb_wr_q    <= mem_wr_q;
      wb_res_q   <= mem_res_q;

      // EX -> MEM
      if (!stall_mem) begin
        mem_valid_q <= ex_valid_q && !stall_ex;
        mem_op_q    <= ex_ir_q.op;
        mem_rd_q    <= ex_ir_q.rd;
        mem_wr_q    <= ex_wr;
        mem_res_q   <= ex_res;
        mem_sd_q    <= ex_b;
        if (ex_valid_q && !stall_ex) begin
          if (ex_ir_q.op == OP_SETVL)
            vl_q <= (ex_a > 32'(VP_MAXVL)) ? VLW'(VP_MAXVL) : VLW'(ex_a);
          if (ex_ir_q.op == OP_HALT) halting_q <= 1'b1;
        end
      end

      // ID -> EX
      if (!stall_mem && !stall_ex) begin
        ex_valid_q <= id_valid_q && !stall_ld && !ex_taken && !halting_q &&
                      !(ex_valid_q && ex_ir_q.op == OP_HALT);
        ex_ir_q    <= id_ir;
        ex_pc_q    <= pc_id_q;
        ex_a_q     <= id_a;
        ex_b_q     <= id_b;
      end else begin
        // EX holds: keep the forwarded operands, their producers move on
        ex_a_q <= ex_a;
        ex_b_q <= ex_b;
      end

      // IF -> ID
      pc_id_q <= pc_next;
      if (!run_q)                        id_valid_q <= start;
      else if (stall_mem || stall_ex)    id_valid_q <= id_valid_q;
      else if (ex_taken)                 id_valid_q <= !halting_q;
      else if (ex_valid_q && ex_ir_q.op == OP_HALT) id_valid_q <= 1'b0;
      else if (halting_q)                id_valid_q <= 1'b0;
      else                               id_valid_q <= 1'b1;
    end
  end

  a_one_stall_cause_mem: assert property (@(posedge clk) disable iff (!rst_n)
                                          vec_valid && vec_ready |-> !stall_mem);
endmodule
