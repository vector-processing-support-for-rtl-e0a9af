// tb_vmcu: the vector memory control unit between a real vector register file
// and a real eight-bank data memory (small bank depth). Checks unit-stride
// load/store at unaligned addresses and partial vector lengths, indexed
// load/store with and without bank conflicts, the cycle counts (one group of
// eight per cycle for unit stride; k cycles for k elements in one bank) and
// scalar access granting.
module tb_vmcu;
  import vp_pkg::*;
  localparam int N = 8, NV = 8, VL = 64, D = 64, RW = 6, WAW = 9;
  logic clk = 0, rst_n = 0;

  logic start, busy, conflict;
  vec_cmd_t cmd;
  logic [2:0] vb_reg, vc_reg, vrow, m_wreg, m_wrow;
  logic [N-1:0][31:0] vb_data, vc_data, m_wdata;
  logic m_we; logic [N-1:0] m_wmask;
  logic [N-1:0] a_en, a_we; logic [N-1:0][RW-1:0] a_row; logic [N-1:0][31:0] a_wdata, a_rdata;
  logic s_req, s_we, s_gnt; logic [31:0] s_addr, s_wdata, s_rdata;
  logic b_en, b_we; logic [WAW-1:0] b_addr; logic [31:0] b_wdata, b_rdata;
  // tb access to the VRF
  logic t_we; logic [N-1:0][31:0] t_wdata; logic [2:0] t_wreg, t_wrow, t_rreg, t_rrow;
  logic [2:0][2:0] raddr_reg, raddr_row; logic [2:0][N-1:0][31:0] rdata;

  logic [31:0] mem_ref [N*D];
  logic [31:0] vrf_ref [NV][VL];
  int checks = 0, failures = 0, conflicts = 0;

  vmcu #(.NLANES(N), .NVREG(NV), .MAXVL(VL), .BANK_DEPTH(D)) dut (
    .clk, .rst_n, .start, .cmd, .busy,
    .vrf_b_reg(vb_reg), .vrf_c_reg(vc_reg), .vrf_row(vrow), .vrf_b_data(vb_data), .vrf_c_data(vc_data),
    .vrf_we(m_we), .vrf_wmask(m_wmask), .vrf_wreg(m_wreg), .vrf_wrow(m_wrow), .vrf_wdata(m_wdata),
    .a_en, .a_we, .a_row, .a_wdata, .a_rdata,
    .s_req, .s_we, .s_addr, .s_wdata, .s_gnt, .s_rdata, .conflict);

  assign raddr_reg = {vc_reg, vb_reg, t_rreg};
  assign raddr_row = {vrow, vrow, t_rrow};
  assign vb_data = rdata[1];
  assign vc_data = rdata[2];

  vrf #(.NLANES(N), .NVREG(NV), .MAXVL(VL)) u_vrf (
    .clk, .raddr_reg, .raddr_row, .rdata,
    .we(m_we || t_we), .wmask(m_we ? m_wmask : '1), .waddr_reg(m_we ? m_wreg : t_wreg),
    .waddr_row(m_we ? m_wrow : t_wrow), .wdata(m_we ? m_wdata : t_wdata));

  dmem #(.NLANES(N), .BANK_DEPTH(D)) u_dmem (.clk, .a_en, .a_we, .a_row, .a_wdata, .a_rdata,
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);

  always #5 clk = ~clk;
  always @(posedge clk) if (conflict) conflicts++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 15) $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  task automatic vrf_set(int r, int row, logic [N-1:0][31:0] d);
    @(negedge clk);
    t_we = 1; t_wreg = 3'(r); t_wrow = 3'(row); t_wdata = d;
    for (int l = 0; l < N; l++) vrf_ref[r][row * N + l] = d[l];
    @(negedge clk);
    t_we = 0;
  endtask

  task automatic vrf_check(int r);
    for (int row = 0; row < VL / N; row++) begin
      t_rreg = 3'(r); t_rrow = 3'(row);
      #1;
      for (int l = 0; l < N; l++) chk(rdata[0][l], vrf_ref[r][row * N + l], $sformatf("v%0d[%0d]", r, row * N + l));
    end
  endtask

  task automatic mem_check();
    for (int w = 0; w < N * D; w++) begin
      @(negedge clk);
      b_en = 1; b_we = 0; b_addr = WAW'(w);
      @(negedge clk);
      b_en = 0;
      chk(b_rdata, mem_ref[w], $sformatf("mem[%0d]", w));
    end
  endtask

  // run a command and return its busy time in cycles
  task automatic run(opcode_t op, int vd, int vb, int base, int vl, output int cyc);
    @(negedge clk);
    cmd = '0; cmd.op = op; cmd.vd = 3'(vd); cmd.vb = 3'(vb); cmd.base = 32'(base); cmd.vl = VLW'(vl);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0;
    while (busy) begin
      // scalar requests must not be granted during a vector operation
      s_req = 1; s_we = 0; s_addr = 32'd0;
      #1;
      if (dut.run_q) chk(32'(s_gnt), 0, "scalar grant while busy");
      cyc++;
      @(negedge clk);
      s_req = 0;
    end
    s_req = 0;
    // model
    for (int i = 0; i < vl; i++) begin
      int a;
      a = base + ((op == OP_VLDX || op == OP_VSTX) ? int'(vrf_ref[vb][i]) : i);
      if (op == OP_VLD || op == OP_VLDX) vrf_ref[vd][i] = mem_ref[a];
      else mem_ref[a] = vrf_ref[vd][i];
    end
  endtask

  initial begin
    int cyc, c0;
    logic [N-1:0][31:0] d;
    start = 0; cmd = '0; s_req = 0; s_we = 0; s_addr = '0; s_wdata = '0;
    b_en = 0; b_we = 0; b_addr = '0; b_wdata = '0; t_we = 0; t_wreg = '0; t_wrow = '0; t_wdata = '0;
    t_rreg = '0; t_rrow = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < N * D; w++) begin
      @(negedge clk);
      b_en = 1; b_we = 1; b_addr = WAW'(w); b_wdata = $urandom; mem_ref[w] = b_wdata;
    end
    @(negedge clk); b_en = 0; b_we = 0;
    for (int r = 0; r < NV; r++) for (int row = 0; row < VL / N; row++) begin
      for (int l = 0; l < N; l++) d[l] = $urandom;
      vrf_set(r, row, d);
    end

    // unit-stride load, unaligned, full length: 8 groups + 1 write-back cycle
    run(OP_VLD, 1, 0, 5, 64, cyc);
    chk(32'(cyc), 9, "VLD vl=64 cycles");
    vrf_check(1);
    // partial length
    run(OP_VLD, 2, 0, 131, 19, cyc);
    chk(32'(cyc), 4, "VLD vl=19 cycles");
    vrf_check(2);
    // unit-stride store
    run(OP_VST, 1, 0, 300, 64, cyc);
    chk(32'(cyc), 8, "VST vl=64 cycles");
    run(OP_VST, 2, 0, 3, 13, cyc);

    // index vector v3: random offsets 0..63 (conflicts likely)
    for (int row = 0; row < VL / N; row++) begin
      for (int l = 0; l < N; l++) d[l] = $urandom_range(0, 63);
      vrf_set(3, row, d);
    end
    run(OP_VLDX, 4, 3, 100, 64, cyc);
    vrf_check(4);
    // index vector v5: all eight in bank 0 -> 8 cycles for the group
    for (int l = 0; l < N; l++) d[l] = 32'(l * 8);
    vrf_set(5, 0, d);
    c0 = conflicts;
    run(OP_VLDX, 6, 5, 16, 8, cyc);
    chk(32'(cyc), 9, "VLDX same-bank cycles");
    chk(32'(conflicts - c0), 7, "conflict cycles");
    vrf_check(6);
    // conflict-free index vector (a permutation of the eight banks) -> 1 cycle
    for (int l = 0; l < N; l++) d[l] = 32'(((l * 3) % 8) + 8 * l);
    vrf_set(5, 0, d);
    run(OP_VLDX, 6, 5, 40, 8, cyc);
    chk(32'(cyc), 2, "VLDX conflict-free cycles");
    vrf_check(6);
    // indexed store with duplicated indices: last element wins (program order)
    run(OP_VSTX, 4, 3, 200, 64, cyc);
    run(OP_VSTX, 2, 5, 7, 8, cyc);

    // scalar accesses while idle
    @(negedge clk);
    s_req = 1; s_we = 1; s_addr = 32'd77; s_wdata = 32'hdeadbeef;
    #1 chk(32'(s_gnt), 1, "scalar grant idle");
    mem_ref[77] = 32'hdeadbeef;
    @(negedge clk);
    s_we = 0; s_addr = 32'd300;
    @(negedge clk);
    s_req = 0;
    chk(s_rdata, mem_ref[300], "scalar read");
    mem_check();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
