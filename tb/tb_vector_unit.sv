// tb_vector_unit: the vector core with a real eight-bank data memory (small
// depth). Vectors are loaded from memory, combined with each of the four
// arithmetic instructions (vector-vector and vector-scalar add/multiply), and
// stored back; results are compared with a double-precision reference rounded
// to single. Also checks the throughput of an arithmetic instruction
// (ceil(vl/8) + 1 busy cycles), cmd_ready and the scalar grant.
module tb_vector_unit;
  import vp_pkg::*;
  import fp_ref_pkg::*;
  localparam int N = 8, VL = 64, D = 128, RW = 7, WAW = 10;
  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready, busy, bank_conflict;
  vec_cmd_t cmd;
  logic [N-1:0] a_en, a_we; logic [N-1:0][RW-1:0] a_row; logic [N-1:0][31:0] a_wdata, a_rdata;
  logic s_req, s_we, s_gnt; logic [31:0] s_addr, s_wdata, s_rdata;
  logic b_en, b_we; logic [WAW-1:0] b_addr; logic [31:0] b_wdata, b_rdata;
  logic [31:0] mem_ref [N*D];
  int checks = 0, failures = 0;

  vector_unit #(.NLANES(N), .NVREG(8), .MAXVL(VL), .BANK_DEPTH(D)) dut (.*);
  dmem #(.NLANES(N), .BANK_DEPTH(D)) u_dmem (.clk, .a_en, .a_we, .a_row, .a_wdata, .a_rdata,
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic issue(opcode_t op, int vd, int va, int vb, int base, logic [31:0] sval, int vl, output int cyc);
    @(negedge clk);
    cmd = '0; cmd.op = op; cmd.vd = 3'(vd); cmd.va = 3'(va); cmd.vb = 3'(vb);
    cmd.base = 32'(base); cmd.sval = sval; cmd.vl = VLW'(vl);
    cmd_valid = 1;
    #1 chk(32'(cmd_ready), 1, "cmd_ready when idle");
    @(negedge clk);
    cmd_valid = 0;
    cyc = 0;
    while (busy) begin
      chk(32'(cmd_ready), 0, "cmd_ready while busy");
      cyc++;
      @(negedge clk);
    end
  endtask

  task automatic host_wr(int a, logic [31:0] v);
    @(negedge clk);
    b_en = 1; b_we = 1; b_addr = WAW'(a); b_wdata = v; mem_ref[a] = v;
    @(negedge clk);
    b_en = 0; b_we = 0;
  endtask

  task automatic host_chk(int a, logic [31:0] v, string what);
    @(negedge clk);
    b_en = 1; b_we = 0; b_addr = WAW'(a);
    @(negedge clk);
    b_en = 0;
    chk(b_rdata, v, what);
  endtask

  initial begin
    int cyc, vl;
    logic [31:0] x [VL], y [VL], s;
    cmd_valid = 0; cmd = '0; s_req = 0; s_we = 0; s_addr = '0; s_wdata = '0;
    b_en = 0; b_we = 0; b_addr = '0; b_wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 3; rep++) begin
      vl = (rep == 0) ? 64 : (rep == 1) ? 37 : 8;
      for (int i = 0; i < VL; i++) begin
        x[i] = rnd_single(115, 135); y[i] = rnd_single(115, 135);
        host_wr(i, x[i]); host_wr(100 + i, y[i]);
      end
      s = rnd_single(120, 130);
      issue(OP_VLD, 1, 0, 0, 0, 0, vl, cyc);
      issue(OP_VLD, 2, 0, 0, 100, 0, vl, cyc);
      issue(OP_VADD, 3, 1, 2, 0, 0, vl, cyc);
      chk(32'(cyc), 32'((vl + 7) / 8 + 1), "VADD busy cycles");
      issue(OP_VMUL, 4, 1, 2, 0, 0, vl, cyc);
      issue(OP_VSADD, 5, 1, 0, 0, s, vl, cyc);
      issue(OP_VSMUL, 6, 2, 0, 0, s, vl, cyc);
      issue(OP_VST, 3, 0, 0, 200, 0, vl, cyc);
      issue(OP_VST, 4, 0, 0, 300, 0, vl, cyc);
      issue(OP_VST, 5, 0, 0, 400, 0, vl, cyc);
      issue(OP_VST, 6, 0, 0, 500, 0, vl, cyc);
      for (int i = 0; i < vl; i++) begin
        host_chk(200 + i, r2s(s2r(x[i]) + s2r(y[i])), $sformatf("VADD[%0d]", i));
        host_chk(300 + i, r2s(s2r(x[i]) * s2r(y[i])), $sformatf("VMUL[%0d]", i));
        host_chk(400 + i, r2s(s2r(x[i]) + s2r(s)), $sformatf("VSADD[%0d]", i));
        host_chk(500 + i, r2s(s2r(y[i]) * s2r(s)), $sformatf("VSMUL[%0d]", i));
      end
    end
    // indexed gather then scatter of a permutation
    for (int i = 0; i < VL; i++) host_wr(600 + i, 32'((i * 5) % 64));
    issue(OP_VLD, 7, 0, 0, 600, 0, 64, cyc);
    issue(OP_VLDX, 1, 0, 7, 0, 0, 64, cyc);      // v1[i] = x[(5i)%64]
    issue(OP_VSTX, 1, 0, 7, 700, 0, 64, cyc);    // mem[700+(5i)%64] = v1[i]
    for (int i = 0; i < VL; i++) host_chk(700 + i, x[i], $sformatf("gather/scatter[%0d]", i));
    // scalar access is granted when idle
    @(negedge clk);
    s_req = 1; s_we = 0; s_addr = 32'd5;
    #1 chk(32'(s_gnt), 1, "scalar grant");
    @(negedge clk);
    s_req = 0;
    chk(s_rdata, x[5], "scalar read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
