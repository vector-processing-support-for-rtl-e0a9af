// tb_scalar_unit: runs a test program on the five-stage scalar unit with a
// behavioural instruction memory, a data memory whose grant is withheld at
// random, and a vector unit stand-in that is ready only at random. Checks the
// stored results (ALU, forwarding, load-use, loop with a taken branch, jump
// over an instruction, LUI), the vector instructions handed over (opcode,
// registers, base address, scalar operand, vector length after SETVL with
// clamping) and that nothing after HALT executes. Counts each hazard event.
module tb_scalar_unit;
  import vp_pkg::*;
  import vp_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, running, done;
  logic [9:0]  imem_addr;
  logic [31:0] imem_rdata;
  logic        vec_valid, vec_ready, vec_busy;
  vec_cmd_t    vec_cmd;
  logic        mem_req, mem_we, mem_gnt;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic        ev_load_use, ev_vec_wait, ev_mem_wait, ev_branch;

  logic [31:0] prog [1024];
  logic [31:0] dmem [64];
  vec_cmd_t    got [$];
  int checks = 0, failures = 0;
  int n_lu = 0, n_vw = 0, n_mw = 0, n_br = 0;

  scalar_unit #(.IMEM_AW(10)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // behavioural memories and vector unit stand-in
  always_ff @(posedge clk) begin
    imem_rdata <= prog[imem_addr];
    if (mem_req && mem_gnt) begin
      if (mem_we) dmem[mem_addr[5:0]] <= mem_wdata;
      else        mem_rdata <= dmem[mem_addr[5:0]];
    end
    if (vec_valid && vec_ready) got.push_back(vec_cmd);
    if (ev_load_use) n_lu++;
    if (ev_vec_wait) n_vw++;
    if (ev_mem_wait) n_mw++;
    if (ev_branch)   n_br++;
  end
  always @(negedge clk) begin
    mem_gnt   <= ($urandom_range(0, 2) != 0);
    vec_ready <= ($urandom_range(0, 3) == 0);
  end
  assign vec_busy = !vec_ready;

  task automatic chk(logic [31:0] g, logic [31:0] e, string what);
    checks++;
    if (g !== e) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, g, e);
    end
  endtask

  initial begin
    int pc = 0;
    vec_cmd_t e;
    for (int i = 0; i < 1024; i++) prog[i] = enc(OP_NOP);
    for (int i = 0; i < 64; i++) dmem[i] = 0;
    prog[pc++] = enc(OP_ADDI, 1, 0, 0, 5);
    prog[pc++] = enc(OP_ADDI, 2, 0, 0, 7);
    prog[pc++] = enc(OP_ADD,  3, 1, 2);          // 12
    prog[pc++] = enc(OP_SUB,  4, 3, 1);          // 7
    prog[pc++] = enc(OP_SW,   0, 0, 3, 0);       // mem[0] = 12
    prog[pc++] = enc(OP_LW,   5, 0, 0, 0);
    prog[pc++] = enc(OP_ADD,  6, 5, 5);          // load-use: 24
    prog[pc++] = enc(OP_SW,   0, 0, 6, 1);
    prog[pc++] = enc(OP_AND,  7, 3, 4);          // 4
    prog[pc++] = enc(OP_OR,   8, 3, 4);          // 15
    prog[pc++] = enc(OP_XOR,  9, 3, 4);          // 11
    prog[pc++] = enc(OP_SLT, 10, 4, 3);          // 1
    prog[pc++] = enc(OP_SLT, 11, 3, 4);          // 0
    prog[pc++] = enc(OP_LUI, 12, 0, 0, 'h1fc0);  // 3f800000
    prog[pc++] = enc(OP_SW,   0, 0, 7, 2);
    prog[pc++] = enc(OP_SW,   0, 0, 8, 3);
    prog[pc++] = enc(OP_SW,   0, 0, 9, 4);
    prog[pc++] = enc(OP_SW,   0, 0, 10, 5);
    prog[pc++] = enc(OP_SW,   0, 0, 11, 6);
    prog[pc++] = enc(OP_SW,   0, 0, 12, 7);
    prog[pc++] = enc(OP_ADDI, 1, 0, 0, 0);       // 20
    prog[pc++] = enc(OP_ADDI, 2, 0, 0, 10);
    prog[pc++] = enc(OP_ADD,  1, 1, 2);          // 22 loop
    prog[pc++] = enc(OP_ADDI, 2, 2, 0, -1);
    prog[pc++] = enc(OP_BNE,  0, 2, 0, -2);      // 24 -> 22
    prog[pc++] = enc(OP_SW,   0, 0, 1, 8);       // 55
    prog[pc++] = enc(OP_JMP,  0, 0, 0, 28);
    prog[pc++] = enc(OP_SW,   0, 0, 1, 9);       // skipped
    prog[pc++] = enc(OP_ADDI, 3, 0, 0, 20);      // 28
    prog[pc++] = enc(OP_SETVL, 0, 3);
    prog[pc++] = enc(OP_VLD,  1, 3, 0, 16);      // base 36
    prog[pc++] = enc(OP_VSMUL, 2, 1, 12);        // sval = r12
    prog[pc++] = enc(OP_VST,  2, 4, 0, 0);       // base 7
    prog[pc++] = enc(OP_ADDI, 3, 0, 0, 100);
    prog[pc++] = enc(OP_SETVL, 0, 3);            // clamps to 64
    prog[pc++] = enc(OP_VADD, 3, 1, 2);
    prog[pc++] = enc(OP_BEQ,  0, 0, 0, 2);       // 36 -> 38
    prog[pc++] = enc(OP_VADD, 4, 1, 2);          // skipped
    prog[pc++] = enc(OP_HALT);                   // 38
    prog[pc++] = enc(OP_SW,   0, 0, 1, 10);      // never
    prog[pc++] = enc(OP_VMUL, 5, 5, 5);          // never

    start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    chk(32'(running), 1, "running after start");
    fork
      begin : wait_done
        while (!done) @(posedge clk);
      end
    join
    repeat (10) @(negedge clk);
    chk(32'(running), 0, "stopped after HALT");
    chk(dmem[0], 12, "add");
    chk(dmem[1], 24, "load-use");
    chk(dmem[2], 4, "and");
    chk(dmem[3], 15, "or");
    chk(dmem[4], 11, "xor");
    chk(dmem[5], 1, "slt true");
    chk(dmem[6], 0, "slt false");
    chk(dmem[7], 32'h3f800000, "lui");
    chk(dmem[8], 55, "loop sum");
    chk(dmem[9], 0, "jump skipped store");
    chk(dmem[10], 0, "nothing after halt");
    chk(32'(got.size()), 4, "vector instructions issued");
    if (got.size() == 4) begin
      e = '0; e.op = OP_VLD; e.vd = 1; e.va = 3; e.vb = 0; e.base = 36; e.sval = 0; e.vl = 20;
      chk(32'(got[0] == e), 1, "VLD command");
      e = '0; e.op = OP_VSMUL; e.vd = 2; e.va = 1; e.vb = 4; e.base = 55; e.sval = 32'h3f800000; e.vl = 20;
      chk(32'(got[1] == e), 1, "VSMUL command");
      e = '0; e.op = OP_VST; e.vd = 2; e.va = 4; e.vb = 0; e.base = 7; e.sval = 0; e.vl = 20;
      chk(32'(got[2] == e), 1, "VST command");
      e = '0; e.op = OP_VADD; e.vd = 3; e.va = 1; e.vb = 2; e.base = 55; e.sval = 0; e.vl = 64;
      chk(32'(got[3] == e), 1, "VADD command");
    end
    $display("events: load-use %0d, vector wait %0d, memory wait %0d, taken branch %0d", n_lu, n_vw, n_mw, n_br);
    checks += 4;
    if (n_lu == 0) failures++;
    if (n_vw == 0) failures++;
    if (n_mw == 0) failures++;
    if (n_br != 11) begin failures++; $display("FAIL taken branches %0d, expected 11", n_br); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
