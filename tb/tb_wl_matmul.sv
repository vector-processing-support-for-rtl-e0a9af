// tb_wl_matmul: dense matrix-matrix multiplication at two of the sizes of
// the original evaluation, on the two-processor system at default sizes, with
// the testbench as host.
//   n = 32 : the whole problem fits one processor's data memory; it runs on
//            one processor and then split by rows over both (which must take
//            at most 55% of the time).
//   n = 128 .. 384: 3*n*n words do not fit one processor, so the host
//            blocks the work. Each processor owns half of the rows; for each
//            block of 32 of its rows the host loads those rows of A, and for
//            each column block of B (64 wide, 32 wide when n*64 words of B
//            would not fit) it loads that block, starts the task and reads
//            back the block of C.
// Every element of C is compared with a reference that rounds each multiply
// and add to single precision in program order.
module tb_wl_matmul;
  import vp_pkg::*;
  import fp_ref_pkg::*;
  import vp_prog_pkg::*;
  localparam int NP = 2;
  localparam int HAW = 16;
  localparam int NMAX = 384;
  localparam int A0 = 0, C0 = 12400, B0 = 16100;   // arguments at 16000

  logic clk = 0, rst_n = 0;
  logic [NP-1:0] host_en, host_we, task_req, task_resp, busy;
  logic [NP-1:0][HAW-1:0] host_addr;
  logic [NP-1:0][31:0] host_wdata, host_rdata;
  logic [NP-1:0] ev_load_use, ev_vec_wait, ev_mem_wait, ev_branch, ev_bank_conflict;

  vps_system dut (.*);

  int checks = 0, failures = 0, n_task = 0;
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (150000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] g, logic [31:0] e, string what);
    checks++;
    if (g !== e) begin
      failures++;
      if (failures < 20) $display("FAIL %s: %h expected %h", what, g, e);
    end
  endtask

  task automatic hwrite(int p, logic imem, int a, logic [31:0] d);
    @(negedge clk);
    host_en[p] = 1; host_we[p] = 1; host_addr[p] = {imem, 15'(a)}; host_wdata[p] = d;
    @(negedge clk);
    host_en[p] = 0; host_we[p] = 0;
  endtask

  task automatic hread(int p, int a, output logic [31:0] d);
    @(negedge clk);
    host_en[p] = 1; host_we[p] = 0; host_addr[p] = {1'b0, 15'(a)};
    @(negedge clk);
    host_en[p] = 0;
    d = host_rdata[p];
  endtask

  task automatic load_prog(int p, logic [31:0] prog[$]);
    foreach (prog[i]) hwrite(p, 1'b1, i, prog[i]);
  endtask

  task automatic run_task(int p);
    while (!task_req[p]) @(negedge clk);
    task_resp[p] = 1;
    @(negedge clk);
    task_resp[p] = 0;
    n_task++;
    while (!task_req[p]) @(negedge clk);
  endtask

  logic [31:0] A [NMAX*NMAX], B [NMAX*NMAX], C [NMAX*NMAX];

  function automatic logic [31:0] fmul(logic [31:0] a, logic [31:0] b);
    return r2s(s2r(a) * s2r(b));
  endfunction
  function automatic logic [31:0] fadd(logic [31:0] a, logic [31:0] b);
    return r2s(s2r(a) + s2r(b));
  endfunction

  task automatic make(int n);
    for (int i = 0; i < n * n; i++) begin
      A[i] = {1'b0, 8'($urandom_range(120, 130)), 23'($urandom)};
      B[i] = {1'b0, 8'($urandom_range(120, 130)), 23'($urandom)};
    end
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        logic [31:0] acc;
        acc = fmul(B[j], A[i * n]);
        for (int k = 1; k < n; k++) acc = fadd(acc, fmul(B[k * n + j], A[i * n + k]));
        C[i * n + j] = acc;
      end
  endtask

  // processor p holds rows [r0, r0+nr) of A at A0 (row stride n)
  task automatic load_a(int p, int n, int r0, int nr);
    for (int i = 0; i < nr * n; i++) hwrite(p, 0, A0 + i, A[r0 * n + i]);
  endtask

  // load column block [c0, c0+w) of B, set the arguments
  task automatic setup(int p, int n, int nr, int c0, int w);
    logic [31:0] prog[$];
    matmul_blk(prog);
    load_prog(p, prog);
    for (int k = 0; k < n; k++)
      for (int j = 0; j < w; j++) hwrite(p, 0, B0 + k * w + j, B[k * n + c0 + j]);
    hwrite(p, 0, PARAM + 0, n);
    hwrite(p, 0, PARAM + 1, nr);
    hwrite(p, 0, PARAM + 2, B0);
    hwrite(p, 0, PARAM + 3, A0);
    hwrite(p, 0, PARAM + 4, C0);
    hwrite(p, 0, PARAM + 5, w);
    hwrite(p, 0, PARAM + 6, n);
  endtask

  task automatic check(int p, int n, int r0, int nr, int c0, int w);
    logic [31:0] d;
    for (int i = 0; i < nr; i++)
      for (int j = 0; j < w; j++) begin
        hread(p, C0 + i * w + j, d);
        chk(d, C[(r0 + i) * n + c0 + j], $sformatf("n=%0d P%0d C[%0d][%0d]", n, p, r0 + i, c0 + j));
      end
  endtask

  initial begin
    longint t0, t_one, t_two;
    int n_exp = 3;
    int sizes[5] = '{128, 192, 256, 320, 384};
    host_en = '0; host_we = '0; host_addr = '0; host_wdata = '0; task_resp = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // n = 32
    make(32);
    load_a(0, 32, 0, 32);
    setup(0, 32, 32, 0, 32);
    t0 = cycle;
    run_task(0);
    t_one = cycle - t0;
    check(0, 32, 0, 32, 0, 32);
    setup(0, 32, 16, 0, 32);
    load_a(1, 32, 16, 16);
    setup(1, 32, 16, 0, 32);
    t0 = cycle;
    fork
      run_task(0);
      run_task(1);
    join
    t_two = cycle - t0;
    check(0, 32, 0, 16, 0, 32);
    check(1, 32, 16, 16, 0, 32);
    $display("n=32: one processor %0d cycles, two processors %0d cycles", t_one, t_two);
    checks++;
    if (t_two * 100 > t_one * 55) begin
      failures++;
      $display("FAIL two-processor time %0d not about half of %0d", t_two, t_one);
    end

    // larger sizes, blocked by the host
    foreach (sizes[si]) begin
      int n, rb, w;
      n = sizes[si];
      rb = 32;
      w = (n * 64 <= 16600) ? 64 : 32;
      make(n);
      t_two = 0;
      for (int rk = 0; rk < n / 2 / rb; rk++) begin
        load_a(0, n, rk * rb, rb);
        load_a(1, n, n / 2 + rk * rb, rb);
        for (int cb = 0; cb < n / w; cb++) begin
          fork
            setup(0, n, rb, cb * w, w);
            setup(1, n, rb, cb * w, w);
          join
          t0 = cycle;
          fork
            run_task(0);
            run_task(1);
          join
          t_two += cycle - t0;
          fork
            check(0, n, rk * rb, rb, cb * w, w);
            check(1, n, n / 2 + rk * rb, rb, cb * w, w);
          join
        end
      end
      n_exp += 2 * (n / 2 / rb) * (n / w);
      $display("n=%0d on two processors, host-blocked: %0d compute cycles", n, t_two);
    end
    checks++;
    if (n_task != n_exp) begin failures++; $display("FAIL %0d tasks, expected %0d", n_task, n_exp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
