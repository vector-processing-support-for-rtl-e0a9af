// tb_vector_processor: one vector processor, with the testbench as host,
// runs two tasks back to back: a 16x16 dense matrix multiply and a sparse
// matrix-vector multiply of 70 rows (two strips of the 64-element vector
// length, the second partial). Results are checked against a reference that
// rounds each operation to single precision in program order; the second task
// also checks that the processor asks for work again after the first.
module tb_vector_processor;
  import vp_pkg::*;
  import fp_ref_pkg::*;
  import vp_prog_pkg::*;
  localparam int NP = 1;
  localparam int HAW = 16;                 // default sizes: 15-bit data, 10-bit instruction addresses
  localparam int N = 16;                   // matrix size
  localparam int R = 70, K = 4;             // sparse matrix rows, slots per row
  localparam int A0 = 0, B0 = 4096, C0 = 8192;
  localparam int XV = 0, XC = 1000, XX = 2000, XY = 3000;

  logic clk = 0, rst_n = 0;
  logic [NP-1:0] host_en, host_we, task_req, task_resp, busy;
  logic [NP-1:0][HAW-1:0] host_addr;
  logic [NP-1:0][31:0] host_wdata, host_rdata;
  logic [NP-1:0] ev_load_use, ev_vec_wait, ev_mem_wait, ev_branch, ev_bank_conflict;

  vector_processor dut (
    .clk, .rst_n, .host_en(host_en[0]), .host_we(host_we[0]), .host_addr(host_addr[0]),
    .host_wdata(host_wdata[0]), .host_rdata(host_rdata[0]), .task_req(task_req[0]),
    .task_resp(task_resp[0]), .busy(busy[0]), .ev_load_use(ev_load_use[0]),
    .ev_vec_wait(ev_vec_wait[0]), .ev_mem_wait(ev_mem_wait[0]), .ev_branch(ev_branch[0]),
    .ev_bank_conflict(ev_bank_conflict[0]));

  int checks = 0, failures = 0;
  int n_lu = 0, n_vw = 0, n_mw = 0, n_br = 0, n_bc = 0, n_task = 0;
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle++;
    n_lu += $countones(ev_load_use);
    n_vw += $countones(ev_vec_wait);
    n_mw += $countones(ev_mem_wait);
    n_br += $countones(ev_branch);
    n_bc += $countones(ev_bank_conflict);
  end

  initial begin
    repeat (400000) @(posedge clk);
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

  logic [31:0] A [N*N], B [N*N], C [N*N];
  logic [31:0] val [K*R], x [R], y [R];
  int          col [K*R];

  function automatic logic [31:0] fmul(logic [31:0] a, logic [31:0] b);
    return r2s(s2r(a) * s2r(b));
  endfunction
  function automatic logic [31:0] fadd(logic [31:0] a, logic [31:0] b);
    return r2s(s2r(a) + s2r(b));
  endfunction

  // matmul of rows [r0, r0+nr) on processor p
  task automatic matmul_setup(int p, int r0, int nr);
    logic [31:0] prog[$];
    matmul(prog);
    load_prog(p, prog);
    hwrite(p, 0, PARAM + 0, N);
    hwrite(p, 0, PARAM + 1, nr);
    hwrite(p, 0, PARAM + 2, B0);
    hwrite(p, 0, PARAM + 3, A0 + r0 * N);
    hwrite(p, 0, PARAM + 4, C0 + r0 * N);
  endtask

  task automatic matmul_check(int p, int r0, int nr);
    logic [31:0] d;
    for (int i = r0; i < r0 + nr; i++)
      for (int j = 0; j < N; j++) begin
        hread(p, C0 + i * N + j, d);
        chk(d, C[i * N + j], $sformatf("P%0d C[%0d][%0d]", p, i, j));
      end
  endtask

  // spmv of rows [r0, r0+nr) on processor p: the host lays out that sub-block
  task automatic spmv_setup(int p, int r0, int nr);
    logic [31:0] prog[$];
    spmv(prog);
    load_prog(p, prog);
    for (int d = 0; d < K; d++)
      for (int r = 0; r < nr; r++) begin
        hwrite(p, 0, XV + d * nr + r, val[d * R + r0 + r]);
        hwrite(p, 0, XC + d * nr + r, col[d * R + r0 + r]);
      end
    for (int c = 0; c < R; c++) hwrite(p, 0, XX + c, x[c]);
    hwrite(p, 0, PARAM + 0, nr);
    hwrite(p, 0, PARAM + 1, K);
    hwrite(p, 0, PARAM + 2, XV);
    hwrite(p, 0, PARAM + 3, XC);
    hwrite(p, 0, PARAM + 4, XX);
    hwrite(p, 0, PARAM + 5, XY);
    hwrite(p, 0, PARAM + 6, nr);
  endtask

  task automatic spmv_check(int p, int r0, int nr);
    logic [31:0] d;
    for (int r = 0; r < nr; r++) begin
      hread(p, XY + r, d);
      chk(d, y[r0 + r], $sformatf("P%0d y[%0d]", p, r0 + r));
    end
  endtask

  initial begin
    longint t0, t1, t_one, t_two;
    host_en = '0; host_we = '0; host_addr = '0; host_wdata = '0; task_resp = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // data: positive values, so the reference sums are exact in double
    foreach (A[i]) A[i] = {1'b0, 8'($urandom_range(120, 130)), 23'($urandom)};
    foreach (B[i]) B[i] = {1'b0, 8'($urandom_range(120, 130)), 23'($urandom)};
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        logic [31:0] acc;
        acc = fmul(B[j], A[i * N]);
        for (int k = 1; k < N; k++) acc = fadd(acc, fmul(B[k * N + j], A[i * N + k]));
        C[i * N + j] = acc;
      end
    foreach (x[c]) x[c] = {1'b0, 8'($urandom_range(120, 130)), 23'($urandom)};
    for (int r = 0; r < R; r++)
      for (int d = 0; d < K; d++) begin
        if (d < 2 + (r % 4)) begin
          val[d * R + r] = {1'b0, 8'($urandom_range(120, 130)), 23'($urandom)};
          col[d * R + r] = $urandom_range(0, R - 1);
        end else begin
          val[d * R + r] = 32'd0;
          col[d * R + r] = 0;
        end
      end
    for (int r = 0; r < R; r++) begin
      logic [31:0] acc;
      acc = fmul(val[r], x[col[r]]);
      for (int d = 1; d < K; d++) acc = fadd(acc, fmul(val[d * R + r], x[col[d * R + r]]));
      y[r] = acc;
    end

    // the same matrices are loaded into both processors
    for (int p = 0; p < NP; p++)
      for (int i = 0; i < N * N; i++) begin
        hwrite(p, 0, A0 + i, A[i]);
        hwrite(p, 0, B0 + i, B[i]);
      end

    matmul_setup(0, 0, N);
    t0 = cycle;
    run_task(0);
    t_one = cycle - t0;
    matmul_check(0, 0, N);
    $display("matmul %0dx%0d: %0d cycles", N, N, t_one);
    spmv_setup(0, 0, R);
    t0 = cycle;
    run_task(0);
    t1 = cycle - t0;
    spmv_check(0, 0, R);
    $display("spmv %0d rows x %0d slots: %0d cycles", R, K, t1);

    $display("events: load-use %0d, vector wait %0d, memory wait %0d, taken branch %0d, bank conflict %0d, tasks %0d",
             n_lu, n_vw, n_mw, n_br, n_bc, n_task);
    checks += 6;
    t_two = 0;
    if (n_lu == 0) begin failures++; $display("FAIL no load-use stall"); end
    if (n_vw == 0) begin failures++; $display("FAIL no vector-unit wait"); end
    if (n_mw == 0) begin failures++; $display("FAIL no memory wait"); end
    if (n_br == 0) begin failures++; $display("FAIL no taken branch"); end
    if (n_bc == 0) begin failures++; $display("FAIL no bank conflict"); end
    if (n_task != 2) begin failures++; $display("FAIL %0d tasks, expected 2", n_task); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
