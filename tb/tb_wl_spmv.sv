// tb_wl_spmv: sparse matrix-vector multiplication at three of the matrix
// sizes of the original evaluation (144, 992 and 5300 rows), on the
// two-processor system at default sizes, with the testbench as host. The
// original matrices are not available, so each is synthetic: every row has
// between 1 and K non-zeros at random columns, stored in the padded-slot
// (ELL) layout with K slots. The rows are split in two halves, one per
// processor; each processor receives its half of the values and column
// indices and the whole vector x. Every y element is compared with a
// reference that rounds each multiply and add to single precision in program
// order.
module tb_wl_spmv;
  import vp_pkg::*;
  import fp_ref_pkg::*;
  import vp_prog_pkg::*;
  localparam int NP = 2;
  localparam int HAW = 16;
  localparam int K = 4;
  localparam int XV = 0, XX = 10600, XC = 16100, XY = 26700;   // arguments at 16000

  logic clk = 0, rst_n = 0;
  logic [NP-1:0] host_en, host_we, task_req, task_resp, busy;
  logic [NP-1:0][HAW-1:0] host_addr;
  logic [NP-1:0][31:0] host_wdata, host_rdata;
  logic [NP-1:0] ev_load_use, ev_vec_wait, ev_mem_wait, ev_branch, ev_bank_conflict;

  vps_system dut (.*);

  int checks = 0, failures = 0, n_task = 0, n_bc = 0;
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle++;
    n_bc += $countones(ev_bank_conflict);
  end

  initial begin
    repeat (4000000) @(posedge clk);
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

  logic [31:0] val [], x [], y [];
  int          col [];

  function automatic logic [31:0] fmul(logic [31:0] a, logic [31:0] b);
    return r2s(s2r(a) * s2r(b));
  endfunction
  function automatic logic [31:0] fadd(logic [31:0] a, logic [31:0] b);
    return r2s(s2r(a) + s2r(b));
  endfunction

  task automatic run_size(int R);
    int h;
    longint t0;
    val = new[K * R]; col = new[K * R]; x = new[R]; y = new[R];
    foreach (x[c]) x[c] = {1'b0, 8'($urandom_range(120, 130)), 23'($urandom)};
    for (int r = 0; r < R; r++) begin
      int nz;
      nz = $urandom_range(1, K);
      for (int d = 0; d < K; d++) begin
        val[d * R + r] = (d < nz) ? {1'b0, 8'($urandom_range(120, 130)), 23'($urandom)} : 32'd0;
        col[d * R + r] = (d < nz) ? $urandom_range(0, R - 1) : 0;
      end
      y[r] = fmul(val[r], x[col[r]]);
      for (int d = 1; d < K; d++) y[r] = fadd(y[r], fmul(val[d * R + r], x[col[d * R + r]]));
    end
    h = R / 2;
    fork
      setup(0, R, 0, h);
      setup(1, R, h, R - h);
    join
    t0 = cycle;
    fork
      run_task(0);
      run_task(1);
    join
    $display("spmv %0d rows: %0d cycles on two processors", R, cycle - t0);
    fork
      check(0, 0, h);
      check(1, h, R - h);
    join
  endtask

  task automatic setup(int p, int R, int r0, int nr);
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

  task automatic check(int p, int r0, int nr);
    logic [31:0] d;
    for (int r = 0; r < nr; r++) begin
      hread(p, XY + r, d);
      chk(d, y[r0 + r], $sformatf("P%0d y[%0d]", p, r0 + r));
    end
  endtask

  initial begin
    host_en = '0; host_we = '0; host_addr = '0; host_wdata = '0; task_resp = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_size(144);
    run_size(992);
    run_size(5300);
    $display("bank conflict cycles: %0d", n_bc);
    checks += 2;
    if (n_task != 6) begin failures++; $display("FAIL %0d tasks, expected 6", n_task); end
    if (n_bc == 0)   begin failures++; $display("FAIL no bank conflict"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
