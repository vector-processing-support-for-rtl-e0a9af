// tb_vec_arith: drives random operand rows into the eight lanes, alternating
// add and multiply, and checks every lane's result one cycle later against a
// double-precision reference rounded to single. Also checks out_valid timing
// (one-cycle latency, one row per cycle).
module tb_vec_arith;
  import fp_ref_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic in_valid, is_mul, out_valid;
  logic [N-1:0][31:0] a, b, y;
  logic [N-1:0][31:0] exp_q;
  logic exp_v;
  int checks = 0, failures = 0;

  vec_arith #(.NLANES(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; is_mul = 0; a = '0; b = '0; exp_v = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      // check what the previous cycle issued
      checks++;
      if (out_valid !== exp_v) begin
        failures++;
        $display("FAIL out_valid=%b expected %b at t=%0d", out_valid, exp_v, t);
      end
      if (exp_v) for (int l = 0; l < N; l++) begin
        checks++;
        if (y[l] !== exp_q[l]) begin
          failures++;
          if (failures < 10) $display("FAIL lane %0d: %h expected %h", l, y[l], exp_q[l]);
        end
      end
      in_valid = (t % 7) != 3;
      is_mul   = t[0];
      for (int l = 0; l < N; l++) begin
        a[l] = rnd_single(110, 140);
        b[l] = rnd_single(110, 140);
        if (!is_mul && (a[l][30:23] > b[l][30:23] + 25 || b[l][30:23] > a[l][30:23] + 25))
          b[l][30:23] = a[l][30:23];
        exp_q[l] = is_mul ? r2s(s2r(a[l]) * s2r(b[l])) : r2s(s2r(a[l]) + s2r(b[l]));
      end
      if (!in_valid) exp_q = y;  // output register holds
      exp_v = in_valid;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
