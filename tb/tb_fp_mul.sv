// tb_fp_mul: self-checking test of fp_mul. Random normal operands, chosen so
// that the double-precision result is exact, are compared with the double
// result rounded once to single; hand-picked cases cover zeros, cancellation,
// infinities, NaN, overflow and underflow.
module tb_fp_mul;
  import fp_ref_pkg::*;
  logic [31:0] a, b, y, exp_y;
  int checks = 0, failures = 0;

  fp_mul dut (.a(a), .b(b), .y(y));

  task automatic check(logic [31:0] ta, logic [31:0] tb_, logic [31:0] te);
    a = ta; b = tb_;
    #1;
    checks++;
    if (y !== te) begin
      failures++;
      if (failures < 10) $display("FAIL %h mul %h = %h, expected %h", ta, tb_, y, te);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ra, rb;
    for (int i = 0; i < 20000; i++) begin
      ra = rnd_single(100, 150);
      rb = rnd_single(100, 150);
      if ("mul" == "add" && (ra[30:23] > rb[30:23] + 25 || rb[30:23] > ra[30:23] + 25))
        rb[30:23] = ra[30:23] - 8'($urandom_range(0, 25));
      a = ra; b = rb;
      exp_y = r2s(s2r(a) * s2r(b));
      check(ra, rb, exp_y);
    end
    check(32'h3fc00000, 32'h40200000, 32'h40700000);   // 1.5*2.5 = 3.75
    check(32'h3f800000, 32'hc0490fdb, 32'hc0490fdb);
    check(32'h00000000, 32'hc0490fdb, 32'h80000000);
    check(32'h7f000000, 32'h40000000, 32'h7f800000);   // overflow
    check(32'h00800000, 32'h3f000000, 32'h00000000);   // underflow flush
    check(32'h7f800000, 32'h00000000, 32'h7fc00000);   // inf * 0
    check(32'hff800000, 32'h40000000, 32'hff800000);
    check(32'h3f800001, 32'h3f800001, 32'h3f800002);   // (1+u)^2 rounds down
    check(32'h3fffffff, 32'h3fffffff, 32'h407ffffe);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
