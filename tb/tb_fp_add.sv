// tb_fp_add: self-checking test of fp_add. Random normal operands, chosen so
// that the double-precision result is exact, are compared with the double
// result rounded once to single; hand-picked cases cover zeros, cancellation,
// infinities, NaN, overflow and underflow.
module tb_fp_add;
  import fp_ref_pkg::*;
  logic [31:0] a, b, y, exp_y;
  int checks = 0, failures = 0;

  fp_add dut (.a(a), .b(b), .y(y));

  task automatic check(logic [31:0] ta, logic [31:0] tb_, logic [31:0] te);
    a = ta; b = tb_;
    #1;
    checks++;
    if (y !== te) begin
      failures++;
      if (failures < 10) $display("FAIL %h add %h = %h, expected %h", ta, tb_, y, te);
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
      if ("add" == "add" && (ra[30:23] > rb[30:23] + 25 || rb[30:23] > ra[30:23] + 25))
        rb[30:23] = ra[30:23] - 8'($urandom_range(0, 25));
      a = ra; b = rb;
      exp_y = r2s(s2r(a) + s2r(b));
      check(ra, rb, exp_y);
    end
    // same magnitude, opposite signs -> +0
    check(32'h3fc00000, 32'hbfc00000, 32'h00000000);
    check(32'h00000000, 32'h80000000, 32'h00000000);
    check(32'h80000000, 32'h80000000, 32'h80000000);
    check(32'h40490fdb, 32'h00000000, 32'h40490fdb);
    check(32'h3f800000, 32'h3f800000, 32'h40000000);   // 1+1 = 2
    check(32'h3f800001, 32'hbf800000, 32'h34000000);   // cancellation
    check(32'h4b800000, 32'h3f800000, 32'h4b800000);   // 2^24 + 1, tie to even
    check(32'h4b800000, 32'h40000000, 32'h4b800001);   // 2^24 + 2
    check(32'h7f000000, 32'h7f000000, 32'h7f800000);   // overflow
    check(32'h7f800000, 32'hff800000, 32'h7fc00000);   // inf - inf
    check(32'h7f800000, 32'h3f800000, 32'h7f800000);
    check(32'h7fc00001, 32'h3f800000, 32'h7fc00000);
    check(32'h00800000, 32'h80800001, 32'h80000000);   // below min normal -> signed zero
    check(32'h3f800000, 32'h33800000, 32'h3f800000);   // 1 + 2^-24: tie, stays even
    check(32'h3f800000, 32'h33800001, 32'h3f800001);   // just over the tie
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
