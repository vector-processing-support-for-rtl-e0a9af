// fp_add: IEEE 754 single-precision adder, one per vector lane.
//
// Combinational. The operand of smaller magnitude is aligned to the larger
// one with guard, round and sticky bits, the significands are added or
// subtracted, the result is normalised (leading-zero count for cancellation)
// and rounded to nearest, ties to even. The document asks only for IEEE 754
// single precision; the following are this design's choices: subnormal inputs
// are read as zero and subnormal results are flushed to a signed zero;
// infinities propagate; inf-inf and any NaN input give the quiet NaN
// 32'h7fc00000; an exact zero sum of opposite signs is +0.
//
// Ports: a, b (32-bit IEEE single) -> y = a + b. No clock; the lane that
// instantiates it registers y.
module fp_add (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  localparam logic [31:0] QNAN = 32'h7fc0_0000;

  logic        sx, sy, sub;
  logic [7:0]  ex, ey;
  logic [23:0] mx, my;
  logic [8:0]  d;
  logic [26:0] fx, fy, fy_sh;
  logic [27:0] sum;
  logic [9:0]  e;
  logic [26:0] nrm;
  logic [4:0]  lz;
  logic [24:0] rnd;
  logic        a_nan, b_nan, a_inf, b_inf;

  always_comb begin
    a_nan = (a[30:23] == 8'hff) && (a[22:0] != 0);
    b_nan = (b[30:23] == 8'hff) && (b[22:0] != 0);
    a_inf = (a[30:23] == 8'hff) && (a[22:0] == 0);
    b_inf = (b[30:23] == 8'hff) && (b[22:0] == 0);

    // order by magnitude: x is the larger operand
    if (a[30:0] >= b[30:0]) begin
      sx = a[31]; ex = a[30:23]; mx = (a[30:23] == 0) ? 24'd0 : {1'b1, a[22:0]};
      sy = b[31]; ey = b[30:23]; my = (b[30:23] == 0) ? 24'd0 : {1'b1, b[22:0]};
    end else begin
      sx = b[31]; ex = b[30:23]; mx = (b[30:23] == 0) ? 24'd0 : {1'b1, b[22:0]};
      sy = a[31]; ey = a[30:23]; my = (a[30:23] == 0) ? 24'd0 : {1'b1, a[22:0]};
    end
    if (ey == 0) ey = ex;          // a zero operand needs no alignment
    sub = sx ^ sy;
    d   = {1'b0, ex} - {1'b0, ey};

    // align with guard/round/sticky
    fx = {mx, 3'b000};
    fy = {my, 3'b000};
    if (d >= 9'd27) fy_sh = {26'd0, |fy};
    else begin
      fy_sh = fy >> d;
      fy_sh[0] = fy_sh[0] | (|(fy & ((27'd1 << d) - 27'd1)));
    end

    sum = sub ? ({1'b0, fx} - {1'b0, fy_sh}) : ({1'b0, fx} + {1'b0, fy_sh});
    e   = {2'b00, ex};

    // normalise
    lz  = 5'd0;
    nrm = 27'd0;
    if (sum[27]) begin
      nrm = {sum[27:2], sum[1] | sum[0]};
      e   = e + 10'd1;
    end else begin
      for (int i = 26; i >= 0; i--) begin
        if (sum[i]) begin
          lz = 5'(26 - i);
          break;
        end
      end
      nrm = sum[26:0] << lz;
      e   = e - {5'd0, lz};
    end

    // round to nearest even: nrm = {1.frac[22:0], g, r, s}
    rnd = {1'b0, nrm[26:3]};
    if (nrm[2] && (nrm[1] || nrm[0] || nrm[3])) rnd = rnd + 25'd1;
    if (rnd[24]) begin
      rnd = rnd >> 1;
      e   = e + 10'd1;
    end

    if (a_nan || b_nan || (a_inf && b_inf && (a[31] != b[31]))) y = QNAN;
    else if (a_inf) y = a;
    else if (b_inf) y = b;
    else if (sum == 0) y = (sub || mx == 0) ? {sx & sy, 31'd0} : {sx, 31'd0};
    else if ($signed(e) <= 0) y = {sx, 31'd0};              // flush underflow
    else if (e >= 10'd255) y = {sx, 8'hff, 23'd0};           // overflow
    else y = {sx, e[7:0], rnd[22:0]};
  end
endmodule
