// fp_mul: IEEE 754 single-precision multiplier, one per vector lane.
//
// Combinational. The 24x24-bit significand product is normalised by at most
// one place and rounded to nearest, ties to even. As in fp_add (this design's
// choices, the document asks only for IEEE 754 single precision): subnormal
// inputs are zero, subnormal results flush to a signed zero, overflow gives a
// signed infinity, 0*inf and any NaN input give the quiet NaN 32'h7fc00000.
//
// Ports: a, b (32-bit IEEE single) -> y = a * b. No clock.
module fp_mul (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  localparam logic [31:0] QNAN = 32'h7fc0_0000;

  logic        s;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [47:0] p;
  logic [9:0]  e;
  logic [23:0] m;
  logic        g, st;
  logic [24:0] rnd;

  always_comb begin
    s      = a[31] ^ b[31];
    a_zero = (a[30:23] == 0);
    b_zero = (b[30:23] == 0);
    a_nan  = (a[30:23] == 8'hff) && (a[22:0] != 0);
    b_nan  = (b[30:23] == 8'hff) && (b[22:0] != 0);
    a_inf  = (a[30:23] == 8'hff) && (a[22:0] == 0);
    b_inf  = (b[30:23] == 8'hff) && (b[22:0] == 0);

    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = {2'b00, a[30:23]} + {2'b00, b[30:23]} - 10'd127;
    if (p[47]) begin
      m  = p[47:24];
      g  = p[23];
      st = |p[22:0];
      e  = e + 10'd1;
    end else begin
      m  = p[46:23];
      g  = p[22];
      st = |p[21:0];
    end
    rnd = {1'b0, m};
    if (g && (st || m[0])) rnd = rnd + 25'd1;
    if (rnd[24]) begin
      rnd = rnd >> 1;
      e   = e + 10'd1;
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) y = QNAN;
    else if (a_inf || b_inf) y = {s, 8'hff, 23'd0};
    else if (a_zero || b_zero) y = {s, 31'd0};
    else if ($signed(e) <= 0) y = {s, 31'd0};
    else if ($signed(e) >= 255) y = {s, 8'hff, 23'd0};
    else y = {s, e[7:0], rnd[22:0]};
  end
endmodule
