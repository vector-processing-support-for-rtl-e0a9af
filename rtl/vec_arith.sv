// vec_arith: the addition and multiplication units of the vector core,
// organised as NLANES lanes to match the eight banks of the vector register
// file (as the document describes). Each lane holds one fp_add and one fp_mul;
// is_mul picks which result is kept. One register stage: operands presented
// with in_valid in cycle t give y and out_valid in cycle t+1, so the unit
// delivers NLANES single-precision results every clock. Putting both units in
// every lane and the single output register are this design's choices.
module vec_arith #(
  parameter int unsigned NLANES = vp_pkg::VP_NLANES
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    is_mul,
  input  logic [NLANES-1:0][31:0] a,
  input  logic [NLANES-1:0][31:0] b,
  output logic                    out_valid,
  output logic [NLANES-1:0][31:0] y
);
  logic [NLANES-1:0][31:0] sum, prod;

  for (genvar l = 0; l < NLANES; l++) begin : g_lane
    fp_add u_add (.a(a[l]), .b(b[l]), .y(sum[l]));
    fp_mul u_mul (.a(a[l]), .b(b[l]), .y(prod[l]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= is_mul ? prod : sum;
    end
  end
endmodule
