// tb_imem: the host port loads random words into the instruction memory and
// reads some back; the fetch port reads random addresses and must return the
// word one cycle later.
module tb_imem;
  localparam int D = 256, AW = 8;
  logic clk = 0;
  logic [AW-1:0] a_addr, b_addr;
  logic [31:0]   a_rdata, b_rdata, b_wdata;
  logic          b_en, b_we;
  logic [31:0]   ref_m [D];
  int checks = 0, failures = 0;

  imem #(.DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_addr = '0; b_en = 0; b_we = 0; b_addr = '0; b_wdata = '0;
    for (int w = 0; w < D; w++) begin
      @(negedge clk);
      b_en = 1; b_we = 1; b_addr = AW'(w); b_wdata = $urandom; ref_m[w] = b_wdata;
    end
    for (int t = 0; t < 1000; t++) begin
      logic [AW-1:0] fa, ha;
      @(negedge clk);
      b_we = 0; b_en = 1; ha = AW'($urandom); b_addr = ha;
      fa = AW'($urandom); a_addr = fa;
      @(negedge clk);
      b_en = 0;
      checks += 2;
      if (a_rdata !== ref_m[fa]) begin failures++; $display("FAIL fetch %0d", fa); end
      if (b_rdata !== ref_m[ha]) begin failures++; $display("FAIL host read %0d", ha); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
