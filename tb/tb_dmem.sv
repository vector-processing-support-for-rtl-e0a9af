// tb_dmem: exercises the eight-bank dual-port data memory. The host port
// writes words by address; the per-bank processor port reads them back by
// (bank, row) and writes others, which the host port reads; read latency is
// one cycle on both ports. Uses a small bank depth.
module tb_dmem;
  localparam int N = 8, D = 64, RW = 6, WAW = 9;
  logic clk = 0;
  logic [N-1:0]         a_en, a_we;
  logic [N-1:0][RW-1:0] a_row;
  logic [N-1:0][31:0]   a_wdata, a_rdata;
  logic                 b_en, b_we;
  logic [WAW-1:0]       b_addr;
  logic [31:0]          b_wdata, b_rdata;
  logic [31:0] ref_m [N*D];
  int checks = 0, failures = 0;

  dmem #(.NLANES(N), .BANK_DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_en = '0; a_we = '0; a_row = '0; a_wdata = '0; b_en = 0; b_we = 0; b_addr = '0; b_wdata = '0;
    // host fills the memory
    for (int w = 0; w < N * D; w++) begin
      @(negedge clk);
      b_en = 1; b_we = 1; b_addr = WAW'(w); b_wdata = $urandom; ref_m[w] = b_wdata;
    end
    @(negedge clk); b_en = 0;
    for (int t = 0; t < 2000; t++) begin
      logic [N-1:0] rd_en;
      logic [N-1:0][RW-1:0] rd_row;
      logic h_rd; logic [WAW-1:0] h_addr;
      @(negedge clk);
      a_en = N'($urandom); a_we = N'($urandom) & a_en;
      for (int k = 0; k < N; k++) begin
        a_row[k] = RW'($urandom); a_wdata[k] = $urandom;
      end
      b_en = 1; b_we = 0; b_addr = WAW'($urandom);
      // avoid reading by host a word written by the processor in the same cycle
      if (a_we[b_addr[2:0]] && a_row[b_addr[2:0]] == b_addr[WAW-1:3]) a_we[b_addr[2:0]] = 0;
      rd_en = a_en & ~a_we; rd_row = a_row; h_rd = 1; h_addr = b_addr;
      @(negedge clk);
      b_en = 0; b_addr = h_addr ^ WAW'(1);   // the read data must not follow the new address
      #1;
      for (int k = 0; k < N; k++) if (rd_en[k]) begin
        checks++;
        if (a_rdata[k] !== ref_m[rd_row[k] * N + k]) begin
          failures++;
          if (failures < 10) $display("FAIL port A bank %0d row %0d", k, rd_row[k]);
        end
      end
      checks++;
      if (b_rdata !== ref_m[h_addr]) begin
        failures++;
        if (failures < 10) $display("FAIL port B addr %0d: %h expected %h", h_addr, b_rdata, ref_m[h_addr]);
      end
      for (int k = 0; k < N; k++) if (a_we[k]) ref_m[a_row[k] * N + k] = a_wdata[k];
      a_en = '0; a_we = '0; b_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
