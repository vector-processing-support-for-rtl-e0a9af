// tb_vrf: writes random rows with random lane masks into the banked vector
// register file, keeps a reference copy element by element, and reads it back
// through all three read ports at random addresses every cycle.
module tb_vrf;
  localparam int N = 8, NV = 8, VL = 64, EPB = VL / N;
  logic clk = 0;
  logic [2:0][2:0]         raddr_reg;
  logic [2:0][2:0]         raddr_row;
  logic [2:0][N-1:0][31:0] rdata;
  logic                    we;
  logic [N-1:0]            wmask;
  logic [2:0]              waddr_reg, waddr_row;
  logic [N-1:0][31:0]      wdata;
  logic [31:0] ref_m [NV][VL];
  int checks = 0, failures = 0;

  vrf #(.NLANES(N), .NVREG(NV), .MAXVL(VL)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill everything first
    for (int r = 0; r < NV; r++)
      for (int w = 0; w < EPB; w++) begin
        @(negedge clk);
        we = 1; wmask = '1; waddr_reg = 3'(r); waddr_row = 3'(w);
        for (int l = 0; l < N; l++) begin
          wdata[l] = $urandom;
          ref_m[r][w * N + l] = wdata[l];
        end
      end
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      we = $urandom_range(0, 1);
      wmask = N'($urandom);
      waddr_reg = 3'($urandom); waddr_row = 3'($urandom);
      for (int l = 0; l < N; l++) wdata[l] = $urandom;
      for (int p = 0; p < 3; p++) begin
        raddr_reg[p] = 3'($urandom); raddr_row[p] = 3'($urandom);
      end
      #1;
      for (int p = 0; p < 3; p++)
        for (int l = 0; l < N; l++) begin
          checks++;
          if (rdata[p][l] !== ref_m[raddr_reg[p]][raddr_row[p] * N + l]) begin
            failures++;
            if (failures < 10) $display("FAIL port %0d v%0d elem %0d", p, raddr_reg[p], raddr_row[p] * N + l);
          end
        end
      if (we) for (int l = 0; l < N; l++) if (wmask[l]) ref_m[waddr_reg][waddr_row * N + l] = wdata[l];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
