// tb_host_if: checks the task handshake (task_req high while idle, a
// task_resp pulse produces one start pulse and drops task_req until done, a
// response while running is ignored) and the host address decode to the
// instruction and data memories, including the read-data select one cycle
// after the access. Small behavioural memories stand in for imem and dmem.
module tb_host_if;
  localparam int DAW = 6, IAW = 5, HAW = 7;
  logic clk = 0, rst_n = 0;
  logic host_en, host_we, task_req, task_resp, start, done;
  logic [HAW-1:0] host_addr;
  logic [31:0] host_wdata, host_rdata;
  logic im_en, im_we, dm_en, dm_we;
  logic [IAW-1:0] im_addr; logic [DAW-1:0] dm_addr;
  logic [31:0] im_wdata, im_rdata, dm_wdata, dm_rdata;
  logic [31:0] im [32], dm [64];
  int checks = 0, failures = 0, starts = 0;

  host_if #(.DMEM_AW(DAW), .IMEM_AW(IAW)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    if (im_en && im_we) im[im_addr] <= im_wdata;
    if (im_en) im_rdata <= im[im_addr];
    if (dm_en && dm_we) dm[dm_addr] <= dm_wdata;
    if (dm_en) dm_rdata <= dm[dm_addr];
    if (start) starts++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] g, logic [31:0] e, string what);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s: %h expected %h", what, g, e); end
  endtask

  initial begin
    host_en = 0; host_we = 0; host_addr = '0; host_wdata = '0; task_resp = 0; done = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(32'(task_req), 1, "request when idle");
    // write both memories
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      host_en = 1; host_we = 1; host_addr = {1'b1, 6'(i)}; host_wdata = 32'h1000 + i;
      @(negedge clk);
      host_addr = {1'b0, 6'(i)}; host_wdata = 32'h2000 + i;
    end
    @(negedge clk);
    host_we = 0;
    for (int i = 0; i < 32; i += 3) begin
      host_addr = {1'b1, 6'(i)};
      @(negedge clk);
      chk(host_rdata, 32'h1000 + i, "imem read");
      host_addr = {1'b0, 6'(i)};
      @(negedge clk);
      chk(host_rdata, 32'h2000 + i, "dmem read");
    end
    host_en = 0;
    chk(32'(starts), 0, "no start before response");
    task_resp = 1;
    #1 chk(32'(start), 1, "start on response");
    @(negedge clk);
    task_resp = 0;
    chk(32'(task_req), 0, "request dropped while running");
    repeat (3) @(negedge clk);
    task_resp = 1;
    #1 chk(32'(start), 0, "response ignored while running");
    @(negedge clk);
    task_resp = 0;
    done = 1;
    @(negedge clk);
    done = 0;
    chk(32'(task_req), 1, "request after done");
    chk(32'(starts), 1, "one start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
