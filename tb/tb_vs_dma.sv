// tb_vs_dma: loads random memory blocks into a model register file through
// the DMA, stores registers back out, and checks every register and memory
// word, with random memory stalls. Also checks that a transfer of N
// registers finishes within 4N cycles plus the memory latency and the stall cycles.
module tb_vs_dma;
  import vs_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge, so asynchronous resets act at once
  logic go, store, busy;
  logic [31:0] mem_addr;
  logic [7:0] reg_addr, count;
  logic mem_req, mem_we, mem_ready, mem_rvalid;
  logic [31:0] mem_a, mem_wdata, mem_rdata;
  logic lw_we;
  logic [7:0] lw_addr, lr_addr;
  logic [REG_W-1:0] lw_data, lr_data;
  int checks = 0, failures = 0;

  logic [REG_W-1:0] regs [256];
  assign lr_data = regs[lr_addr];
  always @(posedge clk) if (lw_we) regs[lw_addr] <= lw_data;

  vs_dma dut (.*);
  sys_mem #(.DEPTH(4096), .LAT(2), .STALL(1'b1)) u_mem (
    .clk, .req(mem_req), .we(mem_we), .a(mem_a), .wdata(mem_wdata),
    .ready(mem_ready), .rvalid(mem_rvalid), .rdata(mem_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic st, logic [31:0] ma, logic [7:0] ra, logic [7:0] n);
    int cyc = 0;
    int s0 = u_mem.stalls;
    go = 1; store = st; mem_addr = ma; reg_addr = ra; count = n;
    @(posedge clk); #1;
    go = 0;
    while (busy) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (cyc > 4 * int'(n) + (u_mem.stalls - s0) + 2) begin
      failures++;
      $display("FAIL transfer of %0d registers took %0d cycles", n, cyc);
    end
    repeat (3) @(posedge clk);
    #1;
  endtask

  initial begin
    for (int i = 0; i < 256; i++) regs[i] = '0;
    go = 0; store = 0; mem_addr = 0; reg_addr = 0; count = 0;
    for (int i = 0; i < 4096; i++) u_mem.mem[i] = $urandom;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      automatic logic [31:0] ma = 32'($urandom % 3000);
      automatic logic [7:0]  ra = 8'($urandom % 128);
      automatic logic [7:0]  n  = 8'(1 + $urandom % 32);
      run(1'b0, ma, ra, n);
      for (int k = 0; k < int'(n); k++)
        for (int l = 0; l < 4; l++) begin
          checks++;
          if (regs[8'(ra + k)][l*32 +: 32] !== u_mem.mem[ma + 4*k + l]) begin
            failures++;
            $display("FAIL load reg %0d lane %0d", ra + k, l);
          end
        end
    end
    for (int t = 0; t < 20; t++) begin
      automatic logic [31:0] ma = 32'($urandom % 3000);
      automatic logic [7:0]  ra = 8'($urandom % 128);
      automatic logic [7:0]  n  = 8'(1 + $urandom % 32);
      for (int k = 0; k < int'(n); k++) regs[8'(ra + k)] = {$urandom, $urandom, $urandom, $urandom};
      run(1'b1, ma, ra, n);
      for (int k = 0; k < int'(n); k++)
        for (int l = 0; l < 4; l++) begin
          checks++;
          if (u_mem.mem[ma + 4*k + l] !== regs[8'(ra + k)][l*32 +: 32]) begin
            failures++;
            $display("FAIL store reg %0d lane %0d", ra + k, l);
          end
        end
    end
    checks++;
    if (u_mem.stalls == 0) begin failures++; $display("FAIL no memory stall seen"); end
    $display("memory stalls=%0d writes=%0d", u_mem.stalls, u_mem.writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
