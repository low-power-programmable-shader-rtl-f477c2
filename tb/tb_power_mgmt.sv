// tb_power_mgmt: drives random Fire/Idle requests on the three clock-gate
// channels and checks, for every rising clock edge, that each gated clock
// pulses exactly when the reference set/clear rule says the module is on,
// and never glitches while the main clock is low.
module tb_power_mgmt;
  localparam int N = 3;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge, so asynchronous resets act at once
  logic [N-1:0] fire, idle, gclk, clk_on;
  int checks = 0, failures = 0;
  int on_cycles = 0, off_cycles = 0;

  power_mgmt dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // glitch check: gated clocks may only be high while clk is high
  always @(gclk) if (rst_n && ((gclk & ~{N{clk}}) != 0)) begin
    failures++;
    $display("FAIL gated clock high while clk low at %0t", $time);
  end

  logic [N-1:0] r_on, exp_en;
  initial begin
    fire = '0; idle = '1; r_on = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (gclk != 0 || clk_on != 0) begin failures++; $display("FAIL clocks run in reset"); end
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      // drive after the rising edge
      for (int i = 0; i < N; i++) begin
        fire[i] = ($urandom % 10) == 0;
        idle[i] = ($urandom % 3) == 0;
      end
      exp_en = fire | (r_on & ~idle);
      @(posedge clk);
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (gclk[i] !== exp_en[i]) begin
          failures++;
          $display("FAIL ch%0d cycle %0d gclk=%b exp=%b", i, cyc, gclk[i], exp_en[i]);
        end
        if (exp_en[i]) on_cycles++; else off_cycles++;
      end
      r_on = exp_en;
    end
    checks++;
    if (on_cycles == 0 || off_cycles == 0) failures++;
    $display("on=%0d off=%0d", on_cycles, off_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
