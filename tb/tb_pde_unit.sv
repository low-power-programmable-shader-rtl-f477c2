// tb_pde_unit: drives the partial distortion elimination unit with random
// SAD sequences and compares accumulator, exceed flag, minimum update and
// commit pulse with a cycle-by-cycle reference model.
module tb_pde_unit;
  import vs_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge, so asynchronous resets act at once
  logic en, sad_valid, min_load;
  logic [10:0] sad_in;
  logic [SAD_W-1:0] min_val, acc, min_sad;
  logic exceed, commit, pending;
  int checks = 0, failures = 0;
  int commits = 0, exceeds = 0;

  pde_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  int r_acc, r_min, r_en_q;
  logic r_commit;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    en = 0; sad_valid = 0; min_load = 0; sad_in = 0; min_val = 0;
    r_acc = 0; r_min = 65535; r_en_q = 0; r_commit = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // load an initial minimum
    min_load = 1; min_val = 16'd3000;
    @(posedge clk); r_min = 3000;
    #1 min_load = 0;
    for (int cand = 0; cand < 200; cand++) begin
      automatic int nsad = 1 + ($urandom % 32);
      en = 1;
      for (int k = 0; k < nsad; k++) begin
        sad_valid = ($urandom % 4) != 0;
        sad_in    = 11'($urandom % 200);
        #1;
        chk("exceed", int'(exceed), int'(r_en_q == 1 && r_acc > r_min) );
        @(posedge clk);
        // reference update
        if (r_en_q == 0) r_acc = sad_valid ? int'(sad_in) : 0;
        else if (sad_valid) r_acc = (r_acc + int'(sad_in) > 65535) ? 65535 : r_acc + int'(sad_in);
        r_en_q = 1;
        #1;
        chk("acc", int'(acc), r_acc);
        chk("pending", int'(pending), 0);
        if (exceed) exceeds++;
      end
      sad_valid = 0;
      en = 0;
      #1 chk("pending on disable", int'(pending), 1);
      @(posedge clk);
      r_commit = (r_acc < r_min);
      if (r_commit) r_min = r_acc;
      r_en_q = 0;
      #1;
      chk("commit", int'(commit), int'(r_commit));
      chk("pending settled", int'(pending), 0);
      chk("min", int'(min_sad), r_min);
      if (commit) commits++;
    end
    chk("commits_seen", int'(commits > 0), 1);
    chk("exceeds_seen", int'(exceeds > 0), 1);
    $display("commits=%0d exceed_cycles=%0d", commits, exceeds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
