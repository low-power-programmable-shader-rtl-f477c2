// tb_sad8: checks the eight-pixel SAD unit against a reference sum computed
// in the testbench, for corner cases and random pixel words.
module tb_sad8;
  import vs_pkg::*;
  logic [PWORD_W-1:0] cur, cand;
  logic [10:0] sad;
  int checks = 0, failures = 0;

  sad8 dut (.cur, .cand, .sad);

  function automatic int ref_sad(logic [63:0] a, logic [63:0] b);
    int s = 0;
    for (int i = 0; i < 8; i++) begin
      int p = int'(a[i*8 +: 8]);
      int q = int'(b[i*8 +: 8]);
      s += (p > q) ? p - q : q - p;
    end
    return s;
  endfunction

  task automatic check(logic [63:0] a, logic [63:0] b);
    cur = a; cand = b;
    #1;
    checks++;
    if (int'(sad) != ref_sad(a, b)) begin
      failures++;
      $display("FAIL sad8 %h %h got %0d exp %0d", a, b, sad, ref_sad(a, b));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, '0);
    check('1, '0);                       // 8*255 = 2040
    check('0, '1);
    check(64'h0102030405060708, 64'h0807060504030201);
    check(64'h00ff00ff00ff00ff, 64'hff00ff00ff00ff00);
    for (int n = 0; n < 2000; n++) check({$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
