// tb_vec_alu: checks every vector operation against references computed in
// the testbench: fixed-point operations on random Q16.16 operands with 64-bit
// integer arithmetic, floating-point operations on random binary32 operands
// (including near-cancellations and exact zeros) with double-precision
// arithmetic rounded to binary32, nearest-even, by the testbench.
module tb_vec_alu;
  import vs_pkg::*;
  opcode_e op;
  logic [REG_W-1:0] a, b, d, r;
  int checks = 0, failures = 0;

  vec_alu dut (.op, .a, .b, .d, .r);

  function automatic int qmul(int x, int y);
    longint p = longint'(x) * longint'(y);
    return int'(p >>> 16);
  endfunction

  function automatic real f2r(logic [31:0] f);
    if (f[30:23] == 8'd0) return f[31] ? -0.0 : 0.0;
    return $bitstoreal({f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0});
  endfunction

  function automatic logic [31:0] r2f(real r);
    logic [63:0] b = $realtobits(r);
    int e;
    logic [24:0] m;
    logic g, st;
    if (b[62:0] == 63'd0) return {b[63], 31'd0};
    e  = int'(b[62:52]) - 1023 + 127;
    m  = {2'b01, b[51:29]};
    g  = b[28];
    st = |b[27:0];
    if (g && (st || m[0])) m = m + 25'd1;
    if (m[24]) begin m = m >> 1; e++; end
    if (e <= 0) return {b[63], 31'd0};
    if (e >= 255) return {b[63], 8'hff, 23'd0};
    return {b[63], 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] fmul(logic [31:0] x, logic [31:0] y);
    return r2f(f2r(x) * f2r(y));
  endfunction
  function automatic logic [31:0] fadd(logic [31:0] x, logic [31:0] y);
    return r2f(f2r(x) + f2r(y));
  endfunction

  function automatic logic [127:0] fmodel(opcode_e o, logic [127:0] ra, logic [127:0] rb, logic [127:0] rd);
    logic [127:0] v;
    logic [31:0] p [4], dot;
    for (int i = 0; i < 4; i++) p[i] = fmul(ra[i*32 +: 32], rb[i*32 +: 32]);
    dot = fadd(fadd(p[0], p[1]), fadd(p[2], p[3]));
    for (int i = 0; i < 4; i++)
      case (o)
        OP_FMUL: v[i*32 +: 32] = p[i];
        OP_FADD: v[i*32 +: 32] = fadd(ra[i*32 +: 32], rb[i*32 +: 32]);
        OP_FMAD: v[i*32 +: 32] = fadd(p[i], rd[i*32 +: 32]);
        default: v[i*32 +: 32] = dot;
      endcase
    return v;
  endfunction

  // the sign of a zero result is not checked
  function automatic logic [127:0] canon(logic [127:0] v);
    for (int i = 0; i < 4; i++) if (v[i*32 +: 31] == 31'd0) v[i*32 + 31] = 1'b0;
    return v;
  endfunction

  function automatic logic [31:0] rand_f();
    return {1'($urandom), 8'(110 + $urandom % 35), 23'($urandom)};
  endfunction

  function automatic logic [127:0] model(opcode_e o, logic [127:0] ra, logic [127:0] rb, logic [127:0] rd);
    logic [127:0] v;
    int dot = 0;
    for (int i = 0; i < 4; i++) dot += qmul(int'(ra[i*32 +: 32]), int'(rb[i*32 +: 32]));
    for (int i = 0; i < 4; i++) begin
      int x = int'(ra[i*32 +: 32]), y = int'(rb[i*32 +: 32]), z = int'(rd[i*32 +: 32]);
      case (o)
        OP_MOV: v[i*32 +: 32] = x;
        OP_ADD: v[i*32 +: 32] = x + y;
        OP_MUL: v[i*32 +: 32] = qmul(x, y);
        OP_MAD: v[i*32 +: 32] = qmul(x, y) + z;
        OP_DP4: v[i*32 +: 32] = dot;
        default: v[i*32 +: 32] = 0;
      endcase
    end
    return v;
  endfunction

  function automatic logic [31:0] small_q();
    // values in about +-64.0 so products stay in range
    return 32'($signed($urandom % 32'h0080_0000) - 32'sh0040_0000);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    opcode_e ops [5] = '{OP_MOV, OP_ADD, OP_MUL, OP_MAD, OP_DP4};
    for (int n = 0; n < 500; n++) begin
      for (int k = 0; k < 5; k++) begin
        a = {small_q(), small_q(), small_q(), small_q()};
        b = {small_q(), small_q(), small_q(), small_q()};
        d = {small_q(), small_q(), small_q(), small_q()};
        op = ops[k];
        #1;
        checks++;
        if (r !== model(op, a, b, d)) begin
          failures++;
          $display("FAIL %s a=%h b=%h d=%h r=%h", op.name(), a, b, d, r);
        end
      end
    end
    // floating point
    for (int n = 0; n < 3000; n++) begin
      opcode_e fops [4] = '{OP_FMUL, OP_FADD, OP_FMAD, OP_FDP4};
      a = {rand_f(), rand_f(), rand_f(), rand_f()};
      b = {rand_f(), rand_f(), rand_f(), rand_f()};
      d = {rand_f(), rand_f(), rand_f(), rand_f()};
      case (n % 5)
        1: b = a ^ {4{32'h8000_0000}} ^ {4{24'h0, 8'($urandom % 4)}};  // near cancellation
        2: b = a ^ {4{32'h8000_0000}};                                   // exact zero
        3: begin a[31:0] = 0; b[63:32] = 0; end                          // zero operands
        default: ;
      endcase
      op = fops[n % 4];
      #1;
      checks++;
      if (canon(r) !== canon(fmodel(op, a, b, d))) begin
        failures++;
        $display("FAIL %s a=%h b=%h d=%h r=%h exp=%h", op.name(), a, b, d, r, fmodel(op, a, b, d));
      end
    end
    // known float values: 1.5 * 2.0 = 3.0, 1 + 2 = 3, (1,2,3,4).(1,1,1,1) = 10
    op = OP_FMUL; a = {4{32'h3fc0_0000}}; b = {4{32'h4000_0000}}; #1;
    checks++; if (r !== {4{32'h4040_0000}}) begin failures++; $display("FAIL fmul const"); end
    op = OP_FADD; a = {4{32'h3f80_0000}}; b = {4{32'h4000_0000}}; #1;
    checks++; if (r !== {4{32'h4040_0000}}) begin failures++; $display("FAIL fadd const"); end
    op = OP_FDP4; a = {32'h4080_0000, 32'h4040_0000, 32'h4000_0000, 32'h3f80_0000};
    b = {4{32'h3f80_0000}}; #1;
    checks++; if (r !== {4{32'h4120_0000}}) begin failures++; $display("FAIL fdp4 const"); end
    // known values: 1.5 * 2.0 = 3.0, (1,2,3,4).(1,1,1,1) = 10
    op = OP_MUL; a = {4{32'h0001_8000}}; b = {4{32'h0002_0000}}; #1;
    checks++; if (r !== {4{32'h0003_0000}}) begin failures++; $display("FAIL mul const"); end
    op = OP_DP4; a = {32'h0004_0000, 32'h0003_0000, 32'h0002_0000, 32'h0001_0000};
    b = {4{32'h0001_0000}}; #1;
    checks++; if (r !== {4{32'h000a_0000}}) begin failures++; $display("FAIL dp4 const"); end
    op = OP_MAD; a = {4{32'hffff_0000}}; b = {4{32'h0002_0000}}; d = {4{32'h0005_0000}}; #1;
    checks++; if (r !== {4{32'h0003_0000}}) begin failures++; $display("FAIL mad const"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
