// tb_vs_core: runs two programs on the shader core and checks results and
// cycle counts against models computed in the testbench.
//  1. Block matching with partial distortion elimination: a 16x16 current
//     macroblock in V is matched against many random candidate blocks loaded
//     into C. Each run must return the right SAD, update the minimum only on
//     improvement, leave the loop at the first 8x8 block whose partial SAD
//     exceeds the minimum, and take exactly 5 + 12 per 8x8 block + 1 cycles
//     (8 SADs, branch, two pointer increments and loop end per block),
//     plus the cycle in which the PDE unit settles.
//  2. Geometry: three vertices are transformed by a 4x4 matrix with DP4
//     (four instructions, i.e. four cycles per vertex), tested by ERAT, and a
//     lighting step runs only if the triangle was not rejected.
//  3. Floating point: a 4x4 transform with FDP4, then FMUL, FMAD and FADD, on
//     small integers (exact in binary32).
module tb_vs_core;
  import vs_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge, so asynchronous resets act at once
  logic start, busy, imem_we, lw_we;
  logic [PC_W-1:0] start_pc, imem_addr;
  logic [INSTR_W-1:0] imem_wdata;
  logic [7:0] lw_addr, lr_addr;
  logic [REG_W-1:0] lw_data, lr_data;
  logic [SAD_W-1:0] sad_acc, min_sad;
  logic ev_sad, ev_branch, ev_pde_commit, ev_erat_reject;
  logic [2:0] erat_why;
  int checks = 0, failures = 0;
  int n_break = 0, n_commit = 0, n_full = 0, n_reject = 0, n_accept = 0;

  vs_core dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [INSTR_W-1:0] I(opcode_e op, logic [3:0] m, logic [7:0] d,
                                           logic [7:0] a, logic [7:0] b);
    instr_t t;
    t.op = op; t.mask = m; t.dst = d; t.srca = a; t.srcb = b;
    return INSTR_W'(t);
  endfunction

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic put_imem(int a, logic [INSTR_W-1:0] w);
    imem_we = 1; imem_addr = PC_W'(a); imem_wdata = w;
    @(posedge clk); #1 imem_we = 0;
  endtask

  task automatic put_reg(logic [7:0] a, logic [REG_W-1:0] v);
    lw_we = 1; lw_addr = a; lw_data = v;
    @(posedge clk); #1 lw_we = 0;
  endtask

  task automatic run(int pc0, output int cycles);
    start = 1; start_pc = PC_W'(pc0);
    @(posedge clk); #1 start = 0;
    cycles = 0;
    while (busy) begin @(posedge clk); #1; cycles++; end
  endtask

  // 16x16 blocks as four 8x8 blocks, pixel word = block*8 + row
  logic [7:0] cur  [16][16];
  logic [7:0] cand [16][16];

  function automatic logic [63:0] row_word(logic [7:0] p [16][16], int w);
    int blk = w / 8, r = w % 8;
    int y = (blk / 2) * 8 + r, x0 = (blk % 2) * 8;
    logic [63:0] v;
    for (int i = 0; i < 8; i++) v[i*8 +: 8] = p[y][x0 + i];
    return v;
  endfunction

  function automatic int blk_sad(int blk);
    int s = 0;
    for (int r = 0; r < 8; r++)
      for (int i = 0; i < 8; i++) begin
        int y = (blk / 2) * 8 + r, x = (blk % 2) * 8 + i;
        int d = int'(cur[y][x]) - int'(cand[y][x]);
        s += (d < 0) ? -d : d;
      end
    return s;
  endfunction

  function automatic logic [127:0] vtx(int x, int y, int z, int w);
    return {32'(w), 32'(z), 32'(y), 32'(x)};
  endfunction

  function automatic int qmul(int x, int y);
    longint p = longint'(x) * longint'(y);
    return int'(p >>> 16);
  endfunction

  // exact conversions between small integers and binary32
  function automatic logic [31:0] i2f(int x);
    logic [63:0] b;
    if (x == 0) return 32'd0;
    b = $realtobits(real'(x));
    return {b[63], 8'(int'(b[62:52]) - 1023 + 127), b[51:29]};
  endfunction

  initial begin
    int cyc, p, r_min, exit_pc;
    start = 0; start_pc = 0; imem_we = 0; imem_addr = 0; imem_wdata = 0;
    lw_we = 0; lw_addr = 0; lw_data = 0; lr_addr = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // ---------------- program 1: block matching with PDE ----------------
    p = 0;
    put_imem(p++, I(OP_SET, 4'h0, SP_MINSAD, 8'hff, 8'hff));   // 0: minimum = max (entry for a new macroblock)
    put_imem(p++, I(OP_FSET, 4'h0, 8'h0, 8'h0, 8'h01));        // 1: return
    // 2: one candidate
    put_imem(p++, I(OP_FSET, 4'h0, 8'h0, 8'h0, 8'h04));        // PDE on
    put_imem(p++, I(OP_SET, 4'h0, 8'd3, 8'h00, 8'h04));        // LPCNT3 = 4
    put_imem(p++, I(OP_SET, 4'h0, SP_VOFFSET, 8'h00, 8'h00));
    put_imem(p++, I(OP_SET, 4'h0, SP_CBASE, 8'h00, 8'h00));
    put_imem(p++, I(OP_LOOP, 4'h0, 8'd3, 8'h00, 8'h00));
    for (int i = 0; i < 8; i++) put_imem(p++, I(OP_SAD, 4'h0, 8'h0, 8'(i), 8'(8'h80 + i)));
    exit_pc = p + 4;
    put_imem(p++, I(OP_BONE, 4'h0, 8'h0, 8'(S_PDE), 8'(exit_pc)));
    put_imem(p++, I(OP_INC, 4'h0, SP_VOFFSET, 8'h00, 8'h08));
    put_imem(p++, I(OP_INC, 4'h0, SP_CBASE, 8'h00, 8'h01));
    put_imem(p++, I(OP_LOOPEND, 4'h0, 8'd3, 8'h00, 8'h00));
    put_imem(p++, I(OP_FSET, 4'h0, 8'h0, 8'h0, 8'h01));        // exit: PDE off, return

    for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) cur[y][x] = 8'($urandom);
    for (int k = 0; k < 16; k++) put_reg(8'(k), {row_word(cur, 2*k+1), row_word(cur, 2*k)});
    run(0, cyc);
    chk("min init", min_sad, 65535);
    r_min = 65535;
    for (int c = 0; c < 120; c++) begin
      int part, brk, full, exp_cyc;
      automatic int noise = (c < 4) ? 255 : int'($urandom % 100);
      for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) begin
        automatic int v = int'(cur[y][x]) + int'($urandom % (2 * noise + 1)) - noise;
        cand[y][x] = (v < 0) ? 8'd0 : (v > 255) ? 8'd255 : 8'(v);
      end
      for (int k = 0; k < 16; k++) put_reg(8'(8'h80 + k), {row_word(cand, 2*k+1), row_word(cand, 2*k)});
      part = 0; brk = 4;
      for (int b = 0; b < 4; b++) begin
        part += blk_sad(b);
        if (part > r_min && brk == 4) brk = b + 1;
      end
      full = part;
      if (brk < 4) begin
        part = 0;
        for (int b = 0; b < brk; b++) part += blk_sad(b);
      end
      run(2, cyc);
      exp_cyc = (brk < 4) ? 5 + 12 * (brk - 1) + 9 + 1 : 5 + 48 + 1;
      if (brk == 4 && full > r_min) exp_cyc = 5 + 12 * 3 + 9 + 1;   // break on the last block
      chk("cycles", cyc, exp_cyc + 1);                             // + PDE settling cycle
      chk("sad", sad_acc, part);
      if (full < r_min && brk == 4) begin r_min = full; n_commit++; end
      chk("min", min_sad, r_min);
      if (brk < 4) n_break++; else n_full++;
    end
    $display("candidates: breaks=%0d full=%0d improvements=%0d", n_break, n_full, n_commit);
    chk("pde breaks seen", n_break > 0, 1);
    chk("improvements seen", n_commit > 1, 1);

    // ---------------- program 2: transform, ERAT, lighting ----------------
    p = 64;
    for (int v = 0; v < 3; v++)
      for (int l = 0; l < 4; l++)
        put_imem(p++, I(OP_DP4, 4'(1 << l), 8'(8'h20 + v), 8'(8'h80 + 16 + l), 8'(v)));
    put_imem(p++, I(OP_SET, 4'h0, SP_CULL, 8'h00, 8'(CULL_CW)));
    put_imem(p++, I(OP_ERAT, 4'h0, 8'h0, 8'h20, 8'h00));
    exit_pc = p + 3;
    put_imem(p++, I(OP_BONE, 4'h0, 8'h0, 8'(S_ERAT), 8'(exit_pc)));
    put_imem(p++, I(OP_DP4, 4'hf, 8'h10, 8'h03, 8'(8'h80 + 20)));   // lighting: n.l
    put_imem(p++, I(OP_MAD, 4'hf, 8'h23, 8'h10, 8'(8'h80 + 21)));   // O3 = (n.l) * colour + O3
    put_imem(p++, I(OP_FSET, 4'h0, 8'h0, 8'h0, 8'h01));

    for (int t = 0; t < 40; t++) begin
      int m [4][4];
      logic [127:0] vin [3], o3_before, o3_exp, rr;
      int ox [3][4];
      logic exp_rej;
      longint det;
      int vx [3], vy [3];
      // matrix: random small rotation/scale in Q16.16, w row = (0,0,0,1)
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++)
        m[i][j] = (i == 3) ? ((j == 3) ? 65536 : 0) : int'($urandom % 131072) - 65536;
      for (int i = 0; i < 4; i++) put_reg(8'(8'h80 + 16 + i), {32'(m[i][3]), 32'(m[i][2]), 32'(m[i][1]), 32'(m[i][0])});
      for (int v = 0; v < 3; v++) begin
        vin[v] = vtx(int'($urandom % 131072) - 65536, int'($urandom % 131072) - 65536,
                     int'($urandom % 131072) - 65536, 65536);
        if (t % 10 == 9 && v == 2) vin[2] = vin[1];                    // degenerate now and then
        put_reg(8'(v), vin[v]);
      end
      put_reg(8'h03, vtx(0, 0, 65536, 0));                            // normal
      put_reg(8'(8'h80 + 20), vtx(0, 0, 32768, 0));                   // light: n.l = 0.5
      put_reg(8'(8'h80 + 21), vtx(65536, 32768, 16384, 0));           // colour
      lr_addr = 8'h23; #1 o3_before = lr_data;
      for (int v = 0; v < 3; v++)
        for (int l = 0; l < 4; l++) begin
          automatic int s = 0;
          for (int j = 0; j < 4; j++) s += qmul(m[l][j], int'(vin[v][j*32 +: 32]));
          ox[v][l] = s;
        end
      // all outputs lie inside |x|,|y|,|z| <= 2 with w = 1: outside is possible
      begin
        logic [5:0] oc [3];
        for (int v = 0; v < 3; v++) begin
          oc[v][0] = ox[v][0] > ox[v][3]; oc[v][1] = ox[v][0] < -ox[v][3];
          oc[v][2] = ox[v][1] > ox[v][3]; oc[v][3] = ox[v][1] < -ox[v][3];
          oc[v][4] = ox[v][2] > ox[v][3]; oc[v][5] = ox[v][2] < -ox[v][3];
        end
        // w = 1 exactly, so the determinant is the 2-D cross product
        det = longint'(ox[1][0] - ox[0][0]) * longint'(ox[2][1] - ox[0][1])
            - longint'(ox[2][0] - ox[0][0]) * longint'(ox[1][1] - ox[0][1]);
        exp_rej = ((oc[0] & oc[1] & oc[2]) != 0) || (det == 0) || (det < 0);
      end
      run(64, cyc);
      for (int v = 0; v < 3; v++) begin
        lr_addr = 8'(8'h20 + v); #1;
        for (int l = 0; l < 4; l++) chk("transform", int'($signed(lr_data[l*32 +: 32])), ox[v][l]);
      end
      chk("erat", int'(dut.s_erat), int'(exp_rej));
      lr_addr = 8'h23; #1;
      o3_exp = o3_before;
      if (!exp_rej)
        for (int l = 0; l < 4; l++)
          o3_exp[l*32 +: 32] = 32'(qmul(32768, int'(vtx(65536, 32768, 16384, 0) >> (l*32))) + int'(o3_before[l*32 +: 32]));
      chk("lighting", (lr_data == o3_exp), 1);
      chk("geometry cycles", cyc, exp_rej ? 12 + 3 + 1 : 12 + 3 + 2 + 1);
      if (exp_rej) n_reject++; else n_accept++;
    end
    // ---------------- program 3: floating-point transform ----------------
    // small integers are exact in binary32, so the reference is exact
    p = 128;
    for (int l = 0; l < 4; l++) put_imem(p++, I(OP_FDP4, 4'(1 << l), 8'h24, 8'(8'h80 + 24 + l), 8'h04));
    put_imem(p++, I(OP_FMUL, 4'hf, 8'h25, 8'h04, 8'h98));     // O5 = V4 * C24
    put_imem(p++, I(OP_FMAD, 4'hf, 8'h25, 8'h04, 8'h99));     // O5 = V4 * C25 + O5
    put_imem(p++, I(OP_FADD, 4'hf, 8'h25, 8'h25, 8'h04));     // O5 = O5 + V4
    put_imem(p++, I(OP_FSET, 4'h0, 8'h0, 8'h0, 8'h01));
    for (int t = 0; t < 20; t++) begin
      int m [4][4], v [4], o5 [4];
      for (int i = 0; i < 4; i++) begin
        v[i] = int'($urandom % 33) - 16;
        for (int j = 0; j < 4; j++) m[i][j] = int'($urandom % 17) - 8;
        put_reg(8'(8'h80 + 24 + i), {i2f(m[i][3]), i2f(m[i][2]), i2f(m[i][1]), i2f(m[i][0])});
      end
      put_reg(8'h04, {i2f(v[3]), i2f(v[2]), i2f(v[1]), i2f(v[0])});
      run(128, cyc);
      lr_addr = 8'h24; #1;
      for (int l = 0; l < 4; l++) begin
        automatic int s = 0;
        for (int j = 0; j < 4; j++) s += m[l][j] * v[j];
        chk("float transform", int'(lr_data[l*32 +: 32]), int'(i2f(s)));
      end
      lr_addr = 8'h25; #1;
      for (int l = 0; l < 4; l++) begin
        o5[l] = v[l] * m[0][l] + v[l] * m[1][l] + v[l];
        chk("float mul/mad/add", int'(lr_data[l*32 +: 32]), int'(i2f(o5[l])));
      end
      chk("float cycles", cyc, 8);
    end
    $display("triangles: rejected=%0d accepted=%0d", n_reject, n_accept);
    chk("rejects seen", n_reject > 0, 1);
    chk("accepts seen", n_accept > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
