// tb_me_search: motion estimation of one 16x16 macroblock over a [-16, 15]
// search range on the whole shader subsystem (vs_top at its default sizes),
// once by full search and once by diamond search.
//  - The reference window is a smooth synthetic picture of 47x47 pixels; the
//    current macroblock is a copy of it displaced by a known motion vector,
//    with a little noise added.
//  - The host model plays the part of the host software: for every candidate
//    position it gathers the 16x16 candidate block into a buffer in system
//    memory (four 8x8 blocks, one 64-bit pixel row per pixel word), starts a
//    DMA load of the 16 registers into the C memory and then starts the
//    SAD/PDE program. A new minimum SAD shows on the `min_sad` output, and the
//    host takes the candidate's motion vector from that.
//  - Full search visits all 1024 positions row by row. Diamond search uses
//    the large diamond (centre and 8 points at distance 2) until the centre
//    stays best, then the small diamond (4 points at distance 1) once. A
//    position is evaluated at most once.
//  - A software model runs the same searches with exact SADs and the same
//    PDE rule. Checked per candidate: the returned SAD (partial when the
//    candidate was dropped early) and the program's cycle count. Checked per
//    search: the minimum SAD and the motion vector. The full search must also
//    find the true displacement.
//  - The cycles per macroblock, DMA included, are printed for both searches.
//    A diamond search must fit the real-time budget of a CIF frame at 30
//    frames per second and 50 MHz: 50e6 / 30 / 396 = 4208 cycles per
//    macroblock.
module tb_me_search;
  import vs_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge, so asynchronous resets act at once
  logic cp_valid, cp_busy;
  cp_cmd_e cp_cmd;
  logic [7:0] cp_addr;
  logic [REG_W-1:0] cp_data, cp_rdata;
  logic mem_req, mem_we, mem_ready, mem_rvalid;
  logic [31:0] mem_a, mem_wdata, mem_rdata;
  logic [SAD_W-1:0] sad_acc, min_sad;
  logic ev_sad, ev_branch, ev_pde_commit, ev_erat_reject;
  logic [2:0] erat_why;
  logic sclk_fire, sclk_idle, pclk_fire, pclk_idle, sclk, pclk;
  logic [2:0] clk_on;
  int checks = 0, failures = 0;

  vs_top dut (.*);
  sys_mem #(.DEPTH(1024), .LAT(2), .STALL(1'b0)) u_mem (
    .clk, .req(mem_req), .we(mem_we), .a(mem_a), .wdata(mem_wdata),
    .ready(mem_ready), .rvalid(mem_rvalid), .rdata(mem_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint now = 0;
  always @(posedge clk) now++;

  localparam int RANGE = 16;             // search positions -16 .. 15
  localparam int WIN   = 2 * RANGE + 15; // 47 pixels
  localparam int TRUE_DX = 5, TRUE_DY = -3;
  localparam int CUR_A = 0, CAND_A = 64; // word addresses of the two buffers
  localparam int RT_BUDGET = 50_000_000 / 30 / 396;

  int refw [WIN][WIN];                   // reference window, [y][x]
  int cur  [16][16];                     // current macroblock
  int model_min;                         // minimum SAD in the software model

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

  task automatic cp(cp_cmd_e c, logic [7:0] a, logic [REG_W-1:0] d);
    cp_valid = 1; cp_cmd = c; cp_addr = a; cp_data = d;
    @(posedge clk); #1;
    cp_valid = 0; cp_cmd = CP_NOP;
  endtask

  task automatic wait_idle(output int cycles);
    cycles = 0;
    while (cp_busy) begin @(posedge clk); #1; cycles++; end
  endtask

  // Write a 16x16 block to memory in the macroblock order the program reads:
  // 8x8 block b (top-left, top-right, bottom-left, bottom-right), row r is
  // pixel word 8b + r, i.e. memory words base + 2(8b + r) and the next one.
  task automatic put_block(int base, int dx, int dy, logic is_cur);
    for (int b = 0; b < 4; b++)
      for (int r = 0; r < 8; r++)
        for (int i = 0; i < 8; i++) begin
          automatic int x = 8 * (b % 2) + i, y = 8 * (b / 2) + r;
          automatic int v = is_cur ? cur[y][x] : refw[RANGE + dy + y][RANGE + dx + x];
          u_mem.mem[base + 2 * (8 * b + r) + i / 4][(i % 4) * 8 +: 8] = 8'(v);
        end
  endtask

  // SAD of 8x8 block b of the candidate at (dx, dy)
  function automatic int blk_sad(int dx, int dy, int b);
    int s = 0;
    for (int r = 0; r < 8; r++)
      for (int i = 0; i < 8; i++) begin
        automatic int x = 8 * (b % 2) + i, y = 8 * (b / 2) + r;
        automatic int d = cur[y][x] - refw[RANGE + dy + y][RANGE + dx + x];
        s += (d < 0) ? -d : d;
      end
    return s;
  endfunction

  // Evaluate one candidate on the shader and in the model. Returns 1 when the
  // candidate became the new minimum.
  task automatic eval(int dx, int dy, output logic better);
    int blk [4], part, brk, full, cyc, old_min;
    put_block(CAND_A, dx, dy, 1'b0);
    cp(CP_DMA_LOAD, 8'h80, {80'h0, 8'd16, 8'h0, 32'(CAND_A)});
    wait_idle(cyc);
    for (int b = 0; b < 4; b++) blk[b] = blk_sad(dx, dy, b);
    part = 0; brk = 4;
    for (int b = 0; b < 4; b++) begin
      part += blk[b];
      if (part > model_min && brk == 4) brk = b;
    end
    full = part;
    if (brk < 4) begin part = 0; for (int b = 0; b <= brk; b++) part += blk[b]; end
    old_min = int'(min_sad);
    cp(CP_START, 8'd2, '0);
    wait_idle(cyc);
    chk("candidate sad", sad_acc, part);
    chk("candidate cycles", cyc, ((brk < 4) ? 5 + 12 * brk + 9 + 1 : 54) + 1);
    better = (brk == 4) && (full < model_min);
    if (better) model_min = full;
    repeat (2) @(posedge clk);
    #1;
    chk("minimum", min_sad, model_min);
    chk("host sees the improvement", (int'(min_sad) < old_min), better);
  endtask

  // Model of the search with exact SADs (strictly smaller wins, first found
  // kept), used to check the motion vectors the host gets from the shader.
  function automatic int full_sad(int dx, int dy);
    return blk_sad(dx, dy, 0) + blk_sad(dx, dy, 1) + blk_sad(dx, dy, 2) + blk_sad(dx, dy, 3);
  endfunction

  function automatic logic in_range(int dx, int dy);
    return dx >= -RANGE && dx < RANGE && dy >= -RANGE && dy < RANGE;
  endfunction

  task automatic new_mb();
    int cyc;
    cp(CP_START, 8'd0, '0);              // SET MINSAD 0xFFFF; return
    wait_idle(cyc);
    model_min = 65535;
    chk("minimum reset", min_sad, 65535);
  endtask

  // the two diamond patterns: large (8 points) then small (4 points)
  int ldsp_x [8] = '{0, 1, 2, 1, 0, -1, -2, -1};
  int ldsp_y [8] = '{-2, -1, 0, 1, 2, 1, 0, -1};
  int sdsp_x [4] = '{0, 1, 0, -1};
  int sdsp_y [4] = '{-1, 0, 1, 0};

  initial begin
    int p, exit_pc, cyc, best_x, best_y, ref_x, ref_y, ref_min, n_fs, n_ds;
    longint t0, fs_cycles, ds_cycles;
    logic better;
    cp_valid = 0; cp_cmd = CP_NOP; cp_addr = 0; cp_data = 0;
    sclk_fire = 0; sclk_idle = 1; pclk_fire = 0; pclk_idle = 1;

    // ---------------- picture ----------------
    for (int y = 0; y < WIN; y++)
      for (int x = 0; x < WIN; x++) begin
        automatic real v = 128.0 + 70.0 * $sin(real'(x) / 4.0 + 0.3) * $cos(real'(y) / 5.0)
                         + 25.0 * $sin(real'(x + 2 * y) / 3.0);
        refw[y][x] = int'(v);
      end
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++) begin
        automatic int v = refw[RANGE + TRUE_DY + y][RANGE + TRUE_DX + x] + int'($urandom % 7) - 3;
        cur[y][x] = (v < 0) ? 0 : (v > 255) ? 255 : v;
      end
    put_block(CUR_A, 0, 0, 1'b1);

    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (3) @(posedge clk);
    #1;

    // ---------------- program ----------------
    p = 0;
    cp(CP_IMEM_WR, 8'(p++), 128'(I(OP_SET, 4'h0, SP_MINSAD, 8'hff, 8'hff)));
    cp(CP_IMEM_WR, 8'(p++), 128'(I(OP_FSET, 4'h0, 8'h0, 8'h0, 8'h01)));
    cp(CP_IMEM_WR, 8'(p++), 128'(I(OP_FSET, 4'h0, 8'h0, 8'h0, 8'h04)));
    cp(CP_IMEM_WR, 8'(p++), 128'(I(OP_SET, 4'h0, 8'd3, 8'h00, 8'h04)));
    cp(CP_IMEM_WR, 8'(p++), 128'(I(OP_SET, 4'h0, SP_VOFFSET, 8'h00, 8'h00)));
    cp(CP_IMEM_WR, 8'(p++), 128'(I(OP_SET, 4'h0, SP_CBASE, 8'h00, 8'h00)));
    cp(CP_IMEM_WR, 8'(p++), 128'(I(OP_LOOP, 4'h0, 8'd3, 8'h00, 8'h00)));
    for (int i = 0; i < 8; i++) cp(CP_IMEM_WR, 8'(p++), 128'(I(OP_SAD, 4'h0, 8'h0, 8'(i), 8'(8'h80 + i))));
    exit_pc = p + 4;
    cp(CP_IMEM_WR, 8'(p++), 128'(I(OP_BONE, 4'h0, 8'h0, 8'(S_PDE), 8'(exit_pc))));
    cp(CP_IMEM_WR, 8'(p++), 128'(I(OP_INC, 4'h0, SP_VOFFSET, 8'h00, 8'h08)));
    cp(CP_IMEM_WR, 8'(p++), 128'(I(OP_INC, 4'h0, SP_CBASE, 8'h00, 8'h01)));
    cp(CP_IMEM_WR, 8'(p++), 128'(I(OP_LOOPEND, 4'h0, 8'd3, 8'h00, 8'h00)));
    cp(CP_IMEM_WR, 8'(p++), 128'(I(OP_FSET, 4'h0, 8'h0, 8'h0, 8'h01)));

    // ---------------- full search ----------------
    t0 = now;
    cp(CP_DMA_LOAD, 8'h00, {80'h0, 8'd16, 8'h0, 32'(CUR_A)});
    wait_idle(cyc);
    new_mb();
    best_x = 0; best_y = 0; n_fs = 0;
    for (int dy = -RANGE; dy < RANGE; dy++)
      for (int dx = -RANGE; dx < RANGE; dx++) begin
        eval(dx, dy, better);
        n_fs++;
        if (better) begin best_x = dx; best_y = dy; end
      end
    fs_cycles = now - t0;
    ref_min = 65535; ref_x = 0; ref_y = 0;
    for (int dy = -RANGE; dy < RANGE; dy++)
      for (int dx = -RANGE; dx < RANGE; dx++) begin
        automatic int s = full_sad(dx, dy);
        if (s < ref_min) begin ref_min = s; ref_x = dx; ref_y = dy; end
      end
    chk("full search minimum SAD", min_sad, ref_min);
    chk("full search mv x", best_x, ref_x);
    chk("full search mv y", best_y, ref_y);
    chk("full search finds the true motion x", best_x, TRUE_DX);
    chk("full search finds the true motion y", best_y, TRUE_DY);
    chk("full search candidates", n_fs, 4 * RANGE * RANGE);

    // ---------------- diamond search ----------------
    begin
      logic seen [2*RANGE][2*RANGE];
      int cx, cy, m_cx, m_cy, m_min, steps;
      logic moved;
      for (int i = 0; i < 2 * RANGE; i++) for (int j = 0; j < 2 * RANGE; j++) seen[i][j] = 0;
      t0 = now;
      cp(CP_DMA_LOAD, 8'h00, {80'h0, 8'd16, 8'h0, 32'(CUR_A)});
      wait_idle(cyc);
      new_mb();
      eval(0, 0, better);
      seen[RANGE][RANGE] = 1;
      n_ds = 1; cx = 0; cy = 0; steps = 0;
      // model: same walk with exact SADs
      m_cx = 0; m_cy = 0; m_min = full_sad(0, 0);
      moved = 1;
      while (moved) begin
        automatic int nx = cx, ny = cy;
        automatic int mnx = m_cx, mny = m_cy;
        moved = 0;
        for (int k = 0; k < 8; k++) begin
          automatic int x = cx + ldsp_x[k], y = cy + ldsp_y[k];
          if (in_range(x, y) && !seen[y + RANGE][x + RANGE]) begin
            automatic int s = full_sad(x, y);
            seen[y + RANGE][x + RANGE] = 1;
            eval(x, y, better);
            n_ds++;
            if (better) begin nx = x; ny = y; end
            if (s < m_min) begin m_min = s; mnx = x; mny = y; end
          end
        end
        chk("diamond step", (nx == mnx) && (ny == mny), 1);
        if (nx != cx || ny != cy) begin moved = 1; steps++; end
        cx = nx; cy = ny; m_cx = mnx; m_cy = mny;
      end
      best_x = cx; best_y = cy;
      for (int k = 0; k < 4; k++) begin
        automatic int x = cx + sdsp_x[k], y = cy + sdsp_y[k];
        if (in_range(x, y) && !seen[y + RANGE][x + RANGE]) begin
          automatic int s = full_sad(x, y);
          seen[y + RANGE][x + RANGE] = 1;
          eval(x, y, better);
          n_ds++;
          if (better) begin best_x = x; best_y = y; end
          if (s < m_min) begin m_min = s; m_cx = x; m_cy = y; end
        end
      end
      ds_cycles = now - t0;
      chk("diamond search minimum SAD", min_sad, m_min);
      chk("diamond search mv x", best_x, m_cx);
      chk("diamond search mv y", best_y, m_cy);
      chk("diamond search moved", steps > 0, 1);
      $display("diamond search: %0d large-diamond steps, mv (%0d,%0d), true (%0d,%0d)",
               steps, best_x, best_y, TRUE_DX, TRUE_DY);
    end

    $display("full search:    %0d candidates, %0d cycles per macroblock, min SAD %0d",
             n_fs, fs_cycles, ref_min);
    $display("diamond search: %0d candidates, %0d cycles per macroblock (budget %0d)",
             n_ds, ds_cycles, RT_BUDGET);
    chk("diamond search within the 30 frames/s CIF budget", ds_cycles <= RT_BUDGET, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
