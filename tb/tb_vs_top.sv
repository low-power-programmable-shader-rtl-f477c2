// tb_vs_top: end-to-end test of the vertex shader subsystem at its default
// sizes. A host model drives the coprocessor interface and a behavioural
// memory model with random stalls stands in for system memory.
//  - programs are loaded into the instruction memory through the
//    coprocessor interface;
//  - motion estimation: the current macroblock and a series of candidate
//    blocks are fetched by DMA, and the SAD/PDE program returns the SAD of
//    each candidate and keeps the minimum (checked against a model);
//  - geometry: a matrix and a series of triangles are fetched by DMA,
//    transformed, tested by ERAT (outside, zero-area and back-facing cases
//    all occur), lit only when kept, and the outputs are stored back to
//    memory by DMA and checked word by word; then, with a viewport set, a
//    thin triangle of non-zero area that covers no pixel centre is rejected
//    by the grid-point test;
//  - floating point: a dot product in the binary32 mode;
//  - power management: the shader clock must run only while there is work
//    and stop when the subsystem is idle, and inside the core the PDE unit
//    and register files must be clocked only in some of its cycles; the triangle-setup and raster
//    clock channels are exercised through their Fire/Idle ports.
// Every mechanism is counted, and one that never happened is a failure.
module tb_vs_top;
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
  sys_mem #(.DEPTH(16384), .LAT(2), .STALL(1'b1)) u_mem (
    .clk, .req(mem_req), .we(mem_we), .a(mem_a), .wdata(mem_wdata),
    .ready(mem_ready), .rvalid(mem_rvalid), .rdata(mem_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int c_sad = 0, c_break = 0, c_commit = 0, c_rej_out = 0, c_rej_zero = 0, c_rej_back = 0;
  int c_gated = 0, c_running = 0, c_dma_load = 0, c_dma_store = 0, c_sclk = 0, c_pclk = 0;
  int c_light = 0, c_float = 0;
  always @(posedge clk) if (rst_n) begin
    if (clk_on[0]) c_running++; else c_gated++;
  end
  always @(posedge dut.gclk) if (rst_n) begin
    if (ev_sad) c_sad++;
    if (ev_erat_reject && erat_why[0]) c_rej_out++;
    if (ev_erat_reject && erat_why[1]) c_rej_zero++;
    if (ev_erat_reject && erat_why[2]) c_rej_back++;
  end
  int c_gclk = 0, c_pde_clk = 0, c_rw_clk = 0;
  always @(posedge dut.gclk) if (rst_n) c_gclk++;
  always @(posedge dut.u_core.pde_clk) if (rst_n) c_pde_clk++;
  always @(posedge dut.u_core.rw_clk) if (rst_n) c_rw_clk++;
  always @(posedge sclk) if (rst_n) c_sclk++;
  always @(posedge pclk) if (rst_n) c_pclk++;

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

  task automatic dma(logic st, int maddr, logic [7:0] raddr, int n);
    int cyc;
    cp(st ? CP_DMA_STORE : CP_DMA_LOAD, raddr, {80'h0, 8'(n), 8'h0, 32'(maddr)});
    wait_idle(cyc);
    if (st) c_dma_store++; else c_dma_load++;
  endtask

  task automatic run(int pc0, output int cycles);
    cp(CP_START, 8'(pc0), '0);
    wait_idle(cycles);
  endtask

  // memory layout (32-bit word addresses)
  localparam int CUR_A  = 0;       // 16 registers
  localparam int CAND_A = 64;      // NCAND x 16 registers
  localparam int NCAND  = 40;
  localparam int MAT_A  = 4096;    // matrix rows, normal, light, colour
  localparam int TRI_A  = 4200;    // NTRI x 3 vertices
  localparam int NTRI   = 24;
  localparam int OUT_A  = 8192;    // NTRI x 4 output registers

  function automatic int pix(int base, int w, int i);  // pixel i of pixel word w
    logic [31:0] word = u_mem.mem[base + 2 * w + i / 4];
    return int'(word[(i % 4) * 8 +: 8]);
  endfunction

  function automatic int qmul(int x, int y);
    longint p = longint'(x) * longint'(y);
    return int'(p >>> 16);
  endfunction

  initial begin
    int p, cyc, exit_pc, r_min;
    int tri_kind [NTRI];
    cp_valid = 0; cp_cmd = CP_NOP; cp_addr = 0; cp_data = 0;
    sclk_fire = 0; sclk_idle = 1; pclk_fire = 0; pclk_idle = 1;

    // ---------------- memory contents ----------------
    for (int i = 0; i < 64; i++) u_mem.mem[CUR_A + i] = $urandom;
    for (int c = 0; c < NCAND; c++) begin
      automatic int noise = (c < 2) ? 255 : int'($urandom % 90);
      for (int i = 0; i < 64; i++)
        for (int b = 0; b < 4; b++) begin
          automatic int v = int'(u_mem.mem[CUR_A + i][b*8 +: 8]) + int'($urandom % (2 * noise + 1)) - noise;
          u_mem.mem[CAND_A + 64 * c + i][b*8 +: 8] = (v < 0) ? 8'd0 : (v > 255) ? 8'd255 : 8'(v);
        end
    end
    // matrix: scale 0.5 in x and y, identity in z and w
    for (int i = 0; i < 16; i++) u_mem.mem[MAT_A + i] = 0;
    u_mem.mem[MAT_A + 0] = 32'h0000_8000; u_mem.mem[MAT_A + 5] = 32'h0000_8000;
    u_mem.mem[MAT_A + 10] = 32'h0001_0000; u_mem.mem[MAT_A + 15] = 32'h0001_0000;
    for (int i = 0; i < 4; i++) u_mem.mem[MAT_A + 16 + i] = 0;   // normal (0,0,1,0)
    u_mem.mem[MAT_A + 18] = 32'h0001_0000;
    for (int i = 0; i < 4; i++) u_mem.mem[MAT_A + 20 + i] = 0;   // light (0,0,0.5,0)
    u_mem.mem[MAT_A + 22] = 32'h0000_8000;
    u_mem.mem[MAT_A + 24] = 32'h0001_0000; u_mem.mem[MAT_A + 25] = 32'h0000_8000;  // colour
    u_mem.mem[MAT_A + 26] = 32'h0000_4000; u_mem.mem[MAT_A + 27] = 0;
    // triangles: kind 0 kept (counter-clockwise), 1 outside, 2 zero area, 3 back face
    for (int t = 0; t < NTRI; t++) begin
      int vx [3], vy [3];
      tri_kind[t] = t % 4;
      case (tri_kind[t])
        0: begin vx = '{0, 65536, 0};         vy = '{0, 0, 65536}; end
        1: begin vx = '{196608, 262144, 196608}; vy = '{0, 0, 65536}; end   // x/2 > 1 after scaling
        2: begin vx = '{0, 65536, 131072};    vy = '{0, 65536, 131072}; end
        default: begin vx = '{0, 0, 65536};   vy = '{0, 65536, 0}; end
      endcase
      for (int v = 0; v < 3; v++) begin
        u_mem.mem[TRI_A + 12 * t + 4 * v + 0] = 32'(vx[v] - 8192 * (t / 4));
        u_mem.mem[TRI_A + 12 * t + 4 * v + 1] = 32'(vy[v] - 8192 * (t / 4));
        u_mem.mem[TRI_A + 12 * t + 4 * v + 2] = 32'(v * 4096);
        u_mem.mem[TRI_A + 12 * t + 4 * v + 3] = 32'h0001_0000;
      end
    end

    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (3) @(posedge clk);
    #1;
    chk("shader clock off after reset", clk_on[0], 0);

    // ---------------- programs ----------------
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
    p = 64;
    for (int v = 0; v < 3; v++)
      for (int l = 0; l < 4; l++)
        cp(CP_IMEM_WR, 8'(p++), 128'(I(OP_DP4, 4'(1 << l), 8'(8'h20 + v), 8'(8'h90 + l), 8'(v))));
    cp(CP_IMEM_WR, 8'(p++), 128'(I(OP_SET, 4'h0, SP_CULL, 8'h00, 8'(CULL_CW))));
    cp(CP_IMEM_WR, 8'(p++), 128'(I(OP_MOV, 4'hf, 8'h23, 8'h10, 8'h00)));          // O3 = 0 (R0 = 0)
    cp(CP_IMEM_WR, 8'(p++), 128'(I(OP_ERAT, 4'h0, 8'h0, 8'h20, 8'h00)));
    exit_pc = p + 3;
    cp(CP_IMEM_WR, 8'(p++), 128'(I(OP_BONE, 4'h0, 8'h0, 8'(S_ERAT), 8'(exit_pc))));
    cp(CP_IMEM_WR, 8'(p++), 128'(I(OP_DP4, 4'hf, 8'h11, 8'h94, 8'h95)));         // n.l
    cp(CP_IMEM_WR, 8'(p++), 128'(I(OP_MUL, 4'hf, 8'h23, 8'h11, 8'h96)));         // O3 = (n.l) * colour
    cp(CP_IMEM_WR, 8'(p++), 128'(I(OP_FSET, 4'h0, 8'h0, 8'h0, 8'h01)));
    repeat (4) @(posedge clk);
    #1;
    chk("shader clock stops when idle", clk_on[0], 0);

    // R0 must read as zero for the MOV above: write it through a program
    cp(CP_IMEM_WR, 8'd200, 128'(I(OP_MUL, 4'hf, 8'h10, 8'h10, 8'h00)));   // R0 = R0 * V0
    cp(CP_IMEM_WR, 8'd201, 128'(I(OP_ADD, 4'hf, 8'h10, 8'h80, 8'h80)));   // R0 = C0 + C0 (C0 = 0 below)
    cp(CP_IMEM_WR, 8'd202, 128'(I(OP_FSET, 4'h0, 8'h0, 8'h0, 8'h01)));
    cp(CP_REG_WR, 8'h80, '0);
    run(200, cyc);

    // ---------------- motion estimation ----------------
    dma(1'b0, CUR_A, 8'h00, 16);
    run(0, cyc);
    chk("min init", min_sad, 65535);
    r_min = 65535;
    for (int c = 0; c < NCAND; c++) begin
      int blk [4], part, brk, full;
      dma(1'b0, CAND_A + 64 * c, 8'h80, 16);
      for (int b = 0; b < 4; b++) begin
        blk[b] = 0;
        for (int r = 0; r < 8; r++)
          for (int i = 0; i < 8; i++) begin
            automatic int d = pix(CUR_A, 8 * b + r, i) - pix(CAND_A + 64 * c, 8 * b + r, i);
            blk[b] += (d < 0) ? -d : d;
          end
      end
      part = 0; brk = 4;
      for (int b = 0; b < 4; b++) begin
        part += blk[b];
        if (part > r_min && brk == 4) brk = b;
      end
      full = part;
      if (brk < 4) begin part = 0; for (int b = 0; b <= brk; b++) part += blk[b]; end
      run(2, cyc);
      chk("me cycles", cyc, ((brk < 4) ? 5 + 12 * brk + 9 + 1 : 54) + 1);
      chk("me sad", sad_acc, part);
      if (brk < 4) c_break++;
      if (brk == 4 && full < r_min) begin r_min = full; c_commit++; end
      repeat (2) @(posedge clk);
      #1;
      chk("me min", min_sad, r_min);
    end

    // ---------------- geometry ----------------
    dma(1'b0, MAT_A, 8'h90, 7);
    for (int t = 0; t < NTRI; t++) begin
      int ox [3][4];
      logic rej;
      dma(1'b0, TRI_A + 12 * t, 8'h00, 3);
      run(64, cyc);
      dma(1'b1, OUT_A + 16 * t, 8'h20, 4);
      for (int v = 0; v < 3; v++)
        for (int l = 0; l < 4; l++) begin
          automatic int s = 0;
          for (int j = 0; j < 4; j++)
            s += qmul(int'(u_mem.mem[MAT_A + 4 * l + j]), int'(u_mem.mem[TRI_A + 12 * t + 4 * v + j]));
          ox[v][l] = s;
          chk("vertex out", int'(u_mem.mem[OUT_A + 16 * t + 4 * v + l]), s);
        end
      rej = (tri_kind[t] != 0);
      chk("geometry cycles", cyc, rej ? 12 + 4 + 1 : 12 + 4 + 2 + 1);
      // kept triangles are lit: colour * 0.5
      chk("lit x", int'(u_mem.mem[OUT_A + 16 * t + 12]), rej ? 0 : 32'h0000_8000);
      chk("lit y", int'(u_mem.mem[OUT_A + 16 * t + 13]), rej ? 0 : 32'h0000_4000);
      if (!rej) c_light++;
    end

    // ---------------- grid-point test ----------------
    // viewport 64 x 48; after the 0.5 scale the triangle spans screen x
    // 10.75 .. 11.25 (no pixel centre) and y 18 .. 30, counter-clockwise
    begin
      int zero_before, back_before;
      cp(CP_IMEM_WR, 8'd220, 128'(I(OP_SET, 4'h0, SP_VPW, 8'h00, 8'd64)));
      cp(CP_IMEM_WR, 8'd221, 128'(I(OP_SET, 4'h0, SP_VPH, 8'h00, 8'd48)));
      cp(CP_IMEM_WR, 8'd222, 128'(I(OP_FSET, 4'h0, 8'h0, 8'h0, 8'h01)));
      run(220, cyc);
      cp(CP_REG_WR, 8'h00, {32'h0001_0000, 32'd0, 32'd0,          32'(-87040)});
      cp(CP_REG_WR, 8'h01, {32'h0001_0000, 32'd0, 32'(-32768),    32'(-86016)});
      cp(CP_REG_WR, 8'h02, {32'h0001_0000, 32'd0, 32'd32768,      32'(-84992)});
      zero_before = c_rej_zero; back_before = c_rej_back;
      run(64, cyc);
      chk("grid-point rejection", c_rej_zero - zero_before, 1);
      chk("grid-point rejection is not a back face", c_rej_back - back_before, 0);
      chk("grid-point rejection skips lighting", cyc, 12 + 4 + 1);
    end

    // ---------------- floating-point mode ----------------
    cp(CP_IMEM_WR, 8'd210, 128'(I(OP_FDP4, 4'hf, 8'h24, 8'h04, 8'h04)));  // O4 = V4.V4
    cp(CP_IMEM_WR, 8'd211, 128'(I(OP_FSET, 4'h0, 8'h0, 8'h0, 8'h01)));
    cp(CP_REG_WR, 8'h04, {32'h4080_0000, 32'h4040_0000, 32'h4000_0000, 32'h3f80_0000});
    run(210, cyc);
    cp_addr = 8'h24;
    #1;
    chk("float dot product", cp_rdata == {4{32'h41f0_0000}}, 1);   // 1+4+9+16 = 30.0
    if (cp_rdata == {4{32'h41f0_0000}}) c_float++;

    // ---------------- other clock-gate channels ----------------
    sclk_fire = 1; sclk_idle = 0;
    @(posedge clk); #1 sclk_fire = 0;
    repeat (5) @(posedge clk);
    #1 sclk_idle = 1;
    pclk_fire = 1; pclk_idle = 0;
    @(posedge clk); #1 pclk_fire = 0; pclk_idle = 1;
    repeat (5) @(posedge clk);
    #1;
    chk("setup clock edges", c_sclk, 6);   // Fire cycle + 5 busy cycles
    chk("raster clock edges", c_pclk, 1);   // Fire cycle only

    // ---------------- mechanism coverage ----------------
    $display("sad=%0d pde_breaks=%0d improvements=%0d reject outside=%0d zero=%0d back=%0d lit=%0d",
             c_sad, c_break, c_commit, c_rej_out, c_rej_zero, c_rej_back, c_light);
    $display("dma loads=%0d stores=%0d mem stalls=%0d shader clock running=%0d gated=%0d",
             c_dma_load, c_dma_store, u_mem.stalls, c_running, c_gated);
    chk("SAD executed", c_sad > 0, 1);
    chk("PDE early exit", c_break > 0, 1);
    chk("minimum improved", c_commit > 0, 1);
    chk("ERAT outside", c_rej_out, NTRI / 4);
    chk("ERAT zero area", c_rej_zero, NTRI / 4 + 1);   // + the grid-point case
    chk("ERAT back face", c_rej_back, NTRI / 4);
    chk("lighting run", c_light, NTRI / 4);
    chk("floating-point mode", c_float, 1);
    chk("DMA load", c_dma_load > 0, 1);
    chk("DMA store", c_dma_store > 0, 1);
    chk("memory stall", u_mem.stalls > 0, 1);
    chk("clock gated", c_gated > 0, 1);
    $display("shader clock edges=%0d, PDE unit edges=%0d, R/O file edges=%0d", c_gclk, c_pde_clk, c_rw_clk);
    chk("instruction-level gating of PDE", (c_pde_clk > 0) && (c_pde_clk < c_gclk), 1);
    chk("instruction-level gating of R/O", (c_rw_clk > 0) && (c_rw_clk < c_gclk), 1);
    chk("clock running", c_running > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
