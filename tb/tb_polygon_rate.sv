// tb_polygon_rate: triangle-strip throughput of the shader subsystem (vs_top
// at its default sizes) with early rejection after transformation.
//  - A strip of 16 vertices makes 14 triangles: triangle j uses vertices j,
//    j+1 and j+2. Each vertex is transformed once (four DP4 instructions,
//    into output register O[i]), so a triangle costs one new vertex.
//  - The program is unrolled. For triangle j it sets the cull mode (the
//    winding of a strip alternates, so even triangles reject clockwise and
//    odd ones counter-clockwise), runs ERAT on O[j], O[j+1], O[j+2] and
//    branches past a one-instruction lighting step (a DP4 of normal and
//    light into R[j]) when the triangle is rejected. Per triangle that is
//    7 cycles when rejected and 8 when kept.
//  - The vertices are random, with a repeated vertex now and then, so that
//    outside, zero-area, back-facing and kept triangles all occur. A model
//    in the testbench transforms the vertices and classifies each triangle.
//  - Then 10 more strips of small triangles, one to three pixels across, run
//    with a 64x48 viewport set, so that ERAT's grid-point test rejects the
//    triangles whose bounding box holds no pixel centre. The model finds
//    pixel centres by searching all of them.
//  - Checked: every transformed vertex, which triangles were lit (R[j]
//    written or left as it was), the number of each rejection class, and the
//    exact cycle count of each strip. The polygon rate at 50 MHz is printed
//    for the first 20 strips.
module tb_polygon_rate;
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
  sys_mem #(.DEPTH(256), .LAT(2), .STALL(1'b0)) u_mem (
    .clk, .req(mem_req), .we(mem_we), .a(mem_a), .wdata(mem_wdata),
    .ready(mem_ready), .rvalid(mem_rvalid), .rdata(mem_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NV = 16, NT = NV - 2, NSTRIP = 20, NGRID = 10;
  localparam int ONE = 65536;

  int c_out = 0, c_zero = 0, c_back = 0, c_kept = 0;
  always @(posedge dut.gclk) if (rst_n && ev_erat_reject) begin
    if (erat_why[0]) c_out++;
    if (erat_why[1]) c_zero++;
    if (erat_why[2]) c_back++;
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

  task automatic cp(cp_cmd_e c, logic [7:0] a, logic [REG_W-1:0] d);
    cp_valid = 1; cp_cmd = c; cp_addr = a; cp_data = d;
    @(posedge clk); #1;
    cp_valid = 0; cp_cmd = CP_NOP;
  endtask

  task automatic wait_idle(output int cycles);
    cycles = 0;
    while (cp_busy) begin @(posedge clk); #1; cycles++; end
  endtask

  function automatic logic [REG_W-1:0] vec(int x, int y, int z, int w);
    return {32'(w), 32'(z), 32'(y), 32'(x)};
  endfunction

  // Registers are read back through the coprocessor port, one per cycle, so
  // that the host keeps driving its commands early in a cycle: cp_valid
  // must be set before the falling edge.
  task automatic read_reg(logic [7:0] a, output logic [REG_W-1:0] r);
    cp_addr = a;
    @(negedge clk) r = cp_rdata;
    @(posedge clk); #1;
  endtask

  function automatic int qmul(int x, int y);
    longint p = longint'(x) * longint'(y);
    return int'(p >>> 16);
  endfunction

  initial begin
    int p, cyc, exp_cyc, total_cyc, exp_out, exp_zero, exp_back, n_grid;
    logic grid;
    int m [4][4];
    cp_valid = 0; cp_cmd = CP_NOP; cp_addr = 0; cp_data = 0;
    sclk_fire = 0; sclk_idle = 1; pclk_fire = 0; pclk_idle = 1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (3) @(posedge clk);
    #1;

    // ---------------- program ----------------
    p = 0;
    for (int v = 0; v < NV; v++) begin
      for (int l = 0; l < 4; l++)
        cp(CP_IMEM_WR, 8'(p++), 128'(I(OP_DP4, 4'(1 << l), 8'(8'h20 + v), 8'(8'h90 + l), 8'(v))));
      if (v >= 2) begin
        automatic int j = v - 2;
        automatic int skip_pc;
        cp(CP_IMEM_WR, 8'(p++), 128'(I(OP_SET, 4'h0, SP_CULL, 8'h00, 8'((j % 2 == 0) ? CULL_CW : CULL_CCW))));
        cp(CP_IMEM_WR, 8'(p++), 128'(I(OP_ERAT, 4'h0, 8'h0, 8'(8'h20 + j), 8'h00)));
        skip_pc = p + 2;   // past the lighting step
        cp(CP_IMEM_WR, 8'(p++), 128'(I(OP_BONE, 4'h0, 8'h0, 8'(S_ERAT), 8'(skip_pc))));
        cp(CP_IMEM_WR, 8'(p++), 128'(I(OP_DP4, 4'hf, 8'(8'h10 + j), 8'h94, 8'h95)));   // lighting
      end
    end
    cp(CP_IMEM_WR, 8'(p++), 128'(I(OP_FSET, 4'h0, 8'h0, 8'h0, 8'h01)));
    // viewport 64 x 48 pixels
    cp(CP_IMEM_WR, 8'd200, 128'(I(OP_SET, 4'h0, SP_VPW, 8'h00, 8'd64)));
    cp(CP_IMEM_WR, 8'd201, 128'(I(OP_SET, 4'h0, SP_VPH, 8'h00, 8'd48)));
    cp(CP_IMEM_WR, 8'd202, 128'(I(OP_FSET, 4'h0, 8'h0, 8'h0, 8'h01)));

    // matrix: x and y scaled by 0.5, z and w kept; normal and light give n.l = 0.5
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) m[i][j] = 0;
    m[0][0] = ONE / 2; m[1][1] = ONE / 2; m[2][2] = ONE; m[3][3] = ONE;
    for (int i = 0; i < 4; i++) cp(CP_REG_WR, 8'(8'h90 + i), vec(m[i][0], m[i][1], m[i][2], m[i][3]));
    cp(CP_REG_WR, 8'h94, vec(0, 0, ONE, 0));
    cp(CP_REG_WR, 8'h95, vec(0, 0, ONE / 2, 0));

    exp_out = 0; exp_zero = 0; exp_back = 0; total_cyc = 0; n_grid = 0;
    for (int s = 0; s < NSTRIP + NGRID; s++) begin
      int vin [NV][4], ox [NV][4];
      logic [REG_W-1:0] r_before [NT];
      logic kept [NT];
      grid = (s >= NSTRIP);
      if (s == NSTRIP) begin
        cp(CP_START, 8'd200, '0);
        wait_idle(cyc);
      end
      for (int v = 0; v < NV; v++) begin
        vin[v][0] = int'($urandom % (6 * ONE)) - 3 * ONE;
        vin[v][1] = int'($urandom % (6 * ONE)) - 3 * ONE;
        vin[v][2] = int'($urandom % (3 * ONE)) - 3 * ONE / 2;
        vin[v][3] = ONE;
        if (grid) begin   // one pixel is 1/16 in x and y before the 0.5 scale
          vin[v][0] = int'($urandom % (ONE / 4)) - ONE / 8 + (v - 8) * (ONE / 16);
          vin[v][1] = int'($urandom % (ONE / 4)) - ONE / 8;
        end
        if (v > 0 && $urandom % 8 == 0) vin[v] = vin[v - 1];    // zero-area neighbours
        cp(CP_REG_WR, 8'(v), vec(vin[v][0], vin[v][1], vin[v][2], vin[v][3]));
        for (int l = 0; l < 4; l++) begin
          ox[v][l] = 0;
          for (int k = 0; k < 4; k++) ox[v][l] += qmul(m[l][k], vin[v][k]);
        end
      end
      for (int j = 0; j < NT; j++) read_reg(8'(8'h10 + j), r_before[j]);
      exp_cyc = 4 * NV + 1;
      for (int j = 0; j < NT; j++) begin
        logic [5:0] oc [3];
        longint det;
        logic outside, zero, back;
        for (int k = 0; k < 3; k++) begin
          automatic int v = j + k;
          oc[k][0] = ox[v][0] > ox[v][3]; oc[k][1] = ox[v][0] < -ox[v][3];
          oc[k][2] = ox[v][1] > ox[v][3]; oc[k][3] = ox[v][1] < -ox[v][3];
          oc[k][4] = ox[v][2] > ox[v][3]; oc[k][5] = ox[v][2] < -ox[v][3];
        end
        // every w is 1, so the determinant is the 2-D cross product
        det = longint'(ox[j+1][0] - ox[j][0]) * longint'(ox[j+2][1] - ox[j][1])
            - longint'(ox[j+2][0] - ox[j][0]) * longint'(ox[j+1][1] - ox[j][1]);
        outside = (oc[0] & oc[1] & oc[2]) != 0;
        zero    = det == 0;
        if (grid) begin
          // every w is 1, so screen x = (ox + 1) * 32 and y = (oy + 1) * 24
          // exactly, in Q16.16; look for a pixel centre k + 0.5 in the box
          longint lo, hi;
          logic col, row;
          col = 0; row = 0;
          lo = 64'h7fff_ffff_ffff; hi = -64'sh7fff_ffff_ffff;
          for (int k = 0; k < 3; k++) begin
            automatic longint sx = (longint'(ox[j+k][0]) + ONE) * 32;
            lo = (sx < lo) ? sx : lo; hi = (sx > hi) ? sx : hi;
          end
          for (int k = 0; k < 64; k++) if (lo <= k * ONE + ONE / 2 && k * ONE + ONE / 2 <= hi) col = 1;
          lo = 64'h7fff_ffff_ffff; hi = -64'sh7fff_ffff_ffff;
          for (int k = 0; k < 3; k++) begin
            automatic longint sy = (longint'(ox[j+k][1]) + ONE) * 24;
            lo = (sy < lo) ? sy : lo; hi = (sy > hi) ? sy : hi;
          end
          for (int k = 0; k < 48; k++) if (lo <= k * ONE + ONE / 2 && k * ONE + ONE / 2 <= hi) row = 1;
          if (!(col && row) && det != 0) n_grid++;
          zero = zero || !(col && row);
        end
        back    = (j % 2 == 0) ? (det < 0) : (det > 0);
        kept[j] = !(outside || zero || back);
        exp_out += int'(outside); exp_zero += int'(zero); exp_back += int'(back);
        exp_cyc += kept[j] ? 4 : 3;
      end
      cp(CP_START, 8'd0, '0);
      wait_idle(cyc);
      if (!grid) total_cyc += cyc;
      chk("strip cycles", cyc, exp_cyc);
      for (int v = 0; v < NV; v++) begin
        logic [REG_W-1:0] o;
        read_reg(8'(8'h20 + v), o);
        for (int l = 0; l < 4; l++) chk("vertex", int'($signed(o[l*32 +: 32])), ox[v][l]);
      end
      for (int j = 0; j < NT; j++) begin
        logic [REG_W-1:0] r;
        read_reg(8'(8'h10 + j), r);
        chk("lit exactly the kept triangles", r == (kept[j] ? vec(ONE / 2, ONE / 2, ONE / 2, ONE / 2) : r_before[j]), 1);
        c_kept += int'(kept[j]);
      end
    end

    $display("%0d triangles: kept %0d, outside %0d, zero area %0d, back face %0d",
             (NSTRIP + NGRID) * NT, c_kept, c_out, c_zero, c_back);
    $display("%0d triangles with a non-zero determinant rejected by the grid-point test", n_grid);
    $display("%0d cycles, %0d.%02d cycles per polygon, %0d polygons/s at 50 MHz",
             total_cyc, total_cyc / (NSTRIP * NT), (100 * total_cyc / (NSTRIP * NT)) % 100,
             longint'(50_000_000) * NSTRIP * NT / total_cyc);
    chk("outside rejections", c_out, exp_out);
    chk("zero-area rejections", c_zero, exp_zero);
    chk("back-face rejections", c_back, exp_back);
    chk("outside occurred", c_out > 0, 1);
    chk("zero area occurred", c_zero > 0, 1);
    chk("back face occurred", c_back > 0, 1);
    chk("kept occurred", c_kept > 0, 1);
    chk("grid-point rejection occurred", n_grid > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
