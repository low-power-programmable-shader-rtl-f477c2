// tb_erat: checks the early-rejection unit on hand-made triangles for each
// rejection class and cull mode, then on random triangles against an exact
// integer reference with the grid test off. Last, with a 64x48 viewport,
// small random triangles are checked against a reference that maps the
// vertices to the screen in real arithmetic and searches the pixel centres.
module tb_erat;
  import vs_pkg::*;
  logic [REG_W-1:0] v0, v1, v2;
  cull_e cull;
  logic [15:0] vp_w = 0, vp_h = 0;
  logic outside, zero_area, back_face, reject;
  int checks = 0, failures = 0;
  int n_out = 0, n_zero = 0, n_back = 0, n_grid = 0, n_cover = 0;

  erat dut (.*);

  function automatic logic [127:0] vtx(real x, real y, real z, real w);
    return {32'($rtoi(w * 65536.0)), 32'($rtoi(z * 65536.0)),
            32'($rtoi(y * 65536.0)), 32'($rtoi(x * 65536.0))};
  endfunction

  task automatic expect3(string name, logic eo, logic ez, logic eb);
    #1;
    checks++;
    if ({outside, zero_area, back_face} !== {eo, ez, eb} || reject !== (eo | ez | eb)) begin
      failures++;
      $display("FAIL %s got o=%b z=%b b=%b r=%b exp o=%b z=%b b=%b", name,
               outside, zero_area, back_face, reject, eo, ez, eb);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // counter-clockwise triangle inside the volume
    v0 = vtx(0, 0, 0, 1); v1 = vtx(0.5, 0, 0, 1); v2 = vtx(0, 0.5, 0, 1);
    cull = CULL_NONE; expect3("ccw none", 0, 0, 0);
    cull = CULL_CW;   expect3("ccw cullcw", 0, 0, 0);
    cull = CULL_CCW;  expect3("ccw cullccw", 0, 0, 1);
    cull = CULL_RSV;  expect3("ccw rsv", 0, 0, 0);
    // same triangle clockwise
    v1 = vtx(0, 0.5, 0, 1); v2 = vtx(0.5, 0, 0, 1);
    cull = CULL_CW;   expect3("cw cullcw", 0, 0, 1);
    cull = CULL_CCW;  expect3("cw cullccw", 0, 0, 0);
    // all beyond x = +w
    v0 = vtx(2, 0, 0, 1); v1 = vtx(3, 1, 0, 1); v2 = vtx(2.5, -1, 0, 1);
    cull = CULL_NONE; expect3("right", 1, 0, 0);
    // each beyond a different plane: not trivially outside
    v0 = vtx(2, 0, 0, 1); v1 = vtx(-2, 0, 0, 1); v2 = vtx(0, 2, 0, 1);
    expect3("spread", 0, 0, 0);
    // beyond z = -w (near plane) with w = 2
    v0 = vtx(0, 0, -3, 2); v1 = vtx(1, 0, -2.5, 2); v2 = vtx(0, 1, -4, 2);
    expect3("near", 1, 0, 0);
    // collinear vertices, and with different w (homogeneous collinear)
    v0 = vtx(0, 0, 0, 1); v1 = vtx(0.25, 0.25, 0, 1); v2 = vtx(0.5, 0.5, 0, 1);
    expect3("line", 0, 1, 0);
    v0 = vtx(0.1, 0.2, 0, 1); v1 = vtx(0.2, 0.4, 0, 2); v2 = vtx(0.5, 0.2, 0, 1);
    expect3("line w", 0, 1, 0);
    // repeated vertex
    v0 = vtx(0.3, 0.3, 0, 1); v1 = vtx(0.3, 0.3, 0, 1); v2 = vtx(0.7, 0.1, 0, 1);
    cull = CULL_CW; expect3("dup", 0, 1, 0);
    // one vertex behind the eye: area and winding not judged
    v0 = vtx(0, 0, 0, -1); v1 = vtx(0.5, 0, 0, 1); v2 = vtx(0, 0.5, 0, 1);
    cull = CULL_CCW; expect3("behind", 0, 0, 0);

    // random triangles with positive w; coordinates are small integers in
    // units of 1/32 (x, y, z) and 1/16 (w), so the reference determinant is
    // exact in 64-bit integers
    for (int n = 0; n < 3000; n++) begin
      longint X[3], Y[3], Z[3], W[3], det;
      logic eo, ez, eb;
      int code [3];
      for (int i = 0; i < 3; i++) begin
        W[i] = 8 + ($urandom % 64);
        X[i] = longint'($urandom % 256) - 128;
        Y[i] = longint'($urandom % 256) - 128;
        Z[i] = longint'($urandom % 256) - 128;
      end
      if ($urandom % 8 == 0) begin           // degenerate: three points on a line, equal w
        automatic longint dx = longint'($urandom % 9) - 4, dy = longint'($urandom % 9) - 4;
        W[1] = W[0]; W[2] = W[0];
        X[1] = X[0] + dx;     Y[1] = Y[0] + dy;
        X[2] = X[0] + 3 * dx; Y[2] = Y[0] + 3 * dy;
      end
      for (int i = 0; i < 3; i++)   // compare x/32 with w/16, i.e. X with 2W
        code[i] = int'(X[i] > 2*W[i]) | int'(X[i] < -2*W[i]) << 1 | int'(Y[i] > 2*W[i]) << 2 |
                  int'(Y[i] < -2*W[i]) << 3 | int'(Z[i] > 2*W[i]) << 4 | int'(Z[i] < -2*W[i]) << 5;
      det = X[0] * (Y[1] * W[2] - Y[2] * W[1]) - Y[0] * (X[1] * W[2] - X[2] * W[1])
          + W[0] * (X[1] * Y[2] - X[2] * Y[1]);
      cull = cull_e'($urandom % 4);
      v0 = vtx(X[0] / 32.0, Y[0] / 32.0, Z[0] / 32.0, W[0] / 16.0);
      v1 = vtx(X[1] / 32.0, Y[1] / 32.0, Z[1] / 32.0, W[1] / 16.0);
      v2 = vtx(X[2] / 32.0, Y[2] / 32.0, Z[2] / 32.0, W[2] / 16.0);
      eo = (code[0] & code[1] & code[2]) != 0;
      ez = (det == 0);
      eb = (cull == CULL_CW && det < 0) || (cull == CULL_CCW && det > 0);
      expect3("random", eo, ez, eb);
      n_out += int'(eo); n_zero += int'(ez); n_back += int'(eb);
    end
    $display("random: outside=%0d zero=%0d back=%0d", n_out, n_zero, n_back);
    checks++;
    if (n_out == 0 || n_zero == 0 || n_back == 0) failures++;

    // ---- grid-point test, viewport 64 x 48 ----
    // x = X/128 with w = 1 gives sx = X/4 + 32: quarter-pixel positions.
    // Columns 10.75 .. 11.25 hold no pixel centre (10.5 and 11.5 lie outside).
    v0 = vtx(-85/128.0, -0.5, 0, 1); v1 = vtx(-83/128.0, 0.3, 0, 1); v2 = vtx(-84/128.0, 0.0, 0, 1);
    cull = CULL_NONE;
    expect3("thin, no viewport", 0, 0, 0);
    vp_w = 64; vp_h = 48;
    expect3("thin between columns", 0, 1, 0);
    v0 = vtx(-170/128.0, -1.0, 0, 2); v1 = vtx(-166/128.0, 0.6, 0, 2); v2 = vtx(-168/128.0, 0.0, 0, 2);
    expect3("thin between columns, w = 2", 0, 1, 0);
    v1 = vtx(-160/128.0, 0.6, 0, 2);                  // reaches sx = 12: covers 11.5
    expect3("covers a column", 0, 0, 0);
    // rows: sy = (y + 1) * 24; 30.1 .. 30.4 holds no row centre
    v0 = vtx(-0.5, 30.1 / 24 - 1, 0, 1); v1 = vtx(0.5, 30.4 / 24 - 1, 0, 1); v2 = vtx(0.1, 30.2 / 24 - 1, 0, 1);
    expect3("thin between rows", 0, 1, 0);
    // off-screen part does not count: sx in -0.75 .. 0.25 (w = 1) covers no centre >= 0.5
    v0 = vtx(-131/128.0, -0.5, 0, 1); v1 = vtx(-127/128.0, 0.5, 0, 1); v2 = vtx(-129/128.0, 0.2, 0, 1);
    expect3("left edge", 0, 1, 0);
    // behind the eye: not judged
    v0 = vtx(-85/128.0, -0.5, 0, -1); v1 = vtx(-83/128.0, 0.3, 0, 1); v2 = vtx(-84/128.0, 0.0, 0, 1);
    expect3("thin, behind", 0, 0, 0);

    for (int n = 0; n < 3000; n++) begin
      real X [3], Y [3], W [3], sx [3], sy [3], det, lo, hi;
      logic eo, ez, eb, col, row, near;
      W[0] = real'(8 + $urandom % 64) / 16.0;
      X[0] = (real'($urandom % 231) - 115.0) / 128.0 * W[0];
      Y[0] = (real'($urandom % 231) - 115.0) / 128.0 * W[0];
      for (int i = 1; i < 3; i++) begin            // neighbours within about 2 pixels
        W[i] = real'(8 + $urandom % 64) / 16.0;
        X[i] = (X[0] / W[0] + (real'($urandom % 129) - 64.0) / 1024.0) * W[i];
        Y[i] = (Y[0] / W[0] + (real'($urandom % 129) - 64.0) / 1024.0) * W[i];
      end
      v0 = vtx(X[0], Y[0], 0, W[0]); v1 = vtx(X[1], Y[1], 0, W[1]); v2 = vtx(X[2], Y[2], 0, W[2]);
      // reference from the values actually applied (Q16.16)
      for (int i = 0; i < 3; i++) begin
        automatic logic [127:0] v = (i == 0) ? v0 : (i == 1) ? v1 : v2;
        X[i] = real'($signed(v[31:0])) / 65536.0;
        Y[i] = real'($signed(v[63:32])) / 65536.0;
        W[i] = real'($signed(v[127:96])) / 65536.0;
        sx[i] = (X[i] / W[i] + 1.0) * 32.0;
        sy[i] = (Y[i] / W[i] + 1.0) * 24.0;
      end
      near = 0;
      for (int i = 0; i < 3; i++) begin
        automatic real fx = sx[i] - $floor(sx[i]), fy = sy[i] - $floor(sy[i]);
        if ((fx > 0.49 && fx < 0.51) || (fy > 0.49 && fy < 0.51)) near = 1;
      end
      if (near) continue;
      lo = sx[0]; hi = sx[0];
      for (int i = 1; i < 3; i++) begin lo = (sx[i] < lo) ? sx[i] : lo; hi = (sx[i] > hi) ? sx[i] : hi; end
      col = 0;
      for (int k = 0; k < 64; k++) if (lo <= k + 0.5 && k + 0.5 <= hi) col = 1;
      lo = sy[0]; hi = sy[0];
      for (int i = 1; i < 3; i++) begin lo = (sy[i] < lo) ? sy[i] : lo; hi = (sy[i] > hi) ? sy[i] : hi; end
      row = 0;
      for (int k = 0; k < 48; k++) if (lo <= k + 0.5 && k + 0.5 <= hi) row = 1;
      det = X[0] * (Y[1] * W[2] - Y[2] * W[1]) - Y[0] * (X[1] * W[2] - X[2] * W[1])
          + W[0] * (X[1] * Y[2] - X[2] * Y[1]);
      cull = CULL_NONE;
      eo = 0; eb = 0;
      ez = !(col && row);
      // an exactly zero determinant is rare here; take the unit's word for it
      // only when the real determinant is tiny
      #1;
      if (det > -1e-9 && det < 1e-9) ez = zero_area;
      expect3("grid random", eo, ez, eb);
      if (ez) n_grid++; else n_cover++;
    end
    $display("grid: no pixel centre=%0d covering=%0d", n_grid, n_cover);
    checks++;
    if (n_grid < 100 || n_cover < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
