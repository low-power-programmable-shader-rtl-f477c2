// erat: early rejection after transformation.
//
// Tests one triangle whose three vertices are already in clip space
// (four signed Q16.16 lanes x, y, z, w each) and decides whether the rest of
// the geometry work on it, chiefly lighting, can be skipped. Three kinds of
// triangle are rejected:
//   outside   all three vertices lie beyond the same clip plane
//             (x > w, x < -w, y > w, y < -w, z > w or z < -w);
//   zero area the triangle covers no pixel centre of the screen;
//   back face the winding is the one the cull mode removes (CULL_CW or
//             CULL_CCW; CULL_NONE keeps every orientation).
// Area and winding come from the sign of the homogeneous determinant
// det[x y w] of the three vertices, which equals the projected signed area
// times w0*w1*w2 and so needs no division. They are judged only when all three
// w are positive; a triangle that straddles the eye plane and is not outside
// passes on.
// Zero area has two tests. A zero determinant always rejects. When a
// viewport of vp_w x vp_h pixels is set (both non-zero), the vertices are
// also mapped to the screen, sx = (x/w + 1) * vp_w / 2 and likewise sy, in
// Q16.16, using one reciprocal 2^32 / w per vertex. Pixel centres lie at
// k + 0.5 for k = 0 .. vp_w-1 (rows likewise). If the triangle's bounding box
// holds no pixel-centre column or no pixel-centre row, the triangle cannot
// cover a grid point and is rejected as zero area. A bounding box that does
// hold a pixel centre is not examined further, so a thin diagonal triangle
// may still pass: the test only rejects what is certain.
// Purely combinational; the reciprocals make this the longest path of the
// core's single-cycle ERAT instruction.
// The three rejection classes, the cull mode and the "covers no grid point"
// meaning of zero area follow the published design; the determinant and the
// bounding-box tests and the viewport inputs are this design's own choices.
// Interface: v0..v2 are the vertex registers, cull the cull mode, vp_w/vp_h
// the viewport size in pixels (0 switches the grid test off).
module erat
  import vs_pkg::*;
(
  input  logic [REG_W-1:0] v0,
  input  logic [REG_W-1:0] v1,
  input  logic [REG_W-1:0] v2,
  input  cull_e            cull,
  input  logic [15:0]      vp_w,
  input  logic [15:0]      vp_h,
  output logic             outside,
  output logic             zero_area,
  output logic             back_face,
  output logic             reject
);
  typedef logic signed [LANE_W-1:0] lane_t;
  typedef logic signed [2*LANE_W:0] prod2_t;   // 65 bits
  typedef logic signed [3*LANE_W+3:0] prod3_t; // 100 bits

  lane_t  x [3], y [3], z [3], w [3];
  prod2_t m0, m1, m2;
  prod3_t det;
  logic   all_w_pos;
  logic [5:0] out_code [3];

  // screen mapping for the grid-point test
  typedef logic signed [71:0] scr_t;            // Q16.16 screen coordinate, wide
  logic [32:0] rcp [3];                         // 2^32 / w, w > 0
  scr_t        sx [3], sy [3];
  logic        grid_en, no_col, no_row;

  function automatic scr_t min3(scr_t a, scr_t b, scr_t c);
    scr_t m;
    m = (a < b) ? a : b;
    return (c < m) ? c : m;
  endfunction

  function automatic scr_t max3(scr_t a, scr_t b, scr_t c);
    scr_t m;
    m = (a > b) ? a : b;
    return (c > m) ? c : m;
  endfunction

  // Is there a k in 0 .. n-1 with lo <= k + 0.5 <= hi (all Q16.16)?
  function automatic logic has_centre(scr_t lo, scr_t hi, logic [15:0] n);
    scr_t k_lo, k_hi;
    k_lo = (lo - scr_t'(32768) + scr_t'(65535)) >>> 16;   // ceil(lo - 0.5)
    k_hi = (hi - scr_t'(32768)) >>> 16;                   // floor(hi - 0.5)
    if (k_lo < 0) k_lo = 0;
    if (k_hi > scr_t'(n) - 1) k_hi = scr_t'(n) - 1;
    return k_lo <= k_hi;
  endfunction

  always_comb begin
    x[0] = v0[0 +: 32]; y[0] = v0[32 +: 32]; z[0] = v0[64 +: 32]; w[0] = v0[96 +: 32];
    x[1] = v1[0 +: 32]; y[1] = v1[32 +: 32]; z[1] = v1[64 +: 32]; w[1] = v1[96 +: 32];
    x[2] = v2[0 +: 32]; y[2] = v2[32 +: 32]; z[2] = v2[64 +: 32]; w[2] = v2[96 +: 32];

    for (int i = 0; i < 3; i++) begin
      logic signed [LANE_W:0] wx, nw, xs, ys, zs;
      wx = {w[i][LANE_W-1], w[i]};
      xs = {x[i][LANE_W-1], x[i]};
      ys = {y[i][LANE_W-1], y[i]};
      zs = {z[i][LANE_W-1], z[i]};
      nw = -wx;
      out_code[i][0] = (xs > wx);
      out_code[i][1] = (xs < nw);
      out_code[i][2] = (ys > wx);
      out_code[i][3] = (ys < nw);
      out_code[i][4] = (zs > wx);
      out_code[i][5] = (zs < nw);
    end
    outside = |(out_code[0] & out_code[1] & out_code[2]);

    // 2x2 minors of the [x y w] matrix, then expansion along the first row
    m0  = prod2_t'(y[1] * w[2]) - prod2_t'(y[2] * w[1]);
    m1  = prod2_t'(x[1] * w[2]) - prod2_t'(x[2] * w[1]);
    m2  = prod2_t'(x[1] * y[2]) - prod2_t'(x[2] * y[1]);
    det = prod3_t'(x[0] * m0) - prod3_t'(y[0] * m1) + prod3_t'(w[0] * m2);

    all_w_pos = (w[0] > 0) && (w[1] > 0) && (w[2] > 0);
    zero_area = all_w_pos && (det == 0);
    back_face = all_w_pos && (((cull == CULL_CW)  && (det < 0)) ||
                              ((cull == CULL_CCW) && (det > 0)));
    grid_en = (vp_w != 0) && (vp_h != 0);
    for (int i = 0; i < 3; i++) begin
      logic signed [67:0] px, py;
      rcp[i] = (w[i] > 0) ? 33'(64'h1_0000_0000 / 64'(w[i])) : '0;
      px = 68'(x[i]) * $signed({35'd0, rcp[i]});
      py = 68'(y[i]) * $signed({35'd0, rcp[i]});
      sx[i] = (((scr_t'(px) >>> 16) + scr_t'(65536)) * $signed({56'd0, vp_w})) >>> 1;
      sy[i] = (((scr_t'(py) >>> 16) + scr_t'(65536)) * $signed({56'd0, vp_h})) >>> 1;
    end
    no_col = !has_centre(min3(sx[0], sx[1], sx[2]), max3(sx[0], sx[1], sx[2]), vp_w);
    no_row = !has_centre(min3(sy[0], sy[1], sy[2]), max3(sy[0], sy[1], sy[2]), vp_h);
    if (grid_en && (no_col || no_row)) zero_area = all_w_pos;
    reject = outside || zero_area || back_face;
  end
endmodule
