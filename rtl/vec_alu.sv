// vec_alu: four-lane vector datapath of the vertex shader core.
//
// Each 128-bit register holds four 32-bit lanes (x in bits 31:0, then y,
// z, w). The unit is combinational and executes one vertex operation per
// cycle. Inputs a, b and the old destination d give the result r. The
// fixed-point operations read the lanes as signed Q16.16:
//   MOV  r = a            ADD  r = a + b        MUL  r = a * b
//   MAD  r = a * b + d    DP4  r = (a.b) in all four lanes
// Products are rounded toward minus infinity to Q16.16 (arithmetic shift of
// the 64-bit product); sums wrap. A 4x4 matrix transform of a vertex is four
// DP4 instructions.
// The lanes can instead hold single-precision floats (IEEE-754 binary32
// layout): FMUL, FADD, FMAD and FDP4 use four fp32_mul and seven fp32_add
// units (FMAD rounds the product, then the sum; FDP4 adds the products as
// (x + y) + (z + w)). Rounding is to nearest even; subnormals are flushed.
// The combined floating/fixed-point datapath follows the published design;
// the formats, operation set and rounding are this design's own choices.
module vec_alu
  import vs_pkg::*;
(
  input  opcode_e          op,
  input  logic [REG_W-1:0] a,
  input  logic [REG_W-1:0] b,
  input  logic [REG_W-1:0] d,
  output logic [REG_W-1:0] r
);
  logic signed [LANE_W-1:0] la [LANES];
  logic signed [LANE_W-1:0] lb [LANES];
  logic signed [LANE_W-1:0] ld [LANES];
  logic signed [LANE_W-1:0] prod [LANES];
  logic signed [LANE_W-1:0] dot;
  logic [LANE_W-1:0] fprod [LANES];   // float products
  logic [LANE_W-1:0] fin_a [LANES];   // float adder inputs
  logic [LANE_W-1:0] fin_b [LANES];
  logic [LANE_W-1:0] fsum  [LANES];   // FADD / FMAD results
  logic [LANE_W-1:0] fd01, fd23, fdot;

  for (genvar i = 0; i < LANES; i++) begin : g_fp
    fp32_mul u_mul (.a(a[i*LANE_W +: LANE_W]), .b(b[i*LANE_W +: LANE_W]), .y(fprod[i]));
    assign fin_a[i] = (op == OP_FADD) ? a[i*LANE_W +: LANE_W] : fprod[i];
    assign fin_b[i] = (op == OP_FADD) ? b[i*LANE_W +: LANE_W] : d[i*LANE_W +: LANE_W];
    fp32_add u_add (.a(fin_a[i]), .b(fin_b[i]), .y(fsum[i]));
  end
  fp32_add u_d01 (.a(fprod[0]), .b(fprod[1]), .y(fd01));
  fp32_add u_d23 (.a(fprod[2]), .b(fprod[3]), .y(fd23));
  fp32_add u_dot (.a(fd01),     .b(fd23),     .y(fdot));

  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      logic signed [2*LANE_W-1:0] full;
      la[i]   = a[i*LANE_W +: LANE_W];
      lb[i]   = b[i*LANE_W +: LANE_W];
      ld[i]   = d[i*LANE_W +: LANE_W];
      full    = la[i] * lb[i];
      prod[i] = full[FRAC_W +: LANE_W];
    end
    dot = prod[0] + prod[1] + prod[2] + prod[3];
    for (int i = 0; i < LANES; i++) begin
      unique case (op)
        OP_MOV:  r[i*LANE_W +: LANE_W] = la[i];
        OP_ADD:  r[i*LANE_W +: LANE_W] = la[i] + lb[i];
        OP_MUL:  r[i*LANE_W +: LANE_W] = prod[i];
        OP_MAD:  r[i*LANE_W +: LANE_W] = prod[i] + ld[i];
        OP_DP4:  r[i*LANE_W +: LANE_W] = dot;
        OP_FMUL: r[i*LANE_W +: LANE_W] = fprod[i];
        OP_FADD: r[i*LANE_W +: LANE_W] = fsum[i];
        OP_FMAD: r[i*LANE_W +: LANE_W] = fsum[i];
        OP_FDP4: r[i*LANE_W +: LANE_W] = fdot;
        default: r[i*LANE_W +: LANE_W] = '0;
      endcase
    end
  end
endmodule
