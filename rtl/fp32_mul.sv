// fp32_mul: single-precision floating-point multiplier for the vector
// datapath (IEEE-754 binary32 layout).
//
// Combinational. The 24x24-bit significand product is normalised by at most
// one position and rounded to nearest, ties to even. Simplifications, chosen
// to keep the low-power datapath small: subnormal inputs count as zero,
// results below the normal range are flushed to zero, results above it become
// infinity, and infinity/NaN inputs are not given special treatment (their
// exponent field is used as is). The floating-point mode follows the published
// floating/fixed-point datapath; the number format and these simplifications
// are this design's own choice.
module fp32_mul (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  always_comb begin
    logic        s;
    logic [7:0]  ea, eb;
    logic [47:0] p;
    logic [24:0] m;        // rounded significand with carry bit
    logic        g, st;
    logic signed [10:0] e;

    s  = a[31] ^ b[31];
    ea = a[30:23];
    eb = b[30:23];
    p  = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    if (p[47]) begin
      m  = {1'b0, p[47:24]};
      g  = p[23];
      st = |p[22:0];
      e  = 11'(ea) + 11'(eb) - 11'sd126;
    end else begin
      m  = {1'b0, p[46:23]};
      g  = p[22];
      st = |p[21:0];
      e  = 11'(ea) + 11'(eb) - 11'sd127;
    end
    if (g && (st || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 11'sd1;
    end
    if (ea == 8'd0 || eb == 8'd0 || e <= 0) y = {s, 31'd0};
    else if (e >= 255)                      y = {s, 8'hff, 23'd0};
    else                                    y = {s, e[7:0], m[22:0]};
  end
endmodule
