// fp32_add: single-precision floating-point adder for the vector datapath
// (IEEE-754 binary32 layout).
//
// Combinational. The operand with the smaller magnitude is aligned to the
// larger one with guard, round and sticky bits, the significands are added or
// subtracted, the result is normalised (one place right, or left by its
// leading-zero count) and rounded to nearest, ties to even. An exact zero
// result is +0 (-0 only for -0 + -0). Same simplifications as fp32_mul:
// subnormals count as zero, underflow flushes to zero, overflow gives
// infinity, infinity/NaN inputs are not special-cased. The floating-point
// mode follows the published floating/fixed-point datapath; the format and
// simplifications are this design's own choice.
module fp32_add (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  always_comb begin
    logic [31:0] x, z;           // |x| >= |z|
    logic [7:0]  d;
    logic [26:0] mx, mz;         // 1.f then guard, round, sticky
    logic [27:0] sum;
    logic        sub, lsb, g, rs, seen;
    logic [4:0]  lz;
    logic signed [9:0] e;
    logic [24:0] m;

    lz   = 5'd0;
    seen = 1'b0;
    if (a[30:0] >= b[30:0]) begin x = a; z = b; end
    else                    begin x = b; z = a; end
    sub = x[31] ^ z[31];
    d   = x[30:23] - z[30:23];
    mx  = {1'b1, x[22:0], 3'b000};
    mz  = {1'b1, z[22:0], 3'b000};
    if (d >= 8'd27) mz = 27'd1;  // only the sticky bit survives
    else if (d != 0) mz = (mz >> d) | 27'((mz & ((27'd1 << d) - 27'd1)) != 0);
    sum = sub ? ({1'b0, mx} - {1'b0, mz}) : ({1'b0, mx} + {1'b0, mz});
    e   = 10'(x[30:23]);
    if (sum[27]) begin
      sum = {1'b0, sum[27:2], sum[1] | sum[0]};
      e   = e + 10'sd1;
    end else begin
      for (int i = 26; i >= 0; i--) begin
        if (sum[i]) seen = 1'b1;
        else if (!seen) lz = lz + 5'd1;
      end
      sum = sum << lz;
      e   = e - 10'(lz);
    end
    lsb = sum[3];
    g   = sum[2];
    rs  = sum[1] | sum[0];
    m   = {1'b0, sum[26:3]};
    if (g && (rs || lsb)) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 10'sd1;
    end
    if (z[30:23] == 8'd0)        y = (x[30:23] == 8'd0) ? {x[31] & z[31], 31'd0} : x;
    else if (sum[26:0] == 27'd0) y = 32'd0;
    else if (e <= 0)             y = {x[31], 31'd0};
    else if (e >= 255)           y = {x[31], 8'hff, 23'd0};
    else                         y = {x[31], e[7:0], m[22:0]};
  end
endmodule
