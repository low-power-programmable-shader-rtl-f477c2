// sad8: sum of absolute differences of eight 8-bit pixel pairs.
//
// This is the datapath of the SAD instruction: one instruction compares eight
// pixels of the current block with eight pixels of the candidate block and
// returns the sum of their absolute differences. It is purely combinational:
// eight subtract/absolute-value units feed a three-level adder tree, so the
// result is available in the same cycle as the operands. Pixel i occupies
// bits [8i+7:8i] of each 64-bit pixel word. The one-instruction, eight-pixel
// behaviour follows the published design; the adder-tree structure is this
// design's own choice.
module sad8
  import vs_pkg::*;
(
  input  logic [PWORD_W-1:0] cur,   // eight pixels of the current block
  input  logic [PWORD_W-1:0] cand,  // eight pixels of the candidate block
  output logic [10:0]        sad    // 0 .. 8*255
);
  logic [7:0] diff [PIX_PER_SAD];
  logic [8:0] s1   [4];
  logic [9:0] s2   [2];

  always_comb begin
    for (int i = 0; i < PIX_PER_SAD; i++) begin
      logic [7:0] p, q;
      p = cur[i*PIX_W +: PIX_W];
      q = cand[i*PIX_W +: PIX_W];
      diff[i] = (p >= q) ? (p - q) : (q - p);
    end
    for (int i = 0; i < 4; i++) s1[i] = {1'b0, diff[2*i]} + {1'b0, diff[2*i+1]};
    for (int i = 0; i < 2; i++) s2[i] = {1'b0, s1[2*i]} + {1'b0, s1[2*i+1]};
    sad = {1'b0, s2[0]} + {1'b0, s2[1]};
  end
endmodule
