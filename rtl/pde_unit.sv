// pde_unit: partial distortion elimination for block-matching motion search.
//
// While the PDE controller is enabled (F0 bit 2), every SAD instruction adds
// its eight-pixel SAD to a running partial distortion. The flag `exceed`
// (status bit S12) is high whenever that partial distortion is larger than the
// current minimum SAD, so the program can abandon the candidate block early
// with a conditional branch. Enabling the controller (0 -> 1) clears the
// accumulator. Disabling it (1 -> 0) ends the candidate: if the complete SAD
// is below the minimum it becomes the new minimum and `commit` pulses for one
// cycle, so the host can note the candidate's motion vector.
// The minimum can be loaded directly (SET MINSAD). The accumulator saturates.
// Timing: accumulation, enable and load take effect at the clock edge; the
// flag is combinational from the registers, so the instruction right after a
// SAD already sees its effect. `pending` is high from an enable change until
// the edge that takes it in, so a clock gate can wait for the final commit.
// The accumulate/compare/flag behaviour follows the published design; the
// clear-on-enable and commit-on-disable rules are this design's own choice.
module pde_unit
  import vs_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,        // PDE controller enable (F0 bit 2)
  input  logic             sad_valid, // a SAD instruction executes
  input  logic [10:0]      sad_in,
  input  logic             min_load,
  input  logic [SAD_W-1:0] min_val,
  output logic [SAD_W-1:0] acc,
  output logic [SAD_W-1:0] min_sad,
  output logic             exceed,
  output logic             commit,
  output logic             pending    // enable changed, not yet taken in
);
  logic en_q;
  logic [SAD_W:0] sum;

  assign sum    = {1'b0, acc} + {{(SAD_W-11){1'b0}}, sad_in};
  assign exceed  = en && en_q && (acc > min_sad);
  assign pending = en != en_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_q    <= 1'b0;
      acc     <= '0;
      min_sad <= '1;
      commit  <= 1'b0;
    end else begin
      en_q   <= en;
      commit <= 1'b0;
      if (en && !en_q) begin
        acc <= sad_valid ? {{(SAD_W-11){1'b0}}, sad_in} : '0;
      end else if (en && sad_valid) begin
        acc <= sum[SAD_W] ? '1 : sum[SAD_W-1:0];
      end
      if (min_load) begin
        min_sad <= min_val;
      end else if (!en && en_q && (acc < min_sad)) begin
        min_sad <= acc;
        commit  <= 1'b1;
      end
    end
  end
endmodule
