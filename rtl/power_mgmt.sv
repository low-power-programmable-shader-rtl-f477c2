// power_mgmt: module-level clock gating for the graphics subsystem.
//
// One channel per gated module (vertex shader, triangle setup engine,
// raster processor / pixel shader). A module's clock is switched on by its
// Fire request and off by its Idle indication: the enable follows
//   en = fire | (on & ~idle),   on <= en at every rising edge,
// so a Fire counts in the very cycle it is raised, provided it is set
// before that cycle's falling edge. The enable is captured
// in a negative-edge flip-flop and ANDed with the clock, the usual glitch-free
// clock-gate cell, so the gated clock only ever delivers whole high pulses.
// The first gated edge is the rising edge that ends the cycle in which Fire
// was raised; the last is the rising edge that ends the cycle before Idle
// rose (with no Fire in that cycle). Reset stops every gated clock.
// The signal names Fire / Idle / gated clock follow the published system
// diagram; the set/clear rule and the gate cell are this design's own.
// The gated clock output is the point of this block, so its derived-clock
// use is intended.
module power_mgmt #(
  parameter int unsigned N_CH = 3
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_CH-1:0] fire,
  input  logic [N_CH-1:0] idle,
  output logic [N_CH-1:0] gclk,
  output logic [N_CH-1:0] clk_on     // gate state, for observation
);
  logic [N_CH-1:0] on_q, en, en_l;

  assign en     = fire | (on_q & ~idle);
  assign clk_on = en_l;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) on_q <= '0;
    else        on_q <= en;
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) en_l <= '0;
    else        en_l <= en;
  end

  assign gclk = {N_CH{clk}} & en_l;
endmodule
