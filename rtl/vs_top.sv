// vs_top: the programmable vertex shader subsystem of a mobile graphics
// processor, with its clock gating.
//
// The host processor drives the shader through a coprocessor interface: each
// command arrives with `cp_valid` (the coprocessor-instruction-valid strobe)
// and either loads the instruction memory, writes a V/C register, starts a
// program or launches a DMA transfer between system memory and the register
// memories. The vertex shader (DMA plus core) runs on a gated clock from the
// power manager: the command strobe is its Fire request and "core stopped
// and DMA done" its Idle indication, so the shader clock only runs while
// there is work. The power manager also gates the triangle setup engine and
// the raster processor / pixel shader, which are outside this RTL; their
// Fire/Idle inputs and gated clocks are ports.
//
// Commands (cp_cmd, cp_addr, cp_data):
//   CP_IMEM_WR   imem[cp_addr] = cp_data[33:0]
//   CP_REG_WR    register cp_addr (V 0x00-0x0F or C 0x80-0xFF) = cp_data
//   CP_START     run the program from pc = cp_addr
//   CP_DMA_LOAD  memory -> registers: memory word cp_data[31:0], first register
//                cp_addr, cp_data[47:40] registers
//   CP_DMA_STORE registers -> memory, same fields
// `cp_busy` is high while a program or transfer runs; commands other than
// CP_IMEM_WR should wait for it to fall. `cp_rdata` returns register cp_addr
// whenever no store transfer is using the read port.
// Timing: a command is taken at the rising edge that ends the cycle in which
// cp_valid is high; the gated clock needs no warm-up. cp_valid must be set
// before the falling edge in the middle of that cycle, where the clock gate
// samples it, and held to the rising edge.
module vs_top
  import vs_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // coprocessor interface
  input  logic              cp_valid,
  input  cp_cmd_e           cp_cmd,
  input  logic [7:0]        cp_addr,
  input  logic [REG_W-1:0]  cp_data,
  output logic              cp_busy,
  output logic [REG_W-1:0]  cp_rdata,
  // system memory
  output logic              mem_req,
  output logic              mem_we,
  output logic [31:0]       mem_a,
  output logic [31:0]       mem_wdata,
  input  logic              mem_ready,
  input  logic              mem_rvalid,
  input  logic [31:0]       mem_rdata,
  // motion estimation results
  output logic [SAD_W-1:0]  sad_acc,
  output logic [SAD_W-1:0]  min_sad,
  // mechanism events (one-cycle pulses of the shader clock)
  output logic              ev_sad,
  output logic              ev_branch,
  output logic              ev_pde_commit,
  output logic              ev_erat_reject,
  output logic [2:0]        erat_why,
  // power management of the other pipeline stages
  input  logic              sclk_fire,
  input  logic              sclk_idle,
  input  logic              pclk_fire,
  input  logic              pclk_idle,
  output logic              sclk,
  output logic              pclk,
  output logic [2:0]        clk_on       // {raster, setup, shader} clock running
);
  logic [2:0] gclks;
  logic       gclk;
  logic       core_busy, dma_busy;

  power_mgmt #(.N_CH(3)) u_pm (
    .clk, .rst_n,
    .fire  ({pclk_fire, sclk_fire, cp_valid}),
    .idle  ({pclk_idle, sclk_idle, !core_busy && !dma_busy}),
    .gclk  (gclks),
    .clk_on(clk_on)
  );
  assign gclk = gclks[0];
  assign sclk = gclks[1];
  assign pclk = gclks[2];

  // command decode
  logic is_imem, is_reg, is_start, is_dma;
  assign is_imem  = cp_valid && (cp_cmd == CP_IMEM_WR);
  assign is_reg   = cp_valid && (cp_cmd == CP_REG_WR) && !dma_busy;
  assign is_start = cp_valid && (cp_cmd == CP_START);
  assign is_dma   = cp_valid && ((cp_cmd == CP_DMA_LOAD) || (cp_cmd == CP_DMA_STORE));
  assign cp_busy  = core_busy || dma_busy;

  logic             d_lw_we;
  logic [7:0]       d_lw_addr, d_lr_addr;
  logic [REG_W-1:0] d_lw_data, lr_data;

  vs_dma u_dma (
    .clk(gclk), .rst_n,
    .go       (is_dma),
    .store    (cp_cmd == CP_DMA_STORE),
    .mem_addr (cp_data[31:0]),
    .reg_addr (cp_addr),
    .count    (cp_data[47:40]),
    .busy     (dma_busy),
    .mem_req, .mem_we, .mem_a, .mem_wdata, .mem_ready, .mem_rvalid, .mem_rdata,
    .lw_we    (d_lw_we),
    .lw_addr  (d_lw_addr),
    .lw_data  (d_lw_data),
    .lr_addr  (d_lr_addr),
    .lr_data  (lr_data)
  );

  assign cp_rdata = lr_data;

  vs_core u_core (
    .clk(gclk), .rst_n,
    .start     (is_start),
    .start_pc  (cp_addr),
    .busy      (core_busy),
    .imem_we   (is_imem),
    .imem_addr (cp_addr),
    .imem_wdata(cp_data[INSTR_W-1:0]),
    .lw_we     (d_lw_we || is_reg),
    .lw_addr   (d_lw_we ? d_lw_addr : cp_addr),
    .lw_data   (d_lw_we ? d_lw_data : cp_data),
    .lr_addr   (dma_busy ? d_lr_addr : cp_addr),
    .lr_data   (lr_data),
    .sad_acc, .min_sad,
    .ev_sad, .ev_branch, .ev_pde_commit, .ev_erat_reject, .erat_why
  );
endmodule
