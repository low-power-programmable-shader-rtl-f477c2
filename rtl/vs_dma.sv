// vs_dma: block transfer engine between system memory and the shader's
// register memories.
//
// A load copies `count` 128-bit registers from consecutive 32-bit memory
// words starting at `mem_addr` into registers `reg_addr`, `reg_addr`+1, ...
// (the V inputs or C constants; four memory words per register, lowest lane
// first). A store copies registers (normally the O outputs) out to memory the
// same way, so the next pipeline stage can fetch transformed vertices.
//
// Memory port: one request per cycle while `mem_ready` is high; read data
// returns in order on `mem_rvalid`/`mem_rdata` with any latency. Register
// side: the write port (`lw_*`) takes a register when its fourth word has
// arrived; the read port (`lr_*`) is combinational.
// `busy` rises the cycle after `go` and falls after the last word has been
// written (store) or the last register has been written (load). A `go` while
// busy is ignored.
// The published design only places a DMA between memory and the shader core;
// its word size, descriptor and handshake here are this design's own.
module vs_dma
  import vs_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // descriptor
  input  logic              go,
  input  logic              store,      // 0: memory -> registers, 1: registers -> memory
  input  logic [31:0]       mem_addr,
  input  logic [7:0]        reg_addr,
  input  logic [7:0]        count,      // registers to move (0 moves nothing)
  output logic              busy,
  // system memory
  output logic              mem_req,
  output logic              mem_we,
  output logic [31:0]       mem_a,
  output logic [31:0]       mem_wdata,
  input  logic              mem_ready,
  input  logic              mem_rvalid,
  input  logic [31:0]       mem_rdata,
  // shader registers
  output logic              lw_we,
  output logic [7:0]        lw_addr,
  output logic [REG_W-1:0]  lw_data,
  output logic [7:0]        lr_addr,
  input  logic [REG_W-1:0]  lr_data
);
  logic        st;
  logic [31:0] base_m;
  logic [7:0]  base_r;
  logic [9:0]  beats;     // 4 * count
  logic [9:0]  issued;
  logic [9:0]  received;
  logic [3*LANE_W-1:0] asm_q;   // first three words of a register

  logic issue_ok;
  assign issue_ok  = busy && (issued != beats);
  assign mem_req   = issue_ok;
  assign mem_we    = st;
  assign mem_a     = base_m + 32'(issued);
  assign lr_addr   = base_r + 8'(issued[9:2]);
  assign mem_wdata = lr_data[issued[1:0]*LANE_W +: LANE_W];

  logic fire, rx;
  assign fire = issue_ok && mem_ready;
  assign rx   = busy && !st && mem_rvalid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      st       <= 1'b0;
      base_m   <= '0;
      base_r   <= '0;
      beats    <= '0;
      issued   <= '0;
      received <= '0;
      asm_q    <= '0;
      lw_we    <= 1'b0;
      lw_addr  <= '0;
      lw_data  <= '0;
    end else begin
      lw_we <= 1'b0;
      if (!busy) begin
        if (go && count != 0) begin
          busy     <= 1'b1;
          st       <= store;
          base_m   <= mem_addr;
          base_r   <= reg_addr;
          beats    <= {count, 2'b00};
          issued   <= '0;
          received <= '0;
        end
      end else begin
        if (fire) issued <= issued + 10'd1;
        if (rx) begin
          if (received[1:0] != 2'd3) asm_q[received[1:0]*LANE_W +: LANE_W] <= mem_rdata;
          received <= received + 10'd1;
          if (received[1:0] == 2'd3) begin
            lw_we   <= 1'b1;
            lw_addr <= base_r + 8'(received[9:2]);
            lw_data <= {mem_rdata, asm_q};
          end
        end
        if (st ? (fire && issued == beats - 10'd1)
               : (rx && received == beats - 10'd1))
          busy <= 1'b0;
      end
    end
  end

  a_no_early_data: assert property (@(posedge clk) disable iff (!rst_n)
                                    (busy && !st && mem_rvalid) |-> (received < issued))
    else $error("vs_dma: read data returned before it was requested");
endmodule
