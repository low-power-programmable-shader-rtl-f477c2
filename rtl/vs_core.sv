// vs_core: programmable vertex shader core with motion-estimation support.
//
// The core runs programs from a 256-entry instruction memory, one instruction
// per cycle, with no pipeline hazards: the instruction memory and register
// files are read combinationally and every result is written at the end of
// the instruction's cycle.
//
// Register files (vector registers of four 32-bit lanes, 128 bits, each lane
// Q16.16 fixed point or binary32 float depending on the instruction):
//   V  16 input registers   0x00-0x0F   written by the host / DMA
//   R  16 temporaries       0x10-0x1F   written by the program
//   O  16 outputs           0x20-0x2F   written by the program, read by host / DMA
//   C 128 constants         0x80-0xFF   written by the host / DMA
// The V and C memories are reconfigurable: a vertex program sees them as
// 128-bit vectors, while the SAD instruction sees them as 64-bit words of
// eight 8-bit pixels (word 2k is the low half of register k, word 2k+1 the
// high half). SAD a, b compares pixel word (a + vOFFSET) of V, i.e. one row
// of the current macroblock, with pixel word ((b - 0x80) + 8*cBASE) of C, a
// row of the candidate block.
//
// Program control: four hardware loop counters LPCNT0..3 (SET, LOOP, loop
// end), a conditional branch BONE on one bit of the status vector
// {.., S_ERAT, S_PDE, .., F0}, and the flag register F0 written by FSET.
// F0 bit 2 turns the partial distortion elimination (PDE) controller on;
// writing F0 bit 0 ends the program and drops `busy`. ERAT tests the
// triangle held in three consecutive registers and sets status bit S_ERAT
// when it can be rejected, so the program can branch past lighting.
// SET and INC write the special registers: LPCNT0..3, vOFFSET, cBASE, the
// minimum SAD, the cull mode, and the viewport width and height that ERAT's
// grid-point test uses (0 after reset: test off).
//
// Interface: `start` with `start_pc` launches a program; `busy` is high
// while it runs (and for the one cycle in which the PDE unit finishes). The host/DMA write port (lw_*) writes V or C registers
// (other addresses are ignored), the read port (lr_*) reads any register,
// and imem_* loads the instruction memory. The event outputs pulse for one
// cycle each time the corresponding mechanism acts.
//
// Clocking: besides the module-level gating of `clk` itself, clock-gate cells
// give the PDE unit a clock only in cycles with a SAD, a minimum load or a
// PDE enable change, and give each register memory a clock only in cycles
// that write it (instruction-level clock gating).
//
// The instruction names, loop counters, F0/S12 flags, vOFFSET/cBASE pointers,
// single-instruction eight-pixel SAD and reconfigurable memory follow the
// published design; memory sizes, encodings and the exact pointer units are
// this design's own choices.
module vs_core
  import vs_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // program control
  input  logic                  start,
  input  logic [PC_W-1:0]       start_pc,
  output logic                  busy,
  // instruction memory load
  input  logic                  imem_we,
  input  logic [PC_W-1:0]       imem_addr,
  input  logic [INSTR_W-1:0]    imem_wdata,
  // register write / read port for the host and the DMA
  input  logic                  lw_we,
  input  logic [7:0]            lw_addr,
  input  logic [REG_W-1:0]      lw_data,
  input  logic [7:0]            lr_addr,
  output logic [REG_W-1:0]      lr_data,
  // motion-estimation results
  output logic [SAD_W-1:0]      sad_acc,
  output logic [SAD_W-1:0]      min_sad,
  // events
  output logic                  ev_sad,
  output logic                  ev_branch,
  output logic                  ev_pde_commit,
  output logic                  ev_erat_reject,
  output logic [2:0]            erat_why        // {back_face, zero_area, outside} of last ERAT
);
  logic [INSTR_W-1:0] imem [IMEM_DEPTH];
  logic [REG_W-1:0]   vreg [NUM_V];
  logic [REG_W-1:0]   rreg [NUM_R];
  logic [REG_W-1:0]   oreg [NUM_O];
  logic [REG_W-1:0]   creg [NUM_C];

  logic [PC_W-1:0]    pc;
  logic               running;
  logic [7:0]         f0;
  logic               s_erat;
  logic [15:0]        lpcnt   [NUM_LOOP];
  logic [PC_W-1:0]    lpstart [NUM_LOOP];
  logic [4:0]         voffset;
  logic [4:0]         cbase;
  cull_e              cull;
  logic [15:0]        vp_w, vp_h;

  instr_t ins;
  assign ins  = instr_t'(imem[pc]);

  function automatic logic [REG_W-1:0] rd(input logic [7:0] a);
    logic [REG_W-1:0] v;
    if (a[7])                 v = creg[a[6:0]];
    else if (a[7:4] == 4'h0)  v = vreg[a[3:0]];
    else if (a[7:4] == 4'h1)  v = rreg[a[3:0]];
    else if (a[7:4] == 4'h2)  v = oreg[a[3:0]];
    else                      v = '0;
    return v;
  endfunction

  // operands
  logic [REG_W-1:0] opa, opb, opd, alu_r;
  assign opa     = rd(ins.srca);
  assign opb     = rd(ins.srcb);
  assign opd     = rd(ins.dst);
  assign lr_data = rd(lr_addr);

  vec_alu u_alu (.op(ins.op), .a(opa), .b(opb), .d(opd), .r(alu_r));

  // SAD operands through the pixel view of V and C
  logic [4:0]         pv_idx;
  logic [7:0]         pc_idx;
  logic [REG_W-1:0]   vword, cword;
  logic [PWORD_W-1:0] cur_pix, cand_pix;
  logic [10:0]        sad_val;
  always_comb begin
    pv_idx   = ins.srca[4:0] + voffset;
    pc_idx   = {1'b0, ins.srcb[6:0]} + {cbase, 3'b000};
    vword    = vreg[pv_idx[4:1]];
    cword    = creg[pc_idx[7:1]];
    cur_pix  = pv_idx[0] ? vword[REG_W-1:PWORD_W] : vword[PWORD_W-1:0];
    cand_pix = pc_idx[0] ? cword[REG_W-1:PWORD_W] : cword[PWORD_W-1:0];
  end
  sad8 u_sad (.cur(cur_pix), .cand(cand_pix), .sad(sad_val));

  logic exe, do_sad, pde_exceed, pde_pending, min_load, alu_op;
  logic [15:0] imm16;
  assign exe      = running;
  assign do_sad   = exe && (ins.op == OP_SAD);
  assign imm16    = {ins.srca, ins.srcb};
  assign min_load = exe && (ins.op == OP_SET) && (ins.dst == SP_MINSAD);

  // instruction-level clock gating: the PDE unit is clocked only by the
  // instructions that change it, and the register files only when written
  logic pde_clk, rw_clk, lw_clk, im_clk, pde_cg_en;
  assign pde_cg_en = do_sad || min_load || pde_pending || ev_pde_commit;
  clk_gate u_cg_pde (.clk, .en(pde_cg_en), .gclk(pde_clk));
  clk_gate u_cg_rw  (.clk, .en(exe && alu_op), .gclk(rw_clk));
  clk_gate u_cg_lw  (.clk, .en(lw_we), .gclk(lw_clk));
  clk_gate u_cg_im  (.clk, .en(imem_we), .gclk(im_clk));

  pde_unit u_pde (
    .clk(pde_clk), .rst_n,
    .en       (f0[F0_PDE_EN]),
    .sad_valid(do_sad),
    .sad_in   (sad_val),
    .min_load (min_load),
    .min_val  (imm16),
    .acc      (sad_acc),
    .min_sad  (min_sad),
    .exceed   (pde_exceed),
    .commit   (ev_pde_commit),
    .pending  (pde_pending)
  );
  // stay busy until the PDE unit has taken in its last enable change, so
  // that gating the clock right after a program cannot lose a commit
  assign busy = running || pde_pending;

  // triangle test on three consecutive registers
  logic e_out, e_zero, e_back, e_rej;
  erat u_erat (
    .v0(rd(ins.srca)), .v1(rd(ins.srca + 8'd1)), .v2(rd(ins.srca + 8'd2)),
    .cull(cull), .vp_w(vp_w), .vp_h(vp_h), .outside(e_out), .zero_area(e_zero), .back_face(e_back), .reject(e_rej)
  );

  logic [15:0] status;
  always_comb begin
    status          = '0;
    status[7:0]     = f0;
    status[S_PDE]   = pde_exceed;
    status[S_ERAT]  = s_erat;
  end

  logic taken;
  assign taken     = exe && (ins.op == OP_BONE) && status[ins.srca[3:0]];
  assign ev_sad    = do_sad;
  assign ev_branch = taken;

  // lane-masked merge of an ALU result
  function automatic logic [REG_W-1:0] merge(input logic [REG_W-1:0] old,
                                             input logic [REG_W-1:0] nw,
                                             input logic [3:0] m);
    logic [REG_W-1:0] v;
    for (int i = 0; i < LANES; i++)
      v[i*LANE_W +: LANE_W] = m[i] ? nw[i*LANE_W +: LANE_W] : old[i*LANE_W +: LANE_W];
    return v;
  endfunction

  assign alu_op = (ins.op == OP_MOV) || (ins.op == OP_ADD) || (ins.op == OP_MUL) ||
                  (ins.op == OP_MAD) || (ins.op == OP_DP4) || (ins.op == OP_FMUL) ||
                  (ins.op == OP_FADD) || (ins.op == OP_FMAD) || (ins.op == OP_FDP4);

  // instruction memory
  always_ff @(posedge im_clk) begin
    if (imem_we) imem[imem_addr] <= imem_wdata;
  end

  // V and C: host / DMA side only
  always_ff @(posedge lw_clk) begin
    if (lw_we && lw_addr[7])                  creg[lw_addr[6:0]] <= lw_data;
    if (lw_we && (lw_addr[7:4] == 4'h0))      vreg[lw_addr[3:0]] <= lw_data;
  end

  // R and O: program side only
  always_ff @(posedge rw_clk) begin
    if (exe && alu_op && (ins.dst[7:4] == 4'h1))
      rreg[ins.dst[3:0]] <= merge(opd, alu_r, ins.mask);
    if (exe && alu_op && (ins.dst[7:4] == 4'h2))
      oreg[ins.dst[3:0]] <= merge(opd, alu_r, ins.mask);
  end

  // sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running        <= 1'b0;
      pc             <= '0;
      f0             <= '0;
      s_erat         <= 1'b0;
      voffset        <= '0;
      cbase          <= '0;
      cull           <= CULL_NONE;
      vp_w           <= '0;
      vp_h           <= '0;
      ev_erat_reject <= 1'b0;
      erat_why       <= '0;
      for (int i = 0; i < NUM_LOOP; i++) begin
        lpcnt[i]   <= '0;
        lpstart[i] <= '0;
      end
    end else begin
      ev_erat_reject <= 1'b0;
      if (!running) begin
        if (start) begin
          running <= 1'b1;
          pc      <= start_pc;
          f0[F0_RET] <= 1'b0;
        end
      end else begin
        pc <= pc + 1'b1;
        unique case (ins.op)
          OP_FSET: begin
            f0 <= ins.srcb;
            if (ins.srcb[F0_RET]) running <= 1'b0;
          end
          OP_SET: begin
            case (ins.dst)
              8'd0, 8'd1, 8'd2, 8'd3: lpcnt[ins.dst[1:0]] <= imm16;
              SP_VOFFSET: voffset <= imm16[4:0];
              SP_CBASE:   cbase   <= imm16[4:0];
              SP_CULL:    cull    <= cull_e'(imm16[1:0]);
              SP_VPW:     vp_w    <= imm16;
              SP_VPH:     vp_h    <= imm16;
              default: ;
            endcase
          end
          OP_INC: begin
            case (ins.dst)
              8'd0, 8'd1, 8'd2, 8'd3: lpcnt[ins.dst[1:0]] <= lpcnt[ins.dst[1:0]] + imm16;
              SP_VOFFSET: voffset <= voffset + imm16[4:0];
              SP_CBASE:   cbase   <= cbase + imm16[4:0];
              default: ;
            endcase
          end
          OP_LOOP:    lpstart[ins.dst[1:0]] <= pc + 1'b1;
          OP_LOOPEND: begin
            if (lpcnt[ins.dst[1:0]] > 16'd1) begin
              lpcnt[ins.dst[1:0]] <= lpcnt[ins.dst[1:0]] - 16'd1;
              pc <= lpstart[ins.dst[1:0]];
            end else begin
              lpcnt[ins.dst[1:0]] <= '0;
            end
          end
          OP_BONE: if (taken) pc <= ins.srcb;
          OP_ERAT: begin
            s_erat         <= e_rej;
            ev_erat_reject <= e_rej;
            erat_why       <= {e_back, e_zero, e_out};
          end
          default: ;
        endcase
      end
    end
  end

  // a started program must not run off into unwritten memory silently
  a_pc_wrap: assert property (@(posedge clk) disable iff (!rst_n)
                              running |-> !(pc == PC_W'(IMEM_DEPTH-1) && ins.op == OP_NOP))
    else $error("vs_core: program ran to the end of instruction memory");
endmodule
