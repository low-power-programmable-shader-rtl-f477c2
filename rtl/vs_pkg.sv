// vs_pkg: types and constants shared by the programmable vertex shader.
//
// The shader core executes one 34-bit instruction per cycle. An instruction
// holds an opcode, a four-lane write mask, a destination field and two source
// fields; immediates reuse the source fields. The instruction names (FSET, SET,
// LOOP, SAD, BONE, INC, loop end), the flag register F0, the loop counter
// LPCNT3, the PDE status flag S12 and the vOFFSET/cBASE pointers come from the
// published motion-estimation program; the field layout, opcode numbers,
// register map and flag bit assignment are this design's own.
package vs_pkg;

  // Data formats
  localparam int unsigned LANES     = 4;    // x, y, z, w
  localparam int unsigned LANE_W    = 32;   // signed Q16.16 fixed point or binary32 float
  localparam int unsigned FRAC_W    = 16;
  localparam int unsigned REG_W     = LANES * LANE_W;  // 128-bit vector register
  localparam int unsigned PIX_W     = 8;    // luma sample
  localparam int unsigned PIX_PER_SAD = 8;  // pixels compared by one SAD
  localparam int unsigned PWORD_W   = PIX_W * PIX_PER_SAD; // 64-bit pixel word
  localparam int unsigned SAD_W     = 16;   // accumulated SAD of a 16x16 block fits (max 65280)

  // Register address map (8-bit operand fields)
  localparam int unsigned NUM_V = 16;   // input registers   0x00-0x0F
  localparam int unsigned NUM_R = 16;   // temporaries       0x10-0x1F
  localparam int unsigned NUM_O = 16;   // outputs           0x20-0x2F
  localparam int unsigned NUM_C = 128;  // constants         0x80-0xFF
  localparam logic [7:0] V_BASE = 8'h00;
  localparam logic [7:0] R_BASE = 8'h10;
  localparam logic [7:0] O_BASE = 8'h20;
  localparam logic [7:0] C_BASE = 8'h80;

  localparam int unsigned IMEM_DEPTH = 256;
  localparam int unsigned PC_W       = 8;
  localparam int unsigned NUM_LOOP   = 4;   // LPCNT0..LPCNT3

  typedef enum logic [5:0] {
    OP_NOP     = 6'd0,
    OP_MOV     = 6'd1,   // d = a
    OP_ADD     = 6'd2,   // d = a + b
    OP_MUL     = 6'd3,   // d = a * b
    OP_MAD     = 6'd4,   // d = a * b + d
    OP_DP4     = 6'd5,   // d = dot(a, b) in every lane
    OP_SAD     = 6'd6,   // SAD of 8 pixels of V[a+vOFFSET] and C[b+8*cBASE]
    OP_FSET    = 6'd7,   // F0 = srcb
    OP_SET     = 6'd8,   // special[dst] = {srca, srcb}
    OP_INC     = 6'd9,   // special[dst] += {srca, srcb}
    OP_LOOP    = 6'd10,  // loop start for counter dst
    OP_LOOPEND = 6'd11,  // loop end for counter dst
    OP_BONE    = 6'd12,  // branch to srcb if status bit srca is one
    OP_ERAT    = 6'd13,  // triangle test on registers srca, srca+1, srca+2
    OP_FMUL    = 6'd14,  // floating point (binary32 lanes): d = a * b
    OP_FADD    = 6'd15,  // d = a + b
    OP_FMAD    = 6'd16,  // d = a * b + d (product rounded first)
    OP_FDP4    = 6'd17   // d = (a.x*b.x + a.y*b.y) + (a.z*b.z + a.w*b.w) in every lane
  } opcode_e;

  typedef struct packed {
    opcode_e    op;
    logic [3:0] mask;   // lane write enables, bit 0 = x
    logic [7:0] dst;
    logic [7:0] srca;
    logic [7:0] srcb;
  } instr_t;

  localparam int unsigned INSTR_W = $bits(instr_t);

  // Special registers addressed by SET / INC / LOOP / LOOPEND
  localparam logic [7:0] SP_LPCNT0  = 8'd0;  // 0..3: loop counters
  localparam logic [7:0] SP_VOFFSET = 8'd4;
  localparam logic [7:0] SP_CBASE   = 8'd5;
  localparam logic [7:0] SP_MINSAD  = 8'd6;
  localparam logic [7:0] SP_CULL    = 8'd7;
  localparam logic [7:0] SP_VPW     = 8'd8;  // viewport width in pixels (0: no grid test)
  localparam logic [7:0] SP_VPH     = 8'd9;  // viewport height in pixels

  // Status vector tested by BONE: bits 7:0 are F0, the rest are hardware flags
  localparam int unsigned F0_RET     = 0;   // writing 1 ends the program
  localparam int unsigned F0_PDE_EN  = 2;   // PDE controller on
  localparam int unsigned S_PDE      = 12;  // partial SAD exceeds minimum
  localparam int unsigned S_ERAT     = 13;  // last ERAT test rejected the triangle

  // Triangle culling modes
  typedef enum logic [1:0] {
    CULL_NONE = 2'd0,
    CULL_CW   = 2'd1,   // reject clockwise (back) faces
    CULL_CCW  = 2'd2,   // reject counter-clockwise faces
    CULL_RSV  = 2'd3    // treated as CULL_NONE
  } cull_e;

  // Coprocessor commands from the host
  typedef enum logic [2:0] {
    CP_NOP       = 3'd0,
    CP_IMEM_WR   = 3'd1,  // imem[addr] = data[33:0]
    CP_REG_WR    = 3'd2,  // V or C register[addr] = data
    CP_START     = 3'd3,  // run program from pc = addr
    CP_DMA_LOAD  = 3'd4,  // memory -> registers: mem addr data[31:0], reg addr, count data[47:40]
    CP_DMA_STORE = 3'd5   // registers -> memory
  } cp_cmd_e;

endpackage
