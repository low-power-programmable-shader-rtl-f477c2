// sys_mem: behavioural model of the system memory seen by the shader's DMA.
// 32-bit words, one request per cycle when `ready` is high, read data back in
// order after LAT cycles. With STALL set, `ready` drops at random so that
// the DMA's flow control is exercised. Not synthesizable logic of the design.
module sys_mem #(
  parameter int DEPTH = 4096,
  parameter int LAT   = 2,
  parameter bit STALL = 1'b1
) (
  input  logic        clk,
  input  logic        req,
  input  logic        we,
  input  logic [31:0] a,
  input  logic [31:0] wdata,
  output logic        ready,
  output logic        rvalid,
  output logic [31:0] rdata
);
  logic [31:0] mem [DEPTH];
  logic        pv [LAT];
  logic [31:0] pd [LAT];
  int          writes = 0, stalls = 0;

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    for (int i = 0; i < LAT; i++) begin pv[i] = 0; pd[i] = '0; end
    ready = 1'b1;
  end

  assign rvalid = pv[LAT-1];
  assign rdata  = pd[LAT-1];

  always @(posedge clk) begin
    for (int i = LAT-1; i > 0; i--) begin pv[i] <= pv[i-1]; pd[i] <= pd[i-1]; end
    pv[0] <= req && ready && !we;
    pd[0] <= mem[a % DEPTH];
    if (req && ready && we) begin
      mem[a % DEPTH] <= wdata;
      writes++;
    end
    if (req && !ready) stalls++;
    ready <= STALL ? (($urandom % 4) != 0) : 1'b1;
  end
endmodule
