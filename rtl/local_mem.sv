// local_mem: local memory of the system, holding the instruction words (and
// common data) that the issue unit fetches.
//
// DEPTH words of 32 bits. The processor unit writes it through a synchronous
// write port (pu_we, pu_addr, pu_wdata; written at the clock edge) and reads it
// back combinationally on pu_rdata. The issue unit reads two consecutive words
// per cycle on two combinational read ports, so that it can see an instruction
// and its successor together and issue both when they pair.
// The source gives the memory's role only; size and port structure are this
// design's choice.
module local_mem #(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
)(
  input  logic          clk,
  input  logic          pu_we,
  input  logic [AW-1:0] pu_addr,
  input  logic [31:0]   pu_wdata,
  output logic [31:0]   pu_rdata,
  input  logic [AW-1:0] raddr0,
  output logic [31:0]   rdata0,
  input  logic [AW-1:0] raddr1,
  output logic [31:0]   rdata1
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (pu_we) mem[pu_addr] <= pu_wdata;

  assign pu_rdata = mem[pu_addr];
  assign rdata0   = mem[raddr0];
  assign rdata1   = mem[raddr1];

endmodule
