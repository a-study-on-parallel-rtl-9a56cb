// mem_module: one of the M_MOD memory modules behind the multi-access memory system.
//
// A single-port synchronous RAM of DEPTH words. At a clock edge it latches enable,
// write enable and address; at the next edge it either writes wdata (late write:
// the data arrives one cycle after the address, as the write-data path has one
// more register than the address path) or registers the addressed word on rdata.
// rdata holds its value when no read is in progress. A write followed in the next
// cycle by a read of the same address returns the new word.
// The source names the modules only; organisation and timing are this design's
// choice.
module mem_module #(
  parameter int unsigned DEPTH  = 22528,
  parameter int unsigned DATA_W = 16,
  localparam int unsigned AW    = $clog2(DEPTH)
)(
  input  logic              clk,
  input  logic              rst,     // clears the pending operation only
  input  logic              en,
  input  logic              we,
  input  logic [AW-1:0]     addr,
  input  logic [DATA_W-1:0] wdata,   // one cycle after en/we/addr
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [DEPTH];
  logic              en_q, we_q;
  logic [AW-1:0]     addr_q;

  always_ff @(posedge clk) begin
    en_q   <= en && !rst;
    we_q   <= we;
    addr_q <= addr;
    if (en_q && we_q)  mem[addr_q] <= wdata;
    if (en_q && !we_q) rdata       <= mem[addr_q];
  end

endmodule
