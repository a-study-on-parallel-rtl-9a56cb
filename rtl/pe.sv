// pe: processing element of the SIMD array.
//
// Every PE receives the same instruction words from the issue unit in the same
// cycle and applies them to its own register file (NREG x DATA_W). In one cycle a
// PE can take one general instruction and one memory-reference instruction
// together, as the issue unit pairs them:
//   - the general instruction (NOP, LDI, MOV, ADD, SUB, ABSD, MIN, MAX, AND, OR,
//     XOR, SHL, SHR, SLT, IN, OUT; see pps_pkg) reads its sources and writes rd at
//     the end of the cycle;
//   - a STORE presents register [26:24] on st_data for the memory system in the
//     same cycle (it sees the register value from before the paired general
//     instruction);
//   - a LOAD needs nothing from the PE when issued: its word comes back from the
//     memory system later with the destination register as tag (ld_valid,
//     ld_reg, ld_data) and is written at the end of that cycle.
// OUT drives out_data/out_valid for one cycle; IN copies the broadcast word
// in_data. The two register write ports (general result and returning load)
// never hit the same register in one cycle; the issue unit's scoreboard ensures
// it and an assertion checks it.
// Splitting the instruction set into 16 general and 2 memory-reference
// instructions that run in parallel follows the source; opcodes, encodings and
// the register file size are this design's own choice.
module pe
  import pps_pkg::*;
#(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned NREG   = 8,
  localparam int unsigned RW    = $clog2(NREG)
)(
  input  logic              clk,
  input  logic              rst,
  input  logic              gen_valid,
  input  logic [31:0]       gen_instr,
  input  logic              mem_valid,
  input  logic [31:0]       mem_instr,
  input  logic [DATA_W-1:0] in_data,
  output logic [DATA_W-1:0] st_data,
  input  logic              ld_valid,
  input  logic [RW-1:0]     ld_reg,
  input  logic [DATA_W-1:0] ld_data,
  output logic [DATA_W-1:0] out_data,
  output logic              out_valid
);

  logic [DATA_W-1:0] regs [NREG];
  opcode_t           op;
  logic [RW-1:0]     rd, rs, rt, mreg;
  logic [DATA_W-1:0] a, b, res;
  logic              wr;

  assign op   = opcode_t'(gen_instr[31:27]);
  assign rd   = gen_instr[24 +: RW];
  assign rs   = gen_instr[21 +: RW];
  assign rt   = gen_instr[18 +: RW];
  assign mreg = mem_instr[24 +: RW];
  assign a    = regs[rs];
  assign b    = regs[rt];

  assign st_data = mem_valid ? regs[mreg] : '0;

  // ALU
  always_comb begin
    res = '0;
    wr  = gen_valid;
    unique case (op)
      OP_LDI:  res = DATA_W'(gen_instr[15:0]);
      OP_MOV:  res = a;
      OP_ADD:  res = a + b;
      OP_SUB:  res = a - b;
      OP_ABSD: res = (a > b) ? a - b : b - a;
      OP_MIN:  res = (a < b) ? a : b;
      OP_MAX:  res = (a > b) ? a : b;
      OP_AND:  res = a & b;
      OP_OR:   res = a | b;
      OP_XOR:  res = a ^ b;
      OP_SHL:  res = a << gen_instr[3:0];
      OP_SHR:  res = a >> gen_instr[3:0];
      OP_SLT:  res = DATA_W'(a < b);
      OP_IN:   res = in_data;
      default: wr  = 1'b0;   // NOP, OUT, memory opcodes
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned i = 0; i < NREG; i++) regs[i] <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (wr)       regs[rd]     <= res;
      if (ld_valid) regs[ld_reg] <= ld_data;
      out_valid <= gen_valid && op == OP_OUT;
      if (gen_valid && op == OP_OUT) out_data <= a;
    end
  end

  // The issue unit must never let a general result and a load return collide.
  a_no_wb_collision: assert property (@(posedge clk) disable iff (rst)
    !(wr && ld_valid && rd == ld_reg));

endmodule
