// tb_pe: runs random general instructions on one PE against a model register
// file. Each instruction is followed by an OUT of a random register whose value
// is checked on out_data; load returns are injected on registers the current
// instruction does not write, and STORE data (st_data) is checked every cycle.
module tb_pe;
  import pps_pkg::*;
  localparam int DW = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic gen_valid, mem_valid, ld_valid, out_valid;
  logic [31:0] gen_instr, mem_instr;
  logic [DW-1:0] in_data, st_data, ld_data, out_data;
  logic [2:0] ld_reg;
  pe #(.DATA_W(DW), .NREG(8)) dut (.*);
  int checks = 0, failures = 0;
  logic [DW-1:0] m [8];
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic logic [DW-1:0] alu(opcode_t op, logic [DW-1:0] a, logic [DW-1:0] b, logic [15:0] imm, logic [DW-1:0] in, logic [DW-1:0] old);
    case (op)
      OP_LDI: return imm; OP_MOV: return a; OP_ADD: return a + b; OP_SUB: return a - b;
      OP_ABSD: return (a >= b) ? a - b : b - a; OP_MIN: return (a <= b) ? a : b;
      OP_MAX: return (a >= b) ? a : b; OP_AND: return a & b; OP_OR: return a | b;
      OP_XOR: return a ^ b; OP_SHL: return a << imm[3:0]; OP_SHR: return a >> imm[3:0];
      OP_SLT: return (a < b) ? 1 : 0; OP_IN: return in; default: return old;
    endcase
  endfunction
  initial begin
    opcode_t op; int rd, rs, rt, lr, sr; logic [15:0] imm; logic [DW-1:0] ld;
    gen_valid = 0; mem_valid = 0; ld_valid = 0; gen_instr = 0; mem_instr = 0;
    in_data = 0; ld_data = 0; ld_reg = 0;
    foreach (m[i]) m[i] = 0;
    repeat (2) @(negedge clk); rst = 0;
    for (int i = 0; i < 3000; i++) begin
      op = opcode_t'($urandom_range(0, 14));
      rd = $urandom_range(0, 7); rs = $urandom_range(0, 7); rt = $urandom_range(0, 7);
      imm = 16'($urandom); in_data = DW'($urandom);
      gen_valid = 1; gen_instr = {op, 3'(rd), 3'(rs), 3'(rt), 2'b00, imm};
      sr = $urandom_range(0, 7);
      mem_valid = 1; mem_instr = {OP_STORE, 3'(sr), 24'd0};
      #1; checks++;
      if (st_data !== m[sr]) begin failures++; $display("FAIL st_data r%0d", sr); end
      lr = $urandom_range(0, 7); ld = DW'($urandom);
      ld_valid = (lr != rd || op == OP_NOP) && $urandom_range(0, 1);
      ld_reg = 3'(lr); ld_data = ld;
      // model
      m[rd] = alu(op, m[rs], m[rt], imm, in_data, m[rd]);
      if (ld_valid) m[lr] = ld;
      @(negedge clk);
      ld_valid = 0; mem_valid = 0;
      rs = $urandom_range(0, 7);
      gen_instr = {OP_OUT, 3'd0, 3'(rs), 3'd0, 18'd0};
      @(negedge clk);
      gen_valid = 0;
      checks++;
      if (!out_valid || out_data !== m[rs]) begin
        failures++; $display("FAIL op %s: r%0d = %h exp %h", op.name(), rs, out_data, m[rs]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
