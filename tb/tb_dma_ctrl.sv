// tb_dma_ctrl: checks the issue unit with a model local memory and a model
// memory system that returns every LOAD's tag four cycles after issue.
// A five-word program (two LOADs, ADD, ABSD, STORE) is scanned over a 2 x 3
// window. Checked: the order and coordinates of all memory requests, the order
// of general instructions, one dual issue and four stall cycles per position,
// no instruction issued while a register it names waits for a load, register
// read-back, the broadcast IN word, capture of PE outputs, busy and irq.
module tb_dma_ctrl;
  import pps_pkg::*;
  localparam int N = 4, DW = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic pu_we; logic [4:0] pu_addr; logic [31:0] pu_wdata, pu_rdata; logic busy, irq;
  logic [9:0] lm_raddr0, lm_raddr1; logic [31:0] lm_rdata0, lm_rdata1;
  logic gen_valid, mem_valid; logic [31:0] gen_instr, mem_instr; logic [DW-1:0] in_data;
  logic [DW-1:0] pe_out [N]; logic [N-1:0] pe_out_valid;
  logic m_req, m_we, m_rvalid; acc_t m_acc; logic [INTV_W-1:0] m_intv;
  logic signed [CRD_W-1:0] m_y, m_x; logic [2:0] m_tag, m_rtag;
  dma_ctrl #(.N_PE(N), .DATA_W(DW)) dut (.*);

  logic [31:0] lm [1024];
  assign lm_rdata0 = lm[lm_raddr0];
  assign lm_rdata1 = lm[lm_raddr1];

  // model memory system: tag back after four cycles
  logic [3:0] vpipe; logic [2:0] tpipe [4];
  always @(posedge clk) begin
    vpipe <= {vpipe[2:0], m_req && !m_we && !rst};
    tpipe[0] <= m_tag; tpipe[1] <= tpipe[0]; tpipe[2] <= tpipe[1]; tpipe[3] <= tpipe[2];
  end
  assign m_rvalid = vpipe[3];
  assign m_rtag = tpipe[3];

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // trace and hazard monitor
  typedef struct { logic we; int y, x, tag; } mreq_t;
  mreq_t mq [$]; logic [4:0] gq [$];
  int busy_until [8];
  int cyc = 0;
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (m_req) mq.push_back('{m_we, int'(m_y), int'(m_x), int'(m_tag)});
    if (gen_valid) gq.push_back(gen_instr[31:27]);
    if (gen_valid && gen_instr[31:27] != OP_NOP) begin
      for (int f = 18; f <= 24; f += 3)
        check(busy_until[gen_instr[f +: 3]] < cyc, "general op waits for its loads");
    end
    if (mem_valid && mem_instr[31:27] == OP_LOAD) busy_until[mem_instr[26:24]] = cyc + 4;
  end

  task automatic pu_wr(int a, int d);
    @(negedge clk); pu_we = 1; pu_addr = 5'(a); pu_wdata = d; @(negedge clk); pu_we = 0;
  endtask
  task automatic pu_rd(int a, output int d);
    @(negedge clk); pu_addr = 5'(a); #1 d = pu_rdata;
  endtask

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int v, irqs; mreq_t e;
    pu_we = 0; pu_addr = 0; pu_wdata = 0; pe_out = '{default: '0}; pe_out_valid = 0;
    foreach (lm[i]) lm[i] = 0;
    foreach (busy_until[i]) busy_until[i] = -1;
    lm[100] = {OP_LOAD,  3'd1, ACC_B, 4'd1, 9'd0, 9'd0};
    lm[101] = {OP_LOAD,  3'd2, ACC_B, 4'd1, 9'd3, -9'sd1};
    lm[102] = {OP_ADD,   3'd4, 3'd4, 3'd5, 18'd0};
    lm[103] = {OP_ABSD,  3'd3, 3'd1, 3'd2, 18'd0};
    lm[104] = {OP_STORE, 3'd3, ACC_H, 4'd1, 9'd0, 9'd2};
    repeat (3) @(negedge clk); rst = 0;
    pu_wr(1, 100); pu_wr(2, 5); pu_wr(3, 2); pu_wr(4, 4); pu_wr(5, 2);
    pu_wr(6, 0); pu_wr(7, 6); pu_wr(8, 3); pu_wr(9, 16'h5a5a);
    pu_rd(6, v); check(v == 0, "X0 readback"); pu_rd(8, v); check(v == 3, "XSTEP readback");
    pu_rd(9, v); check(v == 16'h5a5a && in_data == 16'h5a5a, "broadcast word");
    pu_wr(0, 1);
    check(busy, "busy after start");
    irqs = 0;
    while (!irq) @(posedge clk);
    @(negedge clk); check(!busy, "idle after irq");
    // memory request trace
    check(mq.size() == 18, $sformatf("18 memory requests (%0d)", mq.size()));
    for (int p = 0; p < 6; p++) begin
      int yb, xb;
      yb = 2 + 2 * (p / 3); xb = 3 * (p % 3);
      if (mq.size() >= 3) begin
        e = mq.pop_front(); check(!e.we && e.y == yb && e.x == xb && e.tag == 1, "LOAD r1 coords");
        e = mq.pop_front(); check(!e.we && e.y == yb + 3 && e.x == xb - 1 && e.tag == 2, "LOAD r2 coords");
        e = mq.pop_front(); check(e.we && e.y == yb && e.x == xb + 2 && e.tag == 3, "STORE coords");
      end
    end
    check(gq.size() == 12, "12 general instructions");
    while (gq.size() >= 2) begin
      check(gq.pop_front() == OP_ADD, "ADD order"); check(gq.pop_front() == OP_ABSD, "ABSD order");
    end
    pu_rd(13, v); check(v == 6, $sformatf("one pair per position (%0d)", v));
    pu_rd(12, v); check(v == 24, $sformatf("four stalls per position (%0d)", v));
    pu_rd(11, v); check(v >= 48 && v <= 56, $sformatf("eight cycles per position (%0d)", v));
    pu_rd(10, v); check(v == 2, "status done");
    // PE output capture
    @(negedge clk); pe_out = '{16'h11, 16'h22, 16'h33, 16'h44}; pe_out_valid = '1;
    @(negedge clk); pe_out_valid = 0;
    for (int k = 0; k < N; k++) begin pu_rd(16 + k, v); check(v == 16'h11 * (k + 1), "PE output register"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
