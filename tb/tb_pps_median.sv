// tb_pps_median: 3x3 median filter (the simplification step of the
// segmentation flow) run on the PEs at the system's default size.
//
// A 176 x 16 band of a random frame is stored at rows 0..15 (row 16 is cleared).
// For every group of four horizontally adjacent pixels the program loads the
// nine neighbours with horizontal accesses (offsets -1..1 in both directions),
// so PE k holds the 3x3 window of pixel k; it forms each window row's minimum,
// median and maximum with MIN/MAX, then the median of the window as
// med3(max of row minima, median of row medians, min of row maxima), and stores
// it at row 200 + y. Pixels outside the frame read as 0 (zero padding), which
// the reference model reproduces. Every output pixel is checked.
module tb_pps_median;
  import pps_pkg::*;
  localparam int N = 4, W = 176, H = 16, DW = 16, OUT = 200;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic pu_we; logic [4:0] pu_addr; logic [31:0] pu_wdata, pu_rdata; logic busy, irq;
  logic lm_we; logic [9:0] lm_addr; logic [31:0] lm_wdata, lm_rdata;
  logic h_ready, h_req, h_we, h_rvalid, conflict;
  acc_t h_acc; logic [INTV_W-1:0] h_intv; logic signed [CRD_W-1:0] h_y, h_x;
  logic [DW-1:0] h_wdata [N], h_rdata [N]; logic [N-1:0] h_relem;

  pps_top dut (.*);

  int checks = 0, failures = 0;
  int n_pair = 0, n_stall = 0, n_irq = 0, n_h = 0, n_v = 0, n_b = 0;
  logic [7:0] f [H][W];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- processor-unit side helpers
  task automatic pu_wr(int a, int d);
    @(negedge clk); pu_we = 1; pu_addr = 5'(a); pu_wdata = d;
    @(negedge clk); pu_we = 0;
  endtask
  task automatic pu_rd(int a, output int d);
    @(negedge clk); pu_addr = 5'(a); #1 d = pu_rdata;
  endtask
  task automatic lm_wr(int a, logic [31:0] d);
    @(negedge clk); lm_we = 1; lm_addr = 10'(a); lm_wdata = d;
    @(negedge clk); lm_we = 0;
  endtask
  function automatic logic [31:0] gen(opcode_t op, int rd, int rs, int rt, int imm);
    return {op, 3'(rd), 3'(rs), 3'(rt), 2'b00, 16'(imm)};
  endfunction
  function automatic logic [31:0] mem(opcode_t op, int r, acc_t a, int intv, int dy, int dx);
    return {op, 3'(r), a, 4'(intv), 9'(dy), 9'(dx)};
  endfunction

  // Run PROG_LEN words at PROG_BASE over the scan window and wait for irq.
  task automatic run(int base, int len, int y0, int y1, int ys, int x0, int x1, int xs);
    pu_wr(1, base); pu_wr(2, len);
    pu_wr(3, y0); pu_wr(4, y1); pu_wr(5, ys);
    pu_wr(6, x0); pu_wr(7, x1); pu_wr(8, xs);
    pu_wr(0, 1);
    @(posedge clk);
    while (!irq) @(posedge clk);
    n_irq++;
  endtask

  // ---- image port helpers (one access per call; read returns 4 cycles later)
  task automatic h_access(logic we, acc_t a, int intv, int yy, int xx, logic [DW-1:0] wd [N]);
    @(negedge clk);
    h_req = 1; h_we = we; h_acc = a; h_intv = 4'(intv); h_y = CRD_W'(yy); h_x = CRD_W'(xx);
    h_wdata = wd;
    @(negedge clk); h_req = 0;
    case (a) ACC_H: n_h++; ACC_V: n_v++; ACC_B: n_b++; default: ; endcase
  endtask
  task automatic h_read(acc_t a, int intv, int yy, int xx, output logic [DW-1:0] rd [N], output logic [N-1:0] el);
    logic [DW-1:0] z [N];
    z = '{default: '0};
    h_access(0, a, intv, yy, xx, z);
    while (!h_rvalid) @(negedge clk);
    rd = h_rdata; el = h_relem;
  endtask


  function automatic int px(int y, int x);
    return (y < 0 || y >= H || x < 0 || x >= W) ? 0 : int'(f[y][x]);
  endfunction

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] wd [N], rd [N];
    logic [N-1:0] el;
    int pc, v, cyc;
    pu_we = 0; pu_addr = 0; pu_wdata = 0; lm_we = 0; lm_addr = 0; lm_wdata = 0;
    h_req = 0; h_we = 0; h_acc = ACC_H; h_intv = 1; h_y = 0; h_x = 0; h_wdata = '{default: '0};
    repeat (4) @(posedge clk);
    rst = 0;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) f[y][x] = 8'($urandom);
    for (int y = 0; y <= H; y++)
      for (int x = 0; x < W; x += N) begin
        foreach (wd[k]) wd[k] = (y < H) ? DW'(f[y][x+k]) : '0;
        h_access(1, ACC_H, 1, y, x, wd);
      end

    pc = 0;
    // Loads of the next window row are interleaved with the running min/max of
    // the current one so that they can issue as pairs.
    for (int i = 0; i < 3; i++) lm_wr(pc++, mem(OP_LOAD, i, ACC_H, 1, -1, i - 1));
    for (int j = 0; j < 3; j++) begin
      lm_wr(pc++, gen(OP_MIN, 3, 0, 1, 0));   // lo
      lm_wr(pc++, gen(OP_MAX, 0, 0, 1, 0));   // hi
      lm_wr(pc++, gen(OP_MIN, 1, 0, 2, 0));   // min(hi, c)
      lm_wr(pc++, gen(OP_MAX, 2, 0, 2, 0));   // row maximum
      lm_wr(pc++, gen(OP_MAX, 0, 3, 1, 0));   // row median
      lm_wr(pc++, gen(OP_MIN, 3, 3, 1, 0));   // row minimum
      if (j < 2) lm_wr(pc++, gen(OP_MOV, 6 + j, 0, 0, 0));
      if (j < 2) lm_wr(pc++, mem(OP_LOAD, 0, ACC_H, 1, j, -1));
      lm_wr(pc++, (j == 0) ? gen(OP_MOV, 4, 3, 0, 0) : gen(OP_MAX, 4, 4, 3, 0));
      if (j < 2) lm_wr(pc++, mem(OP_LOAD, 1, ACC_H, 1, j, 0));
      lm_wr(pc++, (j == 0) ? gen(OP_MOV, 5, 2, 0, 0) : gen(OP_MIN, 5, 5, 2, 0));
      if (j < 2) lm_wr(pc++, mem(OP_LOAD, 2, ACC_H, 1, j, 1));
    end
    // median of the row medians r6, r7, r0 -> r1
    lm_wr(pc++, gen(OP_MIN, 1, 6, 7, 0));
    lm_wr(pc++, gen(OP_MAX, 2, 6, 7, 0));
    lm_wr(pc++, gen(OP_MIN, 2, 2, 0, 0));
    lm_wr(pc++, gen(OP_MAX, 1, 1, 2, 0));
    // median of r4, r1, r5 -> r2
    lm_wr(pc++, gen(OP_MIN, 2, 4, 1, 0));
    lm_wr(pc++, gen(OP_MAX, 3, 4, 1, 0));
    lm_wr(pc++, gen(OP_MIN, 3, 3, 5, 0));
    lm_wr(pc++, gen(OP_MAX, 2, 2, 3, 0));
    lm_wr(pc++, mem(OP_STORE, 2, ACC_H, 1, OUT, 0));

    run(0, pc, 0, H - 1, 1, 0, W - 1, N);
    pu_rd(11, cyc); pu_rd(12, n_stall); pu_rd(13, n_pair);
    $display("median: %0d words, %0d cycles, %0d stall cycles, %0d dual issues", pc, cyc, n_stall, n_pair);
    check(n_stall > 0 && n_pair > 0, "stalls and dual issues both happen");

    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x += N) begin
        h_read(ACC_H, 1, OUT + y, x, rd, el);
        for (int k = 0; k < N; k++) begin
          int w [9]; int t;
          for (int i = 0; i < 9; i++) w[i] = px(y + i / 3 - 1, x + k + i % 3 - 1);
          for (int i = 0; i < 9; i++) for (int j = 0; j < 8 - i; j++)
            if (w[j] > w[j+1]) begin t = w[j]; w[j] = w[j+1]; w[j+1] = t; end
          check(int'(rd[k]) == w[4], $sformatf("median (%0d,%0d) got %0d exp %0d", y, x + k, rd[k], w[4]));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
