// tb_pps_top: end-to-end test of the parallel processing system at its default
// size (176-pixel rows, 512 stored rows, 4 PEs, 5 memory modules).
//
// Workload: the frame-difference step of moving-object segmentation on one
// QCIF frame pair (176 x 144). The testbench
//   1. loads two random frames through the image port (horizontal writes),
//      frame n at rows 144..287 and frame n+1 at rows 288..431;
//   2. runs three programs on the PEs: an initialisation program (LDI, IN),
//      the difference program scanned over every 2x2 block of the frame
//      (block LOADs, ABSD, block STORE of |n+1 - n| into rows 0..143, and
//      per-PE counters), and an output program (OUT);
//   3. reads the difference image back with vertical accesses and checks every
//      pixel, the per-PE sums and counts, and the issue statistics: one dual
//      issue and four load stall cycles per scan position, nine cycles per
//      position.
// It also makes a refused access (interval 5) and accesses that fall partly
// outside the image, and counts each mechanism; one that never happens fails.
module tb_pps_top;
  import pps_pkg::*;
  localparam int N = 4, W = 176, H = 144, DW = 16;
  localparam int F0 = 144, F1 = 288;   // stored rows of the two frames; result at row 0

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic pu_we; logic [4:0] pu_addr; logic [31:0] pu_wdata, pu_rdata; logic busy, irq;
  logic lm_we; logic [9:0] lm_addr; logic [31:0] lm_wdata, lm_rdata;
  logic h_ready, h_req, h_we, h_rvalid, conflict;
  acc_t h_acc; logic [INTV_W-1:0] h_intv; logic signed [CRD_W-1:0] h_y, h_x;
  logic [DW-1:0] h_wdata [N], h_rdata [N]; logic [N-1:0] h_relem;

  pps_top dut (.*);

  int checks = 0, failures = 0;
  int n_pair = 0, n_stall = 0, n_conflict = 0, n_partial = 0, n_irq = 0, n_h = 0, n_v = 0, n_b = 0;
  logic [7:0] f0 [H][W], f1 [H][W];

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

  always @(posedge clk) if (conflict) n_conflict++;

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
    int v, cyc, stl, prs, npos;
    longint sum [N];
    pu_we = 0; pu_addr = 0; pu_wdata = 0; lm_we = 0; lm_addr = 0; lm_wdata = 0;
    h_req = 0; h_we = 0; h_acc = ACC_H; h_intv = 1; h_y = 0; h_x = 0; h_wdata = '{default: '0};
    repeat (4) @(posedge clk);
    rst = 0;

    // 1. frames
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      f0[y][x] = 8'($urandom); f1[y][x] = 8'($urandom);
    end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x += N) begin
        foreach (wd[k]) wd[k] = DW'(f0[y][x+k]);
        h_access(1, ACC_H, 1, F0 + y, x, wd);
        foreach (wd[k]) wd[k] = DW'(f1[y][x+k]);
        h_access(1, ACC_H, 1, F1 + y, x, wd);
      end
    // spot check: horizontal read with interval 3, and a block read with interval 2
    h_read(ACC_H, 3, F0 + 5, 7, rd, el);
    for (int k = 0; k < N; k++) check(rd[k] == DW'(f0[5][7 + 3*k]), "H intv 3 readback");
    h_read(ACC_B, 2, F1 + 9, 11, rd, el);
    for (int k = 0; k < N; k++) check(rd[k] == DW'(f1[9 + 2*(k/2)][11 + 2*(k%2)]), "B intv 2 readback");
    // refused access and a partly outside one
    h_read(ACC_V, 5, F0, 0, rd, el);
    check(el == '0, "interval 5 reads nothing");
    h_read(ACC_H, 1, F0 + 3, W - 2, rd, el);
    check(el == 4'b0011 && rd[0] == DW'(f0[3][W-2]) && rd[1] == DW'(f0[3][W-1]) && rd[2] == 0,
          "access past the right edge");
    if (el != '1 && el != '0) n_partial++;

    // 2. programs
    // init (address 0): r4 = 0, r5 = 1, r6 = broadcast word (0)
    lm_wr(0, gen(OP_LDI, 4, 0, 0, 0));
    lm_wr(1, gen(OP_LDI, 5, 0, 0, 1));
    lm_wr(2, gen(OP_IN,  6, 0, 0, 0));
    // difference (address 8)
    lm_wr(8,  mem(OP_LOAD,  1, ACC_B, 1, 0,   0));
    lm_wr(9,  mem(OP_LOAD,  2, ACC_B, 1, F1 - F0, 0));
    lm_wr(10, gen(OP_ADD,   4, 4, 5, 0));
    lm_wr(11, gen(OP_ABSD,  3, 1, 2, 0));
    lm_wr(12, mem(OP_STORE, 3, ACC_B, 1, -F0, 0));
    lm_wr(13, gen(OP_ADD,   6, 6, 3, 0));
    // output (address 16): OUT r6 then OUT r4 (the last one stays in the register)
    lm_wr(16, gen(OP_OUT, 0, 6, 0, 0));
    lm_wr(17, gen(OP_OUT, 0, 4, 0, 0));
    lm_wr(18, gen(OP_OUT, 0, 6, 0, 0));
    pu_rd(0, v); // settle
    lm_addr = 10'd11; #1 check(lm_rdata == gen(OP_ABSD, 3, 1, 2, 0), "local memory readback");

    pu_wr(9, 0);
    run(0, 3, 0, 0, 1, 0, 0, 1);
    check(h_ready, "image port free after a run");

    run(8, 6, F0, F0 + H - 1, 2, 0, W - 1, 2);
    npos = (H / 2) * (W / 2);
    pu_rd(11, cyc); pu_rd(12, stl); pu_rd(13, prs);
    n_pair = prs; n_stall = stl;
    check(prs == npos, $sformatf("one dual issue per position (%0d vs %0d)", prs, npos));
    check(stl == 4 * npos, $sformatf("four stall cycles per position (%0d)", stl));
    check(cyc >= 9 * npos && cyc <= 9 * npos + 8, $sformatf("nine cycles per position (%0d)", cyc));

    run(16, 2, 0, 0, 1, 0, 0, 1);
    for (int k = 0; k < N; k++) begin pu_rd(16 + k, v); check(v == npos, "per-PE position count"); end
    run(18, 1, 0, 0, 1, 0, 0, 1);

    // 3. results
    foreach (sum[k]) sum[k] = 0;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      int d;
      d = f1[y][x] > f0[y][x] ? f1[y][x] - f0[y][x] : f0[y][x] - f1[y][x];
      sum[(y % 2) * 2 + (x % 2)] += d;
    end
    for (int k = 0; k < N; k++) begin
      pu_rd(16 + k, v);
      check(v == int'(sum[k] & 16'hffff), $sformatf("PE %0d difference sum", k));
    end
    for (int x = 0; x < W; x++)
      for (int y = 0; y < H; y += N) begin
        h_read(ACC_V, 1, y, x, rd, el);
        for (int k = 0; k < N; k++) begin
          int d;
          d = f1[y+k][x] > f0[y+k][x] ? f1[y+k][x] - f0[y+k][x] : f0[y+k][x] - f1[y+k][x];
          check(rd[k] == DW'(d) && el[k], $sformatf("difference pixel (%0d,%0d)", y + k, x));
        end
      end

    $display("mechanisms: dual_issue=%0d stall_cycles=%0d conflict=%0d partial=%0d runs=%0d H=%0d V=%0d B=%0d",
             n_pair, n_stall, n_conflict, n_partial, n_irq, n_h, n_v, n_b);
    check(n_pair > 0, "dual issue happened");
    check(n_stall > 0, "load stall happened");
    check(n_conflict > 0, "refused access happened");
    check(n_partial > 0, "partly outside access happened");
    check(n_h > 0 && n_v > 0 && n_b > 0, "all three access types used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
