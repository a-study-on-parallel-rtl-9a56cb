// tb_mams: self-checking testbench of the multi-access memory system.
//
// A golden image held in the testbench mirrors every write. The image is first
// filled with row-wise horizontal writes, then a stream of random accesses (all
// three types, intervals 1..15, origins partly outside the image) is issued one
// per cycle, with reads and writes mixed. Each read's expected words are taken
// from the golden image when it is issued and compared four cycles later, which
// also checks the read latency and the one-access-per-cycle rate. Refused
// accesses (interval a multiple of 5) must raise conflict and touch nothing.
module tb_mams;
  import pps_pkg::*;
  localparam int N = 4, M = 5, W = 22, R = 10, DW = 16, TW = 3;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic req_valid, req_we, rvalid, conflict;
  acc_t acc;
  logic [INTV_W-1:0] intv;
  logic signed [CRD_W-1:0] y, x;
  logic [DW-1:0] wdata [N], rdata [N];
  logic [TW-1:0] tag, rtag;
  logic [N-1:0] relem;

  mams #(.N_PE(N), .M_MOD(M), .IMG_W(W), .ROWS(R), .DATA_W(DW), .TAG_W(TW)) dut (.*);

  int checks = 0, failures = 0;
  logic [DW-1:0] gold [R][W];

  typedef struct { int cyc; logic is_rd; logic [TW-1:0] tag; logic [DW-1:0] d [N]; logic [N-1:0] e; logic conf; } exp_t;
  exp_t q [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic void coords(acc_t a, int r, int yy, int xx, int k, output int ye, output int xe);
    ye = yy + elem_dy(a, INTV_W'(r), k);
    xe = xx + elem_dx(a, INTV_W'(r), k);
  endfunction

  // Issue one access in the current cycle and record what it should return.
  task automatic issue(acc_t a, int r, int yy, int xx, logic we, logic [DW-1:0] wd [N]);
    exp_t e;
    int ye, xe;
    logic conf;
    conf = (a == ACC_RSV) || (module_step(a, INTV_W'(r), M) == 0);
    @(negedge clk);
    req_valid = 1; req_we = we; acc = a; intv = INTV_W'(r);
    y = CRD_W'(yy); x = CRD_W'(xx); tag = TW'($urandom);
    for (int k = 0; k < N; k++) wdata[k] = wd[k];
    e.cyc = cyc + 4; e.is_rd = !we; e.conf = conf; e.e = '0;
    for (int k = 0; k < N; k++) begin
      coords(a, r, yy, xx, k, ye, xe);
      e.d[k] = '0;
      if (!conf && ye >= 0 && ye < R && xe >= 0 && xe < W) begin
        e.e[k] = 1;
        if (we) gold[ye][xe] = wd[k];
        else    e.d[k] = gold[ye][xe];
      end
    end
    e.tag = tag;
    q.push_back(e);
    @(posedge clk);
    #1 req_valid = 0;
  endtask

  // Checker: runs every cycle on the outputs.
  int reads_seen = 0, conflicts_seen = 0;
  always @(negedge clk) if (!rst) begin
    foreach (q[i]) begin
      if (q[i].cyc == cyc) begin
        checks++;
        if (q[i].is_rd) begin
          if (!rvalid || relem !== q[i].e || rtag !== q[i].tag) begin
            failures++; $display("FAIL rd ctl cyc=%0d rvalid=%0b relem=%b exp %b", cyc, rvalid, relem, q[i].e);
          end
          for (int k = 0; k < N; k++) if (rdata[k] !== q[i].d[k]) begin
            failures++; $display("FAIL rd data cyc=%0d k=%0d got %h exp %h", cyc, k, rdata[k], q[i].d[k]);
          end
          reads_seen++;
        end else if (rvalid) begin
          failures++; $display("FAIL rvalid on a write cyc=%0d", cyc);
        end
      end
      if (q[i].cyc == cyc + 3) begin   // conflict flag in the cycle after issue
        checks++;
        if (conflict !== q[i].conf) begin failures++; $display("FAIL conflict cyc=%0d", cyc); end
        if (conflict) conflicts_seen++;
      end
    end
    while (q.size() > 0 && q[0].cyc < cyc) void'(q.pop_front());
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] wd [N];
    req_valid = 0; req_we = 0; acc = ACC_H; intv = 1; y = 0; x = 0; tag = 0;
    foreach (wdata[k]) wdata[k] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    // Fill the image.
    for (int yy = 0; yy < R; yy++)
      for (int xx = 0; xx < W; xx += N) begin
        foreach (wd[k]) wd[k] = DW'($urandom);
        issue(ACC_H, 1, yy, xx, 1, wd);
      end
    // Read it back whole, horizontally and vertically.
    for (int yy = 0; yy < R; yy++)
      for (int xx = 0; xx < W; xx += N) issue(ACC_H, 1, yy, xx, 0, wd);
    for (int xx = 0; xx < W; xx++)
      for (int yy = 0; yy < R; yy += N) issue(ACC_V, 1, yy, xx, 0, wd);
    // Random mix.
    for (int i = 0; i < 3000; i++) begin
      acc_t a;
      a = acc_t'($urandom_range(0, 2));
      if (i % 50 == 0) a = ACC_RSV;
      foreach (wd[k]) wd[k] = DW'($urandom);
      issue(a, $urandom_range(1, 15), $urandom_range(0, R + 2) - 2, $urandom_range(0, W + 2) - 2,
            ($urandom_range(0, 3) == 0), wd);
    end
    repeat (8) @(posedge clk);
    checks++;
    if (reads_seen < 1000 || conflicts_seen < 10) begin
      failures++; $display("FAIL too few reads (%0d) or conflicts (%0d)", reads_seen, conflicts_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
