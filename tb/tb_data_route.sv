// tb_data_route: checks both routing directions. Write: PE word k, given with
// module step d, must reach module (mu0 + k*d) mod 5 two cycles later. Read:
// the word of module (mu0 + k*d) mod 5 must reach PE k one cycle later.
module tb_data_route;
  import pps_pkg::*;
  localparam int N = 4, M = 5, DW = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [2:0] d_a, mu0_w, mu0_r, d_r;
  logic [DW-1:0] pe_wdata [N], mod_wdata [M], mod_rdata [M], pe_rdata [N];
  data_route #(.N_PE(N), .M_MOD(M), .DATA_W(DW)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int d, mu; logic [DW-1:0] w [N], r [M];
    d_a = 1; mu0_w = 0; mu0_r = 0; d_r = 1;
    pe_wdata = '{default: '0}; mod_rdata = '{default: '0};
    repeat (2) @(negedge clk); rst = 0;
    for (int i = 0; i < 500; i++) begin
      d = $urandom_range(1, 4); mu = $urandom_range(0, 4);
      // write direction
      @(negedge clk);
      d_a = 3'(d); foreach (w[k]) w[k] = DW'($urandom); pe_wdata = w;
      @(negedge clk); @(negedge clk);
      mu0_w = 3'(mu); #1;
      for (int k = 0; k < N; k++) begin
        checks++;
        if (mod_wdata[(mu + k*d) % M] !== w[k]) begin failures++; $display("FAIL write k=%0d d=%0d", k, d); end
      end
      // read direction
      foreach (r[m]) r[m] = DW'($urandom);
      mod_rdata = r; mu0_r = 3'(mu);
      @(negedge clk);
      d_r = 3'(d); #1;
      for (int k = 0; k < N; k++) begin
        checks++;
        if (pe_rdata[k] !== r[(mu + k*d) % M]) begin failures++; $display("FAIL read k=%0d d=%0d", k, d); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
