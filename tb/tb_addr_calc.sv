// tb_addr_calc: checks the address calculation and routing stage. For random
// accesses it drives d (module step) in the request cycle and mu0 (origin
// module) in the next, as the module selection stage would, and checks that the
// module holding element k, (2*y_k + x_k) mod 5, receives the address
// y_k*S + floor(x_k/4) one cycle after the request.
module tb_addr_calc;
  import pps_pkg::*;
  localparam int N = 4, M = 5, W = 30, R = 20, S = (W + N - 1) / N, AW = $clog2(R * S);
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  acc_t acc; logic [INTV_W-1:0] intv; logic signed [CRD_W-1:0] y, x;
  logic [2:0] d_a, mu0_q; logic [AW-1:0] maddr [M];
  addr_calc #(.N_PE(N), .M_MOD(M), .IMG_W(W), .ROWS(R)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int ye [N], xe [N]; logic live [N];
    acc = ACC_H; intv = 1; y = 0; x = 0; d_a = 1; mu0_q = 0;
    repeat (2) @(negedge clk); rst = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      acc = acc_t'($urandom_range(0, 2));
      do intv = INTV_W'($urandom_range(1, 15)); while (intv % 5 == 0);
      y = CRD_W'($urandom_range(0, R + 2) - 1); x = CRD_W'($urandom_range(0, W + 2) - 1);
      d_a = 3'(module_step(acc, intv, M));
      for (int k = 0; k < N; k++) begin
        ye[k] = int'(y) + elem_dy(acc, intv, k); xe[k] = int'(x) + elem_dx(acc, intv, k);
        live[k] = ye[k] >= 0 && ye[k] < R && xe[k] >= 0 && xe[k] < W;
      end
      @(negedge clk);
      mu0_q = 3'(((2*int'(y) + int'(x)) % M + M) % M);
      #1;
      for (int k = 0; k < N; k++) if (live[k]) begin
        checks++;
        if (maddr[(2*ye[k] + xe[k]) % M] != AW'(ye[k] * S + xe[k] / N)) begin
          failures++; $display("FAIL k=%0d (%0d,%0d) got %0d", k, ye[k], xe[k], maddr[(2*ye[k] + xe[k]) % M]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
