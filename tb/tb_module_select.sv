// tb_module_select: checks the module selection stage against a direct
// computation: every live element k of a random access must enable module
// (2*y_k + x_k) mod 5, no other module may be enabled, and mu0, d and the
// conflict flag must match, one cycle after the request.
module tb_module_select;
  import pps_pkg::*;
  localparam int N = 4, M = 5, W = 30, R = 20;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic req_valid; acc_t acc; logic [INTV_W-1:0] intv; logic signed [CRD_W-1:0] y, x;
  logic [2:0] d_a, mu0_q, d_q; logic [M-1:0] slot_en_a, slot_en_q, mod_en; logic conflict_q;
  module_select #(.N_PE(N), .M_MOD(M), .IMG_W(W), .ROWS(R)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [M-1:0] exp_en; int ye, xe, emu; logic econf;
    req_valid = 0; acc = ACC_H; intv = 1; y = 0; x = 0;
    repeat (2) @(negedge clk); rst = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      req_valid = ($urandom_range(0, 7) != 0);
      acc = acc_t'($urandom_range(0, 3)); intv = INTV_W'($urandom_range(1, 15));
      y = CRD_W'($urandom_range(0, R + 4) - 2); x = CRD_W'($urandom_range(0, W + 4) - 2);
      econf = (acc == ACC_RSV) || (intv % 5 == 0);
      exp_en = '0;
      for (int k = 0; k < N; k++) begin
        ye = int'(y) + elem_dy(acc, intv, k); xe = int'(x) + elem_dx(acc, intv, k);
        if (req_valid && !econf && ye >= 0 && ye < R && xe >= 0 && xe < W) begin
          checks++;
          if (exp_en[(2*ye + xe) % M]) begin failures++; $display("FAIL reference collision"); end
          exp_en[(2*ye + xe) % M] = 1;
        end
      end
      emu = ((2*int'(y) + int'(x)) % M + M) % M;
      @(negedge clk);
      checks++;
      if (mod_en !== exp_en || conflict_q !== (req_valid && econf) || (req_valid && mu0_q != 3'(emu))) begin
        failures++;
        $display("FAIL acc=%0d r=%0d y=%0d x=%0d en=%b exp %b mu0=%0d exp %0d", acc, intv, y, x, mod_en, exp_en, mu0_q, emu);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
