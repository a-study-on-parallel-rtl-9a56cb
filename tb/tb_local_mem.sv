// tb_local_mem: fills the local memory through the write port and reads it
// back on the write port's read path and on both issue read ports.
module tb_local_mem;
  localparam int D = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  logic pu_we; logic [5:0] pu_addr, raddr0, raddr1; logic [31:0] pu_wdata, pu_rdata, rdata0, rdata1;
  local_mem #(.DEPTH(D)) dut (.*);
  int checks = 0, failures = 0;
  logic [31:0] model [D];
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    pu_we = 0; pu_addr = 0; pu_wdata = 0; raddr0 = 0; raddr1 = 0;
    for (int a = 0; a < D; a++) begin
      @(negedge clk); model[a] = $urandom; pu_we = 1; pu_addr = 6'(a); pu_wdata = model[a];
    end
    @(negedge clk); pu_we = 0;
    for (int i = 0; i < 500; i++) begin
      pu_addr = 6'($urandom); raddr0 = 6'($urandom); raddr1 = raddr0 + 1;
      #1;
      checks += 3;
      if (pu_rdata !== model[pu_addr]) failures++;
      if (rdata0 !== model[raddr0]) failures++;
      if (rdata1 !== model[raddr1]) failures++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
