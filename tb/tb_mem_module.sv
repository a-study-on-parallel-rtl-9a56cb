// tb_mem_module: random back-to-back reads and writes against a model array.
// Address and enable go in at cycle t; write data at t+1; read data appears
// after the edge that ends t+1.
module tb_mem_module;
  localparam int D = 64, DW = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic en, we; logic [5:0] addr; logic [DW-1:0] wdata, rdata;
  mem_module #(.DEPTH(D), .DATA_W(DW)) dut (.*);
  int checks = 0, failures = 0;
  logic [DW-1:0] model [D];
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic p_en, p_we; logic [5:0] p_a; logic [DW-1:0] p_exp, nxt;
    en = 0; we = 0; addr = 0; wdata = 0; p_en = 0; p_we = 0; p_a = 0; p_exp = 0;
    repeat (2) @(negedge clk); rst = 0;
    for (int a = 0; a < D; a++) model[a] = 0;
    for (int i = 0; i < 3000; i++) begin
      // this cycle: new op on addr/en/we; data for the previous op
      en = (i < D) ? 1 : ($urandom_range(0, 3) != 0);
      we = (i < D) ? 1 : $urandom_range(0, 1);
      addr = (i < D) ? 6'(i) : 6'($urandom);
      nxt = DW'($urandom);
      wdata = p_we ? nxt : DW'($urandom);
      if (p_en && p_we) model[p_a] = nxt;
      if (p_en && !p_we) p_exp = model[p_a];
      @(negedge clk);
      if (p_en && !p_we) begin
        checks++;
        if (rdata !== p_exp) begin failures++; $display("FAIL read %0d got %h exp %h", p_a, rdata, p_exp); end
      end
      p_en = en; p_we = we; p_a = addr;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
