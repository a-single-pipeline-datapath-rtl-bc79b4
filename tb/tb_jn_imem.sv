// tb_jn_imem: loads random words and reads them back on both read ports.
module tb_jn_imem;
  logic        clk = 0, we;
  logic [7:0]  waddr, raddr0, raddr1;
  logic [31:0] wdata, rdata0, rdata1;
  logic [31:0] model [256];
  int checks = 0, failures = 0, cycles = 0;

  jn_imem dut (.clk, .we, .waddr, .wdata, .raddr0, .raddr1, .rdata0, .rdata1);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 256; k++) begin
      @(negedge clk);
      we = 1; waddr = 8'(k); wdata = $urandom; model[k] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 1000; n++) begin
      raddr0 = 8'($urandom); raddr1 = raddr0 + 8'd1;
      #1;
      checks++;
      if (rdata0 != model[raddr0] || rdata1 != model[raddr1]) failures++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
