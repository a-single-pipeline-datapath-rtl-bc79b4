// tb_jn_dmem: random writes and reads through both ports against a
// reference array; byte addresses of the pipeline port use bits [9:2].
module tb_jn_dmem;
  logic        clk = 0;
  logic [31:0] addr, wdata, rdata, ext_wdata, ext_rdata;
  logic        we, ext_we;
  logic [7:0]  ext_addr;
  logic [31:0] model [256];
  int checks = 0, failures = 0, cycles = 0;

  jn_dmem dut (.clk, .addr, .we, .wdata, .rdata, .ext_addr, .ext_we, .ext_wdata, .ext_rdata);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; wdata = 0;
    for (int k = 0; k < 256; k++) begin
      @(negedge clk);
      ext_we = 1; ext_addr = 8'(k); ext_wdata = $urandom; model[k] = ext_wdata;
    end
    @(negedge clk); ext_we = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      addr = {$urandom} & 32'hFFFF_FFFC | 32'($urandom % 4);
      we = 1'($urandom % 2); wdata = $urandom;
      ext_addr = 8'($urandom); ext_we = 0;
      #1;
      checks += 2;
      if (rdata != model[addr[9:2]]) begin failures++; $display("FAIL read %h", addr); end
      if (ext_rdata != model[ext_addr]) failures++;
      @(posedge clk);
      if (we) model[addr[9:2]] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
