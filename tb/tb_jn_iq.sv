// tb_jn_iq: feeds the queue from a memory model and consumes 0, 1 or 2
// entries at random; entry 0 must always be the instruction at the
// reported address and entry 1 the one after it, so no instruction is lost
// or repeated.
module tb_jn_iq;
  logic        clk = 0, rst_n = 0;
  logic [1:0]  consume;
  logic [7:0]  fa0, fa1;
  logic [31:0] fd0, fd1, e0_instr, e1_instr, e0_pc;
  logic        e0_valid, e1_valid;
  int checks = 0, failures = 0, cycles = 0;

  jn_iq #(.AW(8)) dut (.clk, .rst_n, .consume, .fetch_addr0(fa0), .fetch_addr1(fa1),
                      .fetch_data0(fd0), .fetch_data1(fd1), .e0_valid, .e0_instr,
                      .e1_valid, .e1_instr, .e0_pc);

  // memory model: word k holds a recognisable pattern
  assign fd0 = 32'hA500_0000 | 32'(fa0);
  assign fd1 = 32'hA500_0000 | 32'(fa1);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int expected_pc = 0;
    consume = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1;
    checks++;
    if (e0_valid) failures++;           // empty right after reset
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      checks++;
      if (!e0_valid || !e1_valid || e0_pc != 32'(expected_pc) ||
          e0_instr != (32'hA500_0000 | 32'((expected_pc / 4) % 256)) ||
          e1_instr != (32'hA500_0000 | 32'((expected_pc / 4 + 1) % 256))) begin
        failures++;
        $display("FAIL pc=%0d/%0d e0=%h e1=%h", e0_pc, expected_pc, e0_instr, e1_instr);
      end
      consume = 2'($urandom % 3);
      expected_pc += 4 * int'(consume);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
