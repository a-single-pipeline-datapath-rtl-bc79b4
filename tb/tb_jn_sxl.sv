// tb_jn_sxl: checks sign extension of a joined result: the low result is
// ALU blocks 0..b sign-extended from bit 4b+3; the high result is ALU
// blocks M-1 down to b+1 read in reverse block order, sign-extended from
// the MSB of ALU block b+1; with b = M-1 only the low result exists.
module tb_jn_sxl;
  localparam int M = 10, BW = 4;
  logic [39:0] result;
  logic [3:0]  boundary;
  logic [31:0] res_lo, res_hi;
  int checks = 0, failures = 0;

  jn_sxl dut (.result, .boundary, .res_lo, .res_hi);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [39:0] y;
      longint lo_v, hi_v;
      int b, lo_bits, hi_blocks;
      y = {8'($urandom), 32'($urandom)};
      b = (n < 10) ? n : int'($urandom % M);
      result = y; boundary = 4'(b);
      #1;
      lo_bits = (b + 1) * BW;
      lo_v = longint'(y) & ((64'd1 << lo_bits) - 1);
      if (y[lo_bits-1]) lo_v = lo_v | ~((64'd1 << lo_bits) - 1);
      hi_v = 0;
      hi_blocks = M - 1 - b;
      for (int k = 0; k < hi_blocks; k++)
        hi_v = hi_v | (longint'(y[(M-1-k)*BW +: BW]) << (k * BW));
      if (hi_blocks > 0 && y[(b+1)*BW + BW - 1])
        hi_v = hi_v | ~((64'd1 << (hi_blocks * BW)) - 1);
      checks++;
      if (res_lo != lo_v[31:0] || res_hi != hi_v[31:0]) begin
        failures++;
        $display("FAIL y=%h b=%0d lo=%h/%h hi=%h/%h", y, b, res_lo, lo_v[31:0], res_hi, hi_v[31:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
