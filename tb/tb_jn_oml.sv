// tb_jn_oml: checks operand merging: ALU block i holds block i of the low
// operand when i <= boundary and block M-1-i of the high operand otherwise,
// with blocks beyond the 32-bit word filled with the operand's sign.
module tb_jn_oml;
  localparam int M = 10, BW = 4;
  logic [31:0] lo, hi;
  logic [3:0]  boundary;
  logic [39:0] merged;
  logic [9:0]  sel;
  int checks = 0, failures = 0;

  jn_oml dut (.op_lo(lo), .op_hi(hi), .boundary, .merged, .sel);

  function automatic logic [3:0] nib(input logic [31:0] v, input int k);
    logic [63:0] x;
    x = {{32{v[31]}}, v};
    return x[k*4 +: 4];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [39:0] exp;
      logic [9:0]  es;
      lo = $urandom; hi = $urandom;
      boundary = 4'($urandom % M);
      #1;
      for (int i = 0; i < M; i++) begin
        es[i] = i > int'(boundary);
        exp[i*BW +: BW] = es[i] ? nib(hi, M - 1 - i) : nib(lo, i);
      end
      checks++;
      if (merged != exp || sel != es) begin
        failures++;
        $display("FAIL lo=%h hi=%h b=%0d merged=%h exp=%h", lo, hi, boundary, merged, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
