// tb_jn_wcl: checks the width-check logic: required blocks per operation
// are the larger operand width, joining needs (RBN0+1)+(RBN1+1) <= M and
// both other checks; the boundary is RBN0 when joined, M-1 otherwise.
module tb_jn_wcl;
  localparam int M = 10;
  logic [2:0] s0a, s0b, s1a, s1b, rbn0, rbn1;
  logic       type_ok, dep_ok, rbn_ok, join_ok;
  logic [3:0] boundary;
  int checks = 0, failures = 0;

  jn_wcl dut (.sbn0_a(s0a), .sbn0_b(s0b), .sbn1_a(s1a), .sbn1_b(s1b),
              .type_ok, .dep_ok, .rbn0, .rbn1, .rbn_ok, .join_ok, .boundary);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4096; n++) begin
      int x, y, eb;
      logic ej;
      {s0a, s0b, s1a, s1b} = n[11:0];
      type_ok = ($urandom % 4) != 0;
      dep_ok  = ($urandom % 4) != 0;
      #1;
      x  = (s0a > s0b ? int'(s0a) : int'(s0b)) + 1;
      y  = (s1a > s1b ? int'(s1a) : int'(s1b)) + 1;
      ej = (x + y <= M) && type_ok && dep_ok;
      eb = ej ? x - 1 : M - 1;
      checks++;
      if (int'(rbn0) != x - 1 || int'(rbn1) != y - 1 || join_ok != ej ||
          int'(boundary) != eb || rbn_ok != (x + y <= M)) begin
        failures++;
        $display("FAIL sbn=%0d %0d %0d %0d t=%b d=%b -> rbn %0d %0d join %b b=%0d",
                 s0a, s0b, s1a, s1b, type_ok, dep_ok, rbn0, rbn1, join_ok, boundary);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
