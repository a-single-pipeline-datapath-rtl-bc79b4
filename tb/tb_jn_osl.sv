// tb_jn_osl: checks operation swapping: the wider operation goes to the low
// position, the narrow one gets exactly its blocks at the top, and the
// boundary never falls below M/2-1 for a joined pair.
module tb_jn_osl;
  import jn_pkg::*;
  localparam int M = 10;
  slot_t s0, s1, lo, hi;
  logic [2:0] rbn0, rbn1;
  logic       join_ok, swap;
  logic [3:0] boundary;
  int checks = 0, failures = 0;

  jn_osl dut (.s0, .s1, .rbn0, .rbn1, .join_ok, .lo, .hi, .boundary, .swap);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int eb;
      logic es;
      s0 = '0; s1 = '0;
      s0.valid = 1; s1.valid = 1;
      s0.a = $urandom; s0.b = $urandom; s0.rd = 5'($urandom); s0.op = ALU_SUB;
      s1.a = $urandom; s1.b = $urandom; s1.rd = 5'($urandom); s1.op = ALU_XOR;
      rbn0 = 3'($urandom); rbn1 = 3'($urandom);
      join_ok = (int'(rbn0) + int'(rbn1) <= M - 2) && ($urandom % 3 != 0);
      #1;
      es = join_ok && rbn1 > rbn0;
      eb = !join_ok ? M - 1 : (es ? M - 2 - int'(rbn0) : M - 2 - int'(rbn1));
      checks++;
      if (swap != es || int'(boundary) != eb || lo != (es ? s1 : s0) ||
          (join_ok && hi != (es ? s0 : s1)) || (!join_ok && hi.valid) ||
          (join_ok && int'(boundary) < M / 2 - 1)) begin
        failures++;
        $display("FAIL rbn %0d %0d join %b -> swap %b b=%0d", rbn0, rbn1, join_ok, swap, boundary);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
