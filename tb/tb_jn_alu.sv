// tb_jn_alu: checks the partitioned ALU. Two random operations are placed
// by the test bench itself, the low one in regular block order and the
// high one turned around, and each operation's part of the result is
// compared with the plain arithmetic result truncated to its blocks.
// Both the swapped organisation (lower half unshared) and a uniformly
// partitioned ALU are exercised; ADD and SUB in the high position check
// the downward carry chain.
module tb_jn_alu;
  import jn_pkg::*;
  localparam int M = 10, BW = 4;
  logic [39:0] a, b, y_sw, y_un;
  alu_op_e     op_lo, op_hi;
  logic [3:0]  boundary, boundary_sw;
  int checks = 0, failures = 0;

  jn_alu dut (.a, .b, .op_lo, .op_hi, .boundary(boundary_sw), .result(y_sw));
  jn_alu #(.LOW_BLKS(1)) dut_u (.a, .b, .op_lo, .op_hi, .boundary, .result(y_un));

  function automatic longint rnd_val(input int bits);
    longint v;
    v = longint'({$urandom, $urandom});
    if (bits >= 32) return longint'(int'(v[31:0]));
    v = v & ((64'd1 << bits) - 1);
    if (v[bits-1]) v = v | ~((64'd1 << bits) - 1);
    return v;
  endfunction

  function automatic longint calc(input alu_op_e op, input longint x, input longint z);
    case (op)
      ALU_ADD: return x + z;
      ALU_SUB: return x - z;
      ALU_AND: return x & z;
      ALU_OR:  return x | z;
      default: return x ^ z;
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hi_sub_carry = 0;

  initial begin
    for (int n = 0; n < 6000; n++) begin
      int bb, lob, hib;
      longint al, bl, ah, bh, rl, rh, gl, gh, mask_l, mask_h;
      logic [39:0] y;
      bb  = (n % 2 == 0) ? int'(M / 2 - 1 + $urandom % (M / 2 + 1)) : int'($urandom % M);
      lob = bb + 1;
      hib = M - 1 - bb;
      al = rnd_val(lob * BW - 1 - int'($urandom % 3));
      bl = rnd_val(lob * BW - 1 - int'($urandom % 3));
      ah = rnd_val(hib * BW - 1);
      bh = rnd_val(hib * BW - 1);
      if (hib == 0) begin ah = 0; bh = 0; end
      op_lo = alu_op_e'($urandom % 5);
      op_hi = alu_op_e'($urandom % 5);
      boundary = 4'(bb);
      boundary_sw = (n % 2 == 0) ? 4'(bb) : 4'(M - 1);
      for (int i = 0; i < M; i++) begin
        if (i <= bb) begin
          a[i*BW +: BW] = 4'(al >>> (i * BW));
          b[i*BW +: BW] = 4'(bl >>> (i * BW));
        end else begin
          a[i*BW +: BW] = 4'(ah >>> ((M - 1 - i) * BW));
          b[i*BW +: BW] = 4'(bh >>> ((M - 1 - i) * BW));
        end
      end
      #1;
      y = (n % 2 == 0) ? y_sw : y_un;
      rl = calc(op_lo, al, bl);
      rh = calc(op_hi, ah, bh);
      mask_l = (lob * BW >= 64) ? -1 : (64'd1 << (lob * BW)) - 1;
      mask_h = (64'd1 << (hib * BW)) - 1;
      gl = longint'(y) & mask_l & 64'hFF_FFFF_FFFF;
      gh = 0;
      for (int k = 0; k < hib; k++) gh = gh | (longint'(y[(M-1-k)*BW +: BW]) << (k * BW));
      if (hib > 0 && op_hi == ALU_SUB && (ah & 15) < (bh & 15)) hi_sub_carry++;
      checks++;
      if (gl != (rl & mask_l & 64'hFF_FFFF_FFFF) || gh != (rh & mask_h)) begin
        failures++;
        $display("FAIL n=%0d b=%0d %s/%s lo %h,%h -> %h exp %h ; hi %h,%h -> %h exp %h", n, bb,
                 op_lo.name(), op_hi.name(), al, bl, gl, rl & mask_l, ah, bh, gh, rh & mask_h);
      end
    end
    checks++;
    if (hi_sub_carry == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
