// tb_jn_wdl: checks the width-determination logic against a reference that
// counts significant bits directly: find the highest bit j that differs
// from the sign bit; the value then needs j+3 bits (magnitude, sign and one
// reserved bit), i.e. ceil((j+3)/4) blocks, at most the whole word.
module tb_jn_wdl;
  localparam int XLEN = 32, BLK_W = 4, NB = XLEN / BLK_W;
  logic [XLEN-1:0] value;
  logic [NB-1:0]   br;
  logic [2:0]      sbn;
  int checks = 0, failures = 0;

  jn_wdl #(.XLEN(XLEN), .BLK_W(BLK_W)) dut (.value, .br, .sbn);

  function automatic int ref_sbn(input logic [XLEN-1:0] v);
    int j = -1, bits, blocks;
    for (int k = XLEN - 2; k >= 0; k--)
      if (v[k] != v[XLEN-1]) begin j = k; break; end
    if (j < 0) return 0;
    bits   = j + 3;
    blocks = (bits + BLK_W - 1) / BLK_W;
    if (blocks > NB) blocks = NB;
    return blocks - 1;
  endfunction

  task automatic check(input logic [XLEN-1:0] v);
    value = v;
    #1;
    checks++;
    if (int'(sbn) != ref_sbn(v)) begin
      failures++;
      $display("FAIL value=%h sbn=%0d expected %0d", v, sbn, ref_sbn(v));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // boundaries around every block edge, positive and negative
    for (int k = 0; k < XLEN; k++) begin
      check(32'd1 << k);
      check((32'd1 << k) - 1);
      check(-(32'd1 << k));
      check(~((32'd1 << k) - 1) ^ 32'd1);
    end
    check(32'd0);
    check(32'hFFFF_FFFF);
    check(32'd5);     // 0101: j=2 -> 5 bits -> 2 blocks
    check(32'd1);     // j=0 -> 3 bits -> 1 block
    for (int n = 0; n < 3000; n++) begin
      logic [XLEN-1:0] r;
      r = $urandom;
      check($signed(r) >>> ($urandom % 32));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
