// jn_sxl: sign-extending logic for the joined result.
//
// Splits the ALU_W-bit joined result into the two operations' XLEN-bit
// results. Every result block goes through a sign-extending block (SEB):
// with its pass signal set it passes the block, otherwise it fills the
// block with the sign bit.
//   low result:  block k passes when k <= b; sign bit = MSB of ALU block b
//   high result: block k is ALU block M-1-k; it passes when M-1-k > b;
//                sign bit = MSB of ALU block b+1 (the high operation's
//                most significant block)
// where b is the operand-boundary. With b = M-1 the low result is the
// plain lower XLEN bits and the high result is zero. Pass and sign-bit
// generation follow the published scheme and are decoded from the boundary.
//
// Interface: joined result and boundary in; res_lo, res_hi out.
// Timing: purely combinational.
module jn_sxl #(
  parameter int unsigned XLEN  = jn_pkg::JN_XLEN,
  parameter int unsigned BLK_W = jn_pkg::JN_BLK_W,
  parameter int unsigned ALU_W = jn_pkg::JN_ALU_W,
  localparam int unsigned NB   = XLEN / BLK_W,
  localparam int unsigned M    = ALU_W / BLK_W,
  localparam int unsigned OBW  = $clog2(M)
) (
  input  logic [ALU_W-1:0] result,
  input  logic [OBW-1:0]   boundary,
  output logic [XLEN-1:0]  res_lo,
  output logic [XLEN-1:0]  res_hi
);

  logic          sign_lo, sign_hi, joined;
  logic [NB-1:0] pass_lo, pass_hi;

  // Sign-bit generation: the MSB of the owning operation's top block.
  always_comb begin
    joined  = 32'(boundary) < M - 1;
    sign_lo = 1'b0;
    sign_hi = 1'b0;
    for (int unsigned i = 0; i < M; i++) begin
      if (i == 32'(boundary))     sign_lo = result[i*BLK_W + BLK_W - 1];
      if (i == 32'(boundary) + 1) sign_hi = result[i*BLK_W + BLK_W - 1];
    end
  end

  // Pass generation and SEBs.
  always_comb begin
    for (int unsigned k = 0; k < NB; k++) begin
      pass_lo[k] = k <= 32'(boundary);
      pass_hi[k] = joined && (M - 1 - k > 32'(boundary));
      res_lo[k*BLK_W +: BLK_W] = pass_lo[k] ? result[k*BLK_W +: BLK_W] : {BLK_W{sign_lo}};
      if (!joined)
        res_hi[k*BLK_W +: BLK_W] = '0;
      else if (pass_hi[k])
        res_hi[k*BLK_W +: BLK_W] = result[(M-1-k)*BLK_W +: BLK_W];
      else
        res_hi[k*BLK_W +: BLK_W] = {BLK_W{sign_hi}};
    end
  end

endmodule
