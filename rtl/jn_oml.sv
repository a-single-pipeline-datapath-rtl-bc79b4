// jn_oml: operand-merging logic, turnaround ordering.
//
// Merges one operand of the low operation and the same operand of the high
// operation into one ALU_W-bit ALU operand. The low operation keeps its
// blocks in regular order from ALU block 0 upwards; the high operation is
// placed with its blocks turned around, its least significant block in ALU
// block M-1, its block k in ALU block M-1-k. Each ALU block therefore
// chooses between only two operand blocks, with a 2-to-1 multiplexer
// group, and no shifting or alignment is needed.
//
// The OM decoder turns the operand-boundary b into one select per block,
// S_i = (i > b): block i belongs to the high operation when S_i is 1. With
// b = M-1 no block is shared. Blocks beyond an operand's XLEN bits carry its
// sign, so an operation given more blocks than its word has still computes
// a correctly extended result. Decoder and multiplexer structure follow the
// published design; the sign fill of the extra blocks is this
// implementation's choice.
//
// Interface: lo and hi operands (XLEN), boundary in; merged operand
// (ALU_W) and the S vector out. Timing: purely combinational.
module jn_oml #(
  parameter int unsigned XLEN  = jn_pkg::JN_XLEN,
  parameter int unsigned BLK_W = jn_pkg::JN_BLK_W,
  parameter int unsigned ALU_W = jn_pkg::JN_ALU_W,
  localparam int unsigned NB   = XLEN / BLK_W,
  localparam int unsigned M    = ALU_W / BLK_W,
  localparam int unsigned OBW  = $clog2(M)
) (
  input  logic [XLEN-1:0]  op_lo,
  input  logic [XLEN-1:0]  op_hi,
  input  logic [OBW-1:0]   boundary,
  output logic [ALU_W-1:0] merged,
  output logic [M-1:0]     sel
);

  function automatic logic [BLK_W-1:0] blk(input logic [XLEN-1:0] v, input int unsigned k);
    if (k < NB) return v[k*BLK_W +: BLK_W];
    return {BLK_W{v[XLEN-1]}};
  endfunction

  // OM decoder
  always_comb
    for (int unsigned i = 0; i < M; i++) sel[i] = (i > 32'(boundary));

  // OM blocks
  always_comb
    for (int unsigned i = 0; i < M; i++)
      merged[i*BLK_W +: BLK_W] = sel[i] ? blk(op_hi, M - 1 - i) : blk(op_lo, i);

endmodule
