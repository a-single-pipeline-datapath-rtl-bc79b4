// jn_osl: operation-swapping logic.
//
// When two operations share the ALU, one of them needs at most half of the
// M blocks and the other at least half. If the wider one always sits in the
// regular (low) positions, the lower half of the ALU never has to be split
// and can be built as one large block with a short carry path. This unit
// makes that so.
//
//   swap     = join && RBN1 > RBN0
//   low slot = swap ? slot 1 : slot 0   (regular block order)
//   high slot= swap ? slot 0 : slot 1   (turnaround block order)
//   boundary = join ? M-2 - RBN(narrow) : M-1
//
// The narrower operation gets exactly the blocks it needs at the top end of
// the ALU and the wider one all the rest, so the boundary is never below
// M/2-1. Operands, ALU function and destination travel together in a slot,
// so swapping the slot swaps all of them. Swapping on "op 1 wider" and the
// boundary formula are this implementation's reading of the scheme; the
// list of swapped signals follows the published one.
//
// Interface: the two slots in program order, rbn0, rbn1, join in; low and
// high slot, the remapped boundary and the swap flag out.
// Timing: purely combinational.
module jn_osl
  import jn_pkg::*;
#(
  parameter int unsigned BLK_W = jn_pkg::JN_BLK_W,
  parameter int unsigned ALU_W = jn_pkg::JN_ALU_W,
  parameter int unsigned SBNW  = 3,
  localparam int unsigned M    = ALU_W / BLK_W,
  localparam int unsigned OBW  = $clog2(M)
) (
  input  slot_t           s0,
  input  slot_t           s1,
  input  logic [SBNW-1:0] rbn0,
  input  logic [SBNW-1:0] rbn1,
  input  logic            join_ok,
  output slot_t           lo,
  output slot_t           hi,
  output logic [OBW-1:0]  boundary,
  output logic            swap
);

  logic [SBNW-1:0] narrow;

  always_comb begin
    swap     = join_ok && (rbn1 > rbn0);
    narrow   = swap ? rbn0 : rbn1;
    lo       = swap ? s1 : s0;
    hi       = swap ? s0 : s1;
    if (!join_ok) hi.valid = 1'b0;
    boundary = join_ok ? OBW'(M - 2) - OBW'(narrow) : OBW'(M - 1);
  end

endmodule
