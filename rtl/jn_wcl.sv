// jn_wcl: width-check logic.
//
// Decides whether two operations fit side by side in the M-block ALU and
// produces the operand-boundary signal that steers the operand merging,
// the ALU and the sign extension.
//
// For each operation a comparator (CMP) tells whether SBN_A > SBN_B and a
// mux picks the larger one: the required block count RBN (blocks minus
// one). The RBN check passes when RBN0 + RBN1 <= M-2, i.e. when the two
// operations need at most M blocks together. When that check, the
// type-check and the data-dependency check all pass, the operations are
// joined and the boundary is RBN0 (operation 0 owns blocks 0..RBN0);
// otherwise the boundary is M-1 and operation 0 owns the whole ALU.
// This is the published scheme. The RBN check is written as an adder and
// compare instead of the enumerated gate network.
//
// Interface: four SBNs, type_ok, dep_ok in; rbn0, rbn1, join, boundary out.
// Timing: purely combinational.
module jn_wcl #(
  parameter int unsigned XLEN  = jn_pkg::JN_XLEN,
  parameter int unsigned BLK_W = jn_pkg::JN_BLK_W,
  parameter int unsigned ALU_W = jn_pkg::JN_ALU_W,
  localparam int unsigned NB   = XLEN / BLK_W,
  localparam int unsigned M    = ALU_W / BLK_W,
  localparam int unsigned SBNW = (NB > 1) ? $clog2(NB) : 1,
  localparam int unsigned OBW  = $clog2(M)
) (
  input  logic [SBNW-1:0] sbn0_a,
  input  logic [SBNW-1:0] sbn0_b,
  input  logic [SBNW-1:0] sbn1_a,
  input  logic [SBNW-1:0] sbn1_b,
  input  logic            type_ok,
  input  logic            dep_ok,
  output logic [SBNW-1:0] rbn0,
  output logic [SBNW-1:0] rbn1,
  output logic            rbn_ok,
  output logic            join_ok,
  output logic [OBW-1:0]  boundary
);

  // CMP: a > b, the same function as the sum-of-products comparator.
  function automatic logic gt(input logic [SBNW-1:0] a, input logic [SBNW-1:0] b);
    logic r, eq_above;
    r        = 1'b0;
    eq_above = 1'b1;
    for (int k = int'(SBNW) - 1; k >= 0; k--) begin
      r        = r | (eq_above & a[k] & ~b[k]);
      eq_above = eq_above & ~(a[k] ^ b[k]);
    end
    return r;
  endfunction

  always_comb begin
    rbn0     = gt(sbn0_a, sbn0_b) ? sbn0_a : sbn0_b;
    rbn1     = gt(sbn1_a, sbn1_b) ? sbn1_a : sbn1_b;
    rbn_ok   = ((OBW+1)'(rbn0) + (OBW+1)'(rbn1)) <= (OBW+1)'(M - 2);
    join_ok  = rbn_ok && type_ok && dep_ok;
    boundary = join_ok ? OBW'(rbn0) : OBW'(M - 1);
  end

endmodule
