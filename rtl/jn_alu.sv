// jn_alu: partitioned ALU shared by two operations in turnaround order.
//
// Performs ADD, SUB, AND, OR and XOR for a low operation, which occupies
// ALU blocks 0..b in regular order, and a high operation, which occupies
// blocks M-1 down to b+1 with its blocks turned around (b is the
// operand-boundary; b = M-1 means the low operation has the whole ALU).
//
// Function select: every block of the upper part takes the function of
// the low or the high operation, chosen by a cut signal derived from the
// boundary, the logic equivalent of the function-select lines driven from
// both ends and cut by pass transistors.
// Carry: the low operation's carry runs upwards, from block i-1 into
// block i; the high operation's carry runs downwards, from block i+1 into
// block i, because its less significant blocks sit higher. The carry-in of
// each block is therefore chosen between its two neighbours. To keep the
// netlist free of combinational loops the upward and the downward chain
// are computed separately and each block picks its carry-in from one of
// them; this is logically the same as the published single chain with a
// carry-in multiplexer per block. SUB inverts operand B in the blocks of
// that operation and feeds a carry-in of 1 into its least significant
// block (block 0, or block M-1 for the high operation).
//
// With operation swapping the wider operation is always the low one, so
// the lowest LOW_BLKS blocks (default M/2) are never shared and form one
// large block. Set LOW_BLKS to 1 for a uniformly partitioned ALU. The
// boundary must then be at least LOW_BLKS-1; the pipeline around the ALU
// checks this every cycle.
//
// Interface: merged operands a, b (ALU_W), functions op_lo and op_hi,
// boundary in; joined result out. Timing: purely combinational.
module jn_alu
  import jn_pkg::*;
#(
  parameter int unsigned BLK_W    = jn_pkg::JN_BLK_W,
  parameter int unsigned ALU_W    = jn_pkg::JN_ALU_W,
  parameter int unsigned LOW_BLKS = (ALU_W / BLK_W) / 2,
  localparam int unsigned M       = ALU_W / BLK_W,
  localparam int unsigned OBW     = $clog2(M),
  localparam int unsigned LOW_W   = LOW_BLKS * BLK_W
) (
  input  logic [ALU_W-1:0] a,
  input  logic [ALU_W-1:0] b,
  input  alu_op_e          op_lo,
  input  alu_op_e          op_hi,
  input  logic [OBW-1:0]   boundary,
  output logic [ALU_W-1:0] result
);

  logic [M-1:0]  hi_blk;        // block belongs to the high operation
  logic [M:0]    cu;            // upward chain: cu[i] is the carry into block i
  logic [M:0]    cd;            // downward chain: cd[i+1] is the carry into block i
  alu_op_e       fsel [M];      // function of each block
  logic [ALU_W-1:0] beff;       // operand B after SUB inversion

  // Function select (cut position) and B inversion.
  always_comb begin
    for (int unsigned i = 0; i < M; i++) begin
      hi_blk[i] = (i >= LOW_BLKS) && (i > 32'(boundary));
      fsel[i]   = hi_blk[i] ? op_hi : op_lo;
      beff[i*BLK_W +: BLK_W] = (fsel[i] == ALU_SUB) ? ~b[i*BLK_W +: BLK_W]
                                                     :  b[i*BLK_W +: BLK_W];
    end
  end

  // Upward chain: the merged low block first, then one block at a time.
  always_comb begin
    logic [LOW_W:0] s0;
    cu = '0;
    s0 = {1'b0, a[LOW_W-1:0]} + {1'b0, beff[LOW_W-1:0]} + (LOW_W+1)'(op_lo == ALU_SUB);
    cu[LOW_BLKS] = s0[LOW_W];
    for (int unsigned i = LOW_BLKS; i < M; i++) begin
      logic [BLK_W:0] s;
      s = {1'b0, a[i*BLK_W +: BLK_W]} + {1'b0, beff[i*BLK_W +: BLK_W]} + (BLK_W+1)'(cu[i]);
      cu[i+1] = s[BLK_W];
    end
  end

  // Downward chain for the high operation, entering at block M-1.
  always_comb begin
    cd    = '0;
    cd[M] = (op_hi == ALU_SUB);
    for (int i = int'(M) - 1; i >= int'(LOW_BLKS); i--) begin
      logic [BLK_W:0] s;
      s = {1'b0, a[i*BLK_W +: BLK_W]} + {1'b0, beff[i*BLK_W +: BLK_W]} + (BLK_W+1)'(cd[i+1]);
      cd[i] = s[BLK_W];
    end
  end

  // Block results.
  always_comb begin
    logic [LOW_W-1:0] lsum;
    lsum = a[LOW_W-1:0] + beff[LOW_W-1:0] + LOW_W'(op_lo == ALU_SUB);
    unique case (op_lo)
      ALU_AND: result[LOW_W-1:0] = a[LOW_W-1:0] & b[LOW_W-1:0];
      ALU_OR:  result[LOW_W-1:0] = a[LOW_W-1:0] | b[LOW_W-1:0];
      ALU_XOR: result[LOW_W-1:0] = a[LOW_W-1:0] ^ b[LOW_W-1:0];
      default: result[LOW_W-1:0] = lsum;
    endcase
    for (int unsigned i = LOW_BLKS; i < M; i++) begin
      logic [BLK_W-1:0] ai, bi, sum;
      logic             cin;
      ai  = a[i*BLK_W +: BLK_W];
      bi  = b[i*BLK_W +: BLK_W];
      cin = hi_blk[i] ? cd[i+1] : cu[i];
      sum = ai + beff[i*BLK_W +: BLK_W] + BLK_W'(cin);
      unique case (fsel[i])
        ALU_AND: result[i*BLK_W +: BLK_W] = ai & bi;
        ALU_OR:  result[i*BLK_W +: BLK_W] = ai | bi;
        ALU_XOR: result[i*BLK_W +: BLK_W] = ai ^ bi;
        default: result[i*BLK_W +: BLK_W] = sum;
      endcase
    end
  end

endmodule
