// jn_wdl: width-determination logic.
//
// Finds how many BLK_W-bit blocks a value needs so that, after an addition
// or subtraction with another value of the same width, its result can still
// be sign-extended correctly: the significant bits plus one reserved bit.
//
// For every block i >= 1 a "block required" flag BR_i is raised when the
// BLK_W bits of block i together with the two highest bits of block i-1 are
// not all equal (a NAND "one-detection" and a NOR "zero-detection" over the
// same bits; with 1-bit blocks block 1 is always required). Block 0
// is always required. A priority encoder then returns
// the index of the highest raised BR, i.e. the number of significant blocks
// minus one (SBN). Both the BR rule and the encoding follow the design
// description; the encoder is written behaviourally.
//
// Interface: value in, sbn out (0 .. XLEN/BLK_W-1), br out (for tests).
// Timing: purely combinational.
module jn_wdl #(
  parameter int unsigned XLEN  = jn_pkg::JN_XLEN,
  parameter int unsigned BLK_W = jn_pkg::JN_BLK_W,
  localparam int unsigned NB   = XLEN / BLK_W,
  localparam int unsigned SBNW = (NB > 1) ? $clog2(NB) : 1
) (
  input  logic [XLEN-1:0] value,
  output logic [NB-1:0]   br,
  output logic [SBNW-1:0] sbn
);

  // BR generation: block i and the top two bits of block i-1.
  always_comb begin
    br    = '0;
    br[0] = 1'b1;
    for (int unsigned i = 1; i < NB; i++) begin
      logic all_one, all_zero;
      all_one  = 1'b1;
      all_zero = 1'b1;
      for (int k = int'(i * BLK_W) - 2; k < int'(i * BLK_W + BLK_W); k++)
        if (k >= 0) begin
          all_one  = all_one  &  value[k];
          all_zero = all_zero & ~value[k];
        end else begin
          all_one  = 1'b0;   // 1-bit blocks: no room below block 1
          all_zero = 1'b0;
        end
      br[i] = !(all_one || all_zero);
    end
  end

  // Priority encoder (Table 3-1 of the design description).
  always_comb begin
    sbn = '0;
    for (int unsigned i = 1; i < NB; i++)
      if (br[i]) sbn = SBNW'(i);
  end

endmodule
