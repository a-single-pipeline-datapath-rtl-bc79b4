// jn_regfile: register file with significant-block fields.
//
// 32 registers of XLEN bits, register 0 hard-wired to zero. Next to every
// register an SBN field holds the register's number of significant blocks
// minus one. The SBN is computed by a width-determination logic (jn_wdl)
// on each write port when the value is written, so the width-check in the
// decode stage gets its inputs straight from the register read and does
// not have to wait for a width determination after it.
//
// Four read ports serve the two operands of each of the two instructions
// that may be joined; two write ports serve their two results. A read of a
// register written in the same cycle returns the new value and SBN (write
// before read). If both ports write the same register, port 1 wins; the
// pipeline never does that. Reset clears all registers and SBNs.
// Port counts follow from issuing two instructions; the write-before-read
// behaviour and reset are this implementation's choices.
//
// Timing: reads are combinational, writes take effect at the clock edge.
module jn_regfile #(
  parameter int unsigned XLEN  = jn_pkg::JN_XLEN,
  parameter int unsigned BLK_W = jn_pkg::JN_BLK_W,
  localparam int unsigned NB   = XLEN / BLK_W,
  localparam int unsigned SBNW = (NB > 1) ? $clog2(NB) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [4:0]      raddr [4],
  output logic [XLEN-1:0] rdata [4],
  output logic [SBNW-1:0] rsbn  [4],
  input  logic            we    [2],
  input  logic [4:0]      waddr [2],
  input  logic [XLEN-1:0] wdata [2],
  // debug read port
  input  logic [4:0]      dbg_addr,
  output logic [XLEN-1:0] dbg_data,
  output logic [SBNW-1:0] dbg_sbn
);

  // SBN of the value 0: sign plus reserved bit, i.e. 2 bits
  localparam logic [SBNW-1:0] SBN_ZERO = SBNW'((2 + BLK_W - 1) / BLK_W - 1);

  logic [XLEN-1:0] regs [32];
  logic [SBNW-1:0] sbns [32];
  logic [SBNW-1:0] wsbn [2];
  logic [NB-1:0]   unused_br [2];

  for (genvar p = 0; p < 2; p++) begin : g_wdl
    jn_wdl #(.XLEN(XLEN), .BLK_W(BLK_W)) u_wdl (
      .value(wdata[p]), .br(unused_br[p]), .sbn(wsbn[p]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 32; r++) begin
        regs[r] <= '0;
        sbns[r] <= SBN_ZERO;
      end
    end else begin
      for (int p = 0; p < 2; p++)
        if (we[p] && waddr[p] != 5'd0) begin
          regs[waddr[p]] <= wdata[p];
          sbns[waddr[p]] <= wsbn[p];
        end
    end
  end

  always_comb begin
    for (int q = 0; q < 4; q++) begin
      rdata[q] = regs[raddr[q]];
      rsbn[q]  = sbns[raddr[q]];
      for (int p = 0; p < 2; p++)
        if (we[p] && waddr[p] == raddr[q] && raddr[q] != 5'd0) begin
          rdata[q] = wdata[p];
          rsbn[q]  = wsbn[p];
        end
    end
  end

  assign dbg_data = regs[dbg_addr];
  assign dbg_sbn  = sbns[dbg_addr];

endmodule
