// jn_imem: instruction memory with two read ports.
//
// The fetcher reads two consecutive instructions per cycle; a write port
// loads the program. Word-addressed, combinational reads, write at the
// clock edge. Size and organisation are this implementation's choices.
module jn_imem #(
  parameter int unsigned WORDS = 256,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata,
  input  logic [AW-1:0] raddr0,
  input  logic [AW-1:0] raddr1,
  output logic [31:0]   rdata0,
  output logic [31:0]   rdata1
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata0 = mem[raddr0];
  assign rdata1 = mem[raddr1];

endmodule
