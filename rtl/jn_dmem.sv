// jn_dmem: word-addressed data memory.
//
// One access port for loads and stores (the datapath does not duplicate
// the data memory, so at most one of two joined instructions uses it) and
// a second port through which a test bench loads and inspects data. The
// byte address is taken modulo the memory size and its two low bits are
// ignored. Size and the second port are this implementation's choices.
//
// Timing: combinational read, write at the clock edge. Port A's write has
// priority over port B's when both write the same word.
module jn_dmem #(
  parameter int unsigned WORDS = 256,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic        clk,
  // pipeline port (byte address)
  input  logic [31:0] addr,
  input  logic        we,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  // load / inspect port (word address)
  input  logic [AW-1:0] ext_addr,
  input  logic          ext_we,
  input  logic [31:0]   ext_wdata,
  output logic [31:0]   ext_rdata
);

  logic [31:0] mem [WORDS];
  logic [AW-1:0] wa;
  assign wa = addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (ext_we) mem[ext_addr] <= ext_wdata;
    if (we)     mem[wa]       <= wdata;
  end

  assign rdata     = mem[wa];
  assign ext_rdata = mem[ext_addr];

endmodule
