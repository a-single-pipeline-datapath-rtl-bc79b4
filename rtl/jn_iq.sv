// jn_iq: two-entry instruction queue and fetcher.
//
// Entry 0 holds the older instruction, entry 1 the next one in program
// order; the decode stage looks at both. Each cycle the decode stage
// consumes 0 (stall), 1 (issued alone) or 2 (joined) entries. What is left
// moves to entry 0 and the queue is refilled from the instruction memory
// at the fetch address, so when only entry 0 is consumed entry 1 moves
// down and one new instruction is fetched, and when both are consumed the
// next two are fetched. This follows the published fetch scheme; the
// always-ready memory and sequential fetch (no branches) are this
// implementation's simplifications.
//
// Interface: consume count in; imem read addresses out, imem words in;
// the two entries with valid bits and the byte address of entry 0 out.
// Timing: the queue updates at the clock edge; reset empties it and sets
// the fetch address to 0.
module jn_iq #(
  parameter int unsigned AW = 8   // instruction memory word-address width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [1:0]    consume,
  output logic [AW-1:0] fetch_addr0,
  output logic [AW-1:0] fetch_addr1,
  input  logic [31:0]   fetch_data0,
  input  logic [31:0]   fetch_data1,
  output logic          e0_valid,
  output logic [31:0]   e0_instr,
  output logic          e1_valid,
  output logic [31:0]   e1_instr,
  output logic [31:0]   e0_pc
);

  logic [AW-1:0] fpc;
  logic [1:0]    left;

  assign fetch_addr0 = fpc;
  assign fetch_addr1 = fpc + AW'(1);

  always_comb begin
    left = 2'(e0_valid) + 2'(e1_valid) - consume;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fpc      <= '0;
      e0_valid <= 1'b0;
      e1_valid <= 1'b0;
      e0_instr <= '0;
      e1_instr <= '0;
      e0_pc    <= '0;
    end else begin
      e0_valid <= 1'b1;
      e1_valid <= 1'b1;
      e0_pc    <= e0_pc + 32'(consume) * 32'd4;
      unique case (left)
        2'd2: ;
        2'd1: begin
          e0_instr <= (consume == 2'd0) ? e0_instr : e1_instr;
          e1_instr <= fetch_data0;
          fpc      <= fpc + AW'(1);
        end
        default: begin
          e0_instr <= fetch_data0;
          e1_instr <= fetch_data1;
          fpc      <= fpc + AW'(2);
        end
      endcase
    end
  end

  always_comb
    assert (!rst_n || 32'(consume) <= 32'(e0_valid) + 32'(e1_valid))
      else $error("jn_iq: consumed more entries than held");

endmodule
