// jn_decoder: instruction decoder for one issue slot.
//
// The pipeline has two of these, one for each of the two consecutive
// instructions that may be joined. The second one only has to recognise
// the operations that use the ALU; in this implementation both slots
// decode the same small MIPS-like subset, so the two decoders are the same
// module.
//
// Encoding (this implementation's choice, MIPS field layout):
//   R-type  op=0x00  rs[25:21] rt[20:16] rd[15:11] funct[5:0]
//           funct 0x21 ADDU, 0x23 SUBU, 0x24 AND, 0x25 OR, 0x26 XOR
//   I-type  op rs rt imm[15:0]: 0x09 ADDIU (sign-extended), 0x0C ANDI,
//           0x0D ORI, 0x0E XORI (zero-extended), 0x23 LW, 0x2B SW
//           (sign-extended offset, address = rs + offset)
// Every other word, 0x00000000 included, decodes as class NONE (a no-op).
//
// Interface: valid and instruction word in, a jn_pkg::uop_t out.
// Timing: purely combinational.
module jn_decoder
  import jn_pkg::*;
(
  input  logic        valid,
  input  logic [31:0] instr,
  output uop_t        uop
);

  logic [5:0] opc, fn;
  assign opc = instr[31:26];
  assign fn  = instr[5:0];

  always_comb begin
    uop          = '0;
    uop.valid    = valid;
    uop.cls      = CLS_NONE;
    uop.op       = ALU_ADD;
    uop.rs       = instr[25:21];
    uop.rt       = instr[20:16];
    uop.imm      = {{16{instr[15]}}, instr[15:0]};
    unique case (opc)
      OPC_RTYPE: begin
        uop.rd       = instr[15:11];
        uop.reads_rt = 1'b1;
        uop.cls      = CLS_ALU;
        unique case (fn)
          FN_ADDU: uop.op = ALU_ADD;
          FN_SUBU: uop.op = ALU_SUB;
          FN_AND:  uop.op = ALU_AND;
          FN_OR:   uop.op = ALU_OR;
          FN_XOR:  uop.op = ALU_XOR;
          default: begin
            uop.cls      = CLS_NONE;
            uop.rd       = '0;
            uop.reads_rt = 1'b0;
          end
        endcase
      end
      OPC_ADDIU, OPC_ANDI, OPC_ORI, OPC_XORI: begin
        uop.cls     = CLS_ALU;
        uop.rd      = instr[20:16];
        uop.use_imm = 1'b1;
        if (opc != OPC_ADDIU) uop.imm = {16'h0, instr[15:0]};
        unique case (opc)
          OPC_ANDI: uop.op = ALU_AND;
          OPC_ORI:  uop.op = ALU_OR;
          OPC_XORI: uop.op = ALU_XOR;
          default:  uop.op = ALU_ADD;
        endcase
      end
      OPC_LW: begin
        uop.cls     = CLS_LOAD;
        uop.rd      = instr[20:16];
        uop.use_imm = 1'b1;
      end
      OPC_SW: begin
        uop.cls      = CLS_STORE;
        uop.use_imm  = 1'b1;
        uop.reads_rt = 1'b1;
      end
      default: ;
    endcase
    if (!valid) begin
      uop.cls      = CLS_NONE;
      uop.rd       = '0;
      uop.reads_rt = 1'b0;
    end
  end

endmodule
