// jn_pair_check: type-check and data-dependency check of an instruction pair.
//
// Instruction i (queue entry 0) comes before instruction j (entry 1) in
// program order. Both checks use only fields of the instruction words, so
// they can finish early in the decode stage.
//
// Type-check: only the ALU and its operand and result buses are shared, so
// both instructions must need the ALU (an ALU operation or a load) and at
// most one of them may use the data memory. Stores are never joined: with
// their data register they would need a fifth register read port (this
// implementation's choice).
// Data-dependency check: j must not read the register i writes (RAW).
// WAR cannot occur since both read their operands in the same cycle. Two
// writes to the same register (WAW) do not block joining, as in the design
// description; the pipeline drops the earlier instruction's write instead.
// Register 0 is never a dependency.
//
// Interface: the two decoded uops in; type_ok and dep_ok out.
// Timing: purely combinational.
module jn_pair_check
  import jn_pkg::*;
(
  input  uop_t ui,
  input  uop_t uj,
  output logic type_ok,
  output logic dep_ok
);

  logic i_alu, j_alu;
  assign i_alu = ui.valid && (ui.cls == CLS_ALU || ui.cls == CLS_LOAD);
  assign j_alu = uj.valid && (uj.cls == CLS_ALU || uj.cls == CLS_LOAD);

  always_comb begin
    type_ok = i_alu && j_alu && !(ui.cls == CLS_LOAD && uj.cls == CLS_LOAD);
    dep_ok  = 1'b1;
    if (ui.rd != 5'd0) begin
      if (uj.rs == ui.rd) dep_ok = 1'b0;
      if (uj.reads_rt && uj.rt == ui.rd) dep_ok = 1'b0;
    end
  end

endmodule
