// tb_jn_decoder: decodes every supported instruction form with random
// fields and checks class, function, registers and immediate extension,
// plus unknown words and an empty slot decoding as no-ops.
module tb_jn_decoder;
  import jn_pkg::*;
  logic        valid;
  logic [31:0] instr;
  uop_t        u;
  int checks = 0, failures = 0;

  jn_decoder dut (.valid, .instr, .uop(u));

  task automatic expect_uop(input string what, input ins_class_e cls, input alu_op_e op,
                            input logic [4:0] rd, input logic use_imm, input logic reads_rt,
                            input logic [31:0] imm);
    #1;
    checks++;
    if (u.valid != valid || u.cls != cls || (cls == CLS_ALU && u.op != op) || u.rd != rd ||
        (cls != CLS_NONE && (u.use_imm != use_imm || u.reads_rt != reads_rt ||
                             u.rs != instr[25:21] || (use_imm && u.imm != imm)))) begin
      failures++;
      $display("FAIL %s instr=%h cls=%s rd=%0d imm=%h", what, instr, u.cls.name(), u.rd, u.imm);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static logic [5:0] fns [5] = '{6'h21, 6'h23, 6'h24, 6'h25, 6'h26};
    static alu_op_e    fop [5] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR};
    static logic [5:0] iop [4] = '{6'h09, 6'h0C, 6'h0D, 6'h0E};
    valid = 1;
    for (int n = 0; n < 300; n++) begin
      logic [4:0] rs, rt, rd;
      logic [15:0] im;
      int k;
      rs = 5'($urandom); rt = 5'($urandom); rd = 5'($urandom); im = 16'($urandom);
      k = n % 5;
      instr = {6'h00, rs, rt, rd, 5'd0, fns[k]};
      expect_uop("rtype", CLS_ALU, fop[k], rd, 0, 1, 0);
      k = n % 4;
      instr = {iop[k], rs, rt, im};
      expect_uop("itype", CLS_ALU, k == 0 ? ALU_ADD : fop[k + 1], rt, 1, 0,
                 k == 0 ? {{16{im[15]}}, im} : {16'h0, im});
      instr = {6'h23, rs, rt, im};
      expect_uop("lw", CLS_LOAD, ALU_ADD, rt, 1, 0, {{16{im[15]}}, im});
      instr = {6'h2B, rs, rt, im};
      expect_uop("sw", CLS_STORE, ALU_ADD, 5'd0, 1, 1, {{16{im[15]}}, im});
      instr = {6'h00, rs, rt, rd, 5'd0, 6'h00};
      expect_uop("sll-as-nop", CLS_NONE, ALU_ADD, 5'd0, 0, 0, 0);
      instr = {6'h3F, rs, rt, im};
      expect_uop("unknown", CLS_NONE, ALU_ADD, 5'd0, 0, 0, 0);
    end
    valid = 0;
    instr = {6'h09, 5'd1, 5'd2, 16'd7};
    expect_uop("empty slot", CLS_NONE, ALU_ADD, 5'd0, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
