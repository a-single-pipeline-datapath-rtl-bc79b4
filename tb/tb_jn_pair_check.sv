// tb_jn_pair_check: random instruction pairs; checks that only two
// ALU-using instructions with at most one load join, and that a RAW
// dependency from the first to the second refuses the pair while two writes
// to the same register (WAW) do not.
module tb_jn_pair_check;
  import jn_pkg::*;
  uop_t ui, uj;
  logic type_ok, dep_ok;
  int checks = 0, failures = 0;

  jn_pair_check dut (.ui, .uj, .type_ok, .dep_ok);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      logic et, ed, ai, aj;
      ui = '0; uj = '0;
      ui.valid = ($urandom % 8) != 0; uj.valid = ($urandom % 8) != 0;
      ui.cls = ins_class_e'($urandom % 4); uj.cls = ins_class_e'($urandom % 4);
      ui.rs = 5'($urandom % 6); ui.rt = 5'($urandom % 6); ui.rd = 5'($urandom % 6);
      uj.rs = 5'($urandom % 6); uj.rt = 5'($urandom % 6); uj.rd = 5'($urandom % 6);
      uj.reads_rt = 1'($urandom % 2);
      #1;
      ai = ui.valid && (ui.cls == CLS_ALU || ui.cls == CLS_LOAD);
      aj = uj.valid && (uj.cls == CLS_ALU || uj.cls == CLS_LOAD);
      et = ai && aj && !(ui.cls == CLS_LOAD && uj.cls == CLS_LOAD);
      ed = !(ui.rd != 0 && (uj.rs == ui.rd || (uj.reads_rt && uj.rt == ui.rd)));
      checks++;
      if (type_ok != et || dep_ok != ed) begin
        failures++;
        $display("FAIL cls %s/%s rd=%0d rs'=%0d rt'=%0d -> %b %b", ui.cls.name(), uj.cls.name(),
                 ui.rd, uj.rs, uj.rt, type_ok, dep_ok);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
