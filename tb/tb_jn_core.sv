// tb_jn_core: end-to-end test of the pipeline at its default parameters.
//
// Phase A runs 20 independent narrow immediate additions and checks that
// they complete at two instructions per cycle (all joined).
// Phase B runs a directed sequence that provokes every mechanism of the
// datapath (joining, operation swapping, a load joined with an ALU
// operation, a subtraction in the turnaround position, negative narrow
// results, refusals by the type-, dependency- and width-check, interlock
// stalls, joined pairs writing the same register, swapped or not), followed
// by random instructions. The final registers, their
// significant-block fields and the data memory are compared with an
// instruction-level reference model that executes one instruction at a
// time. Each mechanism must have occurred at least once.
module tb_jn_core;
  import jn_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        imem_we = 0;
  logic [7:0]  imem_waddr = 0;
  logic [31:0] imem_wdata = 0;
  logic        dmem_ext_we = 0;
  logic [7:0]  dmem_ext_addr = 0;
  logic [31:0] dmem_ext_wdata = 0, dmem_ext_rdata;
  logic [4:0]  dbg_reg_addr = 0;
  logic [31:0] dbg_reg_data;
  logic [2:0]  dbg_reg_sbn;
  logic [31:0] id_pc;
  logic [3:0]  ex_boundary;
  logic        ex_swap, ex_joined;
  perf_t       perf;

  jn_core dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    wait (cyc == 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- program
  logic [31:0] prog [$];
  logic [31:0] ref_reg [32];
  logic [31:0] ref_mem [256];
  logic [31:0] init_mem [256];

  function automatic logic [31:0] r_op(input logic [5:0] fn, input int rd, input int rs, input int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] i_op(input logic [5:0] opc, input int rt, input int rs, input int imm);
    return {opc, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  // reference model: one instruction at a time
  task automatic iss(input logic [31:0] w);
    logic [5:0]  opc, fn;
    logic [4:0]  rs, rt, rd;
    logic [31:0] se, ze, a, b, r;
    opc = w[31:26]; fn = w[5:0]; rs = w[25:21]; rt = w[20:16]; rd = w[15:11];
    se = {{16{w[15]}}, w[15:0]}; ze = {16'h0, w[15:0]};
    a = ref_reg[rs]; b = ref_reg[rt];
    case (opc)
      6'h00: begin
        case (fn)
          6'h21: r = a + b;
          6'h23: r = a - b;
          6'h24: r = a & b;
          6'h25: r = a | b;
          6'h26: r = a ^ b;
          default: rd = 0;
        endcase
        if (rd != 0) ref_reg[rd] = r;
      end
      6'h09: if (rt != 0) ref_reg[rt] = a + se;
      6'h0C: if (rt != 0) ref_reg[rt] = a & ze;
      6'h0D: if (rt != 0) ref_reg[rt] = a | ze;
      6'h0E: if (rt != 0) ref_reg[rt] = a ^ ze;
      6'h23: if (rt != 0) ref_reg[rt] = ref_mem[8'((a + se) >> 2)];
      6'h2B: ref_mem[8'((a + se) >> 2)] = b;
      default: ;
    endcase
  endtask

  function automatic int ref_sbn(input logic [31:0] v);
    int j = -1;
    for (int k = 30; k >= 0; k--) if (v[k] != v[31]) begin j = k; break; end
    if (j < 0) return 0;
    return ((j + 6) / 4 > 8 ? 8 : (j + 6) / 4) - 1;
  endfunction

  // ------------------------------------------------------ mechanisms
  int n_hi_sub = 0, n_neg_hi = 0, n_full_join = 0, n_waw = 0, n_waw_swap = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.waw && !dut.swap) n_waw++;
    if (dut.waw && dut.swap) n_waw_swap++;
    if (dut.idex_join && dut.hi.cls == CLS_ALU && dut.hi.op == ALU_SUB) n_hi_sub++;
    if (32'(dut.exmem_boundary) < 9 && dut.exmem_hi.valid && dut.res_hi[31]) n_neg_hi++;
    if (dut.idex_join && 32'(dut.boundary) >= 7) n_full_join++;
  end

  task automatic load_and_reset();
    rst_n = 0;
    for (int k = 0; k < 256; k++) begin
      @(negedge clk);
      imem_we = 1; imem_waddr = 8'(k);
      imem_wdata = (k < prog.size()) ? prog[k] : 32'h0;
      dmem_ext_we = 1; dmem_ext_addr = 8'(k); dmem_ext_wdata = init_mem[k];
    end
    @(negedge clk);
    imem_we = 0; dmem_ext_we = 0;
    for (int r = 0; r < 32; r++) ref_reg[r] = 0;
    for (int k = 0; k < 256; k++) ref_mem[k] = init_mem[k];
    foreach (prog[i]) iss(prog[i]);
    @(negedge clk);
    rst_n = 1;
  endtask

  task automatic compare_state(input string phase);
    for (int r = 0; r < 32; r++) begin
      dbg_reg_addr = 5'(r);
      #1;
      checks++;
      if (dbg_reg_data != ref_reg[r] || int'(dbg_reg_sbn) != ref_sbn(ref_reg[r])) begin
        failures++;
        $display("FAIL %s r%0d = %h (sbn %0d), expected %h (sbn %0d)", phase, r, dbg_reg_data,
                 dbg_reg_sbn, ref_reg[r], ref_sbn(ref_reg[r]));
      end
    end
    for (int k = 0; k < 256; k++) begin
      dmem_ext_addr = 8'(k);
      #1;
      checks++;
      if (dmem_ext_rdata != ref_mem[k]) begin
        failures++;
        $display("FAIL %s mem[%0d] = %h, expected %h", phase, k, dmem_ext_rdata, ref_mem[k]);
      end
    end
  endtask

  task automatic expect_seen(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else
      $display("  %-28s %0d", what, n);
  endtask

  initial begin
    for (int k = 0; k < 256; k++) init_mem[k] = (k % 3 == 0) ? $urandom : $signed($urandom) >>> 20;
    init_mem[0] = 32'h1234_5678;
    init_mem[1] = 32'hFFFF_FFF0;

    // ---------------- phase A: 20 independent narrow additions
    prog.delete();
    for (int k = 1; k <= 20; k++) prog.push_back(i_op(OPC_ADDIU, k, 0, k * 7 - 70));
    load_and_reset();
    // Pair p enters decode in cycle 2+p and writes back at the end of
    // cycle 5+p, so all ten pairs are done after 15 cycles (25 without joining).
    wait (perf.cycles == 32'd15);
    @(negedge clk);
    for (int r = 1; r <= 20; r++) begin
      dbg_reg_addr = 5'(r);
      #1;
      checks++;
      if (dbg_reg_data != ref_reg[r]) begin
        failures++;
        $display("FAIL phase A: r%0d = %h at cycle %0d, expected %h", r, dbg_reg_data, perf.cycles, ref_reg[r]);
      end
    end
    checks++;
    if (perf.joined != 10) begin
      failures++;
      $display("FAIL phase A: %0d joined pairs, expected 10", perf.joined);
    end
    repeat (10) @(negedge clk);
    compare_state("A");

    // ---------------- phase B: directed mechanisms, then random code
    prog.delete();
    prog.push_back(i_op(OPC_ADDIU, 1, 0, 5));          // join: two narrow immediates
    prog.push_back(i_op(OPC_ADDIU, 2, 0, -3));
    prog.push_back(r_op(FN_ADDU, 3, 1, 2));            // stall: r1, r2 still in flight
    prog.push_back(i_op(OPC_LW, 9, 0, 0));             // load a wide value
    prog.push_back(i_op(OPC_LW, 10, 0, 4));            // type-check: two loads
    prog.push_back(i_op(OPC_ORI, 4, 0, 'hFFFF));     // 5-block value
    prog.push_back(r_op(FN_ADDU, 5, 4, 4));            // dependency-check: reads r4
    prog.push_back(r_op(FN_ADDU, 11, 9, 9));           // width-check: 8 + 8 blocks
    prog.push_back(r_op(FN_ADDU, 12, 9, 0));
    prog.push_back(i_op(OPC_ADDIU, 14, 0, 1));         // swap: narrow first, wide second
    prog.push_back(r_op(FN_ADDU, 15, 9, 0));
    prog.push_back(r_op(FN_ADDU, 18, 9, 0));           // wide low op, SUB turned around
    prog.push_back(r_op(FN_SUBU, 19, 1, 2));
    prog.push_back(r_op(FN_SUBU, 20, 2, 1));           // negative narrow result
    prog.push_back(r_op(FN_XOR, 21, 4, 1));
    prog.push_back(i_op(OPC_LW, 16, 0, 8));            // load joined with an ALU op
    prog.push_back(i_op(OPC_ADDIU, 17, 0, 7));
    prog.push_back(i_op(OPC_SW, 19, 0, 12));           // store issues alone
    prog.push_back(r_op(FN_AND, 22, 10, 2));
    prog.push_back(r_op(FN_OR, 23, 2, 1));
    prog.push_back(i_op(OPC_SW, 23, 0, 16));           // issues alone: realigns the pairs
    prog.push_back(i_op(OPC_ADDIU, 24, 0, 9));         // WAW pair: the second write stays
    prog.push_back(i_op(OPC_ADDIU, 24, 0, 3));
    prog.push_back(i_op(OPC_ADDIU, 25, 0, 1));         // WAW pair, swapped
    prog.push_back(r_op(FN_ADDU, 25, 9, 0));
    for (int n = 0; n < 150; n++) begin
      int kind, rd, rs, rt, imm;
      kind = $urandom % 12;
      rd = 1 + $urandom % 15; rs = $urandom % 16; rt = $urandom % 16;
      imm = ($urandom % 4 == 0) ? int'($urandom % 65536) : int'($urandom % 64) - 32;
      case (kind)
        0: prog.push_back(r_op(FN_ADDU, rd, rs, rt));
        1: prog.push_back(r_op(FN_SUBU, rd, rs, rt));
        2: prog.push_back(r_op(FN_AND, rd, rs, rt));
        3: prog.push_back(r_op(FN_OR, rd, rs, rt));
        4: prog.push_back(r_op(FN_XOR, rd, rs, rt));
        5, 6: prog.push_back(i_op(OPC_ADDIU, rd, rs, imm));
        7: prog.push_back(i_op(OPC_ANDI, rd, rs, imm));
        8: prog.push_back(i_op(OPC_ORI, rd, rs, imm));
        9: prog.push_back(i_op(OPC_XORI, rd, rs, imm));
        10: prog.push_back(i_op(OPC_LW, rd, 0, 4 * int'($urandom % 256)));
        default: prog.push_back(i_op(OPC_SW, rt, 0, 4 * int'($urandom % 256)));
      endcase
    end
    load_and_reset();
    wait (perf.retired >= 32'(prog.size() + 8));
    repeat (8) @(negedge clk);
    compare_state("B");
    $display("phase B: %0d instructions in %0d cycles", prog.size(), perf.cycles);
    expect_seen("joined pairs", int'(perf.joined));
    expect_seen("swapped pairs", int'(perf.swapped));
    expect_seen("load joined with ALU op", int'(perf.joined_mem));
    expect_seen("interlock stalls", int'(perf.stalls));
    expect_seen("type-check refusals", int'(perf.fail_type));
    expect_seen("dependency refusals", int'(perf.fail_dep));
    expect_seen("width-check refusals", int'(perf.fail_width));
    expect_seen("SUB in turnaround position", n_hi_sub);
    expect_seen("negative turnaround result", n_neg_hi);
    expect_seen("full-width op joined", n_full_join);
    expect_seen("WAW pair joined", n_waw);
    expect_seen("WAW pair joined and swapped", n_waw_swap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
