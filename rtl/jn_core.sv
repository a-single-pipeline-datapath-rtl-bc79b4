// jn_core: five-stage pipeline whose ALU can be shared by two joined
// narrow-operand instructions.
//
// IF   jn_iq keeps the next two instructions (entry 0, entry 1).
// ID   Two decoders, the type-check and data-dependency check
//      (jn_pair_check), four register reads with their SBN fields
//      (jn_regfile), width determination of the two immediates (jn_wdl) and
//      the width-check (jn_wcl). If every check passes both instructions
//      issue together, otherwise entry 0 issues alone and entry 1 moves down.
// EX   Operation swapping (jn_osl) puts the wider operation in the regular
//      low blocks; operand merging (jn_oml) builds the two ALU operands with
//      the other operation's blocks turned around; the partitioned ALU
//      (jn_alu) computes both results at once.
// MEM  Sign extension (jn_sxl) splits the joined result into two full
//      words; a load or store uses its word as address into jn_dmem.
// WB   Two register writes; the register file records the new SBNs.
//
// The stage split and the joining rules follow the published datapath.
// This implementation's own choices: no result forwarding, so decode stalls
// while an instruction in EX or MEM still has to write a source register
// (the register file writes before it reads, so WB needs no stall); no
// branches; stores issue alone; a small MIPS-like instruction subset (see
// jn_decoder). The destination of each operation travels with it, so
// swapping needs no extra bookkeeping at write-back. When a joined pair
// writes the same register, EX drops the earlier instruction's write.
//
// Ports: clock, active-low asynchronous reset, a program load port, a data
// memory port for loading and inspecting data, a debug register read port
// and event counters. An instruction reaches decode one cycle after it is
// fetched and writes its register at the end of its fourth cycle after
// decode (ID, EX, MEM, WB); up to two instructions issue per cycle.
module jn_core
  import jn_pkg::*;
#(
  parameter int unsigned BLK_W      = jn_pkg::JN_BLK_W,
  parameter int unsigned ALU_W      = jn_pkg::JN_ALU_W,
  parameter int unsigned IMEM_WORDS = 256,
  parameter int unsigned DMEM_WORDS = 256,
  localparam int unsigned XLEN = jn_pkg::JN_XLEN,
  localparam int unsigned NB   = XLEN / BLK_W,
  localparam int unsigned M    = ALU_W / BLK_W,
  localparam int unsigned SBNW = (NB > 1) ? $clog2(NB) : 1,
  localparam int unsigned OBW  = $clog2(M),
  localparam int unsigned IAW  = $clog2(IMEM_WORDS),
  localparam int unsigned DAW  = $clog2(DMEM_WORDS)
) (
  input  logic            clk,
  input  logic            rst_n,
  // program load
  input  logic            imem_we,
  input  logic [IAW-1:0]  imem_waddr,
  input  logic [31:0]     imem_wdata,
  // data memory load / inspect
  input  logic            dmem_ext_we,
  input  logic [DAW-1:0]  dmem_ext_addr,
  input  logic [31:0]     dmem_ext_wdata,
  output logic [31:0]     dmem_ext_rdata,
  // register inspect
  input  logic [4:0]      dbg_reg_addr,
  output logic [31:0]     dbg_reg_data,
  output logic [SBNW-1:0] dbg_reg_sbn,
  // status
  output logic [31:0]     id_pc,         // address of the instruction in queue entry 0
  output logic [OBW-1:0]  ex_boundary,   // boundary used by EX this cycle
  output logic            ex_swap,       // EX swapped its two operations
  output logic            ex_joined,     // EX holds a joined pair
  output perf_t           perf
);

  // ------------------------------------------------------------------ IF
  logic [1:0]     consume;
  logic [IAW-1:0] fa0, fa1;
  logic [31:0]    fd0, fd1;
  logic           e0_valid, e1_valid;
  logic [31:0]    e0_instr, e1_instr, e0_pc;

  jn_imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata),
    .raddr0(fa0), .raddr1(fa1), .rdata0(fd0), .rdata1(fd1));

  jn_iq #(.AW(IAW)) u_iq (
    .clk, .rst_n, .consume,
    .fetch_addr0(fa0), .fetch_addr1(fa1), .fetch_data0(fd0), .fetch_data1(fd1),
    .e0_valid, .e0_instr, .e1_valid, .e1_instr, .e0_pc);

  // ------------------------------------------------------------------ ID
  uop_t d0, d1;
  jn_decoder u_dec0 (.valid(e0_valid), .instr(e0_instr), .uop(d0));
  jn_decoder u_dec1 (.valid(e1_valid), .instr(e1_instr), .uop(d1));

  logic type_ok, dep_ok;
  jn_pair_check u_pc (.ui(d0), .uj(d1), .type_ok, .dep_ok);

  logic [4:0]      rf_raddr [4];
  logic [XLEN-1:0] rf_rdata [4];
  logic [SBNW-1:0] rf_rsbn  [4];
  logic            rf_we    [2];
  logic [4:0]      rf_waddr [2];
  logic [XLEN-1:0] rf_wdata [2];

  assign rf_raddr[0] = d0.rs;
  assign rf_raddr[1] = d0.rt;
  assign rf_raddr[2] = d1.rs;
  assign rf_raddr[3] = d1.rt;

  jn_regfile #(.XLEN(XLEN), .BLK_W(BLK_W)) u_rf (
    .clk, .rst_n, .raddr(rf_raddr), .rdata(rf_rdata), .rsbn(rf_rsbn),
    .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata),
    .dbg_addr(dbg_reg_addr), .dbg_data(dbg_reg_data), .dbg_sbn(dbg_reg_sbn));

  logic [SBNW-1:0] imm_sbn0, imm_sbn1;
  logic [NB-1:0]   imm_br0, imm_br1;
  jn_wdl #(.XLEN(XLEN), .BLK_W(BLK_W)) u_wdl_imm0 (.value(d0.imm), .br(imm_br0), .sbn(imm_sbn0));
  jn_wdl #(.XLEN(XLEN), .BLK_W(BLK_W)) u_wdl_imm1 (.value(d1.imm), .br(imm_br1), .sbn(imm_sbn1));

  slot_t           ids0, ids1;
  logic [SBNW-1:0] sbn0_a, sbn0_b, sbn1_a, sbn1_b;

  always_comb begin
    ids0       = '0;
    ids0.valid = d0.valid;
    ids0.cls   = d0.cls;
    ids0.op    = d0.op;
    ids0.rd    = d0.rd;
    ids0.a     = rf_rdata[0];
    ids0.b     = d0.use_imm ? d0.imm : rf_rdata[1];
    ids0.sdata = rf_rdata[1];
    ids1       = '0;
    ids1.valid = d1.valid;
    ids1.cls   = d1.cls;
    ids1.op    = d1.op;
    ids1.rd    = d1.rd;
    ids1.a     = rf_rdata[2];
    ids1.b     = d1.use_imm ? d1.imm : rf_rdata[3];
    ids1.sdata = rf_rdata[3];
    sbn0_a     = rf_rsbn[0];
    sbn0_b     = d0.use_imm ? imm_sbn0 : rf_rsbn[1];
    sbn1_a     = rf_rsbn[2];
    sbn1_b     = d1.use_imm ? imm_sbn1 : rf_rsbn[3];
  end

  // Interlock against instructions in EX and MEM that still have to write.
  slot_t idex_s0, idex_s1, exmem_lo, exmem_hi;

  function automatic logic pending(input logic [4:0] r, input slot_t a, input slot_t b,
                                   input slot_t c, input slot_t d);
    return (r != 5'd0) && ((a.valid && a.rd == r) || (b.valid && b.rd == r) ||
                           (c.valid && c.rd == r) || (d.valid && d.rd == r));
  endfunction

  logic hz0, hz1;
  always_comb begin
    hz0 = (d0.cls != CLS_NONE) &&
          (pending(d0.rs, idex_s0, idex_s1, exmem_lo, exmem_hi) ||
           (d0.reads_rt && pending(d0.rt, idex_s0, idex_s1, exmem_lo, exmem_hi)));
    hz1 = (d1.cls != CLS_NONE) &&
          (pending(d1.rs, idex_s0, idex_s1, exmem_lo, exmem_hi) ||
           (d1.reads_rt && pending(d1.rt, idex_s0, idex_s1, exmem_lo, exmem_hi)));
  end

  logic [SBNW-1:0] rbn0, rbn1;
  logic            rbn_ok, join_ok;
  logic [OBW-1:0]  wcl_boundary;  // unused: jn_osl re-derives the boundary from the RBNs

  jn_wcl #(.XLEN(XLEN), .BLK_W(BLK_W), .ALU_W(ALU_W)) u_wcl (
    .sbn0_a, .sbn0_b, .sbn1_a, .sbn1_b,
    .type_ok, .dep_ok(dep_ok && !hz1),
    .rbn0, .rbn1, .rbn_ok, .join_ok, .boundary(wcl_boundary));

  logic issue, stall;
  assign stall   = e0_valid && hz0;
  assign issue   = e0_valid && !hz0;
  assign consume = !issue ? 2'd0 : (join_ok ? 2'd2 : 2'd1);

  logic [SBNW-1:0] idex_rbn0, idex_rbn1;
  logic            idex_join;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idex_s0   <= '0;
      idex_s1   <= '0;
      idex_rbn0 <= '0;
      idex_rbn1 <= '0;
      idex_join <= 1'b0;
    end else begin
      idex_s0       <= ids0;
      idex_s0.valid <= issue;
      idex_s1       <= ids1;
      idex_s1.valid <= issue && join_ok;
      idex_rbn0     <= rbn0;
      idex_rbn1     <= rbn1;
      idex_join     <= issue && join_ok;
    end
  end

  // ------------------------------------------------------------------ EX
  slot_t          lo, hi;
  logic [OBW-1:0] boundary;
  logic           swap;

  jn_osl #(.BLK_W(BLK_W), .ALU_W(ALU_W), .SBNW(SBNW)) u_osl (
    .s0(idex_s0), .s1(idex_s1), .rbn0(idex_rbn0), .rbn1(idex_rbn1),
    .join_ok(idex_join), .lo, .hi, .boundary, .swap);

  logic [ALU_W-1:0] alu_a, alu_b, alu_y;
  logic [M-1:0]     sel_a, sel_b;

  jn_oml #(.XLEN(XLEN), .BLK_W(BLK_W), .ALU_W(ALU_W)) u_oml_a (
    .op_lo(lo.a), .op_hi(hi.a), .boundary, .merged(alu_a), .sel(sel_a));
  jn_oml #(.XLEN(XLEN), .BLK_W(BLK_W), .ALU_W(ALU_W)) u_oml_b (
    .op_lo(lo.b), .op_hi(hi.b), .boundary, .merged(alu_b), .sel(sel_b));

  jn_alu #(.BLK_W(BLK_W), .ALU_W(ALU_W)) u_alu (
    .a(alu_a), .b(alu_b),
    .op_lo((lo.cls == CLS_ALU) ? lo.op : ALU_ADD),
    .op_hi((hi.cls == CLS_ALU) ? hi.op : ALU_ADD),
    .boundary, .result(alu_y));

  assign id_pc       = e0_pc;
  assign ex_boundary = boundary;
  assign ex_swap     = swap;
  assign ex_joined   = idex_join;

  logic waw;
  assign waw = idex_join && lo.rd == hi.rd && lo.rd != 5'd0;

  logic [ALU_W-1:0] exmem_y;
  logic [OBW-1:0]   exmem_boundary;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      exmem_lo       <= '0;
      exmem_hi       <= '0;
      exmem_y        <= '0;
      exmem_boundary <= OBW'(M - 1);
    end else begin
      exmem_lo       <= lo;
      exmem_hi       <= hi;
      // A joined pair may write the same register. Only the later
      // instruction's result may remain, so the earlier one's write is
      // dropped: the low operation unless the pair was swapped.
      if (waw) begin
        if (swap) exmem_hi.rd <= '0;
        else      exmem_lo.rd <= '0;
      end
      exmem_y        <= alu_y;
      exmem_boundary <= boundary;
    end
  end

  // ----------------------------------------------------------------- MEM
  logic [XLEN-1:0] res_lo, res_hi;

  jn_sxl #(.XLEN(XLEN), .BLK_W(BLK_W), .ALU_W(ALU_W)) u_sxl (
    .result(exmem_y), .boundary(exmem_boundary), .res_lo, .res_hi);

  logic        lo_mem, hi_mem;
  logic [31:0] dm_addr, dm_rdata;
  logic        dm_we;

  assign lo_mem  = exmem_lo.valid && (exmem_lo.cls == CLS_LOAD || exmem_lo.cls == CLS_STORE);
  assign hi_mem  = exmem_hi.valid && (exmem_hi.cls == CLS_LOAD || exmem_hi.cls == CLS_STORE);
  assign dm_addr = hi_mem ? res_hi : res_lo;
  assign dm_we   = (lo_mem && exmem_lo.cls == CLS_STORE) || (hi_mem && exmem_hi.cls == CLS_STORE);

  jn_dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .addr(dm_addr), .we(dm_we), .wdata(hi_mem ? exmem_hi.sdata : exmem_lo.sdata),
    .rdata(dm_rdata),
    .ext_addr(dmem_ext_addr), .ext_we(dmem_ext_we), .ext_wdata(dmem_ext_wdata),
    .ext_rdata(dmem_ext_rdata));

  // Run-time checks, sampled at the clock edge and only out of reset (the
  // pipeline registers are undefined until the first reset): operation
  // swapping never places the boundary inside the ALU's unshared lower
  // block, and a pair never holds two memory operations.
  always_ff @(posedge clk)
    if (rst_n) begin
      assert (32'(boundary) + 1 >= M / 2)
        else $error("jn_core: boundary %0d below the unshared lower ALU block", boundary);
      assert (!(lo_mem && hi_mem)) else $error("jn_core: two memory operations in one pair");
    end

  logic            wb_v  [2];
  logic [4:0]      wb_rd [2];
  logic [XLEN-1:0] wb_d  [2];
  logic            wb_any [2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < 2; p++) begin
        wb_v[p]   <= 1'b0;
        wb_rd[p]  <= '0;
        wb_d[p]   <= '0;
        wb_any[p] <= 1'b0;
      end
    end else begin
      wb_any[0] <= exmem_lo.valid;
      wb_any[1] <= exmem_hi.valid;
      wb_v[0]   <= exmem_lo.valid && (exmem_lo.cls == CLS_ALU || exmem_lo.cls == CLS_LOAD);
      wb_v[1]   <= exmem_hi.valid && (exmem_hi.cls == CLS_ALU || exmem_hi.cls == CLS_LOAD);
      wb_rd[0]  <= exmem_lo.rd;
      wb_rd[1]  <= exmem_hi.rd;
      wb_d[0]   <= (exmem_lo.cls == CLS_LOAD) ? dm_rdata : res_lo;
      wb_d[1]   <= (exmem_hi.cls == CLS_LOAD) ? dm_rdata : res_hi;
    end
  end

  // ------------------------------------------------------------------ WB
  always_comb
    for (int p = 0; p < 2; p++) begin
      rf_we[p]    = wb_v[p];
      rf_waddr[p] = wb_rd[p];
      rf_wdata[p] = wb_d[p];
    end

  // ------------------------------------------------------------ counters
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      perf <= '0;
    end else begin
      perf.cycles <= perf.cycles + 1;
      perf.retired <= perf.retired + 32'(wb_any[0]) + 32'(wb_any[1]);
      if (issue) perf.issue_slots <= perf.issue_slots + 1;
      if (issue && join_ok) perf.joined <= perf.joined + 1;
      if (issue && join_ok && (d0.cls == CLS_LOAD || d1.cls == CLS_LOAD))
        perf.joined_mem <= perf.joined_mem + 1;
      if (swap) perf.swapped <= perf.swapped + 1;
      if (stall) perf.stalls <= perf.stalls + 1;
      if (issue && !type_ok) perf.fail_type <= perf.fail_type + 1;
      if (issue && type_ok && !(dep_ok && !hz1)) perf.fail_dep <= perf.fail_dep + 1;
      if (issue && type_ok && dep_ok && !hz1 && !rbn_ok) perf.fail_width <= perf.fail_width + 1;
    end
  end

endmodule
