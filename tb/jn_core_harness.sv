// jn_core_harness: runs one jn_core configuration on a fixed program and
// checks it against an instruction-level reference model.
//
// The program (PROG_LEN instructions) and the initial data memory are
// generated from a linear congruential sequence started at SEED, so every
// configuration run with the same SEED executes the same code. After the
// program has drained, all registers, their significant-block fields and
// the whole data memory are compared with the reference. Used by
// tb_jn_core_sweep to run the block-width and ALU-width sweep.
//
// Interface: parameters BLK_W, ALU_W (passed to jn_core), SEED and PROG_LEN;
// no inputs. It drives its own clock and reset and raises done once the
// comparison is finished; checks and failures count the comparisons, and
// joined, swapped and cycles copy the core's event counters at that point.
// The swept widths are the ones the design was evaluated at; the program
// generator and the reference model are this bench's own.
module jn_core_harness
  import jn_pkg::*;
#(
  parameter int unsigned BLK_W    = 4,
  parameter int unsigned ALU_W    = 40,
  parameter int unsigned SEED     = 1,
  parameter int unsigned PROG_LEN = 200,
  localparam int unsigned NB   = 32 / BLK_W,
  localparam int unsigned M    = ALU_W / BLK_W,
  localparam int unsigned SBNW = (NB > 1) ? $clog2(NB) : 1,
  localparam int unsigned OBW  = $clog2(M)
) (
  output logic        done,
  output int          checks,
  output int          failures,
  output int          joined,
  output int          swapped,
  output int          cycles
);

  logic        clk = 0, rst_n = 0;
  logic        imem_we = 0;
  logic [7:0]  imem_waddr = 0;
  logic [31:0] imem_wdata = 0;
  logic        dmem_ext_we = 0;
  logic [7:0]  dmem_ext_addr = 0;
  logic [31:0] dmem_ext_wdata = 0, dmem_ext_rdata;
  logic [4:0]  dbg_reg_addr = 0;
  logic [31:0] dbg_reg_data, id_pc;
  logic [SBNW-1:0] dbg_reg_sbn;
  logic [OBW-1:0]  ex_boundary;
  logic        ex_swap, ex_joined;
  perf_t       perf;

  jn_core #(.BLK_W(BLK_W), .ALU_W(ALU_W)) dut (.*);

  always #5 clk = ~clk;

  logic [31:0] prog [PROG_LEN];
  logic [31:0] ref_reg [32];
  logic [31:0] ref_mem [256];
  logic [31:0] lcg;

  function automatic logic [31:0] next_rand();
    lcg = lcg * 32'd1664525 + 32'd1013904223;
    return lcg;
  endfunction

  task automatic iss(input logic [31:0] w);
    logic [4:0]  rs, rt, rd;
    logic [31:0] se, ze, a, b, r;
    rs = w[25:21]; rt = w[20:16]; rd = w[15:11];
    se = {{16{w[15]}}, w[15:0]}; ze = {16'h0, w[15:0]};
    a = ref_reg[rs]; b = ref_reg[rt];
    r = 0;
    case (w[31:26])
      6'h00: begin
        case (w[5:0])
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
    int j = -1, blocks;
    for (int k = 30; k >= 0; k--) if (v[k] != v[31]) begin j = k; break; end
    blocks = (j + 3 + int'(BLK_W) - 1) / int'(BLK_W);
    if (blocks > int'(NB)) blocks = NB;
    return blocks - 1;
  endfunction

  initial begin
    done = 0; checks = 0; failures = 0; joined = 0; swapped = 0; cycles = 0;
    lcg = SEED;
    for (int n = 0; n < int'(PROG_LEN); n++) begin
      logic [31:0] r;
      logic [4:0]  rd, rs, rt;
      logic [15:0] imm;
      r  = next_rand();
      rd = 5'(1 + 32'(r[7:4]) % 15); rs = 5'(r[11:8]); rt = 5'(r[15:12]);
      r  = next_rand();
      imm = (r[3:0] == 0) ? r[31:16] : 16'($signed(r[21:16]) - 6'sd0);
      case (r[27:24] % 12)
        0: prog[n] = {6'h00, rs, rt, rd, 5'd0, FN_ADDU};
        1: prog[n] = {6'h00, rs, rt, rd, 5'd0, FN_SUBU};
        2: prog[n] = {6'h00, rs, rt, rd, 5'd0, FN_AND};
        3: prog[n] = {6'h00, rs, rt, rd, 5'd0, FN_OR};
        4: prog[n] = {6'h00, rs, rt, rd, 5'd0, FN_XOR};
        5, 6, 7: prog[n] = {OPC_ADDIU, rs, rd, imm};
        8: prog[n] = {OPC_ANDI, rs, rd, imm};
        9: prog[n] = {OPC_XORI, rs, rd, imm};
        10: prog[n] = {OPC_LW, 5'd0, rd, 6'd0, r[11:4], 2'b00};
        default: prog[n] = {OPC_SW, 5'd0, rt, 6'd0, r[11:4], 2'b00};
      endcase
    end
    for (int r = 0; r < 32; r++) ref_reg[r] = 0;
    for (int k = 0; k < 256; k++) begin
      logic [31:0] v;
      v = next_rand();
      ref_mem[k] = (k % 4 == 0) ? v : 32'($signed(v) >>> 22);
    end
    // load program and data while in reset
    for (int k = 0; k < 256; k++) begin
      @(negedge clk);
      imem_we = 1; imem_waddr = 8'(k); imem_wdata = (k < int'(PROG_LEN)) ? prog[k] : 32'h0;
      dmem_ext_we = 1; dmem_ext_addr = 8'(k); dmem_ext_wdata = ref_mem[k];
    end
    @(negedge clk);
    imem_we = 0; dmem_ext_we = 0;
    for (int n = 0; n < int'(PROG_LEN); n++) iss(prog[n]);
    rst_n = 1;
    fork
      wait (perf.retired >= 32'(PROG_LEN + 8));
      begin
        repeat (20 * PROG_LEN) @(negedge clk);
        failures++;
        $display("harness BLK_W=%0d ALU_W=%0d: program did not finish", BLK_W, ALU_W);
      end
    join_any
    disable fork;
    repeat (8) @(negedge clk);
    for (int r = 0; r < 32; r++) begin
      dbg_reg_addr = 5'(r);
      #1;
      checks++;
      if (dbg_reg_data != ref_reg[r] || int'(dbg_reg_sbn) != ref_sbn(ref_reg[r])) begin
        failures++;
        $display("FAIL BLK_W=%0d ALU_W=%0d r%0d = %h (sbn %0d), expected %h (sbn %0d)", BLK_W, ALU_W,
                 r, dbg_reg_data, dbg_reg_sbn, ref_reg[r], ref_sbn(ref_reg[r]));
      end
    end
    for (int k = 0; k < 256; k++) begin
      dmem_ext_addr = 8'(k);
      #1;
      checks++;
      if (dmem_ext_rdata != ref_mem[k]) begin
        failures++;
        $display("FAIL BLK_W=%0d ALU_W=%0d mem[%0d] = %h, expected %h", BLK_W, ALU_W, k,
                 dmem_ext_rdata, ref_mem[k]);
      end
    end
    joined  = int'(perf.joined);
    swapped = int'(perf.swapped);
    cycles  = int'(perf.cycles);
    done    = 1;
  end
endmodule
