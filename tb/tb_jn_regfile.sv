// tb_jn_regfile: random writes on both ports and reads on all four ports,
// checked against a reference array; the SBN field of each register is
// checked against a direct count of the value's significant blocks.
module tb_jn_regfile;
  logic            clk = 0, rst_n = 0;
  logic [4:0]      raddr [4];
  logic [31:0]     rdata [4];
  logic [2:0]      rsbn  [4];
  logic            we    [2];
  logic [4:0]      waddr [2];
  logic [31:0]     wdata [2];
  logic [4:0]      dbg_addr;
  logic [31:0]     dbg_data;
  logic [2:0]      dbg_sbn;
  logic [31:0]     model [32];
  int checks = 0, failures = 0, cycles = 0;

  jn_regfile dut (.clk, .rst_n, .raddr, .rdata, .rsbn, .we, .waddr, .wdata,
                  .dbg_addr, .dbg_data, .dbg_sbn);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  function automatic int ref_sbn(input logic [31:0] v);
    int j = -1;
    for (int k = 30; k >= 0; k--) if (v[k] != v[31]) begin j = k; break; end
    if (j < 0) return 0;
    return ((j + 3 + 3) / 4 > 8 ? 8 : (j + 3 + 3) / 4) - 1;
  endfunction

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 32; r++) model[r] = 0;
    we[0] = 0; we[1] = 0; waddr[0] = 0; waddr[1] = 0; wdata[0] = 0; wdata[1] = 0;
    for (int q = 0; q < 4; q++) raddr[q] = 0;
    dbg_addr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int p = 0; p < 2; p++) begin
        we[p] = 1'($urandom % 2);
        waddr[p] = 5'($urandom);
        wdata[p] = $signed($urandom) >>> ($urandom % 32);
      end
      if (waddr[0] == waddr[1]) we[0] = 0;
      for (int q = 0; q < 4; q++) raddr[q] = (q == 0 && we[0]) ? waddr[0] : 5'($urandom);
      dbg_addr = 5'($urandom);
      #1;
      // reads see this cycle's writes
      for (int q = 0; q < 4; q++) begin
        logic [31:0] e;
        e = model[raddr[q]];
        for (int p = 0; p < 2; p++) if (we[p] && waddr[p] == raddr[q] && raddr[q] != 0) e = wdata[p];
        checks++;
        if (rdata[q] != e || int'(rsbn[q]) != ref_sbn(e)) begin
          failures++;
          $display("FAIL read r%0d = %h sbn %0d, expected %h sbn %0d", raddr[q], rdata[q], rsbn[q], e, ref_sbn(e));
        end
      end
      checks++;
      if (dbg_data != model[dbg_addr] || int'(dbg_sbn) != ref_sbn(model[dbg_addr])) failures++;
      @(posedge clk);
      for (int p = 0; p < 2; p++) if (we[p] && waddr[p] != 0) model[waddr[p]] = wdata[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
