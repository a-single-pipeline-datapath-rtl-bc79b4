// tb_jn_core_sweep: the block-width and ALU-width sweep. The same program
// runs on pipelines with 1-, 2-, 4-, 8- and 16-bit blocks over a 32-bit ALU,
// and with 4-bit blocks over 32- to 64-bit ALUs in 4-bit steps (an odd
// block count included). Every configuration must
// end with the reference model's registers and memory; the number of
// joined pairs and the cycle count of each are printed for comparison.
module tb_jn_core_sweep;
  localparam int NCFG = 13;
  localparam int BW [NCFG] = '{1, 2, 4, 8, 16, 4, 4, 4, 4, 4, 4, 4, 4};
  localparam int AW [NCFG] = '{32, 32, 32, 32, 32, 36, 40, 44, 48, 52, 56, 60, 64};

  logic done [NCFG];
  int   chk [NCFG], fail [NCFG], jn [NCFG], sw [NCFG], cyc [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    jn_core_harness #(.BLK_W(BW[g]), .ALU_W(AW[g]), .SEED(7), .PROG_LEN(200)) u_h (
      .done(done[g]), .checks(chk[g]), .failures(fail[g]), .joined(jn[g]),
      .swapped(sw[g]), .cycles(cyc[g]));
  end

  int checks = 0, failures = 0;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic all_done;
    do begin
      #100;
      all_done = 1;
      foreach (done[g]) all_done &= done[g];
    end while (!all_done);
    $display("block  ALU   joined  swapped  cycles (200 instructions)");
    for (int g = 0; g < NCFG; g++) begin
      $display("%5d %4d %8d %8d %7d", BW[g], AW[g], jn[g], sw[g], cyc[g]);
      checks   += chk[g];
      failures += fail[g];
      // every configuration must join some pairs
      checks++;
      if (jn[g] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
