// tb_mtc_workloads: the parameter studies of the published evaluation,
// run on a synthetic 1500-word trace (the benchmark traces themselves are
// not available).
//
//  * issue width 1, 2, 3 at sequence length 7: percentage of cycles in
//    which the main architecture waits for a word (stall study);
//  * sequence length 1, 3, 7, 12, 20 at issue width 2: compressed program
//    size relative to the 128-bit-per-word trace (sequence-length study);
//  * memory traffic in bits per cycle, average and peak over 64 cycles;
//  * the share of the program taken by SEQUENCE, COPY and WRITE.
// Every run checks every word against the trace. The testbench also checks
// the trends reported for these studies: one pipeline stalls more than
// two or three, and longer sequences compress better (length 20 against 1
// and 7 against 3). The last run repeats the second one and must give
// the same numbers.
module tb_mtc_workloads;
  localparam int NTR = 1500;
  localparam int NRUN = 8;
  localparam int RUN_NP [NRUN] = '{1, 2, 3, 2, 2, 2, 2, 2};
  localparam int RUN_SL [NRUN] = '{7, 7, 7, 1, 3, 12, 20, 7};

  logic [NRUN-1:0] done;
  int checks_r [NRUN], failures_r [NRUN], words [NRUN], stall [NRUN], init_stall [NRUN];
  int prog_bits [NRUN], seq_bits [NRUN], copy_bits [NRUN], write_bits [NRUN], mem_bits [NRUN], peak_bits [NRUN], cycles [NRUN];

  for (genvar r = 0; r < NRUN; r++) begin : g_run
    mtc_tb_run #(.NPI(RUN_NP[r]), .NTR(NTR), .SL(RUN_SL[r])) u_run (
      .done(done[r]), .checks(checks_r[r]), .failures(failures_r[r]), .words(words[r]),
      .stall(stall[r]), .init_stall(init_stall[r]), .prog_bits(prog_bits[r]),
      .seq_bits(seq_bits[r]), .copy_bits(copy_bits[r]), .write_bits(write_bits[r]),
      .mem_bits(mem_bits[r]), .peak_bits(peak_bits[r]), .cycles(cycles[r]));
  end

  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    chk(prog_bits[7] == prog_bits[1] && stall[7] == stall[1], "two identical runs give identical results");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ratio [NRUN];
    real st [NRUN];
    wait (&done);
    for (int r = 0; r < NRUN; r++) begin
      checks += checks_r[r];
      failures += failures_r[r];
      ratio[r] = 100.0 * prog_bits[r] / (NTR * 128.0);
      st[r] = 100.0 * stall[r] / (stall[r] + NTR);
      $display("issue width %0d, sequence length %2d: program %6d bits = %5.2f%% of the trace, stalled %5.2f%% of cycles (+%0d cycles before the first word), memory %4.1f bits/cycle avg, %4.1f peak",
               RUN_NP[r], RUN_SL[r], prog_bits[r], ratio[r], st[r], init_stall[r],
               real'(mem_bits[r]) / cycles[r], peak_bits[r] / 64.0);
      $display("    share of the program: SEQUENCE %4.1f%%, COPY %4.1f%%, WRITE %4.1f%%, other %4.1f%%",
               100.0 * seq_bits[r] / prog_bits[r], 100.0 * copy_bits[r] / prog_bits[r],
               100.0 * write_bits[r] / prog_bits[r],
               100.0 * (prog_bits[r] - seq_bits[r] - copy_bits[r] - write_bits[r]) / prog_bits[r]);
    end
    chk(stall[0] > stall[1] && stall[0] > stall[2], "one pipeline stalls more than two or three");
    chk(prog_bits[6] < prog_bits[3], "sequence length 20 compresses better than 1");
    chk(prog_bits[1] < prog_bits[4], "sequence length 7 compresses better than 3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
