// tb_mtc_decoder_top: end-to-end test of the microcode trace decoder at its
// default configuration (2 pipelines, 4 caches of 64 x 32-bit lines).
//
// The testbench contains a small encoder. It generates a 128-bit microcode
// trace with locality (a drifting set of hot values per cache slice, some
// values one or two bits away from a hot value, some fresh ones),
// compresses it by simulating the trace caches (hit: index only; miss:
// WRITE, or COPY when a line within three flipped bits exists and the COPY
// is shorter), protects the lines of the running and of the sequence under
// construction from replacement, and emits SEQUENCE and START per sequence,
// with SEQLENGTH changes (7, 20, 1, 3, 7, and a short last one). It packs
// the linear code into packets of one instruction per pipeline, padding
// with NOPs so that a START opens its packet, a COPY never reads a line
// written earlier in its packet and a SEQUENCE never shares a packet with
// an earlier SEQLENGTH; splits the packets into the interleaved streams;
// adds the initial JUMPs and two JUMPs in mid-program to relocated
// segments; places the streams at arbitrary bit offsets; loads the memory
// and lets the decoder run while the consumer drops ready now and then.
//
// Checks: every microcode word equals the trace, in order, and none is
// extra; STOP halts the decoder; the first word appears two cycles after
// the first START; each mechanism happened: START stall, consumer starved,
// fetch waiting for bits, JUMP, COPY, WRITE, cache hit, replacement,
// SEQLENGTH, NOP padding, back-pressure, gap-free sequence change.
module tb_mtc_decoder_top;
  import mtc_pkg::*;
  import mtc_tb_pkg::*;
  import mtc_tb_enc_pkg::*;

  localparam int NTR = 1500;         // microcode lines in the trace

  logic             clk = 0, rst_n;
  logic             ld_en;
  logic [11:0]      ld_addr;
  logic [MW-1:0]    ld_data;
  logic             uc_valid, uc_ready;
  logic [NC*LW-1:0] uc_data;
  logic             start_wait, halted;

  mtc_decoder_top dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  // ------------------------------------------------------------ encoder
  encoder #(NP) enc;

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired: %0d of %0d words, halted=%0d, start_wait=%0d, managers active=%b",
             got, NTR, halted, start_wait, dut.sm_active);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ run
  int got = 0, cyc = 0;
  int n_start_wait = 0, n_starved = 0, n_fetch_wait = 0, n_jump = 0, n_copy = 0;
  int n_write = 0, n_seqlen = 0, n_stop = 0, n_backpressure = 0, n_gapless = 0;
  int first_start = -1, first_word = -1;
  int pk_exec = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (start_wait) n_start_wait++;
    if (got > 0 && got < NTR && !uc_valid) n_starved++;
    if (!halted && !(&dut.win_ready)) n_fetch_wait++;
    if (uc_valid && !uc_ready) n_backpressure++;
    if (dut.d_fire) begin
      // the packets execute in program order
      for (int p = 0; p < NP; p++) begin
        int eop;
        eop = enc.pk[pk_exec * NP + p].op;
        chk(int'(dut.size[p]) == enc.pk[pk_exec * NP + p].ins.n &&
            int'(dut.wr_en[p]) + int'(dut.seq_en[p]) + int'(dut.start[p]) + int'(dut.jump[p])
            + int'(dut.seqlen_en[p]) + int'(dut.stop[p]) == int'(eop != 0),
            $sformatf("packet %0d pipeline %0d: size %0d expected op %0d size %0d",
                      pk_exec, p, dut.size[p], eop, enc.pk[pk_exec * NP + p].ins.n));
      end
      pk_exec++;
      n_jump   += $countones(dut.jump);
      n_copy   += $countones(dut.wr_en & dut.wr_copy);
      n_write  += $countones(dut.wr_en & ~dut.wr_copy);
      n_seqlen += $countones(dut.seqlen_en);
      n_stop   += $countones(dut.stop);
      if (|dut.start) begin
        if (first_start < 0) first_start = cyc;
        if (dut.adv && dut.g_cache[0].u_sm.last) n_gapless++;
      end
    end
    if (uc_valid && first_word < 0) first_word = cyc;
    if (uc_valid && uc_ready) begin
      if (got < NTR) begin
        chk(uc_data == enc.tr[got], $sformatf("word %0d: %h expected %h", got, uc_data, enc.tr[got]));
      end else chk(0, "extra microcode word");
      got++;
    end
  end

  initial begin
    int jp;
    int sls[$];
    rst_n = 0;
    ld_en = 0; ld_addr = '0; ld_data = '0; uc_ready = 0;
    enc = new;
    enc.gen_trace(NTR, 32'h1234_5678);
    mixed_schedule(NTR, sls);
    enc.encode(sls);
    enc.pack();
    jp = enc.pk.size() / NP / 3;
    enc.insert_jump_packet(jp);
    enc.insert_jump_packet(jp + 7);
    enc.layout();
    chk(enc.fits, "program fits the memory");
    $display("encoder: %0d bits, writes=%0d copies=%0d hits=%0d replacements=%0d nops=%0d",
             enc.prog_bits, enc.enc_write, enc.enc_copy, enc.enc_hits, enc.enc_repl, enc.enc_nops);
    for (int w = 0; w < MD; w++) begin
      @(negedge clk);
      ld_en = 1;
      ld_addr = 12'(w);
      ld_data = enc.img[w];
    end
    @(negedge clk);
    ld_en = 0;
    rst_n = 1;
    while (!(got >= NTR && halted)) begin
      @(negedge clk);
      uc_ready = ($urandom_range(0, 9) != 0);
    end
    repeat (100) @(negedge clk);
    uc_ready = 1;
    repeat (20) @(negedge clk);
    chk(got == NTR, $sformatf("received %0d words", got));
    chk(halted, "halted after STOP");
    chk(first_word - first_start == 2, $sformatf("START to first word %0d cycles", first_word - first_start));
    $display("cycles=%0d start_wait=%0d starved=%0d fetch_wait=%0d jumps=%0d copies=%0d writes=%0d",
             cyc, n_start_wait, n_starved, n_fetch_wait, n_jump, n_copy, n_write);
    $display("seqlength=%0d stop=%0d backpressure=%0d gapless=%0d", n_seqlen, n_stop,
             n_backpressure, n_gapless);
    chk(n_start_wait > 0, "START stall happened");
    chk(n_starved > 0, "consumer starved");
    chk(n_fetch_wait > 0, "fetch waited for bits");
    chk(n_jump == 4 * NP, "all JUMPs executed");
    chk(n_copy == enc.enc_copy && n_copy > 0, "COPY executed");
    chk(n_write == enc.enc_write && n_write > 0, "WRITE executed");
    chk(enc.enc_hits > 0 && enc.enc_repl > 0 && enc.enc_nops > 0, "hits, replacements, NOP padding");
    chk(n_seqlen == enc.enc_seqlen && n_seqlen > 0, "SEQLENGTH executed");
    chk(n_stop == 1, "STOP executed");
    chk(n_backpressure > 0, "back-pressure");
    chk(n_gapless > 0, "gap-free sequence change");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
