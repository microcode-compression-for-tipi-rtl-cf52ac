// mtc_tb_run: one measured decoding run, used by the workload testbench.
//
// Builds its own clock and decoder with NPI pipelines, encodes the same
// synthetic trace (fixed seed) with a constant sequence length SL, loads
// the program, lets the consumer take a word every cycle and reports:
//   words      microcode words received (all compared with the trace)
//   stall      cycles between the first and the last word without a word
//              (the main architecture would stall), and before the first
//   prog_bits  size of the compressed program, and the bits spent on
//              SEQUENCE, COPY and WRITE instructions
//   mem_bits   bits read from the program memory, and the largest number
//              read in any 64-cycle window (peak)
// done rises when the run has finished; checks and failures count the
// comparisons.
module mtc_tb_run #(
  parameter int NPI = 2,
  parameter int NTR = 1000,
  parameter int SL  = 7
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   words,
  output int   stall,
  output int   init_stall,
  output int   prog_bits,
  output int   seq_bits,
  output int   copy_bits,
  output int   write_bits,
  output int   mem_bits,
  output int   peak_bits,
  output int   cycles
);
  import mtc_pkg::*;
  import mtc_tb_pkg::*;
  import mtc_tb_enc_pkg::*;

  logic             clk = 0, rst_n;
  logic             ld_en;
  logic [11:0]      ld_addr;
  logic [MW-1:0]    ld_data;
  logic             uc_valid, uc_ready;
  logic [NC*LW-1:0] uc_data;
  logic             start_wait, halted;

  mtc_decoder_top #(.NPIPE(NPI)) dut (.*);

  always #5 clk = !clk;

  encoder #(NPI) enc;
  int win_bits = 0, win_cyc = 0;

  always @(posedge clk) if (rst_n && !done) begin
    cycles++;
    mem_bits += $countones(dut.mem_req) * MW;
    win_bits += $countones(dut.mem_req) * MW;
    if (++win_cyc == 64) begin
      if (win_bits > peak_bits) peak_bits = win_bits;
      win_bits = 0;
      win_cyc = 0;
    end
    if (words == 0 && !uc_valid) init_stall++;
    if (words > 0 && words < NTR && !uc_valid) stall++;
    if (uc_valid && uc_ready) begin
      checks++;
      if (words >= NTR || uc_data != enc.tr[words]) failures++;
      words++;
    end
  end

  initial begin
    int sls[$];
    done = 0; checks = 0; failures = 0; words = 0; stall = 0; init_stall = 0;
    mem_bits = 0; peak_bits = 0; cycles = 0;
    rst_n = 0; ld_en = 0; ld_addr = '0; ld_data = '0; uc_ready = 1;
    enc = new;
    enc.gen_trace(NTR, 32'h0bad_cafe);
    fixed_schedule(NTR, SL, sls);
    enc.encode(sls);
    enc.pack();
    enc.layout();
    prog_bits = enc.prog_bits;
    seq_bits = 0; copy_bits = 0; write_bits = 0;
    foreach (enc.pk[i]) begin
      if (enc.pk[i].op == 2) seq_bits += enc.pk[i].ins.n;
      if (enc.pk[i].op == 7) copy_bits += enc.pk[i].ins.n;
      if (enc.pk[i].op == 1) write_bits += enc.pk[i].ins.n;
    end
    checks++;
    if (!enc.fits) failures++;
    for (int w = 0; w < MD; w++) begin
      @(negedge clk);
      ld_en = 1;
      ld_addr = 12'(w);
      ld_data = enc.img[w];
    end
    @(negedge clk);
    ld_en = 0;
    rst_n = 1;
    while (!(words >= NTR && halted) && cycles < 50 * NTR) @(negedge clk);
    repeat (20) @(negedge clk);
    checks++;
    if (words != NTR || !halted) failures++;
    done = 1;
  end
endmodule
