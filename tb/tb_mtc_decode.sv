// tb_mtc_decode: self-checking test of the decode stage.
// Builds random instructions of every kind with the testbench's own
// encoder (mtc_tb_pkg), places random filler bits above each one, and
// checks the size and every bus field the decoder reports, including the
// variable SEQUENCE length and the COPY flip mask.
module tb_mtc_decode;
  import mtc_pkg::*;
  import mtc_tb_pkg::*;

  logic                    valid;
  logic [124:0]            win;
  logic [4:0]              seq_len;
  logic [6:0]              size;
  logic                    wr_en, wr_copy, seq_en, start, seqlen_en, stop, jump;
  logic [1:0]              cache;
  logic [5:0]              idx, src;
  logic [31:0]             data;
  logic [SMAX-1:0][5:0]    seq_idx;
  logic [4:0]              seqlen_val;
  logic [11:0]             jump_addr;
  logic [5:0]              jump_off;

  int checks = 0, failures = 0;

  mtc_decode dut (.valid, .win, .seq_len, .size, .op(), .wr_en, .wr_copy,
    .cache, .idx, .src, .data, .seq_en, .seq_idx, .start, .seqlen_en,
    .seqlen_val, .stop, .jump, .jump_addr, .jump_off);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic apply(input instr_t x);
    logic [255:0] fill;
    fill = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < 125; i++) win[i] = (i < x.n) ? x.b[i] : fill[i];
    #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr_t x;
    int c, i, s, sl, nf, a, o;
    logic [31:0] d, m;
    int ix[] = new[SMAX];
    int ps[] = new[MF];
    valid = 1'b1;
    seq_len = 5'd7;
    win = '0;
    repeat (400) begin
      c = $urandom_range(0, 3);
      i = $urandom_range(0, 63);
      s = $urandom_range(0, 63);
      d = $urandom;
      case ($urandom_range(0, 7))
        0: begin apply(mk_op(0)); chk(size == 3 && !wr_en && !seq_en && !start && !stop && !jump && !seqlen_en, "nop"); end
        1: begin
             apply(mk_write(c, i, d));
             chk(size == 7'(write_bits()), "write size");
             chk(wr_en && !wr_copy && cache == 2'(c) && idx == 6'(i) && data == d, "write fields");
           end
        2: begin
             sl = $urandom_range(1, SMAX);
             seq_len = 5'(sl);
             for (int j = 0; j < SMAX; j++) ix[j] = $urandom_range(0, 63);
             apply(mk_seq(c, ix, sl));
             chk(size == 7'(3 + 2 + 6 * sl) && seq_en && !wr_en && cache == 2'(c), "seq size/en");
             for (int j = 0; j < sl; j++) chk(seq_idx[j] == 6'(ix[j]), $sformatf("seq idx %0d", j));
           end
        3: begin apply(mk_op(3)); chk(size == 3 && start && !stop, "start"); end
        4: begin
             a = $urandom_range(0, 4095);
             o = $urandom_range(0, 63);
             apply(mk_jump(a, o));
             chk(size == 7'(21) && jump && jump_addr == 12'(a) && jump_off == 6'(o), "jump");
           end
        5: begin
             sl = $urandom_range(1, SMAX);
             apply(mk_seqlen(sl));
             chk(size == 7'(8) && seqlen_en && seqlen_val == 5'(sl), "seqlength");
           end
        6: begin apply(mk_op(6)); chk(size == 3 && stop && !start, "stop"); end
        7: begin
             nf = $urandom_range(0, MF);
             m = '0;
             for (int j = 0; j < MF; j++) begin
               ps[j] = $urandom_range(0, 31);
               if (j < nf) m[ps[j]] = 1'b1;
             end
             apply(mk_copy(c, i, s, ps, nf));
             chk(size == 7'(copy_bits(nf)), "copy size");
             chk(wr_en && wr_copy && cache == 2'(c) && idx == 6'(i) && src == 6'(s) && data == m, "copy fields");
           end
        default: ;
      endcase
    end
    // nothing is enabled without valid
    valid = 1'b0;
    apply(mk_write(1, 2, 32'h1234));
    chk(!wr_en && !seq_en && !start && !stop && !jump && !seqlen_en, "valid low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
