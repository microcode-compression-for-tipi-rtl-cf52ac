// mtc_tb_enc_pkg: the testbench encoder for the microcode trace decoder.
//
// A software model of the compiler that produces decoder programs, for the
// default field widths of mtc_tb_pkg and a given number of pipelines NP:
//  * gen_trace: a synthetic microcode trace with locality (per cache
//    slice, a drifting set of hot values, near-copies one or two bits away
//    and fresh values);
//  * encode: simulates the trace caches; a hit costs an index, a miss a
//    WRITE, or a COPY when a line within MAX_FLIPS bits exists and the COPY
//    is shorter; lines of the running sequence and of the one being built
//    are never replaced (round-robin victim); each sequence ends with one
//    SEQUENCE per cache and a START, a change of length with SEQLENGTH,
//    the program with STOP;
//  * pack: packets of NP instructions, NOP padding so that a START opens
//    its packet, a COPY never reads a line written earlier in its packet
//    and a SEQUENCE never follows a SEQLENGTH in its packet; two leading
//    packets of JUMPs, one per stream;
//  * insert_jump_packet: a packet of JUMPs that moves one stream parity
//    to a new memory segment;
//  * layout: splits packets into the interleaved streams, places them at
//    arbitrary bit offsets and fills img, the memory image.
package mtc_tb_enc_pkg;
  import mtc_pkg::*;
  import mtc_tb_pkg::*;

  typedef struct {
    instr_t ins;
    int     op;      // 0..7 as the instruction set, 8 = JUMP whose target is set at layout
    int     c, dst, src;
  } lin_t;

  // sequence length schedules
  function automatic void mixed_schedule(input int n, ref int sls[$]);
    int left;
    sls.delete();
    repeat (15) sls.push_back(7);
    repeat (4)  sls.push_back(20);
    repeat (12) sls.push_back(1);
    repeat (10) sls.push_back(3);
    left = n - 15*7 - 4*20 - 12 - 30;
    while (left > 0) begin
      sls.push_back(left >= 7 ? 7 : left);
      left -= 7;
    end
  endfunction

  function automatic void fixed_schedule(input int n, input int sl, ref int sls[$]);
    int left = n;
    sls.delete();
    while (left > 0) begin
      sls.push_back(left >= sl ? sl : left);
      left -= sl;
    end
  endfunction

  class encoder #(int NP = 2);
    localparam int UCW = NC * LW;
    int             ntr;
    logic [UCW-1:0] tr [];
    lin_t           lin[$];
    lin_t           pk[$];          // packets, NP entries each
    logic [MW-1:0]  img [MD];
    int enc_hits = 0, enc_repl = 0, enc_copy = 0, enc_write = 0, enc_nops = 0, enc_seqlen = 0;
    int prog_bits = 0;
    bit fits = 1;

    // xorshift generator, so that runs with the same seed see the same trace
    int unsigned rs = 1;
    function int unsigned rnd();
      rs ^= rs << 13;
      rs ^= rs >> 17;
      rs ^= rs << 5;
      return rs;
    endfunction

    function int rnd_range(input int lo, input int hi);
      return lo + int'(rnd() % (hi - lo + 1));
    endfunction

    function void gen_trace(input int n, input int unsigned seed);
      logic [LW-1:0] hot [NC][12];
      ntr = n;
      rs = seed | 1;
      tr = new[n];
      for (int k = 0; k < NC; k++)
        for (int h = 0; h < 12; h++) hot[k][h] = LW'(rnd()) & LW'(rnd());
      for (int l = 0; l < ntr; l++)
        for (int k = 0; k < NC; k++) begin
          int r = rnd_range(0, 99);
          int h = rnd_range(0, 11);
          logic [LW-1:0] v;
          if (r < 72) v = hot[k][h];
          else if (r < 86) begin
            v = hot[k][h] ^ (LW'(1) << rnd_range(0, LW - 1));
            if (rnd_range(0, 1) == 1) v ^= LW'(1) << rnd_range(0, LW - 1);
            hot[k][rnd_range(0, 11)] = v;
          end else begin
            v = LW'(rnd()) & LW'(rnd());
            hot[k][rnd_range(0, 11)] = v;
          end
          tr[l][k*LW +: LW] = v;
        end
    endfunction

    function lin_t L(input instr_t x, input int op, input int c = -1,
                               input int d = -1, input int s = -1);
      lin_t e;
      e.ins = x; e.op = op; e.c = c; e.dst = d; e.src = s;
      return e;
    endfunction

    function void encode(input int sls[$]);
      logic [LW-1:0] val [NC][NL];
      bit            vld [NC][NL];
      bit            prot_cur [NC][NL];
      bit            prot_bld [NC][NL];
      int            rr [NC];
      int            line, cur_sl;
      for (int k = 0; k < NC; k++) begin
        rr[k] = 0;
        for (int i = 0; i < NL; i++) begin
          vld[k][i] = 0; prot_cur[k][i] = 0; prot_bld[k][i] = 0; val[k][i] = '0;
        end
      end
      line = 0;
      cur_sl = SEQ_INIT_D;
      foreach (sls[q]) begin
        int sl = sls[q];
        int bld [NC][$];
        if (sl != cur_sl) begin
          lin.push_back(L(mk_seqlen(sl), 5));
          enc_seqlen++;
          cur_sl = sl;
        end
        for (int j = 0; j < sl; j++, line++)
          for (int k = 0; k < NC; k++) begin
            logic [LW-1:0] v = tr[line][k*LW +: LW];
            int at = -1;
            for (int i = 0; i < NL; i++) if (at < 0 && vld[k][i] && val[k][i] == v) at = i;
            if (at >= 0) enc_hits++;
            else begin
              int best = -1, bestd = 99;
              for (int t = 0; t < NL && at < 0; t++) begin
                int i = (rr[k] + t) % NL;
                if (!prot_cur[k][i] && !prot_bld[k][i]) at = i;
              end
              rr[k] = (at + 1) % NL;
              if (vld[k][at]) enc_repl++;
              for (int i = 0; i < NL; i++)
                if (vld[k][i] && $countones(val[k][i] ^ v) < bestd) begin
                  best = i;
                  bestd = $countones(val[k][i] ^ v);
                end
              if (best >= 0 && bestd <= MF && copy_bits(bestd) < write_bits()) begin
                int ps[] = new[MF];
                int n = 0;
                for (int b = 0; b < LW; b++) if (val[k][best][b] != v[b]) ps[n++] = b;
                lin.push_back(L(mk_copy(k, at, best, ps, bestd), 7, k, at, best));
                enc_copy++;
              end else begin
                lin.push_back(L(mk_write(k, at, v), 1, k, at));
                enc_write++;
              end
              val[k][at] = v;
              vld[k][at] = 1;
            end
            prot_bld[k][at] = 1;
            bld[k].push_back(at);
          end
        for (int k = 0; k < NC; k++) begin
          int ix[] = new[SMAX];
          foreach (bld[k][j]) ix[j] = bld[k][j];
          lin.push_back(L(mk_seq(k, ix, sl), 2, k));
        end
        lin.push_back(L(mk_op(3), 3));
        for (int k = 0; k < NC; k++)
          for (int i = 0; i < NL; i++) begin
            prot_cur[k][i] = prot_bld[k][i];
            prot_bld[k][i] = 0;
          end
      end
      lin.push_back(L(mk_op(6), 6));
    endfunction

    // packing into packets of NP instructions
    function void pack();
      lin_t cur[$];
      bit   wrote [NC][NL];
      bit   had_seqlen;
      // two packets of initial jumps (one per stream)
      repeat (2 * NP) pk.push_back(L(mk_jump(0, 0), 8));
      foreach (lin[n]) begin
        lin_t e = lin[n];
        bit close;
        if (cur.size() == 0) begin
          had_seqlen = 0;
          for (int k = 0; k < NC; k++) for (int i = 0; i < NL; i++) wrote[k][i] = 0;
        end
        close = (cur.size() > 0) &&
                ((e.op == 3) || (e.op == 7 && wrote[e.c][e.src]) || (e.op == 2 && had_seqlen));
        if (close) begin
          while (cur.size() < NP) begin
            cur.push_back(L(mk_op(0), 0));
            enc_nops++;
          end
          foreach (cur[s]) pk.push_back(cur[s]);
          cur.delete();
          had_seqlen = 0;
          for (int k = 0; k < NC; k++) for (int i = 0; i < NL; i++) wrote[k][i] = 0;
        end
        cur.push_back(e);
        if (e.op == 1 || e.op == 7) wrote[e.c][e.dst] = 1;
        if (e.op == 5) had_seqlen = 1;
        if (cur.size() == NP) begin
          foreach (cur[s]) pk.push_back(cur[s]);
          cur.delete();
        end
      end
      if (cur.size() > 0) begin
        while (cur.size() < NP) cur.push_back(L(mk_op(0), 0));
        foreach (cur[s]) pk.push_back(cur[s]);
      end
    endfunction

    // insert a packet of mid-program jumps before packet number at
    function void insert_jump_packet(input int at);
      for (int p = NP - 1; p >= 0; p--) pk.insert(at * NP, L(mk_jump(0, 0), 8));
    endfunction

    // ------------------------------------------------------------ memory image
    function void put_bits(input int a, input instr_t x);
      for (int i = 0; i < x.n; i++) img[(a + i) / MW][(a + i) % MW] = x.b[i];
    endfunction

    function void layout();
      int npk = pk.size() / NP;
      int seg_len [NP][2][3];
      int seg_at  [NP][2][3];
      int bp;
      for (int w = 0; w < MD; w++) img[w] = '0;
      // segment lengths: 0 = the initial jump, 1 = up to and including a
      // mid-program jump, 2 = the rest
      for (int p = 0; p < NP; p++) for (int k = 0; k < 2; k++) begin
        int sg = 0;
        for (int g = 0; g < 3; g++) seg_len[p][k][g] = 0;
        for (int c = k; c < npk; c += 2) begin
          lin_t e = pk[c * NP + p];
          seg_len[p][k][sg] += e.ins.n;
          if (e.op == 8 && sg < 2) sg++;
        end
      end
      bp = 2 * NP * MW + 13;
      for (int g = 1; g < 3; g++)
        for (int p = 0; p < NP; p++) for (int k = 0; k < 2; k++) begin
          seg_at[p][k][g] = bp;
          bp += seg_len[p][k][g] + rnd_range(0, 90);
        end
      fits = (bp + 400 < MD * MW);
      prog_bits = 0;
      for (int p = 0; p < NP; p++) for (int k = 0; k < 2; k++)
        for (int g = 0; g < 3; g++) prog_bits += seg_len[p][k][g];
      for (int p = 0; p < NP; p++) for (int k = 0; k < 2; k++) begin
        int sg = 0;
        int a = (2 * p + k) * MW;
        for (int c = k; c < npk; c += 2) begin
          lin_t e = pk[c * NP + p];
          if (e.op == 8) begin
            int tgt = seg_at[p][k][sg + 1];
            e.ins = mk_jump(tgt / MW, tgt % MW);
          end
          put_bits(a, e.ins);
          a += e.ins.n;
          if (e.op == 8 && sg < 2) begin
            sg++;
            a = seg_at[p][k][sg];
          end
        end
      end
    endfunction
  endclass

endpackage
