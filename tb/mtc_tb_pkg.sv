// mtc_tb_pkg: instruction builders shared by the testbenches.
//
// Each function assembles one decoder instruction for the default
// configuration of mtc_pkg as a little-endian bit string (opcode in the
// lowest three bits, operands above it in the order of the instruction
// list). These are written from the instruction format description, not
// from the RTL decoder, so that the testbenches check the RTL against an
// independent encoding.
package mtc_tb_pkg;
  import mtc_pkg::*;

  localparam int NC   = NCACHE_D;
  localparam int NL   = LINES_D;
  localparam int LW   = LINE_W_D;
  localparam int SMAX = SEQ_MAX_D;
  localparam int MW   = MEM_W_D;
  localparam int MD   = MEM_DEPTH_D;
  localparam int MF   = MAX_FLIPS_D;
  localparam int NP   = NPIPE_D;

  localparam int CWb  = 2;     // cache number bits for 4 caches
  localparam int IWb  = 6;     // index bits for 64 lines
  localparam int SLb  = 5;     // sequence length bits (0..20)
  localparam int AWb  = 12;    // word address bits for 4096 words
  localparam int OWb  = 6;     // bit offset bits for 64-bit words
  localparam int PWb  = 5;     // bit position in a 32-bit line
  localparam int FCb  = 2;     // flip count bits (0..3)
  localparam int MAXI = 3 + CWb + SMAX * IWb;   // longest instruction: 125

  typedef struct {
    logic [255:0] b;
    int           n;
  } instr_t;

  function automatic void put(ref instr_t x, input logic [63:0] v, input int w);
    for (int i = 0; i < w; i++) x.b[x.n + i] = v[i];
    x.n += w;
  endfunction

  function automatic instr_t mk_op(input int op);
    instr_t x;
    x.b = '0;
    x.n = 0;
    put(x, 64'(op), 3);
    return x;
  endfunction

  function automatic instr_t mk_write(input int c, input int i, input logic [31:0] d);
    instr_t x = mk_op(1);
    put(x, 64'(c), CWb);
    put(x, 64'(i), IWb);
    put(x, 64'(d), LW);
    return x;
  endfunction

  function automatic instr_t mk_seq(input int c, input int idx[], input int sl);
    instr_t x = mk_op(2);
    put(x, 64'(c), CWb);
    for (int j = 0; j < sl; j++) put(x, 64'(idx[j]), IWb);
    return x;
  endfunction

  function automatic instr_t mk_jump(input int a, input int o);
    instr_t x = mk_op(4);
    put(x, 64'(a), AWb);
    put(x, 64'(o), OWb);
    return x;
  endfunction

  function automatic instr_t mk_seqlen(input int sl);
    instr_t x = mk_op(5);
    put(x, 64'(sl), SLb);
    return x;
  endfunction

  function automatic instr_t mk_copy(input int c, input int di, input int si,
                                     input int pos[], input int nf);
    instr_t x = mk_op(7);
    put(x, 64'(c), CWb);
    put(x, 64'(di), IWb);
    put(x, 64'(si), IWb);
    put(x, 64'(nf), FCb);
    for (int j = 0; j < nf; j++) put(x, 64'(pos[j]), PWb);
    return x;
  endfunction

  function automatic int write_bits();
    return 3 + CWb + IWb + LW;
  endfunction

  function automatic int copy_bits(input int nf);
    return 3 + CWb + 2 * IWb + FCb + nf * PWb;
  endfunction

endpackage
