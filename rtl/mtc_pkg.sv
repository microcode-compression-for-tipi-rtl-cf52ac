// mtc_pkg: shared configuration, opcodes and instruction-size arithmetic
// for the microcode trace decoder.
//
// The decoder executes a variable-length instruction set with eight
// operations (NOP, WRITE, SEQUENCE, START, JUMP, SEQLENGTH, STOP, COPY).
// The operation list comes from the design; the opcode values, the field
// order and the field widths below are this implementation's own choice.
// Every instruction is a little-endian bit string: bit 0 of the first
// memory word is the first bit of a stream, the 3-bit opcode occupies the
// lowest bits and the operands follow in the order
//   WRITE     C, I, D
//   SEQUENCE  C, S[0..SL-1]           (SL = current sequence length)
//   JUMP      A (word address), O (bit offset inside the word)
//   SEQLENGTH SL
//   COPY      C, DI, SI, NF, P[0..NF-1]  (NF bit positions to flip)
// The default sizes follow the design where it gives them (64 lines per
// cache, sequence length 7, issue width 2, four caches as drawn in the
// architecture figure); line width, memory word width, memory depth and
// the flip-count limit are chosen here.
package mtc_pkg;

  // default configuration
  localparam int unsigned NCACHE_D    = 4;    // trace caches
  localparam int unsigned LINES_D     = 64;   // lines per trace cache
  localparam int unsigned LINE_W_D    = 32;   // bits per cache line
  localparam int unsigned SEQ_MAX_D   = 20;   // sequence buffer depth
  localparam int unsigned SEQ_INIT_D  = 7;    // sequence length after reset
  localparam int unsigned NPIPE_D     = 2;    // fetch/decode pipelines
  localparam int unsigned MEM_W_D     = 64;   // memory data bus width
  localparam int unsigned MEM_DEPTH_D = 4096; // program memory words
  localparam int unsigned MAX_FLIPS_D = 3;    // bit flips per COPY

  localparam int unsigned OP_W = 3;

  typedef enum logic [OP_W-1:0] {
    OP_NOP    = 3'd0,
    OP_WRITE  = 3'd1,
    OP_SEQ    = 3'd2,
    OP_START  = 3'd3,
    OP_JUMP   = 3'd4,
    OP_SEQLEN = 3'd5,
    OP_STOP   = 3'd6,
    OP_COPY   = 3'd7
  } opcode_e;

  // width of an index field able to name n items (at least one bit)
  function automatic int unsigned idx_w(input int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

  // instruction sizes in bits
  function automatic int unsigned write_len(input int unsigned ncache,
      input int unsigned lines, input int unsigned line_w);
    return OP_W + idx_w(ncache) + idx_w(lines) + line_w;
  endfunction

  function automatic int unsigned seq_len_bits(input int unsigned ncache,
      input int unsigned lines, input int unsigned sl);
    return OP_W + idx_w(ncache) + sl * idx_w(lines);
  endfunction

  function automatic int unsigned jump_len(input int unsigned mem_depth,
      input int unsigned mem_w);
    return OP_W + idx_w(mem_depth) + idx_w(mem_w);
  endfunction

  function automatic int unsigned seqlen_len(input int unsigned seq_max);
    return OP_W + idx_w(seq_max + 1);
  endfunction

  function automatic int unsigned copy_len(input int unsigned ncache,
      input int unsigned lines, input int unsigned line_w,
      input int unsigned max_flips, input int unsigned nf);
    return OP_W + idx_w(ncache) + 2 * idx_w(lines) + idx_w(max_flips + 1)
           + nf * idx_w(line_w);
  endfunction

  function automatic int unsigned max2(input int unsigned a, input int unsigned b);
    return (a > b) ? a : b;
  endfunction

  // longest instruction of a configuration
  function automatic int unsigned max_instr_len(input int unsigned ncache,
      input int unsigned lines, input int unsigned line_w,
      input int unsigned seq_max, input int unsigned mem_depth,
      input int unsigned mem_w, input int unsigned max_flips);
    int unsigned m;
    m = write_len(ncache, lines, line_w);
    m = max2(m, seq_len_bits(ncache, lines, seq_max));
    m = max2(m, jump_len(mem_depth, mem_w));
    m = max2(m, seqlen_len(seq_max));
    m = max2(m, copy_len(ncache, lines, line_w, max_flips, max_flips));
    return m;
  endfunction

endpackage
