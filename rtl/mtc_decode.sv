// mtc_decode: decode stage of one decoder pipeline.
//
// Takes the instruction window presented by the fetch unit (the lowest
// MAX_INSTR bits of a stream, opcode in bits [2:0]) and, purely
// combinationally, works out the instruction's size in bits and the
// operation it asks of the caches, the sequence managers or the fetch unit.
// The size goes back to the fetch unit, which drops that many bits from
// the stream; the rest drives this pipeline's bus.
//
//   WRITE C,I,D      wr_en, cache=C, idx=I, data=D
//   COPY C,DI,SI,BC  wr_en, wr_copy, cache=C, idx=DI, src=SI,
//                    data = mask with a one at each of the NF flip positions
//   SEQUENCE C,S     seq_en, cache=C, seq_idx = the SL indices of S
//                    (SL = seq_len, the length set by the last SEQLENGTH)
//   START / STOP     start / stop
//   JUMP A,O         jump, jump_addr=A, jump_off=O
//   SEQLENGTH SL     seqlen_en, seqlen_val=SL
//
// The instruction list follows the design; the bit layout (see mtc_pkg) and
// the encoding of COPY's flipped bits as a count followed by bit positions
// are this implementation's choices. Outputs other than size are only
// meaningful while valid is high; all enables are low when it is not.
// Operand fields that sit at the same bit position in every instruction
// that uses them (cache, index, source, jump address, SEQLENGTH value)
// are plain wires from the window; only the enables gate them.
module mtc_decode
  import mtc_pkg::*;
#(
  parameter int unsigned NCACHE    = NCACHE_D,
  parameter int unsigned LINES     = LINES_D,
  parameter int unsigned LINE_W    = LINE_W_D,
  parameter int unsigned SEQ_MAX   = SEQ_MAX_D,
  parameter int unsigned MEM_W     = MEM_W_D,
  parameter int unsigned MEM_DEPTH = MEM_DEPTH_D,
  parameter int unsigned MAX_FLIPS = MAX_FLIPS_D,
  localparam int unsigned MAX_INSTR = max_instr_len(NCACHE, LINES, LINE_W,
                                        SEQ_MAX, MEM_DEPTH, MEM_W, MAX_FLIPS),
  localparam int unsigned CW  = idx_w(NCACHE),
  localparam int unsigned IW  = idx_w(LINES),
  localparam int unsigned SLW = idx_w(SEQ_MAX + 1),
  localparam int unsigned AW  = idx_w(MEM_DEPTH),
  localparam int unsigned OW  = idx_w(MEM_W),
  localparam int unsigned PW  = idx_w(LINE_W),
  localparam int unsigned FCW = idx_w(MAX_FLIPS + 1),
  localparam int unsigned SZW = $clog2(MAX_INSTR + 1)
) (
  input  logic                          valid,
  input  logic [MAX_INSTR-1:0]          win,
  input  logic [SLW-1:0]                seq_len,
  output logic [SZW-1:0]                size,
  output opcode_e                       op,
  // cache operations
  output logic                          wr_en,
  output logic                          wr_copy,
  output logic [CW-1:0]                 cache,
  output logic [IW-1:0]                 idx,
  output logic [IW-1:0]                 src,
  output logic [LINE_W-1:0]             data,
  // sequence operations
  output logic                          seq_en,
  output logic [SEQ_MAX-1:0][IW-1:0]    seq_idx,
  output logic                          start,
  output logic                          seqlen_en,
  output logic [SLW-1:0]                seqlen_val,
  // control
  output logic                          stop,
  output logic                          jump,
  output logic [AW-1:0]                 jump_addr,
  output logic [OW-1:0]                 jump_off
);

  localparam int unsigned F0 = OP_W;          // first operand bit

  logic [FCW-1:0] nf;

  always_comb begin
    op         = opcode_e'(win[OP_W-1:0]);
    cache      = win[F0 +: CW];
    nf         = win[F0 + CW + 2*IW +: FCW];
    // defaults
    size       = SZW'(OP_W);
    wr_en      = 1'b0;
    wr_copy    = 1'b0;
    idx        = win[F0 + CW +: IW];
    src        = win[F0 + CW + IW +: IW];
    data       = win[F0 + CW + IW +: LINE_W];
    seq_en     = 1'b0;
    start      = 1'b0;
    seqlen_en  = 1'b0;
    seqlen_val = win[F0 +: SLW];
    stop       = 1'b0;
    jump       = 1'b0;
    jump_addr  = win[F0 +: AW];
    jump_off   = win[F0 + AW +: OW];
    for (int j = 0; j < SEQ_MAX; j++)
      seq_idx[j] = (j < int'(seq_len)) ? win[F0 + CW + j*IW +: IW] : '0;

    unique case (op)
      OP_NOP: ;
      OP_WRITE: begin
        size  = SZW'(write_len(NCACHE, LINES, LINE_W));
        wr_en = valid;
      end
      OP_SEQ: begin
        size   = SZW'(OP_W + CW + int'(seq_len) * IW);
        seq_en = valid;
      end
      OP_START: start = valid;
      OP_JUMP: begin
        size = SZW'(jump_len(MEM_DEPTH, MEM_W));
        jump = valid;
      end
      OP_SEQLEN: begin
        size      = SZW'(seqlen_len(SEQ_MAX));
        seqlen_en = valid;
      end
      OP_STOP: stop = valid;
      OP_COPY: begin
        size    = SZW'(OP_W + CW + 2*IW + FCW + int'(nf) * PW);
        wr_en   = valid;
        wr_copy = 1'b1;
        data    = '0;
        for (int j = 0; j < MAX_FLIPS; j++)
          if (j < int'(nf))
            data[win[F0 + CW + 2*IW + FCW + j*PW +: PW]] = 1'b1;
      end
      default: ;
    endcase
  end

endmodule
