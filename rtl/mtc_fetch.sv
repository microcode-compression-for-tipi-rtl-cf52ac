// mtc_fetch: fetch unit of one decoder pipeline.
//
// Memory words have a fixed width while instructions have variable length,
// so the unit keeps a bit buffer and presents the lowest MAX_INSTR buffered
// bits to the decode stage as the instruction window. The size of an
// instruction is only known once it is decoded, one cycle after it left
// fetch; to still issue one instruction per cycle the pipeline interleaves
// two independent instruction streams, each with its own program counter
// and buffer. The decoder issues from the stream selected by sel_stream
// (alternately 0 and 1) and, a cycle later, the decode stage returns the
// size through consume_*, which drops those bits from that stream's buffer.
// A JUMP decoded for a stream flushes that stream's buffer, loads its
// program counter with the word address and records the bit offset at
// which the first returned word is to be entered.
//
// Memory timing: a request in cycle t returns data in cycle t+1 (one
// request per cycle, shared by both streams). A request is made for the
// stream with the fewer buffered bits among those that still have room for
// a whole word, counting a word already in flight. A stream's window is
// ready once it holds MAX_INSTR bits, enough for any instruction.
// Stream k starts after reset at word RESET_BASE+k, offset 0.
// The two-stream interleaving and buffer flush on jumps follow the design;
// the buffer size, the request policy and the reset addresses are this
// implementation's choices.
module mtc_fetch #(
  parameter int unsigned MAX_INSTR  = 125,
  parameter int unsigned MEM_W      = mtc_pkg::MEM_W_D,
  parameter int unsigned MEM_DEPTH  = mtc_pkg::MEM_DEPTH_D,
  parameter int unsigned RESET_BASE = 0,
  localparam int unsigned AW    = mtc_pkg::idx_w(MEM_DEPTH),
  localparam int unsigned OW    = mtc_pkg::idx_w(MEM_W),
  localparam int unsigned SZW   = $clog2(MAX_INSTR + 1),
  localparam int unsigned BUF_W = MAX_INSTR + 2 * MEM_W,
  localparam int unsigned CNTW  = $clog2(BUF_W + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,            // allow memory requests
  // memory port
  output logic                 mem_req,
  output logic [AW-1:0]        mem_addr,
  input  logic [MEM_W-1:0]     mem_rdata,
  // instruction window towards decode
  input  logic                 sel_stream,
  output logic                 win_ready,
  output logic [MAX_INSTR-1:0] win,
  // size feedback from decode
  input  logic                 consume,
  input  logic                 consume_stream,
  input  logic [SZW-1:0]       consume_size,
  // jump from decode
  input  logic                 jump,
  input  logic                 jump_stream,
  input  logic [AW-1:0]        jump_addr,
  input  logic [OW-1:0]        jump_off
);

  logic [BUF_W-1:0] buf_q  [2];
  logic [CNTW-1:0]  cnt_q  [2];
  logic [AW-1:0]    pc_q   [2];
  logic [OW-1:0]    skip_q [2];
  logic             pend_q;     // a word arrives this cycle
  logic             pend_s_q;   // ... for this stream

  logic [BUF_W-1:0] buf_d  [2];
  logic [CNTW-1:0]  cnt_d  [2];
  logic [AW-1:0]    pc_d   [2];
  logic [OW-1:0]    skip_d [2];

  logic [1:0]       elig;
  logic [CNTW:0]    occ [2];
  logic             req_s;

  assign win_ready = (cnt_q[sel_stream] >= CNTW'(MAX_INSTR));
  assign win       = buf_q[sel_stream][MAX_INSTR-1:0];

  // request selection
  always_comb begin
    for (int s = 0; s < 2; s++) begin
      occ[s]  = (CNTW+1)'(cnt_q[s]) +
                ((pend_q && (pend_s_q == 1'(s))) ? (CNTW+1)'(MEM_W) : '0);
      elig[s] = en && !(jump && (jump_stream == 1'(s))) &&
                (occ[s] + (CNTW+1)'(MEM_W) <= (CNTW+1)'(BUF_W));
    end
    if (elig[0] && elig[1])
      req_s = (occ[1] < occ[0]) ? 1'b1 :
              (occ[0] < occ[1]) ? 1'b0 : sel_stream;
    else
      req_s = elig[1];
    mem_req  = |elig;
    mem_addr = pc_q[req_s];
  end

  // buffer update per stream
  always_comb begin
    for (int s = 0; s < 2; s++) begin
      logic [BUF_W-1:0] b;
      logic [CNTW-1:0]  c;
      logic [MEM_W-1:0] w;
      b = buf_q[s];
      c = cnt_q[s];
      w = mem_rdata >> skip_q[s];
      if (consume && (consume_stream == 1'(s))) begin
        b = b >> consume_size;
        c = c - CNTW'(consume_size);
      end
      buf_d[s]  = b;
      cnt_d[s]  = c;
      pc_d[s]   = pc_q[s];
      skip_d[s] = skip_q[s];
      if (jump && (jump_stream == 1'(s))) begin
        buf_d[s]  = '0;
        cnt_d[s]  = '0;
        pc_d[s]   = jump_addr;
        skip_d[s] = jump_off;
      end else begin
        if (pend_q && (pend_s_q == 1'(s))) begin
          buf_d[s]  = b | (BUF_W'(w) << c);
          cnt_d[s]  = c + CNTW'(MEM_W) - CNTW'(skip_q[s]);
          skip_d[s] = '0;
        end
        if (mem_req && (req_s == 1'(s))) pc_d[s] = pc_q[s] + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < 2; s++) begin
        buf_q[s]  <= '0;
        cnt_q[s]  <= '0;
        pc_q[s]   <= AW'(RESET_BASE + s);
        skip_q[s] <= '0;
      end
      pend_q   <= 1'b0;
      pend_s_q <= 1'b0;
    end else begin
      for (int s = 0; s < 2; s++) begin
        buf_q[s]  <= buf_d[s];
        cnt_q[s]  <= cnt_d[s];
        pc_q[s]   <= pc_d[s];
        skip_q[s] <= skip_d[s];
      end
      pend_q   <= mem_req;
      pend_s_q <= req_s;
    end
  end

  // decode never consumes more bits than it was given
  a_consume_fits: assert property (@(posedge clk) disable iff (!rst_n)
    consume |-> (CNTW'(consume_size) <= cnt_q[consume_stream]));

endmodule
