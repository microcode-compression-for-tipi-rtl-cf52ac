// mtc_decoder_top: microcode trace decoder.
//
// Decompresses a program of trace-cache instructions into a stream of wide
// horizontal microcode words, one word per cycle when it keeps up.
// NPIPE fetch/decode pipelines read the program memory; each pipeline's
// decode stage drives its own bus to all NCACHE trace caches and their
// sequence managers. Every microcode word is the concatenation of one line
// from each cache (cache k supplies bits [k*LINE_W +: LINE_W]); the line
// is chosen by that cache's sequence manager.
//
// Issue: the pipelines run in lockstep. In a cycle where every pipeline's
// window for the current stream holds a full instruction, one packet of
// NPIPE instructions (one per pipeline) is moved into the decode stage;
// the stream alternates 0,1,0,1 from packet to packet. Decode executes the
// packet in the next cycle unless it holds a START that cannot run yet
// because a sequence manager is still busy: the packet then waits in
// decode and fetch stalls. All instructions of a packet act at the same
// clock edge. STOP freezes fetch and decode for good (until reset); the
// sequence managers still play out what they were started with.
//
// Output: uc_valid/uc_ready handshake towards the main architecture. When
// the sequences run out before the next START, uc_valid stays low and the
// main architecture has to wait.
// Timing: a START executed in cycle t makes the first word of the new
// sequence appear in cycle t+2 (t+1 selects the index, the cache read is
// registered). Back-to-back sequences run without a gap if START executes
// in the cycle of the previous sequence's last read.
// Program loading: ld_* writes program words; hold rst_n low while loading.
// Stream k of pipeline p starts at word 2p+k; the encoder places a JUMP
// to the real start of each stream there.
//
// The block structure, the interleaved streams, the START synchronisation
// and the broadcast buses follow the design; lockstep issue, the
// valid/ready output and the reset start addresses are this
// implementation's choices.
module mtc_decoder_top
  import mtc_pkg::*;
#(
  parameter int unsigned NPIPE     = NPIPE_D,
  parameter int unsigned NCACHE    = NCACHE_D,
  parameter int unsigned LINES     = LINES_D,
  parameter int unsigned LINE_W    = LINE_W_D,
  parameter int unsigned SEQ_MAX   = SEQ_MAX_D,
  parameter int unsigned SEQ_INIT  = SEQ_INIT_D,
  parameter int unsigned MEM_W     = MEM_W_D,
  parameter int unsigned MEM_DEPTH = MEM_DEPTH_D,
  parameter int unsigned MAX_FLIPS = MAX_FLIPS_D,
  localparam int unsigned AW  = idx_w(MEM_DEPTH),
  localparam int unsigned UCW = NCACHE * LINE_W
) (
  input  logic             clk,
  input  logic             rst_n,
  // program load port
  input  logic             ld_en,
  input  logic [AW-1:0]    ld_addr,
  input  logic [MEM_W-1:0] ld_data,
  // microcode towards the main architecture
  output logic             uc_valid,
  input  logic             uc_ready,
  output logic [UCW-1:0]   uc_data,
  // status
  output logic             start_wait,   // decode holds a START
  output logic             halted        // STOP executed
);

  localparam int unsigned MAX_INSTR = max_instr_len(NCACHE, LINES, LINE_W,
                                        SEQ_MAX, MEM_DEPTH, MEM_W, MAX_FLIPS);
  localparam int unsigned CW  = idx_w(NCACHE);
  localparam int unsigned IW  = idx_w(LINES);
  localparam int unsigned SLW = idx_w(SEQ_MAX + 1);
  localparam int unsigned OW  = idx_w(MEM_W);
  localparam int unsigned SZW = $clog2(MAX_INSTR + 1);

  // ---------------- memory and fetch ----------------
  logic [NPIPE-1:0]                 mem_req;
  logic [NPIPE-1:0][AW-1:0]         mem_addr;
  logic [NPIPE-1:0][MEM_W-1:0]      mem_rdata;
  logic [NPIPE-1:0]                 win_ready;
  logic [NPIPE-1:0][MAX_INSTR-1:0]  win;

  // decode stage registers
  logic                             d_valid_q;
  logic                             d_stream_q;
  logic [NPIPE-1:0][MAX_INSTR-1:0]  d_win_q;
  logic                             next_stream_q;
  logic                             stopped_q;
  logic [SLW-1:0]                   seq_len_q;

  // decode outputs
  logic [NPIPE-1:0][SZW-1:0]        size;
  logic [NPIPE-1:0]                 wr_en, wr_copy, seq_en, start, seqlen_en;
  logic [NPIPE-1:0]                 stop, jump;
  logic [NPIPE-1:0][CW-1:0]         cache;
  logic [NPIPE-1:0][IW-1:0]         idx, src;
  logic [NPIPE-1:0][LINE_W-1:0]     data;
  logic [NPIPE-1:0][SEQ_MAX-1:0][IW-1:0] seq_idx;
  logic [NPIPE-1:0][SLW-1:0]        seqlen_val;
  logic [NPIPE-1:0][AW-1:0]         jump_addr;
  logic [NPIPE-1:0][OW-1:0]         jump_off;

  // control
  logic                             d_fire, issue, any_start, any_stop;
  logic                             all_can_start, adv;
  logic [NCACHE-1:0]                sm_active, sm_can_start;
  logic [NCACHE-1:0][IW-1:0]        sm_rd_idx;
  logic [NCACHE-1:0][NPIPE-1:0]     cache_we;
  logic [NCACHE-1:0]                sm_load;
  logic [NCACHE-1:0][SEQ_MAX-1:0][IW-1:0] sm_idx;
  logic [NCACHE-1:0][LINE_W-1:0]    rd_data;

  mtc_prog_mem #(.NPORT(NPIPE), .MEM_W(MEM_W), .MEM_DEPTH(MEM_DEPTH)) u_mem (
    .clk, .ld_en, .ld_addr, .ld_data,
    .rd_req(mem_req), .rd_addr(mem_addr), .rd_data(mem_rdata)
  );

  for (genvar p = 0; p < NPIPE; p++) begin : g_pipe
    mtc_fetch #(
      .MAX_INSTR(MAX_INSTR), .MEM_W(MEM_W), .MEM_DEPTH(MEM_DEPTH),
      .RESET_BASE(2 * p)
    ) u_fetch (
      .clk, .rst_n,
      .en            (!stopped_q),
      .mem_req       (mem_req[p]),
      .mem_addr      (mem_addr[p]),
      .mem_rdata     (mem_rdata[p]),
      .sel_stream    (next_stream_q),
      .win_ready     (win_ready[p]),
      .win           (win[p]),
      .consume       (d_fire),
      .consume_stream(d_stream_q),
      .consume_size  (size[p]),
      .jump          (d_fire && jump[p]),
      .jump_stream   (d_stream_q),
      .jump_addr     (jump_addr[p]),
      .jump_off      (jump_off[p])
    );

    mtc_decode #(
      .NCACHE(NCACHE), .LINES(LINES), .LINE_W(LINE_W), .SEQ_MAX(SEQ_MAX),
      .MEM_W(MEM_W), .MEM_DEPTH(MEM_DEPTH), .MAX_FLIPS(MAX_FLIPS)
    ) u_decode (
      .valid     (d_valid_q),
      .win       (d_win_q[p]),
      .seq_len   (seq_len_q),
      .size      (size[p]),
      .op        (),
      .wr_en     (wr_en[p]),
      .wr_copy   (wr_copy[p]),
      .cache     (cache[p]),
      .idx       (idx[p]),
      .src       (src[p]),
      .data      (data[p]),
      .seq_en    (seq_en[p]),
      .seq_idx   (seq_idx[p]),
      .start     (start[p]),
      .seqlen_en (seqlen_en[p]),
      .seqlen_val(seqlen_val[p]),
      .stop      (stop[p]),
      .jump      (jump[p]),
      .jump_addr (jump_addr[p]),
      .jump_off  (jump_off[p])
    );
  end

  // ---------------- issue and decode control ----------------
  assign any_start     = |start;
  assign any_stop      = |stop;
  assign all_can_start = &sm_can_start;
  assign d_fire        = d_valid_q && !(any_start && !all_can_start);
  assign issue         = (&win_ready) && !stopped_q && !(d_fire && any_stop) &&
                         (!d_valid_q || d_fire);
  assign start_wait    = d_valid_q && !d_fire;
  assign halted        = stopped_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_valid_q     <= 1'b0;
      d_stream_q    <= 1'b0;
      d_win_q       <= '0;
      next_stream_q <= 1'b0;
      stopped_q     <= 1'b0;
      seq_len_q     <= SLW'(SEQ_INIT);
    end else begin
      if (issue) begin
        d_valid_q     <= 1'b1;
        d_stream_q    <= next_stream_q;
        d_win_q       <= win;
        next_stream_q <= !next_stream_q;
      end else if (d_fire) begin
        d_valid_q     <= 1'b0;
      end
      if (d_fire) begin
        for (int p = 0; p < NPIPE; p++)
          if (seqlen_en[p]) seq_len_q <= seqlen_val[p];
        if (any_stop) stopped_q <= 1'b1;
      end
    end
  end

  // ---------------- buses, caches, sequence managers ----------------
  mtc_bus_xbar #(
    .NPIPE(NPIPE), .NCACHE(NCACHE), .LINES(LINES), .SEQ_MAX(SEQ_MAX)
  ) u_xbar (
    .wr_en   (wr_en & {NPIPE{d_fire}}),
    .seq_en  (seq_en & {NPIPE{d_fire}}),
    .cache   (cache),
    .seq_idx (seq_idx),
    .cache_we(cache_we),
    .sm_load (sm_load),
    .sm_idx  (sm_idx)
  );

  assign adv = (&sm_active) && (!uc_valid || uc_ready);

  for (genvar k = 0; k < NCACHE; k++) begin : g_cache
    mtc_seq_manager #(.LINES(LINES), .SEQ_MAX(SEQ_MAX)) u_sm (
      .clk, .rst_n,
      .load     (sm_load[k]),
      .load_idx (sm_idx[k]),
      .load_len (seq_len_q),
      .start    (d_fire && any_start),
      .adv      (adv),
      .active   (sm_active[k]),
      .rd_idx   (sm_rd_idx[k]),
      .last     (),
      .can_start(sm_can_start[k]),
      .pending  ()
    );

    mtc_trace_cache #(.NPORT(NPIPE), .LINES(LINES), .LINE_W(LINE_W)) u_cache (
      .clk, .rst_n,
      .we     (cache_we[k]),
      .copy   (wr_copy),
      .idx    (idx),
      .src    (src),
      .wdata  (data),
      .rd_en  (adv),
      .rd_idx (sm_rd_idx[k]),
      .rd_data(rd_data[k])
    );

    assign uc_data[k*LINE_W +: LINE_W] = rd_data[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        uc_valid <= 1'b0;
    else if (adv)      uc_valid <= 1'b1;
    else if (uc_ready) uc_valid <= 1'b0;
  end

endmodule
