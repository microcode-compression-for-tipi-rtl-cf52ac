// tb_mtc_fetch: self-checking test of the fetch unit.
// The memory holds random bits; each stream is simply the bit string that
// starts at the stream's current bit address. The testbench plays the
// decode stage: it issues from the two streams alternately, checks every
// instruction window against the memory bits at the expected address, and
// one cycle later returns a random size or, sometimes, a JUMP to a random
// word address and bit offset. A second phase with short instructions and
// no jumps checks the rate: after warm-up a window must be ready in every
// cycle, i.e. one instruction issued per cycle from interleaved streams.
module tb_mtc_fetch;
  localparam int MI = 125, MW = 64, MD = 4096, RB = 4;
  localparam int TOT = MW * MD;

  logic              clk = 0, rst_n, en;
  logic              mem_req;
  logic [11:0]       mem_addr;
  logic [MW-1:0]     mem_rdata;
  logic              sel_stream, win_ready;
  logic [MI-1:0]     win;
  logic              consume, consume_stream, jump, jump_stream;
  logic [6:0]        consume_size;
  logic [11:0]       jump_addr;
  logic [5:0]        jump_off;

  logic [MW-1:0] mem [MD];
  int checks = 0, failures = 0, jumps = 0, issues = 0, not_ready = 0;

  mtc_fetch #(.MAX_INSTR(MI), .MEM_W(MW), .MEM_DEPTH(MD), .RESET_BASE(RB)) dut (.*);

  always #5 clk = !clk;
  always_ff @(posedge clk) if (mem_req) mem_rdata <= mem[mem_addr];

  function automatic logic [MI-1:0] bits_at(input int a);
    logic [MI-1:0] r;
    for (int i = 0; i < MI; i++) begin
      int b = (a + i) % TOT;
      r[i] = mem[b / MW][b % MW];
    end
    return r;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  ptr[2];
    bit  sel, d_valid, d_stream, d_jump;
    int  d_size, d_addr, d_off;
    int  max_size, jump_pct;
    for (int i = 0; i < MD; i++) mem[i] = {$urandom, $urandom};
    rst_n = 0; en = 1;
    consume = 0; consume_stream = 0; consume_size = '0;
    jump = 0; jump_stream = 0; jump_addr = '0; jump_off = '0; sel_stream = 0;
    mem_rdata = '0;
    ptr[0] = RB * MW;
    ptr[1] = (RB + 1) * MW;
    sel = 0; d_valid = 0; d_stream = 0; d_jump = 0; d_size = 0; d_addr = 0; d_off = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 12000; cyc++) begin
      bit phase2;
      phase2   = (cyc >= 8000);
      max_size = phase2 ? 24 : MI;
      jump_pct = phase2 ? 0 : 4;
      @(negedge clk);
      // decode stage: act on the instruction issued last cycle
      consume        = d_valid;
      consume_stream = d_stream;
      consume_size   = 7'(d_size);
      jump           = d_valid && d_jump;
      jump_stream    = d_stream;
      jump_addr      = 12'(d_addr);
      jump_off       = 6'(d_off);
      sel_stream     = sel;
      #1;
      if (phase2 && cyc >= 8050 && !win_ready) not_ready++;
      // model of the decode stage's effect
      if (d_valid) begin
        if (d_jump) ptr[d_stream] = d_addr * MW + d_off;
        else        ptr[d_stream] = (ptr[d_stream] + d_size) % TOT;
      end
      d_valid = 0;
      if (win_ready) begin
        checks++;
        issues++;
        if (win !== bits_at(ptr[sel])) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d stream %0d window mismatch", cyc, sel);
        end
        d_valid  = 1;
        d_stream = sel;
        d_jump   = ($urandom_range(0, 99) < jump_pct);
        d_size   = d_jump ? 21 : $urandom_range(1, max_size);
        d_addr   = $urandom_range(0, MD - 1);
        d_off    = $urandom_range(0, MW - 1);
        if (d_jump) jumps++;
        sel = !sel;
      end
    end
    checks++;
    if (not_ready != 0) begin
      failures++;
      $display("FAIL rate: %0d cycles without a ready window", not_ready);
    end
    checks++;
    if (jumps < 20) failures++;
    $display("issues=%0d jumps=%0d", issues, jumps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
