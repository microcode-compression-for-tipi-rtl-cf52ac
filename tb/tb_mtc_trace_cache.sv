// tb_mtc_trace_cache: self-checking test of one trace cache.
// Random WRITE and COPY operations on both bus ports (few distinct
// indices, so same-line collisions and copies of just-written lines
// occur) run against a reference array; every cycle's registered read
// is compared with the reference contents before that clock edge.
module tb_mtc_trace_cache;
  localparam int NP = 2, NL = 64, LW = 32;

  logic                  clk = 0, rst_n;
  logic [NP-1:0]         we, copy;
  logic [NP-1:0][5:0]    idx, src;
  logic [NP-1:0][LW-1:0] wdata;
  logic                  rd_en;
  logic [5:0]            rd_idx;
  logic [LW-1:0]         rd_data;

  logic [LW-1:0] model [NL];
  logic [LW-1:0] exp_rd;
  bit            exp_valid;
  int checks = 0, failures = 0, copies = 0, collisions = 0;

  mtc_trace_cache dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [LW-1:0] nxt [NL];
    rst_n = 0;
    we = '0; copy = '0; idx = '0; src = '0; wdata = '0; rd_en = 0; rd_idx = '0;
    for (int i = 0; i < NL; i++) model[i] = '0;
    exp_valid = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      for (int p = 0; p < NP; p++) begin
        we[p]    = ($urandom_range(0, 3) != 0);
        copy[p]  = 1'($urandom);
        idx[p]   = 6'((cyc < 200) ? $urandom_range(0, 63) : $urandom_range(0, 7));
        src[p]   = 6'($urandom_range(0, 7));
        wdata[p] = copy[p] ? (LW'(1) << $urandom_range(0, 31)) | (LW'(1) << $urandom_range(0, 31))
                           : LW'($urandom);
      end
      rd_en  = ($urandom_range(0, 3) != 0);
      rd_idx = 6'((cyc < 200) ? $urandom_range(0, 63) : $urandom_range(0, 7));
      // reference update, ports read the old contents, port 1 wins
      nxt = model;
      for (int p = 0; p < NP; p++)
        if (we[p]) begin
          nxt[idx[p]] = copy[p] ? model[src[p]] ^ wdata[p] : wdata[p];
          if (copy[p]) copies++;
        end
      if (we[0] && we[1] && idx[0] == idx[1]) collisions++;
      if (rd_en) begin
        exp_rd = model[rd_idx];
        exp_valid = 1;
      end
      @(posedge clk);
      model = nxt;
      #1;
      if (exp_valid) begin
        checks++;
        if (rd_data !== exp_rd) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d read %h expected %h", cyc, rd_data, exp_rd);
        end
      end
    end
    // read back every line
    @(negedge clk);
    we = '0;
    for (int i = 0; i < NL; i++) begin
      rd_en = 1;
      rd_idx = 6'(i);
      @(posedge clk);
      #1;
      checks++;
      if (rd_data !== model[i]) begin
        failures++;
        $display("FAIL final line %0d", i);
      end
      @(negedge clk);
    end
    checks++;
    if (copies == 0 || collisions == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
