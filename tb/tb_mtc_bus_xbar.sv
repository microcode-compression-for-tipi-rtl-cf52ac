// tb_mtc_bus_xbar: self-checking test of the bus enable decoding.
// Drives random WRITE/COPY and SEQUENCE requests from every pipeline and
// checks each cache's write enables, the sequence load enables and that
// the sequence reaching each manager is the one of the highest-numbered
// pipeline that addressed it.
module tb_mtc_bus_xbar;
  localparam int NP = 2, NC = 4, SM = 20;

  logic [NP-1:0]               wr_en, seq_en;
  logic [NP-1:0][1:0]          cache;
  logic [NP-1:0][SM-1:0][5:0]  seq_idx;
  logic [NC-1:0][NP-1:0]       cache_we;
  logic [NC-1:0]               sm_load;
  logic [NC-1:0][SM-1:0][5:0]  sm_idx;

  int checks = 0, failures = 0;

  mtc_bus_xbar dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) begin
      for (int p = 0; p < NP; p++) begin
        cache[p]  = 2'($urandom_range(0, 3));
        wr_en[p]  = 1'($urandom);
        seq_en[p] = !wr_en[p] && 1'($urandom);
        for (int j = 0; j < SM; j++) seq_idx[p][j] = 6'($urandom);
      end
      #1;
      for (int k = 0; k < NC; k++) begin
        bit exp_load;
        int who;
        exp_load = 0;
        who = -1;
        for (int p = 0; p < NP; p++) begin
          checks++;
          if (cache_we[k][p] !== (wr_en[p] && cache[p] == 2'(k))) begin
            failures++;
            $display("FAIL we cache %0d port %0d", k, p);
          end
          if (seq_en[p] && cache[p] == 2'(k)) begin
            exp_load = 1;
            who = p;
          end
        end
        checks++;
        if (sm_load[k] !== exp_load || (exp_load && sm_idx[k] !== seq_idx[who])) begin
          failures++;
          $display("FAIL sequence routing cache %0d", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
