// tb_mtc_prog_mem: self-checking test of the program memory.
// Loads random words, then reads random addresses on both ports (and keeps
// loading in between) and checks that each read returns, one cycle later,
// the word held before that clock edge.
module tb_mtc_prog_mem;
  localparam int NP = 2, MW = 64, MD = 4096;

  logic                    clk = 0;
  logic                    ld_en;
  logic [11:0]             ld_addr;
  logic [MW-1:0]           ld_data;
  logic [NP-1:0]           rd_req;
  logic [NP-1:0][11:0]     rd_addr;
  logic [NP-1:0][MW-1:0]   rd_data;

  logic [MW-1:0] model [MD];
  logic [MW-1:0] exp_d [NP];
  int checks = 0, failures = 0;

  mtc_prog_mem dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NP-1:0] req_q;
    ld_en = 0; ld_addr = '0; ld_data = '0; rd_req = '0; rd_addr = '0;
    for (int i = 0; i < MD; i++) begin
      @(negedge clk);
      ld_en = 1;
      ld_addr = 12'(i);
      ld_data = {$urandom, $urandom};
      model[i] = ld_data;
    end
    @(negedge clk);
    ld_en = 0;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      for (int p = 0; p < NP; p++) begin
        rd_req[p]  = 1'($urandom);
        rd_addr[p] = 12'($urandom);
        exp_d[p]   = model[rd_addr[p]];
      end
      req_q = rd_req;
      ld_en   = ($urandom_range(0, 3) == 0);
      ld_addr = ($urandom_range(0, 1) == 0) ? rd_addr[0] : 12'($urandom);
      ld_data = {$urandom, $urandom};
      @(posedge clk);
      if (ld_en) model[ld_addr] = ld_data;
      #1;
      for (int p = 0; p < NP; p++)
        if (req_q[p]) begin
          checks++;
          if (rd_data[p] !== exp_d[p]) begin
            failures++;
            if (failures < 10) $display("FAIL port %0d addr %0d", p, rd_addr[p]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
