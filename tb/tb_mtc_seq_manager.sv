// tb_mtc_seq_manager: self-checking test of the sequence manager.
// A reference model of the two index buffers runs beside the block. Random
// SEQUENCE loads (lengths 1..20), STARTs issued whenever the block allows
// one (and sometimes later) and random advance cycles are applied; each
// cycle the index, active, last, can_start and pending outputs are checked.
// It also checks that a START issued in the last read cycle of a sequence
// continues without a gap, and that a load in the START cycle stays
// pending.
module tb_mtc_seq_manager;
  localparam int SM = 20;

  logic                 clk = 0, rst_n;
  logic                 load, start, adv;
  logic [SM-1:0][5:0]   load_idx;
  logic [4:0]           load_len;
  logic                 active, last, can_start, pending;
  logic [5:0]           rd_idx;

  int checks = 0, failures = 0, gapless = 0, load_at_start = 0, starts = 0;

  // reference state
  int  m_tmp[SM], m_work[SM];
  int  m_tlen, m_wlen, m_pos;
  bit  m_pend, m_act;

  mtc_seq_manager dut (.*);

  always #5 clk = !clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit m_last, m_can;
    rst_n = 0;
    load = 0; start = 0; adv = 0; load_idx = '0; load_len = '0;
    m_pend = 0; m_act = 0; m_pos = 0; m_tlen = 0; m_wlen = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 8000; cyc++) begin
      @(negedge clk);
      adv  = ($urandom_range(0, 4) != 0);
      m_last = m_act && (m_pos == m_wlen - 1);
      m_can  = !m_act || (adv && m_last);
      start = m_can && m_pend && ($urandom_range(0, 3) != 0);
      load = (!m_pend || start) && ($urandom_range(0, 2) == 0);
      if (load) begin
        load_len = 5'($urandom_range(1, SM));
        for (int j = 0; j < SM; j++) load_idx[j] = 6'($urandom);
      end
      #1;
      // outputs against the reference
      chk(active == m_act, "active");
      chk(can_start == m_can, "can_start");
      chk(pending == m_pend, "pending");
      if (m_act) begin
        chk(rd_idx == 6'(m_work[m_pos]), "rd_idx");
        chk(last == m_last, "last");
      end
      if (start && m_act && m_last) gapless++;
      if (start && load) load_at_start++;
      if (start) starts++;
      // reference update
      if (adv && m_act) begin
        m_pos++;
        if (m_last) m_act = 0;
      end
      if (start && m_pend) begin
        m_work = m_tmp;
        m_wlen = m_tlen;
        m_pos  = 0;
        m_act  = 1;
        m_pend = 0;
      end
      if (load) begin
        for (int j = 0; j < SM; j++) m_tmp[j] = int'(load_idx[j]);
        m_tlen = int'(load_len);
        m_pend = 1;
      end
    end
    chk(gapless > 0 && load_at_start > 0 && starts > 100, "scenario coverage");
    $display("starts=%0d gapless=%0d load_at_start=%0d", starts, gapless, load_at_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
