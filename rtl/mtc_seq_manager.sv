// mtc_seq_manager: sequence manager attached to one trace cache.
//
// It decides which cache line is read out in each cycle. It has two index
// buffers: a temporary buffer filled by a SEQUENCE instruction (load, with
// the sequence length in force at that moment) and a working buffer that
// is being played out. A START (start) copies the temporary buffer into the
// working buffer, if a sequence is waiting there, and restarts the read
// pointer; afterwards every cycle with adv set presents the next index.
// Because the temporary buffer is separate, the next sequence can be
// loaded while the current one is still being read.
//
//   rd_idx     index to read in this cycle (valid while active)
//   last       rd_idx is the final index of the working sequence
//   can_start  a START may execute this cycle: the manager is idle, or it
//              is reading its final index in this very cycle
//   pending    a loaded sequence waits in the temporary buffer
//
// A load and a START in the same cycle: START takes the old temporary
// contents and the new sequence stays pending. The two buffers, the copy
// on START and the synchronisation rule follow the design; the handshake
// signals and the same-cycle rule are this implementation's choices.
module mtc_seq_manager #(
  parameter int unsigned LINES   = mtc_pkg::LINES_D,
  parameter int unsigned SEQ_MAX = mtc_pkg::SEQ_MAX_D,
  localparam int unsigned IW  = mtc_pkg::idx_w(LINES),
  localparam int unsigned SLW = mtc_pkg::idx_w(SEQ_MAX + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       load,
  input  logic [SEQ_MAX-1:0][IW-1:0] load_idx,
  input  logic [SLW-1:0]             load_len,
  input  logic                       start,
  input  logic                       adv,
  output logic                       active,
  output logic [IW-1:0]              rd_idx,
  output logic                       last,
  output logic                       can_start,
  output logic                       pending
);

  logic [SEQ_MAX-1:0][IW-1:0] tmp_q, work_q;
  logic [SLW-1:0]             tmp_len_q, work_len_q, pos_q;

  assign rd_idx    = work_q[pos_q];
  assign last      = active && (pos_q == work_len_q - 1'b1);
  assign can_start = !active || (adv && last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tmp_q      <= '0;
      work_q     <= '0;
      tmp_len_q  <= '0;
      work_len_q <= '0;
      pos_q      <= '0;
      active     <= 1'b0;
      pending    <= 1'b0;
    end else begin
      if (adv && active) begin
        pos_q <= pos_q + 1'b1;
        if (last) active <= 1'b0;
      end
      if (start && pending) begin
        work_q     <= tmp_q;
        work_len_q <= tmp_len_q;
        pos_q      <= '0;
        active     <= (tmp_len_q != '0);
        pending    <= 1'b0;
      end
      if (load) begin
        tmp_q     <= load_idx;
        tmp_len_q <= load_len;
        pending   <= 1'b1;
      end
    end
  end

  // START is only executed when the previous sequence is done
  a_start_safe: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> can_start);

endmodule
