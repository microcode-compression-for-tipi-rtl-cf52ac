// mtc_trace_cache: one trace cache, holding LINES slices of LINE_W bits of
// the horizontal microcode.
//
// Write side: one port per decode pipeline bus. A port with we set stores
// either wdata (WRITE) or, with copy set, the line at src with the bits set
// in wdata inverted (COPY: read, flip, write back in the same cache). All
// ports act at the same clock edge and read the lines as they were before
// it; if two ports hit the same line the higher-numbered port wins.
// Read side: the sequence manager's index. With rd_en in cycle t the line
// at rd_idx is registered and appears on rd_data in cycle t+1; a line
// written at the same edge is read with its old value.
// Reset clears every line and rd_data.
// WRITE and COPY behaviour follows the design; the port structure, the
// registered read and the reset are this implementation's choices.
module mtc_trace_cache #(
  parameter int unsigned NPORT  = mtc_pkg::NPIPE_D,
  parameter int unsigned LINES  = mtc_pkg::LINES_D,
  parameter int unsigned LINE_W = mtc_pkg::LINE_W_D,
  localparam int unsigned IW = mtc_pkg::idx_w(LINES)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NPORT-1:0]              we,
  input  logic [NPORT-1:0]              copy,
  input  logic [NPORT-1:0][IW-1:0]      idx,
  input  logic [NPORT-1:0][IW-1:0]      src,
  input  logic [NPORT-1:0][LINE_W-1:0]  wdata,
  input  logic                          rd_en,
  input  logic [IW-1:0]                 rd_idx,
  output logic [LINE_W-1:0]             rd_data
);

  logic [LINE_W-1:0] line_q [LINES];
  logic [LINE_W-1:0] wval   [NPORT];

  always_comb begin
    for (int p = 0; p < NPORT; p++)
      wval[p] = copy[p] ? (line_q[src[p]] ^ wdata[p]) : wdata[p];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LINES; i++) line_q[i] <= '0;
      rd_data <= '0;
    end else begin
      for (int p = 0; p < NPORT; p++)
        if (we[p]) line_q[idx[p]] <= wval[p];
      if (rd_en) rd_data <= line_q[rd_idx];
    end
  end

endmodule
