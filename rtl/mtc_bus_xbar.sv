// mtc_bus_xbar: enable decoding of the per-pipeline buses.
//
// Every decode pipeline owns one bus that reaches all trace caches and
// sequence managers. Index, data and the copy flag are broadcast on it
// unchanged; the target cache is selected by an enable. This block turns
// each pipeline's cache number into those enables: cache k's write port p
// is enabled when pipeline p issues a WRITE or COPY naming cache k, and
// sequence manager k loads a sequence when some pipeline issues a SEQUENCE
// naming it (if several do in one cycle the highest-numbered pipeline,
// i.e. the later instruction of the packet, wins; a correct program never
// does this). Purely combinational.
// One bus per pipeline with an enable per cache follows the design; the
// tie-break rule is this implementation's choice.
module mtc_bus_xbar #(
  parameter int unsigned NPIPE   = mtc_pkg::NPIPE_D,
  parameter int unsigned NCACHE  = mtc_pkg::NCACHE_D,
  parameter int unsigned LINES   = mtc_pkg::LINES_D,
  parameter int unsigned SEQ_MAX = mtc_pkg::SEQ_MAX_D,
  localparam int unsigned CW = mtc_pkg::idx_w(NCACHE),
  localparam int unsigned IW = mtc_pkg::idx_w(LINES)
) (
  // from the decode stages
  input  logic [NPIPE-1:0]                           wr_en,
  input  logic [NPIPE-1:0]                           seq_en,
  input  logic [NPIPE-1:0][CW-1:0]                   cache,
  input  logic [NPIPE-1:0][SEQ_MAX-1:0][IW-1:0]      seq_idx,
  // to the caches and sequence managers
  output logic [NCACHE-1:0][NPIPE-1:0]               cache_we,
  output logic [NCACHE-1:0]                          sm_load,
  output logic [NCACHE-1:0][SEQ_MAX-1:0][IW-1:0]     sm_idx
);

  always_comb begin
    for (int k = 0; k < NCACHE; k++) begin
      sm_load[k] = 1'b0;
      sm_idx[k]  = '0;
      for (int p = 0; p < NPIPE; p++) begin
        cache_we[k][p] = wr_en[p] && (cache[p] == CW'(k));
        if (seq_en[p] && (cache[p] == CW'(k))) begin
          sm_load[k] = 1'b1;
          sm_idx[k]  = seq_idx[p];
        end
      end
    end
  end

endmodule
