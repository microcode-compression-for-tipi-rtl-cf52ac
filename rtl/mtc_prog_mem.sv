// mtc_prog_mem: program memory holding the compressed microcode.
//
// The decoder's fetch units each own one read port (the "Request"/"Data"
// pair of every fetch unit in the architecture figure). A read requested
// in cycle t returns its word in cycle t+1. The write port is this design's
// own addition: it loads the program from outside before decoding starts
// (or at any time; a write and a read of the same word in one cycle return
// the old word). The memory has no reset; it must be loaded before use.
//
// Parameters: NPORT read ports, MEM_W-bit words, MEM_DEPTH words.
module mtc_prog_mem #(
  parameter int unsigned NPORT     = mtc_pkg::NPIPE_D,
  parameter int unsigned MEM_W     = mtc_pkg::MEM_W_D,
  parameter int unsigned MEM_DEPTH = mtc_pkg::MEM_DEPTH_D,
  localparam int unsigned AW       = mtc_pkg::idx_w(MEM_DEPTH)
) (
  input  logic                        clk,
  // load port
  input  logic                        ld_en,
  input  logic [AW-1:0]               ld_addr,
  input  logic [MEM_W-1:0]            ld_data,
  // read ports, one per fetch unit
  input  logic [NPORT-1:0]            rd_req,
  input  logic [NPORT-1:0][AW-1:0]    rd_addr,
  output logic [NPORT-1:0][MEM_W-1:0] rd_data
);

  logic [MEM_W-1:0] mem [MEM_DEPTH];

  always_ff @(posedge clk) begin
    if (ld_en) mem[ld_addr] <= ld_data;
  end

  for (genvar p = 0; p < NPORT; p++) begin : g_port
    always_ff @(posedge clk) begin
      if (rd_req[p]) rd_data[p] <= mem[rd_addr[p]];
    end
  end

endmodule
