// heuristic_mem: the n*n table of edge distances D(r,s).
//
// The table is written once through the load port before a run and is only
// read while the colony works, so it behaves as a ROM placed in RAM. Entry
// (r,s) sits at address (r << log2 n) | s. The ants derive the heuristic
// coefficient of an edge from its distance (eta = DMAX - D) and add the
// distances of the edges they take to form their tour cost; storing the
// distance rather than a precomputed coefficient is this design's choice.
//
// Timing: one read port per ant, synchronous, data the cycle after the
// address. No reset; contents are whatever was last loaded.
module heuristic_mem #(
  parameter int unsigned N_NODES = aco_pkg::DEF_N_NODES,
  parameter int unsigned D_W     = aco_pkg::DEF_D_W,
  parameter int unsigned N_RD    = aco_pkg::DEF_N_ANTS,
  localparam int unsigned AW     = 2 * $clog2(N_NODES)
) (
  input  logic                      clk,
  input  logic                      ld_we,
  input  logic [AW-1:0]             ld_addr,
  input  logic [D_W-1:0]            ld_data,
  input  logic [N_RD-1:0][AW-1:0]   rd_addr,
  output logic [N_RD-1:0][D_W-1:0]  rd_data
);

  logic [D_W-1:0] rom [2**AW];

  always_ff @(posedge clk) begin
    if (ld_we) rom[ld_addr] <= ld_data;
  end

  for (genvar p = 0; p < N_RD; p++) begin : g_rd
    always_ff @(posedge clk) rd_data[p] <= rom[rd_addr[p]];
  end

endmodule
