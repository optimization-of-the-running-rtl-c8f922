// pheromone_mem: the n*n pheromone matrix held in on-chip RAM.
//
// Entry (i,j) is the pheromone on the edge from node i to node j and sits at
// address (i << log2 n) | j, so a row address is formed with a shift instead
// of a multiplication. Every ant has a read port of its own so the ants search
// in parallel; one further port serves the updating unit. There are two write
// ports: port A loads the matrix before a run and carries the updating unit's
// write of entry (a,b); port B carries the mirror write of (b,a) in the same
// cycle, which keeps the matrix symmetric at one edge per cycle.
//
// Timing: reads are synchronous, data appears the cycle after the address
// (block RAM behaviour). A write is visible to reads issued in later cycles;
// a read in the same cycle as a write to the same address returns the old
// word. The two write ports must not address the same word in one cycle (an
// assertion checks this). The number of ports and the word width are this
// design's choice.
module pheromone_mem #(
  parameter int unsigned N_NODES = aco_pkg::DEF_N_NODES,
  parameter int unsigned PH_W    = aco_pkg::DEF_PH_W,
  parameter int unsigned N_RD    = aco_pkg::DEF_N_ANTS + 1,
  localparam int unsigned AW     = 2 * $clog2(N_NODES)
) (
  input  logic                 clk,
  input  logic [N_RD-1:0][AW-1:0]   rd_addr,
  output logic [N_RD-1:0][PH_W-1:0] rd_data,
  input  logic                 we,
  input  logic [AW-1:0]        wr_addr,
  input  logic [PH_W-1:0]      wr_data,
  input  logic                 we_b,
  input  logic [AW-1:0]        wr_addr_b,
  input  logic [PH_W-1:0]      wr_data_b
);

  logic [PH_W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we)   mem[wr_addr]   <= wr_data;
    if (we_b) mem[wr_addr_b] <= wr_data_b;
  end

  always_ff @(posedge clk) begin
    if (we && we_b)
      assert (wr_addr != wr_addr_b) else $error("pheromone_mem: both write ports hit %0d", wr_addr);
  end

  for (genvar p = 0; p < N_RD; p++) begin : g_rd
    always_ff @(posedge clk) rd_data[p] <= mem[rd_addr[p]];
  end

endmodule
