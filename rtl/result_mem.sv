// result_mem: one ant's Result memory.
//
// It has one byte per node: zero while the node has not been chosen, one once
// it has. Beside the flags it keeps, in visiting order, the address of every
// node the ant chose, so the tour can be read back by the updating unit. The
// byte per node follows the algorithm's description; the tour list layout is
// this design's.
//
// Interface: `clear` zeroes all flags in one cycle. `mark` sets the flag of
// `mark_node` and stores it at tour position `mark_pos`; if both arrive in the
// same cycle, the mark wins for its node. Reads (`chk_node` -> `chk_visited`,
// `tour_pos` -> `tour_node`) are combinational; `visited_vec` presents all
// flags at once, bit i set when node i has been chosen.
module result_mem #(
  parameter int unsigned N_NODES = aco_pkg::DEF_N_NODES,
  parameter int unsigned FLAG_W  = 8,
  localparam int unsigned NW     = $clog2(N_NODES)
) (
  input  logic          clk,
  input  logic          clear,
  input  logic          mark,
  input  logic [NW-1:0] mark_node,
  input  logic [NW-1:0] mark_pos,
  input  logic [NW-1:0] chk_node,
  output logic          chk_visited,
  output logic [N_NODES-1:0] visited_vec,
  input  logic [NW-1:0] tour_pos,
  output logic [NW-1:0] tour_node
);

  logic [FLAG_W-1:0] flag [N_NODES];
  logic [NW-1:0]     tour [N_NODES];

  always_ff @(posedge clk) begin
    for (int i = 0; i < N_NODES; i++) begin
      if (mark && mark_node == NW'(i)) flag[i] <= FLAG_W'(1);
      else if (clear)                  flag[i] <= '0;
    end
    if (mark) tour[mark_pos] <= mark_node;
  end

  assign chk_visited = (flag[chk_node] != '0);
  assign tour_node   = tour[tour_pos];

  for (genvar i = 0; i < N_NODES; i++) begin : g_vec
    assign visited_vec[i] = (flag[i] != '0);
  end

endmodule
