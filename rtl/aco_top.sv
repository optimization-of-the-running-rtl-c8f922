// aco_top: address-based ant colony optimisation core for a symmetric
// travelling-salesman problem.
//
// Blocks and how they connect:
//   pheromone_mem  n*n pheromone matrix, one read port per ant + one for the
//                  updating unit, write port A (load or update) and port B
//                  (mirror write of the update);
//   heuristic_mem  n*n distance table, loaded once, one read port per ant;
//   city_select    N_ANTS ants, each with its own LFSR and Result memory,
//                  building tours in parallel;
//   eval_unit      picks the ant with the shortest tour, keeps the best so far;
//   update_unit    local update on every tour, global update on the best;
//   aco_ctrl       runs SOLVE -> EVAL -> UPDATE for N_ITER iterations.
// Every matrix address is (row << log2 n) | column, so no multiplier appears
// anywhere in the core. Ant k starts its tour on node k mod n.
//
// Interface: while `busy` is low, load both tables through the load port
// (`ld_sel` 0 = pheromone, 1 = distance; address (row << log2 n) | column).
// Pulse `start`; `done` pulses after N_ITER iterations. `best_cost` and
// `best_tour` hold the shortest closed tour found in the run; `iter_cost` the
// shortest of the latest iteration. The `ev_*` outputs are one-cycle event
// strobes for monitoring: a candidate rejected against the random value, a
// node forced after a fruitless pass over a row, and one pheromone update
// step of the local and the global kind.
module aco_top #(
  parameter int unsigned N_NODES = aco_pkg::DEF_N_NODES,
  parameter int unsigned N_ANTS  = aco_pkg::DEF_N_ANTS,
  parameter int unsigned N_ITER  = aco_pkg::DEF_N_ITER,
  parameter int unsigned PH_W    = aco_pkg::DEF_PH_W,
  parameter int unsigned D_W     = aco_pkg::DEF_D_W,
  localparam int unsigned NW     = $clog2(N_NODES),
  localparam int unsigned AW     = 2 * NW,
  localparam int unsigned COST_W = aco_pkg::cost_width(D_W, N_NODES),
  localparam int unsigned AIW    = (N_ANTS > 1) ? $clog2(N_ANTS) : 1,
  localparam int unsigned IW     = $clog2(N_ITER + 1),
  localparam int unsigned LW     = (PH_W > D_W) ? PH_W : D_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        ld_we,
  input  logic                        ld_sel,
  input  logic [AW-1:0]               ld_addr,
  input  logic [LW-1:0]               ld_data,
  input  logic                        start,
  output logic                        busy,
  output logic                        done,
  output logic [IW-1:0]               iter,
  output logic [COST_W-1:0]           best_cost,
  output logic [N_NODES-1:0][NW-1:0]  best_tour,
  output logic [COST_W-1:0]           iter_cost,
  output logic [N_ANTS-1:0]           ev_reject,
  output logic [N_ANTS-1:0]           ev_forced,
  output logic                        ev_local,
  output logic                        ev_global
);

  // Controller strobes
  logic ant_start, eval, eval_clear, upd_start, upd_done, upd_busy;

  // Ant side
  logic [N_ANTS-1:0]              ant_done;
  logic [N_ANTS-1:0][COST_W-1:0]  ant_cost;
  logic [N_ANTS:0][AW-1:0]        ph_rd_addr;
  logic [N_ANTS:0][PH_W-1:0]      ph_rd_data;
  logic [N_ANTS-1:0][AW-1:0]      d_rd_addr;
  logic [N_ANTS-1:0][D_W-1:0]     d_rd_data;
  logic [N_ANTS-1:0][NW-1:0]      ant_tour_node;

  // Evaluation / update side
  logic [AIW-1:0]    best_ant;
  logic              new_global;
  logic [AIW-1:0]    tour_ant;
  logic [NW-1:0]     tour_pos;
  logic              upd_we;
  logic [AW-1:0]     upd_wr_addr, upd_wr_addr_b;
  logic [PH_W-1:0]   upd_wr_data;

  aco_ctrl #(.N_ITER(N_ITER)) u_ctrl (
    .clk, .rst_n, .start,
    .ants_done (&ant_done),
    .upd_done,
    .ant_start, .eval, .eval_clear, .upd_start,
    .busy, .done, .iter
  );

  pheromone_mem #(.N_NODES(N_NODES), .PH_W(PH_W), .N_RD(N_ANTS + 1)) u_ph (
    .clk,
    .rd_addr (ph_rd_addr),
    .rd_data (ph_rd_data),
    .we      (upd_busy ? upd_we      : (ld_we && !ld_sel && !busy)),
    .wr_addr (upd_busy ? upd_wr_addr : ld_addr),
    .wr_data (upd_busy ? upd_wr_data : ld_data[PH_W-1:0]),
    .we_b      (upd_busy && upd_we),
    .wr_addr_b (upd_wr_addr_b),
    .wr_data_b (upd_wr_data)
  );

  heuristic_mem #(.N_NODES(N_NODES), .D_W(D_W), .N_RD(N_ANTS)) u_dist (
    .clk,
    .ld_we   (ld_we && ld_sel && !busy),
    .ld_addr (ld_addr),
    .ld_data (ld_data[D_W-1:0]),
    .rd_addr (d_rd_addr),
    .rd_data (d_rd_data)
  );

  for (genvar k = 0; k < N_ANTS; k++) begin : g_ant
    city_select #(
      .N_NODES(N_NODES), .PH_W(PH_W), .D_W(D_W), .COST_W(COST_W),
      .SEED(aco_pkg::ant_seed(k))
    ) u_ant (
      .clk, .rst_n,
      .start      (ant_start),
      .start_node (NW'(k % N_NODES)),
      .done       (ant_done[k]),
      .cost       (ant_cost[k]),
      .ph_addr    (ph_rd_addr[k]),
      .ph_data    (ph_rd_data[k]),
      .d_addr     (d_rd_addr[k]),
      .d_data     (d_rd_data[k]),
      .tour_pos   (tour_pos),
      .tour_node  (ant_tour_node[k]),
      .reject     (ev_reject[k]),
      .forced     (ev_forced[k])
    );
  end

  eval_unit #(.N_ANTS(N_ANTS), .COST_W(COST_W)) u_eval (
    .clk, .rst_n,
    .clear            (eval_clear),
    .eval,
    .costs            (ant_cost),
    .best_ant,
    .iter_best_cost   (iter_cost),
    .global_best_cost (best_cost),
    .new_global
  );

  update_unit #(.N_NODES(N_NODES), .N_ANTS(N_ANTS), .PH_W(PH_W)) u_upd (
    .clk, .rst_n,
    .start       (upd_start),
    .best_ant,
    .new_global,
    .busy        (upd_busy),
    .done        (upd_done),
    .tour_ant,
    .tour_pos,
    .tour_node   (ant_tour_node[tour_ant]),
    .ph_rd_addr  (ph_rd_addr[N_ANTS]),
    .ph_rd_data  (ph_rd_data[N_ANTS]),
    .ph_we       (upd_we),
    .ph_wr_addr  (upd_wr_addr),
    .ph_wr_data  (upd_wr_data),
    .ph_wr_addr_b(upd_wr_addr_b),
    .best_tour,
    .local_step  (ev_local),
    .global_step (ev_global)
  );

endmodule
