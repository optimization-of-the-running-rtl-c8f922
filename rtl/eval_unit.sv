// eval_unit: the evaluation unit.
//
// When `eval` is pulsed it compares the tour costs of all ants, registers the
// index and cost of the cheapest one, and compares that cost with the best
// cost seen since the last `clear`. If it is strictly lower, the global best
// is replaced and `new_global` is set for this iteration. Selecting the ant of
// least cost follows the algorithm; keeping a best-so-far across iterations,
// and breaking ties toward the lowest ant index, are this design's choices.
//
// Timing: outputs are valid the cycle after `eval` and hold until the next
// `eval`. `clear` sets the global best to the largest cost.
module eval_unit #(
  parameter int unsigned N_ANTS = aco_pkg::DEF_N_ANTS,
  parameter int unsigned COST_W = aco_pkg::cost_width(aco_pkg::DEF_D_W, aco_pkg::DEF_N_NODES),
  localparam int unsigned AIW   = (N_ANTS > 1) ? $clog2(N_ANTS) : 1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           clear,
  input  logic                           eval,
  input  logic [N_ANTS-1:0][COST_W-1:0]  costs,
  output logic [AIW-1:0]                 best_ant,
  output logic [COST_W-1:0]              iter_best_cost,
  output logic [COST_W-1:0]              global_best_cost,
  output logic                           new_global
);

  logic [AIW-1:0]    min_idx;
  logic [COST_W-1:0] min_cost;

  always_comb begin
    min_idx  = '0;
    min_cost = costs[0];
    for (int a = 1; a < N_ANTS; a++) begin
      if (costs[a] < min_cost) begin
        min_cost = costs[a];
        min_idx  = AIW'(a);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      best_ant         <= '0;
      iter_best_cost   <= '1;
      global_best_cost <= '1;
      new_global       <= 1'b0;
    end else if (clear) begin
      global_best_cost <= '1;
      new_global       <= 1'b0;
    end else if (eval) begin
      best_ant       <= min_idx;
      iter_best_cost <= min_cost;
      new_global     <= (min_cost < global_best_cost);
      if (min_cost < global_best_cost) global_best_cost <= min_cost;
    end
  end

endmodule
