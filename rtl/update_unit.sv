// update_unit: the pheromone updating unit.
//
// After the ants have finished their tours it walks tours through the
// pheromone memory with read-modify-write steps:
//   1. local update, once for every ant: each edge of the ant's tour is
//      pulled toward the initial level, tau' = tau - ((tau - TAU0) >> LOCAL_SHIFT);
//   2. global update, for the ant of least cost only: each edge of its tour
//      receives  tau' = (1 - rho) tau + rho * DEPOSIT  with rho = 2^-RHO_SHIFT,
//      computed as tau + ((DEPOSIT - tau) >> RHO_SHIFT).
// All arithmetic is on unsigned integers and uses shifts only. Tours are
// closed (the last node connects back to the first) and edges are treated as
// undirected: the new value is written at (a,b) and, through the memory's
// second write port in the same cycle, at (b,a). During the
// global pass, if the evaluation unit flagged a new global best, the tour is
// also copied into `best_tour`.
//
// The global rule is the algorithm's update equation with rho a power of two;
// the local rule, TAU0, DEPOSIT, the shift amounts and the symmetric write are
// this design's choices.
//
// Interface: pulse `start` (with `best_ant` and `new_global` held stable);
// `done` pulses for one cycle at the end. Tours are read combinationally
// through `tour_ant`/`tour_pos`/`tour_node`. The pheromone read port expects
// one cycle of latency.
//
// Pipeline: one edge per cycle. In the cycle that writes edge (a,b) the read
// of the next edge (b,c) is issued; its data arrives for the next cycle.
// Within a tour the next edge never shares an address with the edge being
// written (c differs from a), so no forwarding is needed. Between tours the
// pipeline restarts (two cycles), so writes of one tour are always visible to
// the reads of the next.
//
// Timing: 2 + N_NODES cycles per tour, (N_ANTS + 1) tours per update, done
// one cycle after the last write.
module update_unit #(
  parameter int unsigned N_NODES     = aco_pkg::DEF_N_NODES,
  parameter int unsigned N_ANTS      = aco_pkg::DEF_N_ANTS,
  parameter int unsigned PH_W        = aco_pkg::DEF_PH_W,
  parameter int unsigned RHO_SHIFT   = aco_pkg::DEF_RHO_SHIFT,
  parameter int unsigned LOCAL_SHIFT = aco_pkg::DEF_LOCAL_SHIFT,
  parameter int unsigned TAU0        = aco_pkg::DEF_TAU0,
  parameter int unsigned DEPOSIT     = aco_pkg::DEF_DEPOSIT,
  localparam int unsigned NW         = $clog2(N_NODES),
  localparam int unsigned AW         = 2 * NW,
  localparam int unsigned AIW        = (N_ANTS > 1) ? $clog2(N_ANTS) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [AIW-1:0]               best_ant,
  input  logic                         new_global,
  output logic                         busy,
  output logic                         done,
  output logic [AIW-1:0]               tour_ant,
  output logic [NW-1:0]                tour_pos,
  input  logic [NW-1:0]                tour_node,
  output logic [AW-1:0]                ph_rd_addr,
  input  logic [PH_W-1:0]              ph_rd_data,
  output logic                         ph_we,
  output logic [AW-1:0]                ph_wr_addr,
  output logic [PH_W-1:0]              ph_wr_data,
  output logic [AW-1:0]                ph_wr_addr_b,
  output logic [N_NODES-1:0][NW-1:0]   best_tour,
  output logic                         local_step,
  output logic                         global_step
);

  typedef enum logic [1:0] {S_IDLE, S_LOAD0, S_RD, S_WR} state_t;

  localparam logic [PH_W-1:0] TAU0_V = PH_W'(TAU0);
  localparam logic [PH_W-1:0] DEP_V  = PH_W'(DEPOSIT);

  state_t          state;
  logic [AIW:0]    pass;       // 0..N_ANTS-1 local passes, N_ANTS the global pass
  logic [NW-1:0]   k;          // edge index within the tour
  logic [NW-1:0]   a, b;       // edge being written
  logic            is_global;
  logic            copy_best;
  logic            last_edge;

  function automatic logic [NW-1:0] wrap(int unsigned v);
    return NW'(v % N_NODES);
  endfunction

  assign is_global = (pass == (AIW+1)'(N_ANTS));
  assign copy_best = is_global && new_global;
  assign tour_ant  = is_global ? best_ant : pass[AIW-1:0];
  assign last_edge = (k == NW'(N_NODES - 1));

  always_comb begin
    unique case (state)
      S_RD:    tour_pos = wrap(1);
      S_WR:    tour_pos = wrap(int'(k) + 2);
      default: tour_pos = '0;
    endcase
  end

  // First edge read in S_RD, next edge (b, tour[k+2]) read in S_WR.
  assign ph_rd_addr = (state == S_WR) ? {b, tour_node} : {a, tour_node};

  // Update arithmetic, integer and shift only.
  function automatic logic [PH_W-1:0] toward(logic [PH_W-1:0] t, logic [PH_W-1:0] target,
                                             int unsigned sh);
    if (t >= target) return t - ((t - target) >> sh);
    else             return t + ((target - t) >> sh);
  endfunction

  assign ph_we        = (state == S_WR);
  assign ph_wr_addr   = {a, b};
  assign ph_wr_addr_b = {b, a};
  assign ph_wr_data   = is_global ? toward(ph_rd_data, DEP_V, RHO_SHIFT)
                                  : toward(ph_rd_data, TAU0_V, LOCAL_SHIFT);

  assign local_step  = (state == S_WR) && !is_global;
  assign global_step = (state == S_WR) &&  is_global;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      pass      <= '0;
      k         <= '0;
      a         <= '0;
      b         <= '0;
      done      <= 1'b0;
      best_tour <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          pass  <= '0;
          state <= S_LOAD0;
        end
        S_LOAD0: begin
          a <= tour_node;
          k <= '0;
          if (copy_best) best_tour[0] <= tour_node;
          state <= S_RD;
        end
        S_RD: begin
          b <= tour_node;
          if (copy_best) best_tour[wrap(1)] <= tour_node;
          state <= S_WR;
        end
        S_WR: begin
          a <= b;
          b <= tour_node;
          if (copy_best && int'(k) + 2 < N_NODES) best_tour[wrap(int'(k) + 2)] <= tour_node;
          if (last_edge) begin
            if (is_global) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              pass  <= pass + 1'b1;
              state <= S_LOAD0;
            end
          end else begin
            k <= k + NW'(1);
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A closed tour never writes both halves of an edge to one word.
  always_ff @(posedge clk) begin
    if (rst_n && state == S_WR)
      assert (a != b) else $error("update_unit: self edge %0d", a);
  end

  assign busy = (state != S_IDLE);

endmodule
