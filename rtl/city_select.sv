// city_select: one ant, the city selection unit.
//
// The ant starts on `start_node`, which is marked in its Result memory as the
// first node of the tour (M = 1). It then works on the pheromone matrix row of
// its current node, scanning its columns from 0 upward and wrapping round:
//   * columns whose node is already in the Result memory are skipped: a
//     priority encoder over the Result memory's flags gives the next column
//     still free, so a chosen node costs no scan time;
//   * for a free column the pheromone Ph(r,s) and distance D(r,s) of that
//     cell are read, the score Ph + (DMAX - D) is formed and compared with the
//     ant's LFSR value; if the score is greater the node is chosen, otherwise
//     the ant goes on to the next free column with a fresh random value.
// A chosen node is stored in the Result memory at position M, M is increased,
// the distance is added to the tour cost and the ant moves to the row of the
// chosen node (row address = node << log2 n). When M reaches n, the distance
// back to the start node is added and the tour is complete.
//
// The scan-and-compare walk, the Result memory, the M counter, the LFSR and
// the shift-formed row address follow the algorithm. This design's own
// choices: the additive score (pheromone and heuristic treated as log-domain
// weights, so no multiplier is needed), scanning each row from column 0,
// skipping chosen columns in zero time, and forcing a choice once a whole
// round of the free columns has been rejected, which bounds the tour time.
//
// Pipeline: the read address of the next free column is issued every cycle
// while the column issued the cycle before is being judged (memories with
// one cycle of read latency). When a node is chosen, the read issued in the
// same cycle belongs to the old row and is discarded, so a choice costs one
// bubble cycle.
//
// Interface: pulse `start` for one cycle; `done` rises when the tour is
// complete and stays high until the next start, with `cost` valid.
// `tour_pos`/`tour_node` read back the tour. `reject` and `forced` are
// one-cycle event strobes.
//
// Timing: a tour takes 1 + 2 * (n - 1) + R + 2 cycles after start, where R
// is the number of rejected candidates.
module city_select #(
  parameter int unsigned N_NODES = aco_pkg::DEF_N_NODES,
  parameter int unsigned PH_W    = aco_pkg::DEF_PH_W,
  parameter int unsigned D_W     = aco_pkg::DEF_D_W,
  parameter int unsigned COST_W  = aco_pkg::cost_width(aco_pkg::DEF_D_W, aco_pkg::DEF_N_NODES),
  parameter logic [15:0] SEED    = 16'hACE1,
  localparam int unsigned NW     = $clog2(N_NODES),
  localparam int unsigned AW     = 2 * NW,
  localparam int unsigned SW     = (PH_W > D_W ? PH_W : D_W) + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [NW-1:0]     start_node,
  output logic              done,
  output logic [COST_W-1:0] cost,
  output logic [AW-1:0]     ph_addr,
  input  logic [PH_W-1:0]   ph_data,
  output logic [AW-1:0]     d_addr,
  input  logic [D_W-1:0]    d_data,
  input  logic [NW-1:0]     tour_pos,
  output logic [NW-1:0]     tour_node,
  output logic              reject,
  output logic              forced
);

  typedef enum logic [2:0] {S_IDLE, S_RUN, S_CLOSE, S_CLOSE_W, S_DONE} state_t;

  localparam logic [D_W-1:0] DMAX = '1;

  state_t            state;
  logic [NW-1:0]     cur;        // current row (node the ant is on)
  logic [NW-1:0]     col_ptr;    // first column the next issue may take
  logic [NW-1:0]     first;      // start node of the tour
  logic [NW:0]       m;          // number of chosen nodes (M)
  logic [NW:0]       rej_cnt;    // candidates rejected since the last choice
  logic              cand_v;     // a candidate's data arrives this cycle
  logic [NW-1:0]     cand_q;     // ...and this is its column
  logic [COST_W-1:0] cost_q;

  logic [N_NODES-1:0] visited;
  logic              visited_one;
  logic              mark;
  logic [NW-1:0]     mark_node, mark_pos;
  logic [15:0]       rnd;
  logic [SW-1:0]     score;
  logic              beat, force_it, take;
  logic [NW-1:0]     issue_col;

  lfsr #(.W(16), .SEED(SEED)) u_lfsr (
    .clk(clk), .rst_n(rst_n), .en(cand_v && state == S_RUN), .value(rnd)
  );

  result_mem #(.N_NODES(N_NODES)) u_result (
    .clk        (clk),
    .clear      ((state == S_IDLE || state == S_DONE) && start),
    .mark       (mark),
    .mark_node  (mark_node),
    .mark_pos   (mark_pos),
    .chk_node   (cand_q),
    .chk_visited(visited_one),
    .visited_vec(visited),
    .tour_pos   (tour_pos),
    .tour_node  (tour_node)
  );

  // Next free column at or after col_ptr, wrapping round.
  function automatic logic [NW-1:0] next_free(logic [N_NODES-1:0] vis, logic [NW-1:0] from);
    next_free = from;
    for (int k = N_NODES - 1; k >= 0; k--) begin
      int c;
      c = (int'(from) + k) % N_NODES;
      if (!vis[c]) next_free = NW'(c);
    end
  endfunction

  assign issue_col = (state == S_CLOSE) ? first : next_free(visited, col_ptr);

  // Row address by shift, column in the low bits.
  assign ph_addr = {cur, issue_col};
  assign d_addr  = {cur, issue_col};

  assign score    = SW'(ph_data) + SW'(DMAX - d_data);
  assign beat     = score > SW'(rnd);
  assign force_it = rej_cnt >= (NW+1)'(N_NODES) - m;
  assign take     = (state == S_RUN) && cand_v && (beat || force_it);

  always_comb begin
    mark      = 1'b0;
    mark_node = cand_q;
    mark_pos  = m[NW-1:0];
    if ((state == S_IDLE || state == S_DONE) && start) begin
      mark      = 1'b1;
      mark_node = start_node;
      mark_pos  = '0;
    end else if (take) begin
      mark = 1'b1;
    end
  end

  assign reject = (state == S_RUN) && cand_v && !take;
  assign forced = take && !beat;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      cur     <= '0;
      col_ptr <= '0;
      first   <= '0;
      m       <= '0;
      rej_cnt <= '0;
      cand_v  <= 1'b0;
      cand_q  <= '0;
      cost_q  <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: if (start) begin
          cur     <= start_node;
          first   <= start_node;
          col_ptr <= '0;
          m       <= (NW+1)'(1);
          rej_cnt <= '0;
          cand_v  <= 1'b0;
          cost_q  <= '0;
          state   <= (N_NODES > 1) ? S_RUN : S_CLOSE;
        end
        S_RUN: begin
          if (take) begin
            cost_q  <= cost_q + COST_W'(d_data);
            cur     <= cand_q;
            m       <= m + 1'b1;
            rej_cnt <= '0;
            col_ptr <= '0;
            cand_v  <= 1'b0;          // read issued this cycle was for the old row
            if (m + 1'b1 == (NW+1)'(N_NODES)) state <= S_CLOSE;
          end else begin
            if (cand_v) rej_cnt <= rej_cnt + 1'b1;
            cand_v  <= 1'b1;
            cand_q  <= issue_col;
            col_ptr <= (issue_col == NW'(N_NODES - 1)) ? '0 : issue_col + NW'(1);
          end
        end
        S_CLOSE:   state <= S_CLOSE_W;  // closing-edge read in flight
        S_CLOSE_W: begin
          cost_q <= cost_q + COST_W'(d_data);
          state  <= S_DONE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A candidate under judgement is never a node already chosen.
  always_ff @(posedge clk) begin
    if (rst_n && state == S_RUN && cand_v)
      assert (!visited_one) else $error("city_select: judged a chosen node %0d", cand_q);
  end

  assign done = (state == S_DONE);
  assign cost = cost_q;

endmodule
