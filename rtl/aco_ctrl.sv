// aco_ctrl: phase sequencer of the ant colony core.
//
// One run is N_ITER iterations of the same three phases:
//   SOLVE  - all ants are started together and search in parallel; the phase
//            ends when every ant reports its tour complete;
//   EVAL   - the evaluation unit compares the ants' tour costs (one cycle);
//   UPDATE - the updating unit applies the local and global pheromone
//            updates; the phase ends on its done pulse.
// After each update the iteration counter is compared with N_ITER: the next
// iteration starts, or the run ends. This order of phases and the repetition
// check follow the algorithm's flowchart; a fixed iteration count as the end
// condition is this design's choice.
//
// Interface: pulse `start` while idle. `eval_clear` pulses with it to reset
// the best-so-far. `ant_start`, `eval` and `upd_start` are one-cycle strobes.
// `done` pulses when the run ends; `busy` is high from start to done. `iter`
// counts completed iterations.
module aco_ctrl #(
  parameter int unsigned N_ITER = aco_pkg::DEF_N_ITER,
  localparam int unsigned IW    = $clog2(N_ITER + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          ants_done,
  input  logic          upd_done,
  output logic          ant_start,
  output logic          eval,
  output logic          eval_clear,
  output logic          upd_start,
  output logic          busy,
  output logic          done,
  output logic [IW-1:0] iter
);

  typedef enum logic [2:0] {S_IDLE, S_LAUNCH, S_SOLVE, S_EVAL, S_UPD_GO, S_UPDATE} state_t;

  state_t state;

  assign ant_start  = (state == S_LAUNCH);
  assign eval       = (state == S_EVAL);
  assign upd_start  = (state == S_UPD_GO);
  assign eval_clear = (state == S_IDLE) && start;
  assign busy       = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      iter  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE:   if (start) begin
          iter  <= '0;
          state <= S_LAUNCH;
        end
        S_LAUNCH: state <= S_SOLVE;
        // ants_done is sampled one cycle after the start strobe, when the
        // ants have already left their done state.
        S_SOLVE:  if (ants_done) state <= S_EVAL;
        S_EVAL:   state <= S_UPD_GO;
        S_UPD_GO: state <= S_UPDATE;
        S_UPDATE: if (upd_done) begin
          iter <= iter + 1'b1;
          if (iter + 1'b1 == IW'(N_ITER)) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            state <= S_LAUNCH;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
