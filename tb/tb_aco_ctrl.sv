// tb_aco_ctrl: plays the ants and the updating unit with random delays and
// checks the controller's phase order (start ants, wait for all done, one eval,
// one update start, wait for update done) for N_ITER iterations, the
// iteration counter, and that done pulses exactly once per run.
module tb_aco_ctrl;
  localparam int NI = 20;
  logic clk = 0, rst_n = 0, start = 0;
  logic ants_done = 0, upd_done = 0;
  logic ant_start, eval, eval_clear, upd_start, busy, done;
  logic [4:0] iter;
  int checks = 0, failures = 0;
  int n_ant_start = 0, n_eval = 0, n_upd = 0, n_done = 0, n_clear = 0;
  typedef enum {E_IDLE, E_ANTS, E_WAIT_EVAL, E_WAIT_UPD, E_UPD} exp_t;
  exp_t ph;
  int delay;

  aco_ctrl #(.N_ITER(NI)) dut (.clk, .rst_n, .start, .ants_done, .upd_done,
    .ant_start, .eval, .eval_clear, .upd_start, .busy, .done, .iter);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Environment model and protocol checker, evaluated on every falling edge.
  always @(negedge clk) if (rst_n) begin
    if (ant_start) n_ant_start++;
    if (eval) n_eval++;
    if (upd_start) n_upd++;
    if (done) n_done++;
    if (eval_clear) n_clear++;
    upd_done = 0;
    case (ph)
      E_ANTS: begin
        checks++;
        if (eval || upd_start) begin failures++; $display("eval/update during search"); end
        if (delay == 0) begin ants_done = 1; ph = E_WAIT_EVAL; end else delay--;
      end
      E_WAIT_EVAL: if (eval) begin ants_done = 0; ph = E_WAIT_UPD; end
      E_WAIT_UPD: if (upd_start) begin delay = $urandom % 40; ph = E_UPD; end
      E_UPD: if (delay == 0) begin upd_done = 1; ph = E_IDLE; end else delay--;
      default: ;
    endcase
    if (ant_start) begin
      checks++;
      if (ph != E_IDLE) begin failures++; $display("ants started in phase %0d", ph); end
      ants_done = 0;
      delay = 1 + $urandom % 60;
      ph = E_ANTS;
    end
  end

  initial begin
    int cyc;
    ph = E_IDLE;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      n_ant_start = 0; n_eval = 0; n_upd = 0; n_done = 0; n_clear = 0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 0;
      while (!done && cyc < 20000) begin @(posedge clk); cyc++; end
      @(negedge clk);
      repeat (5) @(negedge clk);
      checks += 6;
      if (n_ant_start != NI) begin failures++; $display("ant starts %0d", n_ant_start); end
      if (n_eval != NI)      begin failures++; $display("evals %0d", n_eval); end
      if (n_upd != NI)       begin failures++; $display("updates %0d", n_upd); end
      if (n_done != 1)       begin failures++; $display("done pulses %0d", n_done); end
      if (n_clear != 1)      begin failures++; $display("clears %0d", n_clear); end
      if (int'(iter) != NI || busy) begin failures++; $display("iter %0d busy %0d", iter, busy); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
