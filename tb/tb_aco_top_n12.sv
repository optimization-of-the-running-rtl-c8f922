// tb_aco_top_n12: the same end-to-end checks as tb_aco_top, on a configuration
// other than the default: 12 nodes (not a power of two, so each index still
// takes 4 address bits and row r starts at address r * 16), 4 ants and 6
// iterations. The ring problem has optimum 16 * 12 = 192.
module tb_aco_top_n12;
  localparam int N = 12, NA = 4, NI = 6, NW = 4, AW = 8, CW = 12, RS = 16;
  localparam int UPD_CYC = (NA + 1) * (2 + N) + 1;
  logic clk = 0, rst_n = 0;
  logic ld_we = 0, ld_sel = 0;
  logic [AW-1:0] ld_addr = '0;
  logic [7:0] ld_data = '0;
  logic start = 0;
  logic busy, done;
  logic [2:0] iter;
  logic [CW-1:0] best_cost, iter_cost;
  logic [N-1:0][NW-1:0] best_tour;
  logic [NA-1:0] ev_reject, ev_forced;
  logic ev_local, ev_global;
  int checks = 0, failures = 0;
  int n_reject = 0, n_forced = 0, n_local = 0, n_global = 0, n_newbest = 0, n_iter_seen = 0;
  int dm [N*N];

  aco_top #(.N_NODES(N), .N_ANTS(NA), .N_ITER(NI)) dut (.clk, .rst_n, .ld_we, .ld_sel, .ld_addr, .ld_data, .start, .busy, .done,
    .iter, .best_cost, .best_tour, .iter_cost, .ev_reject, .ev_forced, .ev_local, .ev_global);

  always #10 clk = ~clk;   // 50 MHz

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ring(int i, int j);
    int d;
    d = (i > j) ? i - j : j - i;
    if (d > N / 2) d = N - d;
    return 16 * d;
  endfunction

  always @(posedge clk) if (rst_n) begin
    n_reject += $countones(ev_reject);
    n_forced += $countones(ev_forced);
    if (ev_local)  n_local++;
    if (ev_global) n_global++;
  end

  // Per-iteration monitor: eval result one cycle after the eval strobe.
  int min_iter, prev_best;
  logic eval_q;
  int upd_len;
  bit in_upd;
  always @(posedge clk) begin
    eval_q <= dut.eval;
    if (dut.upd_start) begin in_upd = 1; upd_len = 0; end
    else if (in_upd) upd_len++;
    if (dut.upd_done && in_upd) begin
      in_upd = 0;
      checks++;
      if (upd_len != UPD_CYC) begin failures++; $display("update took %0d", upd_len); end
    end
  end
  always @(negedge clk) if (eval_q) begin
    n_iter_seen++;
    if (dut.new_global) n_newbest++;
    if (int'(iter_cost) < min_iter) min_iter = int'(iter_cost);
    checks += 2;
    if (int'(best_cost) != min_iter) begin failures++; $display("best %0d min %0d", best_cost, min_iter); end
    if (int'(best_cost) > prev_best) begin failures++; $display("best cost rose"); end
    prev_best = int'(best_cost);
  end

  task automatic load(bit sel, int a, int v);
    @(negedge clk);
    ld_we = 1; ld_sel = sel; ld_addr = AW'(a); ld_data = 8'(v);
    @(negedge clk);
    ld_we = 0;
  endtask

  task automatic run_once(output int cyc);
    min_iter = 1 << 30; prev_best = 1 << 30; n_iter_seen = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    // try to overwrite a distance while busy: must be ignored
    ld_we = 1; ld_sel = 1; ld_addr = AW'(1); ld_data = 8'd0;
    @(negedge clk); ld_we = 0; cyc++;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  task automatic check_result(int cyc);
    bit seen [N];
    int len;
    checks++;
    if (int'(iter) != NI || n_iter_seen != NI) begin failures++; $display("iter %0d seen %0d", iter, n_iter_seen); end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("still busy"); end
    len = 0;
    for (int p = 0; p < N; p++) begin
      checks++;
      if (seen[best_tour[p]]) begin failures++; $display("best tour repeats %0d", best_tour[p]); end
      seen[best_tour[p]] = 1;
      len += dm[int'(best_tour[p]) * N + int'(best_tour[(p + 1) % N])];
    end
    checks += 2;
    if (len != int'(best_cost)) begin failures++; $display("tour length %0d reported %0d", len, best_cost); end
    if (len < 16 * N) begin failures++; $display("below optimum"); end
    for (int i = 0; i < N; i++)
      for (int j = i + 1; j < N; j++) begin
        checks++;
        if (dut.u_ph.mem[i * RS + j] != dut.u_ph.mem[j * RS + i]) begin
          failures++; $display("asymmetric %0d,%0d", i, j);
        end
      end
    for (int p = 0; p < N; p++) begin
      checks++;
      if (dut.u_ph.mem[int'(best_tour[p]) * RS + int'(best_tour[(p + 1) % N])] <= 8'd32) begin
        failures++; $display("best edge %0d not reinforced", p);
      end
    end
    checks++;
    if (dut.u_dist.rom[1] != 8'(ring(0, 1))) begin failures++; $display("load while busy was accepted"); end
    $display("run: %0d cycles (%0d ns at 50 MHz), best tour length %0d (optimum %0d)",
             cyc, cyc * 20, best_cost, 16 * N);
  endtask

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        dm[i * N + j] = ring(i, j);
        load(1, i * RS + j, dm[i * N + j]);
        load(0, i * RS + j, 32);
      end
    run_once(cyc);
    check_result(cyc);
    // second run continues from the learned pheromone, best-so-far restarts
    run_once(cyc);
    check_result(cyc);
    checks += 5;
    if (n_reject == 0)  begin failures++; $display("no rejection"); end
    if (n_forced == 0)  begin failures++; $display("no forced choice"); end
    if (n_local == 0)   begin failures++; $display("no local update"); end
    if (n_global == 0)  begin failures++; $display("no global update"); end
    if (n_newbest == 0) begin failures++; $display("no new best"); end
    $display("events: reject=%0d forced=%0d local=%0d global=%0d new_best=%0d",
             n_reject, n_forced, n_local, n_global, n_newbest);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
