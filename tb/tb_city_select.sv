// tb_city_select: drives one ant against testbench models of the pheromone
// and distance memories (one cycle read latency).
//   1. Random matrices, every start node: the tour must be a permutation that
//      begins at the start node and the reported cost must equal the closed
//      tour length computed by the testbench.
//   2. All scores zero: no candidate can beat the random value, so every node
//      is forced after a full pass; the tour must be the start node followed
//      by the remaining nodes in ascending order, with 15 forced strobes.
//   3. Only the edges i -> i+1 score high: the ant must follow the ring.
//   4. Row-address check: every read address must be (current node << 4) | column.
//   5. Tour time: 2 * (n - 1) + R + 3 cycles from the start strobe to done,
//      R being the rejected candidates of that tour.
module tb_city_select;
  localparam int N = 16, NW = 4, AW = 8, PW = 8, DW = 8, CW = 12;
  logic clk = 0, rst_n = 0, start = 0;
  logic [NW-1:0] start_node = '0;
  logic done;
  logic [CW-1:0] cost;
  logic [AW-1:0] ph_addr, d_addr;
  logic [PW-1:0] ph_data;
  logic [DW-1:0] d_data;
  logic [NW-1:0] tour_pos = '0, tour_node;
  logic reject, forced;
  int checks = 0, failures = 0;
  int n_reject = 0, n_forced = 0;
  logic [PW-1:0] ph [N*N];
  logic [DW-1:0] dm [N*N];

  city_select #(.N_NODES(N)) dut (.clk, .rst_n, .start, .start_node, .done, .cost,
    .ph_addr, .ph_data, .d_addr, .d_data, .tour_pos, .tour_node, .reject, .forced);

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    ph_data <= ph[ph_addr];
    d_data  <= dm[d_addr];
    if (reject) n_reject++;
    if (forced) n_forced++;
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_tour(input int s, output int tour [N], output int cyc);
    int r0;
    @(negedge clk);
    r0 = n_reject;
    start_node = NW'(s); start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 2 * (N - 1) + (n_reject - r0) + 3) begin
      failures++; $display("tour took %0d cycles with %0d rejects", cyc, n_reject - r0);
    end
    for (int p = 0; p < N; p++) begin
      tour_pos = NW'(p); #1;
      tour[p] = int'(tour_node);
    end
  endtask

  task automatic check_tour(int s, int tour [N]);
    bit seen [N];
    int len = 0;
    checks++;
    if (tour[0] != s) begin failures++; $display("tour starts at %0d not %0d", tour[0], s); end
    for (int p = 0; p < N; p++) begin
      checks++;
      if (seen[tour[p]]) begin failures++; $display("node %0d twice", tour[p]); end
      seen[tour[p]] = 1;
      len += int'(dm[tour[p] * N + tour[(p + 1) % N]]);
    end
    checks++;
    if (int'(cost) != len) begin failures++; $display("cost %0d exp %0d", cost, len); end
  endtask

  // Row-address rule: while the ant reads, the row must be the last node it chose.
  int last_chosen;
  always @(negedge clk) if (rst_n && int'(dut.state) == 1) begin
    checks++;
    if (ph_addr[AW-1:NW] != NW'(last_chosen)) begin
      failures++; $display("row %0d while on node %0d", ph_addr[AW-1:NW], last_chosen);
    end
  end
  always @(posedge clk) begin
    if (start) last_chosen <= int'(start_node);
    else if (dut.mark) last_chosen <= int'(dut.mark_node);
  end

  initial begin
    int tour [N];
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1. random matrices
    for (int r = 0; r < 6; r++) begin
      foreach (ph[i]) ph[i] = PW'($urandom);
      foreach (dm[i]) dm[i] = DW'($urandom);
      for (int s = 0; s < N; s += 5) begin
        run_tour(s, tour, cyc);
        check_tour(s, tour);
      end
    end
    checks++;
    if (n_reject == 0) begin failures++; $display("no rejection seen"); end
    // 2. all scores zero -> every choice forced
    foreach (ph[i]) ph[i] = '0;
    foreach (dm[i]) dm[i] = '1;
    n_forced = 0;
    run_tour(5, tour, cyc);
    check_tour(5, tour);
    for (int p = 1; p < N; p++) begin
      int e;
      e = (p - 1 < 5) ? p - 1 : p;
      checks++;
      if (tour[p] != e) begin failures++; $display("forced tour[%0d]=%0d exp %0d", p, tour[p], e); end
    end
    checks++;
    if (n_forced != N - 1) begin failures++; $display("forced %0d", n_forced); end
    // 3. ring preference
    foreach (ph[i]) ph[i] = '0;
    foreach (dm[i]) dm[i] = '1;
    for (int i = 0; i < N; i++) begin
      ph[i * N + (i + 1) % N] = '1;
      dm[i * N + (i + 1) % N] = 8'd1;
    end
    for (int s = 0; s < N; s += 3) begin
      run_tour(s, tour, cyc);
      check_tour(s, tour);
      for (int p = 0; p < N; p++) begin
        checks++;
        if (tour[p] != (s + p) % N) begin failures++; $display("ring tour[%0d]=%0d", p, tour[p]); end
      end
      checks++;
      if (cost != CW'(N)) begin failures++; $display("ring cost %0d", cost); end
    end
    $display("rejects=%0d", n_reject);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
