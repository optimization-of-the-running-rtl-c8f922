// tb_result_mem: marks nodes in random order, checking after each mark the
// flag of every node and the tour list against a model; then clears and
// checks that every flag is zero, including a mark issued together with the
// clear.
module tb_result_mem;
  localparam int N = 16, NW = 4;
  logic clk = 0, clear, mark;
  logic [NW-1:0] mark_node, mark_pos, chk_node, tour_pos, tour_node;
  logic chk_visited;
  logic [N-1:0] visited_vec;
  int checks = 0, failures = 0;
  bit vis [N];
  int order [N];

  result_mem #(.N_NODES(N)) dut (.clk, .clear, .mark, .mark_node, .mark_pos,
                                 .chk_node, .chk_visited, .visited_vec, .tour_pos, .tour_node);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all(int m);
    for (int i = 0; i < N; i++) begin
      chk_node = NW'(i); #1;
      checks++;
      if (chk_visited !== vis[i]) begin failures++; $display("flag %0d got %0d", i, chk_visited); end
      checks++;
      if (visited_vec[i] !== vis[i]) begin failures++; $display("vec %0d got %0d", i, visited_vec[i]); end
    end
    for (int p = 0; p < m; p++) begin
      tour_pos = NW'(p); #1;
      checks++;
      if (tour_node !== NW'(order[p])) begin failures++; $display("tour[%0d] got %0d", p, tour_node); end
    end
  endtask

  initial begin
    clear = 0; mark = 0; mark_node = '0; mark_pos = '0; chk_node = '0; tour_pos = '0;
    for (int round = 0; round < 4; round++) begin
      // clear together with marking a start node
      order[0] = $urandom % N;
      @(negedge clk);
      clear = 1; mark = 1; mark_node = NW'(order[0]); mark_pos = '0;
      @(negedge clk);
      clear = 0; mark = 0;
      foreach (vis[i]) vis[i] = (i == order[0]);
      check_all(1);
      // random permutation of the rest
      for (int p = 1; p < N; p++) begin
        int c;
        do c = $urandom % N; while (vis[c]);
        order[p] = c;
        @(negedge clk);
        mark = 1; mark_node = NW'(c); mark_pos = NW'(p);
        @(negedge clk);
        mark = 0;
        vis[c] = 1;
        check_all(p + 1);
      end
    end
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    foreach (vis[i]) vis[i] = 0;
    check_all(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
