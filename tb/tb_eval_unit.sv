// tb_eval_unit: feeds random ant costs (with forced ties and equal costs) and
// checks the cheapest ant, its cost, the running best and the new-best flag
// against a reference, one cycle after each eval strobe; also checks that the
// outputs hold without eval and that clear forgets the best.
module tb_eval_unit;
  localparam int NA = 3, CW = 12, AIW = 2;
  logic clk = 0, rst_n = 0, clear = 0, eval = 0;
  logic [NA-1:0][CW-1:0] costs = '0;
  logic [AIW-1:0] best_ant;
  logic [CW-1:0] iter_best_cost, global_best_cost;
  logic new_global;
  int checks = 0, failures = 0;

  eval_unit #(.N_ANTS(NA), .COST_W(CW)) dut (.clk, .rst_n, .clear, .eval, .costs,
    .best_ant, .iter_best_cost, .global_best_cost, .new_global);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int gbest, ei, ec;
    bit eng;
    repeat (3) @(posedge clk);
    rst_n = 1;
    gbest = 4095;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (t % 300 == 0) begin
        clear = 1; @(negedge clk); clear = 0; gbest = 4095;
      end
      for (int a = 0; a < NA; a++) costs[a] = CW'(200 + $urandom % 3000);
      if (t % 7 == 0) costs[2] = costs[1];
      if (t % 11 == 0) costs[1] = costs[0];
      ei = 0; ec = int'(costs[0]);
      for (int a = 1; a < NA; a++) if (int'(costs[a]) < ec) begin ec = int'(costs[a]); ei = a; end
      eng = ec < gbest;
      if (eng) gbest = ec;
      eval = 1;
      @(negedge clk);
      eval = 0;
      costs = '0;   // must not matter any more
      @(negedge clk);
      checks += 4;
      if (int'(best_ant) != ei)         begin failures++; $display("t%0d ant %0d exp %0d", t, best_ant, ei); end
      if (int'(iter_best_cost) != ec)   begin failures++; $display("t%0d cost %0d exp %0d", t, iter_best_cost, ec); end
      if (int'(global_best_cost) != gbest) begin failures++; $display("t%0d gbest %0d exp %0d", t, global_best_cost, gbest); end
      if (new_global != eng)            begin failures++; $display("t%0d new_global", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
