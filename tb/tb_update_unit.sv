// tb_update_unit: runs the updating unit on random tours and a random
// pheromone matrix held in a testbench memory model, and compares the whole
// matrix afterwards with a reference computed by the testbench:
//   local  (every ant):  tau' = tau - ((tau - 32) >> 4)  (or + when below 32)
//   global (best ant):   tau' = tau + ((255 - tau) >> 3)
// applied edge by edge in tour order, closing edge included, written to (a,b)
// and (b,a). It also checks the best-tour copy (only when new_global is set)
// and the update time of (N_ANTS + 1) * (2 + N_NODES) + 1 cycles.
module tb_update_unit;
  localparam int N = 16, NA = 3, NW = 4, AW = 8, PW = 8, AIW = 2;
  logic clk = 0, rst_n = 0, start = 0;
  logic [AIW-1:0] best_ant = '0;
  logic new_global = 0;
  logic busy, done;
  logic [AIW-1:0] tour_ant;
  logic [NW-1:0] tour_pos, tour_node;
  logic [AW-1:0] ph_rd_addr, ph_wr_addr, ph_wr_addr_b;
  logic [PW-1:0] ph_rd_data, ph_wr_data;
  logic ph_we;
  logic [N-1:0][NW-1:0] best_tour;
  logic local_step, global_step;
  int checks = 0, failures = 0;
  logic [PW-1:0] mem [N*N];
  int ref_m [N*N];
  int tours [NA][N];

  update_unit #(.N_NODES(N), .N_ANTS(NA)) dut (.clk, .rst_n, .start, .best_ant, .new_global,
    .busy, .done, .tour_ant, .tour_pos, .tour_node, .ph_rd_addr, .ph_rd_data,
    .ph_we, .ph_wr_addr, .ph_wr_data, .ph_wr_addr_b, .best_tour, .local_step, .global_step);

  always #5 clk = ~clk;
  assign tour_node = NW'(tours[tour_ant][tour_pos]);
  always_ff @(posedge clk) begin
    ph_rd_data <= mem[ph_rd_addr];
    if (ph_we) begin
      mem[ph_wr_addr]   <= ph_wr_data;
      mem[ph_wr_addr_b] <= ph_wr_data;
    end
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_step(int tau, bit glob);
    if (glob) return tau + ((255 - tau) / 8);
    if (tau >= 32) return tau - ((tau - 32) / 16);
    return tau + ((32 - tau) / 16);
  endfunction

  task automatic ref_tour(int a, bit glob);
    for (int k = 0; k < N; k++) begin
      int x, y, v;
      x = tours[a][k]; y = tours[a][(k + 1) % N];
      v = ref_step(ref_m[x * N + y], glob);
      ref_m[x * N + y] = v;
      ref_m[y * N + x] = v;
    end
  endtask

  initial begin
    int cyc;
    int prev_best [N];
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (prev_best[i]) prev_best[i] = 0;
    for (int r = 0; r < 8; r++) begin
      foreach (mem[i]) begin mem[i] = PW'($urandom); ref_m[i] = int'(mem[i]); end
      for (int a = 0; a < NA; a++) begin
        for (int p = 0; p < N; p++) tours[a][p] = p;
        tours[a].shuffle();
      end
      @(negedge clk);
      best_ant = AIW'($urandom % NA);
      new_global = (r % 2 == 0);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      for (int a = 0; a < NA; a++) ref_tour(a, 0);
      ref_tour(int'(best_ant), 1);
      checks++;
      if (cyc != (NA + 1) * (2 + N) + 1) begin failures++; $display("cycles %0d", cyc); end
      foreach (mem[i]) begin
        checks++;
        if (int'(mem[i]) != ref_m[i]) begin
          failures++;
          if (failures < 6) $display("ph[%0d] got %0d exp %0d", i, mem[i], ref_m[i]);
        end
      end
      if (new_global) foreach (prev_best[i]) prev_best[i] = tours[best_ant][i];
      for (int p = 0; p < N; p++) begin
        checks++;
        if (int'(best_tour[p]) != prev_best[p]) begin failures++; $display("best_tour[%0d]", p); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
