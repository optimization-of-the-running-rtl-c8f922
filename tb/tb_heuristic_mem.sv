// tb_heuristic_mem: loads a full distance table (D(r,s) = r*16 + s XOR a mask,
// a formula the testbench can recompute), then reads random entries on every
// port and checks them against the formula, and checks that reads never
// change the table.
module tb_heuristic_mem;
  localparam int N = 16, W = 8, NR = 3, AW = 8;
  logic clk = 0;
  logic ld_we;
  logic [AW-1:0] ld_addr;
  logic [W-1:0] ld_data;
  logic [NR-1:0][AW-1:0] rd_addr;
  logic [NR-1:0][W-1:0]  rd_data;
  int checks = 0, failures = 0;

  function automatic logic [W-1:0] dval(int a);
    return W'(a) ^ 8'h5A ^ W'(a >> 3);
  endfunction

  heuristic_mem #(.N_NODES(N), .D_W(W), .N_RD(NR)) dut (.clk, .ld_we, .ld_addr, .ld_data, .rd_addr, .rd_data);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [AW-1:0] a [NR];
    ld_we = 0; ld_addr = '0; ld_data = '0; rd_addr = '0;
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      ld_we = 1; ld_addr = AW'(i); ld_data = dval(i);
    end
    @(negedge clk); ld_we = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      for (int p = 0; p < NR; p++) begin
        a[p] = AW'($urandom);
        rd_addr[p] = a[p];
      end
      @(posedge clk); #1;
      for (int p = 0; p < NR; p++) begin
        checks++;
        if (rd_data[p] !== dval(int'(a[p]))) begin
          failures++;
          if (failures < 5) $display("port %0d addr %0d got %0d", p, a[p], rd_data[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
