// tb_pheromone_mem: writes random words to random addresses of the pheromone
// matrix while all read ports read random addresses, and compares every read
// with a shadow array kept by the testbench (read data one cycle after the
// address, old data on a same-cycle read/write collision). Both write ports
// are exercised, together and apart, always on different addresses.
module tb_pheromone_mem;
  localparam int N = 16, W = 8, NR = 4, AW = 8;
  logic clk = 0;
  logic [NR-1:0][AW-1:0] rd_addr;
  logic [NR-1:0][W-1:0]  rd_data;
  logic we;
  logic [AW-1:0] wr_addr;
  logic [W-1:0]  wr_data;
  logic we_b;
  logic [AW-1:0] wr_addr_b;
  logic [W-1:0]  wr_data_b;
  int checks = 0, failures = 0;
  logic [W-1:0] shadow [2**AW];
  logic [W-1:0] expq [NR];

  pheromone_mem #(.N_NODES(N), .PH_W(W), .N_RD(NR)) dut (.clk, .rd_addr, .rd_data, .we, .wr_addr, .wr_data, .we_b, .wr_addr_b, .wr_data_b);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; rd_addr = '0; wr_addr = '0; wr_data = '0; we_b = 0; wr_addr_b = '0; wr_data_b = '0;
    // fill every address
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      we = 1; wr_addr = AW'(a); wr_data = W'($urandom);
      shadow[a] = wr_data;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int p = 0; p < NR; p++) begin
        rd_addr[p] = AW'($urandom);
        expq[p] = shadow[rd_addr[p]];
      end
      we = ($urandom % 2) == 0;
      wr_addr = ($urandom % 4 == 0) ? rd_addr[0] : AW'($urandom);
      wr_data = W'($urandom);
      we_b = ($urandom % 2) == 0;
      wr_addr_b = ($urandom % 4 == 0) ? rd_addr[1] : AW'($urandom);
      if (wr_addr_b == wr_addr) wr_addr_b = wr_addr + 1'b1;
      wr_data_b = W'($urandom);
      @(posedge clk);
      if (we) shadow[wr_addr] = wr_data;
      if (we_b) shadow[wr_addr_b] = wr_data_b;
      #1;
      for (int p = 0; p < NR; p++) begin
        checks++;
        if (rd_data[p] !== expq[p]) begin
          failures++;
          if (failures < 5) $display("port %0d addr %0d got %0d exp %0d", p, rd_addr[p], rd_data[p], expq[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
