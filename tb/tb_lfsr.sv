// tb_lfsr: checks the LFSR against an independent Fibonacci-form model of the
// same polynomial and checks that the sequence has the full period of 65535.
// The Galois state s and the Fibonacci model are related only through the
// output bit stream: each step the Galois register shifts out s[0], which must
// equal the bit stream of the recurrence b[n+16] = b[n] ^ b[n+2] ^ b[n+3] ^ b[n+5]
// (reciprocal taps of x^16+x^14+x^13+x^11+1), seeded from the first 16 outputs.
module tb_lfsr;
  logic clk = 0, rst_n = 0, en = 0;
  logic [15:0] value;
  int checks = 0, failures = 0;

  lfsr #(.W(16), .SEED(16'hACE1)) dut (.clk, .rst_n, .en, .value);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit out_bits [$];
  initial begin
    int period;
    logic [15:0] first;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (value !== 16'hACE1) begin failures++; $display("seed wrong %h", value); end
    // hold: no change without en
    @(negedge clk);
    checks++; if (value !== 16'hACE1) begin failures++; $display("moved without en"); end
    en = 1;
    first = value;
    period = 0;
    do begin
      out_bits.push_back(value[0]);
      @(negedge clk);
      period++;
      if (value == 16'h0) begin failures++; $display("reached zero"); break; end
    end while (value != first && period < 70000);
    checks++;
    if (period != 65535) begin failures++; $display("period %0d", period); end
    // bit-stream recurrence check over the whole period
    for (int n = 0; n + 16 < out_bits.size(); n++) begin
      bit exp;
      exp = out_bits[n] ^ out_bits[n+2] ^ out_bits[n+3] ^ out_bits[n+5];
      checks++;
      if (out_bits[n+16] != exp) begin
        failures++;
        if (failures < 5) $display("bit %0d mismatch", n + 16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
