// tb_bit_adder_1023 -- starts a count every 10 clocks (one chip of the 10x
// clock) on random 1023-bit vectors held for the chip, and checks the sum
// against a population count and that done comes exactly 8 clocks after
// start.
module tb_bit_adder_1023;
  logic          clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [1022:0] bits = '0;
  logic [9:0]    sum;
  logic          done, busy;
  int            checks = 0, failures = 0;

  bit_adder_1023 dut (.clk, .rst_n, .start, .bits, .sum, .done, .busy);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 600; k++) begin
      int exp, lat;
      @(negedge clk);
      if (k == 0)      bits = '0;
      else if (k == 1) bits = '1;
      else for (int i = 0; i < 1023; i++) bits[i] = ($urandom % 16) < (k % 17);
      exp = 0;
      for (int i = 0; i < 1023; i++) exp += int'(bits[i]);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      lat = 1;
      while (!done && lat < 20) begin
        @(negedge clk);
        lat++;
      end
      checks++;
      if (lat != 8) begin
        failures++;
        $display("FAIL latency %0d", lat);
      end
      checks++;
      if (int'(sum) != exp) begin
        failures++;
        if (failures < 10) $display("FAIL sum=%0d expected %0d", sum, exp);
      end
      checks++;
      if (busy) begin failures++; $display("FAIL busy after done"); end
      // complete the 10-clock chip period
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
