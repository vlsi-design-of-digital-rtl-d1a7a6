// tb_serial_clock_control -- drives chip strobes and epoch marks and checks
// that exactly the chip after an epoch chip is masked while unlocked with a
// valid result, and that nothing is masked while locked, before the first
// result, between chip strobes, or after restart.
module tb_serial_clock_control;
  logic clk = 1'b0, rst_n = 1'b0, restart = 1'b0, chip_en = 1'b0;
  logic epoch = 1'b0, locked = 1'b0, result_valid = 1'b0;
  logic gen_en, slip;
  int   checks = 0, failures = 0, slips = 0;

  serial_clock_control dut (.clk, .rst_n, .restart, .chip_en, .epoch, .locked,
                            .result_valid, .gen_en, .slip);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    bit prev_epoch_chip;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    prev_epoch_chip = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      // chip strobe every third clock; epoch mark every 50 chips
      chip_en      = (n % 3) == 0;
      epoch        = ((n / 3) % 50) == 0;
      result_valid = n > 200;
      locked       = (n > 1500 && n < 2500);
      restart      = (n == 3000 || n == 3001);
      #1;
      if (chip_en) begin
        bit exp_slip;
        exp_slip = prev_epoch_chip && result_valid && !locked && !(n == 3003);
        check(slip == exp_slip, $sformatf("slip at n=%0d", n));
        check(gen_en == !exp_slip, $sformatf("gen_en at n=%0d", n));
        if (slip) slips++;
      end else begin
        check(!slip && !gen_en, $sformatf("idle at n=%0d", n));
      end
      if (chip_en && !restart) prev_epoch_chip = epoch;
      if (restart) prev_epoch_chip = 0;
    end
    check(slips > 10, "slips happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
