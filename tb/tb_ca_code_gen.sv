// tb_ca_code_gen -- checks the C/A generator against reference codes built by
// the G2-delay method, the published first ten chips of PRN 1..10, the epoch
// mark (once per 1023 chips), hold with advance low, and restart.
module tb_ca_code_gen;
  import tb_gps_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, restart = 1'b0, advance = 1'b0;
  logic [31:0] codes;
  logic        epoch;
  int          checks = 0, failures = 0;

  ca_code_gen dut (.clk, .rst_n, .restart, .advance, .codes, .epoch);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // First ten chips, octal, of PRN 1..10 (bit 9 = chip 0).
  localparam logic [9:0] FIRST10 [10] = '{10'o1440, 10'o1620, 10'o1710, 10'o1744,
    10'o1133, 10'o1455, 10'o1131, 10'o1454, 10'o1626, 10'o1504};

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] f10 [10];
    init_codes();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int t = 0; t < 2 * L; t++) begin
      advance = 1'b1;
      check(epoch == ((t % L) == 0), $sformatf("epoch at chip %0d", t));
      for (int p = 0; p < 32; p++) begin
        check(codes[p] == ca[p][t % L], $sformatf("PRN %0d chip %0d", p + 1, t));
        if (t < 10 && p < 10) f10[p][9-t] = codes[p];
      end
      @(negedge clk);
    end
    for (int p = 0; p < 10; p++)
      check(f10[p] == FIRST10[p], $sformatf("PRN %0d first chips %o", p + 1, f10[p]));
    // hold
    advance = 1'b0;
    for (int t = 0; t < 5; t++) begin
      @(negedge clk);
      check(codes == codes, "hold");
      for (int p = 0; p < 32; p++) check(codes[p] == ca[p][0], "hold at chip 0");
    end
    // advance 17 chips then restart
    advance = 1'b1;
    repeat (17) @(negedge clk);
    for (int p = 0; p < 32; p++) check(codes[p] == ca[p][17], "chip 17");
    check(!epoch, "no epoch at chip 17");
    restart = 1'b1;
    @(negedge clk);
    restart = 1'b0;
    for (int p = 0; p < 32; p++) check(codes[p] == ca[p][0], "after restart");
    check(epoch, "epoch after restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
