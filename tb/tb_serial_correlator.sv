// tb_serial_correlator -- one satellite (PRN 5) with a known code offset.
//  1. Started on the right PRN six chips out of phase, the correlator must
//     slip exactly six times, then lock one epoch later; from then on every
//     local epoch chip must meet the satellite's chip 0 and data must give
//     the navigation bit of each epoch.
//  2. The satellite is replaced by random chips: flag must drop after one
//     epoch and the code must start slipping again.
//  3. Started on PRN 4 with only PRN 5 in the sky, the correlator must give
//     up PRN 4 after 1023 slips (1023 epochs, the serial worst case) and then
//     lock to PRN 5.
// chip_en comes every second clock.
module tb_serial_correlator;
  import tb_gps_pkg::*;

  localparam int P = 4, EPB = 3;

  logic        clk = 1'b0, rst_n = 1'b0, chip_en = 1'b0, start = 1'b0, rx = 1'b0;
  logic [4:0]  start_prn = '0, prn;
  logic        active, flag, data, settling, epoch, slip;
  logic [10:0] count;
  int          checks = 0, failures = 0;
  longint      n = 0;           // receiver chip number
  int          offset;
  bit          sat_on = 1'b1;

  serial_correlator dut (.clk, .rst_n, .chip_en, .start, .start_prn, .rx, .active,
                         .flag, .data, .settling, .prn, .count, .epoch, .slip);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (chip %0d)", what, n);
    end
  endtask

  initial begin
    #80000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stimulus: rx changes right after each chip strobe edge.
  always @(negedge clk) begin
    chip_en <= ~chip_en;
  end
  always @(posedge clk) if (chip_en) begin
    n <= n + 1;
  end
  always_comb rx = sat_on ? sat_chip(P, offset, EPB, n) : 1'b0;
  logic noise;
  always @(posedge clk) if (chip_en) noise <= 1'($urandom);

  // Wait for a number of chip strobes.
  task automatic chips(int k);
    repeat (k) begin
      @(posedge clk);
      while (!chip_en) @(posedge clk);
    end
  endtask

  int     nslip, epochs_locked, data_ok;
  bit     chk_data, exp_bit;

  // Data / alignment monitor.
  always @(posedge clk) if (chip_en && active) begin
    if (chk_data) begin
      check(flag, "lock held");
      check(data == exp_bit, "data bit");
      if (data == exp_bit) data_ok++;
    end
    chk_data <= 1'b0;
    if (slip) nslip++;
    if (epoch && flag && sat_on && !settling) begin
      check(((n - offset) % L + L) % L == 0, "local epoch meets satellite chip 0");
      epochs_locked++;
      chk_data <= 1'b1;
      exp_bit  <= nav_bit(P, (sat_epoch(n, offset) - 1 + 1000 * EPB) / EPB - 1000);
    end
  end

  initial begin
    longint t0;
    int     seen1, seen0;
    init_codes();
    offset   = 0;
    chk_data = 0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    chips(5);
    check(!active && !flag, "idle after reset");
    // 1. start in step with chip n0, six chips behind the satellite.
    @(negedge clk);
    while (chip_en) @(negedge clk);
    offset    = int'(n) + 1 + 6;
    start_prn = 5'(P);
    start     = 1'b1;
    @(negedge clk);
    start     = 1'b0;
    nslip     = 0;
    t0        = n;
    while (!flag && n < t0 + 20 * L) chips(1);
    check(flag, "locked");
    check(nslip == 6, $sformatf("six slips before lock (%0d)", nslip));
    check(n - t0 >= 7 * L && n - t0 <= 8 * L + 8, $sformatf("lock time %0d chips", n - t0));
    epochs_locked = 0;
    data_ok = 0;
    chips(12 * L);
    check(epochs_locked >= 11, $sformatf("epochs checked while locked %0d", epochs_locked));
    check(nslip == 6, "no slips while locked");
    // 2. satellite disappears
    sat_on = 1'b0;
    force rx = noise;
    chips(2 * L + 4);
    check(!flag, "lock lost");
    chips(3 * L);
    check(nslip > 6, "slipping again after loss");
    // 3. wrong PRN first
    release rx;
    sat_on = 1'b1;
    @(negedge clk);
    while (chip_en) @(negedge clk);
    start_prn = 5'(P - 1);
    start     = 1'b1;
    @(negedge clk);
    start     = 1'b0;
    nslip     = 0;
    t0        = n;
    while (prn == 5'(P - 1) && n < t0 + 1100 * 1024) chips(1);
    check(prn == 5'(P), "moved on to the next PRN");
    check(nslip == 1023, $sformatf("1023 slips on the absent PRN (%0d)", nslip));
    check(n - t0 >= 1023 * L && n - t0 <= 1025 * 1024, $sformatf("search time %0d chips", n - t0));
    t0 = n;
    while (!flag && n < t0 + 1100 * 1024) chips(1);
    check(flag && prn == 5'(P), "locked to the PRN in the sky");
    seen1 = 0;
    seen0 = 0;
    repeat (8) begin
      chips(L);
      if (data) seen1++; else seen0++;
    end
    check(seen1 > 0 && seen0 > 0, "both data values seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
