// tb_parallel_correlator -- three satellites (PRN 3, 10, 21) combined by
// majority vote, each with its own code offset and navigation data.
// Hybrid instance (HYBRID=1): PRNs must be tried in order, each absent one
// taking exactly 2045 chips (1023 to fill, 1023 alignments, the first
// of them on the last fill chip); found must
// come for the three present PRNs only, each at the moment the next
// received chip is chip 0 of that satellite's epoch, with comp_data equal to
// the navigation bit of the epoch held, and shift equal to the number of
// chips slid since the stationary mode began.
// Tracking instance (HYBRID=0): must lock to PRN 3, enter tracking mode and
// stay there, with comp high and comp_data right whenever the received
// register holds exactly one epoch of PRN 3.
module tb_parallel_correlator;
  import tb_gps_pkg::*;
  import gps_corr_pkg::pc_mode_e, gps_corr_pkg::PC_TRACKING, gps_corr_pkg::PC_STATIONARY;

  localparam int EPB = 2;
  localparam int NS = 3;
  localparam int SP [NS] = '{2, 9, 20};
  localparam int SO [NS] = '{517, 90, 1001};

  logic       clk = 1'b0, rst_n = 1'b0, chip_en, rx;
  logic [3:0] div = '0;
  pc_mode_e   mode_h, mode_t;
  logic [4:0] prn_h, prn_t;
  logic [9:0] count_h, count_t;
  logic       done_h, done_t, comp_h, comp_t, cdata_h, cdata_t;
  logic       found_h, found_t, next_h, next_t, ep_h, ep_t;
  logic [9:0] shift_h, shift_t;
  longint     stat_start = 0;
  int         checks = 0, failures = 0;
  longint     n = 0;

  parallel_correlator #(.HYBRID(1'b1)) dut_h (
    .clk, .rst_n, .chip_en, .rx, .mode(mode_h), .prn(prn_h), .count(count_h),
    .count_done(done_h), .comp(comp_h), .comp_data(cdata_h), .found(found_h),
    .next_code(next_h), .epoch(ep_h), .shift(shift_h));

  parallel_correlator #(.HYBRID(1'b0)) dut_t (
    .clk, .rst_n, .chip_en, .rx, .mode(mode_t), .prn(prn_t), .count(count_t),
    .count_done(done_t), .comp(comp_t), .comp_data(cdata_t), .found(found_t),
    .next_code(next_t), .epoch(ep_t), .shift(shift_t));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (chip %0d)", what, n);
    end
  endtask

  initial begin
    #600000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk or negedge rst_n)
    if (!rst_n) div <= '0; else div <= (div == 4'd9) ? '0 : div + 1'b1;
  assign chip_en = rst_n && div == '0;
  always @(posedge clk) if (chip_en) n <= n + 1;

  always_comb begin
    bit c [NS];
    for (int s = 0; s < NS; s++) c[s] = sat_chip(SP[s], SO[s], EPB, n);
    rx = maj3(c[0], c[1], c[2]);
  end

  function automatic int sat_of(int p);
    for (int s = 0; s < NS; s++) if (SP[s] == p) return s;
    return -1;
  endfunction

  longint last_next = 0;
  int     n_found = 0, n_next = 0, n_track = 0, tracked_ok = 0;
  bit     found_mask [32];

  always @(posedge clk) if (rst_n) begin
    if (chip_en && mode_h != PC_STATIONARY) stat_start = n;
    if (found_h) begin
      int s;
      check(longint'(shift_h) == n - 1 - stat_start, $sformatf("shift %0d", shift_h));
      s = sat_of(int'(prn_h));
      n_found++;
      check(s >= 0, $sformatf("found only present PRNs (prn index %0d)", prn_h));
      if (s >= 0) begin
        found_mask[prn_h] = 1'b1;
        check(((n - SO[s]) % L + L) % L == 0, "next chip is chip 0 of the epoch");
        check(cdata_h == nav_bit(SP[s], (sat_epoch(n, SO[s]) - 1 + 1000 * EPB) / EPB - 1000),
              "comp_data is the epoch's data bit");
      end
    end
    if (next_h) begin
      n_next++;
      if (!comp_h) check(n - last_next == 2045,
                         $sformatf("2045 chips per absent code (%0d)", n - last_next));
      last_next = n;
    end
    // tracking instance
    if (done_t && mode_t == PC_TRACKING) begin
      n_track++;
      check(prn_t == 5'd2, "tracking the first present PRN");
      if (((n - 1 - SO[0]) % L + L) % L == L - 1) begin
        tracked_ok++;
        check(comp_t, "comp while tracking");
        check(cdata_t == nav_bit(SP[0], (sat_epoch(n - 1, SO[0]) + 1000 * EPB) / EPB - 1000),
              "tracked data bit");
      end
    end
    if (found_t) check(prn_t == 5'd2 && mode_t == PC_STATIONARY, "tracking instance finds PRN 3");
  end

  initial begin
    init_codes();
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (prn_h == 5'd22);
    check(found_mask[2] && found_mask[9] && found_mask[20], "all three PRNs found");
    check(n_found == 3, $sformatf("three finds (%0d)", n_found));
    check(n_next == 22, $sformatf("22 code switches (%0d)", n_next));
    check(mode_t == PC_TRACKING && tracked_ok > 10, $sformatf("tracking held (%0d epochs)", tracked_ok));
    $display("finds=%0d switches=%0d tracked_epochs=%0d", n_found, n_next, tracked_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
