// tb_hybrid_correlator -- end-to-end test of the 4-channel hybrid correlator
// at its default parameters (10 fast clocks per chip, real 20-epoch
// navigation bits).
// Sky: PRN 2, 5 and 7 combined by majority vote, each with its own offset.
// Checked:
//  - the parallel correlator walks the codes, fills (sliding mode) and
//    searches (stationary mode), and gives up each absent code after 2045
//    chips;
//  - each present PRN is handed to the lowest-numbered free channel within
//    one code search (about 2 ms), channels already locked are skipped;
//  - a channel raises its flag one epoch after the hand-off, its epochs meet
//    the satellite's chip 0, and its data follows the navigation bits
//    (both values seen);
//  - when PRN 5 is replaced by noise its channel drops the flag and slips;
//  - the margin scanner beside the correlator finds its test code's phase.
// Every one of these events is counted and must happen at least once.
module tb_hybrid_correlator;
  import tb_gps_pkg::*;
  import gps_corr_pkg::*;

  localparam int EPB = 20;
  localparam int NS = 3;
  localparam int SP [NS] = '{1, 4, 6};
  localparam int SO [NS] = '{300, 777, 45};
  localparam int NCH = 4;

  logic           clk = 1'b0, rst_n = 1'b0, rx, chip_en;
  pc_mode_e       par_mode;
  prn_t           par_prn;
  logic           par_comp, par_next_code, par_count_done, par_comp_data, par_epoch;
  logic [9:0]     par_shift;
  logic [9:0]     par_count;
  logic           handoff, no_free;
  logic [7:0]     handoff_ch;
  logic [NCH-1:0] ch_active, ch_flag, ch_data, ch_epoch, ch_slip;
  prn_t           ch_prn [NCH];
  logic [10:0]    ch_count [NCH];

  int     checks = 0, failures = 0;
  longint n = 0;
  bit     sat_on [NS] = '{1, 1, 1};
  bit     noise;

  hybrid_correlator dut (
    .clk, .rst_n, .rx, .chip_en, .par_mode, .par_prn, .par_comp, .par_next_code,
    .par_count, .par_count_done, .par_comp_data, .par_epoch, .par_shift,
    .handoff, .handoff_ch, .no_free,
    .ch_active, .ch_flag, .ch_data, .ch_epoch, .ch_slip, .ch_prn, .ch_count,
    .scan_chip_en(1'b1), .scan_prn(prn_t'(SCAN_P)), .scan_rx, .scan_word, .scan_shift, .scan_valid);

  // The margin scanner runs at the clock rate on PRN 3 alone, lagging by
  // SCAN_OFF chips: the word of shift SCAN_OFF must be 0, all others in the
  // cross-correlation band.
  localparam int SCAN_P = 2, SCAN_OFF = 40;
  logic       scan_rx, scan_valid;
  logic [9:0] scan_word, scan_shift;
  longint     clkn = 0;
  int         ev_scan = 0, ev_scan_zero = 0;
  always @(posedge clk) if (rst_n) clkn <= clkn + 1;
  assign scan_rx = ca[SCAN_P][int'(((clkn - SCAN_OFF) % L + L) % L)];
  always @(posedge clk) if (rst_n && scan_valid) begin
    ev_scan++;
    if (scan_shift == 10'(SCAN_OFF)) begin
      ev_scan_zero++;
      check(scan_word == 0, "scanner aligned word");
    end else begin
      check(scan_word >= 10'd470 && scan_word <= 10'd555, "scanner cross-correlation word");
    end
  end

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (chip %0d)", what, n);
    end
  endtask

  initial begin
    #2000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (chip_en && rst_n) begin
    n     <= n + 1;
    noise <= 1'($urandom);
  end

  always_comb begin
    bit c [NS];
    for (int s = 0; s < NS; s++) c[s] = sat_on[s] ? sat_chip(SP[s], SO[s], EPB, n) : noise;
    rx = maj3(c[0], c[1], c[2]);
  end

  function automatic int sat_of(int p);
    for (int s = 0; s < NS; s++) if (SP[s] == p) return s;
    return -1;
  endfunction

  // Event counters.
  int ev_switch = 0, ev_fill = 0, ev_search = 0, ev_handoff = 0, ev_skip_busy = 0;
  int ev_lock = 0, ev_data0 = 0, ev_data1 = 0, ev_loss = 0, ev_slip = 0, ev_nofree = 0;

  longint   last_next = 0, handoff_at [NCH];
  int       ch_sat [NCH] = '{-1, -1, -1, -1};
  bit       chk [NCH], expb [NCH];
  logic [NCH-1:0] flag_d = '0;
  pc_mode_e mode_d = PC_SLIDING;

  always @(posedge clk) if (rst_n) begin
    mode_d <= par_mode;
    if (par_mode != mode_d && par_mode == PC_SLIDING)    ev_fill++;
    if (par_mode != mode_d && par_mode == PC_STATIONARY) ev_search++;
    if (par_next_code) begin
      if (!par_comp) begin
        ev_switch++;
        check(n - last_next == 2045, $sformatf("2045 chips per absent code (%0d)", n - last_next));
      end
      last_next = n;
    end
    if (no_free) ev_nofree++;
    if (handoff) begin
      int s;
      s = sat_of(int'(par_prn));
      ev_handoff++;
      check(s >= 0, "hand-off of a present PRN");
      check(!ch_flag[handoff_ch], "hand-off to a channel whose flag is low");
      for (int i = 0; i < NCH; i++)
        if (i < int'(handoff_ch)) begin
          check(ch_flag[i] || (ch_active[i] && n - handoff_at[i] <= 1026),
                "lowest free channel chosen");
          if (ch_flag[i]) ev_skip_busy++;
        end
      if (s >= 0) check(((n - SO[s]) % L + L) % L == 0, "hand-off at the epoch boundary");
      ch_sat[handoff_ch]     = s;
      handoff_at[handoff_ch] = n;
    end
    for (int i = 0; i < NCH; i++) begin
      flag_d[i] <= ch_flag[i];
      if (ch_flag[i] && !flag_d[i]) begin
        ev_lock++;
        check(n - handoff_at[i] >= 1023 && n - handoff_at[i] <= 1026,
              $sformatf("channel %0d locks one epoch after hand-off (%0d chips)", i, n - handoff_at[i]));
      end
      if (!ch_flag[i] && flag_d[i]) ev_loss++;
      if (chip_en && ch_slip[i]) ev_slip++;
      if (chip_en && ch_active[i]) begin
        if (chk[i]) begin
          check(ch_data[i] == expb[i], $sformatf("channel %0d data bit", i));
          if (ch_data[i]) ev_data1++; else ev_data0++;
        end
        chk[i] <= 1'b0;
        if (ch_epoch[i] && ch_flag[i] && ch_sat[i] >= 0 && sat_on[ch_sat[i]]) begin
          int s;
          s = ch_sat[i];
          check(((n - SO[s]) % L + L) % L == 0, $sformatf("channel %0d epoch aligned", i));
          chk[i]  <= 1'b1;
          expb[i] <= nav_bit(SP[s], (sat_epoch(n, SO[s]) - 1 + 1000 * EPB) / EPB - 1000);
        end
      end
    end
  end

  task automatic chips(int k);
    repeat (k) begin
      @(posedge clk);
      while (!chip_en) @(posedge clk);
    end
  endtask

  initial begin
    init_codes();
    for (int i = 0; i < NCH; i++) begin chk[i] = 0; handoff_at[i] = 0; end
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    while (ev_handoff < 3 && n < 40000) chips(1);
    check(ev_handoff == 3, "three hand-offs");
    for (int i = 0; i < 3; i++) check(ch_prn[i] == prn_t'(SP[i]), $sformatf("channel %0d PRN", i));
    check(!ch_active[3], "fourth channel still idle");
    // track for more than two navigation bits
    chips(45 * L);
    check(ch_flag[2:0] == 3'b111, "three channels locked");
    // PRN 5 disappears
    sat_on[1] = 1'b0;
    chips(3 * L);
    check(!ch_flag[1], "channel 1 lost its satellite");
    check(ch_flag[0] && ch_flag[2], "other channels still locked");
    $display("switches=%0d fills=%0d searches=%0d handoffs=%0d skipped_busy=%0d locks=%0d data0=%0d data1=%0d losses=%0d slips=%0d no_free=%0d scan_words=%0d",
             ev_switch, ev_fill, ev_search, ev_handoff, ev_skip_busy, ev_lock, ev_data0, ev_data1,
             ev_loss, ev_slip, ev_nofree, ev_scan);
    check(ev_switch > 0, "code switch happened");
    check(ev_fill > 0, "sliding (fill) mode entered");
    check(ev_search > 0, "stationary mode entered");
    check(ev_handoff > 0, "hand-off happened");
    check(ev_skip_busy > 0, "busy channel skipped");
    check(ev_lock > 0, "serial lock happened");
    check(ev_data0 > 0 && ev_data1 > 0, "both data values extracted");
    check(ev_loss > 0, "loss of lock happened");
    check(ev_slip > 0, "serial slip happened");
    check(ev_scan > 0 && ev_scan_zero > 0, "margin scan reached the aligned phase");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
