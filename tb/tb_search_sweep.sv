// tb_search_sweep -- full search sweep of the 4-channel hybrid correlator at
// its default parameters, with satellites on the first, a middle and the
// last code (PRN 1, 17, 32).
//  - Every code of the first sweep is tried once, in order; an absent code
//    takes 2045 chips (2 ms) and a present one is found within that time,
//    so the sweep of all 32 codes ends within 32 x 2045 chips (64 ms).
//  - Each present PRN is handed to a channel at its epoch boundary.
//  - In the second sweep PRN 1 is found again and goes to the last free
//    channel; PRN 17 then finds no free channel and is dropped (no_free).
module tb_search_sweep;
  import tb_gps_pkg::*;
  import gps_corr_pkg::*;

  localparam int EPB = 20;
  localparam int NS = 3;
  localparam int SP [NS] = '{0, 16, 31};
  localparam int SO [NS] = '{1000, 3, 512};
  localparam int NCH = 4;

  logic           clk = 1'b0, rst_n = 1'b0, rx, chip_en;
  pc_mode_e       par_mode;
  prn_t           par_prn;
  logic           par_comp, par_next_code, par_count_done, par_comp_data, par_epoch;
  logic [9:0]     par_count, par_shift;
  logic           handoff, no_free;
  logic [7:0]     handoff_ch;
  logic [NCH-1:0] ch_active, ch_flag, ch_data, ch_epoch, ch_slip;
  prn_t           ch_prn [NCH];
  logic [10:0]    ch_count [NCH];
  logic [9:0]     scan_word, scan_shift;
  logic           scan_valid;

  int     checks = 0, failures = 0;
  longint n = 0;

  hybrid_correlator dut (
    .clk, .rst_n, .rx, .chip_en, .par_mode, .par_prn, .par_comp, .par_next_code,
    .par_count, .par_count_done, .par_comp_data, .par_epoch, .par_shift,
    .handoff, .handoff_ch, .no_free,
    .ch_active, .ch_flag, .ch_data, .ch_epoch, .ch_slip, .ch_prn, .ch_count,
    .scan_chip_en(1'b0), .scan_prn('0), .scan_rx(1'b0), .scan_word, .scan_shift, .scan_valid);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (chip %0d)", what, n);
    end
  endtask

  initial begin
    #3000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (chip_en && rst_n) n <= n + 1;

  always_comb begin
    bit c [NS];
    for (int s = 0; s < NS; s++) c[s] = sat_chip(SP[s], SO[s], EPB, n);
    rx = maj3(c[0], c[1], c[2]);
  end

  function automatic int sat_of(int p);
    for (int s = 0; s < NS; s++) if (SP[s] == p) return s;
    return -1;
  endfunction

  longint code_start = 0, sweep_end = 0;
  int     codes_done = 0, n_handoff = 0, n_nofree = 0;
  int     expect_prn = 0;

  always @(posedge clk) if (rst_n) begin
    if (par_next_code) begin
      check(int'(par_prn) == expect_prn, $sformatf("code %0d tried in order", par_prn));
      check(n - code_start <= 2045, $sformatf("code %0d done within 2045 chips (%0d)", par_prn, n - code_start));
      if (!par_comp) check(n - code_start == 2045, "absent code takes 2045 chips");
      expect_prn = (expect_prn + 1) % 32;
      codes_done++;
      if (codes_done == 32) sweep_end = n;
      code_start = n;
    end
    if (par_count_done && par_comp && par_mode == PC_STATIONARY) begin
      int s;
      s = sat_of(int'(par_prn));
      check(s >= 0, "only present PRNs found");
      if (s >= 0) check(((n - SO[s]) % L + L) % L == 0, "found at the epoch boundary");
    end
    if (handoff) begin
      n_handoff++;
      if (n_handoff <= 3) check(int'(handoff_ch) == n_handoff - 1, "channels used in order");
      if (n_handoff == 4) check(handoff_ch == 8'd3 && int'(par_prn) == SP[0], "PRN 1 again to the last channel");
    end
    if (no_free) begin
      n_nofree++;
      check(int'(par_prn) == SP[1], "no free channel for PRN 17");
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
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    while (codes_done < 32 + 17 && n < 120000) chips(1);
    check(sweep_end > 0 && sweep_end <= 32 * 2045, $sformatf("first sweep ends within 64 ms (%0d chips)", sweep_end));
    check(sweep_end >= 29 * 2045 + 3 * 1023, "first sweep length plausible");
    check(n_handoff == 4, $sformatf("four hand-offs (%0d)", n_handoff));
    check(n_nofree == 1, $sformatf("one lock dropped for lack of a channel (%0d)", n_nofree));
    for (int i = 0; i < 3; i++) check(ch_flag[i] && int'(ch_prn[i]) == SP[i], $sformatf("channel %0d tracking", i));
    check(ch_prn[3] == prn_t'(SP[0]), "channel 3 holds PRN 1 as well");
    $display("first sweep: %0d chips = %0.2f ms", sweep_end, real'(sweep_end) / 1023.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
