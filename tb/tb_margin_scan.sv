// tb_margin_scan -- scans a single PRN 8 signal (data bit 0) at the clock
// rate over 1023+ phases. Exactly one phase per 1023 must give 0 (the
// aligned phase, at the lag predicted from the satellite's offset), all
// others must stay in the Gold-code cross-correlation band around 512, and
// the shift index must count 1, 2, 3, ... A second pass with the data bit
// at 1 must give 1023 at the aligned phase.
module tb_margin_scan;
  import tb_gps_pkg::*;

  localparam int P = 7;

  logic       clk = 1'b0, rst_n = 1'b0, rx;
  logic [4:0] prn = 5'(P);
  logic [9:0] word, shift;
  logic       valid;
  int         checks = 0, failures = 0;
  longint     n = 0;
  int         offset = 200;
  bit         inv = 1'b0;

  margin_scan dut (.clk, .rst_n, .chip_en(1'b1), .prn, .rx, .word, .shift, .valid);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) n <= n + 1;
  assign rx = ca[P][int'(((n - offset) % L + L) % L)] ^ inv;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k, nzero, zero_at, nfull, lo, hi;
    init_codes();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    k = 0; nzero = 0; zero_at = -1; nfull = 0; lo = 2000; hi = 0;
    while (k < 1100) begin
      @(posedge clk);
      if (valid) begin
        check(int'(shift) == (k + 1) % L, $sformatf("shift index %0d at word %0d", shift, k));
        if (k == 1023) inv = 1'b1;
        if (k < 1023) begin
          if (word == 0) begin nzero++; zero_at = k; end
          else begin
            if (int'(word) < lo) lo = int'(word);
            if (int'(word) > hi) hi = int'(word);
          end
        end
        if (k > 1024 && word == 10'd1023) nfull++;
        k++;
      end
    end
    // The local code of word k lags a code started at reset by k+1 chips;
    // the received code lags one by offset chips, so word offset-1 aligns.
    check(nzero == 1, $sformatf("one aligned phase (%0d)", nzero));
    check(zero_at == offset - 1, $sformatf("aligned at word %0d", zero_at));
    check(lo > 400 && hi < 620, $sformatf("cross band %0d..%0d", lo, hi));
    $display("aligned at %0d, band %0d..%0d", zero_at, lo, hi);
    // second pass (inverted data) reaches the aligned phase again after 1023
    k = 0;
    while (k < 1023 + 10) begin
      @(posedge clk);
      if (valid) begin
        if (word == 10'd1023) nfull++;
        k++;
      end
    end
    check(nfull == 1, $sformatf("inverted data gives 1023 once (%0d)", nfull));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
