// serial_correlator -- sliding (serial) correlator for one C/A code.
//
// The received chip stream is XORed with the locally generated code of the
// selected PRN and the mismatches are counted over one epoch of the local
// generator (1023 chips, 1024 when a chip is slipped). At each epoch mark
// the count is latched and the counter restarts; the threshold circuit turns
// the latched count into flag (locked) and data (the navigation bit carried
// by that epoch). While not locked the clock control holds the generator for
// one chip per epoch, so every epoch tries the next code phase; after 1023
// slips without a lock the correlator moves on to the next PRN
// (SEARCH_ALL_PRN=1, the stand-alone serial correlator). As a channel of the
// hybrid correlator (SEARCH_ALL_PRN=0) it keeps its PRN and only slips.
// All of this follows the serial correlator of the design; the counter
// width and the slip position are this design's choices.
//
// Interface and timing: all state advances on clk edges where chip_en=1
// (one chip). The correlator is idle (flag=0) until start, which loads
// start_prn, restarts the generator at chip 0 and clears the counters, so
// the chip sampled at the next chip_en is XORed with chip 0 of the code.
// The first latched result, and so the first flag, comes one epoch (1023
// chips) after start; settling is high during that first epoch. count is
// the latched mismatch count of the last complete epoch.
module serial_correlator
  import gps_corr_pkg::*;
#(
  parameter int unsigned CNT_W          = 11,
  parameter int unsigned LOW            = TH_LOW,
  parameter int unsigned HIGH           = TH_HIGH,
  parameter bit          SEARCH_ALL_PRN = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             chip_en,
  input  logic             start,
  input  prn_t             start_prn,
  input  logic             rx,
  output logic             active,
  output logic             flag,
  output logic             data,
  output logic             settling,
  output prn_t             prn,
  output logic [CNT_W-1:0] count,
  output logic             epoch,
  output logic             slip
);

  logic [NUM_PRN-1:0] codes;
  logic               code, mism;
  logic               run, gen_en;
  logic [CNT_W-1:0]   cnt;
  logic               valid, first;
  logic [9:0]         slips;

  assign run  = chip_en & active;
  assign code = codes[prn];
  assign mism = rx ^ code;

  ca_code_gen u_gen (
    .clk     (clk),
    .rst_n   (rst_n),
    .restart (start),
    .advance (gen_en),
    .codes   (codes),
    .epoch   (epoch)
  );

  serial_clock_control u_clkctl (
    .clk          (clk),
    .rst_n        (rst_n),
    .restart      (start),
    .chip_en      (run),
    .epoch        (epoch),
    .locked       (flag),
    .result_valid (valid),
    .gen_en       (gen_en),
    .slip         (slip)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      prn    <= '0;
      cnt    <= '0;
      count  <= '0;
      valid  <= 1'b0;
      first  <= 1'b1;
      slips  <= '0;
    end else if (start) begin
      active <= 1'b1;
      prn    <= start_prn;
      cnt    <= '0;
      valid  <= 1'b0;
      first  <= 1'b1;
      slips  <= '0;
    end else if (run) begin
      // Counter and latch: the window runs from one epoch chip to the next.
      if (epoch) begin
        if (!first) begin
          count <= cnt;
          valid <= 1'b1;
        end
        first <= 1'b0;
        cnt   <= CNT_W'(mism);
      end else begin
        cnt <= cnt + CNT_W'(mism);
      end
      // Code search: count slips, switch code after a full epoch of them.
      if (flag) begin
        slips <= '0;
      end else if (slip) begin
        if (slips == 10'(CODE_LEN - 1)) begin
          slips <= '0;
          if (SEARCH_ALL_PRN) prn <= prn + 1'b1;
        end else begin
          slips <= slips + 1'b1;
        end
      end
    end
  end

  corr_threshold #(.W(CNT_W), .LOW(LOW), .HIGH(HIGH)) u_thr (
    .count (count),
    .valid (valid),
    .flag  (flag),
    .data  (data)
  );

  assign settling = active & ~valid;

endmodule
