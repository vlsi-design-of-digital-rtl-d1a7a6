// margin_scan -- correlation scanner used to measure the threshold margins.
//
// Correlates the received chip stream with one C/A code at every code phase
// in turn and outputs each result as a 10-bit word, for a DAC and an
// oscilloscope. It is a serial correlator that never locks: one epoch per
// code phase, and after each epoch the local code is held for one chip so
// that the next epoch tests the next phase. The chip whose code step is
// masked is not counted: a window runs from code chip 1 after one slip to
// code chip 0 of the next epoch, so each result compares 1023 received chips
// with the 1023 code chips at one fixed phase and fits 10 bits (0..1023). The
// pattern of results repeats every 1023 words. Correlating at every shift
// and the 10-bit output follow the design; the scanning schedule and
// skipping the held chip are this design's choices.
//
// Interface and timing: chip_en strobes one chip (tie it high to scan at
// the clock rate). The PRN is taken from prn on the held chip that starts each window.
// word/shift are updated, and valid pulses, the clock after each epoch chip.
// shift is the code phase of word: how many chips (modulo 1023) the local
// code lags behind a code started at reset, 1 for the first word.
module margin_scan
  import gps_corr_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       chip_en,
  input  prn_t       prn,
  input  logic       rx,
  output logic [9:0] word,
  output logic [9:0] shift,
  output logic       valid
);

  logic [NUM_PRN-1:0] codes;
  logic               epoch, gen_en, slip, first, mism;
  logic [9:0]         cnt, phase;
  prn_t               prn_q;

  ca_code_gen u_gen (
    .clk     (clk),
    .rst_n   (rst_n),
    .restart (1'b0),
    .advance (gen_en),
    .codes   (codes),
    .epoch   (epoch)
  );

  // Never locked: a chip is held after every epoch once scanning has begun.
  serial_clock_control u_clkctl (
    .clk          (clk),
    .rst_n        (rst_n),
    .restart      (1'b0),
    .chip_en      (chip_en),
    .epoch        (epoch),
    .locked       (1'b0),
    .result_valid (~first),
    .gen_en       (gen_en),
    .slip         (slip)
  );

  assign mism = rx ^ codes[prn_q];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      word  <= '0;
      shift <= '0;
      phase <= 10'd1;
      valid <= 1'b0;
      first <= 1'b1;
      prn_q <= '0;
    end else begin
      valid <= 1'b0;
      if (chip_en) begin
        if (epoch) begin
          // The epoch chip closes the window that began after the last slip.
          if (!first) begin
            word  <= cnt + 10'(mism);
            valid <= 1'b1;
            shift <= phase;
            phase <= (phase == 10'(CODE_LEN - 1)) ? '0 : phase + 1'b1;
          end
          first <= 1'b0;
          cnt   <= '0;
        end else if (slip) begin
          prn_q <= prn;
        end else begin
          cnt <= cnt + 10'(mism);
        end
      end
    end
  end

endmodule
