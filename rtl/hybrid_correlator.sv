// hybrid_correlator -- multi-channel hybrid parallel/serial GPS correlator.
//
// One parallel correlator searches the 32 C/A codes, about 2 ms per code.
// When it locks to a code it hands the satellite over: it scans the
// channels' flags, picks a channel whose flag is low (the lowest-numbered
// one here), maps its own 5-bit PRN index to that channel's code mux and
// starts the channel's generator at chip 0 of the epoch, and goes on to the
// next code. From then on the serial correlator of that channel tracks the
// satellite on its own: flag stays high while it is locked and data gives
// the navigation bit of each epoch. A channel whose satellite disappears
// drops its flag, slides its code one chip per epoch, and becomes free for a
// new hand-off. The channel arrangement, the flag scan and the PRN mapping
// follow the design (the laid-out version has 4 channels, the default
// here). A channel that has just been started is not free even though its
// flag is still low during its first epoch, and a lock found while no
// channel is free is dropped (no_free): both are this design's choices.
//
// Beside the correlator sits the margin scanner, the circuit used to
// measure the threshold margins, with its own inputs and outputs.
//
// Clocking: clk is the 10x clock (10.23 MHz); a divider makes the 1.023 MHz
// chip strobe chip_en every CK2_PER_CHIP clocks, on which rx (one chip from
// the A/D converter, assumed chip-synchronous) is sampled. All outputs are
// synchronous to clk. rst_n is an asynchronous active-low reset; after it
// every channel is idle.
module hybrid_correlator
  import gps_corr_pkg::*;
#(
  parameter int unsigned N_CH         = 4,
  parameter int unsigned CK2_PER_CHIP = 10,
  parameter int unsigned LOW          = TH_LOW,
  parameter int unsigned HIGH         = TH_HIGH
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            rx,
  output logic            chip_en,
  // parallel correlator
  output pc_mode_e        par_mode,
  output prn_t            par_prn,
  output logic            par_comp,
  output logic            par_next_code,
  output logic [9:0]      par_count,
  output logic            par_count_done,
  output logic            par_comp_data,
  output logic            par_epoch,
  output logic [9:0]      par_shift,
  // hand-off
  output logic            handoff,
  output logic [7:0]      handoff_ch,
  output logic            no_free,
  // tracking channels
  output logic [N_CH-1:0] ch_active,
  output logic [N_CH-1:0] ch_flag,
  output logic [N_CH-1:0] ch_data,
  output logic [N_CH-1:0] ch_epoch,
  output logic [N_CH-1:0] ch_slip,
  output prn_t            ch_prn [N_CH],
  output logic [10:0]     ch_count [N_CH],
  // threshold-margin scanner (separate measurement circuit)
  input  logic            scan_chip_en,
  input  prn_t            scan_prn,
  input  logic            scan_rx,
  output logic [9:0]      scan_word,
  output logic [9:0]      scan_shift,
  output logic            scan_valid
);

  localparam int unsigned DIV_W = $clog2(CK2_PER_CHIP);

  // Chip strobe.
  logic [DIV_W-1:0] div;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                div <= '0;
    else if (div == DIV_W'(CK2_PER_CHIP - 1)) div <= '0;
    else                                       div <= div + 1'b1;
  end
  assign chip_en = (div == '0);

  // Parallel (search) correlator.
  logic par_found;

  parallel_correlator #(.HYBRID(1'b1), .LOW(LOW), .HIGH(HIGH)) u_par (
    .clk        (clk),
    .rst_n      (rst_n),
    .chip_en    (chip_en),
    .rx         (rx),
    .mode       (par_mode),
    .prn        (par_prn),
    .count      (par_count),
    .count_done (par_count_done),
    .comp       (par_comp),
    .comp_data  (par_comp_data),
    .found      (par_found),
    .next_code  (par_next_code),
    .epoch      (par_epoch),
    .shift      (par_shift)
  );

  // Flag scan: lowest-numbered channel that is neither locked nor settling.
  logic [N_CH-1:0] ch_settling, free, start;
  logic            any_free;
  logic [7:0]      free_idx;

  always_comb begin
    free     = ~ch_flag & ~ch_settling;
    any_free = |free;
    free_idx = '0;
    for (int i = N_CH - 1; i >= 0; i--) if (free[i]) free_idx = 8'(i);
  end

  assign handoff    = par_found & any_free;
  assign handoff_ch = free_idx;
  assign no_free    = par_found & ~any_free;

  for (genvar i = 0; i < N_CH; i++) begin : g_ch
    assign start[i] = handoff & (free_idx == 8'(i));
    serial_correlator #(.LOW(LOW), .HIGH(HIGH), .SEARCH_ALL_PRN(1'b0)) u_ser (
      .clk       (clk),
      .rst_n     (rst_n),
      .chip_en   (chip_en),
      .start     (start[i]),
      .start_prn (par_prn),
      .rx        (rx),
      .active    (ch_active[i]),
      .flag      (ch_flag[i]),
      .data      (ch_data[i]),
      .settling  (ch_settling[i]),
      .prn       (ch_prn[i]),
      .count     (ch_count[i]),
      .epoch     (ch_epoch[i]),
      .slip      (ch_slip[i])
    );
  end

  // Measurement circuit for the threshold margins; it shares only the clock
  // and reset with the correlator.
  margin_scan u_scan (
    .clk     (clk),
    .rst_n   (rst_n),
    .chip_en (scan_chip_en),
    .prn     (scan_prn),
    .rx      (scan_rx),
    .word    (scan_word),
    .shift   (scan_shift),
    .valid   (scan_valid)
  );

  a_one_start: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(start));

endmodule
