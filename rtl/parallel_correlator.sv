// parallel_correlator -- parallel code-search correlator.
//
// Two 1023-bit shift registers hold one epoch of the received chips (upper,
// clocked every chip) and one epoch of the locally generated code (lower).
// A net of 1023 XOR gates compares them bit by bit and the 1023-bit adder
// counts the mismatches within one chip; the threshold circuit turns the
// count into comp. The PRN index held by a 5-bit counter selects one of the
// generator's 32 codes through a 32-to-1 mux. Per code the correlator runs
//   sliding mode    : 1023 chips with the lower register and the generator
//                     clocked, which fills it with one whole epoch; then
//   stationary mode : lower register and generator held, the received code
//                     slides past it; each chip one alignment is tested,
//                     1023 alignments in all.
// When comp rises in stationary mode the received code is exactly at an
// epoch boundary. With HYBRID=1 the correlator reports it (found) and goes
// on with the next PRN; with HYBRID=0 it tracks: both registers are clocked
// in step from then on and the correlator stays there. After 1023 tested
// alignments without comp it moves to the next PRN. The sliding/stationary
// modes, the XOR net, the 1023-bit adder and the comp decision follow the
// design; the alignment counter, the PRN advance after an unsuccessful
// search and the wrap from PRN index 31 to 0 are this design's choices.
//
// Interface and timing: clk is the 10x clock (10.23 MHz); chip_en is high
// for one clock per chip and needs at least 10 clocks between pulses. rx is
// sampled on chip_en. The count of the alignment set up by a chip_en is
// ready 9 clocks later (count_done); found is then high for one clock, with
// prn still naming the code found and shift giving the number of chips
// the received code slid before it matched (0..1022). The next chip sampled after that
// (at the following chip_en) is chip 0 of the found code's epoch. epoch is
// the generator's chip-0 mark.
module parallel_correlator
  import gps_corr_pkg::*;
#(
  parameter int unsigned N      = CODE_LEN,
  parameter bit          HYBRID = 1'b1,
  parameter int unsigned LOW    = TH_LOW,
  parameter int unsigned HIGH   = TH_HIGH
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       chip_en,
  input  logic       rx,
  output pc_mode_e   mode,
  output prn_t       prn,
  output logic [9:0] count,
  output logic       count_done,
  output logic       comp,
  output logic       comp_data,
  output logic       found,
  output logic       next_code,
  output logic       epoch,
  output logic [9:0] shift
);

  logic [N-1:0]       upper, lower;
  logic [NUM_PRN-1:0] codes;
  logic               code, gen_restart, gen_adv, adder_busy;
  logic               chip_en_d, count_valid;
  logic [9:0]         pos;

  // Code generator: clocked while the lower register is clocked.
  assign gen_adv = chip_en & (mode != PC_STATIONARY);

  ca_code_gen u_gen (
    .clk     (clk),
    .rst_n   (rst_n),
    .restart (gen_restart),
    .advance (gen_adv),
    .codes   (codes),
    .epoch   (epoch)
  );

  assign code = codes[prn];  // 32-to-1 mux

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      upper <= '0;
      lower <= '0;
    end else if (chip_en) begin
      upper <= {upper[N-2:0], rx};
      if (mode != PC_STATIONARY) lower <= {lower[N-2:0], code};
    end
  end

  // 1023-bit adder over the XOR net, started the clock after the shift.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chip_en_d <= 1'b0;
    else        chip_en_d <= chip_en;
  end

  bit_adder_1023 #(.N_BITS(N)) u_adder (
    .clk   (clk),
    .rst_n (rst_n),
    .start (chip_en_d),
    .bits  (upper ^ lower),
    .sum   (count),
    .done  (count_done),
    .busy  (adder_busy)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          count_valid <= 1'b0;
    else if (count_done) count_valid <= 1'b1;
  end

  corr_threshold #(.W(10), .LOW(LOW), .HIGH(HIGH)) u_thr (
    .count (count),
    .valid (count_valid),
    .flag  (comp),
    .data  (comp_data)
  );

  // The alignment counter doubles as the shift detector: in stationary mode
  // it is the number of chips the received code has slid past the stored
  // epoch, so at found it is the measured shift between the two epochs.
  assign shift = pos;

  // Mode control.
  assign found       = count_done & comp & (mode == PC_STATIONARY);
  assign next_code   = count_done & (mode == PC_STATIONARY) &
                       ((comp & HYBRID) | (~comp & (pos == 10'(N - 1))));
  assign gen_restart = next_code;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode <= PC_SLIDING;
      prn  <= '0;
      pos  <= '0;
    end else begin
      unique case (mode)
        PC_SLIDING: if (chip_en) begin
          if (pos == 10'(N - 1)) begin
            mode <= PC_STATIONARY;
            pos  <= '0;
          end else begin
            pos <= pos + 1'b1;
          end
        end
        PC_STATIONARY: begin
          if (next_code) begin
            mode <= PC_SLIDING;
            prn  <= prn + 1'b1;
            pos  <= '0;
          end else if (found) begin
            mode <= PC_TRACKING;
          end else if (chip_en) begin
            pos <= pos + 1'b1;
          end
        end
        default: ;  // PC_TRACKING: both registers slide in step
      endcase
    end
  end

  // A chip may only start while the previous count is finished.
  a_chip_spacing: assert property (@(posedge clk) disable iff (!rst_n)
                                   chip_en |-> !adder_busy);

endmodule
