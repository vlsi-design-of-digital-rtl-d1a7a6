// serial_clock_control -- code-generator clock control of the serial correlator.
//
// While the correlator is not locked, one clock event of its C/A generator is
// masked once per epoch so that the local code falls one chip behind the
// received code each epoch; once locked the generator free-runs. The design
// does this with a T flip-flop, an AND with the epoch mark and two clock
// multiplexers; here the same job is done synchronously as a clock enable:
// the flip-flop epoch_d remembers that the epoch chip has just been clocked,
// and on the chip that follows it the enable is dropped for one chip.
//
// Masking the chip right after the epoch chip, rather than the epoch chip
// itself, is this design's choice: the lock decision for the epoch that just
// ended is then already latched, so the slip always uses the fresh result.
//
// Interface: chip_en is the 1.023 MHz chip strobe, epoch the generator's
// chip-0 mark, locked/result_valid come from the threshold circuit, restart
// clears the flip-flop. gen_en is the generator's step enable; slip is high
// on the chip whose generator step is masked.
module serial_clock_control (
  input  logic clk,
  input  logic rst_n,
  input  logic restart,
  input  logic chip_en,
  input  logic epoch,
  input  logic locked,
  input  logic result_valid,
  output logic gen_en,
  output logic slip
);

  logic epoch_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       epoch_d <= 1'b0;
    else if (restart) epoch_d <= 1'b0;
    else if (chip_en) epoch_d <= epoch;
  end

  assign slip   = chip_en & epoch_d & result_valid & ~locked;
  assign gen_en = chip_en & ~slip;

endmodule
