// corr_threshold -- threshold circuit of the correlators.
//
// Compares a correlation count (number of chip mismatches in one epoch)
// with two margins. At or below LOW the codes are aligned and the received
// data bit is 0; at or above HIGH they are aligned with the code inverted,
// data bit 1; in between there is no correlation. flag reports a lock, data
// the bit. Both are forced low while valid is low (no count yet).
// The two-margin scheme follows the design; the margin values are this
// design's choice (package defaults TH_LOW/TH_HIGH) because the measured
// values are not given. Purely combinational.
module corr_threshold #(
  parameter int unsigned W    = 10,
  parameter int unsigned LOW  = gps_corr_pkg::TH_LOW,
  parameter int unsigned HIGH = gps_corr_pkg::TH_HIGH
) (
  input  logic [W-1:0] count,
  input  logic         valid,
  output logic         flag,
  output logic         data
);

  logic below, above;

  assign below = ({22'd0, count} <= (W + 22)'(LOW));
  assign above = ({22'd0, count} >= (W + 22)'(HIGH));
  assign flag  = valid & (below | above);
  assign data  = valid & above;

endmodule
