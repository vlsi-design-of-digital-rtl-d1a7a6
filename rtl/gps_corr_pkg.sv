// gps_corr_pkg -- constants, types and the C/A code tap table shared by the
// GPS correlator modules.
//
// The C/A code is a 1023-chip Gold code clocked at 1.023 MHz; 32 codes are
// selected by a 5-bit PRN index (index 0 = PRN 1). The G2 phase-selector taps
// are the standard GPS ones (e.g. stages 3 and 8 for PRN 31, as in the
// generator this design follows). The threshold margins are this design's own choice:
// the correlators count chip MISMATCHES, so a count near 0 means "aligned,
// data bit 0", a count near 1023 means "aligned, data bit 1" and an
// unaligned code gives about 512.
package gps_corr_pkg;

  localparam int unsigned CODE_LEN = 1023;  // chips per epoch (1 ms)
  localparam int unsigned NUM_PRN  = 32;    // codes searched
  localparam int unsigned PRN_W    = 5;     // width of a PRN index

  // Correlation margins on a mismatch count over one epoch.
  localparam int unsigned TH_LOW  = 384;    // count <= TH_LOW  : lock, data 0
  localparam int unsigned TH_HIGH = 639;    // count >= TH_HIGH : lock, data 1

  typedef logic [PRN_W-1:0] prn_t;

  // Modes of the parallel correlator's generated-code shift register.
  typedef enum logic [1:0] {
    PC_SLIDING    = 2'd0,  // register clocked: filled with one epoch of code
    PC_STATIONARY = 2'd1,  // register held; received code slides past it
    PC_TRACKING   = 2'd2   // both registers clocked in step (no hand-off)
  } pc_mode_e;

  // G2 phase-selector tap pair (stage numbers 1..10) of PRN index idx,
  // returned as {first tap, second tap}.
  function automatic logic [7:0] g2_taps(input prn_t idx);
    unique case (idx)
      5'd0:  return {4'd2, 4'd6};
      5'd1:  return {4'd3, 4'd7};
      5'd2:  return {4'd4, 4'd8};
      5'd3:  return {4'd5, 4'd9};
      5'd4:  return {4'd1, 4'd9};
      5'd5:  return {4'd2, 4'd10};
      5'd6:  return {4'd1, 4'd8};
      5'd7:  return {4'd2, 4'd9};
      5'd8:  return {4'd3, 4'd10};
      5'd9:  return {4'd2, 4'd3};
      5'd10: return {4'd3, 4'd4};
      5'd11: return {4'd5, 4'd6};
      5'd12: return {4'd6, 4'd7};
      5'd13: return {4'd7, 4'd8};
      5'd14: return {4'd8, 4'd9};
      5'd15: return {4'd9, 4'd10};
      5'd16: return {4'd1, 4'd4};
      5'd17: return {4'd2, 4'd5};
      5'd18: return {4'd3, 4'd6};
      5'd19: return {4'd4, 4'd7};
      5'd20: return {4'd5, 4'd8};
      5'd21: return {4'd6, 4'd9};
      5'd22: return {4'd1, 4'd3};
      5'd23: return {4'd4, 4'd6};
      5'd24: return {4'd5, 4'd7};
      5'd25: return {4'd6, 4'd8};
      5'd26: return {4'd7, 4'd9};
      5'd27: return {4'd8, 4'd10};
      5'd28: return {4'd1, 4'd6};
      5'd29: return {4'd2, 4'd7};
      5'd30: return {4'd3, 4'd8};
      default: return {4'd4, 4'd9};
    endcase
  endfunction

endpackage
