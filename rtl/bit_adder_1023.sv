// bit_adder_1023 -- the "1023 bit adder": counts the ones of a 1023-bit vector
// in eight steps of the fast clock.
//
// The vector (padded with one zero to 1024 bits) feeds 128 8-to-1
// multiplexers; mux j sees bits 8j..8j+7 and all of them are switched
// together by a 3-bit step counter. Each step the 128 mux outputs are
// counted: 127 of them by the multi-level parallel adder, the last one on the
// carry-in of the 10-bit accumulator adder. The accumulator starts from zero,
// adds eight partial sums and the final adder output is written to the
// synchronous output buffer. The mux/multi-level adder/10-bit accumulator/
// buffer structure follows the design; where the 128th mux output enters
// (the accumulator carry-in, because the multi-level adder takes 127 bits)
// is this design's choice.
//
// Interface and timing (clk is the 10x clock, 10.23 MHz): pulse start for
// one clock while idle, with bits held stable for the next eight clocks
// (the start clock and seven more). sum is updated and done pulses high
// eight clocks after start, i.e. the result is read 8 clocks after start,
// inside the ten fast clocks of one chip.
module bit_adder_1023 #(
  parameter int unsigned N_BITS = 1023,
  parameter int unsigned LEVELS = 6,
  parameter int unsigned STEPS  = 8,
  parameter int unsigned ACC_W  = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [N_BITS-1:0] bits,
  output logic [ACC_W-1:0]  sum,
  output logic              done,
  output logic              busy
);

  localparam int unsigned N_MUX = 2 ** (LEVELS + 1);
  localparam int unsigned SEL_W = $clog2(STEPS);

  logic [N_MUX*STEPS-1:0] padded;
  logic [SEL_W-1:0]       sel;
  logic [N_MUX-1:0]       mux_out;
  logic [LEVELS:0]        tree_sum;
  logic [ACC_W-1:0]       acc, adder_out;

  assign padded = (N_MUX * STEPS)'(bits);

  always_comb begin
    for (int j = 0; j < N_MUX; j++) mux_out[j] = padded[j*STEPS + int'(sel)];
  end

  ml_parallel_adder #(.LEVELS(LEVELS)) u_tree (
    .bits (mux_out[N_MUX-2:0]),
    .sum  (tree_sum)
  );

  // 10-bit adder of the accumulator; the zero vector replaces acc at start.
  assign adder_out = (busy ? acc : '0) + ACC_W'(tree_sum) + ACC_W'(mux_out[N_MUX-1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel  <= '0;
      busy <= 1'b0;
      acc  <= '0;
      sum  <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start || busy) begin
        acc <= adder_out;
        if (sel == SEL_W'(STEPS - 1)) begin
          sum  <= adder_out;
          done <= 1'b1;
          busy <= 1'b0;
          sel  <= '0;
        end else begin
          sel  <= sel + 1'b1;
          busy <= 1'b1;
        end
      end
    end
  end

  initial begin
    assert (N_MUX * STEPS >= N_BITS)
      else $error("bit_adder_1023: %0d muxes x %0d steps cannot cover %0d bits",
                  N_MUX, STEPS, N_BITS);
    assert (2 ** ACC_W > N_BITS)
      else $error("bit_adder_1023: accumulator too narrow");
  end

  // A new count may only start once the previous one has finished.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

endmodule
