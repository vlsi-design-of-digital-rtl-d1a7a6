// ca_code_gen -- GPS C/A code generator producing all 32 Gold codes at once.
//
// Two 10-stage linear feedback shift registers, G1 = 1 + x^3 + x^10 and
// G2 = 1 + x^2 + x^3 + x^6 + x^8 + x^9 + x^10, both start in the all-ones
// state. Code i is G1 stage 10 XORed with the two G2 phase-selector stages
// of PRN i+1, which gives every satellite's code as a delayed copy of G2
// without a second register set. This structure follows the C/A generator
// the design is built on; presenting all 32 codes on one bus, for a 32-to-1
// mux to pick from, follows the correlator block diagrams.
//
// Interface and timing: the registers step on a clock edge with advance=1
// (one chip). restart reloads the all-ones state and wins over advance.
// codes/epoch are combinational from the current state: epoch is high while
// the generator presents chip 0 of the epoch (G1 all ones), once every 1023
// chips. Reset (rst_n low, asynchronous) also loads the all-ones state.
module ca_code_gen
  import gps_corr_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               restart,
  input  logic               advance,
  output logic [NUM_PRN-1:0] codes,
  output logic               epoch
);

  logic [10:1] g1, g2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g1 <= '1;
      g2 <= '1;
    end else if (restart) begin
      g1 <= '1;
      g2 <= '1;
    end else if (advance) begin
      g1 <= {g1[9:1], g1[3] ^ g1[10]};
      g2 <= {g2[9:1], g2[2] ^ g2[3] ^ g2[6] ^ g2[8] ^ g2[9] ^ g2[10]};
    end
  end

  always_comb begin
    for (int i = 0; i < NUM_PRN; i++) begin
      logic [7:0] t;
      t = g2_taps(prn_t'(i));
      codes[i] = g1[10] ^ g2[t[7:4]] ^ g2[t[3:0]];
    end
  end

  assign epoch = &g1;

endmodule
