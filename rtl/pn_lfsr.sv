// Pseudo-noise generator: Fibonacci linear feedback shift register.
//
// pn is the register's oldest bit. On each cycle with en high the register
// shifts up by one and takes tap A xor tap B as its new bit, so one PN chip is
// produced per enable. The default x^7 + x^6 + 1 is maximal length (period
// 127) and needs a single two-input xor, as the published design's one xor per
// generator suggests; the polynomial and seed themselves are this
// implementation's choice. Reset (synchronous, active high) loads SEED, so a
// transmitter and a receiver reset together produce the same sequence.
module pn_lfsr #(
  parameter int           W     = 7,
  parameter int           TAP_A = 7,
  parameter int           TAP_B = 6,
  parameter logic [W-1:0] SEED  = '1
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  output logic pn
);

  logic [W-1:0] state;

  always_ff @(posedge clk) begin
    if (rst)     state <= SEED;
    else if (en) state <= {state[W-2:0], state[TAP_A-1] ^ state[TAP_B-1]};
  end

  assign pn = state[W-1];

  // An all-zero state would lock the generator.
  if (SEED == '0) begin : g_bad_seed
    $error("pn_lfsr: SEED must be non-zero");
  end

endmodule
