// Coherent Offset-QPSK demodulator.
//
// The receiver runs from the transmitter's clock and reset, so it knows the
// carrier phase and the bit boundaries without recovering them: the phase,
// tick and chan inputs come from a local bit timer started LINK_LATENCY cycles
// behind the transmitter's. Each received sample, taken about its zero level
// 32, is multiplied by the local cosine (I reference) and sine (Q reference)
// read from two copies of the carrier table, and the products are summed in
// one accumulator per rail. A rail's bit lasts two bit periods, so at every
// tick the accumulator of the rail whose two-period window has just closed is
// sliced by sign (>= 0 -> 1) and restarted; the other keeps summing. The
// first two ticks after reset close no full window and give no bit.
// Output: bit_out with a one-cycle bit_valid strobe, two bit periods after the
// tick at which that bit started on the line. Demodulation as such is the
// published design's; the correlator structure is this implementation's.
module oqpsk_demod
  import iesda_pkg::*;
#(
  parameter int SPB = 64
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                tick,
  input  logic                chan,
  input  logic [PHASE_W-1:0]  phase,
  input  logic [SAMPLE_W-1:0] rxin,
  output logic                bit_valid,
  output logic                bit_out
);

  // |sample| <= 31, |reference| <= 31, 2*SPB products per window.
  localparam int ACC_W = $clog2(2 * SPB * 32 * 32) + 2;

  logic [SAMPLE_W-1:0]        cos_raw, sin_raw;
  logic signed [SAMPLE_W:0]   rx_c, cos_c, sin_c;
  logic signed [ACC_W-1:0]    prod_i, prod_q;
  logic signed [ACC_W-1:0]    acc_i, acc_q;
  logic [1:0]                 nticks;

  sine_rom u_cos (.addr(phase),                   .data(cos_raw));
  sine_rom u_sin (.addr(phase + PHASE_W'(48)),    .data(sin_raw));

  assign rx_c   = $signed({1'b0, rxin})    - $signed({1'b0, MID});
  assign cos_c  = $signed({1'b0, cos_raw}) - $signed({1'b0, MID});
  assign sin_c  = $signed({1'b0, sin_raw}) - $signed({1'b0, MID});
  assign prod_i = ACC_W'(rx_c * cos_c);
  assign prod_q = ACC_W'(rx_c * sin_c);

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_i     <= '0;
      acc_q     <= '0;
      nticks    <= '0;
      bit_valid <= 1'b0;
      bit_out   <= 1'b0;
    end else begin
      bit_valid <= 1'b0;
      acc_i     <= acc_i + prod_i;
      acc_q     <= acc_q + prod_q;
      if (tick) begin
        if (nticks != 2'd2) nticks <= nticks + 1'b1;
        if (chan) begin
          acc_q   <= prod_q;
          bit_out <= (acc_q >= 0);
        end else begin
          acc_i   <= prod_i;
          bit_out <= (acc_i >= 0);
        end
        bit_valid <= (nticks == 2'd2);
      end
    end
  end

  // A decision is only ever made at a bit boundary.
  a_valid_at_tick: assert property (@(posedge clk) disable iff (rst) bit_valid |-> $past(tick));

endmodule
