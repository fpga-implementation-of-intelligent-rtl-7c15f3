// Offset-QPSK modulator with a table-driven carrier.
//
// Scrambled bits arrive one per bit period (tick). A bit at a tick with
// chan = 0 goes onto the I rail, with chan = 1 onto the Q rail, and each rail
// then holds for two bit periods; so I and Q change half a symbol apart,
// which is the offset of OQPSK. The sample sent in each cycle is
//   txout = 32 + 31*(I*cos(wt) + Q*sin(wt))/sqrt2,  bit 1 -> +1, bit 0 -> -1
// produced as one read of the 64 x 6 cosine table at carrier phase plus a
// +-45/+-135 degree offset picked by the (I,Q) pair: one table and one 6-bit
// adder. The carrier phase input advances one step per clock, so a carrier
// period is 64 clocks. txout is registered (one cycle after the phase it
// belongs to) and sits at the zero level 32 until the first bit. OQPSK and the
// 6-bit txout are the published design's; the phase mapping is this
// implementation's.
module oqpsk_mod
  import iesda_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                tick,
  input  logic                chan,
  input  logic                bit_in,
  input  logic [PHASE_W-1:0]  phase,
  output logic [SAMPLE_W-1:0] txout,
  output iq_t                 iq_cur
);

  iq_t                 iq_q;
  logic                active;
  logic [SAMPLE_W-1:0] rom_data;

  // The rail updated at this tick takes effect in this cycle's sample.
  always_comb begin
    iq_cur = iq_q;
    if (tick) begin
      if (chan) iq_cur.q = bit_in;
      else      iq_cur.i = bit_in;
    end
  end

  sine_rom u_rom (
    .addr(phase + iq_phase(iq_cur)),
    .data(rom_data)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      iq_q   <= '0;
      active <= 1'b0;
      txout  <= MID;
    end else begin
      iq_q <= iq_cur;
      if (tick) active <= 1'b1;
      txout <= (active || tick) ? rom_data : MID;
    end
  end

endmodule
