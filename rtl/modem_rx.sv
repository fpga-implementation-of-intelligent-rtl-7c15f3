// Receiver modem: OQPSK carrier samples in, 32-bit command word out.
//
// The OQPSK demodulator turns rxin back into the scrambled bit stream
// (dmodout). Each bit is xored with the same PN sequence the transmitter
// used, from an identical generator reset with it and stepped once per
// decided bit, giving the original message bit (mout). A serial-to-parallel
// register collects MSG_W bits, MSB first, and presents the word on rxout
// with a one-cycle rx_valid strobe. Timing: LINK_LATENCY is the number of
// clock cycles between the transmitter's bit tick and the arrival of that
// bit's first sample on rxin (1 for a direct connection to the transmitter's
// output register). A word is complete 2 bit periods + 2 cycles after its last
// bit started on the line. The demodulate -> PN xor -> parallel chain is the
// published design's; the shared-reset synchronisation is this
// implementation's.
module modem_rx
  import iesda_pkg::*;
#(
  parameter int SPB          = 64,
  parameter int LINK_LATENCY = 1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [SAMPLE_W-1:0] rxin,
  output logic [MSG_W-1:0]    rxout,
  output logic                rx_valid,
  output logic                dmodout,
  output logic                mout
);

  // The transmitter's timer starts at SPB-1; this one starts LINK_LATENCY later.
  localparam int START = (((SPB - 1 - LINK_LATENCY) % SPB) + SPB) % SPB;

  logic [$clog2(SPB)-1:0] sample;
  logic                   tick, chan;
  logic                   bit_valid;
  logic                   pn;

  bit_timer #(.SPB(SPB), .START(START)) u_timer (
    .clk, .rst, .sample, .tick, .last(), .chan
  );

  oqpsk_demod #(.SPB(SPB)) u_demod (
    .clk, .rst, .tick, .chan, .phase(sample[PHASE_W-1:0]), .rxin,
    .bit_valid, .bit_out(dmodout)
  );

  pn_lfsr #(.W(LFSR_W), .TAP_A(7), .TAP_B(6), .SEED(LFSR_SEED)) u_pn (
    .clk, .rst, .en(bit_valid), .pn
  );

  assign mout = dmodout ^ pn;

  s2p #(.W(MSG_W)) u_s2p (
    .clk, .rst, .shift(bit_valid), .din(mout), .dout(rxout), .valid(rx_valid)
  );

endmodule
