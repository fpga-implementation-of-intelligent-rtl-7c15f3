// Transmitter modem: command word in, OQPSK carrier samples out.
//
// Once per frame of MSG_W bit periods the word on msgin is loaded into a
// parallel-to-serial register and sent MSB first (msgout). Each bit is xored
// with one chip of a PN sequence (pnout) to give the scrambled bit scr, which
// the OQPSK modulator puts on alternate I/Q rails of the carrier (txout).
// Frames repeat back to back for as long as the design runs, each carrying
// whatever msgin holds at its start. Timing: after reset the first cycle
// loads msgin, the first bit period starts in the next cycle, and every bit
// lasts SPB clock cycles; txout trails the bit timing by one register.
// The chain P2S -> PN xor -> OQPSK follows the published design; the framing,
// bit rate and reload policy are this implementation's.
module modem_tx
  import iesda_pkg::*;
#(
  parameter int SPB = 64
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [MSG_W-1:0]    msgin,
  output logic [SAMPLE_W-1:0] txout,
  output logic                msgout,
  output logic                pnout,
  output logic                scr,
  output logic                frame_start
);

  localparam int BW = $clog2(MSG_W);

  logic [$clog2(SPB)-1:0] sample;
  logic                   tick, last, chan;
  logic [BW-1:0]          bit_idx;   // index within the frame of the bit in msgout
  logic                   load, shift;

  // Start one cycle before a bit boundary so the first word is loaded in time.
  bit_timer #(.SPB(SPB), .START(SPB - 1)) u_timer (
    .clk, .rst, .sample, .tick, .last, .chan
  );

  assign load  = last && (bit_idx == BW'(MSG_W - 1));
  assign shift = last && !load;

  always_ff @(posedge clk) begin
    if (rst)        bit_idx <= BW'(MSG_W - 1);
    else if (load)  bit_idx <= '0;
    else if (shift) bit_idx <= bit_idx + 1'b1;
  end

  assign frame_start = tick && (bit_idx == '0);

  p2s #(.W(MSG_W)) u_p2s (
    .clk, .rst, .load, .shift, .din(msgin), .dout(msgout)
  );

  pn_lfsr #(.W(LFSR_W), .TAP_A(7), .TAP_B(6), .SEED(LFSR_SEED)) u_pn (
    .clk, .rst, .en(tick), .pn(pnout)
  );

  assign scr = msgout ^ pnout;

  oqpsk_mod u_mod (
    .clk, .rst, .tick, .chan, .bit_in(scr), .phase(sample[PHASE_W-1:0]),
    .txout, .iq_cur()
  );

endmodule
