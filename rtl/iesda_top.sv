// Intelligent embedded controller for distributed electrical appliances.
//
// A central transmitter modem broadcasts 32-bit command words from the host
// (msgin) as an Offset-QPSK carrier (txout, 6-bit samples). Three floor
// receivers, one per floor, listen to the same carrier; each demodulates and
// descrambles the word (msout1..3) and, when the word's upper 16 bits equal
// its floor ID (16'h1111, 16'h2222, 16'h3333), sets its floor's 16 appliance
// outputs (floor1..3) from the lower 16 bits. All blocks share clk and the
// synchronous active-high rst, which is also what keeps the receivers'
// descramblers and carrier references in step with the transmitter. The
// ports msgin, clk, rst, floor1..3 and msout1..3 are those of the published
// top level; txout and the strobes rx_valid/id_match are added for
// observation.
//
// Timing at the default SPB = 64 cycles per bit: the word on msgin is taken at
// the start of each 32-bit frame (every 2048 cycles, the first one in the
// cycle after reset), and its floor outputs change 2*64 + 4 cycles after the
// frame's last bit period ends.
module iesda_top
  import iesda_pkg::*;
#(
  parameter int SPB = 64
) (
  input  logic                               clk,
  input  logic                               rst,
  input  logic [MSG_W-1:0]                   msgin,
  output logic [SAMPLE_W-1:0]                txout,
  output logic [APPL_W-1:0]                  floor1,
  output logic [APPL_W-1:0]                  floor2,
  output logic [APPL_W-1:0]                  floor3,
  output logic [MSG_W-1:0]                   msout1,
  output logic [MSG_W-1:0]                   msout2,
  output logic [MSG_W-1:0]                   msout3,
  output logic [N_FLOORS-1:0]                rx_valid,
  output logic [N_FLOORS-1:0]                id_match
);

  logic                            msgout, pnout, scr, frame_start;
  logic [N_FLOORS-1:0][APPL_W-1:0] floor_v;
  logic [N_FLOORS-1:0][MSG_W-1:0]  msout_v;

  modem_tx #(.SPB(SPB)) u_tx (
    .clk, .rst, .msgin, .txout, .msgout, .pnout, .scr, .frame_start
  );

  for (genvar f = 0; f < N_FLOORS; f++) begin : g_floor
    floor_receiver #(
      .FLOOR_ID    (FLOOR_IDS[f]),
      .SPB         (SPB),
      .LINK_LATENCY(1)
    ) u_rx (
      .clk, .rst,
      .rxin    (txout),
      .floor   (floor_v[f]),
      .rxout   (msout_v[f]),
      .rx_valid(rx_valid[f]),
      .id_match(id_match[f])
    );
  end

  assign floor1 = floor_v[0];
  assign floor2 = floor_v[1];
  assign floor3 = floor_v[2];
  assign msout1 = msout_v[0];
  assign msout2 = msout_v[1];
  assign msout3 = msout_v[2];

endmodule
