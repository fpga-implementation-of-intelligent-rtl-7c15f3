// Receiver station of one floor: receiver modem plus remote control unit.
//
// rxin carries the transmitter's carrier samples. The modem recovers each
// 32-bit command word (rxout, with rx_valid), and the remote control unit
// switches this floor's 16 appliances (floor) when the word's ID field equals
// FLOOR_ID. The ports rxin, clk, rst, floor and rxout are those of the
// published receiver block; rx_valid and id_match are added strobes.
module floor_receiver
  import iesda_pkg::*;
#(
  parameter logic [ID_W-1:0] FLOOR_ID     = 16'h1111,
  parameter int              SPB          = 64,
  parameter int              LINK_LATENCY = 1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [SAMPLE_W-1:0] rxin,
  output logic [APPL_W-1:0]   floor,
  output logic [MSG_W-1:0]    rxout,
  output logic                rx_valid,
  output logic                id_match
);

  logic              dmodout, mout;
  logic [ID_W-1:0]   id;

  modem_rx #(.SPB(SPB), .LINK_LATENCY(LINK_LATENCY)) u_modem (
    .clk, .rst, .rxin, .rxout, .rx_valid, .dmodout, .mout
  );

  rcu #(.FLOOR_ID(FLOOR_ID)) u_rcu (
    .clk, .rst, .word_valid(rx_valid), .word(rxout), .floor, .id, .id_match
  );

endmodule
