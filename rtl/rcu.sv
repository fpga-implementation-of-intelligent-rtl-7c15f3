// Remote control unit of one floor.
//
// Each received command word is copied into reg1 (one cycle after
// word_valid). Its upper ID_W bits are the floor ID; when they equal this
// floor's FLOOR_ID, the lower APPL_W bits are latched onto floor[], one bit per
// appliance (1 = on), in the following cycle, and id_match pulses. Words for
// other floors leave floor[] unchanged. Reset (synchronous, active high)
// switches every appliance off. The ID check and the 16 appliance bits are the
// published design's; the hold-on-mismatch behaviour and the two-cycle
// pipeline are this implementation's.
module rcu
  import iesda_pkg::*;
#(
  parameter logic [ID_W-1:0] FLOOR_ID = 16'h1111
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              word_valid,
  input  logic [MSG_W-1:0]  word,
  output logic [APPL_W-1:0] floor,
  output logic [ID_W-1:0]   id,
  output logic              id_match
);

  logic [MSG_W-1:0] reg1;
  logic             reg1_new;

  always_ff @(posedge clk) begin
    if (rst) begin
      reg1     <= '0;
      reg1_new <= 1'b0;
      floor    <= '0;
      id_match <= 1'b0;
    end else begin
      reg1_new <= word_valid;
      if (word_valid) reg1 <= word;
      id_match <= 1'b0;
      if (reg1_new && reg1[MSG_W-1 -: ID_W] == FLOOR_ID) begin
        floor    <= reg1[APPL_W-1:0];
        id_match <= 1'b1;
      end
    end
  end

  assign id = reg1[MSG_W-1 -: ID_W];

endmodule
