// Carrier table: 64 x 6-bit cosine ROM.
//
// data = 32 + round(31 * cos(2*pi*addr/64)), an offset-binary sample in 1..63
// whose zero level is 32. A 64-word by 6-bit ROM is the one memory of the
// published design; that it holds one cosine period is this implementation's
// reading. The read is combinational (asynchronous ROM); callers register the
// result. Sine is read from the same table at addr + 48 (a -90 deg shift).
module sine_rom
  import iesda_pkg::*;
(
  input  logic [PHASE_W-1:0]  addr,
  output logic [SAMPLE_W-1:0] data
);

  always_comb begin
    unique case (addr)
      6'd0:  data = 6'd63;  6'd1:  data = 6'd63;  6'd2:  data = 6'd62;  6'd3:  data = 6'd62;
      6'd4:  data = 6'd61;  6'd5:  data = 6'd59;  6'd6:  data = 6'd58;  6'd7:  data = 6'd56;
      6'd8:  data = 6'd54;  6'd9:  data = 6'd52;  6'd10: data = 6'd49;  6'd11: data = 6'd47;
      6'd12: data = 6'd44;  6'd13: data = 6'd41;  6'd14: data = 6'd38;  6'd15: data = 6'd35;
      6'd16: data = 6'd32;  6'd17: data = 6'd29;  6'd18: data = 6'd26;  6'd19: data = 6'd23;
      6'd20: data = 6'd20;  6'd21: data = 6'd17;  6'd22: data = 6'd15;  6'd23: data = 6'd12;
      6'd24: data = 6'd10;  6'd25: data = 6'd8;   6'd26: data = 6'd6;   6'd27: data = 6'd5;
      6'd28: data = 6'd3;   6'd29: data = 6'd2;   6'd30: data = 6'd2;   6'd31: data = 6'd1;
      6'd32: data = 6'd1;   6'd33: data = 6'd1;   6'd34: data = 6'd2;   6'd35: data = 6'd2;
      6'd36: data = 6'd3;   6'd37: data = 6'd5;   6'd38: data = 6'd6;   6'd39: data = 6'd8;
      6'd40: data = 6'd10;  6'd41: data = 6'd12;  6'd42: data = 6'd15;  6'd43: data = 6'd17;
      6'd44: data = 6'd20;  6'd45: data = 6'd23;  6'd46: data = 6'd26;  6'd47: data = 6'd29;
      6'd48: data = 6'd32;  6'd49: data = 6'd35;  6'd50: data = 6'd38;  6'd51: data = 6'd41;
      6'd52: data = 6'd44;  6'd53: data = 6'd47;  6'd54: data = 6'd49;  6'd55: data = 6'd52;
      6'd56: data = 6'd54;  6'd57: data = 6'd56;  6'd58: data = 6'd58;  6'd59: data = 6'd59;
      6'd60: data = 6'd61;  6'd61: data = 6'd62;  6'd62: data = 6'd62;  default: data = 6'd63;
    endcase
  end

endmodule
