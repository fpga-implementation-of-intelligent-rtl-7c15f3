// Parallel-to-serial converter for the transmitter.
//
// load copies din into the shift register; shift moves it up one place. dout
// is always the register's top bit, so a word goes out MSB first, one bit per
// shift. load wins when both are high. Conversion to a serial stream is the
// published design's; MSB-first order is this implementation's choice.
module p2s #(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic         shift,
  input  logic [W-1:0] din,
  output logic         dout
);

  logic [W-1:0] sh;

  always_ff @(posedge clk) begin
    if (rst)        sh <= '0;
    else if (load)  sh <= din;
    else if (shift) sh <= {sh[W-2:0], 1'b0};
  end

  assign dout = sh[W-1];

endmodule
