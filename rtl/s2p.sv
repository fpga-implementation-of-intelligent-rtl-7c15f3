// Serial-to-parallel converter for the receiver.
//
// Each cycle with shift high takes din into the bottom of a W-bit shift
// register (the first bit ends up in the MSB). After W such bits the complete
// word is copied to dout and valid pulses for one cycle; dout then holds until
// the next word. Counting starts at reset (synchronous, active high). The
// conversion is the published design's; the count-from-reset framing and the
// valid strobe are this implementation's.
module s2p #(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         shift,
  input  logic         din,
  output logic [W-1:0] dout,
  output logic         valid
);

  logic [W-2:0]         sh;   // the first W-1 bits of a word
  logic [$clog2(W)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      sh    <= '0;
      cnt   <= '0;
      dout  <= '0;
      valid <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (shift) begin
        sh <= {sh[W-3:0], din};
        if (cnt == ($clog2(W))'(W - 1)) begin
          cnt   <= '0;
          dout  <= {sh[W-2:0], din};
          valid <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
