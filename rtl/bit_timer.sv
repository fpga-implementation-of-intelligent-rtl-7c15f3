// Bit-period timer shared by the transmitter and the receivers.
//
// sample counts the clock cycles of one bit period, 0 .. SPB-1, starting from
// START after a synchronous active-high reset. tick is high in the first cycle
// of every bit period (sample == 0), last in its final cycle. chan says which
// OQPSK rail the bit starting at this tick belongs to (0 = I, 1 = Q); it
// alternates tick by tick, beginning with I. Since every unit derives its
// timing from the common clock and reset, a receiver is aligned to the
// transmitter simply by starting its counter a fixed number of cycles
// behind (START). SPB must be a multiple of the 64-phase carrier period so
// that each bit spans whole carrier cycles.
module bit_timer #(
  parameter int SPB   = 64,
  parameter int START = 0
) (
  input  logic                   clk,
  input  logic                   rst,
  output logic [$clog2(SPB)-1:0] sample,
  output logic                   tick,
  output logic                   last,
  output logic                   chan
);

  localparam int CW = $clog2(SPB);

  always_ff @(posedge clk) begin
    if (rst) begin
      sample <= CW'(START);
      chan   <= 1'b0;
    end else begin
      sample <= (sample == CW'(SPB - 1)) ? '0 : sample + 1'b1;
      if (tick) chan <= ~chan;
    end
  end

  assign tick = (sample == '0);
  assign last = (sample == CW'(SPB - 1));

  if (SPB < 64 || SPB % 64 != 0) begin : g_bad_spb
    $error("bit_timer: SPB must be a positive multiple of 64");
  end
  if (START < 0 || START >= SPB) begin : g_bad_start
    $error("bit_timer: START must lie in 0 .. SPB-1");
  end

endmodule
