// OQPSK demodulator test. The testbench builds the line signal itself from
// random bits (I on even, Q on odd bit periods, each held two periods,
// 32 + round(31*(I*cos + Q*sin)/sqrt2)), adds random noise of up to +-6 LSB,
// and feeds it with the matching tick/chan/phase. Bit j must come out with
// bit_valid in the cycle after tick j+2, i.e. 2*SPB + 1 cycles after it
// started, and no bit may come out before.
module tb_oqpsk_demod;
  import tb_model_pkg::*;

  localparam int SPB = 64;
  localparam int NB  = 60;
  logic clk = 0, rst = 1, tick = 0, chan = 0;
  logic [5:0] phase = '0, rxin = 6'd32;
  logic bit_valid, bit_out;
  int checks = 0, failures = 0, nout = 0;
  bit bits[NB];
  int valid_cycle[$];
  int cyc = 0;

  oqpsk_demod #(.SPB(SPB)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (!rst) begin
    cyc <= cyc + 1;
    if (bit_valid) begin
      checks += 2;
      if (bit_out != bits[nout]) begin failures++; $display("FAIL: bit %0d = %b", nout, bit_out); end
      if (cyc != (nout + 2) * SPB + 1) begin
        failures++; $display("FAIL: bit %0d at cycle %0d", nout, cyc);
      end
      nout++;
    end
  end

  initial begin
    bit i, q;
    int s;
    foreach (bits[j]) bits[j] = 1'($urandom);
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    i = 0; q = 0;
    for (int n = 0; n < (NB + 2) * SPB; n++) begin
      int b;
      b = n / SPB;
      phase = 6'(n % 64);
      tick  = (n % SPB == 0);
      chan  = b % 2;
      if (tick && b < NB) begin
        if (chan) q = bits[b]; else i = bits[b];
      end
      s = line_sample(i, q, n % 64) + $urandom_range(0, 12) - 6;
      rxin = 6'((s < 0) ? 0 : (s > 63) ? 63 : s);
      @(negedge clk);
    end
    checks++;
    if (nout != NB) begin failures++; $display("FAIL: %0d bits out, expected %0d", nout, NB); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NB + 10) * SPB) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
