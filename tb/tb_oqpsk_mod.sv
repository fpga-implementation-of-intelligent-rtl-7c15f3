// OQPSK modulator test. The testbench runs its own bit timer (64 cycles per
// bit, phase = cycle count mod 64) and random bits. Each cycle's txout must
// equal 32 + round(31*(I*cos + Q*sin)/sqrt2) for the phase of the previous
// cycle, where I is the latest even-numbered bit and Q the latest odd one,
// and must sit at 32 before the first bit.
module tb_oqpsk_mod;
  import iesda_pkg::*;
  import tb_model_pkg::*;

  localparam int SPB = 64;
  logic clk = 0, rst = 1, tick = 0, chan = 0, bit_in = 0;
  logic [5:0] phase = '0;
  logic [5:0] txout;
  iq_t iq_cur;
  int checks = 0, failures = 0;

  oqpsk_mod dut (.*);

  always #5 clk = ~clk;

  initial begin
    bit i, q;
    int expect_next;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    i = 0; q = 0;
    // Idle cycles before the first bit.
    repeat (5) begin
      @(negedge clk);
      checks++;
      if (txout != MID) begin failures++; $display("FAIL: idle level %0d", txout); end
    end
    for (int n = 0; n < 40 * SPB; n++) begin
      // Drive cycle n.
      phase = 6'(n % 64);
      tick  = (n % SPB == 0);
      chan  = (n / SPB) % 2;
      if (tick) begin
        bit_in = 1'($urandom);
        if (chan) q = bit_in; else i = bit_in;
      end
      expect_next = line_sample(i, q, n % 64);
      @(negedge clk);
      checks++;
      if (int'(txout) != expect_next) begin
        failures++;
        if (failures < 10) $display("FAIL: cycle %0d txout %0d expected %0d", n, txout, expect_next);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50 * SPB) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
