// Serial-to-parallel test: random bits with random gaps; after each 32nd bit
// valid must pulse for exactly one cycle, in the cycle after that bit, with
// the 32 bits in order, first bit in the MSB.
module tb_s2p;
  localparam int W = 32;
  logic clk = 0, rst = 1, shift = 0, din = 0;
  logic [W-1:0] dout;
  logic valid;
  int checks = 0, failures = 0, nvalid = 0;

  s2p #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [W-1:0] w;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int k = 0; k < 20; k++) begin
      w = $urandom;
      for (int b = W - 1; b >= 0; b--) begin
        while ($urandom_range(0, 3) == 0) begin
          shift = 0;
          @(negedge clk) check(!valid || b != W - 1, "valid during a gap");
        end
        shift = 1; din = w[b];
        @(negedge clk);
        shift = 0;
        check(valid == (b == 0), $sformatf("valid after word %0d bit %0d", k, b));
      end
      check(dout == w, $sformatf("word %0d = %h, expected %h", k, dout, w));
      @(negedge clk) check(!valid && dout == w, "valid one cycle, word held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
