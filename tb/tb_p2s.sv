// Parallel-to-serial test: random words are loaded and shifted out with
// random idle cycles; every bit must appear MSB first and hold while idle.
// A load in the same cycle as a shift must win.
module tb_p2s;
  localparam int W = 32;
  logic clk = 0, rst = 1, load = 0, shift = 0;
  logic [W-1:0] din = '0;
  logic dout;
  int checks = 0, failures = 0;

  p2s #(.W(W)) dut (.*);

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
      @(negedge clk) begin din = w; load = 1; shift = (k % 2); end
      @(negedge clk) begin load = 0; shift = 0; din = ~w; end
      for (int b = W - 1; b >= 0; b--) begin
        check(dout == w[b], $sformatf("word %0d bit %0d", k, b));
        if ($urandom_range(0, 2) == 0) begin
          @(negedge clk);
          check(dout == w[b], $sformatf("word %0d bit %0d held", k, b));
        end
        shift = 1;
        @(negedge clk) shift = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
