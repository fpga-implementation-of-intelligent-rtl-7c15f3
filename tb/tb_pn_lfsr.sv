// PN generator test: the chip sequence must follow x^7 + x^6 + 1 from the
// all-ones seed (a software shift register computes it), have period exactly
// 127 with 64 ones and 63 zeros per period, hold while en is low, and
// restart from the seed on reset.
module tb_pn_lfsr;
  logic clk = 0, rst = 1, en = 0;
  logic pn;
  int checks = 0, failures = 0;

  pn_lfsr dut (.clk, .rst, .en, .pn);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [6:0] s;
    bit seq[$];
    int ones;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    s = 7'h7F;
    // Random enable pattern; the chip may only change after an enabled cycle.
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      check(pn == s[6], $sformatf("chip %0d = %b, expected %b", seq.size(), pn, s[6]));
      en = ($urandom_range(0, 3) != 0);
      if (en) begin
        seq.push_back(s[6]);
        s = {s[5:0], s[6] ^ s[5]};
      end
    end
    @(negedge clk) en = 0;
    // Period 127: the sequence repeats after 127 chips and not before.
    ones = 0;
    for (int j = 0; j < 127; j++) ones += seq[j];
    check(ones == 64, $sformatf("%0d ones per period", ones));
    for (int j = 0; j + 127 < seq.size(); j++) check(seq[j] == seq[j + 127], "period 127");
    for (int p = 1; p < 127; p++) begin
      bit same = 1;
      for (int j = 0; j < 127; j++) if (seq[j] != seq[j + p]) same = 0;
      check(!same, $sformatf("shorter period %0d", p));
    end
    // Reset returns to the seed.
    @(negedge clk) rst = 1;
    @(negedge clk) rst = 0;
    check(pn == 1'b1, "seed after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
