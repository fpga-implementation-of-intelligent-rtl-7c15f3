// Transmitter modem test. Four frames are sent (the three published floor
// commands and a random word, msgin changed mid-frame to show that it is
// only sampled at frame starts). Every cycle's txout is compared with the
// reference line signal of tb_model_pkg, and msgout, pnout and scr with the
// message bit, PN chip and their xor at each bit start. frame_start must mark
// cycles 1 + 2048*k.
module tb_modem_tx;
  import tb_model_pkg::*;

  localparam int SPB = 64;
  localparam int NW  = 4;
  logic clk = 0, rst = 1;
  logic [31:0] msgin;
  logic [5:0] txout;
  logic msgout, pnout, scr, frame_start;
  int checks = 0, failures = 0;
  logic [31:0] words[$];
  TxModel m;
  int cyc = 0;

  modem_tx #(.SPB(SPB)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0d: %s", cyc, what); end
  endtask

  initial begin
    words = '{32'h1111_3245, 32'h2222_4534, 32'h3333_026F, $urandom};
    m = new(SPB, words);
    msgin = words[0];
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
  end

  always @(posedge clk) if (!rst) begin
    int b;
    cyc <= cyc + 1;
    check(int'(txout) == m.txout_at(cyc), $sformatf("txout %0d expected %0d", txout, m.txout_at(cyc)));
    check(frame_start == (cyc >= 1 && (cyc - 1) % (32 * SPB) == 0), "frame_start");
    if (cyc >= 1 && (cyc - 1) % SPB == 0) begin
      b = (cyc - 1) / SPB;
      check(msgout == words[b / 32][31 - b % 32], $sformatf("msgout bit %0d", b));
      check(pnout == m.pn[b], $sformatf("pnout bit %0d", b));
      check(scr == m.scr[b], $sformatf("scr bit %0d", b));
    end
  end

  // Present the next word halfway through each frame; a garbage word in
  // between must not leak into the frame being sent.
  initial begin
    wait (!rst);
    for (int k = 1; k < NW; k++) begin
      wait (cyc == 32 * SPB * (k - 1) + 500);
      @(negedge clk) msgin = 32'hDEAD_BEEF;
      wait (cyc == 32 * SPB * (k - 1) + 1500);
      @(negedge clk) msgin = words[k];
    end
    wait (cyc == 32 * SPB * NW);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (32 * SPB * (NW + 1)) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
