// Receiver modem test. rxin is driven with the reference line signal of
// tb_model_pkg for six words (the three published floor commands and three
// random words), exactly as the transmitter would drive it. Every word must
// come out on rxout with rx_valid in cycle 2116 + 2048*k; each demodulated
// bit must equal the scrambled bit sent, and each descrambled bit the
// message bit. A second receiver, set for LINK_LATENCY = 4, gets the same
// signal three cycles later and must deliver the same words three cycles
// later.
module tb_modem_rx;
  import tb_model_pkg::*;

  localparam int SPB = 64;
  localparam int NW  = 6;
  logic clk = 0, rst = 1;
  logic [5:0] rxin = 6'd32;
  logic [31:0] rxout;
  logic rx_valid, dmodout, mout;
  int checks = 0, failures = 0, nw = 0, nb = 0;
  logic [31:0] words[$];
  TxModel m;
  int cyc = 0;

  modem_rx #(.SPB(SPB), .LINK_LATENCY(1)) dut (.*);

  // Delayed line into a receiver set for the longer latency.
  logic [5:0]  rxin_d [3];
  logic [31:0] rxout4;
  logic        rx_valid4;
  int          nw4 = 0;
  always @(posedge clk) rxin_d <= '{rxin, rxin_d[0], rxin_d[1]};
  modem_rx #(.SPB(SPB), .LINK_LATENCY(4)) dut4 (
    .clk, .rst, .rxin(rxin_d[2]), .rxout(rxout4), .rx_valid(rx_valid4), .dmodout(), .mout()
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0d: %s", cyc, what); end
  endtask

  initial begin
    words = '{32'h1111_3245, 32'h2222_4534, 32'h3333_026F, $urandom, $urandom, $urandom};
    m = new(SPB, words);
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
  end

  always @(posedge clk) if (!rst) begin
    cyc <= cyc + 1;
    if (dut.u_demod.bit_valid) begin
      check(dmodout == m.scr[nb], $sformatf("dmodout bit %0d", nb));
      check(mout == words[nb / 32][31 - nb % 32], $sformatf("mout bit %0d", nb));
      nb++;
    end
    if (rx_valid) begin
      check(rxout == words[nw], $sformatf("word %0d = %h expected %h", nw, rxout, words[nw]));
      check(cyc == 2116 + 2048 * nw, $sformatf("word %0d at cycle %0d", nw, cyc));
      nw++;
    end
    if (rx_valid4) begin
      check(rxout4 == words[nw4], $sformatf("delayed word %0d = %h", nw4, rxout4));
      check(cyc == 2119 + 2048 * nw4, $sformatf("delayed word %0d at cycle %0d", nw4, cyc));
      nw4++;
    end
  end

  always @(negedge clk) if (!rst) rxin <= 6'(m.txout_at(cyc));

  initial begin
    wait (nw == NW);
    repeat (5) @(posedge clk);
    check(nw4 == NW, "delayed receiver got every word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (32 * SPB * (NW + 2)) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
