// Floor station test (floor ID 16'h3333). rxin carries the reference line
// signal for a sequence of words for floors 1, 2, 3 and unknown IDs. rxout
// must show every word; floor must take the appliance half of the floor-3
// words only, two cycles after rx_valid, and keep its value otherwise.
module tb_floor_receiver;
  import tb_model_pkg::*;

  localparam int SPB = 64;
  localparam int NW  = 7;
  logic clk = 0, rst = 1;
  logic [5:0] rxin = 6'd32;
  logic [15:0] floor;
  logic [31:0] rxout;
  logic rx_valid, id_match;
  int checks = 0, failures = 0, nw = 0, nmatch = 0;
  logic [31:0] words[$];
  logic [15:0] expf = '0;
  TxModel m;
  int cyc = 0;

  floor_receiver #(.FLOOR_ID(16'h3333), .SPB(SPB), .LINK_LATENCY(1)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0d: %s", cyc, what); end
  endtask

  initial begin
    words = '{32'h1111_3245, 32'h3333_026F, 32'h2222_4534, {16'h3333, 16'($urandom)},
              32'h0000_FFFF, {16'h3333, 16'($urandom)}, 32'h3332_AAAA};
    m = new(SPB, words);
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
  end

  always @(posedge clk) if (!rst) begin
    cyc <= cyc + 1;
    if (rx_valid) begin
      check(rxout == words[nw], $sformatf("word %0d = %h", nw, rxout));
      check(cyc == 2116 + 2048 * nw, $sformatf("word %0d at cycle %0d", nw, cyc));
      nw++;
    end
    if (cyc >= 2118 && (cyc - 2118) % 2048 == 0) begin
      int k;
      k = (cyc - 2118) / 2048;
      if (words[k][31:16] == 16'h3333) begin
        expf = words[k][15:0];
        nmatch++;
      end
      check(id_match == (words[k][31:16] == 16'h3333), $sformatf("id_match word %0d", k));
    end
    if (cyc >= 2119) check(floor == expf, $sformatf("floor %h expected %h", floor, expf));
    else             check(floor == 16'h0, "floor off before first word");
  end

  always @(negedge clk) if (!rst) rxin <= 6'(m.txout_at(cyc));

  initial begin
    wait (nw == NW);
    repeat (4) @(posedge clk);
    check(nmatch == 3, "three matching words");
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
