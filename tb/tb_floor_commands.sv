// The three single-command scenarios of the published simulations, run on the
// full system at its default parameters. Each scenario starts from reset and
// holds one command word on msgin: 32'h11113245 (floor 1), 32'h22224534
// (floor 2) and 32'h3333026F (floor 3). After two frames every receiver must
// show the word on its msout output, the addressed floor must drive the
// word's low half on its appliance outputs, the two other floors must still
// be all off, and the addressed station's ID register must hold the floor ID.
// The first word must arrive 2116 cycles after reset.
module tb_floor_commands;
  import iesda_pkg::*;

  logic                clk = 1'b0;
  logic                rst = 1'b1;
  logic [MSG_W-1:0]    msgin = '0;
  logic [SAMPLE_W-1:0] txout;
  logic [APPL_W-1:0]   floor1, floor2, floor3;
  logic [MSG_W-1:0]    msout1, msout2, msout3;
  logic [N_FLOORS-1:0] rx_valid, id_match;
  int checks = 0, failures = 0;
  int cyc = 0, first_valid = -1;

  iesda_top dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst) begin
      cyc <= 0;
      first_valid <= -1;
    end else begin
      cyc <= cyc + 1;
      if (rx_valid[0] && first_valid < 0) first_valid <= cyc;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic scenario(input int f, input logic [MSG_W-1:0] w);
    logic [APPL_W-1:0] fl [N_FLOORS];
    logic [ID_W-1:0]   ids [N_FLOORS];
    @(negedge clk) begin rst = 1'b1; msgin = w; end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (2 * MSG_W * 64 + 200) @(negedge clk);
    fl  = '{floor1, floor2, floor3};
    ids = '{dut.g_floor[0].u_rx.u_rcu.id, dut.g_floor[1].u_rx.u_rcu.id, dut.g_floor[2].u_rx.u_rcu.id};
    check(msout1 == w && msout2 == w && msout3 == w,
          $sformatf("floor %0d scenario: msout %h %h %h, sent %h", f + 1, msout1, msout2, msout3, w));
    check(first_valid == 2116, $sformatf("first word at cycle %0d", first_valid));
    check(ids[f] == FLOOR_IDS[f], $sformatf("id %h", ids[f]));
    for (int g = 0; g < N_FLOORS; g++) begin
      check(fl[g] == ((g == f) ? w[APPL_W-1:0] : '0),
            $sformatf("floor %0d scenario: floor%0d = %h", f + 1, g + 1, fl[g]));
    end
    $display("command %h: floor1=%h floor2=%h floor3=%h", w, floor1, floor2, floor3);
  endtask

  initial begin
    scenario(0, 32'h1111_3245);
    scenario(1, 32'h2222_4534);
    scenario(2, 32'h3333_026F);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * (2 * MSG_W * 64 + 300)) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
