// Remote control unit test (floor ID 16'h2222): words for this floor must
// reach the appliance outputs two cycles after word_valid with id_match;
// words for other floors or unknown IDs must leave them unchanged; reg1's ID
// field must follow every word. Near-miss IDs (16'h22xx) must not match. Includes the published floor-2 command.
module tb_rcu;
  logic clk = 0, rst = 1, word_valid = 0;
  logic [31:0] word = '0;
  logic [15:0] floor, id;
  logic id_match;
  int checks = 0, failures = 0, nmatch = 0, nmiss = 0;

  rcu #(.FLOOR_ID(16'h2222)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [15:0] expf;
    logic [31:0] w;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    expf = '0;
    check(floor == 16'h0 && !id_match, "reset state");
    for (int k = 0; k < 60; k++) begin
      case (k % 5)
        0: w = {16'h2222, 16'($urandom)};
        1: w = {16'h1111, 16'($urandom)};
        2: w = {16'h3333, 16'($urandom)};
        3: w = {16'h2223 + 16'($urandom_range(0, 200)), 16'($urandom)};  // near miss
        default: w = $urandom;
      endcase
      if (k == 0) w = 32'h2222_4534;
      @(negedge clk) begin word = w; word_valid = 1; end
      @(negedge clk) begin word_valid = 0; word = $urandom; end
      check(id == w[31:16] && !id_match && floor == expf, $sformatf("word %0d stage 1", k));
      @(negedge clk);
      if (w[31:16] == 16'h2222) begin
        expf = w[15:0];
        nmatch++;
        check(id_match, $sformatf("word %0d id_match", k));
      end else begin
        nmiss++;
        check(!id_match, $sformatf("word %0d no id_match", k));
      end
      check(floor == expf, $sformatf("word %0d floor %h expected %h", k, floor, expf));
      repeat (1 + $urandom_range(0, 2)) @(negedge clk);
      check(floor == expf && !id_match, "hold");
    end
    check(nmatch > 0 && nmiss > 0, "both cases occurred");
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
