// End-to-end test of the appliance controller at its default parameters.
//
// The host side sends one command word per 32-bit frame: first the three
// floor commands 32'h11113245, 32'h22224534 and 32'h3333026F, then a word
// with an ID no floor owns, then random words (about half of them carrying a
// valid floor ID). For every frame the test checks, on all three receivers,
// that the recovered word equals the word sent and arrives exactly
// 2116 + 2048*k cycles after reset (the last bit's start plus two bit periods
// of demodulation and two register stages), that only the addressed floor
// changes its appliance outputs and does so two cycles later, and that the
// other floors keep theirs. It also counts how often each mechanism occurred:
// an ID match on each floor, a word ignored by a floor, a word ignored by all
// floors, each of the four I/Q carrier phases, and a PN chip that inverted a
// message bit; one that never occurs is a failure.
module tb_iesda_top;
  import iesda_pkg::*;

  localparam int SPB     = 64;            // the top's default
  localparam int FRAME   = MSG_W * SPB;   // cycles per frame
  localparam int NFRAMES = 14;

  logic                clk = 1'b0;
  logic                rst = 1'b1;
  logic [MSG_W-1:0]    msgin;
  logic [SAMPLE_W-1:0] txout;
  logic [APPL_W-1:0]   floor1, floor2, floor3;
  logic [MSG_W-1:0]    msout1, msout2, msout3;
  logic [N_FLOORS-1:0] rx_valid, id_match;

  iesda_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  logic [MSG_W-1:0]  sent [NFRAMES];
  logic [APPL_W-1:0] exp_floor [N_FLOORS];
  int n_match [N_FLOORS];
  int n_ignored [N_FLOORS];
  int n_nobody = 0;
  int n_iq [4];
  int n_inverted = 0;
  int words_seen [N_FLOORS];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  function automatic int floor_of(logic [ID_W-1:0] id);
    for (int f = 0; f < N_FLOORS; f++) if (FLOOR_IDS[f] == id) return f;
    return -1;
  endfunction

  // Words to send: the three floor commands, one unknown ID, then random.
  initial begin
    sent[0] = 32'h1111_3245;
    sent[1] = 32'h2222_4534;
    sent[2] = 32'h3333_026F;
    sent[3] = 32'hABCD_FFFF;
    for (int k = 4; k < NFRAMES; k++) begin
      logic [ID_W-1:0] id;
      int sel;
      sel = $urandom_range(0, 3);
      case (sel)
        0: id = 16'h1111;
        1: id = 16'h2222;
        2: id = 16'h3333;
        default: id = 16'($urandom);
      endcase
      sent[k] = {id, 16'($urandom)};
    end
    for (int f = 0; f < N_FLOORS; f++) begin
      exp_floor[f] = '0; n_match[f] = 0; n_ignored[f] = 0; words_seen[f] = 0;
    end
    for (int i = 0; i < 4; i++) n_iq[i] = 0;
  end

  // Cycle count: the sample taken at edge n shows cycle n after reset.
  always @(posedge clk) if (!rst) cyc <= cyc + 1;

  // Host: present word k during frame k-1's second half so that it is
  // stable when frame k starts (frame k starts at cycle FRAME*k).
  initial begin
    msgin = sent[0];
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int k = 1; k < NFRAMES; k++) begin
      wait (cyc == FRAME * (k - 1) + FRAME / 2);
      @(negedge clk) msgin = sent[k];
    end
  end

  // Receivers: word content, arrival cycle, appliance outputs.
  always @(posedge clk) if (!rst) begin
    logic [MSG_W-1:0]  ms [N_FLOORS];
    logic [APPL_W-1:0] fl [N_FLOORS];
    ms = '{msout1, msout2, msout3};
    fl = '{floor1, floor2, floor3};
    for (int f = 0; f < N_FLOORS; f++) begin
      if (rx_valid[f]) begin
        int k;
        k = words_seen[f];
        words_seen[f]++;
        check(k < NFRAMES && ms[f] == sent[k],
              $sformatf("floor %0d word %0d = %h, sent %h", f + 1, k, ms[f], sent[k]));
        check(cyc == 2116 + FRAME * k,
              $sformatf("floor %0d word %0d at cycle %0d, expected %0d", f + 1, k, cyc, 2116 + FRAME * k));
        if (floor_of(sent[k][MSG_W-1 -: ID_W]) == f) begin
          exp_floor[f] = sent[k][APPL_W-1:0];
          n_match[f]++;
        end else begin
          n_ignored[f]++;
        end
        if (f == 0 && floor_of(sent[k][MSG_W-1 -: ID_W]) < 0) n_nobody++;
      end
      if (id_match[f]) begin
        check(cyc == 2118 + FRAME * (words_seen[f] - 1),
              $sformatf("floor %0d id_match at cycle %0d", f + 1, cyc));
        check(fl[f] == exp_floor[f],
              $sformatf("floor %0d appliances %h, expected %h", f + 1, fl[f], exp_floor[f]));
      end
    end
    // Appliances change only right after a matching word.
    if (cyc % FRAME == 2119 % FRAME)
      for (int f = 0; f < N_FLOORS; f++)
        check(fl[f] == exp_floor[f],
              $sformatf("floor %0d holds %h, expected %h", f + 1, fl[f], exp_floor[f]));
  end

  // Mechanism probes on the transmitter.
  always @(posedge clk) if (!rst && dut.u_tx.u_timer.tick) begin
    n_iq[{dut.u_tx.u_mod.iq_cur.i, dut.u_tx.u_mod.iq_cur.q}]++;
    if (dut.u_tx.scr != dut.u_tx.msgout) n_inverted++;
  end

  initial begin
    wait (words_seen[0] == NFRAMES && words_seen[1] == NFRAMES && words_seen[2] == NFRAMES);
    repeat (4) @(posedge clk);
    for (int f = 0; f < N_FLOORS; f++) begin
      check(n_match[f] > 0, $sformatf("floor %0d never matched", f + 1));
      check(n_ignored[f] > 0, $sformatf("floor %0d never ignored a word", f + 1));
      $display("floor %0d: %0d words matched, %0d ignored", f + 1, n_match[f], n_ignored[f]);
    end
    check(n_nobody > 0, "no word for an unknown floor");
    for (int i = 0; i < 4; i++) begin
      check(n_iq[i] > 0, $sformatf("I/Q pair %0d never sent", i));
      $display("I/Q pair %b sent %0d times", 2'(i), n_iq[i]);
    end
    check(n_inverted > 0, "PN never inverted a bit");
    $display("words for no floor %0d, PN inversions %0d", n_nobody, n_inverted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (FRAME * (NFRAMES + 3)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
