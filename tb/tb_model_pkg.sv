// Reference model of the transmitter's line signal, for the testbenches.
//
// Written from the signal definitions rather than from the RTL structure:
//   scrambled bit j = message bit j xor PN chip j, message bits MSB first,
//                     PN from x^7 + x^6 + 1 seeded with all ones;
//   even bits drive the I rail, odd bits the Q rail, each held two bit times;
//   line sample     = 32 + round(31 * (I*cos(t) + Q*sin(t)) / sqrt(2)),
//                     t = 2*pi*phase/64, bit 1 -> +1, bit 0 -> -1.
// txout_at(n) gives the sample the transmitter drives in cycle n after reset:
// the zero level 32 in cycles 0 and 1, then bit b's samples in cycles
// 2 + b*spb .. 1 + (b+1)*spb, the carrier phase advancing by one per cycle.
package tb_model_pkg;

  function automatic int line_sample(bit i, bit q, int phase);
    real t, v;
    t = 2.0 * 3.14159265358979 * real'(phase % 64) / 64.0;
    v = ((i ? 1.0 : -1.0) * $cos(t) + (q ? 1.0 : -1.0) * $sin(t)) / $sqrt(2.0);
    return 32 + int'(31.0 * v);
  endfunction

  function automatic int cos_sample(int phase);
    return 32 + int'(31.0 * $cos(2.0 * 3.14159265358979 * real'(phase % 64) / 64.0));
  endfunction

  class TxModel;
    int spb;
    bit scr[$];
    bit pn[$];

    function new(int spb_, logic [31:0] words[$]);
      logic [6:0] s;
      spb = spb_;
      s = 7'h7F;
      foreach (words[k])
        for (int b = 31; b >= 0; b--) begin
          pn.push_back(s[6]);
          scr.push_back(words[k][b] ^ s[6]);
          s = {s[5:0], s[6] ^ s[5]};
        end
    endfunction

    function int txout_at(int n);
      int b, ph;
      bit i, q;
      if (n < 2) return 32;
      b  = (n - 2) / spb;
      ph = (n - 2) % 64;
      if (b >= scr.size()) b = scr.size() - 1;
      i = 0;
      q = 0;
      for (int j = 0; j <= b; j++) begin
        if (j % 2 == 0) i = scr[j];
        else            q = scr[j];
      end
      return line_sample(i, q, ph);
    endfunction
  endclass

endpackage
