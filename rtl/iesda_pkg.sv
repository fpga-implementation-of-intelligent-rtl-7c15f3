// Shared constants and helpers of the distributed appliance controller.
//
// One transmitter modem sends a 32-bit command word; three floor receivers
// decode it. The upper 16 bits of the word carry the floor ID, the lower 16
// bits switch the 16 appliances of that floor (one bit per appliance). The
// word, ID and appliance widths, the three floors and their IDs 16'h1111,
// 16'h2222, 16'h3333, and the 64-entry by 6-bit carrier table follow the
// published design. The scrambler polynomial, the bit order and the mapping of
// bit pairs onto carrier phases are this implementation's own choices.
package iesda_pkg;

  localparam int MSG_W    = 32;  // command word width
  localparam int ID_W     = 16;  // floor ID field, word[31:16]
  localparam int APPL_W   = 16;  // appliance field, word[15:0]
  localparam int N_FLOORS = 3;   // receivers, one per floor

  localparam int SAMPLE_W = 6;   // width of a carrier sample (txout/rxin)
  localparam int PHASE_W  = 6;   // carrier table address: 64 phases

  // Carrier samples are offset binary: MID is the zero level.
  localparam logic [SAMPLE_W-1:0] MID = SAMPLE_W'(1 << (SAMPLE_W - 1));

  // Floor IDs, floor 1 in the lowest slot.
  localparam logic [N_FLOORS-1:0][ID_W-1:0] FLOOR_IDS = {16'h3333, 16'h2222, 16'h1111};

  // Scrambler: maximal-length 7-bit Fibonacci LFSR, x^7 + x^6 + 1.
  localparam int                LFSR_W    = 7;
  localparam logic [LFSR_W-1:0] LFSR_SEED = 7'h7F;

  // One OQPSK symbol component on the I or Q rail.
  typedef struct packed {
    logic i;
    logic q;
  } iq_t;

  // Phase offset (in 1/64 of a turn) that turns the cosine table into
  //   s = I*cos(wt) + Q*sin(wt), with bit 1 -> +1 and bit 0 -> -1.
  // cos(wt - 45deg) = (cos + sin)/sqrt2, and so on round the circle.
  function automatic logic [PHASE_W-1:0] iq_phase(iq_t s);
    unique case ({s.i, s.q})
      2'b11:   return PHASE_W'(56);  // -45 deg
      2'b10:   return PHASE_W'(8);   // +45 deg
      2'b00:   return PHASE_W'(24);  // +135 deg
      default: return PHASE_W'(40);  // -135 deg (2'b01)
    endcase
  endfunction

endpackage
