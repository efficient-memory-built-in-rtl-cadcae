// mbist_pkg: constants and types shared by the MBIST address generator and
// its Zero-One test wrapper.
//
// clfsr_taps(m) returns the feedback taps of a primitive polynomial of degree
// m, 2 <= m <= 30, as a bit vector: bit i is the coefficient b_i of x^i.
// The table is the polynomial table given with the design (one trinomial or
// pentanomial per degree); every entry was checked to be primitive.
// Bit 0 (b_0) and bit m (b_m) are always 1. The modified complete LFSR uses
// b_1..b_m to gate its flip-flop outputs into the feedback adder chain; the
// b_0 position is taken by the all-zero (NOR) term.
package mbist_pkg;

  localparam int unsigned MIN_DEGREE = 2;
  localparam int unsigned MAX_DEGREE = 30;

  typedef logic [MAX_DEGREE:0] taps_t;

  // Zero-One test phases: write 0s, read 0s, write 1s, read 1s.
  typedef enum logic [2:0] {
    PH_IDLE  = 3'd0,
    PH_W0    = 3'd1,
    PH_R0    = 3'd2,
    PH_W1    = 3'd3,
    PH_R1    = 3'd4,
    PH_DRAIN = 3'd5,
    PH_DONE  = 3'd6
  } phase_e;

  function automatic taps_t clfsr_taps(input int unsigned m);
    taps_t t;
    t = '0;
    t[0] = 1'b1;
    if (m <= MAX_DEGREE) t[m] = 1'b1;
    case (m)
      2, 3, 4, 6, 7, 15, 22:  t[1] = 1'b1;
      5, 11, 21, 29:          t[2] = 1'b1;
      8, 19:                  begin t[6] = 1'b1; t[5] = 1'b1; t[1] = 1'b1; end
      9:                      t[4] = 1'b1;
      10, 17, 20, 25, 28:     t[3] = 1'b1;
      12:                     begin t[7] = 1'b1; t[4] = 1'b1; t[3] = 1'b1; end
      13, 24:                 begin t[4] = 1'b1; t[3] = 1'b1; t[1] = 1'b1; end
      14:                     begin t[12] = 1'b1; t[11] = 1'b1; t[1] = 1'b1; end
      16:                     begin t[5] = 1'b1; t[3] = 1'b1; t[2] = 1'b1; end
      18:                     t[7] = 1'b1;
      23:                     t[5] = 1'b1;
      26, 27:                 begin t[8] = 1'b1; t[7] = 1'b1; t[1] = 1'b1; end
      30:                     begin t[16] = 1'b1; t[15] = 1'b1; t[1] = 1'b1; end
      default:                t = '0;  // degree outside the table
    endcase
    return t;
  endfunction

endpackage
