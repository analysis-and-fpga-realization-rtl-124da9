// svpwm_pkg -- types, constants and small helpers shared by the space-vector
// PWM modulator.
//
// The reference-vector angle is held as a sector number (0..5 for sectors
// I..VI) plus a fraction of the 60-degree sector. This avoids any division by
// six in hardware: the angle accumulator simply carries into, or borrows from,
// the sector number.
//
// The six active vectors and their numbering follow the hexagon of possible
// space vectors: V1=[100], V2=[110], V3=[010], V4=[011], V5=[001], V6=[101],
// where the three bits are the states of poles A, B and C (1 = upper switch
// on). Sector k lies between V_k and V_(k+1). The three switching patterns
// (symmetric seven-segment, odd and even 60-degree bus-clamped) follow the
// switching-signal description; the encodings are this design's choice.
package svpwm_pkg;

  // Switching pattern selected at run time.
  typedef enum logic [1:0] {
    PAT_SYMMETRIC = 2'd0,  // zero time shared between [000] and [111]
    PAT_CLAMP_ODD = 2'd1,  // [111] in odd sectors, [000] in even sectors
    PAT_CLAMP_EVN = 2'd2   // [000] in odd sectors, [111] in even sectors
  } pattern_e;

  // Sector index 0..5 stands for sectors I..VI.
  typedef logic [2:0] sector_t;

  // Pole states {A, B, C} of the active vector V_(k+1), k = 0..5.
  function automatic logic [2:0] active_vector(input sector_t k);
    unique case (k)
      3'd0:    return 3'b100;
      3'd1:    return 3'b110;
      3'd2:    return 3'b010;
      3'd3:    return 3'b011;
      3'd4:    return 3'b001;
      default: return 3'b101;
    endcase
  endfunction

  // Bit position (2 = A, 1 = B, 0 = C) of the pole set in a one-hot vector.
  function automatic logic [1:0] pole_of(input logic [2:0] onehot);
    unique case (onehot)
      3'b100:  return 2'd2;
      3'b010:  return 2'd1;
      default: return 2'd0;
    endcase
  endfunction

  // True when the pattern keeps the whole zero time in [111] for this sector.
  // k_lsb is bit 0 of the sector index; index k is sector k+1, so k_lsb = 0
  // marks an odd-numbered sector (I, III, V).
  function automatic logic zero_is_111(input pattern_e pat, input logic k_lsb);
    unique case (pat)
      PAT_CLAMP_ODD: return ~k_lsb;
      PAT_CLAMP_EVN: return k_lsb;
      default:       return 1'b0;
    endcase
  endfunction

endpackage
