// Shared types and constants of the MIMO detector blocks.
//
// All datapaths use 16-bit two's-complement fixed point with 7 integer and
// 9 fraction bits, the word format the paper found sufficient for floating-
// point bit-error-rate performance.  Constellation symbols of one real
// dimension (Q-PAM, Q = 2, 4 or 8) are small signed integers +-1, +-3, +-5,
// +-7 held in 4 bits.  The modulation is chosen at run time through qam_e.
package mimo_pkg;

  localparam int unsigned W    = 16;  // data word width
  localparam int unsigned FRAC = 9;   // fraction bits of a data word
  localparam int unsigned SW   = 4;   // signed PAM symbol width (+-7 max)
  localparam int unsigned MW   = 16;  // partial-metric width (unsigned, FRAC fraction bits)

  typedef logic signed [W-1:0]  data_t;
  typedef logic signed [SW-1:0] sym_t;
  typedef logic        [MW-1:0] metric_t;

  // Per-dimension modulation of the real-valued tree: Q^2-QAM = two Q-PAMs.
  typedef enum logic [1:0] {
    QAM4  = 2'd0,   // 2-PAM, points -1,+1
    QAM16 = 2'd1,   // 4-PAM, points -3..+3
    QAM64 = 2'd2    // 8-PAM, points -7..+7
  } qam_e;

  // Largest PAM magnitude Q-1.
  function automatic logic [2:0] pam_max(qam_e m);
    case (m)
      QAM4:    return 3'd1;
      QAM16:   return 3'd3;
      default: return 3'd7;
    endcase
  endfunction

  // log2(Q): number of successive-subtraction steps needed to slice psi/R.
  function automatic logic [1:0] pam_bits(qam_e m);
    case (m)
      QAM4:    return 2'd1;
      QAM16:   return 2'd2;
      default: return 2'd3;
    endcase
  endfunction

  // E8 sub-set class c' of an odd PAM point: 0 for ...,-7,-3,1,5,...
  // and 1 for ...,-5,-1,3,7,...  (bit 0 of (s-1)/2).
  function automatic logic pam_class(sym_t s);
    sym_t t;
    t = s - sym_t'(1);
    return t[1];
  endfunction

endpackage
