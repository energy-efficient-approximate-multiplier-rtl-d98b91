// Shared types of the approximate Booth multiplier.
//
// booth_digit_e is the radix-4 Booth digit that one overlapping bit triplet
// of the multiplier y selects: the partial product is that multiple of the
// multiplicand x (0, +x, +2x, -x, -2x). The encoding is this design's own;
// only the enum names are used outside the partial-product generator.
package amul_pkg;

  typedef enum logic [2:0] {
    BOOTH_ZERO = 3'd0,
    BOOTH_P1   = 3'd1,
    BOOTH_P2   = 3'd2,
    BOOTH_M1   = 3'd5,
    BOOTH_M2   = 3'd6
  } booth_digit_e;

  // Radix-4 Booth recoding of one triplet {y[2i+1], y[2i], y[2i-1]}.
  function automatic booth_digit_e booth_recode(input logic [2:0] trip);
    unique case (trip)
      3'b000, 3'b111: return BOOTH_ZERO;
      3'b001, 3'b010: return BOOTH_P1;
      3'b011:         return BOOTH_P2;
      3'b100:         return BOOTH_M2;
      default:        return BOOTH_M1;   // 3'b101, 3'b110
    endcase
  endfunction

endpackage
