// sd_pkg: types and constants shared by the sigma-delta networked servo design.
//
// The three-level delta code travels as two bits per sample: +1 -> 2'b01, 0 -> 2'b00,
// -1 -> 2'b11. The fourth pattern, 2'b10, is never sent but can appear through a bit
// error; every receiver reads it as 0. This coding follows the design's error analysis,
// which prefers it to the 00/01/10 alternative because the most likely single-bit error
// then produces the smallest value error.
//
// The float helpers below are used by the ALU-based control units: single-precision words
// are kept as plain 32-bit vectors (sign bit 31, exponent 30:23, fraction 22:0).
package sd_pkg;

  typedef enum logic [1:0] {
    SD_ZERO = 2'b00,
    SD_UP   = 2'b01,
    SD_BAD  = 2'b10,   // unused pattern, decoded as zero
    SD_DOWN = 2'b11
  } sd_code_e;

  typedef logic [31:0] fp32_t;

  // Decoded step of a delta code: +1, 0 or -1.
  function automatic int sd_step(input logic [1:0] code);
    case (code)
      SD_UP:   return 1;
      SD_DOWN: return -1;
      default: return 0;
    endcase
  endfunction

  // Real -> single-precision bit pattern, for elaboration-time constants only (physical
  // coefficients are given as real parameters and turned into float words with this).
  // Rounds the fraction to nearest; values below 2^-126 become zero.
  function automatic fp32_t real_to_fp(input real r);
    real a;
    int  e;
    longint m;
    if (r == 0.0) return '0;
    a = (r < 0.0) ? -r : r;
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    m = longint'((a - 1.0) * 8388608.0 + 0.5);
    if (m >= 64'd8388608) begin m = 0; e++; end
    if (e < -126) return '0;
    return {(r < 0.0), 8'(e + 127), m[22:0]};
  endfunction

endpackage
