// sd_pkg: shared types and helpers for the signed-digit (SD) residue checker.
//
// An SD digit takes the values -1, 0 and +1 and is carried on two wires,
// a(1) = sign and a(0) = magnitude:  -1 -> 2'b11,  0 -> 2'b00,  +1 -> 2'b01.
// The code 2'b10 is never produced by any block; every decoder here reads it
// as 0. A P-digit SD number X = sum x_i * 2^i is a packed array of digits,
// digit 0 in the least significant position.
//
// The modulus is m = 2^P + u. u is selected at run time by u_sel_t:
// U_MINUS gives m = 2^P - 1 and U_PLUS gives m = 2^P + 1, the two moduli of
// the checker; U_ZERO gives m = 2^P (no end-around term), the third modulus
// the SD adder supports. The unused code 2'b11 behaves like U_ZERO.
package sd_pkg;

  typedef logic [1:0] sd_digit_t;

  localparam sd_digit_t SD_ZERO = 2'b00;
  localparam sd_digit_t SD_POS  = 2'b01;
  localparam sd_digit_t SD_NEG  = 2'b11;

  typedef enum logic [1:0] {
    U_MINUS = 2'b00,  // u = -1, m = 2^P - 1
    U_PLUS  = 2'b01,  // u = +1, m = 2^P + 1
    U_ZERO  = 2'b10   // u =  0, m = 2^P
  } u_sel_t;

  // -u as an SD digit: the factor by which a digit that leaves the top
  // position re-enters position 0, since 2^P = -u (mod m).
  function automatic sd_digit_t sd_wrap_digit(u_sel_t u);
    case (u)
      U_MINUS: return SD_POS;
      U_PLUS:  return SD_NEG;
      default: return SD_ZERO;
    endcase
  endfunction

  // Digit is -1.
  function automatic logic sd_is_neg(sd_digit_t d);
    return d[0] & d[1];
  endfunction

  // Digit is +1.
  function automatic logic sd_is_pos(sd_digit_t d);
    return d[0] & ~d[1];
  endfunction

  // Negate a digit (-1 <-> +1, 0 stays 0).
  function automatic sd_digit_t sd_negate(sd_digit_t d);
    return d[0] ? {~d[1], 1'b1} : SD_ZERO;
  endfunction

endpackage
