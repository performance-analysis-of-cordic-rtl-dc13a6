// cordic_pkg: types and constants shared by the CORDIC cores.
//
// Number formats used by every core in this library:
//   * x and y are signed two's-complement words of WIDTH bits. They are not
//     scaled by the core: each result carries the CORDIC gain
//     K_n = prod_{i=0}^{n-1} sqrt(1 + 2^-2i) (about 1.6468 for 7 iterations),
//     so callers keep the magnitude sqrt(x^2 + y^2) below about 0.6 of
//     full scale (1/K); larger inputs wrap around.
//   * z is a signed binary angle of WIDTH bits: 2^(WIDTH-1) stands for pi
//     radians, so the word covers [-pi, pi) and wraps naturally.
//
// The elementary angles alpha_i = atan(2^-i) are produced by atan_angle()
// from a 64-bit master table, atan_raw(i) = round(atan(2^-i) / pi * 2^63),
// rounded to the requested width. Beyond i = 31, atan(2^-i) is 2^-i to well
// below one 64-bit LSB, so the entry is halved per step.
// Defaults follow the source design: seven iterations (stages), word length
// 32 bits (16 bits is the other size evaluated).
package cordic_pkg;

  parameter int unsigned DEFAULT_WIDTH = 32;
  parameter int unsigned DEFAULT_ITERATIONS = 7;

  // Operating mode of a rotator. Rotation drives z to zero (decision from the
  // sign of z); vectoring drives y to zero (decision from the sign of y).
  typedef enum logic {
    MODE_ROTATE = 1'b0,
    MODE_VECTOR = 1'b1
  } cordic_mode_e;

  function automatic logic [63:0] atan_raw(input int unsigned i);
    case (i)
      0:  return 64'h2000000000000000;
      1:  return 64'h12e4051d9df30800;
      2:  return 64'h09fb385b5ee39e80;
      3:  return 64'h051111d41ddd9a40;
      4:  return 64'h028b0d430e589b00;
      5:  return 64'h0145d7e159046280;
      6:  return 64'h00a2f61e5c282630;
      7:  return 64'h00517c5511d442b0;
      8:  return 64'h0028be5346d0c338;
      9:  return 64'h00145f2ebb30ab38;
      10: return 64'h000a2f980091ba7c;
      11: return 64'h000517cc14a80cb7;
      12: return 64'h00028be60cdfec62;
      13: return 64'h000145f306c172f2;
      14: return 64'h0000a2f9836ae911;
      15: return 64'h0000517cc1b6ba7c;
      16: return 64'h000028be60db85fc;
      17: return 64'h0000145f306dc816;
      18: return 64'h00000a2f9836e4ae;
      19: return 64'h00000517cc1b726b;
      20: return 64'h0000028be60db938;
      21: return 64'h00000145f306dc9c;
      22: return 64'h000000a2f9836e4e;
      23: return 64'h000000517cc1b727;
      24: return 64'h00000028be60db94;
      25: return 64'h000000145f306dca;
      26: return 64'h0000000a2f9836e5;
      27: return 64'h0000000517cc1b72;
      28: return 64'h000000028be60db9;
      29: return 64'h0000000145f306dd;
      30: return 64'h00000000a2f9836e;
      31: return 64'h00000000517cc1b7;
      default: return 64'h00000000517cc1b7 >> (i - 31);
    endcase
  endfunction

  // atan(2^-i) as a WIDTH-bit binary angle (2^(WIDTH-1) = pi), rounded to
  // nearest. Valid for 2 <= width <= 63.
  function automatic logic [63:0] atan_angle(input int unsigned i,
                                             input int unsigned width);
    logic [64:0] rounded;
    rounded = {1'b0, atan_raw(i)} + (65'd1 << (63 - width));
    return 64'(rounded >> (64 - width));
  endfunction

endpackage
