// cordic_ref_pkg: bit-exact software reference of the CORDIC iteration, for
// the testbenches. It recomputes each elementary angle with $atan in double
// precision (round(atan(2^-i) / pi * 2^(W-1))), performs the same
// shift-and-add recurrence on 64-bit integers wrapped to W bits, and also
// offers the ideal (real-valued) results for tolerance checks.
package cordic_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  typedef struct {
    longint x;
    longint y;
    longint z;
  } vec_t;

  // Sign-extend the low w bits of v.
  function automatic longint wrap(input longint v, input int w);
    longint m;
    m = longint'(1) << (w - 1);
    v = v & ((longint'(1) << w) - 1);
    return (v ^ m) - m;
  endfunction

  function automatic longint angle(input int i, input int w);
    return longint'($atan(2.0 ** (-i)) / PI * (2.0 ** (w - 1)));
  endfunction

  // One iteration i in mode vec (0 rotation, 1 vectoring).
  function automatic vec_t step(input vec_t a, input int i, input bit vec, input int w);
    vec_t r;
    bit   dneg;
    longint xs, ys;
    dneg = vec ? (a.y >= 0) : (a.z < 0);
    xs = a.x >>> i;
    ys = a.y >>> i;
    if (!dneg) begin
      r.x = wrap(a.x - ys, w);
      r.y = wrap(a.y + xs, w);
      r.z = wrap(a.z - angle(i, w), w);
    end else begin
      r.x = wrap(a.x + ys, w);
      r.y = wrap(a.y - xs, w);
      r.z = wrap(a.z + angle(i, w), w);
    end
    return r;
  endfunction

  function automatic vec_t run(input vec_t a, input int n, input bit vec, input int w);
    vec_t r;
    r = a;
    for (int i = 0; i < n; i++) r = step(r, i, vec, w);
    return r;
  endfunction

  function automatic real gain(input int n);
    real k;
    k = 1.0;
    for (int i = 0; i < n; i++) k = k * $sqrt(1.0 + 2.0 ** (-2 * i));
    return k;
  endfunction

  // Binary angle (2^(w-1) = pi) to radians.
  function automatic real to_rad(input longint z, input int w);
    return real'(z) * PI / (2.0 ** (w - 1));
  endfunction

endpackage
