// hough_pkg: fixed-point angle table and sizes shared by the line Hough
// transform blocks.
//
// Angle k of N_THETA stands for theta = k * pi / N_THETA. Its cosine and sine
// are held as signed numbers with TRIG_FRAC fraction bits, rounded to nearest:
// round(cos(theta) * 2**TRIG_FRAC). They are computed at elaboration, so no
// table file is needed.
package hough_pkg;
  parameter int unsigned TRIG_FRAC = 14;
  parameter int unsigned TRIG_W    = TRIG_FRAC + 2;

  typedef logic signed [TRIG_W-1:0] trig_t;

  function automatic trig_t trig_q(input int unsigned k, input int unsigned n, input bit sine);
    real a, v;
    a = 3.14159265358979323846 * real'(k) / real'(n);
    v = sine ? $sin(a) : $cos(a);
    return TRIG_W'($rtoi($floor(v * real'(1 << TRIG_FRAC) + 0.5)));
  endfunction
endpackage
