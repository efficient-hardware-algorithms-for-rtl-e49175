// hough_ref_pkg: software reference for the Hough testbenches. The bin of a
// pixel is computed directly as round((x*C + y*S) / 2**F) + nbins/2 with
// C = round(cos(theta) * 2**F), S likewise, using a multiplication rather than
// the hardware's running sums.
package hough_ref_pkg;
  localparam int F = 14;

  function automatic longint qtrig(input int k, input int n, input bit sine);
    real a;
    a = 3.14159265358979323846 * k / n;
    return longint'($floor((sine ? $sin(a) : $cos(a)) * 16384.0 + 0.5));
  endfunction

  function automatic int ref_bin(input int x, input int y, input int k, input int n, input int nbins);
    longint r;
    r = longint'(x) * qtrig(k, n, 0) + longint'(y) * qtrig(k, n, 1);
    r = (r + (1 << (F - 1))) >>> F;
    return int'(r) + nbins / 2;
  endfunction
endpackage
