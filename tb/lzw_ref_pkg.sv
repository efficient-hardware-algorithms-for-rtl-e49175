// lzw_ref_pkg: software reference for the LZW testbenches. compress() is a
// textbook LZW coder over an associative array keyed by (prefix code, character), with the same
// fixed code width and the same rule as the hardware once the dictionary is
// full (no more entries). make_data() builds test streams.
package lzw_ref_pkg;
  import lzw_pkg::*;

  typedef byte unsigned bytes_t[$];
  typedef int unsigned  codes_t[$];

  function automatic codes_t compress(input bytes_t d);
    int unsigned dict[longint unsigned];   // key: prefix code * 256 + char
    codes_t out;
    int unsigned w, next;
    next = FIRST_CODE;
    if (d.size() == 0) return out;
    w = d[0];
    for (int i = 1; i < d.size(); i++) begin
      longint unsigned key;
      key = longint'(w) * 256 + d[i];
      if (dict.exists(key)) begin
        w = dict[key];
      end else begin
        out.push_back(w);
        if (next < DICT_SIZE) begin dict[key] = next; next++; end
        w = d[i];
      end
    end
    out.push_back(w);
    return out;
  endfunction

  // kind 0: uniform bytes; 1: four-letter alphabet; 2: long runs; 3: text-like
  function automatic bytes_t make_data(input int kind, input int n);
    bytes_t d;
    for (int i = 0; i < n; i++) begin
      case (kind)
        0: d.push_back(byte'($urandom));
        1: d.push_back(byte'("a" + $urandom_range(0, 3)));
        2: d.push_back(byte'((((i / 37) % 2) != 0) ? "x" : "y"));
        default: d.push_back(byte'("a" + (($urandom_range(0, 9) < 7) ? (i % 5) : $urandom_range(0, 25))));
      endcase
    end
    return d;
  endfunction
endpackage
