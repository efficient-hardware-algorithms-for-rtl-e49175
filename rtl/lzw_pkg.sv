// lzw_pkg: constants and the dictionary entry type shared by the LZW
// compressor and decompressor.
//
// A dictionary entry for code k >= 2**CHAR_W is the pair (prefix code, last
// character): the string of k is the string of the prefix code followed by
// the character. Codes below 2**CHAR_W stand for the single characters
// themselves and are never stored. The 8-bit characters and the 12-bit
// (4096-entry) code space are this implementation's choice of the usual LZW
// sizes.
package lzw_pkg;
  parameter int unsigned CHAR_W     = 8;
  parameter int unsigned CODE_W     = 12;
  parameter int unsigned DICT_SIZE  = 1 << CODE_W;
  parameter int unsigned FIRST_CODE = 1 << CHAR_W;

  typedef struct packed {
    logic [CODE_W-1:0] prefix;
    logic [CHAR_W-1:0] ch;
  } dict_entry_t;
endpackage
