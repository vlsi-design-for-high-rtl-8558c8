// lzss_pkg: types and constants shared by the LZSS encoder and decoder.
//
// The window holds 2^OFF_W characters. A compressed codeword (pointer) is
// {flag=1, offset[OFF_W-1:0], length[LEN_W-1:0]} = 17 bits, an uncompressed
// codeword (literal) is {flag=0, char[7:0]} = 9 bits. The offset field holds
// distance-1, so field value 8k+i names the i-th comparator of encoding cell
// k and field value 2n / 2n+1 the two copy positions of decoding cell n.
// Length holds the match length directly (2..MAX_LEN); length 0 with offset 0
// is the end-of-stream codeword. The 11-bit offset (2K window, 256 cells of
// 8 offsets) and the 17-bit pointer follow the document; the 5-bit length
// field, the end codeword and the bit order (first codeword in the MSBs of the
// first 16-bit word) are this design's choices.
package lzss_pkg;
  localparam int unsigned CHAR_W  = 8;
  localparam int unsigned OFF_W   = 11;
  localparam int unsigned LEN_W   = 5;
  localparam int unsigned MAX_LEN = (1 << LEN_W) - 1;
  localparam int unsigned PTR_W   = 1 + OFF_W + LEN_W;   // 17
  localparam int unsigned LIT_W   = 1 + CHAR_W;          // 9
  localparam int unsigned CW_LW   = 5;                   // width of a codeword-length value
  localparam int unsigned WORD_W  = 16;
  // smallest match worth a pointer: a pointer costs about as much as P_CHARS literals
  localparam int unsigned P_CHARS = 1;

  // group code of a character (Fig. 5): 00 no group, 01 group leader, 11 member
  typedef enum logic [1:0] {
    GC_NONE   = 2'b00,
    GC_LEADER = 2'b01,
    GC_MEMBER = 2'b11
  } gcode_t;

  // a character with its valid bit, as it travels through the arrays
  typedef struct packed {
    logic              v;
    logic [CHAR_W-1:0] c;
  } vchar_t;

  // one codeword as the decoder's frontend hands it on
  typedef struct packed {
    logic              flag;   // 1 pointer, 0 literal
    logic [OFF_W-1:0]  off;
    logic [LEN_W-1:0]  len;
    logic [CHAR_W-1:0] c;
  } dcw_t;

  // one output position as it travels through the decoding array
  typedef struct packed {
    logic              v;      // active
    logic              done;   // character already known
    logic [OFF_W-1:0]  off;
    logic [CHAR_W-1:0] c;
  } dtok_t;
endpackage
