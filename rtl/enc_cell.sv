// enc_cell: one encoding cell of the wrap systolic array.
//
// Characters to be coded move left to right through four storage registers
// S0..S3; already-coded characters (the dictionary) move right to left
// through four dictionary registers D0..D3, one register per clock. A
// character stays four clocks in a cell, so the storage, group-code (L0..L3)
// and offset (O0..O3) registers are written round-robin under the shared
// two-bit slot pointer `ptr`: only one of the four is written per clock.
//
// Each clock the cell takes the character in S[ptr] (the one that entered four
// clocks ago) and compares it with its own D0..D3 and with the preceding
// cell's D0..D3, giving eight match bits l0..l7 for the distances 8k+1..8k+8
// (offset field 8k+i). A ninth path, lk, is the group code that the preceding
// cell produced for the same character. Nine state registers q0..q8 remember
// which paths belong to the current group; with that, eqns. (1) and (2) of the
// document give the new group code
//     L[1] = OR_i(l_i & q_i) | (q_k & member_k)      (the group goes on)
//     L[0] = OR_i(l_i)       | lk[0]                 (something matches)
// and the next state follows Table 1: a path that is in the group stays in it
// while it matches; when no path goes on, every matching path starts a new
// group. No counter or magnitude comparator is needed.
// The offset sent on with the code is that of the lowest-numbered local path
// in the new state, else the preceding cell's offset.
//
// Interface: s_up/code_up/off_up are the preceding cell's S[ptr]/L[ptr]/O[ptr];
// s_out/code_out/off_out are this cell's, read by the next cell. d_in feeds
// D0 from the right-hand neighbour, d_regs exposes D0..D3 to the next cell to
// the right. All outputs are registers; one character is processed per clock.
//
// Follows the document: register structure, eight comparators, Table 1 and
// eqns. (1)-(2), offset 8k+i. This design's choices: the preceding cell's path
// continues only on its member code 11 (a leader code 01 from it only starts a
// group), the offset is formed in the same clock as the code rather than one
// clock later, and valid bits travel with every character.
module enc_cell
  import lzss_pkg::*;
#(
  parameter int unsigned CELL_W = OFF_W - 3      // width of the cell number
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [1:0]        ptr,
  input  logic [CELL_W-1:0] cell_no,
  input  vchar_t            s_up,
  input  logic [1:0]        code_up,
  input  logic [OFF_W-1:0]  off_up,
  input  vchar_t            d_in,
  input  vchar_t            d_up [4],
  output vchar_t            s_out,
  output logic [1:0]        code_out,
  output logic [OFF_W-1:0]  off_out,
  output vchar_t            d_regs [4]
);
  vchar_t           s_r [4];
  logic [1:0]       l_r [4];
  logic [OFF_W-1:0] o_r [4];
  vchar_t           d_r [4];
  logic [8:0]       q;

  vchar_t           cur;
  logic [7:0]       l;
  logic [8:0]       cont, start, q_next;
  logic [1:0]       code;
  logic [OFF_W-1:0] off;

  always_comb begin
    cur = s_r[ptr];
    for (int j = 0; j < 4; j++) begin
      l[j]   = cur.v && d_r[j].v  && (cur.c == d_r[j].c);
      l[j+4] = cur.v && d_up[j].v && (cur.c == d_up[j].c);
    end
    cont  = {q[8] && (code_up == GC_MEMBER), q[7:0] & l};
    start = {code_up[0], l};
    code  = {|cont, |start};
    q_next = code[1] ? cont : start;
    off = '0;
    if (q_next[8]) off = off_up;
    for (int j = 7; j >= 0; j--)
      if (q_next[j]) off = {cell_no, 3'(j)};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
      for (int j = 0; j < 4; j++) begin
        s_r[j] <= '0;
        l_r[j] <= '0;
        o_r[j] <= '0;
        d_r[j] <= '0;
      end
    end else begin
      q        <= q_next;
      s_r[ptr] <= s_up;
      l_r[ptr] <= code;
      o_r[ptr] <= off;
      d_r[0]   <= d_in;
      for (int j = 1; j < 4; j++) d_r[j] <= d_r[j-1];
    end
  end

  assign s_out    = s_r[ptr];
  assign code_out = l_r[ptr];
  assign off_out  = o_r[ptr];
  assign d_regs   = d_r;
endmodule
