// enc_monitor: turns the group codes of the last encoding cell into LZSS
// codewords.
//
// Every clock it receives one character with its group code (00 none, 01
// leader, 11 member) and offset. It keeps the group being collected as
// "pending": its first character, its length so far and the newest offset
// reported for it. A member code lengthens the pending group; any other code
// closes it and starts a new one with this character. A closed group longer
// than P_CHARS characters is sent as a pointer {1, offset, length}; otherwise
// its character is sent as a literal {0, char}. A group that reaches MAX_LEN
// is closed and its next member starts a new group: every offset reported
// during a group is valid back to the group's leader, so the rest is still a
// match at the newest offset. When the character stream ends (valid drops)
// the pending group is sent, then the end codeword {1, 0, 0}, then `over`
// rises and stays high until reset.
//
// Interface: cw is right-aligned in 17 bits, cw_len is 9 or 17, cw_valid marks
// a codeword; at most one codeword per clock, registered. The pointer/literal
// rule and the pending length follow the document; the end codeword, the
// MAX_LEN split and the choice P_CHARS = 1 (a 17-bit pointer is cheaper than
// two 9-bit literals) are this design's.
module enc_monitor
  import lzss_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  vchar_t              ch,
  input  logic [1:0]          code,
  input  logic [OFF_W-1:0]    off,
  output logic                cw_valid,
  output logic [PTR_W-1:0]    cw,
  output logic [CW_LW-1:0]    cw_len,
  output logic                over
);
  typedef enum logic [1:0] {M_IDLE, M_RUN, M_END, M_OVER} mstate_t;
  mstate_t           st;
  logic              p_v;
  logic [LEN_W-1:0]  p_len;
  logic [OFF_W-1:0]  p_off;
  logic [CHAR_W-1:0] p_c;

  logic              grow;
  logic [PTR_W-1:0]  pend_cw;
  logic [CW_LW-1:0]  pend_len;

  always_comb begin
    grow = p_v && ch.v && (code == GC_MEMBER) && (p_len != LEN_W'(MAX_LEN));
    if (p_len > LEN_W'(P_CHARS)) begin
      pend_cw  = {1'b1, p_off, p_len};
      pend_len = CW_LW'(PTR_W);
    end else begin
      pend_cw  = PTR_W'({1'b0, p_c});
      pend_len = CW_LW'(LIT_W);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= M_IDLE; p_v <= 1'b0; p_len <= '0; p_off <= '0; p_c <= '0;
      cw_valid <= 1'b0; cw <= '0; cw_len <= '0; over <= 1'b0;
    end else begin
      cw_valid <= 1'b0;
      unique case (st)
        M_IDLE, M_RUN: begin
          if (ch.v) st <= M_RUN;
          else if (st == M_RUN) st <= M_END;
          if (grow) begin
            p_len <= p_len + 1'b1;
            p_off <= off;
          end else begin
            if (p_v) begin
              cw_valid <= 1'b1;
              cw       <= pend_cw;
              cw_len   <= pend_len;
            end
            p_v   <= ch.v;
            p_len <= LEN_W'(1);
            p_off <= off;
            p_c   <= ch.c;
          end
        end
        M_END: begin
          cw_valid <= 1'b1;
          cw       <= '0;
          cw[PTR_W-1] <= 1'b1;
          cw_len   <= CW_LW'(PTR_W);
          st       <= M_OVER;
        end
        M_OVER: over <= 1'b1;
        default: st <= M_IDLE;
      endcase
    end
  end
endmodule
