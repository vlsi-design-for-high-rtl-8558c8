// tb_lzss_pkg: test helpers shared by the LZSS testbenches.
//
// gen_text   makes a test stream: words drawn from a small vocabulary (many
//            repeats, near and far), runs of one character longer than the
//            longest match (overlapping copies and length splits) and stretches
//            of random bytes (literals).
// ref_codes / ref_monitor / ref_encode: a timing-free model of the encoder's parse: for every
//            character it walks the cells from the first stage to the last,
//            applying the group-code rules (Table 1, eqns. 1-2) to the nine
//            paths of each cell, then applies the monitor's rules. It returns
//            the codeword list, each as {len, value}.
// pack       concatenates codewords MSB first into 16-bit words, zero padded.
// sw_decode  parses a word stream into characters without any RTL.
package tb_lzss_pkg;
  import lzss_pkg::*;

  typedef struct { int unsigned len; int unsigned val; } cwr_t;

  function automatic void gen_text(ref byte unsigned q[$], input int n, input int unsigned seed,
                                   input int alpha);
    string vocab [8] = '{"group", "Group", "the", "NOT", "roup", "END", "of", "data"};
    int unsigned s = seed;
    q.delete();
    while (q.size() < n) begin
      s = s * 1103515245 + 12345;
      case ((s >> 16) % 10)
        0: begin      // run of one character
          int len = 10 + int'((s >> 8) % 50);
          byte unsigned c = byte'("a" + (s >> 4) % alpha);
          repeat (len) q.push_back(c);
        end
        1, 2: begin   // random bytes
          int len = 1 + int'((s >> 8) % 6);
          for (int i = 0; i < len; i++) begin
            s = s * 1103515245 + 12345;
            q.push_back(byte'(s >> 16));
          end
        end
        default: begin
          string w = vocab[(s >> 8) % 8];
          for (int i = 0; i < w.len(); i++) q.push_back(w[i]);
          q.push_back(byte'(" "));
        end
      endcase
    end
    while (q.size() > n) void'(q.pop_back());
  endfunction

  // group code and offset that the last cell gives for every character
  function automatic void ref_codes(input byte unsigned q[$], input int n_cells,
                                    ref bit [1:0] codes[$], ref int unsigned offs[$]);
    bit st [][9];
    int L = q.size();
    st = new[n_cells];
    foreach (st[k, j]) st[k][j] = 0;
    codes.delete();
    offs.delete();
    for (int t = 0; t < L; t++) begin
      bit [1:0] cu = 2'b00;
      int unsigned ou = 0;
      for (int k = n_cells - 1; k >= 0; k--) begin
        bit l [8]; bit cont [9]; bit strt [9]; bit l1, l0; int unsigned o;
        for (int j = 0; j < 8; j++) begin
          int d = 8 * k + j + 1;
          l[j] = (t >= d) && (q[t] == q[t-d]);
        end
        l1 = 0; l0 = 0;
        for (int j = 0; j < 8; j++) begin
          cont[j] = st[k][j] && l[j];
          strt[j] = l[j];
          l1 |= cont[j]; l0 |= l[j];
        end
        cont[8] = st[k][8] && (cu == 2'b11);
        strt[8] = cu[0];
        l1 |= cont[8]; l0 |= cu[0];
        for (int j = 0; j < 9; j++) st[k][j] = l1 ? cont[j] : strt[j];
        o = 0;
        if (st[k][8]) o = ou;
        for (int j = 7; j >= 0; j--) if (st[k][j]) o = 8 * k + j;
        cu = {l1, l0};
        ou = o;
      end
      codes.push_back(cu);
      offs.push_back(ou);
    end
  endfunction

  // the monitor's rules applied to a code stream; ends with the end codeword
  function automatic void ref_monitor(input byte unsigned q[$], input bit [1:0] codes[$],
                                      input int unsigned offs[$], ref cwr_t cws[$]);
    bit p_v = 0; int p_len = 0; int unsigned p_off = 0; byte unsigned p_c = 0;
    cws.delete();
    for (int t = 0; t < q.size(); t++) begin
      if (p_v && codes[t] == 2'b11 && p_len != MAX_LEN) begin
        p_len++; p_off = offs[t];
      end else begin
        if (p_v) begin
          if (p_len > P_CHARS) cws.push_back('{17, (1 << 16) | (p_off << 5) | p_len});
          else                 cws.push_back('{9, p_c});
        end
        p_v = 1; p_len = 1; p_off = offs[t]; p_c = q[t];
      end
    end
    if (p_v) begin
      if (p_len > P_CHARS) cws.push_back('{17, (1 << 16) | (p_off << 5) | p_len});
      else                 cws.push_back('{9, p_c});
    end
    cws.push_back('{17, 1 << 16});
  endfunction

  function automatic void ref_encode(input byte unsigned q[$], input int n_cells,
                                     ref cwr_t cws[$]);
    bit [1:0] codes [$];
    int unsigned offs [$];
    ref_codes(q, n_cells, codes, offs);
    ref_monitor(q, codes, offs, cws);
  endfunction

  function automatic void pack(input cwr_t cws[$], ref logic [15:0] words[$]);
    bit b [$];
    words.delete();
    foreach (cws[i])
      for (int k = int'(cws[i].len) - 1; k >= 0; k--) b.push_back(cws[i].val[k]);
    while (b.size() % 16 != 0) b.push_back(0);
    for (int i = 0; i < b.size(); i += 16) begin
      logic [15:0] w;
      for (int k = 0; k < 16; k++) w[15-k] = b[i+k];
      words.push_back(w);
    end
  endfunction

  // returns 1 when the stream parsed cleanly up to its end codeword
  function automatic bit sw_decode(input logic [15:0] words[$], ref byte unsigned out[$],
                                   output int n_ptr, output int n_lit, output int n_overlap,
                                   output int n_maxlen, output int max_dist);
    bit b [$];
    int pos = 0;
    out.delete();
    n_ptr = 0; n_lit = 0; n_overlap = 0; n_maxlen = 0; max_dist = 0;
    foreach (words[i]) for (int k = 15; k >= 0; k--) b.push_back(words[i][k]);
    forever begin
      int unsigned v = 0;
      if (pos >= b.size()) return 0;
      if (b[pos] == 0) begin
        if (pos + 9 > b.size()) return 0;
        for (int k = 1; k < 9; k++) v = (v << 1) | b[pos+k];
        out.push_back(byte'(v));
        n_lit++;
        pos += 9;
      end else begin
        int unsigned off, len;
        int d;
        if (pos + 17 > b.size()) return 0;
        for (int k = 1; k < 17; k++) v = (v << 1) | b[pos+k];
        pos += 17;
        off = v >> 5; len = v & 31;
        if (len == 0) return (off == 0);
        d = int'(off) + 1;
        if (d > out.size()) return 0;
        if (d < int'(len)) n_overlap++;
        if (len == MAX_LEN) n_maxlen++;
        if (d > max_dist) max_dist = d;
        n_ptr++;
        for (int k = 0; k < int'(len); k++) out.push_back(out[out.size() - d]);
      end
    end
  endfunction
endpackage
