// tb_dec_preproc: expansion of codewords into tokens.
//
// 1000 random codewords and the end codeword are offered. A literal must give
// one token carrying its character; a pointer of length n must give n tokens
// carrying its offset. With codewords always available there must be no idle
// clock between tokens: the number of clocks from the first to the last token
// must equal the number of tokens. end_seen must rise after the end codeword.
module tb_dec_preproc;
  import lzss_pkg::*;

  logic clk = 0, rst_n = 1;
  dcw_t cw;
  logic cw_valid, in_ready, end_seen;
  dtok_t tok;

  dec_preproc dut (.clk, .rst_n, .cw, .cw_valid, .in_ready, .tok, .end_seen);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;         // reset edge before the first clock edge

  int checks = 0, failures = 0, ci = 0, ti = 0, first = -1, last = -1, cyc = 0;
  bit go = 0;
  dcw_t cws [$];
  dtok_t exp_t [$];

  always_comb begin
    cw_valid = go && ci < cws.size();
    cw = (ci < cws.size()) ? cws[ci] : '0;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cw_valid && in_ready) ci <= ci + 1;
    if (tok.v) begin
      checks++;
      if (first < 0) first = cyc;
      last = cyc;
      if (ti >= exp_t.size() || tok != exp_t[ti]) begin
        failures++;
        if (failures < 10) $display("token %0d: %p", ti, tok);
      end
      ti++;
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dcw_t c;
    for (int i = 0; i < 1000; i++) begin
      c = '0;
      c.flag = 1'($urandom);
      if (c.flag) begin
        c.off = OFF_W'($urandom);
        c.len = LEN_W'($urandom_range(31, 2));
        for (int k = 0; k < int'(c.len); k++) exp_t.push_back('{1'b1, 1'b0, c.off, 8'h00});
      end else begin
        c.c = 8'($urandom);
        exp_t.push_back('{1'b1, 1'b1, '0, c.c});
      end
      cws.push_back(c);
    end
    c = '0; c.flag = 1; cws.push_back(c);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    go <= 1;
    wait (end_seen);
    repeat (5) @(posedge clk);
    checks++;
    if (ti != exp_t.size()) failures++;
    checks++;
    if (last - first + 1 != exp_t.size()) begin
      failures++;
      $display("tokens took %0d clocks for %0d tokens", last - first + 1, exp_t.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
