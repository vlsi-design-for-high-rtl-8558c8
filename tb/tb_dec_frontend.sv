// tb_dec_frontend: cutting a packed bit stream back into codewords.
//
// 2000 random literals and pointers plus the end codeword are packed into
// 16-bit words and offered with random gaps, while the consumer takes
// codewords with random back-pressure. Every codeword must come out once, in
// order, with the right flag and fields; nothing may come out after the end
// codeword although padding and an extra word follow it.
module tb_dec_frontend;
  import lzss_pkg::*;
  import tb_lzss_pkg::*;

  logic clk = 0, rst_n = 1;
  logic [15:0] word;
  logic in_valid, in_ready, cw_valid, cw_ready, ended;
  dcw_t cw;

  dec_frontend dut (.clk, .rst_n, .word, .in_valid, .in_ready, .cw, .cw_valid, .cw_ready, .ended);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;         // reset edge before the first clock edge

  int checks = 0, failures = 0, idx = 0, wi = 0, n_bp = 0;
  bit go = 0;
  cwr_t cws [$];
  logic [15:0] words [$];
  int unsigned lfsr = 32'h1357_9BDF;

  always @(posedge clk) lfsr <= {lfsr[30:0], lfsr[31] ^ lfsr[21] ^ lfsr[1] ^ lfsr[0]};
  always_comb begin
    in_valid = go && (wi < words.size()) && lfsr[0];
    word     = (wi < words.size()) ? words[wi] : 16'hFFFF;
    cw_ready = lfsr[4:3] != 2'b00;
  end

  always @(posedge clk) begin
    if (in_valid && in_ready) wi <= wi + 1;
    if (cw_valid && !cw_ready) n_bp++;
    if (cw_valid && cw_ready) begin
      int unsigned v;
      v = cw.flag ? {15'b0, 1'b1, cw.off, cw.len} : {23'b0, cw.c};
      checks++;
      if (idx >= cws.size() || v != cws[idx].val ||
          (cw.flag ? 17 : 9) != cws[idx].len) begin
        failures++;
        if (failures < 10) $display("cw %0d: %h", idx, v);
      end
      idx++;
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned r;
    for (int i = 0; i < 2000; i++) begin
      r = $urandom;
      if (r[0]) cws.push_back('{17, (1 << 16) | (r[31:21] << 5) | (r[20:16] | 5'd2)});
      else      cws.push_back('{9, r[31:24]});
    end
    cws.push_back('{17, 1 << 16});
    pack(cws, words);
    words.push_back(16'hFFFF);       // garbage after the end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    go <= 1;
    wait (wi == words.size() || ended);
    repeat (50) @(posedge clk);
    checks++;
    if (idx != cws.size() || !ended) failures++;
    checks++;
    if (n_bp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
