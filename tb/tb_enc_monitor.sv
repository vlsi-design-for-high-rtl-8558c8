// tb_enc_monitor: the monitor fed with the model's group codes.
//
// Group codes and offsets of a 2-cell model for a 3000-character stream are
// driven one per clock, then the stream ends. The codewords must equal the
// model's (pointer/literal choice, length split at 31, end codeword) and
// `over` must rise after the end codeword.
module tb_enc_monitor;
  import lzss_pkg::*;
  import tb_lzss_pkg::*;

  localparam int L = 3000;

  logic clk = 0, rst_n = 1;
  vchar_t ch;
  logic [1:0] code;
  logic [OFF_W-1:0] off;
  logic cw_valid, over;
  logic [PTR_W-1:0] cw;
  logic [CW_LW-1:0] cw_len;

  enc_monitor dut (.clk, .rst_n, .ch, .code, .off, .cw_valid, .cw, .cw_len, .over);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;         // reset edge before the first clock edge

  int checks = 0, failures = 0, idx = 0, n_split = 0;
  byte unsigned in_q [$];
  bit [1:0] codes [$];
  int unsigned offs [$];
  cwr_t exp_cw [$];

  always @(posedge clk) if (cw_valid) begin
    checks++;
    if (idx >= exp_cw.size() || cw_len != exp_cw[idx].len || 32'(cw) != exp_cw[idx].val) begin
      failures++;
      if (failures < 10) $display("cw %0d: %0d %h", idx, cw_len, cw);
    end
    if (cw_len == 17 && cw[4:0] == 5'd31) n_split++;
    idx++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ch = '0; code = '0; off = '0;
    gen_text(in_q, L, 9, 3);
    ref_codes(in_q, 2, codes, offs);
    ref_monitor(in_q, codes, offs, exp_cw);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < L; t++) begin
      ch <= '{v: 1'b1, c: in_q[t]}; code <= codes[t]; off <= OFF_W'(offs[t]);
      @(posedge clk);
    end
    ch <= '0; code <= '0; off <= '0;
    repeat (6) @(posedge clk);
    checks++;
    if (idx != exp_cw.size()) failures++;
    checks++;
    if (!over) failures++;
    checks++;
    if (n_split == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
