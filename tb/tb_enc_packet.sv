// tb_enc_packet: packing of random codewords into 16-bit words.
//
// 3000 random codewords (9-bit literals and 17-bit pointers, never two
// pointers in adjacent clocks, as the monitor guarantees) are driven with
// random idle clocks. At the end the residue is taken through res_word and
// take_res. The words must equal the codewords concatenated MSB first and
// zero padded; the two-word case (Out_again) must occur.
module tb_enc_packet;
  import lzss_pkg::*;
  import tb_lzss_pkg::*;

  logic clk = 0, rst_n = 1;
  logic cw_valid = 0, take_res, word_valid, full, out_again;
  logic [PTR_W-1:0] cw;
  logic [CW_LW-1:0] cw_len;
  logic [WORD_W-1:0] word, res_word;
  logic [5:0] res;

  enc_packet dut (.clk, .rst_n, .cw_valid, .cw, .cw_len, .take_res, .word_valid, .word,
                  .res, .res_word, .full, .out_again);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;         // reset edge before the first clock edge

  int checks = 0, failures = 0, n_again = 0;
  cwr_t cws [$];
  logic [15:0] exp_w [$], got_w [$];

  always @(posedge clk) begin
    if (word_valid) got_w.push_back(word);
    if (out_again) n_again++;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int drv = -1;                // index of the next codeword to drive
  int unsigned lfsr = 32'hACE1_2468;
  always @(posedge clk) begin
    lfsr <= {lfsr[30:0], lfsr[31] ^ lfsr[21] ^ lfsr[1] ^ lfsr[0]};
    cw_valid <= 1'b0;
    if (drv < 0 && rst_n && cws.size() > 0) drv <= 0;
    else if (drv >= 0 && drv < cws.size() && lfsr[2:0] != 3'b000) begin
      cw_valid <= 1'b1;
      cw       <= PTR_W'(cws[drv].val);
      cw_len   <= CW_LW'(cws[drv].len);
      drv      <= drv + 1;
    end
  end

  initial begin
    bit last_ptr;
    int unsigned r;
    cw = '0; cw_len = '0; take_res = 0;
    last_ptr = 0;
    for (int i = 0; i < 3000; i++) begin
      r = $urandom;
      if (!last_ptr && r[0]) cws.push_back('{17, r[31:15]});
      else                   cws.push_back('{9, r[31:23]});
      last_ptr = (cws[i].len == 17);
    end
    pack(cws, exp_w);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (drv == cws.size());
    repeat (6) @(posedge clk);
    if (res != 0) begin
      got_w.push_back(res_word);
      take_res <= 1;
      @(posedge clk);
      take_res <= 0;
    end
    @(posedge clk);
    checks++;
    if (res != 0) failures++;
    checks++;
    if (got_w.size() != exp_w.size()) failures++;
    foreach (exp_w[i]) if (i < got_w.size()) begin
      checks++;
      if (got_w[i] != exp_w[i]) failures++;
    end
    checks++;
    if (n_again == 0) failures++;
    $display("words %0d of %0d, two-word clocks %0d", got_w.size(), exp_w.size(), n_again);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
