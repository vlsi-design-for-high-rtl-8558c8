// tb_enc_sender: output stage sequencing.
//
// Drives the sender's inputs as the packet module and monitor would: a few
// full words, then `over` with a 7-bit residue, then an empty residue. Checks
// that every word appears on DATA with SEND for one clock, that the residue
// word is sent once and only after a pending full word, that take_res is
// raised exactly then, and that FINISH is high while busy and falls at the end.
module tb_enc_sender;
  import lzss_pkg::*;

  logic clk = 0, rst_n = 1;
  logic acti = 0, word_valid = 0, over = 0;
  logic [WORD_W-1:0] word = 0, res_word = 0;
  logic [5:0] res = 0;
  logic take_res, send, finish;
  logic [WORD_W-1:0] data;

  enc_sender dut (.clk, .rst_n, .acti, .word_valid, .word, .over, .res, .res_word,
                  .take_res, .data, .send, .finish);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;         // reset edge before the first clock edge

  int checks = 0, failures = 0;

  task automatic expect_out(input bit s, input logic [15:0] d, input bit f);
    #1;
    checks++;
    if (send != s || (s && data != d) || finish != f) begin
      failures++;
      $display("%t send %b data %h finish %b, expected %b %h %b", $time, send, data, finish,
               s, d, f);
    end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    expect_out(0, 0, 0);
    acti <= 1;
    @(posedge clk);
    expect_out(0, 0, 1);
    for (int i = 0; i < 3; i++) begin
      word_valid <= 1; word <= 16'hA000 + 16'(i);
      @(posedge clk);
      expect_out(1, 16'hA000 + 16'(i), 1);
    end
    word_valid <= 0; acti <= 0;
    @(posedge clk);
    expect_out(0, 0, 1);
    // end: a full word is still pending and 7 bits remain
    over <= 1; word_valid <= 1; word <= 16'h1234; res <= 6'd7; res_word <= 16'hBE00;
    #1;
    checks++;
    if (take_res) failures++;           // not while a word is being sent
    @(posedge clk);
    expect_out(1, 16'h1234, 1);
    word_valid <= 0;
    #1;
    checks++;
    if (!take_res) failures++;
    @(posedge clk);
    expect_out(1, 16'hBE00, 1);
    res <= 0;
    @(posedge clk);
    expect_out(0, 0, 0);
    @(posedge clk);
    expect_out(0, 0, 0);
    checks++;
    if (take_res) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
