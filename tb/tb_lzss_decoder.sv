// tb_lzss_decoder: a decoder with 8 cells (16-character window) decoding a
// stream made by the 2-cell parse model.
//
// 3000 characters are coded by the model and packed into words, which are
// offered with random gaps. The decoder must return the characters in order,
// raise `done` after the end codeword, never raise err, and run one
// character per clock once it has a codeword.
module tb_lzss_decoder;
  import lzss_pkg::*;
  import tb_lzss_pkg::*;

  localparam int L = 3000;

  logic clk = 0, rst_n = 1;
  logic [15:0] word;
  logic in_valid, in_ready, char_valid, done, err;
  logic [7:0] char_out;

  lzss_decoder #(.N_CELLS(8)) dut (.clk, .rst_n, .word, .in_valid, .in_ready, .char_out,
                                   .char_valid, .done, .err);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;         // reset edge before the first clock edge

  int checks = 0, failures = 0, oi = 0, wi = 0;
  bit go = 0;
  byte unsigned in_q [$];
  cwr_t cws [$];
  logic [15:0] words [$];
  int unsigned lfsr = 32'h2468_ACE1;

  always @(posedge clk) lfsr <= {lfsr[30:0], lfsr[31] ^ lfsr[21] ^ lfsr[1] ^ lfsr[0]};
  always_comb begin
    in_valid = go && wi < words.size() && lfsr[2:0] != 0;
    word     = (wi < words.size()) ? words[wi] : 16'h0;
  end

  always @(posedge clk) begin
    if (in_valid && in_ready) wi <= wi + 1;
    if (char_valid) begin
      checks++;
      if (oi >= L || char_out != in_q[oi]) begin
        failures++;
        if (failures < 10) $display("char %0d: %h expected %h", oi, char_out, in_q[oi]);
      end
      oi++;
    end
    if (err) begin
      checks++; failures++;
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gen_text(in_q, L, 21, 3);
    ref_encode(in_q, 2, cws);
    pack(cws, words);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    go <= 1;
    wait (done);
    repeat (3) @(posedge clk);
    checks++;
    if (oi != L) begin
      failures++;
      $display("%0d characters out of %0d", oi, L);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
