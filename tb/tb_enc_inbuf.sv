// tb_enc_inbuf: input registers and mode select.
//
// Random inputs for 500 clocks with the mode changing at random. One clock
// later the outputs must hold SIN with ACTI as valid and zero code/offset in
// normal mode, or SINC, CODEIN and OFFIN in cascade mode; DIN always.
module tb_enc_inbuf;
  import lzss_pkg::*;

  logic clk = 0, rst_n = 1;
  logic mode, acti, mode_q;
  logic [7:0] sin;
  vchar_t sinc, din, s_q, d_q;
  logic [1:0] codein, code_q;
  logic [OFF_W-1:0] offin, off_q;

  enc_inbuf dut (.clk, .rst_n, .mode, .acti, .sin, .sinc, .din, .codein, .offin,
                 .s_q, .d_q, .code_q, .off_q, .mode_q);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;         // reset edge before the first clock edge

  int checks = 0, failures = 0, n_mode0 = 0, n_mode1 = 0;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic m, a; logic [7:0] s; vchar_t sc, d; logic [1:0] c; logic [OFF_W-1:0] o;
    mode = 1; acti = 0; sin = 0; sinc = '0; din = '0; codein = 0; offin = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 500; i++) begin
      m = 1'($urandom); a = 1'($urandom); s = 8'($urandom); sc = 9'($urandom);
      d = 9'($urandom); c = 2'($urandom); o = OFF_W'($urandom);
      mode <= m; acti <= a; sin <= s; sinc <= sc; din <= d; codein <= c; offin <= o;
      @(posedge clk);
      #1;
      checks++;
      if (m) begin
        n_mode1++;
        if (s_q != '{v: a, c: s} || code_q != 0 || off_q != 0 || d_q != d || !mode_q) failures++;
      end else begin
        n_mode0++;
        if (s_q != sc || code_q != c || off_q != o || d_q != d || mode_q) failures++;
      end
    end
    checks++;
    if (n_mode0 == 0 || n_mode1 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
