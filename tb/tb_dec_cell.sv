// tb_dec_cell: decoding cell number 5 (copy distances 11 and 12).
//
// Loads its S register, then offers tokens. A waiting token with offset field
// 10 must take S_5, one with field 11 must take S_6 (s_up), any other offset,
// an already known token and an inactive token must pass unchanged. With en
// low the registers must hold. A random phase then checks 400 tokens, S
// values and enables against a model of the cell.
module tb_dec_cell;
  import lzss_pkg::*;

  logic clk = 0, rst_n = 1, en = 0;
  dtok_t tok_in, tok_out, tok_res;
  logic [7:0] s_up, s_in, s_q;

  dec_cell dut (.clk, .rst_n, .en, .cell_no(10'd5), .tok_in, .s_up, .s_in, .tok_out, .s_q,
                .tok_res);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;         // reset edge before the first clock edge

  int checks = 0, failures = 0;

  task automatic step(input dtok_t t, input dtok_t exp_out);
    tok_in <= t;
    @(posedge clk);
    #1;
    checks++;
    if (tok_out != exp_out) begin
      failures++;
      $display("in %p out %p expected %p", t, tok_out, exp_out);
    end
  endtask

  dtok_t t, exp_tok, tok_m;
  logic [7:0] s_m;
  logic en_r;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tok_in = '0; s_up = 8'h66; s_in = 8'h55;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    en <= 1;
    @(posedge clk);               // S_5 <= 0x55
    s_in <= 8'h77;
    step('{1'b1, 1'b0, 11'd10, 8'h00}, '{1'b1, 1'b1, 11'd10, 8'h55});
    checks++;
    if (s_q != 8'h77) failures++;
    step('{1'b1, 1'b0, 11'd11, 8'h00}, '{1'b1, 1'b1, 11'd11, 8'h66});
    step('{1'b1, 1'b0, 11'd12, 8'h00}, '{1'b1, 1'b0, 11'd12, 8'h00});
    step('{1'b1, 1'b0, 11'd9,  8'h00}, '{1'b1, 1'b0, 11'd9,  8'h00});
    step('{1'b1, 1'b1, 11'd10, 8'h41}, '{1'b1, 1'b1, 11'd10, 8'h41});
    step('{1'b0, 1'b0, 11'd10, 8'h00}, '{1'b0, 1'b0, 11'd10, 8'h00});
    en <= 0;
    s_in <= 8'h99;
    step('{1'b1, 1'b0, 11'd10, 8'h00}, '{1'b0, 1'b0, 11'd10, 8'h00});
    checks++;
    if (s_q != 8'h77) failures++;

    // random phase: model holds tok_out and s_q
    tok_m = tok_out;
    s_m   = s_q;
    for (int i = 0; i < 400; i++) begin
      t      = dtok_t'({$urandom, $urandom});
      case ($urandom_range(3))
        0: t.off = 11'd10;
        1: t.off = 11'd11;
        default: ;
      endcase
      en_r = ($urandom_range(4) != 0);
      s_up = 8'($urandom);     // blocking: we are 1 time unit after an edge
      s_in = 8'($urandom);
      en   = en_r;
      exp_tok = t;
      if (t.v && !t.done && t.off == 11'd10) begin
        exp_tok.c = s_m; exp_tok.done = 1'b1;
      end else if (t.v && !t.done && t.off == 11'd11) begin
        exp_tok.c = s_up; exp_tok.done = 1'b1;
      end
      if (en_r) begin
        tok_m = exp_tok;
        s_m   = s_in;
      end
      step(t, tok_m);
      checks++;
      if (s_q != s_m) begin
        failures++;
        $display("s_q %h expected %h", s_q, s_m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
