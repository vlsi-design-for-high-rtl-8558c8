// tb_dec_array: an 8-cell decoding array (16-character reach).
//
// A 4000-character target is built at random: each character is either a
// literal or a copy from a random distance 1..16 (or as far back as exists).
// One token per character is offered, with random idle clocks in which the
// array is stalled. The characters must come out in order and equal the
// target, each N_CELLS enabled clocks after its token, and err must stay low.
module tb_dec_array;
  import lzss_pkg::*;

  localparam int N = 8;
  localparam int L = 4000;

  logic clk = 0, rst_n = 1, en, out_stb, err;
  dtok_t tok_in, tok_out;

  dec_array #(.N_CELLS(N)) dut (.clk, .rst_n, .en, .tok_in, .tok_out, .out_stb, .err);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;         // reset edge before the first clock edge

  int checks = 0, failures = 0, oi = 0, ti = 0, n_idle = 0, n_en = 0;
  bit go = 0;
  byte unsigned target [$];
  dtok_t toks [$];
  int en_at [$];
  int unsigned lfsr = 32'h0BAD_F00D;

  always @(posedge clk) lfsr <= {lfsr[30:0], lfsr[31] ^ lfsr[21] ^ lfsr[1] ^ lfsr[0]};

  // enabled clocks are counted so the latency can be checked in enabled clocks
  always_comb begin
    tok_in = (go && ti < L && lfsr[1:0] != 0) ? toks[ti] : '0;
    en     = tok_in.v || (go && ti >= L);
  end

  always @(posedge clk) begin
    if (en) n_en++;
    if (go && !en) n_idle++;
    if (tok_in.v) begin
      en_at.push_back(n_en + 1);
      ti++;
    end
    if (out_stb && tok_out.v) begin
      checks++;
      if (oi >= L || tok_out.c != target[oi] || !tok_out.done) begin
        failures++;
        if (failures < 10) $display("char %0d: %h expected %h", oi, tok_out.c, target[oi]);
      end
      checks++;
      // enabled clock edges from the token edge to the edge that shows the result
      if (n_en - (en ? 1 : 0) - en_at[oi] != N - 2) begin
        failures++;
        if (failures < 5) $display("latency %0d", n_en - en_at[oi]);
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
    tok_in = '0;
    for (int i = 0; i < L; i++) begin
      int d;
      if (i == 0 || $urandom_range(3) == 0) begin
        byte unsigned c;
        c = 8'($urandom);
        target.push_back(c);
        toks.push_back('{1'b1, 1'b1, '0, c});
      end else begin
        d = $urandom_range((i < 2 * N) ? i : 2 * N, 1);
        target.push_back(target[i - d]);
        toks.push_back('{1'b1, 1'b0, OFF_W'(d - 1), 8'h00});
      end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    go <= 1;
    wait (oi == L);
    repeat (3) @(posedge clk);
    checks++;
    if (n_idle == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
