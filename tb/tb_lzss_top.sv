// tb_lzss_top: end-to-end test of the whole system at its default size
// (256 encoding cells, 1024 decoding cells, 2048-character window).
//
// A 6000-character stream is coded by the encoder one character per clock;
// its 16-bit words are queued and fed to the decoder, which is offered a word
// only in about two clocks of three so that it also runs out of input and
// stalls. Checks: the decoder returns exactly the input; a software decode of
// the encoder's words returns the input; the words equal those of the
// timing-free parse model; the encoder takes one character per clock; the
// decoder gives one character per clock while it has input. Each mechanism of
// the design is counted and must occur at least once: pointers, literals,
// overlapping copies, maximum-length splits, a match found only by a cell
// other than the last (passed down the chain), a codeword pair that makes
// the packet hold two words at once (Out_again), the residual-word flush and
// a decoder stall.
module tb_lzss_top;
  import lzss_pkg::*;
  import tb_lzss_pkg::*;

  localparam int L = 6000;

  logic clk = 0, rst_n = 1;
  logic acti = 0;
  logic [7:0] sin = 0;
  logic [7:0] sout;
  logic a0;
  logic [1:0] l0;
  logic [OFF_W-1:0] off0;
  vchar_t dout;
  logic [15:0] data;
  logic send, finish;
  logic [15:0] dec_word;
  logic dec_in_valid, dec_in_ready, dec_char_valid, dec_done, dec_err;
  logic [7:0] dec_char;

  lzss_top dut (
    .clk, .rst_n,
    .enc_mode(1'b1), .enc_acti(acti), .enc_sin(sin), .enc_sinc('0), .enc_din('0),
    .enc_codein(2'b00), .enc_offin('0), .enc_index('0),
    .enc_sout(sout), .enc_a0(a0), .enc_l0(l0), .enc_off0(off0), .enc_dout(dout),
    .enc_data(data), .enc_send(send), .enc_finish(finish),
    .dec_word, .dec_in_valid, .dec_in_ready, .dec_char, .dec_char_valid,
    .dec_done, .dec_err
  );

  always #5 clk = ~clk;
  initial #1 rst_n = 0;         // reset edge before the first clock edge

  int checks = 0, failures = 0;
  byte unsigned in_q [$], sw_q [$];
  cwr_t exp_cw [$];
  logic [15:0] exp_w [$], got_w [$], fifo [$];
  int n_out = 0, n_again = 0, n_flush = 0, n_stall = 0, n_far = 0, n_runs = 0;
  int run = 0, max_run = 0;
  int unsigned lfsr = 32'h1234_5678;

  // encoder side: collect words; count two-word residues, flushes and pointers
  // whose offset comes from a cell other than the last
  always @(posedge clk) begin
    if (send) begin
      got_w.push_back(data);
      fifo.push_back(data);
    end
    if (dut.u_enc.u_packet.out_again) n_again++;
    if (dut.u_enc.u_sender.take_res) n_flush++;
    if (dut.u_enc.u_monitor.cw_valid && dut.u_enc.u_monitor.cw[16] &&
        dut.u_enc.u_monitor.cw[15:5] >= 11'd8) n_far++;
  end

  // decoder side: feed words two clocks in three, check characters
  always @(posedge clk) begin
    lfsr <= {lfsr[30:0], lfsr[31] ^ lfsr[21] ^ lfsr[1] ^ lfsr[0]};
    if (dec_in_valid && dec_in_ready) void'(fifo.pop_front());
    if (dec_char_valid) begin
      checks++;
      if (n_out >= L || dec_char != in_q[n_out]) begin
        failures++;
        if (failures < 10) $display("decoded char %0d: %h", n_out, dec_char);
      end
      n_out++;
      run++;
      if (run > max_run) max_run = run;
    end else begin
      if (run > 0) n_runs++;
      run = 0;
    end
    if (dut.u_dec.tok.v == 0 && !dut.u_dec.end_seen && n_out > 0) n_stall++;
    if (dec_err) begin
      checks++; failures++;
    end
  end
  always_comb begin
    dec_in_valid = (fifo.size() > 0) && (lfsr[1:0] != 2'b00);
    dec_word     = (fifo.size() > 0) ? fifo[0] : 16'h0;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired: out %0d fifo %0d words %0d exp %0d fe_cnt %0d end %0d", n_out, fifo.size(), got_w.size(), exp_w.size(), dut.u_dec.u_frontend.cnt, dut.u_dec.end_seen, "  enc: fin %0d over %0d res %0d st %0d", finish, dut.u_enc.u_monitor.over, dut.u_enc.u_packet.res, dut.u_enc.u_monitor.st);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic need(input string what, input int count);
    checks++;
    $display("%-28s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("mechanism never happened: %s", what);
    end
  endtask

  initial begin
    int np, nl, nov, nmax, md, t_in;
    gen_text(in_q, L, 11, 4);
    ref_encode(in_q, 256, exp_cw);
    pack(exp_cw, exp_w);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    t_in = 0;
    for (int i = 0; i < L; i++) begin
      acti <= 1; sin <= in_q[i];
      @(posedge clk);
      t_in++;
    end
    acti <= 0;
    checks++;
    if (t_in != L) failures++;   // one character per clock, no back-pressure
    wait (dec_done == 1);
    repeat (3) @(posedge clk);
    checks++;
    if (n_out != L) begin
      failures++;
      $display("decoder gave %0d characters, expected %0d", n_out, L);
    end
    checks++;
    if (!sw_decode(got_w, sw_q, np, nl, nov, nmax, md) || sw_q != in_q) begin
      failures++;
      $display("software decode of the encoder output differs from the input");
    end
    checks++;
    if (got_w != exp_w) begin
      failures++;
      $display("encoder words differ from the parse model (%0d vs %0d)",
               got_w.size(), exp_w.size());
    end
    checks++;
    if (finish != 0) failures++;
    need("pointers", np);
    need("literals", nl);
    need("overlapping copies", nov);
    need("max-length splits", nmax);
    need("offsets from inner cells", n_far);
    need("two words held (Out_again)", n_again);
    need("residual flush", n_flush);
    need("decoder stall clocks", n_stall);
    checks++;
    // with its input available the decoder gives one character per clock
    if (max_run < 20) failures++;
    $display("longest run of one character per clock: %0d, farthest distance %0d", max_run, md);
    $display("compressed %0d chars into %0d words (%0d bits)", L, got_w.size(), 16 * got_w.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
