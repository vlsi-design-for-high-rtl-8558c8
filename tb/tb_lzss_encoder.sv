// tb_lzss_encoder: encoder chip against the timing-free parse model.
//
// A 4-cell encoder (32-character window) codes a 1500-character stream fed
// one character per clock. Checks: every codeword from the monitor equals the
// model's, in order; the 16-bit words on DATA equal the model's codewords
// packed MSB first; a software decode of DATA gives back the input; the first
// codeword appears at the expected latency; FINISH falls at the end.
module tb_lzss_encoder;
  import lzss_pkg::*;
  import tb_lzss_pkg::*;

  localparam int N = 4;
  localparam int L = 1500;

  logic clk = 0, rst_n = 1;
  logic mode = 1, acti = 0;
  logic [7:0] sin = 0;
  vchar_t sinc = '0, din = '0;
  logic [7:0] sout;
  logic a0;
  logic [1:0] l0;
  logic [OFF_W-1:0] off0;
  vchar_t dout;
  logic [15:0] data;
  logic send, finish;

  lzss_encoder #(.N_CELLS(N)) dut (
    .clk, .rst_n, .mode, .acti, .sin, .sinc, .din, .codein(2'b00), .offin('0),
    .index('0), .sout, .a0, .l0, .off0, .dout, .data, .send, .finish
  );

  always #5 clk = ~clk;
  initial #1 rst_n = 0;         // reset edge before the first clock edge

  int checks = 0, failures = 0;
  byte unsigned in_q [$], dec_q [$];
  cwr_t exp_cw [$];
  logic [15:0] exp_w [$], got_w [$];
  int cw_idx = 0, cyc = 0, first_cw_cyc = -1;
  bit started = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.u_monitor.cw_valid) begin
      if (first_cw_cyc < 0) first_cw_cyc = cyc;
      if (cw_idx < exp_cw.size()) begin
        checks++;
        if (dut.u_monitor.cw_len != exp_cw[cw_idx].len ||
            32'(dut.u_monitor.cw) != exp_cw[cw_idx].val) begin
          failures++;
          if (failures < 10)
            $display("cw %0d: got len %0d val %h, expected len %0d val %h", cw_idx,
                     dut.u_monitor.cw_len, dut.u_monitor.cw, exp_cw[cw_idx].len,
                     exp_cw[cw_idx].val);
        end
      end else begin
        checks++; failures++;
      end
      cw_idx++;
    end
    if (send) got_w.push_back(data);
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int np, nl, nov, nmax, md;
    int t0;
    gen_text(in_q, L, 7, 3);
    ref_encode(in_q, N, exp_cw);
    pack(exp_cw, exp_w);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    t0 = cyc;
    for (int i = 0; i < L; i++) begin
      acti <= 1; sin <= in_q[i];
      @(posedge clk);
    end
    acti <= 0;
    @(posedge clk);
    // the first character enters the array one clock after acti;
    // it is a 4N+4 clock trip to the aligned output and one more to the monitor
    wait (finish == 0);
    repeat (5) @(posedge clk);
    checks++;
    if (cw_idx != exp_cw.size()) begin
      failures++;
      $display("codeword count %0d, expected %0d", cw_idx, exp_cw.size());
    end
    checks++;
    if (got_w.size() != exp_w.size()) begin
      failures++;
      $display("word count %0d, expected %0d", got_w.size(), exp_w.size());
    end
    foreach (exp_w[i]) if (i < got_w.size()) begin
      checks++;
      if (got_w[i] !== exp_w[i]) failures++;
    end
    checks++;
    if (!sw_decode(got_w, dec_q, np, nl, nov, nmax, md) || dec_q != in_q) begin
      failures++;
      $display("software decode of DATA does not give the input back");
    end
    // latency: input register 1, array 4N+4, the second character closes the
    // first group (1), monitor register 1, sampling edge 1
    checks++;
    if (first_cw_cyc - t0 != 4 * N + 8) begin
      failures++;
      $display("first codeword after %0d clocks", first_cw_cyc - t0);
    end
    $display("pointers %0d literals %0d overlaps %0d maxlen %0d words %0d for %0d chars",
             np, nl, nov, nmax, got_w.size(), L);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
