// tb_lzss_cascade: two encoders of 2 cells each chained into one 32-character
// window.
//
// Chip A (MODE 1, INDEX 2) takes the characters and holds distances 17..32;
// chip B (MODE 0, INDEX 0) takes A's character, group code and offset, holds
// distances 1..16, wraps its own output as dictionary and feeds its DOUT to
// A's DIN. B's codewords must equal those of the 4-cell parse model, and a
// software decode of B's output must give the input back, with at least one
// pointer whose offset came from chip A.
module tb_lzss_cascade;
  import lzss_pkg::*;
  import tb_lzss_pkg::*;

  localparam int L = 1500;

  logic clk = 0, rst_n = 1;
  logic acti = 0;
  logic [7:0] sin = 0;
  logic [7:0] a_sout, b_sout;
  logic a_a0, b_a0, a_send, b_send, a_fin, b_fin;
  logic [1:0] a_l0, b_l0;
  logic [OFF_W-1:0] a_off0, b_off0;
  vchar_t a_dout, b_dout;
  logic [15:0] a_data, b_data;

  lzss_encoder #(.N_CELLS(2)) chip_a (
    .clk, .rst_n, .mode(1'b1), .acti, .sin, .sinc('0), .din(b_dout), .codein(2'b00),
    .offin('0), .index(8'd2), .sout(a_sout), .a0(a_a0), .l0(a_l0), .off0(a_off0),
    .dout(a_dout), .data(a_data), .send(a_send), .finish(a_fin)
  );

  lzss_encoder #(.N_CELLS(2)) chip_b (
    .clk, .rst_n, .mode(1'b0), .acti(1'b0), .sin('0), .sinc('{v: a_a0, c: a_sout}),
    .din('0), .codein(a_l0), .offin(a_off0), .index(8'd0), .sout(b_sout), .a0(b_a0),
    .l0(b_l0), .off0(b_off0), .dout(b_dout), .data(b_data), .send(b_send), .finish(b_fin)
  );

  always #5 clk = ~clk;
  initial #1 rst_n = 0;         // reset edge before the first clock edge

  int checks = 0, failures = 0, idx = 0, n_far = 0;
  byte unsigned in_q [$], dec_q [$];
  cwr_t exp_cw [$];
  logic [15:0] got_w [$];

  always @(posedge clk) if (rst_n) begin
    if (chip_b.u_monitor.cw_valid) begin
      checks++;
      if (idx >= exp_cw.size() || chip_b.u_monitor.cw_len != exp_cw[idx].len ||
          32'(chip_b.u_monitor.cw) != exp_cw[idx].val) begin
        failures++;
        if (failures < 10) $display("cw %0d: %0d %h expected %0d %h", idx,
                                    chip_b.u_monitor.cw_len, chip_b.u_monitor.cw,
                                    exp_cw[idx].len, exp_cw[idx].val);
      end
      if (chip_b.u_monitor.cw[16] && chip_b.u_monitor.cw[15:5] >= 11'd16) n_far++;
      idx++;
    end
    if (b_send) got_w.push_back(b_data);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int np, nl, nov, nmax, md;
    gen_text(in_q, L, 13, 3);
    ref_encode(in_q, 4, exp_cw);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < L; i++) begin
      acti <= 1; sin <= in_q[i];
      @(posedge clk);
    end
    acti <= 0;
    wait (b_fin == 1);
    wait (b_fin == 0);
    repeat (3) @(posedge clk);
    checks++;
    if (idx != exp_cw.size()) failures++;
    checks++;
    if (!sw_decode(got_w, dec_q, np, nl, nov, nmax, md) || dec_q != in_q) failures++;
    checks++;
    if (n_far == 0) failures++;
    $display("pointers from chip A %0d, farthest distance %0d", n_far, md);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
