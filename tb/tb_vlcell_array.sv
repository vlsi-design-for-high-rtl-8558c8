// tb_vlcell_array: 4-cell array against the timing-free parse model.
//
// The array's own character output is wrapped back as its dictionary. A
// 2000-character stream is written at s_in one per clock; 4N+4 clocks later
// char_al, code_out and off_out must give that character, the group code and
// the offset that the model computes for it.
module tb_vlcell_array;
  import lzss_pkg::*;
  import tb_lzss_pkg::*;

  localparam int N = 4;
  localparam int L = 2000;
  localparam int LAT = 4 * N + 4;

  logic clk = 0, rst_n = 1;
  vchar_t s_in, s_out, char_al, d_out;
  logic [1:0] code_out;
  logic [OFF_W-1:0] off_out;

  vlcell_array #(.N_CELLS(N)) dut (
    .clk, .rst_n, .index('0), .s_in, .code_in(2'b00), .off_in('0), .d_in(s_out),
    .s_out, .code_out, .off_out, .char_al, .d_out
  );

  always #5 clk = ~clk;
  initial #1 rst_n = 0;         // reset edge before the first clock edge

  int checks = 0, failures = 0, cyc = 0, n_member = 0, n_leader = 0;
  byte unsigned in_q [$];
  bit [1:0] codes [$];
  int unsigned offs [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_in = '0;
    gen_text(in_q, L, 3, 2);
    ref_codes(in_q, N, codes, offs);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (cyc = 0; cyc < L + LAT + 2; cyc++) begin
      s_in <= (cyc < L) ? '{v: 1'b1, c: in_q[cyc]} : '0;
      @(posedge clk);
      #1;
      if (cyc - LAT + 1 >= 0 && cyc - LAT + 1 < L) begin
        int t;
        t = cyc - LAT + 1;
        checks++;
        if (!char_al.v || char_al.c != in_q[t] || code_out != codes[t] ||
            (codes[t] != 2'b00 && 32'(off_out) != offs[t])) begin
          failures++;
          if (failures < 10)
            $display("t=%0d: got %b %h code %b off %0d, expected %h code %b off %0d", t,
                     char_al.v, char_al.c, code_out, off_out, in_q[t], codes[t], offs[t]);
        end
        if (code_out == 2'b11) n_member++;
        if (code_out == 2'b01) n_leader++;
      end
    end
    checks++;
    if (n_member == 0 || n_leader == 0) failures++;
    $display("leaders %0d members %0d", n_leader, n_member);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
