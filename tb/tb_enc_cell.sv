// tb_enc_cell: one encoding cell used as a 1-cell array (8-character window).
//
// The testbench supplies the round-robin slot counter, wraps the cell's own
// character output back into its dictionary and keeps the four dictionary
// registers of the missing preceding cell. For a 3000-character stream it
// checks that the character leaves S[ptr] four clocks after it was written and
// that the group code and offset four clocks later equal the model's.
module tb_enc_cell;
  import lzss_pkg::*;
  import tb_lzss_pkg::*;

  localparam int L = 3000;

  logic clk = 0, rst_n = 1;
  logic [1:0] ptr;
  vchar_t s_up, s_out;
  vchar_t d_up [4];
  vchar_t d_regs [4];
  logic [1:0] code_out;
  logic [OFF_W-1:0] off_out;

  enc_cell dut (
    .clk, .rst_n, .ptr, .cell_no('0), .s_up, .code_up(2'b00), .off_up('0),
    .d_in(s_out), .d_up, .s_out, .code_out, .off_out, .d_regs
  );

  always #5 clk = ~clk;
  initial #1 rst_n = 0;         // reset edge before the first clock edge

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0;
      for (int j = 0; j < 4; j++) d_up[j] <= '0;
    end else begin
      ptr <= ptr + 2'd1;
      d_up[0] <= d_regs[3];
      for (int j = 1; j < 4; j++) d_up[j] <= d_up[j-1];
    end
  end

  int checks = 0, failures = 0, n_member = 0;
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
    int t;
    s_up = '0;
    gen_text(in_q, L, 5, 2);
    ref_codes(in_q, 1, codes, offs);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int cyc = 0; cyc < L + 10; cyc++) begin
      s_up <= (cyc < L) ? '{v: 1'b1, c: in_q[cyc]} : '0;
      @(posedge clk);
      #1;
      t = cyc - 3;
      if (t >= 0 && t < L) begin
        checks++;
        if (!s_out.v || s_out.c != in_q[t]) failures++;
      end
      t = cyc - 7;
      if (t >= 0 && t < L) begin
        checks++;
        if (code_out != codes[t] || (codes[t] != 2'b00 && 32'(off_out) != offs[t])) begin
          failures++;
          if (failures < 10) $display("t=%0d code %b off %0d, expected %b %0d", t, code_out,
                                      off_out, codes[t], offs[t]);
        end
        if (code_out == 2'b11) n_member++;
      end
    end
    checks++;
    if (n_member == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
