// enc_packet: packs variable-length codewords into 16-bit output words.
//
// A 48-bit register holds the bits not yet sent, left-aligned, with `res`
// counting them (the residue). Each clock a new codeword (9 or 17 bits,
// right-aligned at cw) is first left-aligned (the document's MUX1, steered by
// the codeword length) and then shifted right by the residue (the barrel
// shifter) and ORed under the bits already held. When 16 or more bits are
// held the top 16 are latched into the output word register (W2) and
// word_valid is raised one clock later. Residue plus a 17-bit codeword can
// reach 32 bits, two words; the second is sent in the next clock (the
// document's Out_again), which is why the register is wider than 32 bits.
//
// take_res (from the sender, only while res < 16 and no codeword arrives)
// clears the residue after its bits have been taken from res_word, which is
// the held bits padded with zeros on the right. First codeword bit goes out
// first (MSB of the first word). The 48-bit register, in place of the
// document's separate W1/W2/W3 registers, is this design's choice.
module enc_packet
  import lzss_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                cw_valid,
  input  logic [PTR_W-1:0]    cw,
  input  logic [CW_LW-1:0]    cw_len,
  input  logic                take_res,
  output logic                word_valid,
  output logic [WORD_W-1:0]   word,
  output logic [5:0]          res,
  output logic [WORD_W-1:0]   res_word,
  output logic                full,
  output logic                out_again
);
  localparam int unsigned BW = 48;
  logic [BW-1:0] bits, b1, cwl;
  logic [5:0]    r1;

  assign full      = (res >= 6'd16);
  assign out_again = (res >= 6'd32);
  assign res_word  = bits[BW-1 -: WORD_W];

  always_comb begin
    b1 = full ? (bits << WORD_W) : bits;
    r1 = full ? (res - 6'd16) : res;
    if (take_res) begin
      b1 = '0;
      r1 = '0;
    end
    cwl = '0;
    if (cw_valid) begin
      cwl = {cw << (CW_LW'(PTR_W) - cw_len), {(BW - PTR_W){1'b0}}};
      b1  = b1 | (cwl >> r1);
      r1  = r1 + 6'(cw_len);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits <= '0; res <= '0; word <= '0; word_valid <= 1'b0;
    end else begin
      bits       <= b1;
      res        <= r1;
      word_valid <= full;
      if (full) word <= bits[BW-1 -: WORD_W];
    end
  end

  // the residue can never exceed the register
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  cw_valid |-> (32'(r1) <= BW));
  a_take_res: assert property (@(posedge clk) disable iff (!rst_n)
                               take_res |-> (!full && !cw_valid));
endmodule
