// enc_sender: output stage of the encoder.
//
// It forwards the packet module's 16-bit words to DATA with SEND high for one
// clock each. Once the monitor reports `over` (the end codeword has been
// handed to the packet module) and fewer than 16 bits remain, it sends the
// remaining bits as one last zero-padded word and tells the packet module to
// clear them (take_res). FINISH is high from the first active input until the
// last word has gone out and low afterwards, matching the document's "low
// level of FINISH means the encoding task is finished"; before the first
// input it is low as well. Registered outputs.
module enc_sender
  import lzss_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              acti,
  input  logic              word_valid,
  input  logic [WORD_W-1:0] word,
  input  logic              over,
  input  logic [5:0]        res,
  input  logic [WORD_W-1:0] res_word,
  output logic              take_res,
  output logic [WORD_W-1:0] data,
  output logic              send,
  output logic              finish
);
  logic busy;
  assign take_res = over && busy && !word_valid && (res != '0) && (res < 6'd16);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data <= '0; send <= 1'b0; finish <= 1'b0; busy <= 1'b0;
    end else begin
      send <= 1'b0;
      if (acti && !over) begin
        busy   <= 1'b1;
        finish <= 1'b1;
      end
      if (word_valid) begin
        data <= word;
        send <= 1'b1;
      end else if (take_res) begin
        data <= res_word;
        send <= 1'b1;
      end else if (over && busy && res == '0) begin
        busy   <= 1'b0;
        finish <= 1'b0;
      end
    end
  end
endmodule
