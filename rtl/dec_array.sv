// dec_array: the systolic array of decoding cells.
//
// Tokens enter at the first stage, cell N_CELLS-1, and leave from cell 0
// N_CELLS enabled clocks later with their character filled in. Cell 0's
// result is also written into its own S register, so the decoded characters
// wrap around and flow back through all cells; N_CELLS cells reach back
// 2*N_CELLS characters, which is the encoder's window (1024 cells for 2K by
// default). The whole array moves only when en is high, so gaps in the token
// stream do not change the distances. out_stb is high in the clock after an
// enabled clock; tok_out is then a new result. err flags an output token
// whose offset named no cell. One extra S register beyond the first stage
// gives that cell its second copy position (distance 2*N_CELLS).
module dec_array
  import lzss_pkg::*;
#(
  parameter int unsigned N_CELLS = 1 << (OFF_W - 1),
  parameter int unsigned CELL_W  = OFF_W - 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  dtok_t tok_in,
  output dtok_t tok_out,
  output logic  out_stb,
  output logic  err
);
  dtok_t             t_q   [N_CELLS];
  dtok_t             t_res [N_CELLS];
  logic [CHAR_W-1:0] s_q   [N_CELLS];
  logic [CHAR_W-1:0] s_far;            // S register beyond the first stage

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  s_far <= '0;
    else if (en) s_far <= s_q[N_CELLS-1];
  end

  for (genvar n = 0; n < N_CELLS; n++) begin : g_cell
    dtok_t             t_in;
    logic [CHAR_W-1:0] s_up, s_in;
    if (n == N_CELLS - 1) begin : g_first
      assign t_in = tok_in;
      assign s_up = s_far;
    end else begin : g_mid
      assign t_in = t_q[n+1];
      assign s_up = s_q[n+1];
    end
    if (n == 0) begin : g_last
      assign s_in = t_res[0].c;
    end else begin : g_inner
      assign s_in = s_q[n-1];
    end
    dec_cell #(.CELL_W(CELL_W)) u_cell (
      .clk, .rst_n, .en,
      .cell_no (CELL_W'(n)),
      .tok_in  (t_in),
      .s_up    (s_up),
      .s_in    (s_in),
      .tok_out (t_q[n]),
      .s_q     (s_q[n]),
      .tok_res (t_res[n])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_stb <= 1'b0;
    else        out_stb <= en;
  end

  assign tok_out = t_q[0];
  assign err     = out_stb && t_q[0].v && !t_q[0].done;
endmodule
