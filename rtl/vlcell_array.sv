// vlcell_array: the VLcell block, a chain of N_CELLS encoding cells.
//
// Cell N_CELLS-1 is the first stage and cell 0 the last. A character written
// at s_in in clock t is compared in cell k in clock t+4+4(N_CELLS-1-k), and
// the last cell's group code and offset for it appear at code_out/off_out in
// clock t+4N_CELLS+4, together with the character itself at char_al. The
// dictionary enters cell 0 at d_in and flows towards the first stage; four
// extra dictionary registers beyond the first stage serve as its "preceding
// cell" so that every cell sees eight distances. Cell k covers distances
// 8(index+k)+1 .. 8(index+k)+8, so one array of N_CELLS cells holds a window
// of 8*N_CELLS characters.
//
// For a single array the dictionary is the array's own output wrapped back:
// connect d_in to s_out. For a cascade, s_out/code_out/off_out feed the next
// array's s_in/code_in/off_in and that array's d_out feeds this one's d_in
// (through one register, see lzss_encoder); index numbers the cells across
// arrays. A 2-bit round-robin counter, shared by all cells, picks the storage
// slot. The document's default is 256 cells (Table 2, 2K window); the cascade
// wiring details are this design's.
module vlcell_array
  import lzss_pkg::*;
#(
  parameter int unsigned N_CELLS = 256,
  parameter int unsigned CELL_W  = OFF_W - 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CELL_W-1:0] index,
  input  vchar_t            s_in,
  input  logic [1:0]        code_in,
  input  logic [OFF_W-1:0]  off_in,
  input  vchar_t            d_in,
  output vchar_t            s_out,
  output logic [1:0]        code_out,
  output logic [OFF_W-1:0]  off_out,
  output vchar_t            char_al,
  output vchar_t            d_out
);
  logic [1:0]       ptr;
  vchar_t           s_c    [N_CELLS];
  logic [1:0]       code_c [N_CELLS];
  logic [OFF_W-1:0] off_c  [N_CELLS];
  vchar_t           d_c    [N_CELLS][4];
  vchar_t           e_r    [4];
  vchar_t           al_r   [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0;
      for (int j = 0; j < 4; j++) begin
        e_r[j]  <= '0;
        al_r[j] <= '0;
      end
    end else begin
      ptr       <= ptr + 2'd1;
      e_r[0]    <= d_c[N_CELLS-1][3];
      for (int j = 1; j < 4; j++) e_r[j] <= e_r[j-1];
      al_r[ptr] <= s_c[0];
    end
  end

  for (genvar k = 0; k < N_CELLS; k++) begin : g_cell
    vchar_t           s_up;
    logic [1:0]       code_up;
    logic [OFF_W-1:0] off_up;
    vchar_t           d_r_in;
    vchar_t           d_up [4];
    if (k == N_CELLS - 1) begin : g_first
      assign s_up    = s_in;
      assign code_up = code_in;
      assign off_up  = off_in;
      assign d_up    = e_r;
    end else begin : g_mid
      assign s_up    = s_c[k+1];
      assign code_up = code_c[k+1];
      assign off_up  = off_c[k+1];
      assign d_up    = d_c[k+1];
    end
    if (k == 0) begin : g_last
      assign d_r_in = d_in;
    end else begin : g_inner
      assign d_r_in = d_c[k-1][3];
    end
    enc_cell #(.CELL_W(CELL_W)) u_cell (
      .clk      (clk),
      .rst_n    (rst_n),
      .ptr      (ptr),
      .cell_no  (CELL_W'(index + CELL_W'(k))),
      .s_up     (s_up),
      .code_up  (code_up),
      .off_up   (off_up),
      .d_in     (d_r_in),
      .d_up     (d_up),
      .s_out    (s_c[k]),
      .code_out (code_c[k]),
      .off_out  (off_c[k]),
      .d_regs   (d_c[k])
    );
  end

  assign s_out    = s_c[0];
  assign code_out = code_c[0];
  assign off_out  = off_c[0];
  assign char_al  = al_r[ptr];
  assign d_out    = d_c[N_CELLS-1][1];
endmodule
