// t_row_buffer: the single row of the intermediate matrix T passed from the
// first 1-D stage to the second.
//
// Because stage 1 produces T one complete row at a time and stage 2 needs
// exactly one row of T to produce one row of X (X[i][.] = T[i][.] C), no
// transposition memory for the whole of T is needed: N words are enough.
// 'wr_en' loads a row (and its index) and sets 'full'; 'release_row' clears
// it when stage 2 has finished reading. Stage 2 lanes read it through N
// combinational ports, rd_data[j] = T[row][rd_k[j]]. Writing while full is an
// error (checked by an assertion).
//
// The one-row hand-over follows the design's removal of the transposition
// memory; the full/release handshake is this design's own.
module t_row_buffer
  import idct_pkg::*;
#(
  parameter int unsigned W = T_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [IDX_W-1:0]           wr_row,
  input  logic signed [N-1:0][W-1:0] wr_data,
  output logic                       full,
  output logic [IDX_W-1:0]           row,
  input  logic                       release_row,
  input  logic [N-1:0][IDX_W-1:0]    rd_k,
  output logic signed [N-1:0][W-1:0] rd_data
);

  logic signed [N-1:0][W-1:0] t_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= 1'b0;
      row  <= '0;
      t_q  <= '0;
    end else if (wr_en) begin
      full <= 1'b1;
      row  <= wr_row;
      t_q  <= wr_data;
    end else if (release_row) begin
      full <= 1'b0;
    end
  end

  always_comb begin
    for (int j = 0; j < N; j++) rd_data[j] = t_q[rd_k[j]];
  end

  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> !full);

endmodule
