// coef_block_buffer: holds one N x N block Z of input DCT coefficients.
//
// Write side: a valid/ready stream of coefficients in row-major order
// (Z[0][0], Z[0][1], ..., Z[N-1][N-1]). After N*N words the buffer is full:
// 'in_ready' drops and 'full' rises until 'release_blk' empties it again.
// Read side: N combinational ports, one per stage-1 lane; port j reads column
// j, rd_data[j] = Z[rd_k[j]][j], so every lane walks down its own column of Z.
// Storage is a register array, reset to zero.
//
// The column-wise reading follows the stage-1 organisation (a row of C^T times
// each column of Z); a single block buffer with this stream interface is this
// design's own choice: the intermediate matrix T needs no such buffer.
module coef_block_buffer
  import idct_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic signed [W-1:0]        in_data,
  output logic                       full,
  input  logic                       release_blk,
  input  logic [N-1:0][IDX_W-1:0]    rd_k,
  output logic signed [N-1:0][W-1:0] rd_data
);

  logic signed [W-1:0] mem_q [N][N];
  logic [IDX_W-1:0]    wr_row_q, wr_col_q;
  logic                wr;

  assign in_ready = !full;
  assign wr       = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full     <= 1'b0;
      wr_row_q <= '0;
      wr_col_q <= '0;
    end else if (wr) begin
      wr_col_q <= wr_col_q + 1'b1;
      if (wr_col_q == IDX_W'(N - 1)) begin
        wr_row_q <= wr_row_q + 1'b1;
        if (wr_row_q == IDX_W'(N - 1)) full <= 1'b1;
      end
    end else if (release_blk) begin
      full <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++)
          mem_q[r][c] <= '0;
    end else if (wr) begin
      mem_q[wr_row_q][wr_col_q] <= in_data;
    end
  end

  always_comb begin
    for (int j = 0; j < N; j++) rd_data[j] = mem_q[rd_k[j]][j];
  end

  assert property (@(posedge clk) disable iff (!rst_n) release_blk |-> full);

endmodule
