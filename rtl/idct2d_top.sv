// idct2d_top: low-power 8x8 2-D inverse DCT, X = C^T Z C, built from two
// multiply-accumulate 1-D stages without a transposition memory.
//
// Data flow:
//   in stream -> coef_block_buffer (Z, 64 words)
//             -> stage 1 (8 MAC lanes): row i of T = C^T Z, lane j walks down
//                column j of Z with constants C[k][i]
//             -> t_row_buffer (one row of T, 8 words)
//             -> stage 2 (8 MAC lanes): row i of X = T[i][.] C
//             -> out rows
// Stage 1 computes row i+1 of T while stage 2 computes row i of X, so the two
// transforms run in parallel and only one row of T is ever stored. Every MAC
// lane masks zero data (zero_mask) and then neither starts its radix-4
// multiplier (booth_mult) nor spends a multiply time on the term.
//
// Interface: 'in_*' is a valid/ready stream of 12-bit signed coefficients
// Z[0][0], Z[0][1], ... Z[7][7] (row-major); it is not ready while a block is
// being transformed by stage 1. 'out_*' delivers the 8 rows of X in order, one
// row of eight 9-bit samples per handshake, with the row number; a row is
// held until 'out_ready'. Stage 1 waits when the T row buffer is still in use
// and stage 2 waits for 'out_ready'.
//
// Timing depends on the data: a lane spends 1 clock on a zero term and 6 on a
// non-zero term, and a row takes as long as its slowest lane; an all-zero
// block costs 8 clocks per row and stage.
//
// Row-column decomposition, the removal of the transposition memory, zero
// masking of the input coefficients and the radix-4 serial multiplier follow
// the original architecture. Masking zero elements of T in stage 2 as well is
// this design's extension (the same lane is used in both stages). The number of
// lanes per stage (one per output column), the word widths, rounding,
// saturation of the output to 9 bits, and all handshakes are this design's
// own choices.
module idct2d_top
  import idct_pkg::*;
#(
  parameter int unsigned DW   = DATA_W,     // input coefficient width
  parameter int unsigned CW   = COEF_W,     // constant width
  parameter int unsigned FRAC = COEF_FRAC,  // constant scaling 2^FRAC
  parameter int unsigned TW   = T_W,        // intermediate (T) width
  parameter int unsigned OW   = OUT_W       // output sample width
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic signed [DW-1:0]        in_data,
  output logic                        out_valid,
  input  logic                        out_ready,
  output logic [IDX_W-1:0]            out_row_idx,
  output logic signed [N-1:0][OW-1:0] out_row
);

  // Input block buffer
  logic                         z_full, z_release;
  logic [N-1:0][IDX_W-1:0]      s1_rd_k;
  logic signed [N-1:0][DW-1:0]  s1_rd_data;

  // Stage 1
  logic                         s1_start, s1_busy, s1_res_valid, s1_ack;
  logic [IDX_W-1:0]             s1_res_row;
  logic signed [N-1:0][TW-1:0]  s1_res;
  logic [IDX_W:0]               s1_next_q;   // next row of T to start, N = all started

  // T row buffer
  logic                         t_full, t_wr, t_release;
  logic [IDX_W-1:0]             t_row;
  logic [N-1:0][IDX_W-1:0]      s2_rd_k;
  logic signed [N-1:0][TW-1:0]  s2_rd_data;

  // Stage 2
  logic                         s2_start, s2_busy, s2_res_valid;
  logic                         s2_reading_q;  // stage 2 still reads the T row

  coef_block_buffer #(.W(DW)) u_zbuf (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data,
    .full        (z_full),
    .release_blk (z_release),
    .rd_k        (s1_rd_k),
    .rd_data     (s1_rd_data)
  );

  idct_stage #(.DW(DW), .CW(CW), .FRAC(FRAC), .OW(TW), .CONST_BY_ROW(1'b1)) u_s1 (
    .clk, .rst_n,
    .start      (s1_start),
    .row        (s1_next_q[IDX_W-1:0]),
    .busy       (s1_busy),
    .res_row    (s1_res_row),
    .rd_k       (s1_rd_k),
    .rd_data    (s1_rd_data),
    .res_valid  (s1_res_valid),
    .res        (s1_res),
    .res_ack    (s1_ack),
    .zero_skip  (),
    .mult_start (),
    .sat_event  ()
  );

  t_row_buffer #(.W(TW)) u_trow (
    .clk, .rst_n,
    .wr_en       (t_wr),
    .wr_row      (s1_res_row),
    .wr_data     (s1_res),
    .full        (t_full),
    .row         (t_row),
    .release_row (t_release),
    .rd_k        (s2_rd_k),
    .rd_data     (s2_rd_data)
  );

  idct_stage #(.DW(TW), .CW(CW), .FRAC(FRAC), .OW(OW), .CONST_BY_ROW(1'b0)) u_s2 (
    .clk, .rst_n,
    .start      (s2_start),
    .row        (t_row),
    .busy       (s2_busy),
    .res_row    (out_row_idx),
    .rd_k       (s2_rd_k),
    .rd_data    (s2_rd_data),
    .res_valid  (s2_res_valid),
    .res        (out_row),
    .res_ack    (out_ready),
    .zero_skip  (),
    .mult_start (),
    .sat_event  ()
  );

  // Stage-1 sequencing: start rows 0..N-1 of a full block one after another,
  // hand each finished row to the T buffer when it is free, and free the input
  // block once its last row of T has been handed over.
  assign s1_start  = z_full && !s1_busy && (s1_next_q < (IDX_W+1)'(N));
  assign t_wr      = s1_res_valid && !t_full;
  assign s1_ack    = t_wr;
  assign z_release = t_wr && (s1_res_row == IDX_W'(N - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         s1_next_q <= '0;
    else if (z_release) s1_next_q <= '0;
    else if (s1_start)  s1_next_q <= s1_next_q + 1'b1;
  end

  // Stage-2 sequencing: start on a newly loaded T row, release the row as soon
  // as all lanes have read their terms (result ready), before the output
  // handshake completes.
  assign s2_start  = t_full && !s2_busy && !s2_reading_q;
  assign t_release = s2_reading_q && s2_res_valid;
  assign out_valid = s2_res_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         s2_reading_q <= 1'b0;
    else if (s2_start)  s2_reading_q <= 1'b1;
    else if (t_release) s2_reading_q <= 1'b0;
  end

endmodule
