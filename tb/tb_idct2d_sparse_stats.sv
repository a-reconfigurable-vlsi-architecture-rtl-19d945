// tb_idct2d_sparse_stats: activity of the IDCT on video-like coefficient
// blocks, at the default parameters.
//
// Generates 200 blocks whose coefficients thin out with frequency, as after
// quantisation in a video coder: Z[r][c] is non-zero with probability
// 90% / (1 + r + c)^2 and small in magnitude, so most blocks hold a DC term and
// a few low-frequency terms. Blocks stream back to back with no
// back-pressure. Every output sample is compared with the bit-exact reference
// model. The testbench reports the share of the 1024 multiply terms per block
// that the zero mask skipped, and the average clocks per block against a
// dense block (64 clocks to load it plus 8 rows x 50 clocks in stage 1, about
// 464). It fails if masking skipped less than half of the terms or if sparse
// blocks do not take at most 60% of the dense time.
module tb_idct2d_sparse_stats;
  import idct_ref_pkg::*;

  localparam int NBLK = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1;
  logic signed [11:0] in_data = '0;
  logic [2:0] out_row_idx;
  logic signed [7:0][8:0] out_row;

  idct2d_top dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
                  .out_valid, .out_ready, .out_row_idx, .out_row);

  block_t zin [NBLK];
  block_t xexp [NBLK];
  int checks = 0, failures = 0;
  longint n_skip = 0, n_mult = 0, cycle = 0, t_first = 0, t_last = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    cycle++;
    if (rst_n) begin
      n_skip += $countones(dut.u_s1.zero_skip) + $countones(dut.u_s2.zero_skip);
      n_mult += $countones(dut.u_s1.mult_start) + $countones(dut.u_s2.mult_start);
    end
  end

  initial begin
    for (int b = 0; b < NBLK; b++) begin
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) begin
          int p;
          p = 9000 / ((1 + r + c) * (1 + r + c));
          zin[b][r][c] = (int'($urandom_range(9999)) < p)
                       ? int'($urandom_range(120)) - 60 : 0;
        end
      zin[b][0][0] = int'($urandom_range(1000)) - 500;
      xexp[b] = idct2d_int(zin[b], 16, 9);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    t_first = cycle;
    for (int b = 0; b < NBLK; b++) begin
      automatic int n = 0;
      in_valid = 1'b1;
      while (n < 64) begin
        in_data = 12'(zin[b][n / 8][n % 8]);
        @(posedge clk);
        if (in_ready) n++;
        @(negedge clk);
      end
      in_valid = 1'b0;
    end
  end

  initial begin
    automatic int b = 0, r = 0;
    @(posedge rst_n);
    while (b < NBLK) begin
      @(posedge clk);
      if (out_valid) begin
        check(out_row_idx == 3'(r), "row order");
        for (int j = 0; j < 8; j++)
          check(int'($signed(out_row[j])) == xexp[b][r][j],
                $sformatf("block %0d X[%0d][%0d] = %0d expected %0d", b, r, j,
                          $signed(out_row[j]), xexp[b][r][j]));
        if (r == 7) begin r = 0; b++; end
        else r++;
      end
    end
    t_last = cycle;
    begin
      real skip_share, clk_per_blk;
      skip_share  = real'(n_skip) / real'(n_skip + n_mult);
      clk_per_blk = real'(t_last - t_first) / NBLK;
      $display("terms per block: %0.1f skipped, %0.1f multiplied (%0.1f%% skipped)",
               real'(n_skip) / NBLK, real'(n_mult) / NBLK, 100.0 * skip_share);
      $display("clocks per block: %0.1f (dense block: about 464)", clk_per_blk);
      check(n_skip + n_mult == longint'(NBLK) * 1024, "every term either skipped or multiplied");
      check(skip_share > 0.5, "zero mask skips most terms of video-like blocks");
      check(clk_per_blk < 0.6 * 464.0, "sparse blocks take at most 60% of the dense time");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
