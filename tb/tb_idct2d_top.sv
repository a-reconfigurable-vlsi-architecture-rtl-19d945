// tb_idct2d_top: end-to-end test of the 8x8 2-D IDCT at its default sizes.
//
// Streams a sequence of coefficient blocks into the design with random gaps,
// takes the output rows with random back-pressure, and compares every sample
// with the bit-exact reference model (idct_ref_pkg::idct2d_int). Blocks range
// from all-zero, through blocks with a few low-frequency coefficients (the
// usual case in coded video), to dense full-range blocks whose outputs clip.
// For the sparse and moderate blocks (not the dense full-range ones, where
// the 8-bit constants limit accuracy) it also checks that the fixed-point
// result stays within ACC_TOL of X = C^T Z C computed in real arithmetic.
//
// It counts each mechanism of the design and fails if one never happens:
// zero-data skips, multiplier starts, stage 1 and stage 2 computing at the same
// time, stage 1 waiting for the T row buffer, input refused while a block is
// being transformed, output back-pressure and output saturation. It also
// checks that an all-zero block passes far faster than a dense one.
module tb_idct2d_top;
  import idct_ref_pkg::*;

  localparam int NBLK = 24;
  localparam real ACC_TOL = 3.0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  logic signed [11:0] in_data = '0;
  logic [2:0] out_row_idx;
  logic signed [7:0][8:0] out_row;

  idct2d_top dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
                  .out_valid, .out_ready, .out_row_idx, .out_row);

  block_t  zin [NBLK];
  block_t  xexp [NBLK];
  rblock_t xreal [NBLK];
  int checks = 0, failures = 0;
  int n_skip = 0, n_mult = 0, n_overlap = 0, n_t_stall = 0, n_in_block = 0,
      n_out_bp = 0, n_sat = 0;
  int blocks_done = 0;
  longint cycle = 0;
  longint t_in_last [NBLK], t_out_last [NBLK];
  real max_err = 0.0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // Activity counters.
  always @(posedge clk) begin
    cycle++;
    if (rst_n) begin
      n_skip += $countones(dut.u_s1.zero_skip) + $countones(dut.u_s2.zero_skip);
      n_mult += $countones(dut.u_s1.mult_start) + $countones(dut.u_s2.mult_start);
      if (dut.u_s1.busy && !dut.u_s1.res_valid && dut.u_s2.busy && !dut.u_s2.res_valid)
        n_overlap++;
      if (dut.u_s1.res_valid && dut.u_trow.full) n_t_stall++;
      if (in_valid && !in_ready) n_in_block++;
      if (out_valid && !out_ready) n_out_bp++;
      if (dut.u_s2.sat_event) n_sat++;
    end
  end

  function automatic block_t make_block(input int b);
    block_t z;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) z[r][c] = 0;
    case (b % 6)
      0: ;                                               // all zero
      1: z[0][0] = int'($urandom_range(2047)) - 1024;    // DC only
      2, 3: begin                                        // few low-frequency terms
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3 - r; c++)
            if ($urandom_range(2) != 0) z[r][c] = int'($urandom_range(400)) - 200;
      end
      4: begin                                           // scattered, moderate
        for (int r = 0; r < 8; r++)
          for (int c = 0; c < 8; c++)
            if ($urandom_range(3) == 0) z[r][c] = int'($urandom_range(160)) - 80;
      end
      default: begin                                     // dense, full range
        for (int r = 0; r < 8; r++)
          for (int c = 0; c < 8; c++) z[r][c] = int'($urandom_range(4095)) - 2048;
      end
    endcase
    return z;
  endfunction

  // Producer
  initial begin
    for (int b = 0; b < NBLK; b++) begin
      zin[b]   = make_block(b);
      xexp[b]  = idct2d_int(zin[b], 16, 9);
      xreal[b] = idct2d_real(zin[b]);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NBLK; b++) begin
      automatic int n = 0;
      while (n < 64) begin
        in_valid = (b < 6) || ($urandom_range(4) != 0);
        in_data  = 12'(zin[b][n / 8][n % 8]);
        @(posedge clk);
        if (in_valid && in_ready) begin
          n++;
          if (n == 64) t_in_last[b] = cycle;
        end
        @(negedge clk);
      end
      in_valid = 1'b0;
    end
  end

  // Consumer
  initial begin
    automatic int b = 0, r = 0;
    @(posedge rst_n);
    while (b < NBLK) begin
      @(negedge clk);
      out_ready = (b < 6) || ($urandom_range(3) != 0);
      @(posedge clk);
      if (out_valid && out_ready) begin
        check(out_row_idx == 3'(r), $sformatf("block %0d row index %0d expected %0d", b, out_row_idx, r));
        for (int j = 0; j < 8; j++) begin
          int got;
          got = int'($signed(out_row[j]));
          check(got == xexp[b][r][j],
                $sformatf("block %0d X[%0d][%0d] = %0d expected %0d", b, r, j, got, xexp[b][r][j]));
          if (b % 6 != 5 && xreal[b][r][j] > -256.0 && xreal[b][r][j] < 255.0) begin
            real e;
            e = (real'(got) > xreal[b][r][j]) ? real'(got) - xreal[b][r][j] : xreal[b][r][j] - real'(got);
            if (e > max_err) max_err = e;
            check(e <= ACC_TOL, $sformatf("block %0d X[%0d][%0d] = %0d, exact %f", b, r, j, got, xreal[b][r][j]));
          end
        end
        if (r == 7) begin
          t_out_last[b] = cycle;
          r = 0; b++;
          blocks_done = b;
        end else r++;
      end
    end
    repeat (5) @(negedge clk);
    check(!out_valid, "no extra output rows");
    // Block 0 is all zero, block 5 dense; both streamed without gaps.
    $display("latency after last input word: zero block %0d clocks, dense block %0d clocks",
             t_out_last[0] - t_in_last[0], t_out_last[5] - t_in_last[5]);
    check(t_out_last[0] - t_in_last[0] < 120, "all-zero block is fast");
    check(t_out_last[5] - t_in_last[5] > 8 * 49, "dense block needs the full multiply time");
    $display("max error against the exact transform (sparse blocks): %f", max_err);
    $display("events: skips=%0d mults=%0d overlap=%0d t_stall=%0d in_refused=%0d out_bp=%0d sat=%0d",
             n_skip, n_mult, n_overlap, n_t_stall, n_in_block, n_out_bp, n_sat);
    check(n_skip > 0, "zero skip happened");
    check(n_mult > 0, "multiply happened");
    check(n_overlap > 0, "stages overlapped");
    check(n_t_stall > 0, "stage 1 waited for the T row buffer");
    check(n_in_block > 0, "input refused while busy");
    check(n_out_bp > 0, "output back-pressure");
    check(n_sat > 0, "output saturation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired after %0d blocks", blocks_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
