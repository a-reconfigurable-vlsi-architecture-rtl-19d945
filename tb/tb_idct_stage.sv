// tb_idct_stage: checks both configurations of a 1-D IDCT stage.
//
// s1 is a first stage (12-bit data, constants indexed by the row, 16-bit
// results): for random sparse blocks Z and every row i it must give row i of
// T = C^T Z. s2 is a second stage (16-bit data, constants indexed by the lane,
// 9-bit saturated results): fed with random rows of T, including large ones
// that must saturate, it must give T[i][.] C. Expected values come from the
// reference model in idct_ref_pkg. The clock count from the start edge to
// 'res_valid' must be 1 + the slowest lane's term costs (1 per zero term,
// 6 per non-zero term), and the result must hold until 'res_ack'.
module tb_idct_stage;
  import idct_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // stage-1 instance
  logic start1 = 1'b0, ack1 = 1'b0, busy1, valid1, sat1;
  logic [2:0] row1 = '0, res_row1;
  logic [7:0][2:0] rdk1;
  logic signed [7:0][11:0] rdd1;
  logic signed [7:0][15:0] res1;
  logic [7:0] zs1, ms1;

  // stage-2 instance
  logic start2 = 1'b0, ack2 = 1'b0, busy2, valid2, sat2;
  logic [2:0] row2 = '0, res_row2;
  logic [7:0][2:0] rdk2;
  logic signed [7:0][15:0] rdd2;
  logic signed [7:0][8:0] res2;
  logic [7:0] zs2, ms2;

  block_t z, t, tref;
  int trow [8];
  int checks = 0, failures = 0, n_sat = 0;

  idct_stage #(.DW(12), .CW(8), .FRAC(8), .OW(16), .CONST_BY_ROW(1'b1)) s1 (
    .clk, .rst_n, .start(start1), .row(row1), .busy(busy1), .res_row(res_row1),
    .rd_k(rdk1), .rd_data(rdd1), .res_valid(valid1), .res(res1), .res_ack(ack1),
    .zero_skip(zs1), .mult_start(ms1), .sat_event(sat1));

  idct_stage #(.DW(16), .CW(8), .FRAC(8), .OW(9), .CONST_BY_ROW(1'b0)) s2 (
    .clk, .rst_n, .start(start2), .row(row2), .busy(busy2), .res_row(res_row2),
    .rd_k(rdk2), .rd_data(rdd2), .res_valid(valid2), .res(res2), .res_ack(ack2),
    .zero_skip(zs2), .mult_start(ms2), .sat_event(sat2));

  always_comb begin
    for (int j = 0; j < 8; j++) begin
      rdd1[j] = 12'(z[rdk1[j]][j]);
      rdd2[j] = 16'(trow[rdk2[j]]);
    end
  end

  always @(posedge clk) if (sat2) n_sat++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 40; blk++) begin
      int pct;
      pct = (blk == 0) ? 0 : int'($urandom_range(95));
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++)
          z[r][c] = (int'($urandom_range(99)) < pct) ? 0 : int'($urandom_range(4095)) - 2048;
      tref = stage1(z, 16);
      for (int i = 0; i < 8; i++) begin
        int exp_cyc, cyc;
        exp_cyc = 0;
        for (int j = 0; j < 8; j++) begin
          automatic int lane = 0;
          for (int k = 0; k < 8; k++) lane += (z[k][j] == 0) ? 1 : 6;
          if (lane > exp_cyc) exp_cyc = lane;
        end
        exp_cyc += 1;
        @(negedge clk);
        row1 = 3'(i); start1 = 1'b1;
        @(negedge clk);
        start1 = 1'b0;
        cyc = 1;
        while (!valid1 && cyc < 100) begin @(negedge clk); cyc++; end
        check(cyc == exp_cyc, $sformatf("stage1 cycles %0d expected %0d", cyc, exp_cyc));
        repeat (int'($urandom_range(2))) @(negedge clk);
        check(valid1 && busy1 && res_row1 == 3'(i), "stage1 result held");
        for (int j = 0; j < 8; j++)
          check(int'($signed(res1[j])) == tref[i][j],
                $sformatf("T[%0d][%0d] = %0d expected %0d", i, j, $signed(res1[j]), tref[i][j]));
        ack1 = 1'b1;
        @(negedge clk);
        ack1 = 1'b0;
        check(!valid1 && !busy1, "stage1 released");
      end
    end
    // Second-stage configuration on random rows of T, some large enough to clip.
    for (int it = 0; it < 300; it++) begin
      int i, amp, cyc;
      i = int'($urandom_range(7));
      amp = (it % 4 == 0) ? 32767 : 600;
      for (int k = 0; k < 8; k++) begin
        trow[k] = (int'($urandom_range(3)) == 0) ? 0 : int'($urandom_range(2 * amp)) - amp;
        t[i][k] = trow[k];
      end
      tref = stage2(t, 9);
      @(negedge clk);
      row2 = 3'(i); start2 = 1'b1;
      @(negedge clk);
      start2 = 1'b0;
      cyc = 1;
      while (!valid2 && cyc < 100) begin @(negedge clk); cyc++; end
      check(cyc == 1 + 8 + 5 * (8 - (trow[0]==0) - (trow[1]==0) - (trow[2]==0) - (trow[3]==0)
                                  - (trow[4]==0) - (trow[5]==0) - (trow[6]==0) - (trow[7]==0)),
            $sformatf("stage2 cycles %0d", cyc));
      for (int j = 0; j < 8; j++)
        check(int'($signed(res2[j])) == tref[i][j],
              $sformatf("X[%0d][%0d] = %0d expected %0d", i, j, $signed(res2[j]), tref[i][j]));
      ack2 = 1'b1;
      @(negedge clk);
      ack2 = 1'b0;
    end
    check(n_sat > 0, "saturation exercised");
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
