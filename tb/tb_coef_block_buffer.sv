// tb_coef_block_buffer: checks the input block buffer.
//
// Streams random 8x8 blocks in row-major order with random gaps in 'in_valid',
// checks that exactly 64 words are accepted and that 'in_ready' then stays low
// (extra words are refused) until 'release_blk', and reads every element back
// through all eight column ports with random row indices.
module tb_coef_block_buffer;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0, in_ready, full, release_blk = 1'b0;
  logic signed [11:0] in_data = '0;
  logic [7:0][2:0] rd_k = '0;
  logic signed [7:0][11:0] rd_data;
  int z [8][8];
  int checks = 0, failures = 0;

  coef_block_buffer #(.W(12)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .full,
                                   .release_blk, .rd_k, .rd_data);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 20; blk++) begin
      automatic int n = 0;
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) z[r][c] = int'($urandom_range(4095)) - 2048;
      check(in_ready && !full, "empty before block");
      while (n < 64) begin
        @(negedge clk);
        in_valid = ($urandom_range(3) != 0);
        in_data  = 12'(z[n / 8][n % 8]);
        #1;
        if (in_valid && in_ready) n++;
      end
      @(negedge clk);
      in_valid = 1'b1;
      in_data  = 12'h5a5;
      check(full && !in_ready, "full after 64 words");
      repeat (3) @(negedge clk);
      in_valid = 1'b0;
      check(full, "still full");
      for (int it = 0; it < 32; it++) begin
        for (int j = 0; j < 8; j++) rd_k[j] = 3'($urandom_range(7));
        #1;
        for (int j = 0; j < 8; j++)
          check(int'($signed(rd_data[j])) == z[rd_k[j]][j],
                $sformatf("Z[%0d][%0d] read %0d expected %0d", rd_k[j], j, $signed(rd_data[j]), z[rd_k[j]][j]));
        @(negedge clk);
      end
      release_blk = 1'b1;
      @(negedge clk);
      release_blk = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
