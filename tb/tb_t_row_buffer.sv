// tb_t_row_buffer: checks the one-row hand-over buffer between the stages:
// a write sets 'full' and the row number, all eight read ports return the
// written row for random indices, the row is held while full (no write is
// issued then), and 'release_row' empties it.
module tb_t_row_buffer;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic wr_en = 1'b0, full, release_row = 1'b0;
  logic [2:0] wr_row = '0, row;
  logic signed [7:0][15:0] wr_data = '0, rd_data;
  logic [7:0][2:0] rd_k = '0;
  int t [8];
  int checks = 0, failures = 0;

  t_row_buffer #(.W(16)) dut (.clk, .rst_n, .wr_en, .wr_row, .wr_data, .full, .row,
                              .release_row, .rd_k, .rd_data);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 200; it++) begin
      int r;
      r = int'($urandom_range(7));
      check(!full, "empty");
      for (int j = 0; j < 8; j++) begin
        t[j] = int'($urandom_range(65535)) - 32768;
        wr_data[j] = 16'(t[j]);
      end
      wr_row = 3'(r); wr_en = 1'b1;
      @(negedge clk);
      wr_en = 1'b0;
      wr_data = '0;   // the buffer must hold its own copy
      check(full && row == 3'(r), "full with row index");
      for (int rep = 0; rep < 4; rep++) begin
        for (int j = 0; j < 8; j++) rd_k[j] = 3'($urandom_range(7));
        #1;
        for (int j = 0; j < 8; j++)
          check(int'($signed(rd_data[j])) == t[rd_k[j]],
                $sformatf("T[%0d] read %0d expected %0d", rd_k[j], $signed(rd_data[j]), t[rd_k[j]]));
        @(negedge clk);
      end
      release_row = 1'b1;
      @(negedge clk);
      release_row = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
