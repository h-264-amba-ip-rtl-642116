// tb_tq_transpose_buf: self-checking testbench of the 14-register transpose
// buffer.  For random 4x4 blocks it delivers the row results as pairs, as the
// transform does ((Y0,Y2),(Y1,Y3) for the forward order, (Y0,Y3),(Y1,Y2) for
// the inverse order), on cycles 4..19 of a 32-cycle slot, and checks that
// dout presents the columns Y0 Y4 Y8 Y12 Y1 ... Y15 on cycles 16..31, one per
// clock, while the last row is still being written.  Blocks run back to back.
module tb_tq_transpose_buf;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic signed [15:0] ye, yo, dout;
  logic       wr_en, ld13, ld12;
  logic [1:0] wr_loop, wsel;
  logic [3:0] rd_shift;

  tq_transpose_buf dut (.*);

  int checks = 0, failures = 0;

  initial begin
    int y[16];
    bit inv;
    {ye, yo, wr_en, ld13, ld12, wr_loop, wsel, rd_shift} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 200; blk++) begin
      inv = blk[0];
      foreach (y[i]) y[i] = int'($urandom_range(65535)) - 32768;
      for (int c = 0; c < 32; c++) begin
        automatic int r = c / 4 - 1, ph = c % 4;
        {ye, yo, wr_en, ld13, ld12, wr_loop, wsel} = '0;
        // pairs of row r on phases 0 and 1, parked words on phases 2 and 3
        if (c >= 4 && c < 20) begin
          wr_en = 1'b1;
          wr_loop = 2'(ph);
          if (ph == 0) begin
            ye = 16'(y[4*r]); yo = 16'(inv ? y[4*r+3] : y[4*r+2]); ld13 = 1'b1;
          end else if (ph == 1) begin
            ye = 16'(y[4*r+1]); yo = 16'(inv ? y[4*r+2] : y[4*r+3]); ld13 = 1'b1; ld12 = 1'b1;
          end else if (ph == 2) begin
            wsel = inv ? 2'd2 : 2'd1; ld12 = !inv;
          end else begin
            wsel = 2'd1;
          end
        end
        for (int l = 0; l < 4; l++) rd_shift[l] = (c >= 16) && (c - 16 >= l);
        #1;
        if (c >= 16) begin
          automatic int k = c - 16;
          checks++;
          if (dout !== 16'(y[4 * (k % 4) + k / 4])) begin
            failures++;
            $display("blk %0d cycle %0d: dout %0d exp Y%0d=%0d", blk, c, dout,
                     4 * (k % 4) + k / 4, y[4 * (k % 4) + k / 4]);
          end
        end
        @(negedge clk);
      end
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
