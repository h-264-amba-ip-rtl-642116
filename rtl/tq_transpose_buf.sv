// tq_transpose_buf: 14 x 16-bit transpose buffer of the 4x4 transform.
//
// The row pass of the transform produces its four results of a row as two
// pairs (ye, yo) on consecutive cycles.  R13/R12 hold the yo half of each pair
// so that the twelve loop registers receive exactly one coefficient per clock,
// in raster order Y0, Y1, ... Y15.
//
// The twelve loop registers form four "loops" of three registers; loop c
// holds column c:   loop 0 = R8 -> R4 -> R0 -> dout
//                   loop 1 = R9 -> R5 -> R1 -> (R8)
//                   loop 2 = R10 -> R6 -> R2 -> (R9)
//                   loop 3 = R11 -> R7 -> R3 -> (R10)
// A coefficient written to loop c enters at R(8+c) while the loop shifts right
// by one.  After rows 0..2 (12 writes) R_i holds Y_i.  When row 3 arrives, loop
// 0 starts shifting out through dout (Y0, Y4, Y8, Y12, ...), loop c joins the
// shift one cycle after loop c-1, and the right end of loop c feeds the entry
// of loop c-1.  The twelve registers then act as one serpentine shift register
// that delivers the columns Y0 Y4 Y8 Y12 Y1 Y5 ... Y15, one per clock, while
// Y12..Y15 are still being written.  This follows the buffer organisation and
// the loop scheduling of the design; the control encoding is this design's.
//
// Interface (all controls from tq_transform, sampled at the rising edge):
//   wr_en/wr_loop : write the selected word into loop wr_loop (which shifts)
//   wsel          : word written: ye (0), R12 (1) or R13 (2)
//   ld13          : R13 <= yo           ld12 : R12 <= R13
//   rd_shift[c]   : loop c shifts during read-out
//   dout          : R0, the next coefficient of the column pass
module tq_transpose_buf #(
  parameter int W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic signed [W-1:0] ye,
  input  logic signed [W-1:0] yo,
  input  logic             wr_en,
  input  logic [1:0]       wr_loop,
  input  logic [1:0]       wsel,
  input  logic             ld13,
  input  logic             ld12,
  input  logic [3:0]       rd_shift,
  output logic signed [W-1:0] dout
);

  logic signed [W-1:0] r [14];   // R0..R13
  logic signed [W-1:0] wdata;
  logic [3:0]          shift;

  always_comb begin
    unique case (wsel)
      2'd1:    wdata = r[12];
      2'd2:    wdata = r[13];
      default: wdata = ye;
    endcase
  end

  always_comb begin
    for (int c = 0; c < 4; c++)
      shift[c] = rd_shift[c] | (wr_en && wr_loop == 2'(c));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 14; i++) r[i] <= '0;
    end else begin
      for (int c = 0; c < 4; c++) begin
        if (shift[c]) begin
          r[c]     <= r[4 + c];
          r[4 + c] <= r[8 + c];
          if (wr_en && wr_loop == 2'(c)) r[8 + c] <= wdata;
          else if (c < 3)                r[8 + c] <= r[(c + 1) % 4];
          else                           r[8 + c] <= '0;
        end
      end
      if (ld13) r[13] <= yo;
      if (ld12) r[12] <= r[13];
    end
  end

  assign dout = r[0];

endmodule
