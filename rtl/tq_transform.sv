// tq_transform: area-optimised H.264 transform circuit.
//
// One adder, one subtractor, four registers (R0, R1, R2, Rm) and the 14-word
// transpose buffer perform every transform of H.264 baseline coding: forward
// and inverse 4x4 residual transform, forward and inverse 4x4 luma DC
// Hadamard transform and the 2x2 chroma DC transform.  Each 4-point 1D
// transform is split into two 2-point butterflies (sum and difference), so a
// group of four inputs keeps the adder/subtractor pair busy for four cycles:
//
//   phase 2 and 3 : first butterflies on the incoming sample and a held one
//   phase 0 and 1 : second butterflies on the held partial results; the two
//                   results of each of these cycles leave on (ye, yo)
//
// The forward schedule (registers, operands and the cycle each result appears)
// follows the published data-flow table of the forward residual transform:
// with X0..X3 presented on cycles 0..3, (Y0, Y2) leave on cycle 4 and (Y1, Y3)
// on cycle 5, while X4..X7 are already entering.  The inverse residual
// pairing ((w0,w2) then (w1,w3) with the >>1 taps) and the chroma DC pairing
// ((c01,c10) then (c00,c11)) are this design's choices in the same frame.
//
// A 4x4 block takes 32 cycles: 16 cycles of row pass fed from din, then 16
// cycles of column pass fed from the transpose buffer; the next block may
// start right after (cycle 32).  A 2x2 chroma DC block takes 4 cycles.  The
// last result pair of a block appears 2 cycles after its last cycle.
//
// Interface:
//   start  : first sample of a block is on din; accepted when ready is high.
//            The remaining 15 (4x4) or 3 (2x2) samples follow on din on the
//            next cycles without gaps, in raster order.
//   mode   : sampled with start (tq_pkg::tq_mode_t)
//   ye/yo  : result pair, valid with out_valid; idx_e/idx_o give the raster
//            position of each result in the block; out_mode its mode.
// Final scaling, this design's placement: forward luma DC results are halved
// (arithmetic >>1) and inverse residual results are rounded with (x+32)>>6,
// as H.264 specifies for those transforms.  Arithmetic is 16-bit two's
// complement throughout.
module tq_transform
  import tq_pkg::*;
#(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  tq_mode_t            mode,
  input  logic signed [W-1:0] din,
  output logic                ready,
  output logic signed [W-1:0] ye,
  output logic signed [W-1:0] yo,
  output logic [3:0]          idx_e,
  output logic [3:0]          idx_o,
  output logic                out_valid,
  output tq_mode_t            out_mode
);

  // ---------------- control block ----------------
  logic       active;
  logic [4:0] cnt;
  tq_mode_t   mode_q;

  logic       go;          // stage-1 work this cycle
  logic [4:0] c;           // cycle index within the block
  tq_mode_t   m;           // mode of the block in stage 1
  logic [1:0] ph;
  logic       is4x4;
  logic [4:0] last;

  assign ready = !active;
  assign go    = active || start;
  assign c     = active ? cnt : 5'd0;
  assign m     = active ? mode_q : mode;
  assign ph    = c[1:0];
  assign is4x4 = (m.kind != BLK_CDC);
  assign last  = is4x4 ? 5'd31 : 5'd3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      cnt    <= '0;
      mode_q <= '0;
    end else if (go) begin
      if (!active) mode_q <= mode;
      if (c == last) begin
        active <= 1'b0;
        cnt    <= '0;
      end else begin
        active <= 1'b1;
        cnt    <= c + 5'd1;
      end
    end
  end

  // Second-butterfly stage tags, latched at phase 3 of each group.
  logic     s2p0, s2p1, s2final, bp2, bp3, b_inv;
  tq_mode_t s2mode;
  logic [1:0] s2line;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2p0 <= 1'b0; s2p1 <= 1'b0; bp2 <= 1'b0; bp3 <= 1'b0;
      s2final <= 1'b0; s2mode <= '0; s2line <= '0; b_inv <= 1'b0;
    end else begin
      s2p0 <= go && ph == 2'd3;
      s2p1 <= s2p0;
      bp2  <= s2p1 && !s2final;
      bp3  <= bp2;
      if (go && ph == 2'd3) begin
        s2mode  <= m;
        s2final <= !is4x4 || c[4];
        s2line  <= c[3:2];
      end
      if (s2p1) b_inv <= s2mode.inverse && s2mode.kind == BLK_RES;
    end
  end

  // ---------------- datapath ----------------
  logic signed [W-1:0] r0, r1, r2, rm;
  logic signed [W-1:0] x;
  logic signed [W-1:0] bdout;
  logic signed [W-1:0] add_a, add_b, sub_a, sub_b, sum, diff;
  logic                inv1, inv2, fres2;

  assign inv1  = m.inverse && m.kind == BLK_RES;            // stage-1 pattern
  assign inv2  = s2mode.inverse && s2mode.kind == BLK_RES;  // stage-2 pattern
  assign fres2 = !s2mode.inverse && s2mode.kind == BLK_RES;

  // input multiplexer: din for the row pass, transpose buffer for the column pass
  assign x = (is4x4 && c[4]) ? bdout : din;

  always_comb begin
    add_a = r0; add_b = r1; sub_a = r0; sub_b = r1;
    if (go && ph == 2'd2) begin
      add_a = inv1 ? r1 : r0; add_b = x;
      sub_a = add_a;          sub_b = x;
    end else if (go && ph == 2'd3) begin
      add_a = r0;             add_b = inv1 ? (x >>> 1) : x;
      sub_a = inv1 ? (r0 >>> 1) : r0;  sub_b = x;
    end else if (s2p1 && fres2) begin
      add_a = r0 <<< 1;       add_b = r1;
      sub_a = r0;             sub_b = r1 <<< 1;
    end
    sum  = add_a + add_b;
    diff = sub_a - sub_b;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r0 <= '0; r1 <= '0; r2 <= '0; rm <= '0;
    end else begin
      // second butterflies of the previous group (phase 0)
      if (s2p0) begin
        r0 <= inv2 ? rm : r2;
        r1 <= inv2 ? r2 : rm;
      end
      if (go) begin
        unique case (ph)
          2'd0: rm <= x;
          2'd1: begin r0 <= x; r1 <= rm; end
          2'd2: begin
            rm <= sum; r2 <= diff;
            if (!inv1) r0 <= r1;
          end
          2'd3: begin
            if (inv1) begin
              r0 <= rm; r1 <= sum; rm <= r2; r2 <= diff;
            end else begin
              r0 <= sum; r2 <= diff; r1 <= rm; rm <= r2;
            end
          end
        endcase
      end
    end
  end

  // ---------------- transpose buffer ----------------
  logic       wr_en, ld12, ld13;
  logic [1:0] wr_loop, wsel;
  logic [3:0] rd_shift;

  always_comb begin
    wr_en = 1'b0; wr_loop = 2'd0; wsel = 2'd0; ld12 = 1'b0; ld13 = 1'b0;
    if (s2p0 && !s2final) begin
      wr_en = 1'b1; wr_loop = 2'd0; wsel = 2'd0; ld13 = 1'b1;
    end else if (s2p1 && !s2final) begin
      wr_en = 1'b1; wr_loop = 2'd1; wsel = 2'd0; ld13 = 1'b1; ld12 = 1'b1;
    end else if (bp2) begin
      wr_en = 1'b1; wr_loop = 2'd2; wsel = b_inv ? 2'd2 : 2'd1; ld12 = !b_inv;
    end else if (bp3) begin
      wr_en = 1'b1; wr_loop = 2'd3; wsel = 2'd1;
    end
    for (int l = 0; l < 4; l++)
      rd_shift[l] = go && is4x4 && c[4] && (c[3:0] >= 4'(l));
  end

  tq_transpose_buf #(.W(W)) u_tbuf (
    .clk, .rst_n,
    .ye(sum), .yo(diff),
    .wr_en, .wr_loop, .wsel, .ld13, .ld12, .rd_shift,
    .dout(bdout)
  );

  // ---------------- outputs ----------------
  logic signed [W:0] rnd_e, rnd_o;
  logic [1:0] ke, ko;   // position of each result within its 1D line

  always_comb begin
    rnd_e = (W+1)'(sum)  + (W+1)'(32);
    rnd_o = (W+1)'(diff) + (W+1)'(32);
    ye = sum;
    yo = diff;
    if (s2final && s2mode.inverse && s2mode.kind == BLK_RES) begin
      ye = W'(rnd_e >>> 6);
      yo = W'(rnd_o >>> 6);
    end else if (s2final && !s2mode.inverse && s2mode.kind == BLK_LDC) begin
      ye = sum >>> 1;
      yo = diff >>> 1;
    end

    if (inv2) begin
      ke = s2p0 ? 2'd0 : 2'd1;
      ko = s2p0 ? 2'd3 : 2'd2;
    end else begin
      ke = s2p0 ? 2'd0 : 2'd1;
      ko = s2p0 ? 2'd2 : 2'd3;
    end
    if (s2mode.kind == BLK_CDC) begin
      // (f00, f11) then (f10, f01) in raster order 0..3 of the 2x2 block
      idx_e = s2p0 ? 4'd0 : 4'd2;
      idx_o = s2p0 ? 4'd3 : 4'd1;
    end else begin
      // column pass: line = column, position = row
      idx_e = {ke, s2line};
      idx_o = {ko, s2line};
    end
  end

  assign out_valid = (s2p0 || s2p1) && s2final;
  assign out_mode  = s2mode;

endmodule
