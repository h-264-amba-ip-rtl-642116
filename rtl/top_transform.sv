// top_transform: the T/Q core, H.264 transform and quantisation for one block
// at a time.
//
// Forward direction (mode.inverse = 0): samples -> tq_transform -> tq_quant.
// The transform produces result pairs, the quantiser serialises them, so
// quantised coefficients leave on out0 at one per clock (valid0), each with
// its raster position idx0.
// Inverse direction (mode.inverse = 1): coefficients -> tq_quant (dequantise,
// one per clock) -> tq_transform.  The reconstructed values leave as pairs on
// out0/out1 (valid0 = valid1) with their raster positions idx0/idx1.
//
// Interface: assert start with the first sample of a block on din when ready
// is high, then present the rest of the block (16 samples for a 4x4 block,
// 4 for a 2x2 chroma DC block) on the following cycles, in raster order and
// without gaps.  mode is sampled with start; qp must stay stable while the
// block is in flight.  A 4x4 block occupies the transform for 32 cycles and
// the next block may start on cycle 32 (forward) or 33 (inverse, one cycle for
// the dequantiser).  Forward results of a 4x4 block leave on cycles 21..36
// after start, of a 2x2 block on cycles 5..8; inverse results of a 4x4 block
// leave as pairs on cycles 21..34.
module top_transform
  import tq_pkg::*;
#(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [5:0]          qp,
  input  logic                start,
  input  tq_mode_t            mode,
  input  logic signed [W-1:0] din,
  output logic                ready,
  output logic signed [W-1:0] out0,
  output logic signed [W-1:0] out1,
  output logic [3:0]          idx0,
  output logic [3:0]          idx1,
  output logic                valid0,
  output logic                valid1
);

  // ---------------- input sequencing ----------------
  logic       in_act;      // samples of a block are being received
  logic [3:0] in_cnt;
  tq_mode_t   in_mode_q;
  tq_mode_t   cur_mode;
  logic       in_go;
  logic [3:0] in_idx;
  logic [3:0] in_last;

  assign in_go    = in_act || (start && ready);
  assign cur_mode = in_act ? in_mode_q : mode;
  assign in_idx   = in_act ? in_cnt : 4'd0;
  assign in_last  = (cur_mode.kind == BLK_CDC) ? 4'd3 : 4'd15;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_act    <= 1'b0;
      in_cnt    <= '0;
      in_mode_q <= '0;
    end else if (in_go) begin
      if (!in_act) in_mode_q <= mode;
      in_act <= (in_idx != in_last);
      in_cnt <= in_idx + 4'd1;
    end
  end

  // ---------------- transform and quantiser ----------------
  logic                tr_start, tr_ready, tr_valid;
  tq_mode_t            tr_mode, tr_out_mode;
  logic signed [W-1:0] tr_din, ye, yo;
  logic [3:0]          idx_e, idx_o;

  logic                qz_pair, qz_single, qz_valid;
  logic signed [W-1:0] qz_in0, qz_in1, qz_out;
  logic [3:0]          qz_idx0, qz_idx1, qz_idx;
  tq_mode_t            qz_in_mode, qz_mode;
  logic                inv_pending;

  // inverse: the dequantised first sample starts the transform one cycle later
  assign inv_pending = qz_valid && qz_mode.inverse && qz_idx == 4'd0;
  assign ready       = tr_ready && !in_act && !inv_pending;

  always_comb begin
    if (in_go && !cur_mode.inverse) begin
      tr_start = start && ready;
      tr_mode  = cur_mode;
      tr_din   = din;
    end else begin
      tr_start = inv_pending;
      tr_mode  = qz_mode;
      tr_din   = qz_out;
    end

    if (in_go && cur_mode.inverse) begin
      qz_single  = 1'b1;
      qz_pair    = 1'b0;
      qz_in0     = din;
      qz_in1     = '0;
      qz_idx0    = in_idx;
      qz_idx1    = '0;
      qz_in_mode = cur_mode;
    end else begin
      qz_single  = 1'b0;
      qz_pair    = tr_valid && !tr_out_mode.inverse;
      qz_in0     = ye;
      qz_in1     = yo;
      qz_idx0    = idx_e;
      qz_idx1    = idx_o;
      qz_in_mode = tr_out_mode;
    end
  end

  tq_transform #(.W(W)) u_tr (
    .clk, .rst_n,
    .start(tr_start), .mode(tr_mode), .din(tr_din), .ready(tr_ready),
    .ye, .yo, .idx_e, .idx_o, .out_valid(tr_valid), .out_mode(tr_out_mode)
  );

  tq_quant #(.W(W)) u_q (
    .clk, .rst_n, .qp,
    .pair_valid(qz_pair), .single_valid(qz_single),
    .q_in0(qz_in0), .q_in1(qz_in1), .idx0(qz_idx0), .idx1(qz_idx1),
    .in_mode(qz_in_mode),
    .q_out(qz_out), .q_idx(qz_idx), .q_mode(qz_mode), .q_valid(qz_valid)
  );

  // ---------------- outputs ----------------
  always_comb begin
    if (tr_valid && tr_out_mode.inverse) begin
      out0 = ye;  idx0 = idx_e;  valid0 = 1'b1;
      out1 = yo;  idx1 = idx_o;  valid1 = 1'b1;
    end else begin
      out0 = qz_out;  idx0 = qz_idx;  valid0 = qz_valid && !qz_mode.inverse;
      out1 = '0;      idx1 = '0;      valid1 = 1'b0;
    end
  end

endmodule
