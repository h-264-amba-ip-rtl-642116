// tq_quant: H.264 forward quantiser and inverse quantiser (dequantiser).
//
// Forward (mode.inverse = 0), H.264 scalar quantiser with MF tables:
//   |Z| = (|W| * MF(QP%6, position) + qp_const) >> q_bits,  sign(Z) = sign(W)
// with q_bits/qp_const from tq_qp_param (DC blocks use MF(.,0) and q_bits+1).
// Inverse (mode.inverse = 1):
//   residual  ("Di" path) : W = Z * V(QP%6, position) << qp_per
//   luma DC   ("Df" path) : W = ((Z * V(QP%6,0) << qp_per) + 2) >> 2
//   chroma DC             : W = (Z * V(QP%6,0) << qp_per) >> 1
// which are the H.264 scaling rules for flat scaling matrices.  The datapath
// follows the published structure: input pair registers dbuf0/dbuf1, one
// absolute-value unit, one multiplier fed from the MF or V table, the
// add-and-shift forward path, the shift paths of the inverse, and a final
// sign stage.  This design restores the sign before the rounding shifts of the
// inverse DC paths so that negative values round exactly as the standard
// does; results are saturated to 16 bits.
//
// Interface: the transform delivers coefficients in pairs (q_in0/q_in1 with
// pair_valid and their raster positions idx0/idx1); pairs come at most on two
// consecutive cycles followed by two free cycles.  The first element of a pair
// is processed at once, the second is parked in dbuf1/dbuf0 and processed on
// the next free cycles, so q_out carries one coefficient per clock in the
// order a0, a1, a2, a3 for pairs (a0, a2), (a1, a3).  single_valid feeds one
// coefficient on q_in0 (used in the inverse direction).  Latency: one clock
// (registered output).  QP and the mode travel with each coefficient.
module tq_quant
  import tq_pkg::*;
#(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [5:0]          qp,
  input  logic                pair_valid,
  input  logic                single_valid,
  input  logic signed [W-1:0] q_in0,
  input  logic signed [W-1:0] q_in1,
  input  logic [3:0]          idx0,
  input  logic [3:0]          idx1,
  input  tq_mode_t            in_mode,
  output logic signed [W-1:0] q_out,
  output logic [3:0]          q_idx,
  output tq_mode_t            q_mode,
  output logic                q_valid
);

  // ---------------- pair serialiser (dbuf0 / dbuf1) ----------------
  typedef struct packed {
    logic signed [W-1:0] v;
    logic [3:0]          idx;
    tq_mode_t            md;
  } coef_t;

  coef_t      dbuf0, dbuf1;
  logic [1:0] occ;
  coef_t      sel;
  logic       sel_valid;

  always_comb begin
    sel_valid = 1'b1;
    if (pair_valid || single_valid) sel = '{v: q_in0, idx: idx0, md: in_mode};
    else if (occ != 2'd0)           sel = dbuf1;
    else begin
      sel = dbuf1;
      sel_valid = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dbuf0 <= '0;
      dbuf1 <= '0;
      occ   <= '0;
    end else if (pair_valid) begin
      if (occ == 2'd0) begin
        dbuf1 <= '{v: q_in1, idx: idx1, md: in_mode};
        occ   <= 2'd1;
      end else begin
        dbuf0 <= '{v: q_in1, idx: idx1, md: in_mode};
        occ   <= 2'd2;
      end
    end else if (!single_valid && occ != 2'd0) begin
      dbuf1 <= dbuf0;
      occ   <= occ - 2'd1;
    end
  end

  // a new pair may only arrive when at most one coefficient is parked, and a
  // single coefficient only when none is
  assert property (@(posedge clk) disable iff (!rst_n) pair_valid |-> occ < 2'd2);
  assert property (@(posedge clk) disable iff (!rst_n) single_valid |-> occ == 2'd0);
  assert property (@(posedge clk) disable iff (!rst_n) !(pair_valid && single_valid));

  // ---------------- parameters from QP ----------------
  logic [3:0]  qp_per;
  logic [2:0]  qp_rem;
  logic [4:0]  q_bits;
  logic [23:0] qp_const;

  tq_qp_param u_qpp (
    .qp, .mode(sel.md), .qp_per, .qp_rem, .q_bits, .qp_const
  );

  // ---------------- arithmetic ----------------
  logic [1:0]         cls;
  logic [W:0]         mag;       // |x|, one bit wider for -2^(W-1)
  logic               neg;
  logic [13:0]        coef;
  logic [31:0]        prod;
  logic [31:0]        fwd_mag;
  logic signed [39:0] inv_s, inv_sh, inv_r;
  logic signed [W-1:0] res;

  localparam logic signed [39:0] MAXV = 40'sd32767;
  localparam logic signed [39:0] MINV = -40'sd32768;

  always_comb begin
    cls  = (sel.md.kind == BLK_RES) ? pos_class(sel.idx) : 2'd0;
    neg  = sel.v[W-1];
    mag  = neg ? (W+1)'(-(W+1)'(sel.v)) : (W+1)'(sel.v);
    coef = sel.md.inverse ? 14'(v_coef(qp_rem, cls)) : mf_coef(qp_rem, cls);
    prod = 32'(mag) * 32'(coef);

    // forward: add the rounding offset, shift by q_bits ("R" path)
    fwd_mag = (prod + 32'(qp_const)) >> q_bits;

    // inverse: scale by 2^qp_per ("Di"), DC rounding shifts ("Df")
    inv_s  = neg ? -40'(prod) : 40'(prod);
    inv_sh = inv_s <<< qp_per;
    unique case (sel.md.kind)
      BLK_LDC: inv_r = (inv_sh + 40'sd2) >>> 2;
      BLK_CDC: inv_r = inv_sh >>> 1;
      default: inv_r = inv_sh;
    endcase

    // sign stage and saturation
    if (!sel.md.inverse) begin
      if (fwd_mag > 32'd32767) res = neg ? -W'(32767) : W'(32767);
      else                     res = neg ? -W'(fwd_mag) : W'(fwd_mag);
    end else begin
      if (inv_r > MAXV)      res = W'(MAXV);
      else if (inv_r < MINV) res = W'(MINV);
      else                   res = W'(inv_r);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_out   <= '0;
      q_idx   <= '0;
      q_mode  <= '0;
      q_valid <= 1'b0;
    end else begin
      q_valid <= sel_valid;
      if (sel_valid) begin
        q_out  <= res;
        q_idx  <= sel.idx;
        q_mode <= sel.md;
      end
    end
  end

endmodule
