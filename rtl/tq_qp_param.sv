// tq_qp_param: derives the quantiser's internal parameters from QP.
//
//   qp_per   = floor(QP/6)      (computed as (QP*43)>>8, exact for QP 0..63)
//   qp_rem   = QP mod 6
//   q_bits   = 15 + qp_per      for residual blocks
//              16 + qp_per      for DC blocks (H.264 quantises DC with qbits+1)
//   qp_const = 2^q_bits / 3     intra,   2^q_bits / 6   inter
//
// 2^q/3 rounded down equals the alternating pattern 0x5555_5555 >> (32-q),
// so no divider is needed.  QP above 51 is treated as 51.  Purely
// combinational.
module tq_qp_param
  import tq_pkg::*;
(
  input  logic [5:0]  qp,
  input  tq_mode_t    mode,
  output logic [3:0]  qp_per,
  output logic [2:0]  qp_rem,
  output logic [4:0]  q_bits,
  output logic [23:0] qp_const
);

  logic [5:0]  qpc;
  logic [11:0] prod;
  logic [31:0] third;

  always_comb begin
    qpc    = (qp > 6'd51) ? 6'd51 : qp;
    prod   = 12'(qpc) * 12'd43;
    qp_per = prod[11:8];
    qp_rem = 3'(qpc - 6'(qp_per) * 6'd6);
    q_bits = 5'd15 + 5'(qp_per) + ((mode.kind == BLK_RES) ? 5'd0 : 5'd1);
    third  = 32'h5555_5555 >> (6'd32 - 6'(q_bits));
    qp_const = mode.intra ? 24'(third) : 24'(third >> 1);
  end

endmodule
