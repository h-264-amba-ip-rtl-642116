// tb_tq_qp_param: exhaustive check of the QP-derived quantiser parameters
// for QP 0..63, all block kinds, intra and inter, against direct integer
// formulas (QP above 51 counts as 51).
module tb_tq_qp_param;
  import tq_pkg::*;

  logic [5:0]  qp;
  tq_mode_t    mode;
  logic [3:0]  qp_per;
  logic [2:0]  qp_rem;
  logic [4:0]  q_bits;
  logic [23:0] qp_const;

  tq_qp_param dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int q = 0; q < 64; q++)
      for (int k = 0; k < 3; k++)
        for (int intra = 0; intra < 2; intra++) begin
          automatic int qq = (q > 51) ? 51 : q;
          int eb, ec;
          qp = 6'(q);
          mode.inverse = 1'b0;
          mode.kind = blk_kind_t'(k);
          mode.intra = 1'(intra);
          #1;
          eb = 15 + qq / 6 + (k != 0 ? 1 : 0);
          ec = (1 << eb) / (intra != 0 ? 3 : 6);
          checks++;
          if (qp_per != 4'(qq / 6) || qp_rem != 3'(qq % 6) || q_bits != 5'(eb) ||
              qp_const != 24'(ec)) begin
            failures++;
            $display("qp=%0d kind=%0d intra=%0d: per=%0d rem=%0d bits=%0d const=%0d exp %0d %0d %0d %0d",
                     q, k, intra, qp_per, qp_rem, q_bits, qp_const, qq / 6, qq % 6, eb, ec);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
