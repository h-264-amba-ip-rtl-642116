// tb_tq_quant: self-checking testbench of the quantiser/dequantiser.
//
// Forward: random coefficient pairs arrive in the transform's pattern (two
// pair cycles, two free cycles); the test checks that q_out delivers
// a0 a1 a2 a3 one per clock, one cycle after the first pair, and that each
// value equals the H.264 quantisation of the reference model (residual with
// position-dependent MF, luma and chroma DC), intra and inter, all QP.
// Inverse: single coefficients, one per clock, dequantised for all kinds.
module tb_tq_quant;
  import tq_pkg::*;
  import tq_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [5:0]         qp;
  logic               pair_valid, single_valid, q_valid;
  logic signed [15:0] q_in0, q_in1, q_out;
  logic [3:0]         idx0, idx1, q_idx;
  tq_mode_t           in_mode, q_mode;

  tq_quant dut (.*);

  int checks = 0, failures = 0;
  int exp_v[$], exp_i[$];

  always @(posedge clk) begin
    if (rst_n && q_valid) begin
      checks++;
      if (exp_v.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        automatic int v = exp_v.pop_front(), i = exp_i.pop_front();
        if (q_out !== 16'(v) || q_idx !== 4'(i)) begin
          failures++;
          $display("qp=%0d mode=%b idx=%0d: got %0d (idx %0d) exp %0d", qp, q_mode, i, q_out, q_idx, v);
        end
      end
    end
  end

  function automatic int rnd(int lim);
    return int'($urandom_range(2 * lim)) - lim;
  endfunction

  initial begin
    tq_mode_t m;
    {qp, pair_valid, single_valid, q_in0, q_in1, idx0, idx1, in_mode} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // forward: groups of two pairs
    for (int g = 0; g < 3000; g++) begin
      int a[4], base, k, lim;
      k = $urandom_range(2);
      m.inverse = 1'b0; m.kind = blk_kind_t'(k); m.intra = 1'($urandom_range(1));
      qp = 6'($urandom_range(51));
      lim = (g % 3 == 0) ? 32767 : 3000;
      foreach (a[i]) a[i] = rnd(lim);
      base = $urandom_range(3);   // column of the 4x4 block
      for (int i = 0; i < 4; i++) begin
        exp_v.push_back(quant(a[i], 4 * i + base, k, int'(qp), m.intra));
        exp_i.push_back(4 * i + base);
      end
      // (a0, a2) then (a1, a3)
      in_mode = m; pair_valid = 1'b1;
      q_in0 = 16'(a[0]); q_in1 = 16'(a[2]); idx0 = 4'(base); idx1 = 4'(8 + base);
      @(negedge clk);
      q_in0 = 16'(a[1]); q_in1 = 16'(a[3]); idx0 = 4'(4 + base); idx1 = 4'(12 + base);
      @(negedge clk);
      pair_valid = 1'b0;
      @(negedge clk);
      @(negedge clk);
    end
    // inverse: one coefficient per clock
    for (int n = 0; n < 4000; n++) begin
      int z, k, i;
      k = $urandom_range(2);
      m.inverse = 1'b1; m.kind = blk_kind_t'(k); m.intra = 1'b1;
      qp = 6'($urandom_range(51));
      z = (n % 4 == 0) ? rnd(3000) : rnd(60);
      i = $urandom_range(15);
      exp_v.push_back(dequant(z, i, k, int'(qp)));
      exp_i.push_back(i);
      in_mode = m; single_valid = 1'b1; q_in0 = 16'(z); idx0 = 4'(i);
      @(negedge clk);
      single_valid = 1'b0;
      if (n % 7 == 0) @(negedge clk);
    end
    single_valid = 1'b0;
    repeat (4) @(negedge clk);
    checks++;
    if (exp_v.size() != 0) begin
      failures++;
      $display("%0d results missing", exp_v.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
