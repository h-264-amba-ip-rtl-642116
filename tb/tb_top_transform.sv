// tb_top_transform: self-checking testbench of the T/Q core.
//
// Random blocks of every kind, forward (transform then quantisation) and
// inverse (dequantisation then inverse transform), at random QP and with
// intra and inter rounding, are compared with the reference model.  Timing:
// forward 4x4 results leave one per clock on cycles 21..36 after start,
// forward 2x2 results on cycles 5..8, inverse 4x4 pairs end on cycle 34;
// forward 4x4 blocks are accepted every 32 cycles.
module tb_top_transform;
  import tq_pkg::*;
  import tq_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [5:0]         qp;
  logic               start, ready, valid0, valid1;
  tq_mode_t           mode;
  logic signed [15:0] din, out0, out1;
  logic [3:0]         idx0, idx1;

  top_transform dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct {
    blk16_t   exp;
    int       n;
    longint   t0;
    tq_mode_t md;
  } job_t;
  job_t jobs[$];
  job_t jd;
  blk16_t got;
  int ngot = 0;
  longint first_cyc;
  longint t_prev_start = -1;
  int n_gap32 = 0;

  always @(posedge clk) begin
    if (rst_n && (valid0 || valid1)) begin
      if (ngot == 0) first_cyc = cyc;
      if (valid0) begin got[idx0] = int'(out0); ngot++; end
      if (valid1) begin got[idx1] = int'(out1); ngot++; end
      if (jobs.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else if (ngot >= jobs[0].n) begin
        jd = jobs.pop_front();
        for (int i = 0; i < jd.n; i++) begin
          checks++;
          if (got[i] !== int'($signed(16'(jd.exp[i])))) begin
            failures++;
            $display("mode=%b qp=%0d idx=%0d got %0d exp %0d", jd.md, qp, i, got[i], jd.exp[i]);
          end
        end
        checks++;
        if (!jd.md.inverse && (first_cyc - jd.t0 != ((jd.md.kind == BLK_CDC) ? 5 : 21) ||
                               cyc - jd.t0 != ((jd.md.kind == BLK_CDC) ? 8 : 36))) begin
          failures++;
          $display("forward timing: first %0d last %0d", first_cyc - jd.t0, cyc - jd.t0);
        end
        if (jd.md.inverse && jd.md.kind != BLK_CDC && cyc - jd.t0 != 34) begin
          failures++;
          $display("inverse timing: last %0d", cyc - jd.t0);
        end
        ngot = 0;
      end
    end
  end

  function automatic int rnd(int lim);
    return int'($urandom_range(2 * lim)) - lim;
  endfunction

  task automatic run_block(tq_mode_t m);
    blk16_t x = '{default: 0};
    job_t j;
    int n = (m.kind == BLK_CDC) ? 4 : 16;
    int lim;
    if (!m.inverse) lim = (m.kind == BLK_RES) ? 255 : (m.kind == BLK_LDC) ? 2000 : 8000;
    else            lim = (m.kind == BLK_RES) ? 10 : 50;
    for (int i = 0; i < n; i++) x[i] = rnd(lim);
    while (!ready) @(negedge clk);
    j.exp = tq_block(x, int'(m.kind), m.inverse, int'(qp), m.intra);
    j.n = n; j.t0 = cyc; j.md = m;
    jobs.push_back(j);
    if (!m.inverse && m.kind != BLK_CDC && t_prev_start >= 0 && cyc - t_prev_start == 32) n_gap32++;
    t_prev_start = (!m.inverse && m.kind != BLK_CDC) ? cyc : -1;
    for (int i = 0; i < n; i++) begin
      start = (i == 0); mode = m; din = 16'(x[i]);
      @(negedge clk);
    end
    start = 1'b0;
  endtask

  initial begin
    tq_mode_t m;
    start = 0; mode = '0; din = '0; qp = 6'd28;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 20; s++) begin
      automatic bit inv = s[0];
      // QP changes only between series, when the core is empty
      qp = inv ? 6'($urandom_range(14)) : 6'($urandom_range(51));
      for (int b = 0; b < 40; b++) begin
        m.inverse = inv;
        m.kind = blk_kind_t'($urandom_range(2));
        m.intra = 1'($urandom_range(1));
        run_block(m);
      end
      repeat (40) @(negedge clk);
    end
    checks++;
    if (n_gap32 == 0) begin
      failures++;
      $display("forward 4x4 blocks never ran back to back at 32 cycles");
    end
    checks++;
    if (jobs.size() != 0) begin
      failures++;
      $display("%0d blocks without results", jobs.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
