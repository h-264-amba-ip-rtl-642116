// tb_tq_transform: self-checking testbench of the transform circuit.
//
// Feeds random blocks of all six transforms (forward/inverse x residual,
// luma DC, chroma DC) back to back, gathers the result pairs by their raster
// positions and compares every block with the matrix reference model.  It
// also checks the timing: the last result pair of a 4x4 block two cycles
// after its 32-cycle slot, of a 2x2 block two cycles after its 4-cycle slot,
// and 810 cycles for a whole 4:2:0 macroblock (24 residual blocks, one luma
// DC and two chroma DC blocks) from the first input to the last result.
module tb_tq_transform;
  import tq_pkg::*;
  import tq_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               start, ready, out_valid;
  tq_mode_t           mode, out_mode;
  logic signed [15:0] din, ye, yo;
  logic [3:0]         idx_e, idx_o;

  tq_transform dut (.*);

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

  blk16_t got;
  job_t   jdone;
  int     ngot = 0;
  longint last_out_cyc;

  // result collector
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      got[idx_e] = int'(ye);
      got[idx_o] = int'(yo);
      ngot += 2;
      last_out_cyc = cyc;
      if (jobs.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else if (ngot == jobs[0].n) begin
        jdone = jobs.pop_front();
        for (int i = 0; i < jdone.n; i++) begin
          checks++;
          if (got[i] !== jdone.exp[i]) begin
            failures++;
            $display("mismatch mode=%b idx=%0d got=%0d exp=%0d", jdone.md, i, got[i], jdone.exp[i]);
          end
        end
        checks++;
        if (cyc - jdone.t0 != ((jdone.md.kind == BLK_CDC) ? 5 : 33)) begin
          failures++;
          $display("latency: last pair %0d cycles after start", cyc - jdone.t0);
        end
        ngot = 0;
      end
    end
  end

  function automatic blk16_t ref_tr(blk16_t x, tq_mode_t m);
    blk16_t r = '{default: 0};
    blk4_t c, f;
    if (m.kind == BLK_CDC) begin
      for (int i = 0; i < 4; i++) c[i] = x[i];
      f = cdc(c);
      for (int i = 0; i < 4; i++) r[i] = f[i];
    end else if (m.kind == BLK_RES) r = m.inverse ? inv_res(x) : fwd_res(x);
    else r = m.inverse ? inv_ldc(x) : fwd_ldc(x);
    return r;
  endfunction

  function automatic int rnd(int lim);
    return int'($urandom_range(2 * lim)) - lim;
  endfunction

  // drive one block; returns when its last sample is on din
  task automatic run_block(tq_mode_t m);
    blk16_t x;
    job_t j;
    int n = (m.kind == BLK_CDC) ? 4 : 16;
    int lim;
    if (m.kind == BLK_RES) lim = m.inverse ? 2000 : 255;
    else if (m.kind == BLK_LDC) lim = 2000;
    else lim = 8000;
    foreach (x[i]) x[i] = (i < n) ? rnd(lim) : 0;
    while (!ready) @(negedge clk);
    j.exp = ref_tr(x, m);
    j.n = n;
    j.t0 = cyc;
    j.md = m;
    jobs.push_back(j);
    for (int i = 0; i < n; i++) begin
      start = (i == 0);
      mode  = m;
      din   = 16'(x[i]);
      @(negedge clk);
    end
    start = 1'b0;
  endtask

  function automatic tq_mode_t mk(bit inv, blk_kind_t k);
    tq_mode_t m;
    m.inverse = inv;
    m.kind = k;
    m.intra = 1'b1;
    return m;
  endfunction

  initial begin
    longint t_mb;
    start = 0; mode = '0; din = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // random mix of all transforms, back to back
    for (int b = 0; b < 300; b++) begin
      automatic int k = $urandom_range(2);
      run_block(mk(1'($urandom_range(1)), blk_kind_t'(k)));
    end
    repeat (40) @(negedge clk);

    // one macroblock, forward, back to back: 810 cycles
    t_mb = cyc;
    for (int b = 0; b < 24; b++) run_block(mk(1'b0, BLK_RES));
    run_block(mk(1'b0, BLK_LDC));
    run_block(mk(1'b0, BLK_CDC));
    run_block(mk(1'b0, BLK_CDC));
    repeat (10) @(negedge clk);
    checks++;
    if (last_out_cyc - t_mb + 1 != 810) begin
      failures++;
      $display("macroblock took %0d cycles, expected 810", last_out_cyc - t_mb + 1);
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
