// tb_ahb2h264_wrapper: the AHB2H.264 wrapper on its own.  Its master port
// works on a behavioural AHB memory with random wait states; the bus grant
// is modelled by the testbench; its slave port is driven by simple register
// transfers.  Two operations on a 128x96 image (48 macroblocks):
//   1. forward, QP 30, RLS = 3, one frame: the grant follows the request
//      (the arbiter keeps a locked master) and may stay parked on the wrapper
//      for a few cycles after the request drops, so the test checks that
//      HLOCK is held with HBUSREQ, that the lock is released after every
//      third macroblock, and that the wrapper then waits until it has lost
//      the bus before it requests it again.
//   2. inverse, QP 20, RLS = 0, two frames: the grant is withdrawn at random,
//      so bursts are broken and restarted; HLOCK must stay low.
// Every output word is compared with the matrix reference model, and the
// test checks that the wrapper never drives a transfer without owning the
// bus and that nothing is written outside the output area.
module tb_ahb2h264_wrapper;
  import ahb_pkg::*;
  import tq_pkg::*;
  import tq_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     s_hsel, m_hbusreq, m_hlock, m_hgrant, busy, done, lock_release;
  ahb_m2s_t s_m2s, m_m2s;
  ahb_s2m_t s_s2m, m_s2m;

  ahb2h264_wrapper dut (
    .clk, .rst_n, .s_hsel, .s_m2s, .hready(s_s2m.hready), .s_s2m,
    .m_hbusreq, .m_hlock, .m_hgrant, .m_m2s, .m_s2m, .busy, .done, .lock_release
  );
  tb_ahb_mem u_mem (.clk, .rst_n, .hsel(1'b1), .m2s(m_m2s), .hready_in(m_s2m.hready), .s2m(m_s2m));

  int checks = 0, failures = 0;
  int n_rel = 0, n_restart = 0, n_lock_viol = 0, n_own_viol = 0, n_oob = 0;
  bit random_grant = 1'b0;
  logic own_ref = 1'b0;
  bit in_rel = 1'b0, lost_seen = 1'b0;
  int n_early_req = 0;

  localparam int unsigned IN_BASE  = 32'h1400_0000;
  localparam int unsigned OUT_BASE = 32'h1420_0000;
  localparam int N_MB = 48;
  int nof_cur = 1;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // grant model: registered, like an arbiter's
  always @(posedge clk) begin
    if (!rst_n) m_hgrant <= 1'b0;
    else if (random_grant) m_hgrant <= m_hbusreq && $urandom_range(3) != 0;
    // lock test: the grant may stay parked on the wrapper for a few cycles
    // after it stops requesting
    else m_hgrant <= m_hbusreq || (m_hgrant && $urandom_range(2) != 0);
  end

  always @(posedge clk) if (rst_n) begin
    if (m_m2s.htrans != HT_IDLE && !own_ref) n_own_viol++;
    if (m_m2s.htrans != HT_IDLE && m_s2m.hready && m_m2s.hwrite &&
        (m_m2s.haddr < OUT_BASE || m_m2s.haddr >= OUT_BASE + nof_cur * N_MB * MB_SAMPLES * 2))
      n_oob++;
    if (m_m2s.htrans == HT_NONSEQ && m_s2m.hready && dut.ai != 0) n_restart++;
    if (m_hbusreq && (m_hlock != !random_grant)) n_lock_viol++;
    // after a lock period the request returns only once the bus was lost
    if (in_rel && !own_ref) lost_seen = 1'b1;
    if (in_rel && m_hbusreq) begin
      if (!lost_seen) n_early_req++;
      in_rel = 1'b0;
    end
    if (lock_release) begin
      n_rel++;
      in_rel = 1'b1;
      lost_seen = 1'b0;
      if (m_hbusreq) n_early_req++;
    end
    if (m_s2m.hready) own_ref <= m_hgrant;
  end

  task automatic reg_wr(logic [3:0] a, logic [31:0] d);
    s_hsel = 1'b1; s_m2s.htrans = HT_NONSEQ; s_m2s.hwrite = 1'b1;
    s_m2s.haddr = 32'h4000_0000 | 32'(a); s_m2s.hsize = HS_WORD;
    @(negedge clk);
    s_hsel = 1'b0; s_m2s.htrans = HT_IDLE; s_m2s.hwdata = d;
    @(negedge clk);
  endtask

  task automatic reg_rd(logic [3:0] a, output logic [31:0] q);
    s_hsel = 1'b1; s_m2s.htrans = HT_NONSEQ; s_m2s.hwrite = 1'b0;
    s_m2s.haddr = 32'h4000_0000 | 32'(a); s_m2s.hsize = HS_WORD;
    @(negedge clk);
    s_hsel = 1'b0; s_m2s.htrans = HT_IDLE;
    #4 q = s_s2m.hrdata;
    @(negedge clk);
  endtask

  function automatic int rnd(int lim);
    return int'($urandom_range(2 * lim)) - lim;
  endfunction

  function automatic int blk_len(int b);
    return (b >= 25) ? 4 : 16;
  endfunction

  function automatic int blk_kind(int b);
    return (b == 16) ? 1 : (b >= 25) ? 2 : 0;
  endfunction

  task automatic run_op(bit inverse, int qp, int rls, int nof);
    int unsigned wa = IN_BASE >> 2, oa = OUT_BASE >> 2, ra = IN_BASE >> 2;
    int errs = 0;
    logic [31:0] q;
    longint t0;
    nof_cur = nof;
    u_mem.mem.delete();
    for (int m = 0; m < nof * N_MB; m++)
      for (int b = 0; b < MB_BLOCKS; b++) begin
        automatic int k = blk_kind(b);
        automatic int lim = !inverse ? ((k == 0) ? 255 : (k == 1) ? 2000 : 8000)
                                     : ((k == 0) ? 10 : 50);
        for (int w = 0; w < blk_len(b) / 2; w++) begin
          u_mem.mem[wa] = {16'(rnd(lim)), 16'(rnd(lim))};
          wa++;
        end
      end
    reg_wr(4'h0, {16'h0, 6'(qp), 5'(nof), 4'd0, inverse});
    reg_wr(4'h4, 32'(rls));
    reg_wr(4'h8, {16'h0, 1'b1, 15'(IN_BASE >> 16)});
    t0 = cyc;
    while (!done) @(posedge clk);
    $display("  %s: %0d cycles for %0d macroblocks, %0d per macroblock",
             inverse ? "inverse" : "forward", cyc - t0, nof * N_MB, (cyc - t0) / (nof * N_MB));
    do reg_rd(4'hC, q); while (!q[1]);
    checks++;
    if (busy) begin
      failures++;
      $display("busy after done");
    end
    for (int m = 0; m < nof * N_MB; m++)
      for (int b = 0; b < MB_BLOCKS; b++) begin
        automatic int n = blk_len(b), k = blk_kind(b);
        automatic blk16_t x = '{default: 0};
        blk16_t r;
        for (int w = 0; w < n / 2; w++) begin
          x[2*w]   = int'($signed(u_mem.mem[ra][15:0]));
          x[2*w+1] = int'($signed(u_mem.mem[ra][31:16]));
          ra++;
        end
        r = tq_block(x, k, inverse, qp, 1'b1);
        for (int w = 0; w < n / 2; w++) begin
          automatic logic [31:0] e = {16'(r[2*w+1]), 16'(r[2*w])};
          checks++;
          if (!u_mem.mem.exists(oa) || u_mem.mem[oa] !== e) begin
            failures++;
            if (errs++ < 10)
              $display("mb %0d blk %0d word %0d: got %h exp %h", m, b, w,
                       u_mem.mem.exists(oa) ? u_mem.mem[oa] : 32'hx, e);
          end
          oa++;
        end
      end
  endtask

  task automatic need(string what, int got, int exp);
    checks++;
    $display("  %-30s %0d", what, got);
    if (got != exp) begin
      failures++;
      $display("%s: %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int restarts_fwd;
    s_hsel = 0; s_m2s = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    random_grant = 1'b0;
    run_op(1'b0, 30, 3, 1);
    need("lock releases", n_rel, (N_MB - 1) / 3);
    restarts_fwd = n_restart;

    random_grant = 1'b1;
    n_rel = 0;
    run_op(1'b1, 20, 0, 2);
    need("lock releases without lock", n_rel, 0);
    checks++;
    $display("  %-30s %0d", "burst restarts", n_restart - restarts_fwd);
    if (n_restart - restarts_fwd == 0) begin
      failures++;
      $display("no burst restart with random grant");
    end
    need("lock signal errors", n_lock_viol, 0);
    need("requests before bus was lost", n_early_req, 0);
    need("transfers without the bus", n_own_viol, 0);
    need("writes outside output area", n_oob, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
