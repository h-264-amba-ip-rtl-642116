// tb_tq_platform: end-to-end test of the AHB platform with the T/Q IP.
//
// The testbench plays the two parts that are not RTL: the processor (a task
// sequence on the processor port) and the external memory (a word array
// behind the memory port that answers after 1 to 3 cycles).  It runs two
// complete operations on a 128x96 frame (48 macroblocks, 1296 blocks):
//   1. forward T/Q, QP 28, RLS = 5 (bus locked for 5 macroblocks at a time)
//   2. inverse T/Q, QP 12, RLS = 0 (no lock)
// During both the processor keeps reading memory, so the bus is shared.  Every
// result word is compared with the matrix reference model.  The test also
// counts the mechanisms of the design and fails if one never happened: lock
// periods and their release, locked transfers, bus hand-overs between the
// two masters, burst restarts after losing the bus, 1 KB boundary restarts,
// memory wait states, all three block kinds in both directions, and the
// completion flag seen through the status register.
module tb_tq_platform;
  import ahb_pkg::*;
  import tq_pkg::*;
  import tq_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        cpu_req, cpu_we, cpu_ack;
  logic [31:0] cpu_addr, cpu_wdata, cpu_rdata;
  logic [2:0]  cpu_size;
  logic        mem_req, mem_we, mem_ack;
  logic [29:0] mem_addr;
  logic [3:0]  mem_be;
  logic [31:0] mem_wdata, mem_rdata;
  logic        tq_busy, tq_done, tq_lock_release;

  tq_platform dut (.*);

  int checks = 0, failures = 0;

  // ---------------- external memory model ----------------
  logic [31:0] mem [int unsigned];
  int          mem_wait;
  int          n_wait_states = 0;

  always @(posedge clk) begin
    mem_ack <= 1'b0;
    if (mem_req && !mem_ack) begin
      if (mem_wait == 0) begin
        mem_ack <= 1'b1;
        if (mem_we) begin
          automatic logic [31:0] w = mem.exists(32'(mem_addr)) ? mem[32'(mem_addr)] : 32'h0;
          for (int b = 0; b < 4; b++)
            if (mem_be[b]) w[8*b +: 8] = mem_wdata[8*b +: 8];
          mem[32'(mem_addr)] = w;
        end else begin
          mem_rdata <= mem.exists(32'(mem_addr)) ? mem[32'(mem_addr)] : 32'h0;
        end
        mem_wait = $urandom_range(2);
      end else begin
        mem_wait--;
        n_wait_states++;
      end
    end
  end

  // ---------------- processor model ----------------
  task automatic cpu_access(input bit we, input logic [31:0] a, input logic [31:0] d,
                            output logic [31:0] q);
    @(negedge clk);
    cpu_req = 1'b1; cpu_we = we; cpu_addr = a; cpu_wdata = d; cpu_size = HS_WORD;
    do @(negedge clk); while (!cpu_ack);
    q = cpu_rdata;
    cpu_req = 1'b0;
  endtask

  task automatic cpu_write(input logic [31:0] a, input logic [31:0] d);
    logic [31:0] q;
    cpu_access(1'b1, a, d, q);
  endtask

  // ---------------- mechanism counters ----------------
  int n_lock_rel = 0, n_locked_xfer = 0, n_handover = 0, n_restart = 0, n_kb = 0;
  int n_kind[2][3];
  logic prev_m;
  always @(posedge clk) if (rst_n) begin
    if (tq_lock_release) n_lock_rel++;
    if (dut.hmastlock && dut.bus_s2m.hready && dut.bus_m2s.htrans != HT_IDLE) n_locked_xfer++;
    if (dut.bus_s2m.hready) begin
      if (dut.hmaster != prev_m) n_handover++;
      prev_m = dut.hmaster;
    end
    // T/Q master starts a NONSEQ in the middle of a block's burst
    if (dut.hmaster == 1'b1 && dut.bus_m2s.htrans == HT_NONSEQ && dut.bus_s2m.hready) begin
      if (dut.u_tq_ip.ai != 0 && dut.bus_m2s.haddr[9:0] != 10'd0) n_restart++;
      if (dut.u_tq_ip.ai != 0 && dut.bus_m2s.haddr[9:0] == 10'd0) n_kb++;
    end
    if (dut.u_tq_ip.tq_start)
      n_kind[dut.u_tq_ip.tq_mode.inverse][dut.u_tq_ip.tq_mode.kind]++;
  end

  // ---------------- stimulus and checking ----------------
  localparam int unsigned IN_BASE  = 32'h1400_0000;
  localparam int unsigned OUT_BASE = 32'h1420_0000;
  localparam int N_MB = 48;   // 128 x 96

  function automatic int rnd(int lim);
    return int'($urandom_range(2 * lim)) - lim;
  endfunction

  function automatic int blk_len(int b);
    return (b >= 25) ? 4 : 16;
  endfunction

  function automatic int blk_kind(int b);
    return (b == 16) ? 1 : (b >= 25) ? 2 : 0;
  endfunction

  // fill the input area with random blocks
  task automatic load_input(bit inverse);
    int unsigned wa = IN_BASE >> 2;
    for (int mbi = 0; mbi < N_MB; mbi++)
      for (int b = 0; b < MB_BLOCKS; b++) begin
        int n = blk_len(b), k = blk_kind(b), lim;
        int v[16];
        if (!inverse) lim = (k == 0) ? 255 : (k == 1) ? 2000 : 8000;
        else          lim = (k == 0) ? 10 : 50;
        for (int i = 0; i < n; i++) v[i] = rnd(lim);
        for (int w = 0; w < n / 2; w++) begin
          mem[wa] = {16'(v[2*w+1]), 16'(v[2*w])};
          wa++;
        end
      end
    // clear the output area
    for (int unsigned a = OUT_BASE >> 2; a < (OUT_BASE >> 2) + N_MB * MB_SAMPLES / 2; a++)
      mem[a] = 32'hDEAD_BEEF;
  endtask

  task automatic check_output(bit inverse, int qp);
    int unsigned ra = IN_BASE >> 2, oa = OUT_BASE >> 2;
    int errs = 0;
    for (int mbi = 0; mbi < N_MB; mbi++)
      for (int b = 0; b < MB_BLOCKS; b++) begin
        int n = blk_len(b), k = blk_kind(b);
        blk16_t x = '{default: 0}, r;
        for (int w = 0; w < n / 2; w++) begin
          x[2*w]   = int'($signed(mem[ra][15:0]));
          x[2*w+1] = int'($signed(mem[ra][31:16]));
          ra++;
        end
        r = tq_block(x, k, inverse, qp, 1'b1);
        for (int w = 0; w < n / 2; w++) begin
          logic [31:0] e = {16'(r[2*w+1]), 16'(r[2*w])};
          checks++;
          if (mem[oa] !== e) begin
            failures++;
            if (errs++ < 10)
              $display("mb %0d blk %0d word %0d: got %h exp %h", mbi, b, w, mem[oa], e);
          end
          oa++;
        end
      end
  endtask

  task automatic run_op(bit inverse, int qp, int rls);
    logic [31:0] st;
    int polls = 0;
    load_input(inverse);
    cpu_write(32'h4000_0000, {16'h0, 6'(qp), 5'd1, 4'd0, inverse});   // Data 1
    cpu_write(32'h4000_0004, 32'(rls));                                 // Data 2
    cpu_write(32'h4000_0008, {16'h0, 1'b1, 15'h1400});                  // Data 3
    // processor traffic while the IP works, then poll the status word
    do begin
      logic [31:0] q;
      repeat ($urandom_range(20)) @(negedge clk);
      cpu_access(1'b0, IN_BASE + 4 * $urandom_range(1000), 0, q);
      cpu_access(1'b0, 32'h4000_000C, 0, st);
      polls++;
    end while (!st[1]);
    checks++;
    if (st[0]) begin
      failures++;
      $display("busy still set after done");
    end
    cpu_access(1'b0, 32'h4000_0008, 0, st);
    checks++;
    if (st[15]) begin
      failures++;
      $display("SB not cleared");
    end
    check_output(inverse, qp);
  endtask

  task automatic need(string what, int n);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    cpu_req = 0; cpu_we = 0; cpu_addr = 0; cpu_wdata = 0; cpu_size = HS_WORD;
    mem_ack = 0; mem_rdata = 0; mem_wait = 0; prev_m = 0;
    foreach (n_kind[i, j]) n_kind[i][j] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    run_op(1'b0, 28, 5);
    checks++;
    if (n_lock_rel != (N_MB - 1) / 5) begin
      failures++;
      $display("lock released %0d times, expected %0d", n_lock_rel, (N_MB - 1) / 5);
    end
    run_op(1'b1, 12, 0);

    $display("mechanisms:");
    need("lock periods released (RLS)", n_lock_rel);
    need("locked transfers", n_locked_xfer);
    need("bus hand-overs", n_handover);
    need("burst restarts after losing bus", n_restart);
    need("1 KB boundary restarts", n_kb);
    need("memory wait states", n_wait_states);
    need("forward residual blocks", n_kind[0][0]);
    need("forward luma DC blocks", n_kind[0][1]);
    need("forward chroma DC blocks", n_kind[0][2]);
    need("inverse residual blocks", n_kind[1][0]);
    need("inverse luma DC blocks", n_kind[1][1]);
    need("inverse chroma DC blocks", n_kind[1][2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
