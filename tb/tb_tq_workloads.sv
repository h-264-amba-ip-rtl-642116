// tb_tq_workloads: the platform on the image sizes that matter for the IP's
// rated performance, end to end through the AHB.
//   1. one CIF frame (352x288, IS = 4, 396 macroblocks), forward, QP 26,
//      RLS = 22 (one macroblock row per bus-lock period)
//   2. one 2048x1536 frame (IS = 15, 12,288 macroblocks, the largest size),
//      forward, QP 34, RLS = 128
// The output area is moved 16 MB above the input (OUT_OFS) so that the
// largest frame (about 10 MB) does not overlap its own results.  The memory
// acknowledges every access on the cycle after its request (one wait state
// per AHB transfer through the memory controller), and the processor stays
// off the bus while the IP runs, so the clock counts are those of the IP.  Every output word
// is compared with the matrix reference model; the test also checks the
// number of blocks the core processed and the number of lock releases, and
// prints clocks per macroblock and the frame rate this gives at 106 MHz
// (the core alone needs 810 clocks per macroblock).
module tb_tq_workloads;
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

  localparam logic [31:0] OFS = 32'h0100_0000;
  tq_platform #(.OUT_OFS(OFS)) dut (.*);

  int checks = 0, failures = 0;

  // external memory, answers one cycle after the request, word-addressed
  logic [31:0] mem [int unsigned];
  always @(posedge clk) begin
    mem_ack <= 1'b0;
    if (mem_req && !mem_ack) begin
      mem_ack <= 1'b1;
      if (mem_we) begin
        automatic logic [31:0] w = mem.exists(32'(mem_addr)) ? mem[32'(mem_addr)] : 32'h0;
        for (int b = 0; b < 4; b++)
          if (mem_be[b]) w[8*b +: 8] = mem_wdata[8*b +: 8];
        mem[32'(mem_addr)] = w;
      end else begin
        mem_rdata <= mem.exists(32'(mem_addr)) ? mem[32'(mem_addr)] : 32'h0;
      end
    end
  end

  task automatic cpu_access(input bit we, input logic [31:0] a, input logic [31:0] d,
                            output logic [31:0] q);
    @(negedge clk);
    cpu_req = 1'b1; cpu_we = we; cpu_addr = a; cpu_wdata = d; cpu_size = HS_WORD;
    do @(negedge clk); while (!cpu_ack);
    q = cpu_rdata;
    cpu_req = 1'b0;
  endtask

  longint cyc = 0;
  int n_blocks = 0, n_rel = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.u_tq_ip.tq_start) n_blocks++;
    if (tq_lock_release) n_rel++;
  end

  localparam int unsigned IN_BASE = 32'h1400_0000;

  function automatic int rnd(int lim);
    return int'($urandom_range(2 * lim)) - lim;
  endfunction

  function automatic int blk_len(int b);
    return (b >= 25) ? 4 : 16;
  endfunction

  function automatic int blk_kind(int b);
    return (b == 16) ? 1 : (b >= 25) ? 2 : 0;
  endfunction

  task automatic run_frame(string name, int is, int qp, int rls);
    int n_mb = img_mb_w(4'(is)) * img_mb_h(4'(is));
    int unsigned wa = IN_BASE >> 2, ra = IN_BASE >> 2, oa = (IN_BASE + OFS) >> 2;
    int errs = 0;
    logic [31:0] q;
    longint t0, t1;
    int b0 = n_blocks, r0 = n_rel;
    mem.delete();
    for (int m = 0; m < n_mb; m++)
      for (int b = 0; b < MB_BLOCKS; b++) begin
        automatic int k = blk_kind(b);
        automatic int lim = (k == 0) ? 255 : (k == 1) ? 2000 : 8000;
        for (int w = 0; w < blk_len(b) / 2; w++) begin
          mem[wa] = {16'(rnd(lim)), 16'(rnd(lim))};
          wa++;
        end
      end
    cpu_access(1'b1, 32'h4000_0000, {16'h0, 6'(qp), 5'd1, 4'(is), 1'b0}, q);
    cpu_access(1'b1, 32'h4000_0004, 32'(rls), q);
    cpu_access(1'b1, 32'h4000_0008, {16'h0, 1'b1, 15'(IN_BASE >> 16)}, q);
    t0 = cyc;
    while (!tq_done) @(posedge clk);
    t1 = cyc;
    cpu_access(1'b0, 32'h4000_000C, 0, q);
    checks++;
    if (q[1:0] != 2'b10) begin
      failures++;
      $display("%s: status %b after done", name, q[1:0]);
    end
    $display("%s: %0d macroblocks, %0d clocks, %0d clocks per macroblock, %0d.%0d frames/s at 106 MHz",
             name, n_mb, t1 - t0, (t1 - t0) / longint'(n_mb),
             106_000_000 / (t1 - t0), (10 * 106_000_000 / (t1 - t0)) % 10);
    checks++;
    if (n_blocks - b0 != n_mb * MB_BLOCKS) begin
      failures++;
      $display("%s: core ran %0d blocks, expected %0d", name, n_blocks - b0, n_mb * MB_BLOCKS);
    end
    checks++;
    if (n_rel - r0 != (n_mb - 1) / rls) begin
      failures++;
      $display("%s: %0d lock releases, expected %0d", name, n_rel - r0, (n_mb - 1) / rls);
    end
    for (int m = 0; m < n_mb; m++)
      for (int b = 0; b < MB_BLOCKS; b++) begin
        automatic int n = blk_len(b), k = blk_kind(b);
        automatic blk16_t x = '{default: 0};
        blk16_t r;
        for (int w = 0; w < n / 2; w++) begin
          x[2*w]   = int'($signed(mem[ra][15:0]));
          x[2*w+1] = int'($signed(mem[ra][31:16]));
          ra++;
        end
        r = tq_block(x, k, 1'b0, qp, 1'b1);
        for (int w = 0; w < n / 2; w++) begin
          automatic logic [31:0] e = {16'(r[2*w+1]), 16'(r[2*w])};
          checks++;
          if (!mem.exists(oa) || mem[oa] !== e) begin
            failures++;
            if (errs++ < 10) $display("%s: mb %0d blk %0d word %0d wrong", name, m, b, w);
          end
          oa++;
        end
      end
  endtask

  initial begin
    cpu_req = 0; cpu_we = 0; cpu_addr = 0; cpu_wdata = 0; cpu_size = HS_WORD;
    mem_ack = 0; mem_rdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_frame("CIF 352x288", 4, 26, 22);
    run_frame("2048x1536", 15, 34, 128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
