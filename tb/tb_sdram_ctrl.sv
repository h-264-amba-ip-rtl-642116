// tb_sdram_ctrl: the memory-side AHB slave driven by a pipelined AHB master
// model (back-to-back transfers, address phase of the next transfer during
// the data phase of the previous one) and a memory that answers after 1 to 4
// cycles.  Word, halfword and byte writes at random addresses, mixed with
// reads that are checked against a byte-accurate shadow.
module tb_sdram_ctrl;
  import ahb_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        hsel;
  ahb_m2s_t    m2s;
  ahb_s2m_t    s2m;
  logic        mem_req, mem_we, mem_ack;
  logic [29:0] mem_addr;
  logic [3:0]  mem_be;
  logic [31:0] mem_wdata, mem_rdata;

  sdram_ctrl dut (.clk, .rst_n, .hsel, .m2s, .hready_in(s2m.hready), .s2m,
                  .mem_req, .mem_we, .mem_addr, .mem_be, .mem_wdata, .mem_ack, .mem_rdata);

  int checks = 0, failures = 0, n_wait = 0;
  logic [31:0] mem [int unsigned];
  logic [7:0]  shadow [int unsigned];
  int lat = 0;

  // memory: answers after 1..4 cycles
  always @(posedge clk) begin
    mem_ack <= 1'b0;
    if (mem_req && !mem_ack) begin
      if (lat == 0) lat = $urandom_range(1, 4);
      lat--;
      if (lat == 0) begin
        mem_ack <= 1'b1;
        if (mem_we) begin
          automatic logic [31:0] w = mem.exists(32'(mem_addr)) ? mem[32'(mem_addr)] : 32'h0;
          for (int b = 0; b < 4; b++) if (mem_be[b]) w[8*b +: 8] = mem_wdata[8*b +: 8];
          mem[32'(mem_addr)] = w;
        end else mem_rdata <= mem.exists(32'(mem_addr)) ? mem[32'(mem_addr)] : 32'h0;
      end
    end
  end

  typedef struct { bit we; logic [31:0] a; logic [2:0] sz; logic [31:0] d; } xfer_t;

  function automatic logic [31:0] expect_word(logic [31:0] a);
    logic [31:0] w;
    for (int b = 0; b < 4; b++) begin
      automatic int unsigned ba = {a[31:2], 2'(b)};
      w[8*b +: 8] = shadow.exists(ba) ? shadow[ba] : 8'h00;
    end
    return w;
  endfunction

  initial begin
    xfer_t q[$];
    xfer_t cur, prev;
    bit have_prev;
    hsel = 1'b1; m2s = '0; mem_ack = 0; mem_rdata = 0; have_prev = 1'b0;
    // known start: every byte written once with word writes
    for (int i = 0; i < 32; i++) begin
      automatic logic [31:0] d = $urandom;
      q.push_back('{1'b1, 32'h1400_0000 + 4 * i, HS_WORD, d});
    end
    for (int t = 0; t < 3000; t++) begin
      xfer_t x;
      x.a  = 32'h1400_0000 + $urandom_range(127);
      x.we = 1'($urandom_range(1));
      x.sz = x.we ? 3'($urandom_range(2)) : HS_WORD;
      if (x.sz == HS_HALF) x.a[0] = 1'b0;
      if (x.sz == HS_WORD) x.a[1:0] = 2'b00;
      x.d  = $urandom;
      q.push_back(x);
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    while (q.size() != 0 || have_prev) begin
      automatic bit have_cur = (q.size() != 0);
      if (have_cur) cur = q.pop_front();
      m2s.htrans = have_cur ? HT_NONSEQ : HT_IDLE;
      m2s.haddr  = cur.a;
      m2s.hwrite = cur.we;
      m2s.hsize  = cur.sz;
      m2s.hwdata = (have_prev && prev.we) ? prev.d : 32'h0;
      // wait for the end of the previous data phase
      forever begin
        #4;
        if (s2m.hready) break;
        n_wait++;
        @(negedge clk);
      end
      if (have_prev) begin
        if (prev.we) begin
          automatic logic [3:0] be = byte_lanes(prev.sz, prev.a[1:0]);
          for (int b = 0; b < 4; b++)
            if (be[b]) shadow[{prev.a[31:2], 2'(b)}] = prev.d[8*b +: 8];
        end else begin
          checks++;
          if (s2m.hrdata !== expect_word(prev.a)) begin
            failures++;
            $display("read %h: got %h exp %h", prev.a, s2m.hrdata, expect_word(prev.a));
          end
        end
      end
      @(negedge clk);
      prev = cur;
      have_prev = have_cur;
    end
    checks++;
    if (n_wait == 0) begin
      failures++;
      $display("no wait states seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
