// tb_tq_cfg_regs: the configuration register slave driven by an AHB master
// model (single transfers, some back to back so that a write data phase
// overlaps the next address phase).  Checks: read-back of Data 1..3, the field
// outputs (QP, NoF, IS, FI, RLS, AM), a one-cycle start pulse when Data 3 is
// written with SB set while idle and none while busy, SB cleared and done set
// by the end-of-operation pulse, done cleared by the next start, the status
// word, and that transfers without HSEL or of type IDLE change nothing.
module tb_tq_cfg_regs;
  import ahb_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        hsel;
  ahb_m2s_t    m2s;
  ahb_s2m_t    s2m;
  logic [5:0]  qp;
  logic [4:0]  nof;
  logic [3:0]  img_size;
  logic        fi, start, busy, done_pulse;
  logic [15:0] rls;
  logic [14:0] am;

  tq_cfg_regs dut (.clk, .rst_n, .hsel, .m2s, .hready_in(s2m.hready), .s2m,
                   .qp, .nof, .img_size, .fi, .rls, .am, .start, .busy, .done_pulse);

  int checks = 0, failures = 0, n_start = 0;
  always @(posedge clk) if (start) n_start++;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h exp %h", what, got, exp);
    end
  endtask

  // one transfer: address phase, then data phase (returns read data)
  task automatic xfer(bit sel, bit we, logic [3:0] a, logic [31:0] d, output logic [31:0] q);
    hsel = sel; m2s.htrans = HT_NONSEQ; m2s.hwrite = we; m2s.haddr = 32'h4000_0000 | 32'(a);
    m2s.hsize = HS_WORD;
    @(negedge clk);
    hsel = 1'b0; m2s.htrans = HT_IDLE; m2s.hwdata = d;
    #4 q = s2m.hrdata;
    @(negedge clk);
  endtask

  task automatic wr(logic [3:0] a, logic [31:0] d);
    logic [31:0] q;
    xfer(1'b1, 1'b1, a, d, q);
  endtask

  task automatic rd(logic [3:0] a, output logic [31:0] q);
    xfer(1'b1, 1'b0, a, 0, q);
  endtask

  initial begin
    logic [31:0] q;
    logic [15:0] d1, d2, d3;
    int s0;
    hsel = 0; m2s = '0; busy = 0; done_pulse = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int t = 0; t < 300; t++) begin
      d1 = 16'($urandom); d2 = 16'($urandom); d3 = 16'($urandom); d3[15] = 1'b0;
      wr(4'h0, {16'hFFFF, d1});
      wr(4'h4, {16'hFFFF, d2});
      wr(4'h8, {16'hFFFF, d3});
      // ignored: no HSEL, and IDLE
      xfer(1'b0, 1'b1, 4'h0, {16'h0, ~d1}, q);
      hsel = 1'b1; m2s.htrans = HT_IDLE; m2s.hwrite = 1'b1; m2s.haddr = 32'h4000_0004;
      @(negedge clk);
      m2s.hwdata = {16'h0, ~d2}; hsel = 1'b0;
      @(negedge clk);
      rd(4'h0, q); chk("Data 1", q, {16'h0, d1});
      rd(4'h4, q); chk("Data 2", q, {16'h0, d2});
      rd(4'h8, q); chk("Data 3", q, {16'h0, d3});
      chk("QP", 32'(qp), 32'(d1[15:10]));
      chk("NoF", 32'(nof), 32'(d1[9:5]));
      chk("IS", 32'(img_size), 32'(d1[4:1]));
      chk("FI", 32'(fi), 32'(d1[0]));
      chk("RLS", 32'(rls), 32'(d2));
      chk("AM", 32'(am), 32'(d3[14:0]));
      // start while idle
      s0 = n_start;
      d3[15] = 1'b1;
      wr(4'h8, {16'h0, d3});
      @(negedge clk);
      chk("start pulse", 32'(n_start - s0), 32'(1));
      busy = 1'b1;
      rd(4'hC, q); chk("status busy", 32'(q), 32'(32'h1));
      rd(4'h8, q); chk("SB while busy", 32'(q), 32'({16'h0, d3}));
      // start while busy is ignored
      wr(4'h8, {16'h0, d3});
      chk("no start while busy", 32'(n_start - s0), 32'(1));
      repeat ($urandom_range(5)) @(negedge clk);
      busy = 1'b0; done_pulse = 1'b1;
      @(negedge clk);
      done_pulse = 1'b0;
      rd(4'h8, q); chk("SB cleared", 32'(q[15]), 32'(1'b0));
      rd(4'hC, q); chk("status done", 32'(q), 32'(32'h2));
      d3[15] = 1'b0;
      wr(4'h8, {16'h0, d3});
      rd(4'hC, q); chk("done kept", 32'(q), 32'(32'h2));
      d3[15] = 1'b1;
      wr(4'h8, {16'h0, d3});
      rd(4'hC, q); chk("done cleared by start", 32'(q), 32'(32'h0));
      chk("start pulses", 32'(n_start - s0), 32'(2));
      done_pulse = 1'b1;
      @(negedge clk);
      done_pulse = 1'b0;
      checks++;
      if (start) begin
        failures++;
        $display("start pulse longer than one cycle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
