// tb_m2ahb: the processor bridge against a behavioural AHB memory with wait
// states and a grant that comes and goes at random.  Random word writes and
// reads from the processor side are checked against a shadow copy; the test
// also checks that a transfer is only driven while the bridge owns the bus,
// that it never locks, and counts grant waits.
module tb_m2ahb;
  import ahb_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        cpu_req, cpu_we, cpu_ack, hbusreq, hlock, hgrant;
  logic [31:0] cpu_addr, cpu_wdata, cpu_rdata;
  logic [2:0]  cpu_size;
  ahb_s2m_t    s2m;
  ahb_m2s_t    m2s;

  m2ahb dut (.*);
  tb_ahb_mem u_mem (.clk, .rst_n, .hsel(1'b1), .m2s, .hready_in(s2m.hready), .s2m);

  int checks = 0, failures = 0, n_grant_wait = 0;
  logic own_ref = 1'b0;
  logic [31:0] shadow [int unsigned];

  always @(posedge clk) begin
    if (rst_n) begin
      if (m2s.htrans != HT_IDLE && !own_ref) begin
        failures++;
        $display("transfer driven without bus ownership");
      end
      if (hbusreq && !own_ref) n_grant_wait++;
      if (hlock) begin
        failures++;
        $display("bridge asserted HLOCK");
      end
      if (s2m.hready) own_ref <= hgrant;
    end
  end

  always @(negedge clk) hgrant <= ($urandom_range(3) != 0);

  task automatic access(bit we, logic [31:0] a, logic [31:0] d, output logic [31:0] q);
    cpu_req = 1'b1; cpu_we = we; cpu_addr = a; cpu_wdata = d; cpu_size = HS_WORD;
    do @(negedge clk); while (!cpu_ack);
    q = cpu_rdata;
    cpu_req = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    logic [31:0] q;
    cpu_req = 0; cpu_we = 0; cpu_addr = 0; cpu_wdata = 0; cpu_size = HS_WORD;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 1500; t++) begin
      automatic logic [31:0] a = {20'h14000, 10'($urandom_range(63)), 2'b00};
      if ($urandom_range(1) != 0 || !shadow.exists(a)) begin
        automatic logic [31:0] d = $urandom;
        access(1'b1, a, d, q);
        shadow[a] = d;
      end else begin
        access(1'b0, a, 0, q);
        checks++;
        if (q !== shadow[a]) begin
          failures++;
          $display("read %h: got %h exp %h", a, q, shadow[a]);
        end
      end
    end
    checks++;
    if (n_grant_wait == 0) begin
      failures++;
      $display("never waited for a grant");
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
