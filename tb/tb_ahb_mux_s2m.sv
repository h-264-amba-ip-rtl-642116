// tb_ahb_mux_s2m: random slave responses and selects; the response must
// come from the slave selected in the last completed address phase, or be
// OKAY/ready/zero when none was selected.
module tb_ahb_mux_s2m;
  import ahb_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [2:0] hsel;
  ahb_s2m_t   s_in [3];
  ahb_s2m_t   bus;

  ahb_mux_s2m #(.NS(3)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    int ds;
    ds = -1;
    hsel = '0;
    foreach (s_in[i]) s_in[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      automatic int k = $urandom_range(3);
      ahb_s2m_t e;
      foreach (s_in[i]) s_in[i] = {$urandom, 1'($urandom_range(3) != 0), 2'($urandom_range(1))};
      hsel = (k == 3) ? 3'b000 : 3'(1 << k);
      #1;
      e = (ds < 0) ? '{hrdata: 0, hready: 1'b1, hresp: HR_OKAY} : s_in[ds];
      checks++;
      if (bus !== e) begin
        failures++;
        $display("t=%0d wrong response (data slave %0d)", t, ds);
      end
      @(posedge clk);
      if (e.hready) ds = (k == 3) ? -1 : k;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
