// tb_ahb_mux_m2s: random master outputs, owner and HREADY; address/control
// must come from the current owner, write data from the owner of the
// previous address phase that completed (HREADY high).
module tb_ahb_mux_m2s;
  import ahb_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     hready;
  logic [1:0] hmaster;
  ahb_m2s_t m_in [4];
  ahb_m2s_t bus;

  ahb_mux_m2s #(.NM(4)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    int dm;
    dm = 0;
    hready = 1'b1; hmaster = '0;
    foreach (m_in[i]) m_in[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      foreach (m_in[i]) m_in[i] = $bits(ahb_m2s_t)'({$urandom, $urandom, $urandom});
      hmaster = 2'($urandom_range(3));
      hready = ($urandom_range(2) != 0);
      #1;
      checks++;
      if (bus.haddr !== m_in[hmaster].haddr || bus.htrans !== m_in[hmaster].htrans ||
          bus.hwrite !== m_in[hmaster].hwrite || bus.hsize !== m_in[hmaster].hsize ||
          bus.hwdata !== m_in[dm].hwdata) begin
        failures++;
        $display("t=%0d wrong routing (owner %0d, data owner %0d)", t, hmaster, dm);
      end
      @(posedge clk);
      if (hready) dm = int'(hmaster);
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
