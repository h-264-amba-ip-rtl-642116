// tb_ahb_arbiter: random requests, locks and HREADY against a cycle model of
// the rules: a locked owner keeps the grant, otherwise the lowest requesting
// index wins, master 0 by default; HMASTER/HMASTLOCK follow the grant at
// edges with HREADY high.
module tb_ahb_arbiter;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [2:0] hbusreq, hlock, hgrant;
  logic       hready, hmastlock;
  logic [1:0] hmaster;

  ahb_arbiter #(.NM(3)) dut (.*);

  int checks = 0, failures = 0;
  int g = 0, mst = 0, ml = 0, n_locked_hold = 0;

  initial begin
    hbusreq = '0; hlock = '0; hready = 1'b1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      int ng;
      hbusreq = 3'($urandom_range(7));
      hlock   = 3'($urandom_range(7)) & hbusreq & {3{t % 50 < 25}};
      hready  = ($urandom_range(3) != 0);
      if (hbusreq[g] && hlock[g]) begin
        ng = g;
        if (hbusreq != (3'b1 << g)) n_locked_hold++;
      end else if (hbusreq[0]) ng = 0;
      else if (hbusreq[1]) ng = 1;
      else if (hbusreq[2]) ng = 2;
      else ng = 0;
      @(posedge clk);
      if (hready) begin
        mst = g;
        ml = int'(hlock[g]);
      end
      g = ng;
      @(negedge clk);
      checks++;
      if (hgrant !== (3'b1 << g) || hmaster !== 2'(mst) || hmastlock !== 1'(ml)) begin
        failures++;
        $display("t=%0d grant %b exp %b master %0d exp %0d lock %b exp %0d", t, hgrant, 3'b1 << g,
                 hmaster, mst, hmastlock, ml);
      end
    end
    checks++;
    if (n_locked_hold == 0) begin
      failures++;
      $display("lock never held the grant against another request");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
