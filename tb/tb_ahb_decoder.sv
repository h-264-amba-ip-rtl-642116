// tb_ahb_decoder: random and corner addresses; slave 0 for 0x1xxxxxxx,
// slave 1 for 0x4xxxxxxx, nobody elsewhere.
module tb_ahb_decoder;
  logic [31:0] haddr;
  logic [1:0]  hsel;

  ahb_decoder dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [1:0] e;
      haddr = (t < 16) ? {4'(t), 28'h0} : (t < 32) ? {4'(t - 16), 28'hFFF_FFFF} : $urandom;
      #1;
      e = {haddr[31:28] == 4'h4, haddr[31:28] == 4'h1};
      checks++;
      if (hsel !== e) begin
        failures++;
        $display("addr %h: hsel %b exp %b", haddr, hsel, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
