// ahb_mux_s2m: the "Slave2Master" multiplexer of the AHB platform.
//
// The decoder's HSEL of an address phase is registered at the rising edge
// with HREADY high; during the following data phase HRDATA, HREADY and HRESP
// come from that slave.  When no slave was selected the bus answers HREADY
// high, OKAY, zero data.
module ahb_mux_s2m
  import ahb_pkg::*;
#(
  parameter int NS = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NS-1:0] hsel,
  input  ahb_s2m_t      s_in [NS],
  output ahb_s2m_t      bus
);

  logic [NS-1:0] dsel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          dsel <= '0;
    else if (bus.hready) dsel <= hsel;
  end

  always_comb begin
    bus = '{hrdata: '0, hready: 1'b1, hresp: HR_OKAY};
    for (int s = 0; s < NS; s++)
      if (dsel[s]) bus = s_in[s];
  end

endmodule
