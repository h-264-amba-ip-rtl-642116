// ahb_mux_m2s: the "Master2Slave" multiplexer of the AHB platform.
//
// Address and control come from the master that owns the address phase
// (hmaster from the arbiter); write data comes from the master that owns the
// data phase, i.e. hmaster delayed to the next rising edge with HREADY high.
module ahb_mux_m2s
  import ahb_pkg::*;
#(
  parameter int NM = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  hready,
  input  logic [$clog2(NM)-1:0] hmaster,
  input  ahb_m2s_t              m_in [NM],
  output ahb_m2s_t              bus
);

  logic [$clog2(NM)-1:0] dmaster;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      dmaster <= '0;
    else if (hready) dmaster <= hmaster;
  end

  always_comb begin
    bus        = m_in[hmaster];
    bus.hwdata = m_in[dmaster].hwdata;
  end

endmodule
