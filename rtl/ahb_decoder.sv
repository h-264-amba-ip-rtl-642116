// ahb_decoder: AHB address decoder.
//
// Slave s is selected when HADDR[31:28] equals REGION[s].  The default map
// puts the SDRAM controller (slave 0) at 0x1000_0000-0x1FFF_FFFF and the T/Q
// configuration registers (slave 1) at 0x4000_0000-0x4FFF_FFFF.  An address
// that matches no region selects nobody; the read multiplexer then answers
// OKAY with zero data.  Combinational.
module ahb_decoder #(
  parameter int NS = 2,
  parameter logic [3:0] REGION [NS] = '{4'h1, 4'h4}
) (
  input  logic [31:0]   haddr,
  output logic [NS-1:0] hsel
);

  always_comb begin
    for (int s = 0; s < NS; s++)
      hsel[s] = (haddr[31:28] == REGION[s]);
  end

endmodule
