// ahb_arbiter: AHB bus arbiter with fixed priority and locked transfers.
//
// Master 0 has the highest priority.  While the master that owns the bus
// keeps HBUSREQ and HLOCK asserted it keeps the grant, whatever the others
// request; otherwise the grant goes to the highest-priority requester, or to
// master 0 (default master) when nobody requests.  HGRANT is registered; bus
// ownership (HMASTER, HMASTLOCK) moves to the granted master at the next
// rising edge with HREADY high, as AHB prescribes.
module ahb_arbiter #(
  parameter int NM = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NM-1:0]         hbusreq,
  input  logic [NM-1:0]         hlock,
  input  logic                  hready,
  output logic [NM-1:0]         hgrant,
  output logic [$clog2(NM)-1:0] hmaster,
  output logic                  hmastlock
);

  localparam int MW = $clog2(NM);

  logic [MW-1:0] gnt_idx, nxt_idx;

  always_comb begin
    nxt_idx = '0;
    if (hbusreq[gnt_idx] && hlock[gnt_idx]) begin
      nxt_idx = gnt_idx;
    end else begin
      for (int i = NM - 1; i >= 0; i--)
        if (hbusreq[i]) nxt_idx = MW'(i);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gnt_idx   <= '0;
      hmaster   <= '0;
      hmastlock <= 1'b0;
    end else begin
      gnt_idx <= nxt_idx;
      if (hready) begin
        hmaster   <= gnt_idx;
        hmastlock <= hlock[gnt_idx];
      end
    end
  end

  always_comb begin
    hgrant = '0;
    hgrant[gnt_idx] = 1'b1;
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot(hgrant));

endmodule
