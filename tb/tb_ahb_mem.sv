// tb_ahb_mem: behavioural AHB slave memory for the testbenches.  Word array
// (associative, indexed by word address) with byte lanes; each transfer's
// data phase takes 0 to MAXWAIT wait states, chosen at random.  Only OKAY.
module tb_ahb_mem
  import ahb_pkg::*;
#(
  parameter int MAXWAIT = 2
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     hsel,
  input  ahb_m2s_t m2s,
  input  logic     hready_in,
  output ahb_s2m_t s2m
);
  logic [31:0] mem [int unsigned];
  int          n_wait = 0;

  logic        dp = 1'b0, dp_wr = 1'b0;
  logic [31:0] dp_a = '0;
  logic [2:0]  dp_sz = '0;
  int          wleft = 0;

  always_comb begin
    s2m.hresp  = HR_OKAY;
    s2m.hready = !dp || wleft == 0;
    s2m.hrdata = (dp && !dp_wr && mem.exists(dp_a >> 2)) ? mem[dp_a >> 2] : 32'h0;
  end

  always @(posedge clk) begin
    if (dp && wleft != 0) begin
      wleft--;
      n_wait++;
    end else begin
      if (dp && dp_wr) begin
        automatic logic [31:0] w = mem.exists(dp_a >> 2) ? mem[dp_a >> 2] : 32'h0;
        automatic logic [3:0] be = byte_lanes(dp_sz, dp_a[1:0]);
        for (int b = 0; b < 4; b++) if (be[b]) w[8*b +: 8] = m2s.hwdata[8*b +: 8];
        mem[dp_a >> 2] = w;
      end
      if (hready_in) begin
        dp    <= rst_n && hsel && m2s.htrans[1];
        dp_wr <= m2s.hwrite;
        dp_a  <= m2s.haddr;
        dp_sz <= m2s.hsize;
        wleft <= $urandom_range(MAXWAIT);
      end
    end
  end
endmodule
