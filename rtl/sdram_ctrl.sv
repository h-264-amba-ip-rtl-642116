// sdram_ctrl: AHB slave in front of the external video memory (the platform's
// SDRAM controller position).
//
// Each AHB transfer addressed to it becomes one access on a simple memory
// port: mem_req is raised in the data phase with the word address, the byte
// lanes and, for a write, the write data; the transfer completes in the cycle
// the memory answers mem_ack (with mem_rdata for a read).  HREADY is held low
// until then, so the memory may take any number of cycles.  Only OKAY
// responses are given.
//
// This block stops at that memory port: SDRAM command sequencing (precharge,
// activate, CAS latency, refresh, 16-bit bursts) is not part of it, and the
// memory port is brought out of the design.
module sdram_ctrl
  import ahb_pkg::*;
#(
  parameter int AW = 30    // word-address width on the memory port
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          hsel,
  input  ahb_m2s_t      m2s,
  input  logic          hready_in,
  output ahb_s2m_t      s2m,
  // memory port
  output logic          mem_req,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [3:0]    mem_be,
  output logic [31:0]   mem_wdata,
  input  logic          mem_ack,
  input  logic [31:0]   mem_rdata
);

  logic          dp;        // a data phase addressed to this slave is open
  logic          dp_write;
  logic [AW-1:0] dp_addr;
  logic [3:0]    dp_be;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp       <= 1'b0;
      dp_write <= 1'b0;
      dp_addr  <= '0;
      dp_be    <= '0;
    end else if (hready_in) begin
      dp       <= hsel && (m2s.htrans == HT_NONSEQ || m2s.htrans == HT_SEQ);
      dp_write <= m2s.hwrite;
      dp_addr  <= AW'(m2s.haddr[31:2]);
      dp_be    <= byte_lanes(m2s.hsize, m2s.haddr[1:0]);
    end
  end

  assign mem_req   = dp;
  assign mem_we    = dp_write;
  assign mem_addr  = dp_addr;
  assign mem_be    = dp_be;
  assign mem_wdata = m2s.hwdata;

  assign s2m.hready = !dp || mem_ack;
  assign s2m.hresp  = HR_OKAY;
  assign s2m.hrdata = mem_rdata;

endmodule
