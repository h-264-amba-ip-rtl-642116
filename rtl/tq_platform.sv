// tq_platform: AHB platform around the H.264 transform/quantisation IP.
//
//   processor port --> m2ahb (master 0) --+
//                                          +-- AHB (arbiter, decoder,
//   ahb2h264_wrapper master (master 1) ---+    Master2Slave and Slave2Master
//                                              multiplexers)
//   AHB --> sdram_ctrl (slave 0, 0x1xxx_xxxx) --> memory port
//   AHB --> ahb2h264_wrapper registers (slave 1, 0x4xxx_xxxx)
//
// The processor core and the SDRAM device are outside this RTL: the
// processor's local request/acknowledge port and the memory port of the
// SDRAM controller are the ports of this module.  A typical operation: the
// processor loads video data into memory, writes the T/Q registers at
// 0x4000_0000 (Data 1), 0x4000_0004 (Data 2) and 0x4000_0008 (Data 3 with
// the start bit), polls the status word at 0x4000_000C, and reads the
// results back from memory.  tq_busy / tq_done / tq_lock_release mirror the
// IP's status for observation.  Single clock, active-low asynchronous reset.
module tq_platform
  import ahb_pkg::*;
#(
  parameter logic [31:0] OUT_OFS = 32'h0020_0000,
  parameter int          MEM_AW  = 30
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor local port
  input  logic              cpu_req,
  input  logic              cpu_we,
  input  logic [31:0]       cpu_addr,
  input  logic [31:0]       cpu_wdata,
  input  logic [2:0]        cpu_size,
  output logic              cpu_ack,
  output logic [31:0]       cpu_rdata,
  // external memory port
  output logic              mem_req,
  output logic              mem_we,
  output logic [MEM_AW-1:0] mem_addr,
  output logic [3:0]        mem_be,
  output logic [31:0]       mem_wdata,
  input  logic              mem_ack,
  input  logic [31:0]       mem_rdata,
  // IP status
  output logic              tq_busy,
  output logic              tq_done,
  output logic              tq_lock_release
);

  localparam int NM = 2;
  localparam int NS = 2;

  ahb_m2s_t      m_out [NM];
  ahb_s2m_t      s_out [NS];
  ahb_m2s_t      bus_m2s;
  ahb_s2m_t      bus_s2m;
  logic [NM-1:0] hbusreq, hlock, hgrant;
  logic [0:0]    hmaster;
  logic          hmastlock;
  logic [NS-1:0] hsel;

  ahb_arbiter #(.NM(NM)) u_arb (
    .clk, .rst_n, .hbusreq, .hlock, .hready(bus_s2m.hready),
    .hgrant, .hmaster, .hmastlock
  );

  ahb_mux_m2s #(.NM(NM)) u_m2s (
    .clk, .rst_n, .hready(bus_s2m.hready), .hmaster,
    .m_in(m_out), .bus(bus_m2s)
  );

  ahb_decoder #(.NS(NS)) u_dec (
    .haddr(bus_m2s.haddr), .hsel
  );

  ahb_mux_s2m #(.NS(NS)) u_s2m (
    .clk, .rst_n, .hsel, .s_in(s_out), .bus(bus_s2m)
  );

  m2ahb u_cpu_bridge (
    .clk, .rst_n,
    .cpu_req, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_size, .cpu_ack, .cpu_rdata,
    .hbusreq(hbusreq[0]), .hlock(hlock[0]), .hgrant(hgrant[0]),
    .s2m(bus_s2m), .m2s(m_out[0])
  );

  sdram_ctrl #(.AW(MEM_AW)) u_sdramc (
    .clk, .rst_n,
    .hsel(hsel[0]), .m2s(bus_m2s), .hready_in(bus_s2m.hready), .s2m(s_out[0]),
    .mem_req, .mem_we, .mem_addr, .mem_be, .mem_wdata, .mem_ack, .mem_rdata
  );

  ahb2h264_wrapper #(.OUT_OFS(OUT_OFS)) u_tq_ip (
    .clk, .rst_n,
    .s_hsel(hsel[1]), .s_m2s(bus_m2s), .hready(bus_s2m.hready), .s_s2m(s_out[1]),
    .m_hbusreq(hbusreq[1]), .m_hlock(hlock[1]), .m_hgrant(hgrant[1]),
    .m_m2s(m_out[1]), .m_s2m(bus_s2m),
    .busy(tq_busy), .done(tq_done), .lock_release(tq_lock_release)
  );

  // a locked master keeps the bus: no other master may own it meanwhile
  assert property (@(posedge clk) disable iff (!rst_n)
    (hmastlock && bus_s2m.hready && hlock[hmaster]) |=> hmaster == $past(hmaster));

endmodule
