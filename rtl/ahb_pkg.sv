// ahb_pkg: AMBA AHB signal types of the platform bus.
//
// ahb_m2s_t bundles what a master drives towards the slaves (address and
// control of the address phase plus the write data of the data phase);
// ahb_s2m_t bundles what a slave returns.  The bus is 32 bits wide; HBUSREQ,
// HLOCK and HGRANT are carried separately between masters and arbiter.
package ahb_pkg;

  typedef enum logic [1:0] {
    HT_IDLE   = 2'b00,
    HT_BUSY   = 2'b01,
    HT_NONSEQ = 2'b10,
    HT_SEQ    = 2'b11
  } htrans_t;

  typedef enum logic [1:0] {
    HR_OKAY  = 2'b00,
    HR_ERROR = 2'b01,
    HR_RETRY = 2'b10,
    HR_SPLIT = 2'b11
  } hresp_t;

  localparam logic [2:0] HB_SINGLE = 3'b000;
  localparam logic [2:0] HB_INCR   = 3'b001;

  localparam logic [2:0] HS_BYTE = 3'b000;
  localparam logic [2:0] HS_HALF = 3'b001;
  localparam logic [2:0] HS_WORD = 3'b010;

  typedef struct packed {
    logic [31:0] haddr;
    htrans_t     htrans;
    logic        hwrite;
    logic [2:0]  hsize;
    logic [2:0]  hburst;
    logic [3:0]  hprot;
    logic [31:0] hwdata;
  } ahb_m2s_t;

  typedef struct packed {
    logic [31:0] hrdata;
    logic        hready;
    hresp_t      hresp;
  } ahb_s2m_t;

  // byte lanes addressed by a transfer of size hsize at address addr[1:0]
  function automatic logic [3:0] byte_lanes(input logic [2:0] hsize, input logic [1:0] addr);
    unique case (hsize)
      HS_BYTE: return 4'b0001 << addr;
      HS_HALF: return addr[1] ? 4'b1100 : 4'b0011;
      default: return 4'b1111;
    endcase
  endfunction

endpackage
