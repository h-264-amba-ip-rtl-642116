// m2ahb: "Processor2AHB" wrapper, the bridge from the processor's local bus to
// the AHB.
//
// The processor side is a simple request/acknowledge port: the processor
// holds cpu_req with cpu_we, cpu_addr, cpu_wdata and cpu_size stable until
// cpu_ack pulses for one cycle (with cpu_rdata for a read).  Each request
// becomes one AHB SINGLE transfer: the bridge requests the bus, waits for the
// grant to take effect (HGRANT seen at a rising edge with HREADY high), drives
// the NONSEQ address phase, then the data phase, and acknowledges when the
// data phase completes.  It never locks the bus.  The processor-side protocol
// is this design's choice; the processor core itself is outside this RTL.
module m2ahb
  import ahb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // processor side
  input  logic        cpu_req,
  input  logic        cpu_we,
  input  logic [31:0] cpu_addr,
  input  logic [31:0] cpu_wdata,
  input  logic [2:0]  cpu_size,
  output logic        cpu_ack,
  output logic [31:0] cpu_rdata,
  // AHB master side
  output logic        hbusreq,
  output logic        hlock,
  input  logic        hgrant,
  input  ahb_s2m_t    s2m,
  output ahb_m2s_t    m2s
);

  typedef enum logic [1:0] {S_IDLE, S_ADDR, S_DATA, S_DONE} state_t;
  state_t state;
  logic   own;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) own <= 1'b0;
    else if (s2m.hready) own <= hgrant;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cpu_rdata <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (cpu_req) state <= S_ADDR;
        S_ADDR: if (own && s2m.hready) state <= S_DATA;
        S_DATA: if (s2m.hready) begin
          if (!cpu_we) cpu_rdata <= s2m.hrdata;
          state <= S_DONE;
        end
        S_DONE: state <= S_IDLE;
      endcase
    end
  end

  assign cpu_ack = (state == S_DONE);
  assign hbusreq = (state == S_ADDR);
  assign hlock   = 1'b0;

  always_comb begin
    m2s        = '0;
    m2s.htrans = HT_IDLE;
    m2s.hsize  = HS_WORD;
    m2s.hburst = HB_SINGLE;
    m2s.hprot  = 4'b0011;
    m2s.haddr  = cpu_addr;
    if (state == S_ADDR && own) begin
      m2s.htrans = HT_NONSEQ;
      m2s.hwrite = cpu_we;
      m2s.hsize  = cpu_size;
    end
    if (state == S_DATA && cpu_we) m2s.hwdata = cpu_wdata;
  end

endmodule
