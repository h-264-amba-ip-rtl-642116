// tq_cfg_regs: configuration registers of the T/Q IP, an AHB slave.
//
// Three 16-bit segments, each in the low half of a 32-bit word:
//   offset 0x0  Data 1 : [15:10] QP (0..51)  [9:5] NoF (frames)
//                        [4:1] IS (image size code)  [0] FI (0 forward, 1 inverse)
//   offset 0x4  Data 2 : [15:0] RLS, macroblocks per bus lock (0: never lock)
//   offset 0x8  Data 3 : [15] SB start bit  [14:0] AM, bits [30:16] of the
//                        address of the input video data
//   offset 0xC  status : [0] busy  [1] done (read only)
// The field layout of the three segments follows the IP's register map; the
// offsets, the status word and the meaning of RLS = 0 are this design's.
// Writing Data 3 with SB set starts an operation (start pulses for one
// cycle); SB reads back as 1 until the operation has finished and is then
// cleared by hardware, and done is set.  Zero wait states, OKAY only.
module tq_cfg_regs
  import ahb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hsel,
  input  ahb_m2s_t    m2s,
  input  logic        hready_in,
  output ahb_s2m_t    s2m,
  // to the engine
  output logic [5:0]  qp,
  output logic [4:0]  nof,
  output logic [3:0]  img_size,
  output logic        fi,
  output logic [15:0] rls,
  output logic [14:0] am,
  output logic        start,
  input  logic        busy,
  input  logic        done_pulse
);

  logic [15:0] data1, data2, data3;
  logic        done_flag;
  logic        dp_wr, dp_rd;
  logic [1:0]  dp_reg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp_wr  <= 1'b0;
      dp_rd  <= 1'b0;
      dp_reg <= '0;
    end else if (hready_in) begin
      dp_wr  <= hsel && m2s.htrans[1] && m2s.hwrite;
      dp_rd  <= hsel && m2s.htrans[1] && !m2s.hwrite;
      dp_reg <= m2s.haddr[3:2];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data1     <= '0;
      data2     <= '0;
      data3     <= '0;
      done_flag <= 1'b0;
      start     <= 1'b0;
    end else begin
      start <= 1'b0;
      if (done_pulse) begin
        data3[15] <= 1'b0;
        done_flag <= 1'b1;
      end
      if (dp_wr) begin
        unique case (dp_reg)
          2'd0: data1 <= m2s.hwdata[15:0];
          2'd1: data2 <= m2s.hwdata[15:0];
          2'd2: begin
            data3 <= m2s.hwdata[15:0];
            if (m2s.hwdata[15] && !busy) begin
              start     <= 1'b1;
              done_flag <= 1'b0;
            end
          end
          default: ;
        endcase
      end
    end
  end

  assign qp       = data1[15:10];
  assign nof      = data1[9:5];
  assign img_size = data1[4:1];
  assign fi       = data1[0];
  assign rls      = data2;
  assign am       = data3[14:0];

  always_comb begin
    s2m.hready = 1'b1;
    s2m.hresp  = HR_OKAY;
    s2m.hrdata = '0;
    if (dp_rd) begin
      unique case (dp_reg)
        2'd0: s2m.hrdata = {16'h0, data1};
        2'd1: s2m.hrdata = {16'h0, data2};
        2'd2: s2m.hrdata = {16'h0, data3};
        default: s2m.hrdata = {30'h0, done_flag, busy};
      endcase
    end
  end

endmodule
