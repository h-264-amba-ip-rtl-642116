// ahb2h264_wrapper: the "AHB2H.264" wrapper, which turns the T/Q core into an
// AMBA AHB IP with a slave port for its configuration registers and a master
// port that moves video data between the external memory and the core.
//
// Operation.  The processor writes Data 1 (QP, NoF, IS, FI), Data 2 (RLS) and
// Data 3 (AM with SB set).  The wrapper then processes NoF frames of the
// image size selected by IS, macroblock by macroblock.  A macroblock is 27
// blocks (16 luma 4x4, luma DC 4x4, 4+4 chroma 4x4, 2 chroma DC 2x2) stored
// one after the other as 16-bit samples, two per 32-bit word, low half first,
// 816 bytes per macroblock.  Input data start at {AM, 16'h0000}; results are
// written in the same layout starting OUT_OFS bytes higher.  FI selects
// forward (transform + quantise) or inverse (dequantise + inverse transform);
// the block kind follows from the position of the block in the macroblock.
// Forward quantisation uses the intra rounding offset.
//
// For each block the master port reads 8 words (2 for a chroma DC block) as an
// INCR burst, feeds the 16 (4) samples to the core on consecutive cycles,
// collects the results by their raster position and writes them back as an
// INCR burst.  A burst is restarted with NONSEQ after losing the bus or at a
// 1 KB boundary.
//
// Bus lock.  With RLS > 0 the wrapper asserts HBUSREQ and HLOCK for the whole
// time it processes RLS macroblocks, so that no other master interrupts the
// transfers, then drops both for at least two cycles and until it has lost
// the bus, letting the arbiter serve other masters, and starts the next lock
// period.  With RLS = 0 it requests the bus only for its bursts and never
// locks.  These follow the IP's register definitions; memory layout, output
// offset, intra offset and the handling of RLS = 0 are this design's choices.
//
// busy is high during an operation; done pulses when it ends; lock_release
// pulses each time a lock period ends.
module ahb2h264_wrapper
  import ahb_pkg::*;
  import tq_pkg::*;
#(
  parameter logic [31:0] OUT_OFS = 32'h0020_0000
) (
  input  logic     clk,
  input  logic     rst_n,
  // slave port (configuration registers)
  input  logic     s_hsel,
  input  ahb_m2s_t s_m2s,
  input  logic     hready,
  output ahb_s2m_t s_s2m,
  // master port (video data)
  output logic     m_hbusreq,
  output logic     m_hlock,
  input  logic     m_hgrant,
  output ahb_m2s_t m_m2s,
  input  ahb_s2m_t m_s2m,
  // status
  output logic     busy,
  output logic     done,
  output logic     lock_release
);

  // ---------------- configuration registers ----------------
  logic [5:0]  cfg_qp;
  logic [4:0]  cfg_nof;
  logic [3:0]  cfg_is;
  logic        cfg_fi;
  logic [15:0] cfg_rls;
  logic [14:0] cfg_am;
  logic        cfg_start;

  tq_cfg_regs u_cfg (
    .clk, .rst_n,
    .hsel(s_hsel), .m2s(s_m2s), .hready_in(hready), .s2m(s_s2m),
    .qp(cfg_qp), .nof(cfg_nof), .img_size(cfg_is), .fi(cfg_fi),
    .rls(cfg_rls), .am(cfg_am), .start(cfg_start),
    .busy, .done_pulse(done)
  );

  // ---------------- engine state ----------------
  typedef enum logic [2:0] {E_IDLE, E_RD, E_FEED, E_COL, E_WR, E_NEXT, E_REL} estate_t;
  estate_t state;

  logic [5:0]  op_qp;
  logic        op_fi;
  logic [15:0] op_rls;
  logic [4:0]  op_nof;
  logic [13:0] op_mbs;       // macroblocks per frame
  logic [4:0]  frame;
  logic [13:0] mb;
  logic [4:0]  blk;
  logic [15:0] lock_mbs;
  logic [1:0]  rel_cnt;
  logic [31:0] rd_ptr, wr_ptr;

  blk_kind_t kind;
  logic [3:0] n_words;
  logic [4:0] n_samp;
  assign kind    = mb_block_kind(blk);
  assign n_words = (kind == BLK_CDC) ? 4'd2 : 4'd8;
  assign n_samp  = (kind == BLK_CDC) ? 5'd4 : 5'd16;

  // ---------------- AHB master ----------------
  logic        own, seq_ok;
  logic [3:0]  ai, di;
  logic        dp_valid, dp_write;
  logic [2:0]  dp_idx;
  logic        issuing;
  logic [31:0] xaddr;
  logic        lock_mode;

  logic signed [15:0] inbuf  [16];
  logic signed [15:0] outbuf [16];

  assign lock_mode = (op_rls != 16'd0);
  assign issuing   = (state == E_RD || state == E_WR) && ai < n_words && own;
  assign xaddr     = ((state == E_WR) ? wr_ptr : rd_ptr) + {26'd0, ai, 2'b00};

  always_comb begin
    m_m2s        = '0;
    m_m2s.htrans = HT_IDLE;
    m_m2s.hsize  = HS_WORD;
    m_m2s.hburst = HB_INCR;
    m_m2s.hprot  = 4'b0011;
    m_m2s.haddr  = xaddr;
    m_m2s.hwrite = (state == E_WR);
    if (issuing)
      m_m2s.htrans = (seq_ok && xaddr[9:0] != 10'd0) ? HT_SEQ : HT_NONSEQ;
    if (dp_valid && dp_write)
      m_m2s.hwdata = {outbuf[{dp_idx, 1'b1}], outbuf[{dp_idx, 1'b0}]};
  end

  always_comb begin
    if (lock_mode) begin
      m_hbusreq = busy && state != E_REL;
      m_hlock   = m_hbusreq;
    end else begin
      m_hbusreq = (state == E_RD || state == E_WR);
      m_hlock   = 1'b0;
    end
  end

  // ---------------- T/Q core ----------------
  logic               tq_start, tq_ready;
  tq_mode_t           tq_mode;
  logic signed [15:0] tq_din, o0, o1;
  logic [3:0]         i0, i1;
  logic               v0, v1;
  logic [4:0]         feed_k, col_cnt;

  assign tq_mode = '{inverse: op_fi, kind: kind, intra: 1'b1};
  assign tq_start = (state == E_FEED) && feed_k == 5'd0 && tq_ready;
  assign tq_din   = inbuf[feed_k[3:0]];

  top_transform u_tq (
    .clk, .rst_n, .qp(op_qp),
    .start(tq_start), .mode(tq_mode), .din(tq_din), .ready(tq_ready),
    .out0(o0), .out1(o1), .idx0(i0), .idx1(i1), .valid0(v0), .valid1(v1)
  );

  // ---------------- sequencing ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= E_IDLE;
      op_qp <= '0; op_fi <= 1'b0; op_rls <= '0; op_nof <= '0; op_mbs <= '0;
      frame <= '0; mb <= '0; blk <= '0; lock_mbs <= '0; rel_cnt <= '0;
      rd_ptr <= '0; wr_ptr <= '0;
      own <= 1'b0; seq_ok <= 1'b0; ai <= '0; di <= '0;
      dp_valid <= 1'b0; dp_write <= 1'b0; dp_idx <= '0;
      feed_k <= '0; col_cnt <= '0;
      busy <= 1'b0; done <= 1'b0; lock_release <= 1'b0;
      for (int i = 0; i < 16; i++) begin
        inbuf[i]  <= '0;
        outbuf[i] <= '0;
      end
    end else begin
      done         <= 1'b0;
      lock_release <= 1'b0;

      // bus ownership and transfer pipeline
      if (m_s2m.hready) begin
        own      <= m_hgrant;
        seq_ok   <= issuing;
        dp_valid <= issuing;
        dp_write <= (state == E_WR);
        dp_idx   <= ai[2:0];
        if (issuing) ai <= ai + 4'd1;
        if (dp_valid) begin
          di <= di + 4'd1;
          if (!dp_write) begin
            inbuf[{dp_idx, 1'b0}] <= m_s2m.hrdata[15:0];
            inbuf[{dp_idx, 1'b1}] <= m_s2m.hrdata[31:16];
          end
        end
      end

      // result collection, by raster position
      if (v0) outbuf[i0] <= o0;
      if (v1) outbuf[i1] <= o1;
      col_cnt <= col_cnt + 5'(v0) + 5'(v1);

      unique case (state)
        E_IDLE: begin
          if (cfg_start) begin
            op_qp    <= cfg_qp;
            op_fi    <= cfg_fi;
            op_rls   <= cfg_rls;
            op_nof   <= cfg_nof;
            op_mbs   <= 14'(img_mb_w(cfg_is) * img_mb_h(cfg_is));
            frame    <= '0;
            mb       <= '0;
            blk      <= '0;
            lock_mbs <= '0;
            rd_ptr   <= {1'b0, cfg_am, 16'h0000};
            wr_ptr   <= {1'b0, cfg_am, 16'h0000} + OUT_OFS;
            ai <= '0; di <= '0;
            if (cfg_nof != 5'd0) begin
              busy  <= 1'b1;
              state <= E_RD;
            end else begin
              done <= 1'b1;
            end
          end
        end
        E_RD: begin
          if (di == n_words) begin
            rd_ptr  <= rd_ptr + {26'd0, n_words, 2'b00};
            ai      <= '0;
            di      <= '0;
            feed_k  <= '0;
            col_cnt <= '0;
            state   <= E_FEED;
          end
        end
        E_FEED: begin
          if (feed_k != 5'd0 || tq_ready) begin
            feed_k <= feed_k + 5'd1;
            if (feed_k == n_samp - 5'd1) state <= E_COL;
          end
        end
        E_COL: begin
          if (col_cnt == n_samp) state <= E_WR;
        end
        E_WR: begin
          if (di == n_words) begin
            wr_ptr <= wr_ptr + {26'd0, n_words, 2'b00};
            ai     <= '0;
            di     <= '0;
            state  <= E_NEXT;
          end
        end
        E_NEXT: begin
          state <= E_RD;
          if (blk != 5'(MB_BLOCKS - 1)) begin
            blk <= blk + 5'd1;
          end else begin
            blk      <= '0;
            lock_mbs <= lock_mbs + 16'd1;
            if (mb != op_mbs - 14'd1) begin
              mb <= mb + 14'd1;
            end else begin
              mb    <= '0;
              frame <= frame + 5'd1;
            end
            if (mb == op_mbs - 14'd1 && frame == op_nof - 5'd1) begin
              busy  <= 1'b0;
              done  <= 1'b1;
              state <= E_IDLE;
            end else if (lock_mode && lock_mbs + 16'd1 == op_rls) begin
              rel_cnt      <= '0;
              lock_release <= 1'b1;
              state        <= E_REL;
            end
          end
        end
        E_REL: begin
          if (rel_cnt != 2'd3) rel_cnt <= rel_cnt + 2'd1;
          if (rel_cnt >= 2'd1 && !own) begin
            lock_mbs <= '0;
            state    <= E_RD;
          end
        end
        default: state <= E_IDLE;
      endcase
    end
  end

endmodule
