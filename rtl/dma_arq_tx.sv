// dma_arq_tx: DMA ARQ sender. A transfer of n_dma packets is started with one
// command; the send window equals the transfer, so every packet is injected as
// soon as its data has been read from local memory, without waiting for any
// acknowledgement, and no retransmission buffer is kept.
//
// Operation: a read sequencer and a send sequencer walk the same bitmap of
// pending packets in ascending order. The read side streams PKT_WORDS words
// per packet from local memory (pipelined, latency t_mem) into a prefetch
// FIFO; the send side emits a head flit and then one body flit per word. The
// last packet of each pass carries the `last` flag, which asks the receiver
// for a status reply. The sender then waits:
//   ACK  -> transfer complete (`done` pulse), next command accepted;
//   NACK -> the bitmap in the NACK becomes the pending set and only those
//           packets are re-read from memory and resent (selective repeat);
//   no reply within TOUT cycles -> the last packet of the transfer is re-read
//           and resent with `last` set.
// Replies with a bad CRC or the wrong transfer number are ignored.
// Behaviour follows the described DMA ARQ protocol. Choices of this design:
// the head-flit fields, the NACK as a 128-bit bitmap in one body flit, the
// timer starting when the last flit of a pass has left, and replies arriving
// outside the wait state being ignored (a later timeout recovers).
// Interfaces: start command (valid/ready), memory read port, flit output
// stream (valid/ready) towards the network interface, reply flit input.
module dma_arq_tx
  import arq_pkg::*;
#(
  parameter int MAX_PKTS  = MAX_DMA_PKTS,
  parameter int PKT_WORDS = DMA_PKT_WORDS,
  parameter int TOUT      = 60,
  parameter int AW        = 11,
  parameter int PF_DEPTH  = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NODE_W-1:0] node_id,
  // transfer command
  input  logic              start_valid,
  output logic              start_ready,
  input  logic [NODE_W-1:0] start_dst,
  input  logic [AW-1:0]     start_src_addr,
  input  logic [31:0]       start_dst_addr,
  input  logic [7:0]        start_npkts_m1,
  output logic              done,
  // local memory read port
  output logic              rd_en,
  output logic [AW-1:0]     rd_addr,
  input  logic              rd_valid,
  input  logic [FLIT_W-1:0] rd_data,
  // flits to the network
  output logic              out_valid,
  output flit_t             out_flit,
  input  logic              out_ready,
  // ACK/NACK flits from the network
  input  logic              rsp_valid,
  input  flit_t             rsp_flit,
  output logic              rsp_ready,
  // events
  output logic              ev_nack,
  output logic              ev_timeout,
  output logic              ev_retx
);

  localparam int PW  = $clog2(MAX_PKTS);
  localparam int WW  = $clog2(PKT_WORDS + 1);
  localparam int FW  = $clog2(PF_DEPTH);
  localparam int TW  = $clog2(TOUT + 1);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_WAIT} state_e;
  state_e state;

  // transfer registers
  logic [NODE_W-1:0] dst;
  logic [AW-1:0]     src_addr;
  logic [31:0]       dst_addr;
  logic [7:0]        npkts_m1;
  logic [7:0]        xfer_id;
  logic              retx_pass;
  logic [TW-1:0]     timer;

  // read sequencer
  logic [MAX_PKTS-1:0] rd_pend;
  logic              rd_act;
  logic [PW-1:0]     rd_pkt;
  logic [WW-1:0]     rd_word;
  logic [FW:0]       resv;          // FIFO words stored or in flight

  // send sequencer
  logic [MAX_PKTS-1:0] tx_pend;
  logic              tx_act;
  logic [PW-1:0]     tx_pkt;
  logic [WW-1:0]     tx_word;       // 0: head, 1..PKT_WORDS: body
  logic              tx_last;

  // prefetch FIFO
  logic [FLIT_W-1:0] fifo [PF_DEPTH];
  logic [FW-1:0]     f_wp, f_rp;
  logic [FW:0]       f_cnt;
  logic              f_pop;

  // lowest set bit of a pending bitmap
  function automatic logic [PW-1:0] lowest(input logic [MAX_PKTS-1:0] v);
    logic [PW-1:0] r;
    r = '0;
    for (int i = MAX_PKTS - 1; i >= 0; i--) if (v[i]) r = PW'(i);
    return r;
  endfunction

  function automatic logic [MAX_PKTS-1:0] pkt_mask(input logic [7:0] n_m1);
    logic [MAX_PKTS-1:0] m;
    for (int i = 0; i < MAX_PKTS; i++) m[i] = (i <= int'(n_m1));
    return m;
  endfunction

  // ---------------- flit output ----------------
  hdr_t hdr;
  logic [CHK_W-1:0] crc_next, crc_q;
  logic out_fire;

  always_comb begin
    hdr           = '0;
    hdr.ptype     = PT_DMA_DATA;
    hdr.src       = node_id;
    hdr.dst       = dst;
    hdr.xfer_id   = xfer_id;
    hdr.seq       = 8'(tx_pkt);
    hdr.npkts_m1  = npkts_m1;
    hdr.last      = tx_last;
    hdr.base_addr = dst_addr;
    out_flit      = '0;
    out_valid     = 1'b0;
    f_pop         = 1'b0;
    if (tx_act) begin
      if (tx_word == 0) begin
        out_valid     = 1'b1;
        out_flit.kind = FL_HEAD;
        out_flit.data = hdr;
      end else begin
        out_valid     = (f_cnt != 0);
        out_flit.kind = (tx_word == WW'(PKT_WORDS)) ? FL_TAIL : FL_BODY;
        out_flit.data = fifo[f_rp];
        f_pop         = out_ready && (f_cnt != 0);
      end
    end
    out_flit.chk = (out_flit.kind == FL_TAIL) ? crc_next : '0;
  end

  assign out_fire = out_valid && out_ready;

  crc16_acc u_crc_tx (
    .clk, .rst_n,
    .valid   (out_fire),
    .first   (tx_word == 0),
    .data    (out_flit.data),
    .crc_next(crc_next),
    .crc_q   (crc_q)
  );

  // ---------------- reply input ----------------
  hdr_t             r_hdr;
  logic [CHK_W-1:0] rcrc_next, rcrc_q;
  logic             rsp_ok;        // a checked reply for this transfer is here
  logic             rsp_is_ack;
  hdr_t             rsp_hdr_now;

  assign rsp_ready   = 1'b1;
  assign rsp_hdr_now = is_head(rsp_flit.kind) ? hdr_t'(rsp_flit.data) : r_hdr;

  crc16_acc u_crc_rsp (
    .clk, .rst_n,
    .valid   (rsp_valid),
    .first   (is_head(rsp_flit.kind)),
    .data    (rsp_flit.data),
    .crc_next(rcrc_next),
    .crc_q   (rcrc_q)
  );

  always_comb begin
    rsp_ok     = rsp_valid && is_tail(rsp_flit.kind) && (rcrc_next == rsp_flit.chk) &&
                 (rsp_hdr_now.xfer_id == xfer_id) && (rsp_hdr_now.src == dst) &&
                 (state == S_WAIT) &&
                 ((rsp_hdr_now.ptype == PT_DMA_ACK) ||
                  (rsp_hdr_now.ptype == PT_DMA_NACK && rsp_flit.kind == FL_TAIL));
    rsp_is_ack = (rsp_hdr_now.ptype == PT_DMA_ACK);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_hdr <= '0;
    end else if (rsp_valid && is_head(rsp_flit.kind)) begin
      r_hdr <= hdr_t'(rsp_flit.data);
    end
  end

  // ---------------- memory read side ----------------
  assign rd_en   = rd_act && (resv < (FW+1)'(PF_DEPTH));
  assign rd_addr = src_addr + AW'(rd_pkt) * AW'(PKT_WORDS) + AW'(rd_word);

  assign start_ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      dst        <= '0;
      src_addr   <= '0;
      dst_addr   <= '0;
      npkts_m1   <= '0;
      xfer_id    <= '0;
      retx_pass  <= 1'b0;
      timer      <= '0;
      rd_pend    <= '0;
      rd_act     <= 1'b0;
      rd_pkt     <= '0;
      rd_word    <= '0;
      resv       <= '0;
      tx_pend    <= '0;
      tx_act     <= 1'b0;
      tx_pkt     <= '0;
      tx_word    <= '0;
      tx_last    <= 1'b0;
      f_wp       <= '0;
      f_rp       <= '0;
      f_cnt      <= '0;
      done       <= 1'b0;
      ev_nack    <= 1'b0;
      ev_timeout <= 1'b0;
      ev_retx    <= 1'b0;
    end else begin
      done       <= 1'b0;
      ev_nack    <= 1'b0;
      ev_timeout <= 1'b0;
      ev_retx    <= 1'b0;

      // prefetch FIFO bookkeeping
      if (rd_valid) begin
        fifo[f_wp] <= rd_data;
        f_wp       <= f_wp + 1'b1;
      end
      if (f_pop) f_rp <= f_rp + 1'b1;
      f_cnt <= f_cnt + (FW+1)'(rd_valid) - (FW+1)'(f_pop);
      resv  <= resv + (FW+1)'(rd_en) - (FW+1)'(f_pop);

      // read sequencer
      if (rd_act) begin
        if (rd_en) begin
          if (rd_word == WW'(PKT_WORDS - 1)) rd_act <= 1'b0;
          rd_word <= rd_word + 1'b1;
        end
      end else if (rd_pend != '0) begin
        rd_pkt  <= lowest(rd_pend);
        rd_pend <= rd_pend & ~(MAX_PKTS'(1) << lowest(rd_pend));
        rd_word <= '0;
        rd_act  <= 1'b1;
      end

      // send sequencer
      if (tx_act && out_fire && tx_word != WW'(PKT_WORDS)) begin
        tx_word <= tx_word + 1'b1;
      end else if (tx_act && !out_fire) begin
        // hold
      end else if (tx_pend == '0) begin
        tx_act <= 1'b0;
      end else begin
        // next packet starts right after the tail of the previous one
        tx_pkt  <= lowest(tx_pend);
        tx_pend <= tx_pend & ~(MAX_PKTS'(1) << lowest(tx_pend));
        tx_last <= ((tx_pend & ~(MAX_PKTS'(1) << lowest(tx_pend))) == '0);
        tx_word <= '0;
        tx_act  <= 1'b1;
        ev_retx <= retx_pass;
      end

      case (state)
        S_IDLE: begin
          if (start_valid) begin
            dst       <= start_dst;
            src_addr  <= start_src_addr;
            dst_addr  <= start_dst_addr;
            npkts_m1  <= start_npkts_m1;
            xfer_id   <= xfer_id + 1'b1;
            rd_pend   <= pkt_mask(start_npkts_m1);
            tx_pend   <= pkt_mask(start_npkts_m1);
            retx_pass <= 1'b0;
            state     <= S_RUN;
          end
        end
        S_RUN: begin
          if (tx_pend == '0 && !tx_act && rd_pend == '0 && !rd_act) begin
            state <= S_WAIT;
            timer <= '0;
          end
        end
        S_WAIT: begin
          timer <= timer + 1'b1;
          if (rsp_ok && rsp_is_ack) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else if (rsp_ok) begin
            ev_nack   <= 1'b1;
            retx_pass <= 1'b1;
            if ((rsp_flit.data[MAX_PKTS-1:0] & pkt_mask(npkts_m1)) != '0) begin
              rd_pend <= rsp_flit.data[MAX_PKTS-1:0] & pkt_mask(npkts_m1);
              tx_pend <= rsp_flit.data[MAX_PKTS-1:0] & pkt_mask(npkts_m1);
            end else begin
              rd_pend <= MAX_PKTS'(1) << npkts_m1;
              tx_pend <= MAX_PKTS'(1) << npkts_m1;
            end
            state <= S_RUN;
          end else if (timer == TW'(TOUT - 1)) begin
            ev_timeout <= 1'b1;
            retx_pass  <= 1'b1;
            rd_pend    <= MAX_PKTS'(1) << npkts_m1;
            tx_pend    <= MAX_PKTS'(1) << npkts_m1;
            state      <= S_RUN;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // FIFO never overflows: reads are issued only against free space.
  a_fifo_bound : assert property (@(posedge clk) disable iff (!rst_n) f_cnt <= (FW+1)'(PF_DEPTH));

endmodule
