// dma_arq_rx: DMA ARQ receiver. It accepts the packets of one DMA transfer at
// a time, writes the payload of every intact packet straight to memory (the
// address follows from the transfer base address carried in the head flit and
// the packet index), and answers once per transmission pass.
//
// Operation: a packet is collected in one of two staging buffers while its
// CRC is accumulated; the other buffer can meanwhile be written to memory, so
// packets are accepted back to back. At the tail flit a corrupt packet is discarded. An
// intact data packet of a new transfer (other source or transfer number)
// clears the received-packet bitmap. A packet whose bit is already set is a
// duplicate and is dropped; otherwise its PKT_WORDS words are written to
// memory and its bit is set. If the packet carries the `last` flag, the
// receiver then replies: an ACK when every packet of the transfer has been
// received, or else a NACK whose body flit is the bitmap of missing packets.
// `done` pulses when a transfer becomes complete.
// Behaviour follows the described DMA ARQ protocol (per-packet forwarding,
// duplicate dropping, ACK/NACK at the end of the transfer). This design's own
// choices: the two staging buffers that hold a packet until its CRC is known,
// the NACK bitmap format, replying to every packet flagged `last` (after all
// accepted data has been written), and counting a packet as received once it
// has passed its CRC check.
// Interfaces: data flit input (valid/ready), memory write port (valid/ready),
// reply flit output (valid/ready).
module dma_arq_rx
  import arq_pkg::*;
#(
  parameter int MAX_PKTS  = MAX_DMA_PKTS,
  parameter int PKT_WORDS = DMA_PKT_WORDS,
  parameter int AW        = 11
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NODE_W-1:0] node_id,
  // data flits from the network
  input  logic              in_valid,
  input  flit_t             in_flit,
  output logic              in_ready,
  // memory write port
  output logic              wr_valid,
  output logic [AW-1:0]     wr_addr,
  output logic [FLIT_W-1:0] wr_data,
  input  logic              wr_ready,
  // ACK/NACK flits to the network
  output logic              rsp_valid,
  output flit_t             rsp_flit,
  input  logic              rsp_ready,
  // status and events
  output logic              done,
  output logic              ev_dup,
  output logic              ev_crc_drop,
  output logic              ev_nack
);

  localparam int WW = $clog2(PKT_WORDS + 1);

  typedef enum logic [1:0] {S_RECV, S_HOLD, S_RESP} state_e;
  state_e state;

  localparam int BW = $clog2(PKT_WORDS);

  hdr_t              h;          // head of the packet being received
  logic [FLIT_W-1:0] sbuf [2][PKT_WORDS];
  logic              rsel;       // buffer being filled
  logic [WW-1:0]     ridx;       // words collected
  logic              hold_last;  // held packet asks for a reply
  logic [7:0]        hold_seq;   // index and base address of the held packet
  logic [31:0]       hold_base;

  // memory writer (drains one staging buffer)
  logic              dr_act;
  logic              dr_sel;
  logic [7:0]        dr_seq;
  logic [31:0]       dr_base;
  logic [WW-1:0]     widx;

  // current transfer
  logic              cur_valid;
  logic [NODE_W-1:0] cur_src;
  logic [7:0]        cur_id;
  logic [7:0]        cur_npkts_m1;
  logic [31:0]       cur_base;
  logic [MAX_PKTS-1:0] rcvd;
  logic              done_sent;
  logic              resp_word;  // 0: head flit, 1: bitmap flit

  logic [CHK_W-1:0]  crc_next, crc_q;
  logic [CHK_W-1:0]  ocrc_next, ocrc_q;
  hdr_t              h_now;
  logic              tail_ok, new_xfer;
  logic [MAX_PKTS-1:0] mask, missing;

  function automatic logic [MAX_PKTS-1:0] pkt_mask(input logic [7:0] n_m1);
    logic [MAX_PKTS-1:0] m;
    for (int i = 0; i < MAX_PKTS; i++) m[i] = (i <= int'(n_m1));
    return m;
  endfunction

  assign in_ready = (state == S_RECV);
  assign h_now    = is_head(in_flit.kind) ? hdr_t'(in_flit.data) : h;

  crc16_acc u_crc_in (
    .clk, .rst_n,
    .valid   (in_valid && in_ready),
    .first   (is_head(in_flit.kind)),
    .data    (in_flit.data),
    .crc_next(crc_next),
    .crc_q   (crc_q)
  );

  always_comb begin
    tail_ok  = in_valid && is_tail(in_flit.kind) && (crc_next == in_flit.chk) &&
               (h_now.ptype == PT_DMA_DATA);
    new_xfer = !cur_valid || (h_now.src != cur_src) || (h_now.xfer_id != cur_id);
    mask     = pkt_mask(cur_npkts_m1);
    missing  = mask & ~rcvd;
  end

  // memory write port
  assign wr_valid = dr_act;
  assign wr_addr  = AW'(dr_base) + AW'(dr_seq) * AW'(PKT_WORDS) + AW'(widx);
  assign wr_data  = sbuf[dr_sel][widx[BW-1:0]];

  // reply flits, sent once all accepted data is in memory
  hdr_t rh;
  always_comb begin
    rh          = '0;
    rh.ptype    = (missing == '0) ? PT_DMA_ACK : PT_DMA_NACK;
    rh.src      = node_id;
    rh.dst      = cur_src;
    rh.xfer_id  = cur_id;
    rh.npkts_m1 = cur_npkts_m1;
    rh.base_addr= cur_base;
    rsp_valid   = (state == S_RESP) && !dr_act;
    rsp_flit    = '0;
    if (!resp_word) begin
      rsp_flit.kind = (missing == '0) ? FL_SINGLE : FL_HEAD;
      rsp_flit.data = rh;
    end else begin
      rsp_flit.kind = FL_TAIL;
      rsp_flit.data = FLIT_W'(missing);
    end
    rsp_flit.chk = is_tail(rsp_flit.kind) ? ocrc_next : '0;
  end

  crc16_acc u_crc_out (
    .clk, .rst_n,
    .valid   (rsp_valid && rsp_ready),
    .first   (!resp_word),
    .data    (rsp_flit.data),
    .crc_next(ocrc_next),
    .crc_q   (ocrc_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_RECV;
      h            <= '0;
      rsel         <= 1'b0;
      ridx         <= '0;
      hold_last    <= 1'b0;
      hold_seq     <= '0;
      hold_base    <= '0;
      dr_act       <= 1'b0;
      dr_sel       <= 1'b0;
      dr_seq       <= '0;
      dr_base      <= '0;
      widx         <= '0;
      cur_valid    <= 1'b0;
      cur_src      <= '0;
      cur_id       <= '0;
      cur_npkts_m1 <= '0;
      cur_base     <= '0;
      rcvd         <= '0;
      done_sent    <= 1'b0;
      resp_word    <= 1'b0;
      done         <= 1'b0;
      ev_dup       <= 1'b0;
      ev_crc_drop  <= 1'b0;
      ev_nack      <= 1'b0;
    end else begin
      done        <= 1'b0;
      ev_dup      <= 1'b0;
      ev_crc_drop <= 1'b0;
      ev_nack     <= 1'b0;

      // memory writer
      if (dr_act && wr_ready) begin
        widx <= widx + 1'b1;
        if (widx == WW'(PKT_WORDS - 1)) begin
          dr_act <= 1'b0;
          if (missing == '0 && !done_sent) begin
            done      <= 1'b1;
            done_sent <= 1'b1;
          end
        end
      end

      case (state)
        S_RECV: begin
          if (in_valid) begin
            if (is_head(in_flit.kind)) begin
              h    <= hdr_t'(in_flit.data);
              ridx <= '0;
            end else if (ridx < WW'(PKT_WORDS)) begin
              sbuf[rsel][ridx[BW-1:0]] <= in_flit.data;
              ridx <= ridx + 1'b1;
            end
            if (is_tail(in_flit.kind)) begin
              if (!tail_ok) begin
                ev_crc_drop <= (crc_next != in_flit.chk);
              end else begin
                if (new_xfer) begin
                  cur_valid    <= 1'b1;
                  cur_src      <= h_now.src;
                  cur_id       <= h_now.xfer_id;
                  cur_npkts_m1 <= h_now.npkts_m1;
                  cur_base     <= h_now.base_addr;
                  done_sent    <= 1'b0;
                end
                resp_word <= 1'b0;
                if (!new_xfer && rcvd[h_now.seq[$clog2(MAX_PKTS)-1:0]]) begin
                  ev_dup <= 1'b1;
                  if (h_now.last) state <= S_RESP;
                end else begin
                  if (new_xfer) rcvd <= MAX_PKTS'(1) << h_now.seq;
                  else          rcvd[h_now.seq[$clog2(MAX_PKTS)-1:0]] <= 1'b1;
                  hold_seq  <= h_now.seq;
                  hold_base <= h_now.base_addr;
                  if (!dr_act || (wr_ready && widx == WW'(PKT_WORDS - 1))) begin
                    dr_seq  <= h_now.seq;
                    dr_base <= h_now.base_addr;
                    dr_act  <= 1'b1;
                    dr_sel <= rsel;
                    widx   <= '0;
                    rsel   <= !rsel;
                    if (h_now.last) state <= S_RESP;
                  end else begin
                    hold_last <= h_now.last;
                    state     <= S_HOLD;
                  end
                end
              end
            end
          end
        end
        S_HOLD: begin
          if (!dr_act) begin
            dr_seq  <= hold_seq;
            dr_base <= hold_base;
            dr_act  <= 1'b1;
            dr_sel <= rsel;
            widx   <= '0;
            rsel   <= !rsel;
            state  <= hold_last ? S_RESP : S_RECV;
          end
        end
        S_RESP: begin
          if (rsp_valid && rsp_ready) begin
            if (is_tail(rsp_flit.kind)) begin
              ev_nack   <= (rsp_flit.kind == FL_TAIL);
              resp_word <= 1'b0;
              state     <= S_RECV;
            end else begin
              resp_word <= 1'b1;
            end
          end
        end
        default: state <= S_RECV;
      endcase
    end
  end

endmodule
