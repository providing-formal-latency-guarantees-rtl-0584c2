// gbn_tx: Go-Back-N ARQ sender for general (non-DMA) traffic; with the
// default WINDOW = 1 it is a Stop-and-Wait sender, the configuration used for
// general memory traffic in the described system.
//
// Operation: the tile hands over one packet of PKT_WORDS words at a time. It
// is copied into a retransmission buffer of WINDOW packets and numbered with
// an 8-bit sequence number. Up to WINDOW unacknowledged packets may be in
// flight. ACKs are cumulative: an ACK carrying number a acknowledges every
// packet before a and frees its buffer slot. When all buffered packets have
// been sent and no ACK has moved the window for TOUT cycles, the sender goes
// back and resends every unacknowledged packet from the buffer.
// A sender serves one destination at a time; the tile may change destination
// when the window is empty, and a table keeps the next sequence number per
// destination so each source-destination stream has its own numbering.
// Window, cumulative ACK and go-back on timeout follow the described protocol;
// the per-destination numbering, 8-bit sequence space and timer rule are this
// design's choices.
// Interfaces: tile packet input (valid/ready), flit output stream towards the
// network interface (valid/ready), ACK flit input.
module gbn_tx
  import arq_pkg::*;
#(
  parameter int WINDOW    = 1,
  parameter int PKT_WORDS = GEN_PKT_WORDS,
  parameter int TOUT      = 60
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NODE_W-1:0] node_id,
  // packets from the tile
  input  logic              pkt_valid,
  output logic              pkt_ready,
  input  logic [NODE_W-1:0] pkt_dst,
  input  logic [PKT_WORDS-1:0][FLIT_W-1:0] pkt_data,
  // flits to the network
  output logic              out_valid,
  output flit_t             out_flit,
  input  logic              out_ready,
  // ACK flits from the network
  input  logic              rsp_valid,
  input  flit_t             rsp_flit,
  output logic              rsp_ready,
  // events
  output logic              ev_timeout
);

  localparam int SW = (WINDOW > 1) ? $clog2(WINDOW) : 1;
  localparam int WW = $clog2(PKT_WORDS + 1);
  localparam int TW = $clog2(TOUT + 1);

  logic [PKT_WORDS-1:0][FLIT_W-1:0] rbuf [WINDOW];
  logic [7:0]        seq_tab [MAX_NODES];
  logic [NODE_W-1:0] cur_dst;
  logic [7:0]        base, nxt, snd;
  logic [7:0]        outstanding;
  logic              tx_act;
  logic [7:0]        tx_seq;
  logic [WW-1:0]     tx_word;
  logic [TW-1:0]     timer;
  logic [7:0]        acc_seq;

  function automatic logic [SW-1:0] slot(input logic [7:0] s);
    return SW'(int'(s) % WINDOW);
  endfunction

  assign outstanding = nxt - base;
  assign pkt_ready   = (outstanding < 8'(WINDOW)) && ((outstanding == 0) || (pkt_dst == cur_dst));
  assign acc_seq     = (outstanding == 0) ? seq_tab[pkt_dst] : nxt;

  // flit output
  hdr_t hdr;
  logic [CHK_W-1:0] crc_next, crc_q;
  logic [PKT_WORDS-1:0][FLIT_W-1:0] cur_pkt;
  always_comb begin
    hdr       = '0;
    hdr.ptype = PT_GEN_DATA;
    hdr.src   = node_id;
    hdr.dst   = cur_dst;
    hdr.seq   = tx_seq;
    cur_pkt   = rbuf[slot(tx_seq)];
    out_valid = tx_act;
    out_flit  = '0;
    if (tx_word == 0) begin
      out_flit.kind = FL_HEAD;
      out_flit.data = hdr;
    end else begin
      out_flit.kind = (tx_word == WW'(PKT_WORDS)) ? FL_TAIL : FL_BODY;
      out_flit.data = cur_pkt[tx_word - 1'b1];
    end
    out_flit.chk = (out_flit.kind == FL_TAIL) ? crc_next : '0;
  end

  crc16_acc u_crc_tx (
    .clk, .rst_n,
    .valid   (out_valid && out_ready),
    .first   (tx_word == 0),
    .data    (out_flit.data),
    .crc_next(crc_next),
    .crc_q   (crc_q)
  );

  // ACK input (single-flit packets)
  logic [CHK_W-1:0] rcrc_next, rcrc_q;
  hdr_t             ah;
  logic             ack_ok;
  logic [7:0]       ack_adv;
  assign rsp_ready = 1'b1;
  assign ah        = hdr_t'(rsp_flit.data);
  assign ack_adv   = ah.seq - base;

  crc16_acc u_crc_rsp (
    .clk, .rst_n,
    .valid   (rsp_valid),
    .first   (is_head(rsp_flit.kind)),
    .data    (rsp_flit.data),
    .crc_next(rcrc_next),
    .crc_q   (rcrc_q)
  );

  assign ack_ok = rsp_valid && (rsp_flit.kind == FL_SINGLE) && (rcrc_next == rsp_flit.chk) &&
                  (ah.ptype == PT_GEN_ACK) && (ah.src == cur_dst) &&
                  (ack_adv != 0) && (ack_adv <= outstanding);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MAX_NODES; i++) seq_tab[i] <= '0;
      cur_dst    <= '0;
      base       <= '0;
      nxt        <= '0;
      snd        <= '0;
      tx_act     <= 1'b0;
      tx_seq     <= '0;
      tx_word    <= '0;
      timer      <= '0;
      ev_timeout <= 1'b0;
    end else begin
      ev_timeout <= 1'b0;
      // accept a new packet
      if (pkt_valid && pkt_ready) begin
        rbuf[slot(acc_seq)] <= pkt_data;
        seq_tab[pkt_dst]    <= acc_seq + 1'b1;
        nxt                 <= acc_seq + 1'b1;
        cur_dst             <= pkt_dst;
        if (outstanding == 0) begin
          base <= acc_seq;
          snd  <= acc_seq;
        end
      end
      // cumulative ACK
      if (ack_ok) begin
        base  <= ah.seq;
        timer <= '0;
      end
      // send
      if (tx_act) begin
        if (out_ready) begin
          tx_word <= tx_word + 1'b1;
          if (tx_word == WW'(PKT_WORDS)) tx_act <= 1'b0;
        end
      end else if (ack_ok && ((snd - ah.seq) > (nxt - ah.seq))) begin
        snd <= ah.seq;                       // window moved past the send pointer
      end else if (outstanding != 0 && snd != nxt && !(pkt_valid && pkt_ready && outstanding == 0)) begin
        tx_act  <= 1'b1;
        tx_seq  <= snd;
        tx_word <= '0;
        snd     <= snd + 1'b1;
        timer   <= '0;
      end else if (outstanding != 0 && snd == nxt && !ack_ok) begin
        timer <= timer + 1'b1;
        if (timer == TW'(TOUT - 1)) begin
          timer      <= '0;
          snd        <= base;
          ev_timeout <= 1'b1;
        end
      end
    end
  end

endmodule
