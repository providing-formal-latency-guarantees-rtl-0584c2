// gbn_rx: Go-Back-N / Stop-and-Wait ARQ receiver for general traffic.
//
// Operation: a packet (head flit plus PKT_WORDS body flits) is collected while
// its CRC is accumulated; a corrupt packet is discarded at its tail flit. For
// an intact packet the sequence number is compared with the number expected
// from that source (one counter per source node). An in-order packet is
// handed to the tile (valid/ready) and the expected number advances; an
// out-of-order or duplicate packet is discarded. In both cases a single-flit
// cumulative ACK carrying the next expected number is sent back, so a lost
// ACK is repaired by the sender's retransmission.
// In-order acceptance, discarding and acknowledgement follow the described
// protocol; acknowledging discarded packets with the cumulative number and the
// per-source counters are this design's choices.
// Interfaces: data flit input (valid/ready), tile packet output
// (valid/ready), ACK flit output (valid/ready).
// Timing: the ACK is offered in the cycle after the tail flit for a discarded
// packet, and after the tile has taken an in-order packet. Its unused header fields (route, transfer number, length, last,
// address, reserved bits) are constant zero, so those output bits never
// toggle by design.
module gbn_rx
  import arq_pkg::*;
#(
  parameter int PKT_WORDS = GEN_PKT_WORDS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NODE_W-1:0] node_id,
  // data flits from the network
  input  logic              in_valid,
  input  flit_t             in_flit,
  output logic              in_ready,
  // packets to the tile
  output logic              pkt_valid,
  input  logic              pkt_ready,
  output logic [NODE_W-1:0] pkt_src,
  output logic [PKT_WORDS-1:0][FLIT_W-1:0] pkt_data,
  // ACK flits to the network
  output logic              rsp_valid,
  output flit_t             rsp_flit,
  input  logic              rsp_ready,
  // events
  output logic              ev_discard,
  output logic              ev_crc_drop
);

  localparam int WW = $clog2(PKT_WORDS + 1);

  typedef enum logic [1:0] {S_RECV, S_DELIVER, S_ACK} state_e;
  state_e state;

  hdr_t              h;
  logic [WW-1:0]     widx;
  logic [7:0]        expect_seq [MAX_NODES];
  logic [NODE_W-1:0] peer;
  logic [CHK_W-1:0]  crc_next, crc_q, ocrc_next, ocrc_q;
  hdr_t              h_now, ah;

  assign in_ready  = (state == S_RECV);
  assign h_now     = is_head(in_flit.kind) ? hdr_t'(in_flit.data) : h;
  assign pkt_valid = (state == S_DELIVER);
  assign pkt_src   = peer;

  crc16_acc u_crc_in (
    .clk, .rst_n,
    .valid   (in_valid && in_ready),
    .first   (is_head(in_flit.kind)),
    .data    (in_flit.data),
    .crc_next(crc_next),
    .crc_q   (crc_q)
  );

  always_comb begin
    ah          = '0;
    ah.ptype    = PT_GEN_ACK;
    ah.src      = node_id;
    ah.dst      = peer;
    ah.seq      = expect_seq[peer];
    rsp_valid   = (state == S_ACK);
    rsp_flit    = '0;
    rsp_flit.kind = FL_SINGLE;
    rsp_flit.data = ah;
    rsp_flit.chk  = ocrc_next;
  end

  crc16_acc u_crc_out (
    .clk, .rst_n,
    .valid   (rsp_valid && rsp_ready),
    .first   (1'b1),
    .data    (rsp_flit.data),
    .crc_next(ocrc_next),
    .crc_q   (ocrc_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_RECV;
      h           <= '0;
      widx        <= '0;
      peer        <= '0;
      pkt_data    <= '0;
      for (int i = 0; i < MAX_NODES; i++) expect_seq[i] <= '0;
      ev_discard  <= 1'b0;
      ev_crc_drop <= 1'b0;
    end else begin
      ev_discard  <= 1'b0;
      ev_crc_drop <= 1'b0;
      case (state)
        S_RECV: begin
          if (in_valid) begin
            if (is_head(in_flit.kind)) begin
              h    <= hdr_t'(in_flit.data);
              widx <= '0;
            end else if (widx < WW'(PKT_WORDS)) begin
              pkt_data[widx[$clog2(PKT_WORDS)-1:0]] <= in_flit.data;
              widx <= widx + 1'b1;
            end
            if (is_tail(in_flit.kind)) begin
              if (crc_next != in_flit.chk) begin
                ev_crc_drop <= 1'b1;
              end else if (h_now.ptype == PT_GEN_DATA) begin
                peer <= h_now.src;
                if (h_now.seq == expect_seq[h_now.src]) begin
                  state <= S_DELIVER;
                end else begin
                  ev_discard <= 1'b1;
                  state      <= S_ACK;
                end
              end
            end
          end
        end
        S_DELIVER: begin
          if (pkt_ready) begin
            expect_seq[peer] <= expect_seq[peer] + 1'b1;
            state            <= S_ACK;
          end
        end
        S_ACK: begin
          if (rsp_ready) state <= S_RECV;
        end
        default: state <= S_RECV;
      endcase
    end
  end

endmodule
