// arq_pkg: types, constants and helper functions shared by the ARQ network
// interface engines and the mesh routers.
//
// A packet is a head flit followed by payload flits. Every flit carries a
// 128-bit data word, a 2-bit kind (head, body, tail, or single-flit packet)
// and a 16-bit check field that is only meaningful on the last flit of a
// packet, where it holds a CRC-16 over all data words of the packet. The route
// field of the head flit is excluded from the CRC because the network
// interface writes it and every router shifts it.
//
// Sizes that follow the described system: 16-byte flit payload, so that a
// 64-byte access is a 5-flit packet and a 128-byte DMA packet is a 9-flit
// packet; DMA transfers of up to 128 packets (16 KB). The field layout of the
// head flit, the CRC polynomial and the route encoding are this design's own.
package arq_pkg;

  localparam int FLIT_W        = 128;  // data bits per flit (16 bytes)
  localparam int CHK_W         = 16;   // CRC bits on the last flit
  localparam int NODE_W        = 4;    // node id width (up to 16 nodes)
  localparam int MAX_NODES     = 1 << NODE_W;
  localparam int ROUTE_HOPS    = 8;    // source route entries in a head flit
  localparam int ROUTE_W       = 3 * ROUTE_HOPS;
  localparam int DMA_PKT_WORDS = 8;    // 128-byte DMA packet payload
  localparam int GEN_PKT_WORDS = 4;    // 64-byte general packet payload
  localparam int MAX_DMA_PKTS  = 128;  // 16 KB transfer / 128 B packets
  localparam int NVC           = 2;    // VC0: data, VC1: ACK/NACK

  typedef enum logic [1:0] {
    FL_HEAD   = 2'd0,
    FL_BODY   = 2'd1,
    FL_TAIL   = 2'd2,
    FL_SINGLE = 2'd3
  } flit_kind_e;

  typedef enum logic [2:0] {
    PT_DMA_DATA = 3'd0,
    PT_DMA_ACK  = 3'd1,
    PT_DMA_NACK = 3'd2,
    PT_GEN_DATA = 3'd3,
    PT_GEN_ACK  = 3'd4
  } ptype_e;

  // Router port numbering; also the encoding of one source-route entry.
  typedef enum logic [2:0] {
    PORT_L = 3'd0,
    PORT_N = 3'd1,
    PORT_E = 3'd2,
    PORT_S = 3'd3,
    PORT_W = 3'd4
  } port_e;

  // Head flit data word (128 bits). route[2:0] is the output port taken at
  // the next router; unused entries are zero, which means "eject locally".
  typedef struct packed {
    logic [ROUTE_W-1:0] route;      // 24
    ptype_e             ptype;      // 3
    logic [NODE_W-1:0]  src;        // 4
    logic [NODE_W-1:0]  dst;        // 4
    logic [7:0]         xfer_id;    // 8  DMA transfer number
    logic [7:0]         seq;        // 8  packet index / sequence / ACK number
    logic [7:0]         npkts_m1;   // 8  n_dma - 1
    logic               last;       // 1  last packet of a (re)transmission pass
    logic [31:0]        base_addr;  // 32 receiver word address of packet 0
    logic [35:0]        rsvd;       // 36
  } hdr_t;

  typedef struct packed {
    flit_kind_e         kind;
    logic [CHK_W-1:0]   chk;
    logic [FLIT_W-1:0]  data;
  } flit_t;

  // Event pulses of one node, brought out for observation.
  typedef struct packed {
    logic dma_tx_nack;      // DMA sender received a NACK
    logic dma_tx_timeout;   // DMA sender timed out waiting for ACK/NACK
    logic dma_tx_retx;      // DMA sender started a retransmitted packet
    logic dma_rx_dup;       // DMA receiver dropped a duplicate packet
    logic dma_rx_crc_drop;  // DMA receiver dropped a corrupt packet
    logic dma_rx_nack;      // DMA receiver sent a NACK
    logic gen_tx_timeout;   // Go-Back-N sender went back after timeout
    logic gen_rx_discard;   // Go-Back-N receiver discarded out-of-order/dup
    logic gen_rx_crc_drop;  // Go-Back-N receiver dropped a corrupt packet
    logic inj_stall;        // injection flit waiting for a router credit
  } node_ev_t;

  function automatic logic is_head(flit_kind_e k);
    return (k == FL_HEAD) || (k == FL_SINGLE);
  endfunction

  function automatic logic is_tail(flit_kind_e k);
    return (k == FL_TAIL) || (k == FL_SINGLE);
  endfunction

  // CRC-16-CCITT (polynomial 0x1021), 128 data bits, MSB first.
  function automatic logic [CHK_W-1:0] crc16_word(input logic [CHK_W-1:0] crc,
                                                  input logic [FLIT_W-1:0] d);
    logic [CHK_W-1:0] c;
    c = crc;
    for (int i = FLIT_W - 1; i >= 0; i--) begin
      if (c[15] ^ d[i]) c = {c[14:0], 1'b0} ^ 16'h1021;
      else              c = {c[14:0], 1'b0};
    end
    return c;
  endfunction

  // Clears the route field of a head flit word before it enters the CRC.
  function automatic logic [FLIT_W-1:0] mask_route(input logic [FLIT_W-1:0] d);
    logic [FLIT_W-1:0] m;
    m = d;
    m[FLIT_W-1 -: ROUTE_W] = '0;
    return m;
  endfunction

  // XY dimension-order source route from src to dst in a mesh of `cols`
  // columns; node id = row * cols + column, row 0 is the northern edge.
  function automatic logic [ROUTE_W-1:0] xy_route(input logic [NODE_W-1:0] src,
                                                  input logic [NODE_W-1:0] dst,
                                                  input int cols);
    logic [ROUTE_W-1:0] r;
    int sx, sy, dx, dy, h;
    sx = int'(src) % cols;  sy = int'(src) / cols;
    dx = int'(dst) % cols;  dy = int'(dst) / cols;
    r  = '0;
    h  = 0;
    for (int k = 0; k < ROUTE_HOPS; k++) begin
      if (sx < dx)      begin r[3*h +: 3] = PORT_E; sx++; h++; end
      else if (sx > dx) begin r[3*h +: 3] = PORT_W; sx--; h++; end
      else if (sy < dy) begin r[3*h +: 3] = PORT_S; sy++; h++; end
      else if (sy > dy) begin r[3*h +: 3] = PORT_N; sy--; h++; end
    end
    return r;
  endfunction

endpackage
