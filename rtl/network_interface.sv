// network_interface: joins a node's four protocol engines to the local port
// of its router.
//
// Injection: the two data senders (DMA ARQ data, Go-Back-N data) share
// virtual channel 0 and the two reply senders (DMA ARQ ACK/NACK, Go-Back-N
// ACK) share virtual channel 1, so replies can always overtake blocked data
// and the handshake cannot deadlock. Within a VC a source keeps the channel
// from head to tail flit (round-robin between sources per packet); between
// the VCs the choice is made per flit, round-robin, among VCs that hold a
// router credit. On each head flit the interface writes the XY source route
// from this node to the destination. The injection flit is registered.
// Ejection: one FIFO of DEPTH flits per VC; a credit goes back to the router
// for each flit taken out. The head flit's packet type selects the engine that
// receives the packet: DMA data -> DMA receiver, other data -> Go-Back-N
// receiver, DMA ACK/NACK -> DMA sender, other replies -> Go-Back-N sender.
// fault_inj models a soft error: the next flit ejected has data bit 0 flipped
// (the packet then fails its CRC at the engine).
// Wormhole network, XY source routing and the network interface between
// tile and router follow the described system; the VC split and arbitration
// are this design's choices. Source/sink index: 0 DMA data / DMA receiver,
// 1 general data / Go-Back-N receiver, 2 DMA reply / DMA sender,
// 3 general ACK / Go-Back-N sender.
module network_interface
  import arq_pkg::*;
#(
  parameter int COLS  = 4,
  parameter int DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NODE_W-1:0] node_id,
  input  logic              fault_inj,
  // engine flit sources
  input  logic [3:0]        src_valid,
  input  flit_t             src_flit [4],
  output logic [3:0]        src_ready,
  // engine flit sinks
  output logic [3:0]        snk_valid,
  output flit_t             snk_flit [4],
  input  logic [3:0]        snk_ready,
  // router local port
  output logic              inj_valid,
  output flit_t             inj_flit,
  output logic              inj_vc,
  input  logic [NVC-1:0]    inj_credit,
  input  logic              ej_valid,
  input  flit_t             ej_flit,
  input  logic              ej_vc,
  output logic [NVC-1:0]    ej_credit,
  // event
  output logic              ev_inj_stall
);

  localparam int CW = $clog2(DEPTH + 1);
  localparam int DW = $clog2(DEPTH);

  // ---------------- injection ----------------
  logic [CW-1:0] credit [NVC];
  logic          vlock  [NVC];     // a packet holds this VC
  logic          vowner [NVC];     // which of the VC's two sources
  logic          vrr    [NVC];     // packet round-robin
  logic          xrr;              // VC round-robin
  logic          vsel   [NVC];     // chosen source per VC
  logic [NVC-1:0] vcand;           // VC has a flit and a credit
  logic          go, go_vc;
  flit_t         f;
  hdr_t          fh;

  always_comb begin
    for (int v = 0; v < NVC; v++) begin
      automatic logic a = src_valid[2*v];
      automatic logic b = src_valid[2*v+1];
      if (vlock[v])        vsel[v] = vowner[v];
      else if (a && b)     vsel[v] = vrr[v];
      else                 vsel[v] = b;
      vcand[v] = src_valid[2*v + int'(vsel[v])] && (credit[v] != 0);
    end
    go    = vcand != '0;
    go_vc = (vcand == 2'b11) ? xrr : vcand[1];
    src_ready = '0;
    if (go) src_ready[2*int'(go_vc) + int'(vsel[go_vc])] = 1'b1;
    f  = src_flit[2*int'(go_vc) + int'(vsel[go_vc])];
    fh = hdr_t'(f.data);
    if (is_head(f.kind)) begin
      fh.route = xy_route(node_id, fh.dst, COLS);
      f.data   = fh;
    end
    ev_inj_stall = ((src_valid[0] || src_valid[1]) && credit[0] == 0) ||
                   ((src_valid[2] || src_valid[3]) && credit[1] == 0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NVC; v++) begin
        credit[v] <= CW'(DEPTH);
        vlock[v]  <= 1'b0;
        vowner[v] <= 1'b0;
        vrr[v]    <= 1'b0;
      end
      xrr       <= 1'b0;
      inj_valid <= 1'b0;
      inj_flit  <= '0;
      inj_vc    <= 1'b0;
    end else begin
      inj_valid <= go;
      if (go) begin
        inj_flit <= f;
        inj_vc   <= go_vc;
        xrr      <= !go_vc;
        if (is_head(f.kind) && !is_tail(f.kind)) begin
          vlock[go_vc]  <= 1'b1;
          vowner[go_vc] <= vsel[go_vc];
        end
        if (is_tail(f.kind)) begin
          vlock[go_vc] <= 1'b0;
          vrr[go_vc]   <= !vsel[go_vc];
        end
      end
      for (int v = 0; v < NVC; v++)
        credit[v] <= credit[v] + CW'(inj_credit[v]) - CW'(go && go_vc == 1'(v));
    end
  end

  // ---------------- ejection ----------------
  flit_t         ebuf [NVC][DEPTH];
  logic [DW-1:0] ewp [NVC];
  logic [DW-1:0] erp [NVC];
  logic [CW-1:0] ecnt [NVC];
  logic          edst [NVC];       // sink of the packet in progress (per VC)
  logic          fault_pend;
  logic [NVC-1:0] epop;
  logic          esel [NVC];

  always_comb begin
    for (int v = 0; v < NVC; v++) begin
      automatic flit_t ef = ebuf[v][erp[v]];
      automatic hdr_t  eh = hdr_t'(ef.data);
      if (is_head(ef.kind))
        esel[v] = (v == 0) ? (eh.ptype != PT_DMA_DATA)
                           : (eh.ptype != PT_DMA_ACK && eh.ptype != PT_DMA_NACK);
      else
        esel[v] = edst[v];
      snk_valid[2*v]   = (ecnt[v] != 0) && !esel[v];
      snk_valid[2*v+1] = (ecnt[v] != 0) &&  esel[v];
      snk_flit[2*v]    = ef;
      snk_flit[2*v+1]  = ef;
      epop[v] = (ecnt[v] != 0) && snk_ready[2*v + int'(esel[v])];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NVC; v++) begin
        ewp[v]  <= '0;
        erp[v]  <= '0;
        ecnt[v] <= '0;
        edst[v] <= 1'b0;
      end
      fault_pend <= 1'b0;
      ej_credit  <= '0;
    end else begin
      if (fault_inj) fault_pend <= 1'b1;
      if (ej_valid) begin
        automatic flit_t wf = ej_flit;
        if (fault_pend || fault_inj) begin
          wf.data[0] = !wf.data[0];
          fault_pend <= 1'b0;
        end
        ebuf[ej_vc][ewp[ej_vc]] <= wf;
        ewp[ej_vc] <= ewp[ej_vc] + 1'b1;
      end
      for (int v = 0; v < NVC; v++) begin
        if (epop[v]) begin
          erp[v]  <= erp[v] + 1'b1;
          edst[v] <= esel[v];
        end
        ecnt[v] <= ecnt[v] + CW'(ej_valid && ej_vc == 1'(v)) - CW'(epop[v]);
      end
      ej_credit <= epop;
    end
  end

endmodule
