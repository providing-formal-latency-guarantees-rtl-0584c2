// arq_noc_top: a ROWS x COLS mesh network-on-chip (3 x 4 by default) whose
// network interfaces provide reliable end-to-end transport with ARQ
// protocols. Every node has
//   - a DMA ARQ sender and receiver for DMA transfers (whole transfer
//     acknowledged once, selective retransmission re-read from local memory),
//   - a Go-Back-N sender and receiver for general traffic (WINDOW = 1, i.e.
//     Stop-and-Wait, by default),
//   - a local memory that the DMA sender reads and the DMA receiver writes,
//   - a network interface joining these to the node's router.
// Two protocol instances per node let DMA and general traffic be carried in
// parallel. Data packets travel on virtual channel 0 and ACK/NACK packets on
// virtual channel 1.
// Tile-side ports, per node n (arrays indexed by node id):
//   dma_start_*  start a DMA write of npkts_m1+1 packets of 8 words from local
//                word address src_addr to word address dst_addr at node dst;
//   dma_tx_done  the sender received the final ACK; dma_rx_done a transfer
//                became complete at the receiver;
//   gen_tx_*     a 4-word general packet to send (valid/ready);
//   gen_rx_*     a 4-word general packet delivered in order (valid/ready);
//   mem_*        single-cycle tile access to the local memory;
//   fault_inj    corrupt the next flit ejected at the node (soft error);
//   ev           event pulses of the node.
// The system structure and protocol set follow the described design; memory
// size and the tile-side signalling are this design's choices.
module arq_noc_top
  import arq_pkg::*;
#(
  parameter int ROWS       = 3,
  parameter int COLS       = 4,
  parameter int N          = ROWS * COLS,
  parameter int MEM_WORDS  = 2048,
  parameter int AW         = $clog2(MEM_WORDS),
  parameter int T_MEM      = 40,
  parameter int TOUT       = 60,
  parameter int GBN_WINDOW = 1,
  parameter int DEPTH      = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // DMA commands
  input  logic [N-1:0]         dma_start_valid,
  output logic [N-1:0]         dma_start_ready,
  input  logic [NODE_W-1:0]    dma_start_dst      [N],
  input  logic [AW-1:0]        dma_start_src_addr [N],
  input  logic [31:0]          dma_start_dst_addr [N],
  input  logic [7:0]           dma_start_npkts_m1 [N],
  output logic [N-1:0]         dma_tx_done,
  output logic [N-1:0]         dma_rx_done,
  // general traffic
  input  logic [N-1:0]         gen_tx_valid,
  output logic [N-1:0]         gen_tx_ready,
  input  logic [NODE_W-1:0]    gen_tx_dst  [N],
  input  logic [GEN_PKT_WORDS-1:0][FLIT_W-1:0] gen_tx_data [N],
  output logic [N-1:0]         gen_rx_valid,
  input  logic [N-1:0]         gen_rx_ready,
  output logic [NODE_W-1:0]    gen_rx_src  [N],
  output logic [GEN_PKT_WORDS-1:0][FLIT_W-1:0] gen_rx_data [N],
  // tile access to local memories
  input  logic [N-1:0]         mem_en,
  input  logic [N-1:0]         mem_we,
  input  logic [AW-1:0]        mem_addr  [N],
  input  logic [FLIT_W-1:0]    mem_wdata [N],
  output logic [FLIT_W-1:0]    mem_rdata [N],
  // soft-error injection and events
  input  logic [N-1:0]         fault_inj,
  output node_ev_t             ev [N]
);

  logic [N-1:0]          inj_valid, ej_valid, inj_vc, ej_vc;
  flit_t                 inj_flit [N];
  flit_t                 ej_flit  [N];
  logic [N-1:0][NVC-1:0] inj_credit, ej_credit;

  noc_mesh #(.ROWS(ROWS), .COLS(COLS), .DEPTH(DEPTH)) u_mesh (
    .clk, .rst_n,
    .inj_valid, .inj_flit, .inj_vc, .inj_credit,
    .ej_valid, .ej_flit, .ej_vc, .ej_credit
  );

  for (genvar n = 0; n < N; n++) begin : g_node
    localparam logic [NODE_W-1:0] ID = NODE_W'(n);

    logic [3:0] src_valid, src_ready, snk_valid, snk_ready;
    flit_t      src_flit [4];
    flit_t      snk_flit [4];
    logic              rd_en, rd_valid, wr_valid;
    logic [AW-1:0]     rd_addr, wr_addr;
    logic [FLIT_W-1:0] rd_data, wr_data;

    network_interface #(.COLS(COLS), .DEPTH(DEPTH)) u_ni (
      .clk, .rst_n,
      .node_id     (ID),
      .fault_inj   (fault_inj[n]),
      .src_valid, .src_flit, .src_ready,
      .snk_valid, .snk_flit, .snk_ready,
      .inj_valid   (inj_valid[n]),
      .inj_flit    (inj_flit[n]),
      .inj_vc      (inj_vc[n]),
      .inj_credit  (inj_credit[n]),
      .ej_valid    (ej_valid[n]),
      .ej_flit     (ej_flit[n]),
      .ej_vc       (ej_vc[n]),
      .ej_credit   (ej_credit[n]),
      .ev_inj_stall(ev[n].inj_stall)
    );

    dma_arq_tx #(.TOUT(TOUT), .AW(AW)) u_dma_tx (
      .clk, .rst_n,
      .node_id       (ID),
      .start_valid   (dma_start_valid[n]),
      .start_ready   (dma_start_ready[n]),
      .start_dst     (dma_start_dst[n]),
      .start_src_addr(dma_start_src_addr[n]),
      .start_dst_addr(dma_start_dst_addr[n]),
      .start_npkts_m1(dma_start_npkts_m1[n]),
      .done          (dma_tx_done[n]),
      .rd_en, .rd_addr, .rd_valid, .rd_data,
      .out_valid     (src_valid[0]),
      .out_flit      (src_flit[0]),
      .out_ready     (src_ready[0]),
      .rsp_valid     (snk_valid[2]),
      .rsp_flit      (snk_flit[2]),
      .rsp_ready     (snk_ready[2]),
      .ev_nack       (ev[n].dma_tx_nack),
      .ev_timeout    (ev[n].dma_tx_timeout),
      .ev_retx       (ev[n].dma_tx_retx)
    );

    dma_arq_rx #(.AW(AW)) u_dma_rx (
      .clk, .rst_n,
      .node_id    (ID),
      .in_valid   (snk_valid[0]),
      .in_flit    (snk_flit[0]),
      .in_ready   (snk_ready[0]),
      .wr_valid, .wr_addr, .wr_data,
      .wr_ready   (1'b1),
      .rsp_valid  (src_valid[2]),
      .rsp_flit   (src_flit[2]),
      .rsp_ready  (src_ready[2]),
      .done       (dma_rx_done[n]),
      .ev_dup     (ev[n].dma_rx_dup),
      .ev_crc_drop(ev[n].dma_rx_crc_drop),
      .ev_nack    (ev[n].dma_rx_nack)
    );

    gbn_tx #(.WINDOW(GBN_WINDOW), .TOUT(TOUT)) u_gbn_tx (
      .clk, .rst_n,
      .node_id   (ID),
      .pkt_valid (gen_tx_valid[n]),
      .pkt_ready (gen_tx_ready[n]),
      .pkt_dst   (gen_tx_dst[n]),
      .pkt_data  (gen_tx_data[n]),
      .out_valid (src_valid[1]),
      .out_flit  (src_flit[1]),
      .out_ready (src_ready[1]),
      .rsp_valid (snk_valid[3]),
      .rsp_flit  (snk_flit[3]),
      .rsp_ready (snk_ready[3]),
      .ev_timeout(ev[n].gen_tx_timeout)
    );

    gbn_rx u_gbn_rx (
      .clk, .rst_n,
      .node_id    (ID),
      .in_valid   (snk_valid[1]),
      .in_flit    (snk_flit[1]),
      .in_ready   (snk_ready[1]),
      .pkt_valid  (gen_rx_valid[n]),
      .pkt_ready  (gen_rx_ready[n]),
      .pkt_src    (gen_rx_src[n]),
      .pkt_data   (gen_rx_data[n]),
      .rsp_valid  (src_valid[3]),
      .rsp_flit   (src_flit[3]),
      .rsp_ready  (src_ready[3]),
      .ev_discard (ev[n].gen_rx_discard),
      .ev_crc_drop(ev[n].gen_rx_crc_drop)
    );

    local_mem #(.WORDS(MEM_WORDS), .W(FLIT_W), .LAT(T_MEM)) u_mem (
      .clk, .rst_n,
      .rd_en, .rd_addr, .rd_valid, .rd_data,
      .wr_en  (wr_valid),
      .wr_addr, .wr_data,
      .t_en   (mem_en[n]),
      .t_we   (mem_we[n]),
      .t_addr (mem_addr[n]),
      .t_wdata(mem_wdata[n]),
      .t_rdata(mem_rdata[n])
    );
  end

endmodule
