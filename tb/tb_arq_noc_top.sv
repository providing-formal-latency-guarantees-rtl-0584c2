// tb_arq_noc_top: end-to-end test of the 3 x 4 ARQ network at its default
// parameters (t_mem = 40, timeout = 60, Stop-and-Wait general traffic).
// Phases:
//  1. a 4 KB DMA transfer (32 packets of 128 B) from node 0 to node 11,
//     in parallel with Stop-and-Wait packets 3 -> 8 and 5 -> 0; the data is
//     read back from node 11's memory and compared; the transfer must finish
//     within t_mem + 10 cycles per packet + 100; then the transfer is repeated
//     while a DMA transfer 1 -> 3 runs over the same row-0 links, so wormhole
//     packets contend and injection waits for credits;
//  2. a DMA transfer 2 -> 9 with a soft error on a data packet at node 9:
//     NACK, selective retransmission, complete and correct data;
//  3. a DMA transfer 4 -> 7 whose ACK is corrupted at node 4: timeout,
//     resend of the last packet, duplicate dropped, ACK, done;
//  4. Stop-and-Wait 6 -> 1 with a corrupted data packet and a corrupted ACK:
//     timeouts, discarded duplicate, in-order delivery.
// Every mechanism (NACK, selective resend, DMA timeout, duplicate drop, CRC
// drop, Stop-and-Wait timeout and discard, injection credit stall) is
// counted, and one that never happened counts as a failure.
module tb_arq_noc_top;
  import arq_pkg::*;

  localparam int N = 12, AW = 11, T_MEM = 40;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] dma_start_valid, dma_start_ready, dma_tx_done, dma_rx_done;
  logic [NODE_W-1:0] dma_start_dst [N];
  logic [AW-1:0] dma_start_src_addr [N];
  logic [31:0] dma_start_dst_addr [N];
  logic [7:0] dma_start_npkts_m1 [N];
  logic [N-1:0] gen_tx_valid, gen_tx_ready, gen_rx_valid, gen_rx_ready;
  logic [NODE_W-1:0] gen_tx_dst [N];
  logic [GEN_PKT_WORDS-1:0][FLIT_W-1:0] gen_tx_data [N];
  logic [NODE_W-1:0] gen_rx_src [N];
  logic [GEN_PKT_WORDS-1:0][FLIT_W-1:0] gen_rx_data [N];
  logic [N-1:0] mem_en, mem_we, fault_inj;
  logic [AW-1:0] mem_addr [N];
  logic [FLIT_W-1:0] mem_wdata [N];
  logic [FLIT_W-1:0] mem_rdata [N];
  node_ev_t ev [N];

  arq_noc_top dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int c_nack = 0, c_dto = 0, c_retx = 0, c_dup = 0, c_dcrc = 0, c_rnack = 0;
  int c_gto = 0, c_gdisc = 0, c_gcrc = 0, c_stall = 0;
  int n_txdone [N], n_rxdone [N];
  typedef struct { int src; int k; } gpkt_t;
  gpkt_t gq [N][$];

  always #5 clk = ~clk;

  task automatic fail(input string s);
    failures++;
    $display("FAIL @%0d: %s", cyc, s);
    if (failures >= 50) begin
      $display("too many failures, stopping");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  endtask

  function automatic logic [FLIT_W-1:0] dword(input int node, input int a);
    return {32'(node), 32'(a), 32'hD0A0_0000 ^ 32'(a * 13), ~32'(node * 4096 + a)};
  endfunction

  function automatic logic [FLIT_W-1:0] gword(input int src, input int k, input int w);
    return {32'(src), 32'(k), 32'(w), 32'h5EED_0000};
  endfunction

  always @(posedge clk) begin
    cyc++;
    gen_rx_ready <= N'($urandom);
    if (rst_n) for (int n = 0; n < N; n++) begin
      c_nack  += ev[n].dma_tx_nack;
      c_dto   += ev[n].dma_tx_timeout;
      c_retx  += ev[n].dma_tx_retx;
      c_dup   += ev[n].dma_rx_dup;
      c_dcrc  += ev[n].dma_rx_crc_drop;
      c_rnack += ev[n].dma_rx_nack;
      c_gto   += ev[n].gen_tx_timeout;
      c_gdisc += ev[n].gen_rx_discard;
      c_gcrc  += ev[n].gen_rx_crc_drop;
      c_stall += ev[n].inj_stall;
      n_txdone[n] += dma_tx_done[n];
      n_rxdone[n] += dma_rx_done[n];
      if (rst_n && gen_rx_valid[n] && gen_rx_ready[n]) begin
        automatic int k = int'(gen_rx_data[n][0][95:64]);
        for (int w = 0; w < GEN_PKT_WORDS; w++) begin
          checks++;
          if (gen_rx_data[n][w] !== gword(int'(gen_rx_src[n]), k, w)) fail("general packet payload");
        end
        gq[n].push_back('{int'(gen_rx_src[n]), k});
      end
    end
  end

  // tile port access
  task automatic mem_write(input int n, input int a, input logic [FLIT_W-1:0] d);
    @(negedge clk);
    mem_en[n] = 1; mem_we[n] = 1; mem_addr[n] = AW'(a); mem_wdata[n] = d;
    @(negedge clk);
    mem_en[n] = 0; mem_we[n] = 0;
  endtask

  task automatic check_mem(input int n, input int a, input logic [FLIT_W-1:0] d, input string what);
    @(negedge clk);
    mem_en[n] = 1; mem_we[n] = 0; mem_addr[n] = AW'(a);
    @(negedge clk);
    mem_en[n] = 0;
    checks++;
    if (mem_rdata[n] !== d) fail($sformatf("%s: node %0d word %0d", what, n, a));
  endtask

  task automatic preload(input int n, input int a0, input int words);
    for (int a = a0; a < a0 + words; a++) begin
      @(negedge clk);
      mem_en[n] = 1; mem_we[n] = 1; mem_addr[n] = AW'(a); mem_wdata[n] = dword(n, a);
    end
    @(negedge clk);
    mem_en[n] = 0; mem_we[n] = 0;
  endtask

  task automatic dma(input int s, input int d, input int src_a, input int dst_a, input int npk);
    @(negedge clk);
    while (!dma_start_ready[s]) @(negedge clk);
    dma_start_valid[s] = 1; dma_start_dst[s] = 4'(d); dma_start_src_addr[s] = AW'(src_a);
    dma_start_dst_addr[s] = 32'(dst_a); dma_start_npkts_m1[s] = 8'(npk - 1);
    @(negedge clk);
    dma_start_valid[s] = 0;
  endtask

  task automatic wait_done(input int s, input int count, input int limit, output int took);
    int t0;
    t0 = cyc;
    while (n_txdone[s] < count && cyc - t0 < limit) @(posedge clk);
    took = cyc - t0;
    checks++;
    if (n_txdone[s] < count) fail($sformatf("DMA of node %0d not done in %0d cycles", s, limit));
  endtask

  task automatic gen_send(input int s, input int d, input int k);
    @(negedge clk);
    gen_tx_valid[s] = 1; gen_tx_dst[s] = 4'(d);
    for (int w = 0; w < GEN_PKT_WORDS; w++) gen_tx_data[s][w] = gword(s, k, w);
    @(posedge clk);
    while (!gen_tx_ready[s]) @(posedge clk);
    @(negedge clk);
    gen_tx_valid[s] = 0;
  endtask

  task automatic check_gen(input int d, input int s, input int count);
    int t0;
    t0 = cyc;
    while (gq[d].size() < count && cyc - t0 < 5000) @(posedge clk);
    checks++;
    if (gq[d].size() != count) fail($sformatf("node %0d got %0d of %0d general packets", d, gq[d].size(), count));
    for (int i = 0; i < gq[d].size(); i++) begin
      checks++;
      if (gq[d][i].src != s || gq[d][i].k != i) fail("general packet order");
    end
    gq[d].delete();
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int took;
    dma_start_valid = '0; gen_tx_valid = '0; mem_en = '0; mem_we = '0; fault_inj = '0;
    for (int n = 0; n < N; n++) begin
      dma_start_dst[n] = '0; dma_start_src_addr[n] = '0; dma_start_dst_addr[n] = '0;
      dma_start_npkts_m1[n] = '0; gen_tx_dst[n] = '0; gen_tx_data[n] = '0;
      mem_addr[n] = '0; mem_wdata[n] = '0; n_txdone[n] = 0; n_rxdone[n] = 0;
    end
    repeat (5) @(posedge clk);
    rst_n = 1;
    preload(0, 0, 256);
    preload(2, 0, 128);
    preload(4, 0, 32);
    preload(1, 0, 128);

    // ---- phase 1: 4 KB DMA 0 -> 11 with Stop-and-Wait background traffic
    fork
      begin
        dma(0, 11, 0, 1024, 32);
        wait_done(0, 1, 5000, took);
        $display("4 KB DMA transfer, error-free: %0d cycles", took);
        checks++;
        if (took > T_MEM + 32 * 10 + 100) fail($sformatf("4 KB transfer took %0d cycles", took));
      end
      for (int k = 0; k < 10; k++) gen_send(3, 8, k);
      for (int k = 0; k < 10; k++) gen_send(5, 0, k);
    join
    check_gen(8, 3, 10);
    check_gen(0, 5, 10);
    checks++;
    if (n_rxdone[11] != 1 || n_rxdone[3] != 0) fail("receiver 11 not done");
    for (int a = 0; a < 256; a++) check_mem(11, 1024 + a, dword(0, a), "4 KB transfer");

    // ---- phase 1b: transfers 0 -> 11 and 1 -> 3 share the row-0 links
    fork
      begin
        dma(0, 11, 0, 1280, 32);
        wait_done(0, 2, 5000, took);
        $display("4 KB DMA transfer sharing links with another transfer: %0d cycles", took);
      end
      begin
        dma(1, 3, 0, 256, 16);
        wait_done(1, 1, 5000, took);
      end
    join
    for (int a = 0; a < 256; a++) check_mem(11, 1280 + a, dword(0, a), "second 4 KB transfer");
    for (int a = 0; a < 128; a++) check_mem(3, 256 + a, dword(1, a), "2 KB transfer 1 -> 3");

    // ---- phase 2: soft error on a data packet, NACK and selective resend
    fork
      dma(2, 9, 0, 512, 16);
      begin
        repeat (T_MEM + 60) @(posedge clk);
        @(negedge clk); fault_inj[9] = 1;
        @(negedge clk); fault_inj[9] = 0;
      end
    join
    wait_done(2, 1, 5000, took);
    $display("2 KB DMA transfer with one corrupted packet: %0d cycles", took);
    for (int a = 0; a < 128; a++) check_mem(9, 512 + a, dword(2, a), "transfer with NACK");
    checks++;
    if (c_dcrc < 1 || c_rnack < 1 || c_nack < 1 || c_retx < 1) fail("NACK path not taken");

    // ---- phase 3: ACK corrupted at the sender, timeout and duplicate
    fork
      dma(4, 7, 0, 0, 4);
      begin
        @(negedge clk); fault_inj[4] = 1;
        @(negedge clk); fault_inj[4] = 0;
      end
    join
    wait_done(4, 1, 5000, took);
    $display("512 B DMA transfer with lost ACK: %0d cycles", took);
    for (int a = 0; a < 32; a++) check_mem(7, a, dword(4, a), "transfer with lost ACK");
    checks++;
    if (c_dto < 1 || c_dup < 1) fail("timeout/duplicate path not taken");
    checks++;
    if (n_txdone[4] != 1 || n_rxdone[7] != 1) fail("lost-ACK transfer completion count");

    // ---- phase 4: Stop-and-Wait with a corrupted data packet and a lost ACK
    gen_send(6, 1, 0);
    @(negedge clk); fault_inj[1] = 1;       // next flit ejected at node 1: data
    @(negedge clk); fault_inj[1] = 0;
    gen_send(6, 1, 1);
    repeat (300) @(posedge clk);
    @(negedge clk); fault_inj[6] = 1;       // next flit ejected at node 6: ACK
    @(negedge clk); fault_inj[6] = 0;
    gen_send(6, 1, 2);
    gen_send(6, 1, 3);
    check_gen(1, 6, 4);
    checks++;
    if (c_gto < 2 || c_gcrc < 1 || c_gdisc < 1) fail("Stop-and-Wait recovery path not taken");

    // ---- every mechanism must have happened
    checks++;
    if (c_stall == 0) fail("no injection credit stall");
    $display("mechanisms: dma_nack=%0d dma_retx=%0d dma_timeout=%0d dma_dup=%0d dma_crc_drop=%0d",
             c_nack, c_retx, c_dto, c_dup, c_dcrc);
    $display("mechanisms: snw_timeout=%0d snw_discard=%0d snw_crc_drop=%0d inj_stall=%0d",
             c_gto, c_gdisc, c_gcrc, c_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
